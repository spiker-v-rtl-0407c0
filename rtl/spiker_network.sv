// spiker_network - the spiking neural network engine of the accelerator.
//
// A feed-forward stack of LIF layers: N_IN inputs, NUM_HIDDEN hidden layers of
// N_HID neurons and an output layer of N_OUT neurons. The network advances in
// time steps; one time step consumes one input sample. Within a step the
// layers run one after the other, each started by the previous one's done.
//
// Handshake (level signals unless noted):
//   * sample_ready_i: the producer has a stream of samples on input_spikes_i.
//   * start_i: the producer allows the network to run.
//   * ready_o: high while the network can take a sample - from the first
//     clock after reset when sample_ready_i is present, between time steps of
//     a burst, and after a burst has ended. It is low during reset, so a
//     producer that raised sample_ready_i early still sees ready_o rise.
//   * sample_o: one-clock pulse, the sample on input_spikes_i has been
//     captured; the producer may then present the next one.
//   * When sample_ready_i is low while the network waits between steps, the
//     burst is over: the membranes are cleared and the network moves to DONE,
//     where ready_o stays high as the confirmation that the exchange has
//     completed, until start_i and sample_ready_i begin the next burst.
// out_valid_o pulses with each new output_spikes_o (the output layer's spikes
// of the step just finished). step_cycles_o is the length of that step in
// clocks, from the capture to out_valid_o. sat_o pulses when some membrane
// saturated during the step.
//
// The handshake names and their order come from the accelerator's
// description; the exact edges, the membrane clearing at the end of a burst,
// sequential layer scheduling and the layer sizes are this design's choices.
module spiker_network #(
  parameter int unsigned N_IN       = 784,
  parameter int unsigned N_HID      = 128,
  parameter int unsigned NUM_HIDDEN = 1,
  parameter int unsigned N_OUT      = 10,
  parameter int unsigned W_W        = 8,
  parameter int unsigned V_W        = 16,
  parameter int          V_TH       = 128,
  parameter int unsigned LEAK_SHIFT = 4
) (
  input  logic             clk_i,
  input  logic             rst_ni,
  input  logic             start_i,
  input  logic             sample_ready_i,
  input  logic [N_IN-1:0]  input_spikes_i,
  output logic             ready_o,
  output logic             sample_o,
  output logic [N_OUT-1:0] output_spikes_o,
  output logic             out_valid_o,
  output logic [31:0]      step_cycles_o,
  output logic             sat_o
);

  localparam int unsigned NL = NUM_HIDDEN + 1;  // layers with neurons
  localparam int unsigned MAXW = (N_IN > N_HID) ? ((N_IN > N_OUT) ? N_IN : N_OUT)
                                                : ((N_HID > N_OUT) ? N_HID : N_OUT);

  typedef enum logic [1:0] {N_IDLE, N_RUN, N_WAIT, N_DONE} nstate_e;
  nstate_e state_q;

  logic            up_q;       // first clock after reset has passed
  logic            capture;
  logic            clear;
  logic [NL:0]     lstart;     // lstart[k] starts layer k; lstart[NL] = step done
  logic [NL-1:0]   lsat;
  logic [NL-1:0]   lbusy;
  logic [MAXW-1:0] lspk [NL+1];
  logic [31:0]     cyc_q;

  assign capture = start_i && sample_ready_i && up_q &&
                   (state_q != N_RUN);
  assign clear   = (state_q == N_WAIT) && !sample_ready_i;
  assign ready_o = (state_q == N_WAIT) || (state_q == N_DONE) ||
                   ((state_q == N_IDLE) && sample_ready_i && up_q);

  assign lstart[0] = capture;
  assign lspk[0]   = MAXW'(input_spikes_i);

  for (genvar k = 0; k < NL; k++) begin : g_layer
    localparam int unsigned LIN  = (k == 0) ? N_IN : N_HID;
    localparam int unsigned LOUT = (k == NL - 1) ? N_OUT : N_HID;
    logic [LOUT-1:0] spk;
    spiker_layer #(
      .N_IN      (LIN),
      .N_NEU     (LOUT),
      .W_W       (W_W),
      .V_W       (V_W),
      .V_TH      (V_TH),
      .LEAK_SHIFT(LEAK_SHIFT),
      .LAYER_ID  (k)
    ) u_layer (
      .clk_i   (clk_i),
      .rst_ni  (rst_ni),
      .clear_i (clear),
      .start_i (lstart[k]),
      .spikes_i(lspk[k][LIN-1:0]),
      .spikes_o(spk),
      .done_o  (lstart[k+1]),
      .busy_o  (lbusy[k]),
      .sat_o   (lsat[k])
    );
    assign lspk[k+1] = MAXW'(spk);
  end

  logic sat_acc_q;

  // A sample is only captured when every layer has finished its step.
  a_capture_idle: assert property (@(posedge clk_i) disable iff (!rst_ni)
                                   capture |-> (lbusy == '0));

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      state_q         <= N_IDLE;
      up_q            <= 1'b0;
      sample_o        <= 1'b0;
      output_spikes_o <= '0;
      out_valid_o     <= 1'b0;
      step_cycles_o   <= '0;
      cyc_q           <= '0;
      sat_acc_q       <= 1'b0;
      sat_o           <= 1'b0;
    end else begin
      up_q        <= 1'b1;
      sample_o    <= capture;
      out_valid_o <= 1'b0;
      sat_o       <= 1'b0;
      unique case (state_q)
        N_IDLE, N_WAIT, N_DONE: begin
          if (capture) begin
            state_q   <= N_RUN;
            cyc_q     <= 32'd1;
            sat_acc_q <= 1'b0;
          end else if (clear) begin
            state_q <= N_DONE;
          end
        end
        N_RUN: begin
          cyc_q <= cyc_q + 32'd1;
          if (|lsat) sat_acc_q <= 1'b1;
          if (lstart[NL]) begin
            output_spikes_o <= lspk[NL][N_OUT-1:0];
            out_valid_o     <= 1'b1;
            step_cycles_o   <= cyc_q;
            sat_o           <= sat_acc_q || (|lsat);
            state_q         <= N_WAIT;
          end
        end
        default: state_q <= N_IDLE;
      endcase
    end
  end

endmodule

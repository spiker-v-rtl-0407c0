// spiker_layer - one fully connected layer of leaky integrate-and-fire neurons.
//
// A time step starts with a start_i pulse that copies the input spike vector
// into a pending mask and applies the leak to every membrane,
// v <- v - (v >>> LEAK_SHIFT). The layer then integrates event by event: each
// clock a priority encoder picks the lowest pending input spike, clears it and
// reads that input's weight row; one clock later the row is added to all
// N_NEU membranes in parallel with saturation at the V_W-bit signed limits.
// Inputs without a spike cost no cycle. When nothing is pending and the last
// row has been added, every neuron whose membrane reached V_TH fires and its
// membrane is reset to zero. spikes_o holds the layer's output for the step
// and done_o pulses for one clock.
//
// Timing: with n input spikes, done_o is set by the (n+3)-th rising edge after
// the edge that samples start_i (the 2nd when n = 0), so a consumer sampling
// done_o starts n+4 clocks (3 clocks) after this layer was started. clear_i zeroes the membranes and aborts a step.
// sat_o pulses with done_o when some addition of the step saturated.
//
// The LIF model, the per-clock membrane update and the event-driven input
// handling follow the accelerator's description; the shift-based leak, reset
// to zero, saturation and the widths are this design's choices.
module spiker_layer #(
  parameter int unsigned N_IN       = 784,
  parameter int unsigned N_NEU      = 128,
  parameter int unsigned W_W        = 8,
  parameter int unsigned V_W        = 16,
  parameter int          V_TH       = 128,
  parameter int unsigned LEAK_SHIFT = 4,
  parameter int unsigned LAYER_ID   = 0,
  localparam int unsigned IW        = (N_IN > 1) ? $clog2(N_IN) : 1
) (
  input  logic             clk_i,
  input  logic             rst_ni,
  input  logic             clear_i,
  input  logic             start_i,
  input  logic [N_IN-1:0]  spikes_i,
  output logic [N_NEU-1:0] spikes_o,
  output logic             done_o,
  output logic             busy_o,
  output logic             sat_o
);

  typedef enum logic [1:0] {L_IDLE, L_SCAN, L_FIRE} lstate_e;

  localparam logic signed [V_W-1:0] V_MAX = {1'b0, {(V_W-1){1'b1}}};
  localparam logic signed [V_W-1:0] V_MIN = {1'b1, {(V_W-1){1'b0}}};
  localparam logic signed [V_W-1:0] V_THR = V_W'(V_TH);

  lstate_e                     state_q;
  logic [N_IN-1:0]             pending_q;
  logic                        rd_valid_q;
  logic                        sat_q;
  logic signed [V_W-1:0]       v_q [N_NEU];
  logic [N_NEU-1:0][W_W-1:0]   row;

  // lowest pending input spike
  logic [IW-1:0] pick;
  logic          any_pending;
  always_comb begin
    pick        = '0;
    any_pending = |pending_q;
    for (int i = N_IN - 1; i >= 0; i--) begin
      if (pending_q[i]) pick = IW'(i);
    end
  end

  logic rd_en;
  assign rd_en = (state_q == L_SCAN) && any_pending;

  spiker_weight_rom #(
    .N_ROWS  (N_IN),
    .N_COLS  (N_NEU),
    .W_W     (W_W),
    .LAYER_ID(LAYER_ID)
  ) u_rom (
    .clk_i (clk_i),
    .en_i  (rd_en),
    .addr_i(pick),
    .row_o (row)
  );

  // saturating membrane + weight
  function automatic logic signed [V_W:0] add_wide(logic signed [V_W-1:0] v, logic [W_W-1:0] w);
    return (V_W+1)'(v) + (V_W+1)'($signed(w));
  endfunction

  assign busy_o = (state_q != L_IDLE);

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      state_q    <= L_IDLE;
      pending_q  <= '0;
      rd_valid_q <= 1'b0;
      sat_q      <= 1'b0;
      spikes_o   <= '0;
      done_o     <= 1'b0;
      sat_o      <= 1'b0;
      for (int j = 0; j < N_NEU; j++) v_q[j] <= '0;
    end else begin
      done_o <= 1'b0;
      sat_o  <= 1'b0;
      if (clear_i) begin
        state_q    <= L_IDLE;
        pending_q  <= '0;
        rd_valid_q <= 1'b0;
        for (int j = 0; j < N_NEU; j++) v_q[j] <= '0;
      end else begin
        unique case (state_q)
          L_IDLE: begin
            if (start_i) begin
              pending_q  <= spikes_i;
              rd_valid_q <= 1'b0;
              sat_q      <= 1'b0;
              for (int j = 0; j < N_NEU; j++) v_q[j] <= v_q[j] - (v_q[j] >>> LEAK_SHIFT);
              state_q    <= L_SCAN;
            end
          end
          L_SCAN: begin
            if (any_pending) pending_q[pick] <= 1'b0;
            rd_valid_q <= any_pending;
            if (rd_valid_q) begin
              for (int j = 0; j < N_NEU; j++) begin
                logic signed [V_W:0] s;
                s = add_wide(v_q[j], row[j]);
                if (s > (V_W+1)'(V_MAX)) begin
                  v_q[j] <= V_MAX;
                  sat_q  <= 1'b1;
                end else if (s < (V_W+1)'(V_MIN)) begin
                  v_q[j] <= V_MIN;
                  sat_q  <= 1'b1;
                end else begin
                  v_q[j] <= s[V_W-1:0];
                end
              end
            end
            if (!any_pending && !rd_valid_q) state_q <= L_FIRE;
          end
          L_FIRE: begin
            for (int j = 0; j < N_NEU; j++) begin
              spikes_o[j] <= (v_q[j] >= V_THR);
              if (v_q[j] >= V_THR) v_q[j] <= '0;
            end
            done_o  <= 1'b1;
            sat_o   <= sat_q;
            state_q <= L_IDLE;
          end
          default: state_q <= L_IDLE;
        endcase
      end
    end
  end

endmodule

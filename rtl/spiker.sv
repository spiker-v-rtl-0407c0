// spiker - the accelerator core: Spiker Reader, Network and Spiker Writer.
//
// The reader turns the SPIKES registers and the CTRL1 bits into the network's
// parallel input and its start / sample_ready controls; the network runs the
// LIF layers one time step per sample; the writer stores the output spikes in
// the SPIKES_RESULT registers and reports SAMPLE and READY through STATUS.
// The network's ready output also gates the reader's input buffer.
//
// Interface: reg2hw_i / hw2reg_o are the register file's structs
// (spiker_pkg). Timing: one clock through the reader, then the network's
// step latency (see spiker_layer), then one clock into the result registers.
//
// The three-part split and the signal names follow the accelerator's block
// diagram; the widths of the hidden layers are this design's choice.
module spiker
  import spiker_pkg::*;
#(
  parameter int unsigned N_IN       = 784,
  parameter int unsigned N_HID      = 128,
  parameter int unsigned NUM_HIDDEN = 1,
  parameter int unsigned N_OUT      = 10,
  parameter int unsigned W_W        = 8,
  parameter int unsigned V_W        = 16,
  parameter int          V_TH       = 128,
  parameter int unsigned LEAK_SHIFT = 4
) (
  input  logic        clk_i,
  input  logic        rst_ni,
  input  reg2hw_t     reg2hw_i,
  output hw2reg_t     hw2reg_o,
  output logic [31:0] step_count_o,
  output logic [31:0] step_cycles_o,
  output logic        sat_o
);

  logic [N_IN-1:0]  in_spikes;
  logic             net_sample_ready, net_start, net_ready, net_sample, out_valid;
  logic [N_OUT-1:0] out_spikes;

  spiker_reader #(
    .N_IN   (N_IN),
    .N_WORDS(SPIKES_WORDS)
  ) u_reader (
    .clk_i         (clk_i),
    .rst_ni        (rst_ni),
    .spikes_words_i(reg2hw_i.spikes),
    .sample_ready_i(reg2hw_i.sample_ready),
    .start_i       (reg2hw_i.start),
    .spikes_o      (in_spikes),
    .sample_ready_o(net_sample_ready),
    .start_o       (net_start)
  );

  spiker_network #(
    .N_IN      (N_IN),
    .N_HID     (N_HID),
    .NUM_HIDDEN(NUM_HIDDEN),
    .N_OUT     (N_OUT),
    .W_W       (W_W),
    .V_W       (V_W),
    .V_TH      (V_TH),
    .LEAK_SHIFT(LEAK_SHIFT)
  ) u_network (
    .clk_i          (clk_i),
    .rst_ni         (rst_ni),
    .start_i        (net_start),
    .sample_ready_i (net_sample_ready),
    .input_spikes_i (in_spikes),
    .ready_o        (net_ready),
    .sample_o       (net_sample),
    .output_spikes_o(out_spikes),
    .out_valid_o    (out_valid),
    .step_cycles_o  (step_cycles_o),
    .sat_o          (sat_o)
  );

  spiker_writer #(
    .N_OUT  (N_OUT),
    .N_WORDS(RESULT_WORDS)
  ) u_writer (
    .clk_i             (clk_i),
    .rst_ni            (rst_ni),
    .out_spikes_i      (out_spikes),
    .out_valid_i       (out_valid),
    .sample_i          (net_sample),
    .ready_i           (net_ready),
    .result_o          (hw2reg_o.result),
    .status_sample_d_o (hw2reg_o.sample_d),
    .status_sample_de_o(hw2reg_o.sample_de),
    .status_ready_d_o  (hw2reg_o.ready_d),
    .status_ready_de_o (hw2reg_o.ready_de),
    .step_count_o      (step_count_o)
  );

endmodule

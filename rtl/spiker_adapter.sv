// spiker_adapter - memory-mapped SNN accelerator peripheral (design top).
//
// The peripheral a RISC-V microcontroller uses to run a spiking neural network.
// Its only system interface is an AXI4 slave port (plus clock and reset): the
// CPU writes an input sample into the SPIKES registers, sets SAMPLE_READY and
// START in CTRL1, polls STATUS and reads the network's output spikes from the
// SPIKES_RESULT registers (register map in spiker_adapter_reg_top).
//
// Inside, axi_to_reg converts AXI transactions into register-bus accesses,
// spiker_adapter_reg_top holds the registers, and spiker (reader, LIF network,
// writer) computes one time step per sample. The extra outputs give
// observability of the core: finished time steps, the length in clocks of the
// last step and a pulse when a membrane saturated.
//
// Defaults: 784 inputs, one hidden layer of 128 neurons, 10 outputs, 8-bit
// weights, 16-bit membranes. The structure (AXI bridge, register file, core)
// and the 10 outputs follow the accelerator's description; the hidden-layer
// size, widths, threshold and leak are this design's choices.
module spiker_adapter
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
  input  axi_req_t    axi_req_i,
  output axi_rsp_t    axi_rsp_o,
  output logic [31:0] step_count_o,
  output logic [31:0] step_cycles_o,
  output logic        sat_o
);

  reg_req_t reg_req;
  reg_rsp_t reg_rsp;
  reg2hw_t  reg2hw;
  hw2reg_t  hw2reg;

  axi_to_reg u_axi_to_reg (
    .clk_i    (clk_i),
    .rst_ni   (rst_ni),
    .axi_req_i(axi_req_i),
    .axi_rsp_o(axi_rsp_o),
    .reg_req_o(reg_req),
    .reg_rsp_i(reg_rsp)
  );

  spiker_adapter_reg_top u_regs (
    .clk_i    (clk_i),
    .rst_ni   (rst_ni),
    .reg_req_i(reg_req),
    .reg_rsp_o(reg_rsp),
    .reg2hw_o (reg2hw),
    .hw2reg_i (hw2reg)
  );

  spiker #(
    .N_IN      (N_IN),
    .N_HID     (N_HID),
    .NUM_HIDDEN(NUM_HIDDEN),
    .N_OUT     (N_OUT),
    .W_W       (W_W),
    .V_W       (V_W),
    .V_TH      (V_TH),
    .LEAK_SHIFT(LEAK_SHIFT)
  ) u_spiker (
    .clk_i        (clk_i),
    .rst_ni       (rst_ni),
    .reg2hw_i     (reg2hw),
    .hw2reg_o     (hw2reg),
    .step_count_o (step_count_o),
    .step_cycles_o(step_cycles_o),
    .sat_o        (sat_o)
  );

endmodule

// spiker_writer - output side of the accelerator core.
//
// Captures the network's output spike vector each time a time step finishes
// (out_valid_i) and splits it across the SPIKES_RESULT words: bit k of the
// vector goes to bit (k mod 32) of word k/32, unused bits read as zero. It
// also drives the STATUS register: STATUS.SAMPLE is set on each sample
// acknowledge of the network and stays set until software clears it;
// STATUS.READY is rewritten every clock with the network's ready level, so it
// always mirrors it (a software write to it lasts one clock). The
// counter step_count_o counts finished time steps since reset.
//
// Timing: result words change on the clock after out_valid_i; the STATUS
// write enables are combinational from the network's signals, so STATUS is
// updated on the same clock edge as a register write would be.
//
// The splitting into result registers and the two STATUS flags are the
// accelerator's; the sticky SAMPLE flag and the bit order are this design's
// choices.
module spiker_writer #(
  parameter int unsigned N_OUT   = 10,
  parameter int unsigned N_WORDS = spiker_pkg::RESULT_WORDS
) (
  input  logic                     clk_i,
  input  logic                     rst_ni,
  input  logic [N_OUT-1:0]         out_spikes_i,
  input  logic                     out_valid_i,
  input  logic                     sample_i,
  input  logic                     ready_i,
  output logic [N_WORDS-1:0][31:0] result_o,
  output logic                     status_sample_d_o,
  output logic                     status_sample_de_o,
  output logic                     status_ready_d_o,
  output logic                     status_ready_de_o,
  output logic [31:0]              step_count_o
);

  if (N_WORDS * 32 < N_OUT) begin : g_size_check
    $error("spiker_writer: %0d result words cannot hold %0d outputs", N_WORDS, N_OUT);
  end

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      result_o     <= '0;
      step_count_o <= '0;
    end else begin
      if (out_valid_i) begin
        result_o     <= (N_WORDS*32)'(out_spikes_i);
        step_count_o <= step_count_o + 32'd1;
      end
    end
  end

  assign status_sample_d_o  = 1'b1;
  assign status_sample_de_o = sample_i;
  assign status_ready_d_o   = ready_i;
  assign status_ready_de_o  = 1'b1;

endmodule

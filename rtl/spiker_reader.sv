// spiker_reader - input side of the accelerator core.
//
// Unrolls the SPIKES register words into the network's parallel spike
// vector: bit k of the vector is bit (k mod 32) of word k/32; the padding bits
// of the last word are dropped. The vector and the CTRL1 bits SAMPLE_READY and
// START pass through one register stage together, so the wide register-file
// outputs are decoupled from the network's capture logic and the network sees
// spikes and controls that belong to the same clock. The network copies the
// vector when it captures a sample, so software may rewrite the SPIKES words
// for the next sample while a time step is being computed.
//
// Timing: one clock from the register file to the outputs.
//
// The unrolling and the two control signals are the accelerator's; the bit
// order and the register stage are this design's choices.
module spiker_reader #(
  parameter int unsigned N_IN    = 784,
  parameter int unsigned N_WORDS = spiker_pkg::SPIKES_WORDS
) (
  input  logic                     clk_i,
  input  logic                     rst_ni,
  input  logic [N_WORDS-1:0][31:0] spikes_words_i,
  input  logic                     sample_ready_i,
  input  logic                     start_i,
  output logic [N_IN-1:0]          spikes_o,
  output logic                     sample_ready_o,
  output logic                     start_o
);

  if (N_WORDS * 32 < N_IN) begin : g_size_check
    $error("spiker_reader: %0d SPIKES words cannot hold %0d inputs", N_WORDS, N_IN);
  end

  logic [N_WORDS*32-1:0] flat;
  assign flat = spikes_words_i;

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      spikes_o       <= '0;
      sample_ready_o <= 1'b0;
      start_o        <= 1'b0;
    end else begin
      spikes_o       <= flat[N_IN-1:0];
      sample_ready_o <= sample_ready_i;
      start_o        <= start_i;
    end
  end

endmodule

// tb_spiker_reader - checks the word-to-vector bit order and the one-clock
// register stage of the spike vector and the two control bits.
module tb_spiker_reader;
  localparam int unsigned N_IN = 70, N_WORDS = 3;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [N_WORDS-1:0][31:0] words;
  logic sr, st, sr_o, st_o;
  logic [N_IN-1:0] spk;
  int checks = 0, failures = 0;

  spiker_reader #(.N_IN(N_IN), .N_WORDS(N_WORDS)) dut (
    .clk_i(clk), .rst_ni(rst_n), .spikes_words_i(words), .sample_ready_i(sr), .start_i(st),
    .spikes_o(spk), .sample_ready_o(sr_o), .start_o(st_o));

  always #5 clk = ~clk;
  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [N_WORDS-1:0][31:0] held;
    words = '0; sr = 0; st = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 40; t++) begin
      logic [N_WORDS-1:0][31:0] w;
      for (int k = 0; k < N_WORDS; k++) w[k] = $urandom;
      words = w; sr = $urandom_range(0, 1); st = $urandom_range(0, 1);
      held = w;
      @(negedge clk);
      for (int i = 0; i < N_IN; i++) begin
        checks++;
        if (spk[i] !== held[i / 32][i % 32]) begin
          failures++;
          $display("t=%0d bit %0d", t, i);
        end
      end
      checks++;
      if (sr_o !== sr || st_o !== st) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_spiker_writer - checks how the output spikes are split over the result
// words, that results change only on out_valid, the step counter and the
// STATUS write enables (SAMPLE on each acknowledge, READY every clock).
module tb_spiker_writer;
  localparam int unsigned N_OUT = 45, N_WORDS = 2;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [N_OUT-1:0] spk;
  logic valid, sample, ready;
  logic [N_WORDS-1:0][31:0] res;
  logic sd, sde, rd, rde;
  logic [31:0] cnt;
  int checks = 0, failures = 0;

  spiker_writer #(.N_OUT(N_OUT), .N_WORDS(N_WORDS)) dut (
    .clk_i(clk), .rst_ni(rst_n), .out_spikes_i(spk), .out_valid_i(valid), .sample_i(sample),
    .ready_i(ready), .result_o(res), .status_sample_d_o(sd), .status_sample_de_o(sde),
    .status_ready_d_o(rd), .status_ready_de_o(rde), .step_count_o(cnt));

  always #5 clk = ~clk;
  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [N_OUT-1:0] last;
    int n;
    spk = '0; valid = 0; sample = 0; ready = 0; last = '0; n = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 60; t++) begin
      spk = {$urandom, $urandom};
      valid = $urandom_range(0, 2) == 0;
      sample = $urandom_range(0, 3) == 0;
      ready = $urandom_range(0, 1);
      #1;
      checks++;
      if (sde !== sample || (sample && sd !== 1'b1)) failures++;
      checks++;
      if (rde !== 1'b1 || rd !== ready) begin
        failures++;
        $display("t=%0d ready de %0b", t, rde);
      end
      if (valid) begin last = spk; n++; end
      @(negedge clk);
      checks++;
      if (res[0] !== last[31:0] || res[1] !== 32'(last[N_OUT-1:32])) begin
        failures++;
        $display("t=%0d result %h expected %h", t, res, last);
      end
      checks++;
      if (cnt != 32'(n)) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

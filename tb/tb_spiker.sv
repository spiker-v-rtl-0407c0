// tb_spiker - the accelerator core driven through its register-file structs,
// the way software uses it: spike words are written, SAMPLE_READY and START
// raised, a new sample is written after each SAMPLE acknowledge, and the
// SPIKES_RESULT words are compared with the reference model after each time
// step. Also checks the STATUS READY write enable and that dropping
// SAMPLE_READY ends the burst with READY high.
module tb_spiker;
  import spiker_pkg::*;
  import spiker_ref_pkg::*;
  localparam int unsigned N_IN = 50, N_HID = 16, NUM_HIDDEN = 1, N_OUT = 10;
  localparam int unsigned W_W = 8, V_W = 14, LS = 4;
  localparam int V_TH = 60;
  logic clk = 1'b0, rst_n = 1'b0;
  reg2hw_t r2h;
  hw2reg_t h2r;
  logic [31:0] steps, step_cycles;
  logic sat;
  logic ready_level;
  int checks = 0, failures = 0, n_out = 0;
  lif_ref ref_m;

  spiker #(.N_IN(N_IN), .N_HID(N_HID), .NUM_HIDDEN(NUM_HIDDEN), .N_OUT(N_OUT), .W_W(W_W),
           .V_W(V_W), .V_TH(V_TH), .LEAK_SHIFT(LS))
    dut (.clk_i(clk), .rst_ni(rst_n), .reg2hw_i(r2h), .hw2reg_o(h2r), .step_count_o(steps),
         .step_cycles_o(step_cycles), .sat_o(sat));

  always #5 clk = ~clk;
  // STATUS.READY as the register file would hold it
  always_ff @(posedge clk) if (!rst_n) ready_level <= 1'b0; else if (h2r.ready_de) ready_level <= h2r.ready_d;

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [SPIKES_WORDS-1:0][31:0] to_words(logic [N_IN-1:0] v);
    logic [SPIKES_WORDS-1:0][31:0] w;
    w = '0;
    for (int i = 0; i < N_IN; i++) w[i / 32][i % 32] = v[i];
    return w;
  endfunction

  // Stimulus and checking run on every falling edge: a SAMPLE acknowledge
  // makes the next sample current, a finished step is checked against the
  // reference prediction made when its sample was acknowledged.
  logic [N_IN-1:0] s [$];
  int idx;
  vec_t expq [$];
  logic [31:0] steps_q;
  always @(negedge clk) begin
    if (rst_n) begin
      if (h2r.sample_de) begin
        expq.push_back(ref_m.step(vec_t'(s[idx])));
        idx++;
        if (idx < s.size()) r2h.spikes = to_words(s[idx]);
        else r2h.sample_ready = 0;
      end
      if (steps != steps_q) begin
        // result registers follow one clock after the step counter
        @(negedge clk);
        checks++;
        if (h2r.result !== (RESULT_WORDS*32)'(expq[0][N_OUT-1:0])) begin
          failures++;
          $display("step %0d: result %h expected %h", steps, h2r.result, expq[0][N_OUT-1:0]);
        end
        if (|h2r.result) n_out++;
        void'(expq.pop_front());
      end
      steps_q = steps;
    end
  end

  initial begin
    ref_m = new(N_IN, N_HID, NUM_HIDDEN, N_OUT, W_W, V_W, V_TH, LS);
    r2h = '0;
    steps_q = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int b = 0; b < 3; b++) begin
      s = {};
      idx = 0;
      for (int k = 0; k < 10; k++) begin
        logic [N_IN-1:0] v;
        for (int i = 0; i < N_IN; i++) v[i] = ($urandom_range(0, 99) < 25 + 10 * b);
        s.push_back(v);
      end
      r2h.spikes = to_words(s[0]);
      r2h.sample_ready = 1;
      @(negedge clk);
      r2h.start = 1;
      while (r2h.sample_ready || expq.size() != 0) @(negedge clk);
      repeat (4) @(negedge clk);
      checks++;
      if (!ready_level) begin failures++; $display("READY low after burst"); end
      checks++;
      if (idx != 10) failures++;
      r2h.start = 0;
      ref_m.clear();
      @(negedge clk);
    end
    checks++;
    if (n_out == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

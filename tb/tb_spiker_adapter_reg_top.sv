// tb_spiker_adapter_reg_top - register file: write/read of every SPIKES word,
// byte strobes, CTRL1 bits on reg2hw, SPIKES_RESULT read from hw2reg and not
// writable, STATUS updates from hardware with software priority, and errors
// for unmapped offsets.
module tb_spiker_adapter_reg_top;
  import spiker_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  reg_req_t req;
  reg_rsp_t rsp;
  reg2hw_t r2h;
  hw2reg_t h2r;
  int checks = 0, failures = 0;
  logic [31:0] model [SPIKES_WORDS];

  spiker_adapter_reg_top dut (.clk_i(clk), .rst_ni(rst_n), .reg_req_i(req), .reg_rsp_o(rsp),
                              .reg2hw_o(r2h), .hw2reg_i(h2r));

  always #5 clk = ~clk;
  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic wr(logic [31:0] a, logic [31:0] d, logic [3:0] be, output logic err);
    req = '{addr: a, write: 1'b1, wdata: d, wstrb: be, valid: 1'b1};
    #1;
    err = rsp.error;
    @(negedge clk);
    req = '0;
  endtask

  task automatic rd(logic [31:0] a, output logic [31:0] d, output logic err);
    req = '{addr: a, write: 1'b0, wdata: '0, wstrb: '0, valid: 1'b1};
    #1;
    d = rsp.rdata; err = rsp.error;
    @(negedge clk);
    req = '0;
  endtask

  function automatic logic [31:0] merge(logic [31:0] o, logic [31:0] n, logic [3:0] be);
    for (int b = 0; b < 4; b++) if (be[b]) o[8*b +: 8] = n[8*b +: 8];
    return o;
  endfunction

  initial begin
    logic [31:0] d;
    logic e;
    req = '0; h2r = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    foreach (model[i]) model[i] = '0;
    // SPIKES: random writes with random strobes
    for (int t = 0; t < 150; t++) begin
      int i;
      logic [31:0] v;
      logic [3:0] be;
      i = $urandom_range(0, SPIKES_WORDS - 1);
      v = $urandom;
      be = (t < SPIKES_WORDS) ? 4'hF : 4'($urandom);
      if (t < SPIKES_WORDS) i = t;
      wr(32'h1A40_0000 + 32'(i * 4), v, be, e);
      model[i] = merge(model[i], v, be);
      checks++; if (e) failures++;
    end
    for (int i = 0; i < SPIKES_WORDS; i++) begin
      rd(32'(i * 4), d, e);
      checks++;
      if (d !== model[i] || e || r2h.spikes[i] !== model[i]) begin
        failures++; $display("SPIKES_%0d %h expected %h", i, d, model[i]);
      end
    end
    // SPIKES_RESULT comes from hardware and ignores writes
    for (int i = 0; i < RESULT_WORDS; i++) h2r.result[i] = 32'hC0DE_0000 + 32'(i);
    for (int i = 0; i < RESULT_WORDS; i++) begin
      wr(32'(SPIKES_RESULT_0_OFFSET) + 32'(4 * i), 32'hFFFF_FFFF, 4'hF, e);
      rd(32'(SPIKES_RESULT_0_OFFSET) + 32'(4 * i), d, e);
      checks++;
      if (d !== 32'hC0DE_0000 + 32'(i) || e) failures++;
    end
    // CTRL1
    wr(32'(CTRL1_OFFSET), 32'h3, 4'hF, e);
    checks++; if (!r2h.sample_ready || !r2h.start) failures++;
    wr(32'(CTRL1_OFFSET), 32'h2, 4'hF, e);
    rd(32'(CTRL1_OFFSET), d, e);
    checks++; if (d !== 32'h2 || r2h.sample_ready || !r2h.start) failures++;
    // STATUS from hardware
    h2r.sample_d = 1; h2r.sample_de = 1;
    @(negedge clk);
    h2r.sample_de = 0;
    h2r.ready_d = 1; h2r.ready_de = 1;
    @(negedge clk);
    h2r.ready_de = 0;
    rd(32'(STATUS_OFFSET), d, e);
    checks++; if (d !== 32'h3) begin failures++; $display("STATUS %h", d); end
    // software clears SAMPLE; a simultaneous hardware write loses
    h2r.sample_de = 1;
    wr(32'(STATUS_OFFSET), 32'h2, 4'hF, e);
    h2r.sample_de = 0;
    rd(32'(STATUS_OFFSET), d, e);
    checks++; if (d !== 32'h2) begin failures++; $display("STATUS after clear %h", d); end
    // unmapped offsets
    rd(32'h7C, d, e);
    checks++; if (!e) failures++;
    wr(32'h80, 32'h1, 4'hF, e);
    checks++; if (!e) failures++;
    rd(32'h6, d, e);
    checks++; if (!e) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

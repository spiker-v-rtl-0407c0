// tb_axi_to_reg - AXI4 bridge against a register-bus memory model that stalls
// at random and reports an error for addresses at or above 0x100. Checks
// single and burst writes (INCR and FIXED), burst reads with RLAST on the last
// beat, read/write IDs, SLVERR for error beats, random B/R back-pressure and
// simultaneous AW/AR requests, which must be served one after the other.
module tb_axi_to_reg;
  import spiker_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  axi_req_t req;
  axi_rsp_t rsp;
  reg_req_t rreq;
  reg_rsp_t rrsp;
  int checks = 0, failures = 0, n_collide = 0;
  logic [31:0] mem [64];
  logic [31:0] model [64];

  axi_to_reg dut (.clk_i(clk), .rst_ni(rst_n), .axi_req_i(req), .axi_rsp_o(rsp),
                  .reg_req_o(rreq), .reg_rsp_i(rrsp));

  always #5 clk = ~clk;
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // register-bus slave model with random stalls
  logic stall;
  always_ff @(posedge clk) stall <= ($urandom_range(0, 3) == 0);
  always_comb begin
    rrsp.ready = !stall;
    rrsp.error = rreq.addr[8];
    rrsp.rdata = mem[rreq.addr[7:2]];
  end
  always_ff @(posedge clk) begin
    if (rreq.valid && rrsp.ready && rreq.write && !rreq.addr[8]) begin
      for (int b = 0; b < 4; b++)
        if (rreq.wstrb[b]) mem[rreq.addr[7:2]][8*b +: 8] <= rreq.wdata[8*b +: 8];
    end
  end

  task automatic axi_write(logic [31:0] addr, logic [31:0] data [$], axi_burst_e burst,
                           logic [3:0] id, output axi_resp_e resp);
    req.aw = '{id: id, addr: addr, len: 8'(data.size() - 1), size: 3'd2, burst: burst};
    req.aw_valid = 1;
    #1;
    while (!rsp.aw_ready) begin @(negedge clk); #1; end
    @(negedge clk);
    req.aw_valid = 0;
    for (int k = 0; k < data.size(); k++) begin
      if ($urandom_range(0, 2) == 0) @(negedge clk);
      req.w = '{data: data[k], strb: 4'hF, last: (k == data.size() - 1)};
      req.w_valid = 1;
      #1;
      while (!rsp.w_ready) begin @(negedge clk); #1; end
      @(negedge clk);
      req.w_valid = 0;
    end
    repeat ($urandom_range(0, 2)) @(negedge clk);
    req.b_ready = 1;
    #1;
    while (!rsp.b_valid) begin @(negedge clk); #1; end
    resp = rsp.b.resp;
    checks++;
    if (rsp.b.id !== id) failures++;
    @(negedge clk);
    req.b_ready = 0;
  endtask

  task automatic axi_read(logic [31:0] addr, int len, axi_burst_e burst, logic [3:0] id,
                          output logic [31:0] data [$], output axi_resp_e resp [$]);
    data = {}; resp = {};
    req.ar = '{id: id, addr: addr, len: 8'(len - 1), size: 3'd2, burst: burst};
    req.ar_valid = 1;
    #1;
    while (!rsp.ar_ready) begin @(negedge clk); #1; end
    @(negedge clk);
    req.ar_valid = 0;
    for (int k = 0; k < len; k++) begin
      repeat ($urandom_range(0, 2)) @(negedge clk);
      req.r_ready = 1;
      #1;
      while (!rsp.r_valid) begin @(negedge clk); #1; end
      data.push_back(rsp.r.data);
      resp.push_back(rsp.r.resp);
      checks++;
      if (rsp.r.last !== (k == len - 1) || rsp.r.id !== id) begin
        failures++; $display("beat %0d last %0b id %0d", k, rsp.r.last, rsp.r.id);
      end
      @(negedge clk);
      req.r_ready = 0;
    end
  endtask

  initial begin
    logic [31:0] d [$];
    logic [31:0] q [$];
    axi_resp_e rs [$];
    axi_resp_e r;
    req = '0;
    foreach (mem[i]) begin mem[i] = '0; model[i] = '0; end
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 40; t++) begin
      int len, a;
      axi_burst_e bt;
      len = $urandom_range(1, 6);
      a = $urandom_range(0, 64 - len);
      bt = ($urandom_range(0, 4) == 0) ? BURST_FIXED : BURST_INCR;
      d = {};
      for (int k = 0; k < len; k++) d.push_back($urandom);
      axi_write(32'(a * 4), d, bt, 4'(t), r);
      for (int k = 0; k < len; k++) model[(bt == BURST_FIXED) ? a : a + k] = d[k];
      checks++; if (r !== RESP_OKAY) failures++;
      len = $urandom_range(1, 8);
      a = $urandom_range(0, 64 - len);
      axi_read(32'(a * 4), len, BURST_INCR, 4'(t + 3), q, rs);
      for (int k = 0; k < len; k++) begin
        checks++;
        if (q[k] !== model[a + k] || rs[k] !== RESP_OKAY) begin
          failures++; $display("read %0d: %h expected %h", a + k, q[k], model[a + k]);
        end
      end
    end
    // error beats
    d = '{32'h1, 32'h2};
    axi_write(32'h0FC, d, BURST_INCR, 4'd1, r);     // second beat hits 0x100
    checks++; if (r !== RESP_SLVERR) begin failures++; $display("no SLVERR on write"); end
    model[63] = 32'h1;
    checks++; if (mem[63] !== 32'h1) begin failures++; $display("word 63 %h", mem[63]); end
    axi_read(32'h100, 1, BURST_INCR, 4'd2, q, rs);
    checks++; if (rs[0] !== RESP_SLVERR) failures++;
    // simultaneous AW and AR
    for (int t = 0; t < 4; t++) begin
      logic got_w, got_r;
      got_w = 0; got_r = 0;
      model[5] = 32'hA5A5_0000 + 32'(t);
      @(negedge clk);
      req.aw = '{id: 4'd7, addr: 32'd20, len: 8'd0, size: 3'd2, burst: BURST_INCR};
      req.ar = '{id: 4'd9, addr: 32'd24, len: 8'd0, size: 3'd2, burst: BURST_INCR};
      req.aw_valid = 1; req.ar_valid = 1;
      #1;
      checks++;
      if (rsp.aw_ready && rsp.ar_ready) begin failures++; $display("both taken"); end
      if (rsp.aw_ready || rsp.ar_ready) n_collide++;
      begin
        logic w_done;
        w_done = 0;
        req.w = '{data: model[5], strb: 4'hF, last: 1'b1};
        req.b_ready = 1; req.r_ready = 1;
        while (!(got_w && got_r && w_done)) begin
          if (rsp.aw_ready) got_w = 1;
          if (rsp.ar_ready) got_r = 1;
          if (req.w_valid && rsp.w_ready) w_done = 1;
          @(negedge clk);
          if (got_w) req.aw_valid = 0;
          if (got_r) req.ar_valid = 0;
          req.w_valid = got_w && !w_done;
          #1;
        end
      end
      repeat (8) @(negedge clk);
      req = '0;
      checks++;
      if (mem[5] !== model[5]) begin failures++; $display("collision write %h", mem[5]); end
    end
    checks++; if (n_collide == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_spiker_adapter_cprog - the reference driver program's sequence on the default-size peripheral.
//
// Drives the peripheral only through its AXI4 port, the way the CPU's
// software does: the input sample is written into the SPIKES words with one
// INCR burst, SAMPLE_READY and then START are set in CTRL1 with
// read-modify-write accesses, START is dropped again with the next write,
// STATUS.SAMPLE is polled and cleared, STATUS.READY is polled and the four SPIKES_RESULT words are
// read with one burst and compared with the reference model. Step lengths
// (from the core's step_cycles_o) and the number of captured samples are
// checked too. Clearing CTRL1 ends a burst; the next burst must start from
// cleared membranes. A free-running phase keeps START and SAMPLE_READY high
// over several time steps of one sample.
// First phase: the sequence of the example driver program. Two SPIKES words
// are written (0x89ABCDEF and 0), SAMPLE_READY and then START are set with
// read-modify-write accesses and START is left high, STATUS bit 0 is polled,
// and the four result words are read. With START left high the network keeps
// stepping on the same sample, so the burst is stopped before the read and
// the result is compared with the reference after as many steps as were run.
module tb_spiker_adapter_cprog;
  import spiker_pkg::*;
  import spiker_ref_pkg::*;
  localparam int unsigned N_IN = 784, N_HID = 128, NUM_HIDDEN = 1, N_OUT = 10;
  localparam int unsigned W_W = 8, V_W = 16, LS = 4;
  localparam int V_TH = 128;
  localparam logic [31:0] BASE = 32'h1A40_0000;
  localparam int unsigned NW = (N_IN + 31) / 32;
  logic clk = 1'b0, rst_n = 1'b0;
  axi_req_t req;
  axi_rsp_t rsp;
  logic [31:0] step_count, step_cycles;
  logic sat;
  int checks = 0, failures = 0;
  // how often each mechanism happened
  int n_ack = 0, n_ready = 0, n_multistep = 0, n_burst_end = 0, n_skip = 0, n_sat = 0;
  int n_axi_burst = 0, n_slverr = 0, n_freerun = 0, n_fire = 0;
  lif_ref ref_m;
  logic sat_seen;

  spiker_adapter dut (.clk_i(clk), .rst_ni(rst_n), .axi_req_i(req), .axi_rsp_o(rsp),
                      .step_count_o(step_count), .step_cycles_o(step_cycles), .sat_o(sat));

  always #5 clk = ~clk;

  always_ff @(posedge clk) begin
    if (sat) sat_seen <= 1'b1;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------------ AXI master
  task automatic axi_write(logic [31:0] addr, logic [31:0] data [$], output axi_resp_e resp);
    req.aw = '{id: 4'd3, addr: addr, len: 8'(data.size() - 1), size: 3'd2, burst: BURST_INCR};
    req.aw_valid = 1;
    #1;
    while (!rsp.aw_ready) begin @(negedge clk); #1; end
    @(negedge clk);
    req.aw_valid = 0;
    for (int k = 0; k < data.size(); k++) begin
      req.w = '{data: data[k], strb: 4'hF, last: (k == data.size() - 1)};
      req.w_valid = 1;
      #1;
      while (!rsp.w_ready) begin @(negedge clk); #1; end
      @(negedge clk);
      req.w_valid = 0;
    end
    req.b_ready = 1;
    #1;
    while (!rsp.b_valid) begin @(negedge clk); #1; end
    resp = rsp.b.resp;
    @(negedge clk);
    req.b_ready = 0;
    if (data.size() > 1) n_axi_burst++;
  endtask

  task automatic axi_read(logic [31:0] addr, int len, output logic [31:0] data [$],
                          output axi_resp_e resp);
    data = {};
    resp = RESP_OKAY;
    req.ar = '{id: 4'd5, addr: addr, len: 8'(len - 1), size: 3'd2, burst: BURST_INCR};
    req.ar_valid = 1;
    #1;
    while (!rsp.ar_ready) begin @(negedge clk); #1; end
    @(negedge clk);
    req.ar_valid = 0;
    req.r_ready = 1;
    for (int k = 0; k < len; k++) begin
      #1;
      while (!rsp.r_valid) begin @(negedge clk); #1; end
      data.push_back(rsp.r.data);
      if (rsp.r.resp != RESP_OKAY) resp = rsp.r.resp;
      @(negedge clk);
    end
    req.r_ready = 0;
    if (len > 1) n_axi_burst++;
  endtask

  task automatic reg_wr(logic [7:0] off, logic [31:0] v);
    logic [31:0] d [$];
    axi_resp_e r;
    d = '{v};
    axi_write(BASE + 32'(off), d, r);
    checks++;
    if (r != RESP_OKAY) begin failures++; $display("write %h: response %0d", off, r); end
  endtask

  task automatic reg_rd(logic [7:0] off, output logic [31:0] v);
    logic [31:0] d [$];
    axi_resp_e r;
    axi_read(BASE + 32'(off), 1, d, r);
    v = d[0];
  endtask

  task automatic write_sample(logic [N_IN-1:0] s);
    logic [31:0] d [$];
    axi_resp_e r;
    d = {};
    for (int k = 0; k < NW; k++) d.push_back(32'(s >> (32 * k)));
    axi_write(BASE + 32'(SPIKES_0_OFFSET), d, r);
    checks++;
    if (r != RESP_OKAY) failures++;
  endtask

  task automatic poll_status(int bitn);
    logic [31:0] v;
    do reg_rd(STATUS_OFFSET, v); while (!v[bitn]);
  endtask

  task automatic check_result(vec_t e, string what);
    logic [31:0] d [$];
    axi_resp_e r;
    logic [RESULT_WORDS*32-1:0] got;
    axi_read(BASE + 32'(SPIKES_RESULT_0_OFFSET), RESULT_WORDS, d, r);
    got = '0;
    for (int k = 0; k < RESULT_WORDS; k++) got[32*k +: 32] = d[k];
    checks++;
    if (got !== (RESULT_WORDS*32)'(e[N_OUT-1:0]) || r != RESP_OKAY) begin
      failures++;
      $display("%s: result %h expected %h", what, got, e[N_OUT-1:0]);
    end
    if (|got) n_fire++;
  endtask

  // one time step under software control
  task automatic run_step(logic [N_IN-1:0] s, bit first, string what);
    logic [31:0] c0, v;
    vec_t e;
    write_sample(s);
    c0 = step_count;
    sat_seen = 0;
    if (first) begin
      reg_rd(CTRL1_OFFSET, v);
      reg_wr(CTRL1_OFFSET, v | (32'd1 << CTRL1_SAMPLE_READY_BIT));
      reg_rd(CTRL1_OFFSET, v);
      reg_wr(CTRL1_OFFSET, v | (32'd1 << CTRL1_START_BIT));
    end else begin
      reg_wr(CTRL1_OFFSET, 32'h3);
    end
    // START is a short pulse: the next write lowers it again before even the
    // shortest time step (6 clocks) could finish, so exactly one sample is taken
    reg_wr(CTRL1_OFFSET, 32'h1);
    poll_status(STATUS_SAMPLE_BIT);
    n_ack++;
    reg_wr(STATUS_OFFSET, 32'h0);      // clear SAMPLE
    poll_status(STATUS_READY_BIT);
    n_ready++;
    e = ref_m.step(vec_t'(s));
    check_result(e, what);
    checks++;
    if (step_count != c0 + 32'd1) begin
      failures++; $display("%s: %0d samples captured", what, step_count - c0);
    end
    checks++;
    if (step_cycles != 32'(ref_m.cycles)) begin
      failures++; $display("%s: step took %0d cycles, expected %0d", what, step_cycles, ref_m.cycles);
    end
    checks++;
    if (sat_seen !== ref_m.sat) begin failures++; $display("%s: saturation %0b", what, sat_seen); end
    if (ref_m.sat) n_sat++;
    for (int l = 0; l <= NUM_HIDDEN; l++) if (ref_m.spikes_in[l] == 0) n_skip++;
  endtask

  task automatic end_burst();
    logic [31:0] v;
    reg_wr(CTRL1_OFFSET, 32'h0);
    repeat (3) @(negedge clk);
    reg_rd(STATUS_OFFSET, v);
    checks++;
    if (!v[STATUS_READY_BIT]) begin failures++; $display("READY low after the burst"); end
    else n_burst_end++;
    ref_m.clear();
  endtask

  function automatic logic [N_IN-1:0] rand_sample(int pct);
    logic [N_IN-1:0] s;
    for (int i = 0; i < N_IN; i++) s[i] = ($urandom_range(0, 99) < pct);
    return s;
  endfunction

  initial begin
    logic [31:0] v, c0;
    logic [31:0] d [$];
    axi_resp_e r;
    vec_t e;
    req = '0;
    sat_seen = 0;
    ref_m = new(N_IN, N_HID, NUM_HIDDEN, N_OUT, W_W, V_W, V_TH, LS);
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);

    begin
      logic [N_IN-1:0] s;
      logic [31:0] d2 [$];
      axi_resp_e r2;
      int n;
      s = '0;
      s[31:0] = 32'h89AB_CDEF;
      d2 = '{32'h89AB_CDEF, 32'h0};
      axi_write(BASE + 32'(SPIKES_0_OFFSET), d2, r2);
      checks++;
      if (r2 != RESP_OKAY) failures++;
      c0 = step_count;
      reg_rd(CTRL1_OFFSET, v);
      reg_wr(CTRL1_OFFSET, v | (32'd1 << CTRL1_SAMPLE_READY_BIT));
      reg_rd(CTRL1_OFFSET, v);
      reg_wr(CTRL1_OFFSET, v | (32'd1 << CTRL1_START_BIT));
      poll_status(STATUS_SAMPLE_BIT);
      n_ack++;
      while (step_count < c0 + 32'd2) @(negedge clk);
      reg_wr(CTRL1_OFFSET, 32'h0);
      poll_status(STATUS_READY_BIT);
      n = int'(step_count - c0);
      for (int k = 0; k < n; k++) e = ref_m.step(vec_t'(s));
      check_result(e, "driver program");
      ref_m.clear();
    end

    // free-running: one sample held for several time steps
    begin
      logic [N_IN-1:0] s;
      int n;
      s = rand_sample(20);
      write_sample(s);
      sat_seen = 0;
      c0 = step_count;
      reg_wr(CTRL1_OFFSET, 32'h3);
      while (step_count < c0 + 32'd3) @(negedge clk);
      reg_wr(CTRL1_OFFSET, 32'h0);
      poll_status(STATUS_READY_BIT);
      n = int'(step_count - c0);
      for (int k = 0; k < n; k++) e = ref_m.step(vec_t'(s));
      check_result(e, "free-running");
      checks++;
      if (n < 3) failures++;
      n_freerun += n;
      if (sat_seen) n_sat++;
      ref_m.clear();
    end

    // an unmapped offset answers with SLVERR
    axi_read(BASE + 32'h7C, 1, d, r);
    checks++;
    if (r != RESP_SLVERR) failures++; else n_slverr++;

    $display("mechanisms: sample_ack=%0d ready=%0d multi_step_bursts=%0d burst_end=%0d skipped_layers=%0d saturation=%0d axi_bursts=%0d slverr=%0d free_running_steps=%0d steps_with_output=%0d",
             n_ack, n_ready, n_multistep, n_burst_end, n_skip, n_sat, n_axi_burst, n_slverr, n_freerun, n_fire);
    checks++;
    if (n_ack == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_spiker_layer - drives one small LIF layer with random spike vectors over
// many time steps and compares output spikes, the saturation flag and the
// step length (done_o is first seen high n + 4 rising edges after start_i is
// driven, counting the edge that samples it; 3 with no input spike) with
// the reference model. Also checks that clear_i zeroes the membranes.
module tb_spiker_layer;
  import spiker_ref_pkg::*;
  localparam int unsigned N_IN = 40, N_NEU = 9, W_W = 8, V_W = 9, LS = 3;
  localparam int V_TH = 120;
  logic clk = 1'b0, rst_n = 1'b0;
  logic clear, start;
  logic [N_IN-1:0] spk_in;
  logic [N_NEU-1:0] spk_out;
  logic done, busy, sat;
  int checks = 0, failures = 0, n_sat = 0, n_fire = 0;
  lif_ref ref_m;

  spiker_layer #(.N_IN(N_IN), .N_NEU(N_NEU), .W_W(W_W), .V_W(V_W), .V_TH(V_TH),
                 .LEAK_SHIFT(LS), .LAYER_ID(0))
    dut (.clk_i(clk), .rst_ni(rst_n), .clear_i(clear), .start_i(start), .spikes_i(spk_in),
         .spikes_o(spk_out), .done_o(done), .busy_o(busy), .sat_o(sat));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_step(logic [N_IN-1:0] in);
    vec_t e;
    int cyc;
    int n;
    ref_m.cycles = 0;
    ref_m.sat = 0;
    e = ref_m.layer_step(0, N_IN, N_NEU, vec_t'(in));
    n = $countones(in);
    @(negedge clk);
    spk_in = in; start = 1;
    @(negedge clk);
    start = 0; spk_in = '0;   // the layer copied the vector at the start edge
    cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
    checks++;
    if (spk_out !== e[N_NEU-1:0]) begin
      failures++;
      $display("spikes %b expected %b", spk_out, e[N_NEU-1:0]);
    end
    checks++;
    if (cyc != ((n == 0) ? 3 : n + 4)) begin
      failures++;
      $display("latency %0d for %0d spikes", cyc, n);
    end
    checks++;
    if (sat !== ref_m.sat) begin failures++; $display("sat %0b expected %0b", sat, ref_m.sat); end
    if (sat) n_sat++;
    if (|spk_out) n_fire++;
  endtask

  initial begin
    ref_m = new(N_IN, N_NEU, 0, N_NEU, W_W, V_W, V_TH, LS);
    clear = 0; start = 0; spk_in = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    run_step('0);
    for (int t = 0; t < 60; t++) begin
      logic [N_IN-1:0] in;
      for (int i = 0; i < N_IN; i++) in[i] = ($urandom_range(0, 99) < ((t % 3 == 0) ? 70 : 15));
      run_step(in);
      if (t == 30) begin
        @(negedge clk); clear = 1; @(negedge clk); clear = 0;
        ref_m.clear();
      end
    end
    checks++;
    if (n_sat == 0 || n_fire == 0) begin failures++; $display("no saturation (%0d) or no spikes (%0d)", n_sat, n_fire); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

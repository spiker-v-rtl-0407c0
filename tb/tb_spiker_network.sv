// tb_spiker_network - runs bursts of samples through a small three-layer
// network with the accelerator's handshake: sample_ready is raised, the
// testbench waits for ready, raises start and presents a new input after each
// sample acknowledge. Output spikes and step lengths are compared with the
// reference model. A burst ends by dropping sample_ready while the network
// waits; ready must stay high and the next burst must start from cleared
// membranes. The first burst replays the 4-bit input sequence
// F, E, D, C, F, F, F on the lowest inputs.
module tb_spiker_network;
  import spiker_ref_pkg::*;
  localparam int unsigned N_IN = 24, N_HID = 12, NUM_HIDDEN = 2, N_OUT = 6;
  localparam int unsigned W_W = 8, V_W = 12, LS = 3;
  localparam int V_TH = 40;
  logic clk = 1'b0, rst_n = 1'b0;
  logic start, sample_ready;
  logic [N_IN-1:0] in_spk;
  logic ready, sample, out_valid, sat;
  logic [N_OUT-1:0] out_spk;
  logic [31:0] step_cycles;
  int checks = 0, failures = 0, n_steps = 0, n_nonzero = 0;
  lif_ref ref_m;

  spiker_network #(.N_IN(N_IN), .N_HID(N_HID), .NUM_HIDDEN(NUM_HIDDEN), .N_OUT(N_OUT),
                   .W_W(W_W), .V_W(V_W), .V_TH(V_TH), .LEAK_SHIFT(LS))
    dut (.clk_i(clk), .rst_ni(rst_n), .start_i(start), .sample_ready_i(sample_ready),
         .input_spikes_i(in_spk), .ready_o(ready), .sample_o(sample),
         .output_spikes_o(out_spk), .out_valid_o(out_valid), .step_cycles_o(step_cycles),
         .sat_o(sat));

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // run one burst: samples[] are presented in order
  task automatic burst(logic [N_IN-1:0] samples [$]);
    vec_t e;
    sample_ready = 1;
    @(negedge clk);
    checks++;
    if (!ready) begin failures++; $display("ready low before the burst"); end
    start = 1;
    in_spk = samples[0];
    for (int k = 0; k < samples.size(); k++) begin
      // wait for the acknowledge of sample k
      while (!sample) @(negedge clk);
      e = ref_m.step(vec_t'(samples[k]));
      if (k + 1 < samples.size()) in_spk = samples[k+1];
      else sample_ready = 0;          // last sample taken: end the burst
      checks++;
      if (ready) begin failures++; $display("ready high while computing"); end
      while (!out_valid) @(negedge clk);
      n_steps++;
      checks++;
      if (out_spk !== e[N_OUT-1:0]) begin
        failures++;
        $display("step %0d: output %b expected %b", k, out_spk, e[N_OUT-1:0]);
      end
      if (|out_spk) n_nonzero++;
      checks++;
      if (step_cycles != 32'(ref_m.cycles)) begin
        failures++;
        $display("step %0d: %0d cycles expected %0d", k, step_cycles, ref_m.cycles);
      end
      checks++;
      if (sat !== ref_m.sat) failures++;
      @(negedge clk);
    end
    // end of burst: ready confirms completion, membranes are cleared
    repeat (3) @(negedge clk);
    checks++;
    if (!ready) begin failures++; $display("ready low after the burst"); end
    start = 0;
    ref_m.clear();
  endtask

  initial begin
    logic [N_IN-1:0] s [$];
    ref_m = new(N_IN, N_HID, NUM_HIDDEN, N_OUT, W_W, V_W, V_TH, LS);
    start = 0; sample_ready = 0; in_spk = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    checks++;
    if (ready) begin failures++; $display("ready without sample_ready"); end
    s = '{N_IN'(4'hF), N_IN'(4'hE), N_IN'(4'hD), N_IN'(4'hC), N_IN'(4'hF), N_IN'(4'hF), N_IN'(4'hF)};
    burst(s);
    for (int b = 0; b < 4; b++) begin
      s = {};
      for (int k = 0; k < 8; k++) begin
        logic [N_IN-1:0] v;
        for (int i = 0; i < N_IN; i++) v[i] = ($urandom_range(0, 99) < 20 + 15 * b);
        s.push_back(v);
      end
      burst(s);
    end
    checks++;
    if (n_nonzero == 0) begin failures++; $display("the network never fired"); end
    $display("steps=%0d steps_with_output=%0d", n_steps, n_nonzero);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

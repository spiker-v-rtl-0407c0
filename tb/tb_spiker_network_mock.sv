// tb_spiker_network_mock - drives a four-input network exactly the way the
// accelerator's stand-alone network test does, using only edges of the
// handshake signals:
//   * sample_ready is already high while reset is applied, start is low and
//     the input is 4'hF;
//   * on the rising edge of ready after reset, start goes high and stays high;
//   * on each rising edge of sample the next input is presented:
//     E, D, C, F, F, F;
//   * after the last one, on the next rising edge of ready, sample_ready is
//     dropped to end the burst.
// That rising edge of ready ends the step of the sixth sample, so the seventh
// input is presented but never taken: the burst holds six samples.
// Because start and sample_ready stay high, the network free-runs, taking a
// new sample right after each step. A monitor records which input each
// sample pulse acknowledged and compares every step's output spikes and
// length with the reference model. It also checks that ready rises after
// reset, that the burst ends with ready high and no further samples, and that
// the output spikes are non-zero at least once. A second burst then shows
// that the end of the first one cleared the membranes.
module tb_spiker_network_mock;
  import spiker_ref_pkg::*;
  localparam int unsigned N_IN = 4, N_HID = 8, NUM_HIDDEN = 1, N_OUT = 4;
  localparam int unsigned W_W = 8, V_W = 12, LS = 4;
  localparam int V_TH = 24;
  logic clk = 1'b0, rst_n = 1'b0;
  logic start = 1'b0, sample_ready = 1'b0;
  logic [N_IN-1:0] in_spk = '0;
  logic ready, sample, out_valid, sat;
  logic [N_OUT-1:0] out_spk;
  logic [31:0] step_cycles;
  int checks = 0, failures = 0, n_samples = 0, n_steps = 0, n_nonzero = 0;
  logic [N_IN-1:0] in_prev = '0;
  logic [N_IN-1:0] taken [$];
  lif_ref ref_m;

  spiker_network #(.N_IN(N_IN), .N_HID(N_HID), .NUM_HIDDEN(NUM_HIDDEN), .N_OUT(N_OUT),
                   .W_W(W_W), .V_W(V_W), .V_TH(V_TH), .LEAK_SHIFT(LS))
    dut (.clk_i(clk), .rst_ni(rst_n), .start_i(start), .sample_ready_i(sample_ready),
         .input_spikes_i(in_spk), .ready_o(ready), .sample_o(sample),
         .output_spikes_o(out_spk), .out_valid_o(out_valid), .step_cycles_o(step_cycles),
         .sat_o(sat));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog: n_samples=%0d n_steps=%0d", n_samples, n_steps);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // A sample pulse seen at a falling edge acknowledges the input that was
  // present at the previous falling edge (the producer changes it right after
  // the pulse rises). Each finished step is checked against the model fed with
  // the acknowledged inputs in order.
  always @(negedge clk) begin
    if (rst_n && sample) begin
      n_samples++;
      taken.push_back(in_prev);
    end
    if (rst_n && out_valid) begin
      vec_t e;
      n_steps++;
      checks += 3;
      if (taken.size() == 0) begin
        failures++;
        $display("output without an acknowledged sample");
      end else begin
        e = ref_m.step(vec_t'(taken.pop_front()));
        if (out_spk !== e[N_OUT-1:0]) begin
          failures++;
          $display("step %0d: output %h expected %h", n_steps, out_spk, e[N_OUT-1:0]);
        end
        if (step_cycles != 32'(ref_m.cycles)) begin
          failures++;
          $display("step %0d: %0d cycles expected %0d", n_steps, step_cycles, ref_m.cycles);
        end
        if (sat !== ref_m.sat) failures++;
        if (|out_spk) n_nonzero++;
      end
    end
    in_prev = in_spk;
  end

  task automatic run_burst(logic [N_IN-1:0] seq [$]);
    int s0;
    in_spk = seq[0];
    sample_ready = 1'b1;
    if (!ready) @(posedge ready);   // after a burst ready is already high
    start = 1'b1;
    for (int k = 1; k < seq.size(); k++) begin
      @(posedge sample);
      in_spk = seq[k];
    end
    #10;
    @(posedge ready);
    sample_ready = 1'b0;
    // the burst is over: no further samples, ready confirms completion
    repeat (2) @(negedge clk);
    s0 = n_samples;
    repeat (20) @(negedge clk);
    checks += 3;
    if (!ready) begin failures++; $display("ready low after the burst"); end
    if (n_samples != s0) begin failures++; $display("sample taken after the burst"); end
    if (taken.size() != 0) begin failures++; $display("step still pending after the burst"); end
    ref_m.clear();
    start = 1'b0;
  endtask

  initial begin
    ref_m = new(N_IN, N_HID, NUM_HIDDEN, N_OUT, W_W, V_W, V_TH, LS);
    // sample_ready is high before and during reset
    sample_ready = 1'b1;
    in_spk = 4'hF;
    #10 rst_n = 1'b1;
    checks++;
    if (ready) begin failures++; $display("ready high before the first clock"); end
    run_burst('{4'hF, 4'hE, 4'hD, 4'hC, 4'hF, 4'hF, 4'hF});
    checks++;
    if (n_samples != 6) begin failures++; $display("%0d samples taken, expected 6", n_samples); end
    // second burst from cleared membranes
    run_burst('{4'h3, 4'hF, 4'hA, 4'hF});
    checks++;
    if (n_nonzero == 0) begin failures++; $display("output never non-zero"); end
    $display("samples=%0d steps=%0d steps_with_output=%0d", n_samples, n_steps, n_nonzero);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

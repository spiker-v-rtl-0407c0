// tb_spiker_weight_rom - checks every row of a small weight memory against the
// weight pattern, the one-clock read latency and that the output holds while
// the read enable is low.
module tb_spiker_weight_rom;
  localparam int unsigned N_ROWS = 21, N_COLS = 6, W_W = 8, LAYER_ID = 1;
  logic clk = 1'b0;
  logic en;
  logic [$clog2(N_ROWS)-1:0] addr;
  logic [N_COLS-1:0][W_W-1:0] row;
  int checks = 0, failures = 0;

  spiker_weight_rom #(.N_ROWS(N_ROWS), .N_COLS(N_COLS), .W_W(W_W), .LAYER_ID(LAYER_ID))
    dut (.clk_i(clk), .en_i(en), .addr_i(addr), .row_o(row));

  always #5 clk = ~clk;

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [W_W-1:0] expect_w(int r, int c);
    // independent restatement of the pattern: hash, then map to [-12, 19]
    logic [31:0] x;
    x = (r + 1) * 32'd2654435761 + (c + 1) * 32'd2246822519 + (LAYER_ID + 1) * 32'd3266489917;
    x = x ^ (x >> 15);
    x = x * 32'h2c1b3c6d;
    x = x ^ (x >> 12);
    return W_W'(int'(x % 32) - 12);
  endfunction

  initial begin
    en = 0; addr = '0;
    @(negedge clk);
    for (int r = N_ROWS - 1; r >= 0; r--) begin
      en = 1; addr = r[$clog2(N_ROWS)-1:0];
      @(negedge clk);
      for (int c = 0; c < N_COLS; c++) begin
        checks++;
        if (row[c] !== expect_w(r, c)) begin
          failures++;
          $display("row %0d col %0d: got %0d expected %0d", r, c, $signed(row[c]), $signed(expect_w(r, c)));
        end
      end
    end
    // read enable low: output holds row 0 while the address moves
    en = 0; addr = 5;
    @(negedge clk);
    checks++;
    if (row[0] !== expect_w(0, 0) || row[N_COLS-1] !== expect_w(0, N_COLS - 1)) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

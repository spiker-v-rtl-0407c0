// spiker_weight_rom - weight memory of one LIF layer.
//
// One row per input of the layer; a row holds the signed weights from that
// input to every neuron of the layer, so a single read delivers everything
// one input spike adds to the layer's membranes. The read is synchronous:
// the row addressed while en_i is high appears on row_o after the next rising
// edge and is held until the next enabled read (maps onto block RAM / ROM).
//
// The network's trained weights are not part of this design, and no path to
// load them at run time is defined, so the memory is initialised from
// spiker_pkg::weight_value(LAYER_ID, row, col), a fixed hash pattern. Replace
// that function (or the initial block) with the trained weights.
module spiker_weight_rom #(
  parameter int unsigned N_ROWS   = 784,
  parameter int unsigned N_COLS   = 128,
  parameter int unsigned W_W      = 8,
  parameter int unsigned LAYER_ID = 0,
  localparam int unsigned AW      = (N_ROWS > 1) ? $clog2(N_ROWS) : 1
) (
  input  logic                              clk_i,
  input  logic                              en_i,
  input  logic [AW-1:0]                     addr_i,
  output logic [N_COLS-1:0][W_W-1:0]        row_o
);

  logic [N_COLS-1:0][W_W-1:0] mem [N_ROWS];

  initial begin
    for (int unsigned r = 0; r < N_ROWS; r++) begin
      for (int unsigned c = 0; c < N_COLS; c++) begin
        mem[r][c] = W_W'(spiker_pkg::weight_value(LAYER_ID, r, c));
      end
    end
  end

  always_ff @(posedge clk_i) begin
    if (en_i) row_o <= mem[addr_i];
  end

endmodule

// spiker_adapter_reg_top - register file of the Spiker adapter.
//
// Registers (32 bit, byte offsets from the peripheral base):
//   0x00-0x60  SPIKES_0..24        rw   input spike words
//   0x64-0x70  SPIKES_RESULT_0..3  ro   read straight from the core (external)
//   0x74       CTRL1               rw   bit0 SAMPLE_READY, bit1 START
//   0x78       STATUS              rw   bit0 SAMPLE, bit1 READY (also written by the core)
// Writes honour the byte strobes. A STATUS bit is updated by the core when its
// write enable (hw2reg *_de) is high, unless software writes STATUS in the
// same clock: software wins. Accesses to other offsets return error = 1 and
// change nothing; writes to SPIKES_RESULT are ignored. Only addr[7:0] is
// decoded. Every request is answered in the same clock (ready = 1), reads
// combinationally.
//
// The register list, access types and field layout follow the accelerator's
// register description; offsets, strobe handling, the error rule and the
// write priority are this design's choices. All registers reset to zero.
module spiker_adapter_reg_top
  import spiker_pkg::*;
(
  input  logic     clk_i,
  input  logic     rst_ni,
  input  reg_req_t reg_req_i,
  output reg_rsp_t reg_rsp_o,
  output reg2hw_t  reg2hw_o,
  input  hw2reg_t  hw2reg_i
);

  logic [SPIKES_WORDS-1:0][31:0] spikes_q;
  logic [1:0]                    ctrl1_q;
  logic [1:0]                    status_q;

  localparam logic [5:0] RES_IDX = SPIKES_RESULT_0_OFFSET[7:2];

  logic [7:0] off;
  logic [5:0] widx;
  logic       hit_spikes, hit_result, hit_ctrl1, hit_status, hit_any;
  logic       we;

  assign off        = reg_req_i.addr[7:0];
  assign widx       = off[7:2];
  assign hit_spikes = (off[1:0] == 2'b00) && (widx < 6'(SPIKES_WORDS));
  assign hit_result = (off[1:0] == 2'b00) && (widx >= RES_IDX) &&
                      (widx < RES_IDX + 6'(RESULT_WORDS));
  assign hit_ctrl1  = (off == CTRL1_OFFSET);
  assign hit_status = (off == STATUS_OFFSET);
  assign hit_any    = hit_spikes || hit_result || hit_ctrl1 || hit_status;
  assign we         = reg_req_i.valid && reg_req_i.write && hit_any;

  function automatic logic [31:0] merge(logic [31:0] old, logic [31:0] wd, logic [3:0] be);
    logic [31:0] r;
    for (int b = 0; b < 4; b++) r[8*b +: 8] = be[b] ? wd[8*b +: 8] : old[8*b +: 8];
    return r;
  endfunction

  // CTRL1 and STATUS hold two bits, both in byte 0
  logic [1:0] ctrl1_new, status_new;
  assign ctrl1_new  = reg_req_i.wstrb[0] ? reg_req_i.wdata[1:0] : ctrl1_q;
  assign status_new = reg_req_i.wstrb[0] ? reg_req_i.wdata[1:0] : status_q;

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      spikes_q <= '0;
      ctrl1_q  <= '0;
      status_q <= '0;
    end else begin
      if (we && hit_spikes) spikes_q[widx] <= merge(spikes_q[widx], reg_req_i.wdata, reg_req_i.wstrb);
      if (we && hit_ctrl1)  ctrl1_q <= ctrl1_new;
      if (we && hit_status) begin
        status_q <= status_new;
      end else begin
        if (hw2reg_i.sample_de) status_q[STATUS_SAMPLE_BIT] <= hw2reg_i.sample_d;
        if (hw2reg_i.ready_de)  status_q[STATUS_READY_BIT]  <= hw2reg_i.ready_d;
      end
    end
  end

  always_comb begin
    reg_rsp_o.ready = 1'b1;
    reg_rsp_o.error = reg_req_i.valid && !hit_any;
    reg_rsp_o.rdata = '0;
    if (hit_spikes)      reg_rsp_o.rdata = spikes_q[widx];
    else if (hit_result) reg_rsp_o.rdata = hw2reg_i.result[widx - RES_IDX];
    else if (hit_ctrl1)  reg_rsp_o.rdata = {30'd0, ctrl1_q};
    else if (hit_status) reg_rsp_o.rdata = {30'd0, status_q};
  end

  assign reg2hw_o.spikes       = spikes_q;
  assign reg2hw_o.sample_ready = ctrl1_q[CTRL1_SAMPLE_READY_BIT];
  assign reg2hw_o.start        = ctrl1_q[CTRL1_START_BIT];

endmodule

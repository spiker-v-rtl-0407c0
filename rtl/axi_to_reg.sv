// axi_to_reg - AXI4 slave to register-bus bridge of the Spiker adapter.
//
// Turns AXI4 transactions from the SoC into one-word register-bus accesses.
// One transaction is handled at a time; a burst becomes one register access
// per beat. Writes: the AW request is accepted, then each W beat is forwarded
// to the register bus (w_ready follows the register bus's ready), and after
// the beat with WLAST a single B response is returned. Reads: the AR request
// is accepted, then for each beat the register is read, the word is held in
// an R buffer until r_ready, and the beat with RLAST ends the burst.
// INCR and WRAP bursts advance the address by 2**size bytes per beat (WRAP is
// not wrapped), FIXED keeps it. Any register-bus error in a burst answers
// SLVERR. When a read and a write arrive together the bridge alternates which
// goes first.
//
// Timing: a single write takes AW (1 clock), W (1 clock or more), B (1 clock
// or more); a single read AR (1), register access (1 or more), R (1 or more).
//
// The bridge's role follows the accelerator's block diagram; its single
// outstanding transaction, arbitration and error mapping are this design's
// choices.
module axi_to_reg
  import spiker_pkg::*;
(
  input  logic     clk_i,
  input  logic     rst_ni,
  input  axi_req_t axi_req_i,
  output axi_rsp_t axi_rsp_o,
  output reg_req_t reg_req_o,
  input  reg_rsp_t reg_rsp_i
);

  typedef enum logic [2:0] {S_IDLE, S_WDATA, S_BRESP, S_RREQ, S_RRESP} state_e;

  state_e                state_q;
  logic [AXI_ID_W-1:0]   id_q;
  logic [AXI_ADDR_W-1:0] addr_q;
  logic [7:0]            beats_left_q;
  logic [2:0]            size_q;
  axi_burst_e            burst_q;
  logic                  err_q;
  logic [31:0]           rdata_q;
  logic                  rerr_q;
  logic                  prefer_read_q;

  logic take_aw, take_ar;
  always_comb begin
    take_aw = 1'b0;
    take_ar = 1'b0;
    if (state_q == S_IDLE) begin
      if (axi_req_i.aw_valid && axi_req_i.ar_valid) begin
        take_ar = prefer_read_q;
        take_aw = !prefer_read_q;
      end else begin
        take_aw = axi_req_i.aw_valid;
        take_ar = axi_req_i.ar_valid;
      end
    end
  end

  logic [AXI_ADDR_W-1:0] next_addr;
  assign next_addr = (burst_q == BURST_FIXED) ? addr_q
                                              : addr_q + (AXI_ADDR_W'(1) << size_q);

  logic w_beat, r_access;
  assign w_beat   = (state_q == S_WDATA) && axi_req_i.w_valid && reg_rsp_i.ready;
  assign r_access = (state_q == S_RREQ) && reg_rsp_i.ready;

  always_comb begin
    reg_req_o       = '0;
    reg_req_o.addr  = addr_q;
    if (state_q == S_WDATA) begin
      reg_req_o.valid = axi_req_i.w_valid;
      reg_req_o.write = 1'b1;
      reg_req_o.wdata = axi_req_i.w.data;
      reg_req_o.wstrb = axi_req_i.w.strb;
    end else if (state_q == S_RREQ) begin
      reg_req_o.valid = 1'b1;
      reg_req_o.write = 1'b0;
    end
  end

  always_comb begin
    axi_rsp_o          = '0;
    axi_rsp_o.aw_ready = take_aw;
    axi_rsp_o.ar_ready = take_ar;
    axi_rsp_o.w_ready  = (state_q == S_WDATA) && reg_rsp_i.ready;
    axi_rsp_o.b_valid  = (state_q == S_BRESP);
    axi_rsp_o.b.id     = id_q;
    axi_rsp_o.b.resp   = err_q ? RESP_SLVERR : RESP_OKAY;
    axi_rsp_o.r_valid  = (state_q == S_RRESP);
    axi_rsp_o.r.id     = id_q;
    axi_rsp_o.r.data   = rdata_q;
    axi_rsp_o.r.resp   = rerr_q ? RESP_SLVERR : RESP_OKAY;
    axi_rsp_o.r.last   = (beats_left_q == 8'd0);
  end

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      state_q       <= S_IDLE;
      id_q          <= '0;
      addr_q        <= '0;
      beats_left_q  <= '0;
      size_q        <= '0;
      burst_q       <= BURST_INCR;
      err_q         <= 1'b0;
      rdata_q       <= '0;
      rerr_q        <= 1'b0;
      prefer_read_q <= 1'b0;
    end else begin
      unique case (state_q)
        S_IDLE: begin
          if (take_aw) begin
            id_q          <= axi_req_i.aw.id;
            addr_q        <= axi_req_i.aw.addr;
            beats_left_q  <= axi_req_i.aw.len;
            size_q        <= (axi_req_i.aw.size > 3'd2) ? 3'd2 : axi_req_i.aw.size;
            burst_q       <= axi_req_i.aw.burst;
            err_q         <= 1'b0;
            prefer_read_q <= 1'b1;
            state_q       <= S_WDATA;
          end else if (take_ar) begin
            id_q          <= axi_req_i.ar.id;
            addr_q        <= axi_req_i.ar.addr;
            beats_left_q  <= axi_req_i.ar.len;
            size_q        <= (axi_req_i.ar.size > 3'd2) ? 3'd2 : axi_req_i.ar.size;
            burst_q       <= axi_req_i.ar.burst;
            prefer_read_q <= 1'b0;
            state_q       <= S_RREQ;
          end
        end
        S_WDATA: begin
          if (w_beat) begin
            err_q  <= err_q | reg_rsp_i.error;
            addr_q <= next_addr;
            if (axi_req_i.w.last || beats_left_q == 8'd0) state_q <= S_BRESP;
            else beats_left_q <= beats_left_q - 8'd1;
          end
        end
        S_BRESP: begin
          if (axi_req_i.b_ready) state_q <= S_IDLE;
        end
        S_RREQ: begin
          if (r_access) begin
            rdata_q <= reg_rsp_i.rdata;
            rerr_q  <= reg_rsp_i.error;
            state_q <= S_RRESP;
          end
        end
        S_RRESP: begin
          if (axi_req_i.r_ready) begin
            if (beats_left_q == 8'd0) begin
              state_q <= S_IDLE;
            end else begin
              beats_left_q <= beats_left_q - 8'd1;
              addr_q       <= next_addr;
              state_q      <= S_RREQ;
            end
          end
        end
        default: state_q <= S_IDLE;
      endcase
    end
  end

  // AXI rule: a valid request stays asserted, unchanged, until it is accepted.
  a_aw_stable: assert property (@(posedge clk_i) disable iff (!rst_ni)
    axi_req_i.aw_valid && !axi_rsp_o.aw_ready |=> axi_req_i.aw_valid && $stable(axi_req_i.aw));
  a_ar_stable: assert property (@(posedge clk_i) disable iff (!rst_ni)
    axi_req_i.ar_valid && !axi_rsp_o.ar_ready |=> axi_req_i.ar_valid && $stable(axi_req_i.ar));
  a_w_stable: assert property (@(posedge clk_i) disable iff (!rst_ni)
    axi_req_i.w_valid && !axi_rsp_o.w_ready |=> axi_req_i.w_valid && $stable(axi_req_i.w));
  // The bridge's own responses obey the same rule.
  a_r_stable: assert property (@(posedge clk_i) disable iff (!rst_ni)
    axi_rsp_o.r_valid && !axi_req_i.r_ready |=> axi_rsp_o.r_valid && $stable(axi_rsp_o.r));
  a_b_stable: assert property (@(posedge clk_i) disable iff (!rst_ni)
    axi_rsp_o.b_valid && !axi_req_i.b_ready |=> axi_rsp_o.b_valid && $stable(axi_rsp_o.b));

endmodule

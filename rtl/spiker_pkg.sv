// spiker_pkg - types and constants shared by the Spiker accelerator.
//
// Holds the register-bus request/response structs (a simple one-word
// valid/ready bus between the AXI bridge and the register file), the AXI4
// channel structs of the peripheral's slave port, the register map of the
// accelerator's register file and the weight-pattern function that fills the
// weight memories.
//
// The register list (25 SPIKES words, 4 SPIKES_RESULT words, CTRL1 with
// SAMPLE_READY/START, STATUS with SAMPLE/READY) follows the published register
// description of the accelerator. The byte offsets are this design's choice:
// registers are packed in the listed order, 4 bytes apart. The AXI ID width
// and the weight pattern are also this design's choices.
package spiker_pkg;

  // ---------------------------------------------------------------- register map
  localparam int unsigned SPIKES_WORDS = 25;
  localparam int unsigned RESULT_WORDS = 4;

  localparam logic [7:0] SPIKES_0_OFFSET        = 8'h00;
  localparam logic [7:0] SPIKES_RESULT_0_OFFSET = 8'h64;
  localparam logic [7:0] CTRL1_OFFSET           = 8'h74;
  localparam logic [7:0] STATUS_OFFSET          = 8'h78;

  localparam int unsigned CTRL1_SAMPLE_READY_BIT = 0;
  localparam int unsigned CTRL1_START_BIT        = 1;
  localparam int unsigned STATUS_SAMPLE_BIT      = 0;
  localparam int unsigned STATUS_READY_BIT       = 1;

  // ---------------------------------------------------------------- register bus
  typedef struct packed {
    logic [31:0] addr;
    logic        write;
    logic [31:0] wdata;
    logic [3:0]  wstrb;
    logic        valid;
  } reg_req_t;

  typedef struct packed {
    logic [31:0] rdata;
    logic        error;
    logic        ready;
  } reg_rsp_t;

  // Register contents seen by the accelerator core.
  typedef struct packed {
    logic [SPIKES_WORDS-1:0][31:0] spikes;
    logic                          sample_ready;
    logic                          start;
  } reg2hw_t;

  // Values the accelerator core writes into the register file.
  typedef struct packed {
    logic [RESULT_WORDS-1:0][31:0] result;     // read straight from hardware
    logic                          sample_d;
    logic                          sample_de;
    logic                          ready_d;
    logic                          ready_de;
  } hw2reg_t;

  // ---------------------------------------------------------------- AXI4
  localparam int unsigned AXI_ADDR_W = 32;
  localparam int unsigned AXI_DATA_W = 32;
  localparam int unsigned AXI_ID_W   = 4;

  typedef enum logic [1:0] {
    BURST_FIXED = 2'b00,
    BURST_INCR  = 2'b01,
    BURST_WRAP  = 2'b10
  } axi_burst_e;

  typedef enum logic [1:0] {
    RESP_OKAY   = 2'b00,
    RESP_EXOKAY = 2'b01,
    RESP_SLVERR = 2'b10,
    RESP_DECERR = 2'b11
  } axi_resp_e;

  typedef struct packed {
    logic [AXI_ID_W-1:0]   id;
    logic [AXI_ADDR_W-1:0] addr;
    logic [7:0]            len;
    logic [2:0]            size;
    axi_burst_e            burst;
  } axi_ax_t;              // shared by AW and AR

  typedef struct packed {
    logic [AXI_DATA_W-1:0]   data;
    logic [AXI_DATA_W/8-1:0] strb;
    logic                    last;
  } axi_w_t;

  typedef struct packed {
    logic [AXI_ID_W-1:0] id;
    axi_resp_e           resp;
  } axi_b_t;

  typedef struct packed {
    logic [AXI_ID_W-1:0]   id;
    logic [AXI_DATA_W-1:0] data;
    axi_resp_e             resp;
    logic                  last;
  } axi_r_t;

  typedef struct packed {
    axi_ax_t aw;
    logic    aw_valid;
    axi_w_t  w;
    logic    w_valid;
    logic    b_ready;
    axi_ax_t ar;
    logic    ar_valid;
    logic    r_ready;
  } axi_req_t;

  typedef struct packed {
    logic   aw_ready;
    logic   w_ready;
    axi_b_t b;
    logic   b_valid;
    logic   ar_ready;
    axi_r_t r;
    logic   r_valid;
  } axi_rsp_t;

  // ---------------------------------------------------------------- weights
  // Placeholder synaptic weight from input `row` to neuron `col` of layer
  // `layer`: a 32-bit integer hash of the three indices mapped onto the range
  // [-12, 19]. The mean is positive, so neurons fire under moderate input
  // activity. Trained weights replace this pattern in a real deployment.
  function automatic int weight_value(int unsigned layer, int unsigned row, int unsigned col);
    logic [31:0] x;
    x = (row + 1) * 32'd2654435761 + (col + 1) * 32'd2246822519 + (layer + 1) * 32'd3266489917;
    x = x ^ (x >> 15);
    x = x * 32'h2c1b3c6d;
    x = x ^ (x >> 12);
    return int'(x % 32) - 12;
  endfunction

endpackage

// axil_pkg: AXI4-Lite channel bundles used by the system bus of the design.
//
// A manager drives an axil_req_t (AW, W and AR channels plus the B and R
// ready signals); a subordinate answers with an axil_rsp_t. Widths are 32-bit
// address and data. The document names AXI as the system bus; the Lite
// profile and the widths are this design's own choice (one 32-bit word holds
// both 16-bit shared TDRs of the Parallel Transfer solution).
package axil_pkg;

  localparam int unsigned ADDR_W = 32;
  localparam int unsigned DATA_W = 32;

  // Register offsets inside shared_side_logic.
  localparam logic [ADDR_W-1:0] ADDR_DATA    = 32'h0000_0000;  // instrument data
  localparam logic [ADDR_W-1:0] ADDR_SCRATCH = 32'h0000_0004;  // background traffic

  typedef enum logic [1:0] {
    RESP_OKAY   = 2'b00,
    RESP_SLVERR = 2'b10
  } axil_resp_t;

  typedef struct packed {
    logic              awvalid;
    logic [ADDR_W-1:0] awaddr;
    logic              wvalid;
    logic [DATA_W-1:0] wdata;
    logic              bready;
    logic              arvalid;
    logic [ADDR_W-1:0] araddr;
    logic              rready;
  } axil_req_t;

  typedef struct packed {
    logic              awready;
    logic              wready;
    logic              bvalid;
    axil_resp_t        bresp;
    logic              arready;
    logic              rvalid;
    logic [DATA_W-1:0] rdata;
    axil_resp_t        rresp;
  } axil_rsp_t;

endpackage

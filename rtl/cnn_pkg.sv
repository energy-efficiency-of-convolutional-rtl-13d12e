// Shared types and constants of the CNN building-block overlays.
//
// Every overlay talks to host memory through AXI4 master ports whose data bus
// is widened to AXI_DW bits so that several low-precision elements travel in
// one beat, and is controlled by the host through an AXI4-Lite slave. The AXI
// channels are bundled into one request struct (master to slave) and one
// response struct (slave to master) so that ports stay compact. Only the AXI
// signals the overlays use are carried: IDs, cache, protection and QoS fields
// are left at their AXI defaults by the interconnect.
//
// The 64-bit data width and the 256-beat maximum burst are this design's
// choices (the widest AXI4 burst and the width of the ZYNQ-7000 high
// performance ports); the document only says that the ports were widened.
package cnn_pkg;

  localparam int unsigned AXI_AW   = 32;   // byte address width
  localparam int unsigned AXI_DW   = 64;   // data bus width (bit-widening)
  localparam int unsigned AXI_BPW  = AXI_DW / 8;  // bytes per beat
  localparam int unsigned AXIL_AW  = 8;    // control register address width
  localparam int unsigned AXIL_DW  = 32;   // control register data width

  typedef logic [AXI_AW-1:0] addr_t;
  typedef logic [AXI_DW-1:0] data_t;

  // AXI4 master -> slave signals
  typedef struct packed {
    addr_t              araddr;
    logic [7:0]         arlen;
    logic               arvalid;
    logic               rready;
    addr_t              awaddr;
    logic [7:0]         awlen;
    logic               awvalid;
    data_t              wdata;
    logic [AXI_BPW-1:0] wstrb;
    logic               wlast;
    logic               wvalid;
    logic               bready;
  } axi_req_t;

  // AXI4 slave -> master signals
  typedef struct packed {
    logic               arready;
    data_t              rdata;
    logic               rlast;
    logic               rvalid;
    logic               awready;
    logic               wready;
    logic               bvalid;
  } axi_rsp_t;

  // AXI4-Lite host -> overlay signals
  typedef struct packed {
    logic [AXIL_AW-1:0] awaddr;
    logic               awvalid;
    logic [AXIL_DW-1:0] wdata;
    logic               wvalid;
    logic               bready;
    logic [AXIL_AW-1:0] araddr;
    logic               arvalid;
    logic               rready;
  } axil_req_t;

  // AXI4-Lite overlay -> host signals
  typedef struct packed {
    logic               awready;
    logic               wready;
    logic               bvalid;
    logic               arready;
    logic [AXIL_DW-1:0] rdata;
    logic               rvalid;
  } axil_rsp_t;

  // Control register map of every overlay
  localparam logic [AXIL_AW-1:0] REG_CTRL  = 8'h00;  // bit0 start, bit1 done, bit2 idle
  localparam logic [AXIL_AW-1:0] REG_ADDR0 = 8'h10;  // first buffer address, then +8 each

  // Pooling mode, fixed before synthesis
  typedef enum logic {POOL_MAX = 1'b0, POOL_AVG = 1'b1} pool_mode_e;

  // Number of AXI words that hold n elements of w bits packed AXI_DW/w per word
  function automatic int unsigned words_for(int unsigned n, int unsigned w);
    return (n + (AXI_DW / w) - 1) / (AXI_DW / w);
  endfunction

endpackage

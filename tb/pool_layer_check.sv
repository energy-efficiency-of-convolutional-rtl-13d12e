// One pooling run, used by the workload testbench.
//
// Instantiates the pooling overlay with the given window, stride, width and
// mode, fills a memory model with pseudo-random signed input values (a hash
// of the element index, at the element width), starts the run over AXI4-Lite
// once `go` rises and compares every output with the window maximum or the
// window mean rounded toward zero, computed here. Input and output share one
// width. The run time is bounded by TPO outputs per cycle plus the memory
// traffic. `finished` rises when the results are counted.
module pool_layer_check
  import cnn_pkg::*;
#(
  parameter int         IMG_W = 1024,
  parameter int         IMG_H = 12,
  parameter int         PH    = 5,
  parameter int         PW    = 5,
  parameter int         SH    = 1,
  parameter int         SW    = 1,
  parameter int         W     = 8,
  parameter pool_mode_e MODE  = POOL_MAX,
  parameter int         SEED  = 1
) (
  input  logic clk,
  input  logic rst_n,
  input  logic go,
  output logic finished,
  output int   checks,
  output int   failures,
  output int   run_cycles
);

  localparam int TPO       = 2;
  localparam int OH        = (IMG_H - PH) / SH + 1, OW = (IMG_W - PW) / SW + 1;
  localparam int EPW       = AXI_DW / W;
  localparam int IN_PITCH  = (IMG_W + EPW - 1) / EPW;
  localparam int OUT_PITCH = (OW + EPW - 1) / EPW;
  localparam int A_IN      = 0;
  localparam int A_OUT     = IMG_H * IN_PITCH * 8;
  localparam int WORDS     = (A_OUT >> 3) + OH * OUT_PITCH + 1;

  // pseudo-random signed W-bit value of element (a, b)
  function automatic int rnd(int a, int b);
    logic [31:0] h;
    h = 32'(a) * 32'h9E3779B1 ^ 32'(b) * 32'h85EBCA77 ^ 32'(SEED) * 32'hC2B2AE3D;
    h = h ^ (h >> 15);
    h = h * 32'h2C1B3C6D;
    h = h ^ (h >> 12);
    return int'($signed(h[W-1:0]));
  endfunction

  axil_req_t lreq;
  axil_rsp_t lrsp;
  axi_req_t  areq;
  axi_rsp_t  arsp;
  logic      busy, done;

  pool2d #(.IMG_W(IMG_W), .IMG_H(IMG_H), .PH(PH), .PW(PW), .SH(SH), .SW(SW),
           .IN_W(W), .OUT_W(W), .MODE(MODE), .TPO(TPO))
    dut (.clk, .rst_n, .s_axil_req(lreq), .s_axil_rsp(lrsp),
         .m_axi_req(areq), .m_axi_rsp(arsp), .busy, .done);
  axi_mem_model #(.WORDS(WORDS)) mem (.clk, .rst_n, .req(areq), .rsp(arsp));

  int cycles = 0;
  always @(posedge clk) cycles <= cycles + 1;

  task automatic axil_write(input logic [7:0] a, input logic [31:0] d);
    lreq.awaddr = a; lreq.awvalid = 1; lreq.wdata = d; lreq.wvalid = 1; lreq.bready = 1;
    do @(posedge clk); while (!lrsp.awready);
    #1 lreq.awvalid = 0; lreq.wvalid = 0;
    while (!lrsp.bvalid) @(posedge clk);
    @(posedge clk); #1;
  endtask

  task automatic axil_read(input logic [7:0] a, output logic [31:0] d);
    lreq.araddr = a; lreq.arvalid = 1; lreq.rready = 1;
    do @(posedge clk); while (!lrsp.arready);
    #1 lreq.arvalid = 0;
    while (!lrsp.rvalid) @(posedge clk);
    d = lrsp.rdata;
    @(posedge clk); #1;
  endtask

  initial begin
    for (int i = 0; i < WORDS; i++) mem.mem[i] = '0;
    for (int y = 0; y < IMG_H; y++)
      for (int x = 0; x < IMG_W; x++)
        mem.mem[(A_IN >> 3) + y * IN_PITCH + x / EPW][(x % EPW) * W +: W] = W'(rnd(y, x));
  end

  initial begin
    logic [31:0] st;
    int t0, bound;
    lreq       = '0;
    finished   = 1'b0;
    checks     = 0;
    failures   = 0;
    run_cycles = 0;
    wait (go);
    @(posedge clk); #1;
    axil_write(8'h10, A_IN);
    axil_write(8'h18, A_OUT);
    axil_write(8'h00, 32'h1);
    t0 = cycles;
    do axil_read(8'h00, st); while (!st[1]);
    run_cycles = cycles - t0;
    bound = OH * ((OW + TPO - 1) / TPO + 8) + 2 * (IMG_H * IN_PITCH + OH * OUT_PITCH) + 400;
    $display("%s pooling %0dx%0d, %0dx%0d window, stride %0dx%0d, %0d-bit: %0d cycles (bound %0d)",
             MODE == POOL_MAX ? "max" : "average", IMG_W, IMG_H, PH, PW, SH, SW, W, run_cycles, bound);
    checks++;
    if (run_cycles > bound) begin
      failures++; $display("pooling %0dx%0d stride %0dx%0d too slow", PH, PW, SH, SW);
    end
    for (int y = 0; y < OH; y++)
      for (int x = 0; x < OW; x++) begin
        int mx, sm;
        logic [W-1:0] exp_v, got;
        mx = -(1 << (W - 1));
        sm = 0;
        for (int i = 0; i < PH; i++)
          for (int j = 0; j < PW; j++) begin
            int v;
            v = rnd(y * SH + i, x * SW + j);
            if (v > mx) mx = v;
            sm += v;
          end
        exp_v = W'((MODE == POOL_MAX) ? mx : sm / (PH * PW));
        got   = mem.mem[(A_OUT >> 3) + y * OUT_PITCH + x / EPW][(x % EPW) * W +: W];
        checks++;
        if (got !== exp_v) begin
          failures++;
          if (failures < 6)
            $display("pooling %0dx%0d stride %0dx%0d: out[%0d][%0d] = %h, expected %h",
                     PH, PW, SH, SW, y, x, got, exp_v);
        end
      end
    finished = 1'b1;
  end

endmodule

// One convolution run, used by the workload testbench.
//
// Instantiates the convolution overlay with the given image, kernel and data
// widths, fills a memory model with pseudo-random signed input and kernel
// values (a hash of the element index, at the element width), starts the run
// over AXI4-Lite once `go` rises and compares every output cell with a direct
// evaluation of the full convolution with zero padding K-1. With
// PREVENT_OVF = 1 the expected value is the top OUT_W bits of the exact sum;
// with PREVENT_OVF = 0 it is the exact sum wrapped to OUT_W bits, since all
// data then share one type. The run time is bounded by one tile per cycle plus
// the memory traffic. `finished` rises when the results are counted.
module conv_layer_check
  import cnn_pkg::*;
#(
  parameter int IMG_W       = 1024,
  parameter int IMG_H       = 6,
  parameter int K           = 5,
  parameter int IN_W        = 8,
  parameter int OUT_W       = 8,
  parameter bit PREVENT_OVF = 1'b1,
  parameter int SEED        = 1
) (
  input  logic clk,
  input  logic rst_n,
  input  logic go,
  output logic finished,
  output int   checks,
  output int   failures,
  output int   run_cycles
);

  localparam int TH = 2, TW = 2;
  localparam int ACC_W     = PREVENT_OVF ? 2 * IN_W + $clog2(K * K) : OUT_W;
  localparam int SHIFT     = ACC_W - OUT_W;
  localparam int OW        = IMG_W + K - 1, OH = IMG_H + K - 1;
  localparam int EPI       = AXI_DW / IN_W, EPO = AXI_DW / OUT_W;
  localparam int IN_PITCH  = (IMG_W + EPI - 1) / EPI;
  localparam int OUT_PITCH = (OW + EPO - 1) / EPO;
  localparam int K_WORDS   = (K * K + EPI - 1) / EPI;
  localparam int NTC       = (IMG_W + TW - 1) / TW, NTR = (IMG_H + TH - 1) / TH;
  localparam int A_IN      = 0;
  localparam int A_K       = A_IN + IMG_H * IN_PITCH * 8;
  localparam int A_OUT     = A_K + K_WORDS * 8;
  localparam int WORDS     = (A_OUT >> 3) + OH * OUT_PITCH + 1;

  // pseudo-random signed IN_W-bit value of element (kind, a, b)
  function automatic int rnd(int kind, int a, int b);
    logic [31:0] h;
    h = 32'(a) * 32'h9E3779B1 ^ 32'(b) * 32'h85EBCA77 ^ 32'(kind * 1000 + SEED) * 32'hC2B2AE3D;
    h = h ^ (h >> 15);
    h = h * 32'h2C1B3C6D;
    h = h ^ (h >> 12);
    return int'($signed(h[IN_W-1:0]));
  endfunction

  axil_req_t lreq;
  axil_rsp_t lrsp;
  axi_req_t  areq;
  axi_rsp_t  arsp;
  logic      busy, done;

  conv2d #(.IMG_W(IMG_W), .IMG_H(IMG_H), .KH(K), .KW(K), .TH(TH), .TW(TW),
           .IN_W(IN_W), .K_W(IN_W), .OUT_W(OUT_W), .PREVENT_OVF(PREVENT_OVF))
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
        mem.mem[(A_IN >> 3) + y * IN_PITCH + x / EPI][(x % EPI) * IN_W +: IN_W] = IN_W'(rnd(0, y, x));
    for (int i = 0; i < K * K; i++)
      mem.mem[(A_K >> 3) + i / EPI][(i % EPI) * IN_W +: IN_W] = IN_W'(rnd(1, i / K, i % K));
  end

  int img [IMG_H][IMG_W];
  int ker [K][K];

  initial begin
    logic [31:0] st;
    int t0, bound;
    lreq       = '0;
    finished   = 1'b0;
    checks     = 0;
    failures   = 0;
    run_cycles = 0;
    for (int y = 0; y < IMG_H; y++)
      for (int x = 0; x < IMG_W; x++) img[y][x] = rnd(0, y, x);
    for (int n = 0; n < K; n++)
      for (int m = 0; m < K; m++) ker[n][m] = rnd(1, n, m);
    wait (go);
    @(posedge clk); #1;
    axil_write(8'h10, A_IN);
    axil_write(8'h18, A_K);
    axil_write(8'h20, A_OUT);
    axil_write(8'h00, 32'h1);
    t0 = cycles;
    do axil_read(8'h00, st); while (!st[1]);
    run_cycles = cycles - t0;
    bound = NTR * (NTC + 8) + 2 * (IMG_H * IN_PITCH + OH * OUT_PITCH) + 2 * OW + 400;
    $display("conv %0dx%0d, %0dx%0d kernel, %0d-bit in, %0d-bit out, overflow %s: %0d cycles (bound %0d)",
             IMG_W, IMG_H, K, K, IN_W, OUT_W, PREVENT_OVF ? "prevented" : "allowed", run_cycles, bound);
    checks++;
    if (run_cycles > bound) begin
      failures++; $display("conv %0dx%0d K=%0d too slow", IMG_W, IMG_H, K);
    end
    for (int y = 0; y < OH; y++)
      for (int x = 0; x < OW; x++) begin
        longint acc;
        logic [OUT_W-1:0] exp_v, got;
        acc = 0;
        for (int n = 0; n < K; n++)
          for (int m = 0; m < K; m++)
            if (y - n >= 0 && y - n < IMG_H && x - m >= 0 && x - m < IMG_W)
              acc += img[y-n][x-m] * ker[n][m];
        exp_v = OUT_W'(acc >>> SHIFT);
        got   = mem.mem[(A_OUT >> 3) + y * OUT_PITCH + x / EPO][(x % EPO) * OUT_W +: OUT_W];
        checks++;
        if (got !== exp_v) begin
          failures++;
          if (failures < 6)
            $display("conv K=%0d W=%0d: out[%0d][%0d] = %h, expected %h", K, IN_W, y, x, got, exp_v);
        end
      end
    finished = 1'b1;
  end

endmodule

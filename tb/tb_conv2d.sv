// Testbench of the 2D convolution overlay at a reduced image size.
//
// Loads a random signed input tensor and kernel into the memory model,
// programs the three addresses over AXI4-Lite, starts the overlay, polls the
// done bit and compares every output cell with a direct evaluation of
// eq. (2.1) with zero padding K-1. The kernel is not square and the image is
// not a multiple of the tile size, so the padding of the last tiles and the
// carry between tiles are exercised; the input buffer starts just below a
// 4 KiB boundary and bursts are short, so bursts get split. The run time is
// checked against the one-tile-per-cycle rate plus the memory traffic.
module tb_conv2d;
  import cnn_pkg::*;

  localparam int IMG_W = 21, IMG_H = 9, KH = 5, KW = 3, TH = 2, TW = 2;
  localparam int IN_W = 8, K_W = 8, OUT_W = 16;
  localparam int ACC_W = IN_W + K_W + $clog2(KH * KW);
  localparam int SHIFT = ACC_W - OUT_W;
  localparam int OW = IMG_W + KW - 1, OH = IMG_H + KH - 1;
  localparam int IN_PITCH = (IMG_W + 7) / 8, OUT_PITCH = (OW + 3) / 4;
  localparam int NTC = (IMG_W + TW - 1) / TW, NTR = (IMG_H + TH - 1) / TH;
  localparam logic [31:0] A_IN = 32'h0FF0, A_K = 32'h2000, A_OUT = 32'h3000;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  axil_req_t lreq;
  axil_rsp_t lrsp;
  axi_req_t  areq;
  axi_rsp_t  arsp;
  logic busy, done;

  conv2d #(.IMG_W(IMG_W), .IMG_H(IMG_H), .KH(KH), .KW(KW), .TH(TH), .TW(TW),
           .IN_W(IN_W), .K_W(K_W), .OUT_W(OUT_W), .MAX_BURST(4))
    dut (.clk, .rst_n, .s_axil_req(lreq), .s_axil_rsp(lrsp),
         .m_axi_req(areq), .m_axi_rsp(arsp), .busy, .done);
  axi_mem_model #(.WORDS(4096)) mem (.clk, .rst_n, .req(areq), .rsp(arsp));

  int checks = 0, failures = 0;
  int cycles = 0;
  always @(posedge clk) cycles <= cycles + 1;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

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

  int img [IMG_H][IMG_W];
  int ker [KH][KW];

  initial begin
    logic [31:0] st;
    int t0;
    lreq = '0;
    for (int i = 0; i < 4096; i++) mem.mem[i] = 64'hDEAD_BEEF_DEAD_BEEF;
    for (int y = 0; y < IMG_H; y++)
      for (int x = 0; x < IMG_W; x++) begin
        img[y][x] = $signed(8'($urandom));
        mem.mem[(A_IN >> 3) + y * IN_PITCH + x / 8][(x % 8) * 8 +: 8] = 8'(img[y][x]);
      end
    for (int i = 0; i < KH * KW; i++) begin
      ker[i / KW][i % KW] = $signed(8'($urandom));
      mem.mem[(A_K >> 3) + i / 8][(i % 8) * 8 +: 8] = 8'(ker[i / KW][i % KW]);
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk); #1;
    axil_write(8'h10, A_IN);
    axil_write(8'h18, A_K);
    axil_write(8'h20, A_OUT);
    axil_read(8'h18, st);
    checks++; if (st != A_K) begin failures++; $display("address register readback %h", st); end
    axil_write(8'h00, 32'h1);
    t0 = cycles;
    do axil_read(8'h00, st); while (!st[1]);
    $display("convolution took %0d cycles", cycles - t0);
    // one tile per cycle in the compute stages, memory traffic at up to one word per cycle
    checks++;
    if (cycles - t0 > NTR * (NTC + 8) + 2 * (IMG_H * IN_PITCH + OH * OUT_PITCH + 4) * 2 + 200) begin
      failures++; $display("too slow");
    end
    for (int y = 0; y < OH; y++)
      for (int x = 0; x < OW; x++) begin
        longint acc;
        logic [OUT_W-1:0] exp_v, got;
        acc = 0;
        for (int n = 0; n < KH; n++)
          for (int m = 0; m < KW; m++)
            if (y - n >= 0 && y - n < IMG_H && x - m >= 0 && x - m < IMG_W)
              acc += img[y-n][x-m] * ker[n][m];
        exp_v = OUT_W'(acc >>> SHIFT);
        got = mem.mem[(A_OUT >> 3) + y * OUT_PITCH + x / 4][(x % 4) * 16 +: 16];
        checks++;
        if (got !== exp_v) begin
          failures++;
          if (failures < 10) $display("out[%0d][%0d] = %h, expected %h", y, x, got, exp_v);
        end
      end
    // nothing written past the output
    checks++;
    if (mem.mem[(A_OUT >> 3) + OH * OUT_PITCH] != 64'hDEAD_BEEF_DEAD_BEEF) begin
      failures++; $display("write past the end of the output");
    end
    checks++;
    if (mem.max_rd_len != 4) begin failures++; $display("bursts not used"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

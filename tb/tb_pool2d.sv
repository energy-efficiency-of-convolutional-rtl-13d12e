// Testbench of the pooling overlay: one max-pooling and one average-pooling
// instance at reduced sizes, with non-square windows and strides in one or
// the other direction, each with its own memory model. Both are started over
// AXI4-Lite with random signed input; every output is compared with the window
// maximum or the window mean (rounded toward zero) computed here. Run times
// are checked against the rate of TPO outputs per cycle plus the memory
// traffic.
module tb_pool2d;
  import cnn_pkg::*;

  localparam int W = 19, H = 11;
  // instance A: max, 3x4 window, stride 2x1, 2 outputs per cycle
  localparam int APH = 3, APW = 4, ASH = 2, ASW = 1, ATPO = 2;
  // instance B: average, 5x5 window, stride 1x2, 3 outputs per cycle
  localparam int BPH = 5, BPW = 5, BSH = 1, BSW = 2, BTPO = 3;
  localparam int IN_PITCH = (W + 7) / 8;
  localparam logic [31:0] A_IN = 32'h0000, A_OUT = 32'h1000;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  axil_req_t lreq_a, lreq_b;
  axil_rsp_t lrsp_a, lrsp_b;
  axi_req_t  areq_a, areq_b;
  axi_rsp_t  arsp_a, arsp_b;
  logic busy_a, done_a, busy_b, done_b;

  pool2d #(.IMG_W(W), .IMG_H(H), .PH(APH), .PW(APW), .SH(ASH), .SW(ASW),
           .MODE(POOL_MAX), .TPO(ATPO), .MAX_BURST(2))
    dut_a (.clk, .rst_n, .s_axil_req(lreq_a), .s_axil_rsp(lrsp_a),
           .m_axi_req(areq_a), .m_axi_rsp(arsp_a), .busy(busy_a), .done(done_a));
  pool2d #(.IMG_W(W), .IMG_H(H), .PH(BPH), .PW(BPW), .SH(BSH), .SW(BSW),
           .MODE(POOL_AVG), .TPO(BTPO))
    dut_b (.clk, .rst_n, .s_axil_req(lreq_b), .s_axil_rsp(lrsp_b),
           .m_axi_req(areq_b), .m_axi_rsp(arsp_b), .busy(busy_b), .done(done_b));
  axi_mem_model #(.WORDS(1024)) mem_a (.clk, .rst_n, .req(areq_a), .rsp(arsp_a));
  axi_mem_model #(.WORDS(1024)) mem_b (.clk, .rst_n, .req(areq_b), .rsp(arsp_b));

  int checks = 0, failures = 0;
  int cycles = 0;
  always @(posedge clk) cycles <= cycles + 1;
  int t_done_a = 0, t_done_b = 0;
  always @(posedge clk) begin
    if (done_a) t_done_a <= cycles;
    if (done_b) t_done_b <= cycles;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int img [H][W];

  function automatic int pool_ref(bit avg, int ph, int pw, int sh, int sw, int y, int x);
    int mx = -128, sm = 0;
    for (int i = 0; i < ph; i++)
      for (int j = 0; j < pw; j++) begin
        if (img[y*sh+i][x*sw+j] > mx) mx = img[y*sh+i][x*sw+j];
        sm += img[y*sh+i][x*sw+j];
      end
    return avg ? sm / (ph * pw) : mx;
  endfunction

  task automatic check_out(string tag, bit avg, int ph, int pw, int sh, int sw);
    int oh = (H - ph) / sh + 1, ow = (W - pw) / sw + 1, pitch = (ow + 7) / 8;
    for (int y = 0; y < oh; y++)
      for (int x = 0; x < ow; x++) begin
        logic [7:0] got, exp_v;
        exp_v = 8'(pool_ref(avg, ph, pw, sh, sw, y, x));
        got = avg ? mem_b.mem[(A_OUT >> 3) + y * pitch + x / 8][(x % 8) * 8 +: 8]
                  : mem_a.mem[(A_OUT >> 3) + y * pitch + x / 8][(x % 8) * 8 +: 8];
        checks++;
        if (got !== exp_v) begin
          failures++;
          if (failures < 10) $display("%s out[%0d][%0d] = %0d, expected %0d", tag, y, x,
                                      $signed(got), $signed(exp_v));
        end
      end
  endtask

  task automatic axil_write_a(input logic [7:0] a, input logic [31:0] d);
    lreq_a.awaddr = a; lreq_a.awvalid = 1; lreq_a.wdata = d; lreq_a.wvalid = 1; lreq_a.bready = 1;
    do @(posedge clk); while (!lrsp_a.awready);
    #1 lreq_a.awvalid = 0; lreq_a.wvalid = 0;
    while (!lrsp_a.bvalid) @(posedge clk);
    @(posedge clk); #1;
  endtask

  task automatic axil_write_b(input logic [7:0] a, input logic [31:0] d);
    lreq_b.awaddr = a; lreq_b.awvalid = 1; lreq_b.wdata = d; lreq_b.wvalid = 1; lreq_b.bready = 1;
    do @(posedge clk); while (!lrsp_b.awready);
    #1 lreq_b.awvalid = 0; lreq_b.wvalid = 0;
    while (!lrsp_b.bvalid) @(posedge clk);
    @(posedge clk); #1;
  endtask

  initial begin
    int t0;
    lreq_a = '0;
    lreq_b = '0;
    for (int y = 0; y < H; y++)
      for (int x = 0; x < W; x++) begin
        img[y][x] = $signed(8'($urandom));
        mem_a.mem[(A_IN >> 3) + y * IN_PITCH + x / 8][(x % 8) * 8 +: 8] = 8'(img[y][x]);
        mem_b.mem[(A_IN >> 3) + y * IN_PITCH + x / 8][(x % 8) * 8 +: 8] = 8'(img[y][x]);
      end
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk); #1;
    axil_write_a(8'h10, A_IN);
    axil_write_a(8'h18, A_OUT);
    axil_write_b(8'h10, A_IN);
    axil_write_b(8'h18, A_OUT);
    t0 = cycles;
    fork
      axil_write_a(8'h00, 32'h1);
      axil_write_b(8'h00, 32'h1);
    join
    wait (t_done_a != 0 && t_done_b != 0);
    @(posedge clk);
    $display("max pooling took %0d cycles, average pooling %0d", t_done_a - t0, t_done_b - t0);
    checks++;
    if (t_done_a - t0 > 2 * H * (IN_PITCH + 8) + ((H - APH) / ASH + 1) * (W / ATPO + 20) + 100) begin
      failures++; $display("max pooling too slow");
    end
    checks++;
    if (t_done_b - t0 > 2 * H * (IN_PITCH + 8) + ((H - BPH) / BSH + 1) * (W / BTPO + 20) + 100) begin
      failures++; $display("average pooling too slow");
    end
    check_out("max", 1'b0, APH, APW, ASH, ASW);
    check_out("avg", 1'b1, BPH, BPW, BSH, BSW);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// End-to-end testbench of the three overlays at their default sizes.
//
// The host side is modelled by AXI4-Lite tasks and one memory model per AXI
// port. The testbench fills memory with a random signed 1024 x 80 image and
// 5 x 5 kernel, a 256-input fully connected layer (inputs, weights, biases)
// and a second random 1024 x 80 image for pooling, starts all three overlays
// at once and waits for their done bits. Every output cell is compared with a
// direct evaluation of eq. (2.1) with zero padding 4, of eq. (2.3), and of 5 x 5
// max pooling. The testbench also counts how often each mechanism of the
// design occurred and fails if one never did: double-buffered input and
// output banks in use, output bursts overlapping computation, the tile carry,
// the Row Memory and its final flush, the bias-initialised Temp Output, chunk
// double buffering and output groups in the fully connected layer, the
// pooling Input Memory ring, memory stalls and burst splitting. It checks that
// the convolution pipeline accepted exactly one tile per cycle.
module tb_cnn_blocks_top;
  import cnn_pkg::*;

  // the top's default configuration
  localparam int CW = 1024, CH = 80, K = 5;
  localparam int COW = CW + K - 1, COH = CH + K - 1;
  localparam int C_IN_PITCH = CW / 8, C_OUT_PITCH = (COW + 7) / 8;
  localparam int N_IN = 256, N_OUT = 256, P = 3;
  localparam int PW_ = 1024, PH_ = 80, PK = 5;
  localparam int POW = PW_ - PK + 1, POH = PH_ - PK + 1;
  localparam int P_IN_PITCH = PW_ / 8, P_OUT_PITCH = (POW + 7) / 8;
  localparam int C_ACC = 8 + 8 + $clog2(K * K);
  localparam int F_ACC = 16 + $clog2(N_IN + 1) + 1;

  localparam logic [31:0] C_IN = 32'h0000_0000, C_K = 32'h0003_8000, C_OUT = 32'h0002_0000;
  localparam logic [31:0] F_IN = 32'h0000_0000, F_W = 32'h0000_0000, F_B = 32'h0000_1000, F_OUT = 32'h0000_2000;
  localparam logic [31:0] P_IN = 32'h0000_0000, P_OUT = 32'h0001_8000;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  axil_req_t c_lreq, f_lreq, p_lreq;
  axil_rsp_t c_lrsp, f_lrsp, p_lrsp;
  axi_req_t  c_req, p_req;
  axi_rsp_t  c_rsp, p_rsp;
  axi_req_t  f_req [P+1];
  axi_rsp_t  f_rsp [P+1];
  logic c_busy, c_done, f_busy, f_done, p_busy, p_done;

  cnn_blocks_top dut (
    .clk, .rst_n,
    .conv_axil_req(c_lreq), .conv_axil_rsp(c_lrsp), .conv_axi_req(c_req), .conv_axi_rsp(c_rsp),
    .conv_busy(c_busy), .conv_done(c_done),
    .fc_axil_req(f_lreq), .fc_axil_rsp(f_lrsp), .fc_axi_req(f_req), .fc_axi_rsp(f_rsp),
    .fc_busy(f_busy), .fc_done(f_done),
    .pool_axil_req(p_lreq), .pool_axil_rsp(p_lrsp), .pool_axi_req(p_req), .pool_axi_rsp(p_rsp),
    .pool_busy(p_busy), .pool_done(p_done)
  );

  axi_mem_model #(.WORDS(1 << 15)) mem_c  (.clk, .rst_n, .req(c_req),    .rsp(c_rsp));
  axi_mem_model #(.WORDS(1 << 13)) mem_f0 (.clk, .rst_n, .req(f_req[0]), .rsp(f_rsp[0]));
  axi_mem_model #(.WORDS(1 << 13)) mem_f1 (.clk, .rst_n, .req(f_req[1]), .rsp(f_rsp[1]));
  axi_mem_model #(.WORDS(1 << 13)) mem_f2 (.clk, .rst_n, .req(f_req[2]), .rsp(f_rsp[2]));
  axi_mem_model #(.WORDS(1 << 13)) mem_f3 (.clk, .rst_n, .req(f_req[3]), .rsp(f_rsp[3]));
  axi_mem_model #(.WORDS(1 << 15)) mem_p  (.clk, .rst_n, .req(p_req),    .rsp(p_rsp));

  int checks = 0, failures = 0;
  int cycles = 0;
  int t_c = 0, t_f = 0, t_p = 0;
  always @(posedge clk) begin
    cycles <= cycles + 1;
    if (c_done) t_c <= cycles;
    if (f_done) t_f <= cycles;
    if (p_done) t_p <= cycles;
  end

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------------ mechanism counters
  int n_in_dbuf, n_out_overlap, n_carry, n_rowmem, n_flush, n_tiles;
  int n_bias, n_fc_dbuf, n_groups, n_ring, n_pool_overlap, n_stall;
  always @(posedge clk) if (rst_n) begin
    if (dut.u_conv.in_full == 2'b11) n_in_dbuf++;
    if (dut.u_conv.issue && dut.u_conv.u_wr.busy) n_out_overlap++;
    if (dut.u_conv.s1_valid && dut.u_conv.s1_tc != 0) n_carry++;
    if (dut.u_conv.s1_valid && !dut.u_conv.s1_first_row) n_rowmem++;
    if (int'(dut.u_conv.cstate) == 3) n_flush++;
    if (dut.u_conv.issue) n_tiles++;
    if (int'(dut.u_fc.state) == 1) n_bias++;
    if (dut.u_fc.c_go && int'(dut.u_fc.lstate) == 2) n_fc_dbuf++;
    if (dut.u_fc.c_go && dut.u_fc.c_ch == 0 && dut.u_fc.c_k == 0) n_groups++;
    if (dut.u_pool.c_go && dut.u_pool.c_slot + PK > PK + 1) n_ring++;
    if (dut.u_pool.c_go && dut.u_pool.r_busy) n_pool_overlap++;
    if (c_req.rready && !c_rsp.rvalid) n_stall++;
  end

  task automatic mech(string what, int n);
    checks++;
    $display("  %-44s %0d", what, n);
    if (n == 0) begin failures++; $display("  mechanism never happened: %s", what); end
  endtask

  // ------------------------------------------------------------ host access
  task automatic axil_write(ref axil_req_t rq, ref axil_rsp_t rs, input logic [7:0] a, input logic [31:0] d);
    rq.awaddr = a; rq.awvalid = 1; rq.wdata = d; rq.wvalid = 1; rq.bready = 1;
    do @(posedge clk); while (!rs.awready);
    #1 rq.awvalid = 0; rq.wvalid = 0;
    while (!rs.bvalid) @(posedge clk);
    @(posedge clk); #1;
  endtask

  // ------------------------------------------------------------ data
  byte cimg [CH][CW];
  byte ker  [K][K];
  byte fx   [N_IN];
  byte fw   [N_OUT][N_IN];
  byte fb   [N_OUT];
  byte pimg [PH_][PW_];

  initial begin
    c_lreq = '0; f_lreq = '0; p_lreq = '0;
    for (int y = 0; y < CH; y++)
      for (int x = 0; x < CW; x++) begin
        cimg[y][x] = byte'($urandom);
        mem_c.mem[(C_IN >> 3) + y * C_IN_PITCH + x / 8][(x % 8) * 8 +: 8] = cimg[y][x];
      end
    for (int i = 0; i < K * K; i++) begin
      ker[i / K][i % K] = byte'($urandom);
      mem_c.mem[(C_K >> 3) + i / 8][(i % 8) * 8 +: 8] = ker[i / K][i % K];
    end
    for (int i = 0; i < N_IN; i++) begin
      fx[i] = byte'($urandom);
      mem_f0.mem[(F_IN >> 3) + i / 8][(i % 8) * 8 +: 8] = fx[i];
    end
    for (int o = 0; o < N_OUT; o++) begin
      fb[o] = byte'($urandom);
      mem_f0.mem[(F_B >> 3) + o / 8][(o % 8) * 8 +: 8] = fb[o];
      for (int i = 0; i < N_IN; i++) begin
        fw[o][i] = byte'($urandom);
        mem_f1.mem[(F_W >> 3) + o * (N_IN / 8) + i / 8][(i % 8) * 8 +: 8] = fw[o][i];
        mem_f2.mem[(F_W >> 3) + o * (N_IN / 8) + i / 8][(i % 8) * 8 +: 8] = fw[o][i];
        mem_f3.mem[(F_W >> 3) + o * (N_IN / 8) + i / 8][(i % 8) * 8 +: 8] = fw[o][i];
      end
    end
    for (int y = 0; y < PH_; y++)
      for (int x = 0; x < PW_; x++) begin
        pimg[y][x] = byte'($urandom);
        mem_p.mem[(P_IN >> 3) + y * P_IN_PITCH + x / 8][(x % 8) * 8 +: 8] = pimg[y][x];
      end

    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk); #1;
    axil_write(c_lreq, c_lrsp, 8'h10, C_IN);
    axil_write(c_lreq, c_lrsp, 8'h18, C_K);
    axil_write(c_lreq, c_lrsp, 8'h20, C_OUT);
    axil_write(f_lreq, f_lrsp, 8'h10, F_IN);
    axil_write(f_lreq, f_lrsp, 8'h18, F_W);
    axil_write(f_lreq, f_lrsp, 8'h20, F_B);
    axil_write(f_lreq, f_lrsp, 8'h28, F_OUT);
    axil_write(p_lreq, p_lrsp, 8'h10, P_IN);
    axil_write(p_lreq, p_lrsp, 8'h18, P_OUT);
    fork
      axil_write(c_lreq, c_lrsp, 8'h00, 32'h1);
      axil_write(f_lreq, f_lrsp, 8'h00, 32'h1);
      axil_write(p_lreq, p_lrsp, 8'h00, 32'h1);
    join
    wait (t_c != 0 && t_f != 0 && t_p != 0);
    repeat (2) @(posedge clk);
    $display("cycles to done: convolution %0d, fully connected %0d, pooling %0d", t_c, t_f, t_p);

    // convolution
    for (int y = 0; y < COH; y++)
      for (int x = 0; x < COW; x++) begin
        int acc;
        logic [7:0] got, exp_v;
        acc = 0;
        for (int n = 0; n < K; n++)
          for (int m = 0; m < K; m++)
            if (y - n >= 0 && y - n < CH && x - m >= 0 && x - m < CW)
              acc += int'(cimg[y-n][x-m]) * int'(ker[n][m]);
        exp_v = 8'(acc >>> (C_ACC - 8));
        got = mem_c.mem[(C_OUT >> 3) + y * C_OUT_PITCH + x / 8][(x % 8) * 8 +: 8];
        checks++;
        if (got !== exp_v) begin
          failures++;
          if (failures < 10) $display("conv out[%0d][%0d] = %h, expected %h", y, x, got, exp_v);
        end
      end
    // fully connected
    for (int o = 0; o < N_OUT; o++) begin
      int acc;
      logic [7:0] got, exp_v;
      acc = fb[o];
      for (int i = 0; i < N_IN; i++) acc += int'(fx[i]) * int'(fw[o][i]);
      exp_v = 8'(acc >>> (F_ACC - 8));
      got = mem_f0.mem[(F_OUT >> 3) + o / 8][(o % 8) * 8 +: 8];
      checks++;
      if (got !== exp_v) begin
        failures++;
        if (failures < 10) $display("fc z[%0d] = %h, expected %h", o, got, exp_v);
      end
    end
    // max pooling
    for (int y = 0; y < POH; y++)
      for (int x = 0; x < POW; x++) begin
        byte mx;
        logic [7:0] got;
        mx = -128;
        for (int i = 0; i < PK; i++)
          for (int j = 0; j < PK; j++)
            if (pimg[y+i][x+j] > mx) mx = pimg[y+i][x+j];
        got = mem_p.mem[(P_OUT >> 3) + y * P_OUT_PITCH + x / 8][(x % 8) * 8 +: 8];
        checks++;
        if (got !== 8'(mx)) begin
          failures++;
          if (failures < 10) $display("pool out[%0d][%0d] = %h, expected %h", y, x, got, 8'(mx));
        end
      end

    // one tile per cycle: the compute stages issued exactly one tile per tile
    checks++;
    if (n_tiles != (CW / 2) * (CH / 2)) begin failures++; $display("tiles issued %0d", n_tiles); end
    $display("mechanisms:");
    mech("conv: both input banks full", n_in_dbuf);
    mech("conv: output burst during tile issue", n_out_overlap);
    mech("conv: tiles taking a carry", n_carry);
    mech("conv: tiles taking Row Memory sums", n_rowmem);
    mech("conv: Row Memory flush cycles", n_flush);
    mech("fc: bias initialisation cycles", n_bias);
    mech("fc: chunk fetch during calculation", n_fc_dbuf);
    mech("fc: output groups started", n_groups);
    mech("pool: tiles using a wrapped ring slot", n_ring);
    mech("pool: row fetch during pooling", n_pool_overlap);
    mech("axi: read stall cycles", n_stall);
    mech("axi: conv read bursts", mem_c.rd_bursts > 1 && mem_c.max_rd_len == 256);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

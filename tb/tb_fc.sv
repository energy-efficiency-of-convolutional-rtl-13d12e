// Testbench of the fully connected overlay at reduced sizes.
//
// Three outputs per group (four AXI ports) with an input count that is not a
// multiple of the chunk and an output count that is not a multiple of three,
// so partial chunks and a partial last group are exercised. Random signed
// inputs, weights and biases are placed in one memory model per port (port 0
// holds inputs, biases and outputs, ports 1-3 each a copy of the weights), the
// run is started over AXI4-Lite, and every output is compared with eq. (2.3)
// computed here. The run time is checked against the weight traffic, which
// bounds it: one word per weight port per cycle plus burst overhead.
module tb_fc;
  import cnn_pkg::*;

  localparam int N_IN = 40, N_OUT = 7, P = 3, CHUNK = 16, OUT_W = 16;
  localparam int ACC_W = 16 + $clog2(N_IN + 1) + 1;
  localparam int SHIFT = ACC_W - OUT_W;
  localparam int W_PITCH = (N_IN + 7) / 8;
  localparam logic [31:0] A_IN = 32'h0000, A_W = 32'h1000, A_B = 32'h0800, A_OUT = 32'h0C00;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  axil_req_t lreq;
  axil_rsp_t lrsp;
  axi_req_t  areq [P+1];
  axi_rsp_t  arsp [P+1];
  logic busy, done;

  fc #(.N_IN(N_IN), .N_OUT(N_OUT), .P(P), .OUT_W(OUT_W), .CHUNK(CHUNK), .MAX_BURST(4))
    dut (.clk, .rst_n, .s_axil_req(lreq), .s_axil_rsp(lrsp),
         .m_axi_req(areq), .m_axi_rsp(arsp), .busy, .done);

  axi_mem_model #(.WORDS(1024)) mem0 (.clk, .rst_n, .req(areq[0]), .rsp(arsp[0]));
  axi_mem_model #(.WORDS(1024)) mem1 (.clk, .rst_n, .req(areq[1]), .rsp(arsp[1]));
  axi_mem_model #(.WORDS(1024)) mem2 (.clk, .rst_n, .req(areq[2]), .rsp(arsp[2]));
  axi_mem_model #(.WORDS(1024)) mem3 (.clk, .rst_n, .req(areq[3]), .rsp(arsp[3]));

  int checks = 0, failures = 0;
  int cycles = 0;
  always @(posedge clk) cycles <= cycles + 1;

  initial begin
    repeat (100000) @(posedge clk);
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

  int x [N_IN];
  int w [N_OUT][N_IN];
  int b [N_OUT];

  initial begin
    logic [31:0] st;
    int t0;
    lreq = '0;
    for (int i = 0; i < N_IN; i++) begin
      x[i] = $signed(8'($urandom));
      mem0.mem[(A_IN >> 3) + i / 8][(i % 8) * 8 +: 8] = 8'(x[i]);
    end
    for (int o = 0; o < N_OUT; o++) begin
      b[o] = $signed(8'($urandom));
      mem0.mem[(A_B >> 3) + o / 8][(o % 8) * 8 +: 8] = 8'(b[o]);
      for (int i = 0; i < N_IN; i++) begin
        w[o][i] = $signed(8'($urandom));
        mem1.mem[(A_W >> 3) + o * W_PITCH + i / 8][(i % 8) * 8 +: 8] = 8'(w[o][i]);
        mem2.mem[(A_W >> 3) + o * W_PITCH + i / 8][(i % 8) * 8 +: 8] = 8'(w[o][i]);
        mem3.mem[(A_W >> 3) + o * W_PITCH + i / 8][(i % 8) * 8 +: 8] = 8'(w[o][i]);
      end
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk); #1;
    axil_write(8'h10, A_IN);
    axil_write(8'h18, A_W);
    axil_write(8'h20, A_B);
    axil_write(8'h28, A_OUT);
    axil_write(8'h00, 32'h1);
    t0 = cycles;
    do axil_read(8'h00, st); while (!st[1]);
    $display("fully connected layer took %0d cycles", cycles - t0);
    checks++;
    if (cycles - t0 > ((N_OUT + P - 1) / P) * ((N_IN + CHUNK - 1) / CHUNK) * (2 * CHUNK / 8 + 16) + 100) begin
      failures++; $display("too slow");
    end
    for (int o = 0; o < N_OUT; o++) begin
      longint acc;
      logic [OUT_W-1:0] exp_v, got;
      acc = b[o];
      for (int i = 0; i < N_IN; i++) acc += x[i] * w[o][i];
      exp_v = OUT_W'(acc >>> SHIFT);
      got = mem0.mem[(A_OUT >> 3) + o / 4][(o % 4) * 16 +: 16];
      checks++;
      if (got !== exp_v) begin
        failures++; $display("z[%0d] = %h, expected %h", o, got, exp_v);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

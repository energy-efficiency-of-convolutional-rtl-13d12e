// One fully connected layer run, used by the workload testbench.
//
// Instantiates the fully connected overlay with the given sizes and P, gives
// each of its P+1 AXI ports its own memory model (port 0: input neurons,
// biases and outputs; ports 1..P: a copy of the weight matrix each), fills the
// memories with pseudo-random signed 8-bit values from a hash of the element
// index, starts the layer over AXI4-Lite once `go` rises and compares every
// output with the weighted sum computed here, truncated to OUT_W bits as the
// overlay does. The run time is bounded from above by the weight traffic: one
// 64-bit word per weight port per cycle, plus burst overhead per chunk.
// `finished` rises when all checks are counted in `checks` and `failures`.
module fc_layer_check
  import cnn_pkg::*;
#(
  parameter int N_IN  = 1024,
  parameter int N_OUT = 36,
  parameter int P     = 3,
  parameter int OUT_W = 16,
  parameter int SEED  = 1
) (
  input  logic clk,
  input  logic rst_n,
  input  logic go,
  output logic finished,
  output int   checks,
  output int   failures,
  output int   run_cycles
);

  localparam int CHUNK   = 128;
  localparam int ACC_W   = 16 + $clog2(N_IN + 1) + 1;
  localparam int SHIFT   = ACC_W - OUT_W;
  localparam int EPO     = AXI_DW / OUT_W;
  localparam int W_PITCH = (N_IN + 7) / 8;
  localparam int IN_WDS  = W_PITCH;
  localparam int B_WDS   = (N_OUT + 7) / 8;
  localparam int OUT_WDS = (N_OUT + EPO - 1) / EPO;
  localparam logic [31:0] A_IN  = 32'h0;
  localparam logic [31:0] A_B   = A_IN + 32'(IN_WDS * 8);
  localparam logic [31:0] A_OUT = A_B + 32'(B_WDS * 8);
  localparam logic [31:0] A_W   = 32'h0;
  localparam int WORDS0 = IN_WDS + B_WDS + OUT_WDS;
  localparam int WORDSW = N_OUT * W_PITCH;

  // pseudo-random signed 8-bit value of element (kind, a, b)
  function automatic int rnd8(int kind, int a, int b);
    logic [31:0] h;
    h = 32'(a) * 32'h9E3779B1 ^ 32'(b) * 32'h85EBCA77 ^ 32'(kind * 1000 + SEED) * 32'hC2B2AE3D;
    h = h ^ (h >> 15);
    h = h * 32'h2C1B3C6D;
    h = h ^ (h >> 12);
    return int'($signed(h[7:0]));
  endfunction

  axil_req_t lreq;
  axil_rsp_t lrsp;
  axi_req_t  areq [P+1];
  axi_rsp_t  arsp [P+1];
  logic      busy, done;

  fc #(.N_IN(N_IN), .N_OUT(N_OUT), .P(P), .OUT_W(OUT_W), .CHUNK(CHUNK))
    dut (.clk, .rst_n, .s_axil_req(lreq), .s_axil_rsp(lrsp),
         .m_axi_req(areq), .m_axi_rsp(arsp), .busy, .done);

  axi_mem_model #(.WORDS(WORDS0)) mem0 (.clk, .rst_n, .req(areq[0]), .rsp(arsp[0]));

  initial begin
    for (int i = 0; i < N_IN; i++)
      mem0.mem[(A_IN >> 3) + i / 8][(i % 8) * 8 +: 8] = 8'(rnd8(0, i, 0));
    for (int o = 0; o < N_OUT; o++)
      mem0.mem[(A_B >> 3) + o / 8][(o % 8) * 8 +: 8] = 8'(rnd8(1, o, 0));
  end

  for (genvar k = 1; k <= P; k++) begin : g_wmem
    axi_mem_model #(.WORDS(WORDSW)) mem (.clk, .rst_n, .req(areq[k]), .rsp(arsp[k]));
    initial
      for (int o = 0; o < N_OUT; o++)
        for (int i = 0; i < N_IN; i++)
          mem.mem[(A_W >> 3) + o * W_PITCH + i / 8][(i % 8) * 8 +: 8] = 8'(rnd8(2, o, i));
  end

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
    axil_write(8'h18, A_W);
    axil_write(8'h20, A_B);
    axil_write(8'h28, A_OUT);
    axil_write(8'h00, 32'h1);
    t0 = cycles;
    do axil_read(8'h00, st); while (!st[1]);
    run_cycles = cycles - t0;
    bound = ((N_OUT + P - 1) / P) * ((N_IN + CHUNK - 1) / CHUNK) * (2 * CHUNK / 8 + 16) + 2 * N_OUT + 200;
    $display("fc %0d -> %0d, P=%0d: %0d cycles (bound %0d)", N_IN, N_OUT, P, run_cycles, bound);
    checks++;
    if (run_cycles > bound) begin
      failures++; $display("fc %0d -> %0d, P=%0d too slow", N_IN, N_OUT, P);
    end
    for (int o = 0; o < N_OUT; o++) begin
      longint acc;
      logic [OUT_W-1:0] exp_v, got;
      acc = rnd8(1, o, 0);
      for (int i = 0; i < N_IN; i++) acc += rnd8(0, i, 0) * rnd8(2, o, i);
      exp_v = OUT_W'(acc >>> SHIFT);
      got   = mem0.mem[(A_OUT >> 3) + o / EPO][(o % EPO) * OUT_W +: OUT_W];
      checks++;
      if (got !== exp_v) begin
        failures++;
        $display("fc %0d -> %0d, P=%0d: z[%0d] = %h, expected %h", N_IN, N_OUT, P, o, got, exp_v);
      end
    end
    finished = 1'b1;
  end

endmodule

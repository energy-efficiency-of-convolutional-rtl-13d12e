// Testbench of the AXI4-Lite control slave: address registers written and read
// back, unmapped offsets read as zero, start pulses once per write of 1 to the
// control register and is refused while the overlay is busy, the done bit is
// set by the done pulse and cleared when read, and the idle bit follows busy.
module tb_axil_ctrl;
  import cnn_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  axil_req_t req;
  axil_rsp_t rsp;
  logic start, busy, done;
  addr_t addrs [3];

  axil_ctrl #(.NADDR(3)) dut (.clk, .rst_n, .s_req(req), .s_rsp(rsp), .start, .busy, .done, .addrs);

  int checks = 0, failures = 0, starts = 0;
  always @(posedge clk) if (start) starts++;

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic wr(input logic [7:0] a, input logic [31:0] d);
    req.awaddr = a; req.awvalid = 1; req.wdata = d; req.wvalid = 1; req.bready = 1;
    do @(posedge clk); while (!rsp.awready);
    #1 req.awvalid = 0; req.wvalid = 0;
    while (!rsp.bvalid) @(posedge clk);
    @(posedge clk); #1;
  endtask

  task automatic rd(input logic [7:0] a, output logic [31:0] d);
    req.araddr = a; req.arvalid = 1; req.rready = 1;
    do @(posedge clk); while (!rsp.arready);
    #1 req.arvalid = 0;
    while (!rsp.rvalid) @(posedge clk);
    d = rsp.rdata;
    @(posedge clk); #1;
  endtask

  task automatic expect_eq(string what, logic [31:0] got, logic [31:0] exp_v);
    checks++;
    if (got !== exp_v) begin failures++; $display("%s = %h, expected %h", what, got, exp_v); end
  endtask

  initial begin
    logic [31:0] d;
    req = '0; busy = 0; done = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk); #1;
    wr(8'h10, 32'h1111_0000);
    wr(8'h18, 32'h2222_0008);
    wr(8'h20, 32'h3333_0010);
    wr(8'h40, 32'hFFFF_FFFF);         // unmapped
    rd(8'h10, d); expect_eq("addr0", d, 32'h1111_0000);
    rd(8'h18, d); expect_eq("addr1", d, 32'h2222_0008);
    rd(8'h20, d); expect_eq("addr2", d, 32'h3333_0010);
    rd(8'h40, d); expect_eq("unmapped", d, 32'h0);
    expect_eq("addrs[1] port", addrs[1], 32'h2222_0008);
    rd(8'h00, d); expect_eq("ctrl idle", d, 32'h4);
    wr(8'h00, 32'h1);
    expect_eq("start count", starts, 1);
    busy = 1;
    rd(8'h00, d); expect_eq("ctrl running", d, 32'h1);
    wr(8'h00, 32'h1);                 // ignored while running
    expect_eq("start refused", starts, 1);
    @(posedge clk); #1 done = 1; busy = 0;
    @(posedge clk); #1 done = 0;
    rd(8'h00, d); expect_eq("ctrl done", d, 32'h6);
    rd(8'h00, d); expect_eq("done cleared on read", d, 32'h4);
    wr(8'h00, 32'h0);                 // writing 0 starts nothing
    expect_eq("no start on 0", starts, 1);
    wr(8'h00, 32'h1);
    expect_eq("second start", starts, 2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// Testbench of the AXI4 burst read engine: several transfers of different
// lengths and start addresses, one crossing a 4 KiB boundary, against a memory
// model that stalls at random while the consumer also applies back-pressure.
// Checks that every word arrives once and in order, that done comes once per
// transfer, that no burst exceeds MAX_BURST or crosses 4 KiB, and that an
// uninterrupted transfer streams close to one word per cycle.
module tb_axi_rd_engine;
  import cnn_pkg::*;

  localparam int MAXB = 16;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic start, busy, done, out_valid, out_ready;
  addr_t addr;
  logic [31:0] nwords;
  data_t out_data;
  axi_req_t req;
  axi_rsp_t rsp;

  axi_rd_engine #(.MAX_BURST(MAXB)) dut (.clk, .rst_n, .start, .addr, .nwords, .busy, .done,
    .out_data, .out_valid, .out_ready, .axi_req(req), .axi_rsp(rsp));
  axi_mem_model #(.WORDS(4096)) mem (.clk, .rst_n, .req, .rsp);

  int checks = 0, failures = 0;
  int got, dones;
  logic bp;   // apply back-pressure

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    out_ready <= bp ? ($urandom % 3 != 0) : 1'b1;
    if (req.arvalid && rsp.arready) begin
      checks++;
      if (int'(req.arlen) + 1 > MAXB || ((req.araddr & 32'hFFF) + (int'(req.arlen) + 1) * 8 > 32'h1000)) begin
        failures++; $display("bad burst at %h len %0d", req.araddr, req.arlen + 1);
      end
    end
    if (out_valid && out_ready) begin
      checks++;
      if (out_data != {32'hA5A5_0000, addr + 32'(got * 8)}) begin
        failures++; $display("word %0d = %h", got, out_data);
      end
      got++;
    end
    if (done) dones++;
  end

  task automatic run(input addr_t a, input int n, input bit pressure, output int cyc);
    int t;
    bp = pressure; got = 0; dones = 0;
    @(posedge clk); #1;
    addr = a; nwords = n; start = 1;
    @(posedge clk); #1 start = 0;
    t = 0;
    while (dones == 0) begin @(posedge clk); t++; end
    #1;
    checks++;
    if (got != n) begin failures++; $display("got %0d of %0d words", got, n); end
    repeat (3) @(posedge clk);
    checks++;
    if (dones != 1 || busy) begin failures++; $display("done pulsed %0d times", dones); end
    cyc = t;
  endtask

  initial begin
    int cyc;
    start = 0; addr = 0; nwords = 0; bp = 0;
    for (int i = 0; i < 4096; i++) mem.mem[i] = {32'hA5A5_0000, 32'(i * 8)};
    repeat (3) @(posedge clk);
    rst_n = 1;
    run(32'h0100, 40, 1'b1, cyc);
    run(32'h0FC0, 30, 1'b1, cyc);     // crosses 4 KiB after 8 words
    run(32'h2000, 1, 1'b0, cyc);
    run(32'h2000, 0, 1'b0, cyc);
    // rate without stalls from the memory: MAX_BURST words per burst plus the address
    mem_nostall();
    run(32'h3000, 64, 1'b0, cyc);
    checks++;
    if (cyc > 64 + 4 * (64 / MAXB) + 4) begin failures++; $display("64 words took %0d cycles", cyc); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic mem_nostall();
    force mem.r_go = 1'b1;
  endtask
endmodule

// Testbench of the AXI4 burst write engine: transfers of different lengths,
// one crossing a 4 KiB boundary, from a producer that pauses at random into a
// memory model that stalls at random. Checks the memory contents, that the
// words around the transfer are untouched, that no burst exceeds MAX_BURST or
// crosses 4 KiB, and that done comes once, after the last write response.
module tb_axi_wr_engine;
  import cnn_pkg::*;

  localparam int MAXB = 8;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic start, busy, done, in_valid, in_ready;
  addr_t addr;
  logic [31:0] nwords;
  data_t in_data;
  axi_req_t req;
  axi_rsp_t rsp;

  axi_wr_engine #(.MAX_BURST(MAXB)) dut (.clk, .rst_n, .start, .addr, .nwords, .busy, .done,
    .in_data, .in_valid, .in_ready, .axi_req(req), .axi_rsp(rsp));
  axi_mem_model #(.WORDS(4096)) mem (.clk, .rst_n, .req, .rsp);

  int checks = 0, failures = 0;
  int sent, dones, bursts_open;

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  assign in_data = {32'h5A5A_0000, 32'(sent)};
  always @(posedge clk) begin
    if (in_valid && in_ready) sent++;
    in_valid <= ($urandom % 4 != 0);
    if (req.awvalid && rsp.awready) begin
      checks++;
      if (int'(req.awlen) + 1 > MAXB || ((req.awaddr & 32'hFFF) + (int'(req.awlen) + 1) * 8 > 32'h1000)) begin
        failures++; $display("bad burst at %h len %0d", req.awaddr, req.awlen + 1);
      end
    end
    if (done) dones++;
  end

  task automatic run(input addr_t a, input int n);
    sent = 0; dones = 0;
    for (int i = -2; i < n + 2; i++) mem.mem[(a >> 3) + i] = 64'hFFFF_FFFF_FFFF_FFFF;
    @(posedge clk); #1;
    addr = a; nwords = n; start = 1;
    @(posedge clk); #1 start = 0;
    while (dones == 0) @(posedge clk);
    #1;
    checks++;
    if (mem.b_pend) begin failures++; $display("done before the write response"); end
    for (int i = 0; i < n; i++) begin
      checks++;
      if (mem.mem[(a >> 3) + i] != {32'h5A5A_0000, 32'(i)}) begin
        failures++; $display("word %0d = %h", i, mem.mem[(a >> 3) + i]);
      end
    end
    checks += 2;
    if (mem.mem[(a >> 3) - 1] != '1 || mem.mem[(a >> 3) + n] != '1) begin
      failures++; $display("write outside the transfer");
    end
    repeat (3) @(posedge clk);
    if (dones != 1 || busy) begin failures++; $display("done pulsed %0d times", dones); end
  endtask

  initial begin
    start = 0; addr = 0; nwords = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    run(32'h0100, 21);
    run(32'h0FE0, 13);     // crosses 4 KiB after 4 words
    run(32'h2008, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

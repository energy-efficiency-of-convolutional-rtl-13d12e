// Fully connected layer sizes of the reference evaluation.
//
// Runs the fully connected overlay on the layer shapes the reference
// measures: 256 -> 256, 1024 -> 36 and 8192 -> 12 inputs -> outputs, each
// with the fast configuration (P = 3, four AXI ports), and 256 -> 256 with
// the slow one (P = 1, two ports). The four layers run side by side, each
// on its own overlay and memory models, and every output is checked (see
// fc_layer_check). The slow layer must take longer than the fast layer of
// the same size, since it streams one weight row at a time instead of three.
module tb_fc_workloads;

  logic clk = 0, rst_n = 0, go = 0;
  always #5 clk = ~clk;

  localparam int NL = 4;
  logic fin [NL];
  int   chk [NL], fail [NL], cyc [NL];

  fc_layer_check #(.N_IN(256),  .N_OUT(256), .P(3), .SEED(1)) l0 (.clk, .rst_n, .go,
    .finished(fin[0]), .checks(chk[0]), .failures(fail[0]), .run_cycles(cyc[0]));
  fc_layer_check #(.N_IN(1024), .N_OUT(36),  .P(3), .SEED(2)) l1 (.clk, .rst_n, .go,
    .finished(fin[1]), .checks(chk[1]), .failures(fail[1]), .run_cycles(cyc[1]));
  fc_layer_check #(.N_IN(8192), .N_OUT(12),  .P(3), .SEED(3)) l2 (.clk, .rst_n, .go,
    .finished(fin[2]), .checks(chk[2]), .failures(fail[2]), .run_cycles(cyc[2]));
  fc_layer_check #(.N_IN(256),  .N_OUT(256), .P(1), .SEED(4)) l3 (.clk, .rst_n, .go,
    .finished(fin[3]), .checks(chk[3]), .failures(fail[3]), .run_cycles(cyc[3]));

  int checks = 0, failures = 0;

  task automatic report();
    checks = 0;
    failures = 0;
    for (int i = 0; i < NL; i++) begin
      checks   += chk[i];
      failures += fail[i];
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    report();
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    go = 1;
    wait (fin[0] && fin[1] && fin[2] && fin[3]);
    report();
    checks++;
    if (cyc[3] <= cyc[0]) begin
      failures++;
      $display("slow layer (%0d cycles) not slower than fast layer (%0d cycles)", cyc[3], cyc[0]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

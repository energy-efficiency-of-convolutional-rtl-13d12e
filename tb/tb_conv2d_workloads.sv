// Convolution configurations of the reference evaluation.
//
// Runs the convolution overlay, each configuration on its own instance and
// memory model and all side by side, on the shapes the reference measures:
//   - 3x3 and 7x7 kernels, 8-bit, overflow prevented (kernel-size sweep)
//   - 5x5 kernel with 16-, 4- and 1-bit data where input, kernel and output
//     share one type and overflow is allowed (bit-width sweep)
//   - 5x5 kernel, 8-bit, on a full 1024 x 1024 image (the tall image whose
//     latency the reference extrapolates from the 80-row runs)
// The sweeps use the full 1024-column width but only 6 rows: on-chip storage
// depends on the width, while more rows only repeat the same row-of-tiles
// sequence. Every output cell is checked (see conv_layer_check). The
// 1024 x 1024 run must take at least one cycle per tile, and at most the
// tile count plus memory traffic.
module tb_conv2d_workloads;

  logic clk = 0, rst_n = 0, go = 0;
  always #5 clk = ~clk;

  localparam int NL = 6;
  logic fin [NL];
  int   chk [NL], fail [NL], cyc [NL];

  conv_layer_check #(.K(3), .IN_W(8),  .OUT_W(8),  .PREVENT_OVF(1), .SEED(1)) l0 (.clk, .rst_n, .go,
    .finished(fin[0]), .checks(chk[0]), .failures(fail[0]), .run_cycles(cyc[0]));
  conv_layer_check #(.K(7), .IN_W(8),  .OUT_W(8),  .PREVENT_OVF(1), .SEED(2)) l1 (.clk, .rst_n, .go,
    .finished(fin[1]), .checks(chk[1]), .failures(fail[1]), .run_cycles(cyc[1]));
  conv_layer_check #(.K(5), .IN_W(16), .OUT_W(16), .PREVENT_OVF(0), .SEED(3)) l2 (.clk, .rst_n, .go,
    .finished(fin[2]), .checks(chk[2]), .failures(fail[2]), .run_cycles(cyc[2]));
  conv_layer_check #(.K(5), .IN_W(4),  .OUT_W(4),  .PREVENT_OVF(0), .SEED(4)) l3 (.clk, .rst_n, .go,
    .finished(fin[3]), .checks(chk[3]), .failures(fail[3]), .run_cycles(cyc[3]));
  conv_layer_check #(.K(5), .IN_W(1),  .OUT_W(1),  .PREVENT_OVF(0), .SEED(5)) l4 (.clk, .rst_n, .go,
    .finished(fin[4]), .checks(chk[4]), .failures(fail[4]), .run_cycles(cyc[4]));
  conv_layer_check #(.IMG_H(1024), .K(5), .IN_W(8), .OUT_W(8), .PREVENT_OVF(1), .SEED(6)) l5 (.clk, .rst_n, .go,
    .finished(fin[5]), .checks(chk[5]), .failures(fail[5]), .run_cycles(cyc[5]));

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
    repeat (2000000) @(posedge clk);
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
    wait (fin[0] && fin[1] && fin[2] && fin[3] && fin[4] && fin[5]);
    report();
    checks++;
    if (cyc[5] < 512 * 512) begin
      failures++;
      $display("1024 x 1024 run faster than one tile per cycle: %0d cycles", cyc[5]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

// Pooling configurations of the reference evaluation.
//
// Runs the pooling overlay, each configuration on its own instance and memory
// model and all side by side, over the three sweeps the reference measures,
// with max and average pooling for each point:
//   - 2-, 4- and 16-bit data, 5x5 window, stride 1x1 (bit-width sweep)
//   - 3x3, 7x7 and 9x9 windows, 8-bit, stride 1x1 (window sweep)
//   - strides 2x1, 2x2, 2x4 and 4x4 (rows x columns), 5x5 window, 8-bit
// The 8-bit 5x5 stride-1 point is the full-size run of the top-level
// testbench. Images use the full 1024-column width and 17 rows, enough for
// several output rows at every window and stride. Every output is checked
// (see pool_layer_check).
module tb_pool2d_workloads;
  import cnn_pkg::*;

  logic clk = 0, rst_n = 0, go = 0;
  always #5 clk = ~clk;

  localparam int NL = 20;
  localparam int H  = 17;
  logic fin [NL];
  int   chk [NL], fail [NL], cyc [NL];

  // one configuration as a max and an average instance
  for (genvar m = 0; m < 2; m++) begin : g_mode
    localparam pool_mode_e MD = m ? POOL_AVG : POOL_MAX;
    pool_layer_check #(.IMG_H(H), .W(2),  .MODE(MD), .SEED(1 + m)) b2 (.clk, .rst_n, .go,
      .finished(fin[10*m+0]), .checks(chk[10*m+0]), .failures(fail[10*m+0]), .run_cycles(cyc[10*m+0]));
    pool_layer_check #(.IMG_H(H), .W(4),  .MODE(MD), .SEED(3 + m)) b4 (.clk, .rst_n, .go,
      .finished(fin[10*m+1]), .checks(chk[10*m+1]), .failures(fail[10*m+1]), .run_cycles(cyc[10*m+1]));
    pool_layer_check #(.IMG_H(H), .W(16), .MODE(MD), .SEED(5 + m)) b16 (.clk, .rst_n, .go,
      .finished(fin[10*m+2]), .checks(chk[10*m+2]), .failures(fail[10*m+2]), .run_cycles(cyc[10*m+2]));
    pool_layer_check #(.IMG_H(H), .PH(3), .PW(3), .MODE(MD), .SEED(7 + m)) w3 (.clk, .rst_n, .go,
      .finished(fin[10*m+3]), .checks(chk[10*m+3]), .failures(fail[10*m+3]), .run_cycles(cyc[10*m+3]));
    pool_layer_check #(.IMG_H(H), .PH(7), .PW(7), .MODE(MD), .SEED(9 + m)) w7 (.clk, .rst_n, .go,
      .finished(fin[10*m+4]), .checks(chk[10*m+4]), .failures(fail[10*m+4]), .run_cycles(cyc[10*m+4]));
    pool_layer_check #(.IMG_H(H), .PH(9), .PW(9), .MODE(MD), .SEED(11 + m)) w9 (.clk, .rst_n, .go,
      .finished(fin[10*m+5]), .checks(chk[10*m+5]), .failures(fail[10*m+5]), .run_cycles(cyc[10*m+5]));
    pool_layer_check #(.IMG_H(H), .SH(2), .SW(1), .MODE(MD), .SEED(13 + m)) s21 (.clk, .rst_n, .go,
      .finished(fin[10*m+6]), .checks(chk[10*m+6]), .failures(fail[10*m+6]), .run_cycles(cyc[10*m+6]));
    pool_layer_check #(.IMG_H(H), .SH(2), .SW(2), .MODE(MD), .SEED(15 + m)) s22 (.clk, .rst_n, .go,
      .finished(fin[10*m+7]), .checks(chk[10*m+7]), .failures(fail[10*m+7]), .run_cycles(cyc[10*m+7]));
    pool_layer_check #(.IMG_H(H), .SH(2), .SW(4), .MODE(MD), .SEED(17 + m)) s24 (.clk, .rst_n, .go,
      .finished(fin[10*m+8]), .checks(chk[10*m+8]), .failures(fail[10*m+8]), .run_cycles(cyc[10*m+8]));
    pool_layer_check #(.IMG_H(H), .SH(4), .SW(4), .MODE(MD), .SEED(19 + m)) s44 (.clk, .rst_n, .go,
      .finished(fin[10*m+9]), .checks(chk[10*m+9]), .failures(fail[10*m+9]), .run_cycles(cyc[10*m+9]));
  end

  int checks = 0, failures = 0;

  task automatic report();
    checks = 0;
    failures = 0;
    for (int i = 0; i < NL; i++) begin
      checks   += chk[i];
      failures += fail[i];
    end
  endtask

  function automatic bit all_finished();
    for (int i = 0; i < NL; i++) if (!fin[i]) return 1'b0;
    return 1'b1;
  endfunction

  initial begin
    repeat (500000) @(posedge clk);
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
    do @(posedge clk); while (!all_finished());
    report();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

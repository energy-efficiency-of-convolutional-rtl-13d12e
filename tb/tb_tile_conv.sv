// Testbench of the tile convolution unit at its default 2x2 tile and 5x5
// kernel: random signed tiles and kernels, including the extreme values, and
// every cell of the 6x6 result compared with the sum worked out here.
module tb_tile_conv;
  localparam int TH = 2, TW = 2, KH = 5, KW = 5, IN_W = 8, K_W = 8;
  localparam int ACC_W = IN_W + K_W + $clog2(KH * KW);

  logic signed [IN_W-1:0]  tile [TH][TW];
  logic signed [K_W-1:0]   kern [KH][KW];
  logic signed [ACC_W-1:0] part [TH+KH-1][TW+KW-1];

  tile_conv dut (.tile, .kern, .part);

  int checks = 0, failures = 0;

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int it = 0; it < 200; it++) begin
      for (int ty = 0; ty < TH; ty++)
        for (int tx = 0; tx < TW; tx++)
          tile[ty][tx] = (it == 0) ? -128 : (it == 1) ? 127 : IN_W'($urandom);
      for (int n = 0; n < KH; n++)
        for (int m = 0; m < KW; m++)
          kern[n][m] = (it == 0) ? -128 : (it == 1) ? -128 : K_W'($urandom);
      #1;
      for (int y = 0; y < TH + KH - 1; y++)
        for (int x = 0; x < TW + KW - 1; x++) begin
          int s;
          s = 0;
          for (int ty = 0; ty < TH; ty++)
            for (int tx = 0; tx < TW; tx++)
              if (y - ty >= 0 && y - ty < KH && x - tx >= 0 && x - tx < KW)
                s += int'(tile[ty][tx]) * int'(kern[y-ty][x-tx]);
          checks++;
          if (int'(part[y][x]) != s) begin
            failures++;
            if (failures < 10) $display("part[%0d][%0d] = %0d, expected %0d", y, x, part[y][x], s);
          end
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

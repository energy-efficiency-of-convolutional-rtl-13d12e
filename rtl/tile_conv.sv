// Tile convolution unit: the compute core of the 2D convolution overlay.
//
// Convolves one TH x TW tile of the input tensor with the whole KH x KW kernel
// filter, fully unrolled, giving the complete (TH+KH-1) x (TW+KW-1) result of
// the tile as if it were zero padded by K-1 on every side:
//   part[y][x] = sum over ty,tx of tile[ty][tx] * kern[y-ty][x-tx]
// which is eq. (2.1) of true convolution restricted to one tile. Neighbouring
// tiles' results overlap and are summed by the surrounding overlay. All
// TH*TW*KH*KW multiplications happen at once, so one tile is done per call,
// as in the document, which sizes the tile so that this full unroll stays
// affordable. Operands are signed. The default ACC_W,
// IN_W + K_W + clog2(KH*KW), holds the complete sum of an output cell, so
// nothing overflows; a smaller ACC_W wraps, which is the document's
// "overflow allowed" variant.
//
// Purely combinational; the overlay registers around it.
module tile_conv #(
  parameter int unsigned TH    = 2,
  parameter int unsigned TW    = 2,
  parameter int unsigned KH    = 5,
  parameter int unsigned KW    = 5,
  parameter int unsigned IN_W  = 8,
  parameter int unsigned K_W   = 8,
  parameter int unsigned ACC_W = IN_W + K_W + $clog2(KH * KW)
) (
  input  logic signed [IN_W-1:0]  tile [TH][TW],
  input  logic signed [K_W-1:0]   kern [KH][KW],
  output logic signed [ACC_W-1:0] part [TH+KH-1][TW+KW-1]
);

  localparam int unsigned PW = IN_W + K_W;   // exact product width

  always_comb begin
    for (int y = 0; y < TH + KH - 1; y++)
      for (int x = 0; x < TW + KW - 1; x++) begin
        part[y][x] = '0;
        for (int ty = 0; ty < TH; ty++)
          for (int tx = 0; tx < TW; tx++)
            if (y - ty >= 0 && y - ty < KH && x - tx >= 0 && x - tx < KW)
              part[y][x] = part[y][x] + ACC_W'(PW'(tile[ty][tx]) * PW'(kern[y-ty][x-tx]));
      end
  end

endmodule

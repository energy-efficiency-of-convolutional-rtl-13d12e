// 2D convolution overlay.
//
// Computes the full 2D convolution (eq. 2.1, stride 1, zero padding K-1 on
// every side) of an IMG_H x IMG_W input tensor with a KH x KW kernel filter,
// giving an (IMG_H+KH-1) x (IMG_W+KW-1) output feature map. The host passes
// three byte addresses through the AXI4-Lite slave (address register 0: input
// tensor, 1: kernel filter, 2: output feature map) and starts the run; the
// overlay reads and writes host memory through one AXI4 master port shared by
// all three tensors, reading on the read channels while writing on the write
// channels.
//
// How it works. The input is cut into TH x TW tiles processed left to right,
// one row of tiles after another. Each tile is convolved with the whole kernel
// in one cycle (tile_conv). Its (TH+KH-1) x (TW+KW-1) result overlaps its
// neighbours: the KW-1 columns on its right are carried in registers into the
// next tile of the row, and the KH-1 rows below it go to the Row Memory, which
// holds partial sums for the next row of tiles across the whole image width.
// What remains in the top-left TH x TW corner (or, for the last tile of a row,
// the whole top TH rows) is final and goes to the output buffer. After the last
// row of tiles, the Row Memory itself holds the last KH-1 output rows and is
// flushed to memory.
//
// A row of tiles runs through five stages as in the document:
//   Buffering Inputs   burst-reads the TH input rows into an input bank
//   Initializations    takes one tile and its Row Memory band into registers
//   Tile Convolution   convolves, adds the carry and Row Memory partial sums
//   Storing Results    writes final cells to the output bank, the rest to Row Memory
//   Buffering Outputs  burst-writes the TH finished output rows
// Input and output banks are double buffered, so reading row of tiles r+1 and
// writing row r overlap the computation of row r. The middle three stages
// take one tile per cycle (initiation interval 1, the document's 2x2-tile
// design); they drain for three cycles between rows of tiles so that the Row
// Memory is never read before it is written.
//
// Data layout in host memory (this design's choice): elements are signed and
// packed AXI_DW/width per 64-bit word, lowest element in the lowest bits; every
// tensor row starts on a new word. The kernel is stored row-major as one packed
// vector. The results are quantized by truncation: the top OUT_W bits of the
// ACC_W-bit sum are kept (OUT_SHIFT = ACC_W - OUT_W), so with PREVENT_OVF=1
// nothing overflows. With PREVENT_OVF=0 the sums wrap at OUT_W bits and are
// stored unshifted, the document's variant where all data share one type.
// Image sizes that are not a multiple of the tile size are handled by zero
// padding the last tiles.
module conv2d
  import cnn_pkg::*;
#(
  parameter int unsigned IMG_W       = 1024,
  parameter int unsigned IMG_H       = 80,
  parameter int unsigned KH          = 5,
  parameter int unsigned KW          = 5,
  parameter int unsigned TH          = 2,
  parameter int unsigned TW          = 2,
  parameter int unsigned IN_W        = 8,
  parameter int unsigned K_W         = 8,
  parameter int unsigned OUT_W       = 8,
  parameter bit          PREVENT_OVF = 1'b1,
  parameter int unsigned MAX_BURST   = 256
) (
  input  logic      clk,
  input  logic      rst_n,
  input  axil_req_t s_axil_req,
  output axil_rsp_t s_axil_rsp,
  output axi_req_t  m_axi_req,
  input  axi_rsp_t  m_axi_rsp,
  output logic      busy,
  output logic      done          // one-cycle pulse when the output is in memory
);

  // ---------------------------------------------------------------- sizes
  localparam int unsigned ACC_W     = PREVENT_OVF ? IN_W + K_W + $clog2(KH * KW) : OUT_W;
  localparam int unsigned OUT_SHIFT = ACC_W - OUT_W;
  localparam int unsigned NTC       = (IMG_W + TW - 1) / TW;   // tiles per row of tiles
  localparam int unsigned NTR       = (IMG_H + TH - 1) / TH;   // rows of tiles
  localparam int unsigned WP        = NTC * TW;                // padded input width
  localparam int unsigned OW        = IMG_W + KW - 1;          // output width
  localparam int unsigned OH        = IMG_H + KH - 1;          // output height
  localparam int unsigned OWP       = WP + KW - 1;             // padded output width
  localparam int unsigned EPI       = AXI_DW / IN_W;           // elements per word
  localparam int unsigned EPK       = AXI_DW / K_W;
  localparam int unsigned EPO       = AXI_DW / OUT_W;
  localparam int unsigned IN_PITCH  = (IMG_W + EPI - 1) / EPI; // words per row
  localparam int unsigned OUT_PITCH = (OW + EPO - 1) / EPO;
  localparam int unsigned KWORDS    = (KH * KW + EPK - 1) / EPK;
  localparam int unsigned RMR       = KH - 1;                  // Row Memory rows
  localparam int unsigned OBR       = (TH > RMR) ? TH : RMR;   // output bank rows
  localparam int unsigned LH        = TH + KH - 1;             // tile result height
  localparam int unsigned LW        = TW + KW - 1;             // tile result width

  typedef logic signed [ACC_W-1:0] acc_t;

  // ---------------------------------------------------------------- control slave
  logic  start;
  addr_t addrs [3];
  axil_ctrl #(.NADDR(3)) u_ctrl (
    .clk, .rst_n, .s_req(s_axil_req), .s_rsp(s_axil_rsp),
    .start, .busy, .done, .addrs
  );

  // ---------------------------------------------------------------- AXI engines
  axi_req_t rd_req, wr_req;
  logic     rd_start, rd_done, rd_busy_unused, rd_valid;
  addr_t    rd_addr;
  logic [31:0] rd_nwords;
  data_t    rd_data;
  logic     wr_start, wr_done, wr_busy_unused, wr_valid, wr_ready;
  addr_t    wr_addr;
  logic [31:0] wr_nwords;
  data_t    wr_data;

  axi_rd_engine #(.MAX_BURST(MAX_BURST)) u_rd (
    .clk, .rst_n, .start(rd_start), .addr(rd_addr), .nwords(rd_nwords),
    .busy(rd_busy_unused), .done(rd_done), .out_data(rd_data), .out_valid(rd_valid),
    .out_ready(1'b1), .axi_req(rd_req), .axi_rsp(m_axi_rsp)
  );
  axi_wr_engine #(.MAX_BURST(MAX_BURST)) u_wr (
    .clk, .rst_n, .start(wr_start), .addr(wr_addr), .nwords(wr_nwords),
    .busy(wr_busy_unused), .done(wr_done), .in_data(wr_data), .in_valid(wr_valid),
    .in_ready(wr_ready), .axi_req(wr_req), .axi_rsp(m_axi_rsp)
  );
  assign m_axi_req = rd_req | wr_req;   // the engines drive disjoint channels

  // ---------------------------------------------------------------- storage
  logic signed [K_W-1:0]  kern [KH][KW];          // kernel filter (LUTRAM)
  logic signed [IN_W-1:0] ibuf [2][TH][WP];       // input banks
  acc_t                   rmem [RMR][OWP];        // Row Memory (BRAM)
  logic [OUT_W-1:0]       obuf [2][OBR][OWP];     // output FM banks
  acc_t                   carry [LH][KW-1];       // overlap to the next tile
  logic [1:0]             in_full, out_full;

  function automatic logic [OUT_W-1:0] quant(acc_t a);
    return OUT_W'(a >>> OUT_SHIFT);
  endfunction

  // ================================================================ Buffering Inputs
  typedef enum logic [1:0] {R_IDLE, R_KERN, R_WAIT, R_ROWS} rstate_e;
  rstate_e     rstate;
  int unsigned r_tr;          // row of tiles being loaded
  int unsigned r_row, r_wc;   // row inside the bank, word inside the row
  logic        r_bank;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rstate    <= R_IDLE;
      r_tr      <= 0;
      r_row     <= 0;
      r_wc      <= 0;
      r_bank    <= 1'b0;
      rd_start  <= 1'b0;
      rd_addr   <= '0;
      rd_nwords <= '0;
      for (int i = 0; i < KH; i++)
        for (int j = 0; j < KW; j++) kern[i][j] <= '0;
    end else begin
      rd_start <= 1'b0;
      unique case (rstate)
        R_IDLE: if (start) begin
          rstate    <= R_KERN;
          rd_start  <= 1'b1;
          rd_addr   <= addrs[1];
          rd_nwords <= KWORDS;
          r_wc      <= 0;
          r_tr      <= 0;
        end
        R_KERN: if (rd_done) rstate <= R_WAIT;
        R_WAIT: begin
          if (r_tr == NTR) rstate <= R_IDLE;
          else if (!in_full[r_tr[0]] && !rd_start) begin
            rstate    <= R_ROWS;
            rd_start  <= 1'b1;
            rd_addr   <= addrs[0] + addr_t'(r_tr * TH * IN_PITCH * AXI_BPW);
            rd_nwords <= ((r_tr * TH + TH <= IMG_H) ? TH : IMG_H - r_tr * TH) * IN_PITCH;
            r_bank    <= r_tr[0];
            r_row     <= 0;
            r_wc      <= 0;
          end
        end
        R_ROWS: if (rd_done) begin
          r_tr   <= r_tr + 1;
          rstate <= R_WAIT;
        end
        default: rstate <= R_IDLE;
      endcase

      // unpack arriving words
      if (rd_valid) begin
        if (rstate == R_KERN) begin
          for (int l = 0; l < EPK; l++)
            if (r_wc * EPK + l < KH * KW)
              kern[(r_wc*EPK+l)/KW][(r_wc*EPK+l)%KW] <= rd_data[l*K_W +: K_W];
          r_wc <= r_wc + 1;
        end else begin
          for (int l = 0; l < EPI; l++)
            if (r_wc * EPI + l < WP)
              ibuf[r_bank][r_row][r_wc*EPI+l] <= rd_data[l*IN_W +: IN_W];
          if (r_wc == IN_PITCH - 1) begin
            r_wc  <= 0;
            r_row <= r_row + 1;
          end else begin
            r_wc <= r_wc + 1;
          end
        end
      end
    end
  end

  // ================================================================ compute stages
  typedef enum logic [1:0] {C_IDLE, C_RUN, C_DRAIN, C_FLUSH} cstate_e;
  cstate_e     cstate;
  int unsigned c_tr, c_tc, c_fr;

  // stage 1: Initializations
  logic                   s1_valid, s1_last, s1_bank, s1_first_row;
  int unsigned            s1_tc;
  logic signed [IN_W-1:0] s1_tile [TH][TW];
  acc_t                   s1_rm   [RMR][LW];
  // stage 2: Tile Convolution
  logic                   s2_valid, s2_last, s2_bank;
  int unsigned            s2_tc;
  acc_t                   s2_l    [LH][LW];
  // tile result
  acc_t                   part    [LH][LW];
  acc_t                   l_sum   [LH][LW];

  tile_conv #(
    .TH(TH), .TW(TW), .KH(KH), .KW(KW), .IN_W(IN_W), .K_W(K_W), .ACC_W(ACC_W)
  ) u_tile (.tile(s1_tile), .kern(kern), .part(part));

  // band of columns a tile finalises: TW, or all LW for the last tile in a row
  function automatic logic in_band(int unsigned j, logic last);
    return (j < TW) || last;
  endfunction

  always_comb begin
    for (int y = 0; y < LH; y++)
      for (int x = 0; x < LW; x++) begin
        l_sum[y][x] = part[y][x];
        if (x < KW - 1 && s1_tc != 0) l_sum[y][x] = l_sum[y][x] + carry[y][x];
        if (y < RMR && !s1_first_row && in_band(x, s1_last))
          l_sum[y][x] = l_sum[y][x] + s1_rm[y][x];
      end
  end

  logic        s3_valid, s3_last, s3_bank;       // stage 3: Storing Results
  logic        o_bank, o_done_bank_valid;        // output side, see below

  logic issue;   // a tile enters stage 1 this cycle
  assign issue = (cstate == C_RUN);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cstate       <= C_IDLE;
      c_tr         <= 0;
      c_tc         <= 0;
      c_fr         <= 0;
      in_full      <= '0;
      out_full     <= '0;
      s1_valid     <= 1'b0;
      s1_last      <= 1'b0;
      s1_bank      <= 1'b0;
      s1_first_row <= 1'b0;
      s1_tc        <= 0;
      s2_valid     <= 1'b0;
      s2_last      <= 1'b0;
      s2_bank      <= 1'b0;
      s2_tc        <= 0;
      for (int y = 0; y < LH; y++)
        for (int j = 0; j < KW - 1; j++) carry[y][j] <= '0;
      for (int ty = 0; ty < TH; ty++)
        for (int tx = 0; tx < TW; tx++) s1_tile[ty][tx] <= '0;
      for (int y = 0; y < RMR; y++)
        for (int x = 0; x < LW; x++) s1_rm[y][x] <= '0;
      for (int y = 0; y < LH; y++)
        for (int x = 0; x < LW; x++) s2_l[y][x] <= '0;
    end else begin
      // bank status set by the input side, cleared by the output side
      if (rstate == R_ROWS && rd_done) in_full[r_bank] <= 1'b1;

      unique case (cstate)
        C_IDLE: if (start) begin
          c_tr   <= 0;
          c_tc   <= 0;
          cstate <= C_DRAIN;
        end
        C_RUN: begin
          c_tc <= c_tc + 1;
          if (c_tc == NTC - 1) begin
            in_full[c_tr[0]] <= 1'b0;
            c_tc             <= 0;
            c_tr             <= c_tr + 1;
            cstate           <= C_DRAIN;
          end
        end
        C_DRAIN: if (!s1_valid && !s2_valid && !s3_valid) begin
          if (c_tr == NTR) begin
            if (!out_full[c_tr[0]]) begin
              cstate <= C_FLUSH;
              c_fr   <= 0;
            end
          end else if (c_tr < NTR && in_full[c_tr[0]] && !out_full[c_tr[0]]) begin
            cstate <= C_RUN;
          end
        end
        C_FLUSH: begin
          // one Row Memory row per cycle is copied to the output bank below
          c_fr <= c_fr + 1;
          if (c_fr == RMR - 1) begin
            out_full[c_tr[0]] <= 1'b1;
            cstate            <= C_IDLE;
          end
        end
        default: cstate <= C_IDLE;
      endcase

      // stage 1: fetch the tile and the Row Memory band
      s1_valid <= issue;
      if (issue) begin
        s1_tc        <= c_tc;
        s1_last      <= (c_tc == NTC - 1);
        s1_bank      <= c_tr[0];
        s1_first_row <= (c_tr == 0);
        for (int ty = 0; ty < TH; ty++)
          for (int tx = 0; tx < TW; tx++)
            s1_tile[ty][tx] <= (c_tr * TH + ty < IMG_H && c_tc * TW + tx < IMG_W)
                               ? ibuf[c_tr[0]][ty][c_tc*TW+tx] : '0;
        for (int y = 0; y < RMR; y++)
          for (int x = 0; x < LW; x++)
            s1_rm[y][x] <= rmem[y][c_tc*TW+x];
      end

      // stage 2: convolve and merge, pass the overlap on to the next tile
      s2_valid <= s1_valid;
      if (s1_valid) begin
        s2_tc   <= s1_tc;
        s2_last <= s1_last;
        s2_bank <= s1_bank;
        s2_l    <= l_sum;
        for (int y = 0; y < LH; y++)
          for (int j = 0; j < KW - 1; j++) carry[y][j] <= l_sum[y][TW+j];
      end

      // stage 3: Storing Results
      if (s3_valid && s3_last) out_full[s3_bank] <= 1'b1;
      if (o_done_bank_valid) out_full[o_bank] <= 1'b0;
    end
  end

  // Storing Results, and the final flush of the Row Memory; kept apart so that
  // each memory is written by one process
  assign s3_valid = s2_valid;
  assign s3_last  = s2_last;
  assign s3_bank  = s2_bank;

  always_ff @(posedge clk) begin
    if (s2_valid) begin
      for (int y = 0; y < LH; y++)
        for (int x = 0; x < LW; x++)
          if (in_band(x, s2_last)) begin
            if (y < TH) obuf[s2_bank][y][s2_tc*TW+x] <= quant(s2_l[y][x]);
            else        rmem[y-TH][s2_tc*TW+x]       <= s2_l[y][x];
          end
    end
    if (cstate == C_FLUSH)
      for (int x = 0; x < OWP; x++)
        obuf[c_tr[0]][c_fr][x] <= quant(rmem[c_fr][x]);
  end

  // ================================================================ Buffering Outputs
  typedef enum logic [1:0] {W_IDLE, W_WAIT, W_ROWS} wstate_e;
  wstate_e     wstate;
  int unsigned o_tr, o_row, o_wc;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wstate    <= W_IDLE;
      o_tr      <= 0;
      o_row     <= 0;
      o_wc      <= 0;
      o_bank    <= 1'b0;
      wr_start  <= 1'b0;
      wr_addr   <= '0;
      wr_nwords <= '0;
      done      <= 1'b0;
    end else begin
      wr_start <= 1'b0;
      done     <= 1'b0;
      unique case (wstate)
        W_IDLE: if (start) begin
          wstate <= W_WAIT;
          o_tr   <= 0;
        end
        W_WAIT: if (out_full[o_tr[0]] && !o_done_bank_valid) begin
          wstate    <= W_ROWS;
          o_bank    <= o_tr[0];
          o_row     <= 0;
          o_wc      <= 0;
          wr_start  <= 1'b1;
          wr_addr   <= addrs[2] + addr_t'(o_tr * TH * OUT_PITCH * AXI_BPW);
          wr_nwords <= (o_tr * TH >= OH) ? 0 :
                       (((o_tr == NTR) ? RMR : TH) <= OH - o_tr * TH ?
                        ((o_tr == NTR) ? RMR : TH) : OH - o_tr * TH) * OUT_PITCH;
        end
        W_ROWS: begin
          if (wr_valid && wr_ready) begin
            if (o_wc == OUT_PITCH - 1) begin
              o_wc  <= 0;
              o_row <= o_row + 1;
            end else begin
              o_wc <= o_wc + 1;
            end
          end
          if (wr_done) begin
            o_tr <= o_tr + 1;
            if (o_tr == NTR) begin
              wstate <= W_IDLE;
              done   <= 1'b1;
            end else begin
              wstate <= W_WAIT;
            end
          end
        end
        default: wstate <= W_IDLE;
      endcase
    end
  end

  assign o_done_bank_valid = (wstate == W_ROWS) && wr_done;
  assign wr_valid          = (wstate == W_ROWS) && !wr_start;

  always_comb begin
    wr_data = '0;
    for (int l = 0; l < EPO; l++)
      if (o_wc * EPO + l < OW)
        wr_data[l*OUT_W +: OUT_W] = obuf[o_bank][o_row][o_wc*EPO+l];
  end

  assign busy = (rstate != R_IDLE) || (cstate != C_IDLE) || (wstate != W_IDLE);

endmodule

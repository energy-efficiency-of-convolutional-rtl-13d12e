// 2D pooling overlay (max or average).
//
// Pools an IMG_H x IMG_W input tensor with a PH x PW window and stride SH x SW,
// without padding, giving ((IMG_H-PH)/SH+1) x ((IMG_W-PW)/SW+1) outputs. MODE
// selects max or average pooling before synthesis, as in the document, where
// the two differ only in the calculation stage. The host passes two byte
// addresses through the AXI4-Lite slave (address register 0: input tensor,
// 1: output tensor) and starts the run; one AXI4 master port carries both.
//
// How it works. The design is output oriented: each cycle it computes a tile
// of TPO horizontally neighbouring outputs, reading every input cell each of
// them needs at once. The input rows that are still needed sit in the Input
// Memory, a ring of PH+SH rows: while output row y is computed from rows
// y*SH .. y*SH+PH-1, the SH rows that output row y+1 needs next are fetched
// into the spare slots with long bursts, so the memory is updated constantly
// and every input cell is read from host memory once. Finished output rows go
// to a double-buffered output buffer and are written back with bursts while
// the next row is computed. The document's Initializations stage (moving a
// window of cells into registers) is folded into the Tile Pooling cycle here:
// the window is read straight from the Input Memory.
//
// Average pooling divides the window sum by PH*PW, rounding toward zero as
// integer division in C does. The pooled value has the input's width; it is
// sign extended to a wider OUT_W or truncated to the top OUT_W bits of a
// narrower one. Data layout in host memory (this design's choice): signed
// elements packed AXI_DW/width per word, lowest element in the lowest bits,
// every row starting on a new word.
module pool2d
  import cnn_pkg::*;
#(
  parameter int unsigned IMG_W     = 1024,
  parameter int unsigned IMG_H     = 80,
  parameter int unsigned PH        = 5,
  parameter int unsigned PW        = 5,
  parameter int unsigned SH        = 1,
  parameter int unsigned SW        = 1,
  parameter int unsigned IN_W      = 8,
  parameter int unsigned OUT_W     = 8,
  parameter pool_mode_e  MODE      = POOL_MAX,
  parameter int unsigned TPO       = 2,
  parameter int unsigned MAX_BURST = 256
) (
  input  logic      clk,
  input  logic      rst_n,
  input  axil_req_t s_axil_req,
  output axil_rsp_t s_axil_rsp,
  output axi_req_t  m_axi_req,
  input  axi_rsp_t  m_axi_rsp,
  output logic      busy,
  output logic      done
);

  localparam int unsigned OH        = (IMG_H - PH) / SH + 1;
  localparam int unsigned OW        = (IMG_W - PW) / SW + 1;
  localparam int unsigned NR        = PH + SH;                  // Input Memory rows
  localparam int unsigned EPI       = AXI_DW / IN_W;
  localparam int unsigned EPO       = AXI_DW / OUT_W;
  localparam int unsigned IN_PITCH  = (IMG_W + EPI - 1) / EPI;
  localparam int unsigned OUT_PITCH = (OW + EPO - 1) / EPO;
  localparam int unsigned OWP       = ((OW + TPO - 1) / TPO) * TPO;
  localparam int unsigned SUM_W     = IN_W + $clog2(PH * PW + 1);

  typedef logic signed [IN_W-1:0]  in_t;
  typedef logic signed [SUM_W-1:0] sum_t;

  // ---------------------------------------------------------------- control
  logic  start;
  addr_t addrs [2];
  axil_ctrl #(.NADDR(2)) u_ctrl (
    .clk, .rst_n, .s_req(s_axil_req), .s_rsp(s_axil_rsp),
    .start, .busy, .done, .addrs
  );

  // ---------------------------------------------------------------- AXI engines
  axi_req_t    rd_req, wr_req;
  logic        rd_start, rd_done, rd_valid, rd_busy_unused;
  addr_t       rd_addr;
  data_t       rd_data;
  logic        wr_start, wr_done, wr_valid, wr_ready, wr_busy_unused;
  addr_t       wr_addr;
  data_t       wr_data;

  axi_rd_engine #(.MAX_BURST(MAX_BURST)) u_rd (
    .clk, .rst_n, .start(rd_start), .addr(rd_addr), .nwords(IN_PITCH),
    .busy(rd_busy_unused), .done(rd_done), .out_data(rd_data), .out_valid(rd_valid),
    .out_ready(1'b1), .axi_req(rd_req), .axi_rsp(m_axi_rsp)
  );
  axi_wr_engine #(.MAX_BURST(MAX_BURST)) u_wr (
    .clk, .rst_n, .start(wr_start), .addr(wr_addr), .nwords(OUT_PITCH),
    .busy(wr_busy_unused), .done(wr_done), .in_data(wr_data), .in_valid(wr_valid),
    .in_ready(wr_ready), .axi_req(wr_req), .axi_rsp(m_axi_rsp)
  );
  assign m_axi_req = rd_req | wr_req;

  // ---------------------------------------------------------------- storage
  in_t              imem [NR][IMG_W];     // Input Memory (ring of rows)
  logic [OUT_W-1:0] obuf [2][OWP];        // output rows, double buffered
  logic [1:0]       out_full;

  logic        run;                      // a run is in progress
  int unsigned c_y;                      // output row being computed
  int unsigned c_slot;                   // ring slot of input row c_y*SH

  // ================================================================ input fetch
  int unsigned r_row;                    // next input row to fetch
  int unsigned r_slot;                   // its ring slot
  int unsigned r_wc;
  logic        r_busy;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      r_row    <= 0;
      r_slot   <= 0;
      r_wc     <= 0;
      r_busy   <= 1'b0;
      rd_start <= 1'b0;
      rd_addr  <= '0;
    end else begin
      rd_start <= 1'b0;
      if (start) begin
        r_row  <= 0;
        r_slot <= 0;
        r_busy <= 1'b0;
      end else if (run && !r_busy && r_row < IMG_H && r_row < c_y * SH + NR) begin
        // the slot of r_row held row r_row-NR, which output row c_y no longer needs
        r_busy   <= 1'b1;
        rd_start <= 1'b1;
        rd_addr  <= addrs[0] + addr_t'(r_row * IN_PITCH * AXI_BPW);
        r_wc     <= 0;
      end else if (r_busy && rd_done) begin
        r_busy <= 1'b0;
        r_row  <= r_row + 1;
        r_slot <= (r_slot == NR - 1) ? 0 : r_slot + 1;
      end
      if (rd_valid) begin
        r_wc <= r_wc + 1;
        for (int l = 0; l < EPI; l++)
          if (r_wc * EPI + l < IMG_W) imem[r_slot][r_wc*EPI+l] <= rd_data[l*IN_W +: IN_W];
      end
    end
  end

  // ================================================================ Tile Pooling
  int unsigned      c_x;                 // first output column of the tile
  logic             c_go;
  logic [OUT_W-1:0] pooled [TPO];

  assign c_go = run && c_y < OH && r_row >= c_y * SH + PH && !out_full[c_y[0]];

  always_comb begin
    for (int t = 0; t < TPO; t++) begin
      in_t  mx;
      sum_t sm;
      in_t  res;
      mx = {1'b1, {(IN_W-1){1'b0}}};     // most negative value
      sm = '0;
      for (int i = 0; i < PH; i++)
        for (int j = 0; j < PW; j++) begin
          in_t v;
          int unsigned slot, col;
          slot = c_slot + i;
          if (slot >= NR) slot = slot - NR;
          col = (c_x + t) * SW + j;
          v = (col < IMG_W) ? imem[slot][col] : '0;
          if (v > mx) mx = v;
          sm = sm + sum_t'(v);
        end
      if (MODE == POOL_MAX) res = mx;
      else                  res = IN_W'(sm / $signed(SUM_W'(PH * PW)));
      if (OUT_W >= IN_W) pooled[t] = OUT_W'(res);
      else               pooled[t] = OUT_W'(res >>> (IN_W - OUT_W));
    end
  end

  logic o_clear;                         // writer released a bank this cycle
  logic o_bank;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      run      <= 1'b0;
      c_y      <= 0;
      c_x      <= 0;
      c_slot   <= 0;
      out_full <= '0;
    end else begin
      if (start) begin
        run      <= 1'b1;
        c_y      <= 0;
        c_x      <= 0;
        c_slot   <= 0;
        out_full <= '0;
      end else begin
        if (done) run <= 1'b0;
        if (c_go) begin
          if (c_x + TPO >= OW) begin
            c_x              <= 0;
            c_y              <= c_y + 1;
            c_slot           <= (c_slot + SH >= NR) ? c_slot + SH - NR : c_slot + SH;
            out_full[c_y[0]] <= 1'b1;
          end else begin
            c_x <= c_x + TPO;
          end
        end
        if (o_clear) out_full[o_bank] <= 1'b0;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (c_go)
      for (int t = 0; t < TPO; t++) obuf[c_y[0]][c_x+t] <= pooled[t];
  end

  // ================================================================ output write-back
  int unsigned o_y, o_wc;
  logic        o_busy;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      o_y      <= 0;
      o_wc     <= 0;
      o_busy   <= 1'b0;
      o_bank   <= 1'b0;
      wr_start <= 1'b0;
      wr_addr  <= '0;
      done     <= 1'b0;
    end else begin
      wr_start <= 1'b0;
      done     <= 1'b0;
      if (start) begin
        o_y    <= 0;
        o_busy <= 1'b0;
      end else if (run && !o_busy && o_y < OH && out_full[o_y[0]]) begin
        o_busy   <= 1'b1;
        o_bank   <= o_y[0];
        o_wc     <= 0;
        wr_start <= 1'b1;
        wr_addr  <= addrs[1] + addr_t'(o_y * OUT_PITCH * AXI_BPW);
      end else if (o_busy) begin
        if (wr_valid && wr_ready) o_wc <= o_wc + 1;
        if (wr_done) begin
          o_busy <= 1'b0;
          o_y    <= o_y + 1;
          if (o_y == OH - 1) done <= 1'b1;
        end
      end
    end
  end

  assign o_clear  = o_busy && wr_done;
  assign wr_valid = o_busy && !wr_start;

  always_comb begin
    wr_data = '0;
    for (int l = 0; l < EPO; l++)
      if (o_wc * EPO + l < OW) wr_data[l*OUT_W +: OUT_W] = obuf[o_bank][o_wc*EPO+l];
  end

  assign busy = run;

endmodule

// Fully connected overlay.
//
// Computes z[o] = b[o] + sum over i of w[o][i] * y[i] (eq. 2.3) for N_OUT
// output neurons from N_IN input neurons, without activation function (the
// host applies it). The host passes four byte addresses through the AXI4-Lite
// slave (address register 0: input neurons, 1: weights, 2: biases, 3: output
// neurons) and starts the run.
//
// How it works. All biases are read first into the Temp Output memory. Then
// the outputs are computed P at a time. For each group of P outputs the input
// neurons are streamed in chunks of CHUNK elements on AXI port 0, while port
// 1+p streams the matching chunk of the weight row of output p; Buffering
// Inputs stores them in the Input Neurons and Weights buffers. Calculations
// multiplies LANES input/weight pairs per output per cycle and adds them to the
// output's running sum, which starts from the bias in Temp Output and is
// written back there at the end of the group. Buffers are double buffered, so
// the next chunk is fetched while the current one is being used. Each input
// chunk is fetched once per group and used for P outputs, which is how the
// design reuses input data without keeping the whole input vector on chip.
// Finally all outputs are written back in one long transfer on port 0.
// With P = 3 the overlay has 4 AXI ports (the document's "fast" block), with
// P = 1 it has 2 ports (the "slow" block). Outputs are quantized by truncation
// to the top OUT_W bits of the ACC_W-bit sum, so nothing overflows.
//
// Data layout in host memory (this design's choice): signed elements packed
// AXI_DW/width per word, lowest element in the lowest bits; every weight row
// (all N_IN weights of one output) starts on a new word.
//
// Parameter rules: CHUNK must be a multiple of AXI_DW/IN_W, AXI_DW/W_W and
// LANES.
module fc
  import cnn_pkg::*;
#(
  parameter int unsigned N_IN      = 256,
  parameter int unsigned N_OUT     = 256,
  parameter int unsigned P         = 3,
  parameter int unsigned IN_W      = 8,
  parameter int unsigned W_W       = 8,
  parameter int unsigned B_W       = 8,
  parameter int unsigned OUT_W     = 8,
  parameter int unsigned CHUNK     = 128,
  parameter int unsigned LANES     = AXI_DW / W_W,
  parameter int unsigned MAX_BURST = 256
) (
  input  logic      clk,
  input  logic      rst_n,
  input  axil_req_t s_axil_req,
  output axil_rsp_t s_axil_rsp,
  output axi_req_t  m_axi_req [P+1],
  input  axi_rsp_t  m_axi_rsp [P+1],
  output logic      busy,
  output logic      done
);

  localparam int unsigned PROD_W    = IN_W + W_W;
  localparam int unsigned ACC_W     = ((PROD_W > B_W) ? PROD_W : B_W) + $clog2(N_IN + 1) + 1;
  localparam int unsigned OUT_SHIFT = ACC_W - OUT_W;
  localparam int unsigned EPI       = AXI_DW / IN_W;
  localparam int unsigned EPW       = AXI_DW / W_W;
  localparam int unsigned EPB       = AXI_DW / B_W;
  localparam int unsigned EPO       = AXI_DW / OUT_W;
  localparam int unsigned W_PITCH   = (N_IN + EPW - 1) / EPW;   // words per weight row
  localparam int unsigned B_WORDS   = (N_OUT + EPB - 1) / EPB;
  localparam int unsigned O_WORDS   = (N_OUT + EPO - 1) / EPO;
  localparam int unsigned NCH       = (N_IN + CHUNK - 1) / CHUNK; // chunks per output
  localparam int unsigned NG        = (N_OUT + P - 1) / P;        // output groups
  localparam int unsigned STEPS     = CHUNK / LANES;              // cycles per chunk

  typedef logic signed [ACC_W-1:0] acc_t;

  // ---------------------------------------------------------------- control
  logic  start;
  addr_t addrs [4];
  axil_ctrl #(.NADDR(4)) u_ctrl (
    .clk, .rst_n, .s_req(s_axil_req), .s_rsp(s_axil_rsp),
    .start, .busy, .done, .addrs
  );

  // ---------------------------------------------------------------- AXI engines
  axi_req_t    rd_req [P+1];
  axi_req_t    wr_req;
  logic        rd_start [P+1];
  logic        rd_done  [P+1];
  logic        rd_valid [P+1];
  addr_t       rd_addr  [P+1];
  logic [31:0] rd_nwords[P+1];
  data_t       rd_data  [P+1];
  logic        wr_start, wr_done, wr_valid, wr_ready;
  logic [31:0] wr_nwords;
  data_t       wr_data;

  for (genvar p = 0; p <= P; p++) begin : g_port
    logic rd_busy_unused;
    axi_rd_engine #(.MAX_BURST(MAX_BURST)) u_rd (
      .clk, .rst_n, .start(rd_start[p]), .addr(rd_addr[p]), .nwords(rd_nwords[p]),
      .busy(rd_busy_unused), .done(rd_done[p]), .out_data(rd_data[p]),
      .out_valid(rd_valid[p]), .out_ready(1'b1), .axi_req(rd_req[p]), .axi_rsp(m_axi_rsp[p])
    );
    if (p == 0) begin : g_wr
      assign m_axi_req[p] = rd_req[p] | wr_req;
    end else begin : g_rd_only
      assign m_axi_req[p] = rd_req[p];
    end
  end

  logic wr_busy_unused;
  axi_wr_engine #(.MAX_BURST(MAX_BURST)) u_wr (
    .clk, .rst_n, .start(wr_start), .addr(addrs[3]), .nwords(wr_nwords),
    .busy(wr_busy_unused), .done(wr_done), .in_data(wr_data), .in_valid(wr_valid),
    .in_ready(wr_ready), .axi_req(wr_req), .axi_rsp(m_axi_rsp[0])
  );

  // ---------------------------------------------------------------- storage
  acc_t                   tout  [N_OUT];          // Temp Output (BRAM)
  logic signed [IN_W-1:0] inbuf [2][CHUNK];       // Input Neurons, double buffered
  logic signed [W_W-1:0]  wbuf  [2][P][CHUNK];    // Weights, double buffered
  logic [1:0]             full;

  // ================================================================ phases
  typedef enum logic [2:0] {S_IDLE, S_BIAS, S_RUN, S_OUT} state_e;
  state_e state;

  // Buffering Inputs: walks groups g and chunks ch
  typedef enum logic [1:0] {L_IDLE, L_WAIT, L_LOAD} lstate_e;
  lstate_e     lstate;
  int unsigned l_g, l_ch;
  logic        l_bank;
  logic [P:0]  l_pend;                            // ports still reading
  logic [P:0]  l_pend_next;                       // ... after this cycle's done pulses
  int unsigned l_wc [P+1];                        // word counters per port

  // Calculations
  int unsigned c_g, c_ch, c_k;
  logic        c_bank;
  acc_t        acc [P];
  acc_t        step_sum [P];
  acc_t        acc_next [P];
  logic        c_go;

  // output writer
  int unsigned o_wc;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= S_IDLE;
      done     <= 1'b0;
      wr_start <= 1'b0;
      wr_nwords <= '0;
      o_wc     <= 0;
    end else begin
      done     <= 1'b0;
      wr_start <= 1'b0;
      unique case (state)
        S_IDLE: if (start) state <= S_BIAS;
        S_BIAS: if (rd_done[0]) state <= S_RUN;
        S_RUN: if (c_go && c_g == NG - 1 && c_ch == NCH - 1 && c_k == STEPS - 1) begin
          state     <= S_OUT;
          wr_start  <= 1'b1;
          wr_nwords <= O_WORDS;
          o_wc      <= 0;
        end
        S_OUT: begin
          if (wr_valid && wr_ready) o_wc <= o_wc + 1;
          if (wr_done) begin
            state <= S_IDLE;
            done  <= 1'b1;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // ---- Buffering Inputs
  always_comb
    for (int p = 0; p <= P; p++) l_pend_next[p] = l_pend[p] && !rd_done[p];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      lstate <= L_IDLE;
      l_g    <= 0;
      l_ch   <= 0;
      l_bank <= 1'b0;
      l_pend <= '0;
      full   <= '0;
      for (int p = 0; p <= P; p++) begin
        rd_start[p]  <= 1'b0;
        rd_addr[p]   <= '0;
        rd_nwords[p] <= '0;
        l_wc[p]      <= 0;
      end
    end else begin
      for (int p = 0; p <= P; p++) rd_start[p] <= 1'b0;
      // the bias read uses port 0 before the chunks start
      if (state == S_IDLE && start) begin
        rd_start[0]  <= 1'b1;
        rd_addr[0]   <= addrs[2];
        rd_nwords[0] <= B_WORDS;
        l_wc[0]      <= 0;
        lstate       <= L_IDLE;
        l_g          <= 0;
        l_ch         <= 0;
        l_bank       <= 1'b0;
        full         <= '0;
      end
      if (state == S_BIAS && rd_done[0]) lstate <= L_WAIT;
      unique case (lstate)
        L_IDLE: ;
        L_WAIT: if (!full[l_bank]) begin
          lstate <= L_LOAD;
          l_pend <= '1;
          rd_start[0]  <= 1'b1;
          rd_addr[0]   <= addrs[0] + addr_t'(l_ch * (CHUNK / EPI) * AXI_BPW);
          rd_nwords[0] <= ((l_ch + 1) * CHUNK <= N_IN) ? CHUNK / EPI
                          : (N_IN - l_ch * CHUNK + EPI - 1) / EPI;
          l_wc[0]      <= 0;
          for (int p = 1; p <= P; p++) begin
            rd_start[p]  <= 1'b1;
            rd_addr[p]   <= addrs[1] + addr_t'(((l_g * P + p - 1) * W_PITCH + l_ch * (CHUNK / EPW)) * AXI_BPW);
            rd_nwords[p] <= (l_g * P + p - 1 >= N_OUT) ? 0 :
                            ((l_ch + 1) * CHUNK <= N_IN) ? CHUNK / EPW
                            : (N_IN - l_ch * CHUNK + EPW - 1) / EPW;
            l_wc[p]      <= 0;
          end
        end
        L_LOAD: begin
          l_pend <= l_pend_next;
          if (l_pend_next == '0) begin
            full[l_bank] <= 1'b1;
            l_bank       <= !l_bank;
            if (l_ch == NCH - 1) begin
              l_ch <= 0;
              l_g  <= l_g + 1;
              lstate <= (l_g == NG - 1) ? L_IDLE : L_WAIT;
            end else begin
              l_ch <= l_ch + 1;
              lstate <= L_WAIT;
            end
          end
        end
        default: lstate <= L_IDLE;
      endcase
      if (c_go && c_k == STEPS - 1) full[c_bank] <= 1'b0;

      // unpack arriving words
      if (rd_valid[0]) begin
        l_wc[0] <= l_wc[0] + 1;
        if (state == S_BIAS) begin
          for (int l = 0; l < EPB; l++)
            if (l_wc[0] * EPB + l < N_OUT)
              tout[l_wc[0]*EPB+l] <= acc_t'($signed(rd_data[0][l*B_W +: B_W]));
        end else begin
          for (int l = 0; l < EPI; l++)
            inbuf[l_bank][l_wc[0]*EPI+l] <= rd_data[0][l*IN_W +: IN_W];
        end
      end
      for (int p = 1; p <= P; p++)
        if (rd_valid[p]) begin
          l_wc[p] <= l_wc[p] + 1;
          for (int l = 0; l < EPW; l++)
            wbuf[l_bank][p-1][l_wc[p]*EPW+l] <= rd_data[p][l*W_W +: W_W];
        end
      // Calculations writes a finished group back to Temp Output
      if (c_go && c_k == STEPS - 1 && c_ch == NCH - 1)
        for (int p = 0; p < P; p++)
          if (c_g * P + p < N_OUT) tout[c_g*P+p] <= acc_next[p];
    end
  end

  // ---- Calculations
  assign c_go = (state == S_RUN) && full[c_bank];

  always_comb begin
    for (int p = 0; p < P; p++) begin
      step_sum[p] = '0;
      for (int l = 0; l < LANES; l++)
        if (c_ch * CHUNK + c_k * LANES + l < N_IN)
          step_sum[p] = step_sum[p] + acc_t'(PROD_W'(inbuf[c_bank][c_k*LANES+l]) *
                                             PROD_W'(wbuf[c_bank][p][c_k*LANES+l]));
      // the running sum of a group starts from the bias held in Temp Output
      if (c_ch == 0 && c_k == 0)
        acc_next[p] = ((c_g * P + p < N_OUT) ? tout[c_g*P+p] : '0) + step_sum[p];
      else
        acc_next[p] = acc[p] + step_sum[p];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      c_g    <= 0;
      c_ch   <= 0;
      c_k    <= 0;
      c_bank <= 1'b0;
      for (int p = 0; p < P; p++) acc[p] <= '0;
    end else if (state == S_IDLE) begin
      c_g    <= 0;
      c_ch   <= 0;
      c_k    <= 0;
      c_bank <= 1'b0;
    end else if (c_go) begin
      for (int p = 0; p < P; p++) acc[p] <= acc_next[p];
      if (c_k == STEPS - 1) begin
        c_k    <= 0;
        c_bank <= !c_bank;
        if (c_ch == NCH - 1) begin
          c_ch <= 0;
          c_g  <= c_g + 1;
        end else begin
          c_ch <= c_ch + 1;
        end
      end else begin
        c_k <= c_k + 1;
      end
    end
  end

  // ---- Buffering Outputs
  assign wr_valid = (state == S_OUT) && !wr_start;
  always_comb begin
    wr_data = '0;
    for (int l = 0; l < EPO; l++)
      if (o_wc * EPO + l < N_OUT)
        wr_data[l*OUT_W +: OUT_W] = OUT_W'(tout[o_wc*EPO+l] >>> OUT_SHIFT);
  end

  assign busy = (state != S_IDLE);

endmodule

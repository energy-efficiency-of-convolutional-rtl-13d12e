// Behavioural model of host memory as seen through an AXI4 slave port.
//
// Stands in for the processing system's DDR memory in simulation. Holds
// WORDS 64-bit words addressed by byte address / 8. Accepts one read burst and
// one write burst at a time, each on its own channels, so reads and writes
// overlap. With STALL set, rvalid, awready, wready and bvalid are held back on
// random cycles to exercise the masters' handshakes. Counts the bursts it
// served so a testbench can check that long bursts were used.
module axi_mem_model
  import cnn_pkg::*;
#(
  parameter int unsigned WORDS = 1 << 16,
  parameter bit          STALL = 1'b1
) (
  input  logic     clk,
  input  logic     rst_n,
  input  axi_req_t req,
  output axi_rsp_t rsp
);

  data_t mem [WORDS];
  int unsigned rd_bursts, wr_bursts, max_rd_len;

  // read channel
  logic        r_act;
  addr_t       r_addr;
  int unsigned r_left;
  logic        r_go, w_go, b_go, aw_go;
  // write channel state
  logic        w_act, b_pend;
  addr_t       w_addr;
  int unsigned w_left;

  always_ff @(posedge clk) begin
    r_go  <= !STALL || ($urandom % 4 != 0);
    w_go  <= !STALL || ($urandom % 4 != 0);
    b_go  <= !STALL || ($urandom % 2 != 0);
    aw_go <= !STALL || ($urandom % 2 != 0);
  end

  always_comb begin
    rsp         = '0;
    rsp.arready = !r_act;
    rsp.rvalid  = r_act && r_go;
    rsp.rdata   = mem[(r_addr >> 3) % WORDS];
    rsp.rlast   = (r_left == 1);
    rsp.awready = !w_act && !b_pend && aw_go;
    rsp.wready  = w_act && w_go;
    rsp.bvalid  = b_pend && b_go;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      r_act <= 1'b0; r_addr <= '0; r_left <= 0;
      rd_bursts <= 0; max_rd_len <= 0;
    end else begin
      if (req.arvalid && rsp.arready) begin
        r_act  <= 1'b1;
        r_addr <= req.araddr;
        r_left <= int'(req.arlen) + 1;
        rd_bursts <= rd_bursts + 1;
        if (int'(req.arlen) + 1 > max_rd_len) max_rd_len <= int'(req.arlen) + 1;
      end else if (rsp.rvalid && req.rready) begin
        r_addr <= r_addr + 8;
        r_left <= r_left - 1;
        if (r_left == 1) r_act <= 1'b0;
      end
    end
  end

  // write channel

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      w_act <= 1'b0; b_pend <= 1'b0; w_addr <= '0; w_left <= 0; wr_bursts <= 0;
    end else begin
      if (req.awvalid && rsp.awready) begin
        w_act  <= 1'b1;
        w_addr <= req.awaddr;
        w_left <= int'(req.awlen) + 1;
        wr_bursts <= wr_bursts + 1;
      end
      if (rsp.wready && req.wvalid) begin
        for (int b = 0; b < 8; b++)
          if (req.wstrb[b]) mem[(w_addr >> 3) % WORDS][b*8 +: 8] <= req.wdata[b*8 +: 8];
        w_addr <= w_addr + 8;
        w_left <= w_left - 1;
        if (w_left == 1) begin
          w_act  <= 1'b0;
          b_pend <= 1'b1;
          if (!req.wlast) $error("wlast missing on the last beat of a burst");
        end else if (req.wlast) $error("wlast before the end of a burst");
      end
      if (rsp.bvalid && req.bready) b_pend <= 1'b0;
    end
  end

endmodule

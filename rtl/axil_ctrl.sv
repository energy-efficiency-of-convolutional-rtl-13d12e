// AXI4-Lite control slave of an overlay.
//
// The host writes the memory addresses of the overlay's tensors into NADDR
// address registers and starts it by writing 1 to bit 0 of the control
// register; the overlay then fetches and stores everything itself through its
// AXI4 master ports. That split (host as AXI-Lite master for addresses and
// start, overlay as AXI4 master for data) is the document's; the register map
// is this design's own, modelled on the usual HLS layout:
//   0x00 control: bit0 start (write 1, reads back while running),
//                 bit1 done (set when the run ends, cleared when read),
//                 bit2 idle
//   0x10 + 8*i   address register i (32 bits)
// Reads of unmapped offsets return 0 and writes to them are ignored. Each
// write takes address and data together and answers one cycle later; each read
// answers one cycle after the address.
module axil_ctrl
  import cnn_pkg::*;
#(
  parameter int unsigned NADDR = 3
) (
  input  logic       clk,
  input  logic       rst_n,
  input  axil_req_t  s_req,
  output axil_rsp_t  s_rsp,
  output logic       start,                 // one-cycle pulse
  input  logic       busy,                  // overlay is running
  input  logic       done,                  // one-cycle pulse at the end of a run
  output addr_t      addrs [NADDR]
);

  logic bvalid, rvalid, done_flag, running;
  logic [AXIL_DW-1:0] rdata;

  // write: accept when address and data are both present and no response is pending
  logic wr_go;
  assign wr_go = s_req.awvalid && s_req.wvalid && !bvalid;
  logic rd_go;
  assign rd_go = s_req.arvalid && !rvalid;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bvalid    <= 1'b0;
      rvalid    <= 1'b0;
      rdata     <= '0;
      done_flag <= 1'b0;
      running   <= 1'b0;
      start     <= 1'b0;
      for (int i = 0; i < NADDR; i++) addrs[i] <= '0;
    end else begin
      start <= 1'b0;
      if (bvalid && s_req.bready) bvalid <= 1'b0;
      if (rvalid && s_req.rready) rvalid <= 1'b0;
      if (done) begin
        done_flag <= 1'b1;
        running   <= 1'b0;
      end
      if (wr_go) begin
        bvalid <= 1'b1;
        if (s_req.awaddr == REG_CTRL) begin
          if (s_req.wdata[0] && !running && !busy) begin
            start     <= 1'b1;
            running   <= 1'b1;
            done_flag <= 1'b0;
          end
        end else begin
          for (int i = 0; i < NADDR; i++)
            if (s_req.awaddr == AXIL_AW'(REG_ADDR0 + 8 * i))
              addrs[i] <= AXI_AW'(s_req.wdata);
        end
      end
      if (rd_go) begin
        rvalid <= 1'b1;
        rdata  <= '0;
        if (s_req.araddr == REG_CTRL) begin
          rdata <= {29'd0, !(running || busy), done_flag, running};
          if (!done) done_flag <= 1'b0;   // clear on read
        end else begin
          for (int i = 0; i < NADDR; i++)
            if (s_req.araddr == AXIL_AW'(REG_ADDR0 + 8 * i))
              rdata <= AXIL_DW'(addrs[i]);
        end
      end
    end
  end

  always_comb begin
    s_rsp         = '0;
    s_rsp.awready = wr_go;
    s_rsp.wready  = wr_go;
    s_rsp.bvalid  = bvalid;
    s_rsp.arready = rd_go;
    s_rsp.rdata   = rdata;
    s_rsp.rvalid  = rvalid;
  end

endmodule

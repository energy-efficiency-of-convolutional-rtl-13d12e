// AXI4 burst read engine.
//
// Reads nwords consecutive AXI_DW-bit words starting at byte address addr and
// hands them out as a valid/ready stream. The transfer is cut into bursts of at
// most MAX_BURST beats, and a burst never crosses a 4 KiB boundary as AXI4
// requires. One burst is outstanding at a time. The stream is the R channel
// itself: out_valid is rvalid and out_ready is rready, so a stalled consumer
// stalls the bus. done pulses for one cycle after the last beat is taken.
// Long bursts over a widened bus are what the document uses to feed its
// overlays; the single outstanding burst is this design's simplification.
//
// Timing: start is sampled while busy is low; the first address is issued the
// next cycle.
//
// The request and response structs carry all five AXI4 channels so that an
// overlay can OR a read and a write engine onto one port; this engine drives
// the write-channel fields of axi_req to zero and ignores those of axi_rsp.
// The burst-length assertion samples rst_n synchronously in its disable
// condition, which lint reports as a reset used both ways; it is not logic.
module axi_rd_engine
  import cnn_pkg::*;
#(
  parameter int unsigned MAX_BURST = 256
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  addr_t       addr,
  input  logic [31:0] nwords,
  output logic        busy,
  output logic        done,
  output data_t       out_data,
  output logic        out_valid,
  input  logic        out_ready,
  output axi_req_t    axi_req,   // only AR and R fields are driven high
  input  axi_rsp_t    axi_rsp
);

  typedef enum logic [1:0] {IDLE, ADDR, DATA} state_e;
  state_e      state;
  addr_t       cur;
  logic [31:0] left;
  logic [8:0]  blen;     // beats of the current burst

  // beats up to the next 4 KiB boundary
  logic [9:0]  to_4k;
  logic [31:0] next_len;
  always_comb begin
    to_4k    = 10'((13'h1000 - {1'b0, cur[11:0]}) >> $clog2(AXI_BPW));
    next_len = left;
    if (next_len > MAX_BURST) next_len = MAX_BURST;
    if (next_len > 32'(to_4k)) next_len = 32'(to_4k);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= IDLE;
      cur   <= '0;
      left  <= '0;
      blen  <= '0;
      done  <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        IDLE: if (start) begin
          cur  <= addr;
          left <= nwords;
          if (nwords == 0) done  <= 1'b1;
          else             state <= ADDR;
        end
        ADDR: begin
          blen <= 9'(next_len);
          if (axi_rsp.arready) state <= DATA;
        end
        DATA: if (axi_rsp.rvalid && out_ready) begin
          blen <= blen - 1'b1;
          left <= left - 1;
          cur  <= cur + AXI_BPW;
          if (blen == 1) begin
            if (left == 1) begin
              state <= IDLE;
              done  <= 1'b1;
            end else begin
              state <= ADDR;
            end
          end
        end
        default: state <= IDLE;
      endcase
    end
  end

  assign busy = (state != IDLE);

  always_comb begin
    axi_req         = '0;
    axi_req.araddr  = cur;
    axi_req.arlen   = 8'(next_len - 1);
    axi_req.arvalid = (state == ADDR);
    axi_req.rready  = (state == DATA) && out_ready;
  end

  assign out_data  = axi_rsp.rdata;
  assign out_valid = (state == DATA) && axi_rsp.rvalid;

  // the slave must close each burst on the beat the engine counts as last
  a_rlast: assert property (@(posedge clk) disable iff (!rst_n)
    (state == DATA && axi_rsp.rvalid && out_ready) |-> (axi_rsp.rlast == (blen == 1)));

endmodule

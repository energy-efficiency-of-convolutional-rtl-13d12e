// AXI4 burst write engine.
//
// Writes nwords consecutive AXI_DW-bit words, taken from a valid/ready input
// stream, to byte address addr. The transfer is cut into bursts of at most
// MAX_BURST beats that never cross a 4 KiB boundary. For each burst the engine
// issues the address, streams the beats (wlast on the final one) and waits for
// the write response before the next burst. done pulses for one cycle when the
// last response has arrived, so the data is then in memory. All byte strobes
// are set. Burst writes of buffered outputs follow the document; one burst in
// flight at a time is this design's simplification.
//
// The request and response structs carry all five AXI4 channels so that an
// overlay can OR a read and a write engine onto one port; this engine drives
// the read-channel fields of axi_req to zero and ignores those of axi_rsp.
module axi_wr_engine
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
  input  data_t       in_data,
  input  logic        in_valid,
  output logic        in_ready,
  output axi_req_t    axi_req,   // only AW, W and B fields are driven high
  input  axi_rsp_t    axi_rsp
);

  typedef enum logic [1:0] {IDLE, ADDR, DATA, RESP} state_e;
  state_e      state;
  addr_t       cur;
  logic [31:0] left;
  logic [8:0]  blen;

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
          if (axi_rsp.awready) state <= DATA;
        end
        DATA: if (in_valid && axi_rsp.wready) begin
          blen <= blen - 1'b1;
          left <= left - 1;
          cur  <= cur + AXI_BPW;
          if (blen == 1) state <= RESP;
        end
        RESP: if (axi_rsp.bvalid) begin
          if (left == 0) begin
            state <= IDLE;
            done  <= 1'b1;
          end else begin
            state <= ADDR;
          end
        end
        default: state <= IDLE;
      endcase
    end
  end

  assign busy     = (state != IDLE);
  assign in_ready = (state == DATA) && axi_rsp.wready;

  always_comb begin
    axi_req         = '0;
    axi_req.awaddr  = cur;
    axi_req.awlen   = 8'(next_len - 1);
    axi_req.awvalid = (state == ADDR);
    axi_req.wdata   = in_data;
    axi_req.wstrb   = '1;
    axi_req.wlast   = (blen == 1);
    axi_req.wvalid  = (state == DATA) && in_valid;
    axi_req.bready  = (state == RESP);
  end

endmodule

// CNN inference building blocks: convolution, fully connected and pooling
// overlays side by side.
//
// The three overlays are independent accelerators that a host processor calls
// like library functions: each has its own AXI4-Lite control slave and its own
// AXI4 master port(s) into host memory, and each runs one CNN layer's worth of
// work per start. They share nothing but the clock and reset, so their ports
// are simply brought out:
//   conv_*  2D convolution, one AXI4 master port for input, kernel and output
//   fc_*    fully connected layer, FC_P+1 AXI4 master ports (port 0: inputs,
//           biases, outputs; ports 1..FC_P: weight rows)
//   pool_*  max or average pooling, one AXI4 master port
// The defaults are the document's reference configuration: 1024 x 80 images
// with a 5 x 5 kernel or pooling window and stride 1, a 256-input 256-output
// fully connected layer computing three outputs at once, and 8-bit signed
// data with overflow prevented. busy and done of each overlay are brought out
// for interrupt or debug use; the same information is in its control register.
module cnn_blocks_top
  import cnn_pkg::*;
#(
  parameter int unsigned CONV_IMG_W = 1024,
  parameter int unsigned CONV_IMG_H = 80,
  parameter int unsigned CONV_K     = 5,
  parameter int unsigned FC_N_IN    = 256,
  parameter int unsigned FC_N_OUT   = 256,
  parameter int unsigned FC_P       = 3,
  parameter int unsigned POOL_IMG_W = 1024,
  parameter int unsigned POOL_IMG_H = 80,
  parameter int unsigned POOL_K     = 5,
  parameter pool_mode_e  POOL_MODE  = POOL_MAX
) (
  input  logic      clk,
  input  logic      rst_n,
  // convolution
  input  axil_req_t conv_axil_req,
  output axil_rsp_t conv_axil_rsp,
  output axi_req_t  conv_axi_req,
  input  axi_rsp_t  conv_axi_rsp,
  output logic      conv_busy,
  output logic      conv_done,
  // fully connected
  input  axil_req_t fc_axil_req,
  output axil_rsp_t fc_axil_rsp,
  output axi_req_t  fc_axi_req [FC_P+1],
  input  axi_rsp_t  fc_axi_rsp [FC_P+1],
  output logic      fc_busy,
  output logic      fc_done,
  // pooling
  input  axil_req_t pool_axil_req,
  output axil_rsp_t pool_axil_rsp,
  output axi_req_t  pool_axi_req,
  input  axi_rsp_t  pool_axi_rsp,
  output logic      pool_busy,
  output logic      pool_done
);

  conv2d #(
    .IMG_W(CONV_IMG_W), .IMG_H(CONV_IMG_H), .KH(CONV_K), .KW(CONV_K)
  ) u_conv (
    .clk, .rst_n,
    .s_axil_req(conv_axil_req), .s_axil_rsp(conv_axil_rsp),
    .m_axi_req(conv_axi_req), .m_axi_rsp(conv_axi_rsp),
    .busy(conv_busy), .done(conv_done)
  );

  fc #(
    .N_IN(FC_N_IN), .N_OUT(FC_N_OUT), .P(FC_P)
  ) u_fc (
    .clk, .rst_n,
    .s_axil_req(fc_axil_req), .s_axil_rsp(fc_axil_rsp),
    .m_axi_req(fc_axi_req), .m_axi_rsp(fc_axi_rsp),
    .busy(fc_busy), .done(fc_done)
  );

  pool2d #(
    .IMG_W(POOL_IMG_W), .IMG_H(POOL_IMG_H), .PH(POOL_K), .PW(POOL_K), .MODE(POOL_MODE)
  ) u_pool (
    .clk, .rst_n,
    .s_axil_req(pool_axil_req), .s_axil_rsp(pool_axil_rsp),
    .m_axi_req(pool_axi_req), .m_axi_rsp(pool_axi_rsp),
    .busy(pool_busy), .done(pool_done)
  );

endmodule

// cnn_acc_top: the three precision-scalable CNN accelerators of the design,
// side by side.
//
// A tile-based SoC would place each accelerator in its own tile with its own
// socket: the 2D-convolution accelerator (conv2d_acc), the depthwise
// convolution accelerator (dwconv_acc) and the fully-connected accelerator
// (fc_acc). They share no logic and no state; this module only gathers them
// so that the whole design can be built and simulated as one unit. Each
// socket is brought out unchanged under its own prefix (c2d_, dw_, fc_):
// configuration word, DMA read and write control and data channels, all
// valid/ready, and a one-clock acc_done pulse. Clock and active-low reset are
// shared. Timing is that of each accelerator; see their own descriptions.
// The three accelerators and their common structure (load, packing with ST
// operands, compute, store) follow the accelerator description; putting them
// in one wrapper is this design's choice, as the processor, memory tiles and
// network-on-chip that would connect them are outside this RTL.
module cnn_acc_top
  import conv2d_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst,
  // 2D convolution accelerator socket
  input  conf_info_t           c2d_conf_info_dat,
  input  logic                 c2d_conf_info_vld,
  output logic                 c2d_conf_info_rdy,
  output dma_info_t            c2d_dma_read_ctrl_dat,
  output logic                 c2d_dma_read_ctrl_vld,
  input  logic                 c2d_dma_read_ctrl_rdy,
  input  logic [DMA_WIDTH-1:0] c2d_dma_read_chnl_dat,
  input  logic                 c2d_dma_read_chnl_vld,
  output logic                 c2d_dma_read_chnl_rdy,
  output dma_info_t            c2d_dma_write_ctrl_dat,
  output logic                 c2d_dma_write_ctrl_vld,
  input  logic                 c2d_dma_write_ctrl_rdy,
  output logic [DMA_WIDTH-1:0] c2d_dma_write_chnl_dat,
  output logic                 c2d_dma_write_chnl_vld,
  input  logic                 c2d_dma_write_chnl_rdy,
  output logic                 c2d_acc_done,
  // depthwise convolution accelerator socket
  input  conf_info_t           dw_conf_info_dat,
  input  logic                 dw_conf_info_vld,
  output logic                 dw_conf_info_rdy,
  output dma_info_t            dw_dma_read_ctrl_dat,
  output logic                 dw_dma_read_ctrl_vld,
  input  logic                 dw_dma_read_ctrl_rdy,
  input  logic [DMA_WIDTH-1:0] dw_dma_read_chnl_dat,
  input  logic                 dw_dma_read_chnl_vld,
  output logic                 dw_dma_read_chnl_rdy,
  output dma_info_t            dw_dma_write_ctrl_dat,
  output logic                 dw_dma_write_ctrl_vld,
  input  logic                 dw_dma_write_ctrl_rdy,
  output logic [DMA_WIDTH-1:0] dw_dma_write_chnl_dat,
  output logic                 dw_dma_write_chnl_vld,
  input  logic                 dw_dma_write_chnl_rdy,
  output logic                 dw_acc_done,
  // fully connected accelerator socket
  input  conf_info_t           fc_conf_info_dat,
  input  logic                 fc_conf_info_vld,
  output logic                 fc_conf_info_rdy,
  output dma_info_t            fc_dma_read_ctrl_dat,
  output logic                 fc_dma_read_ctrl_vld,
  input  logic                 fc_dma_read_ctrl_rdy,
  input  logic [DMA_WIDTH-1:0] fc_dma_read_chnl_dat,
  input  logic                 fc_dma_read_chnl_vld,
  output logic                 fc_dma_read_chnl_rdy,
  output dma_info_t            fc_dma_write_ctrl_dat,
  output logic                 fc_dma_write_ctrl_vld,
  input  logic                 fc_dma_write_ctrl_rdy,
  output logic [DMA_WIDTH-1:0] fc_dma_write_chnl_dat,
  output logic                 fc_dma_write_chnl_vld,
  input  logic                 fc_dma_write_chnl_rdy,
  output logic                 fc_acc_done
);

  conv2d_acc u_c2d (
    .clk, .rst,
    .conf_info_dat(c2d_conf_info_dat),
    .conf_info_vld(c2d_conf_info_vld),
    .conf_info_rdy(c2d_conf_info_rdy),
    .dma_read_ctrl_dat(c2d_dma_read_ctrl_dat),
    .dma_read_ctrl_vld(c2d_dma_read_ctrl_vld),
    .dma_read_ctrl_rdy(c2d_dma_read_ctrl_rdy),
    .dma_read_chnl_dat(c2d_dma_read_chnl_dat),
    .dma_read_chnl_vld(c2d_dma_read_chnl_vld),
    .dma_read_chnl_rdy(c2d_dma_read_chnl_rdy),
    .dma_write_ctrl_dat(c2d_dma_write_ctrl_dat),
    .dma_write_ctrl_vld(c2d_dma_write_ctrl_vld),
    .dma_write_ctrl_rdy(c2d_dma_write_ctrl_rdy),
    .dma_write_chnl_dat(c2d_dma_write_chnl_dat),
    .dma_write_chnl_vld(c2d_dma_write_chnl_vld),
    .dma_write_chnl_rdy(c2d_dma_write_chnl_rdy),
    .acc_done(c2d_acc_done)
  );

  dwconv_acc u_dw (
    .clk, .rst,
    .conf_info_dat(dw_conf_info_dat),
    .conf_info_vld(dw_conf_info_vld),
    .conf_info_rdy(dw_conf_info_rdy),
    .dma_read_ctrl_dat(dw_dma_read_ctrl_dat),
    .dma_read_ctrl_vld(dw_dma_read_ctrl_vld),
    .dma_read_ctrl_rdy(dw_dma_read_ctrl_rdy),
    .dma_read_chnl_dat(dw_dma_read_chnl_dat),
    .dma_read_chnl_vld(dw_dma_read_chnl_vld),
    .dma_read_chnl_rdy(dw_dma_read_chnl_rdy),
    .dma_write_ctrl_dat(dw_dma_write_ctrl_dat),
    .dma_write_ctrl_vld(dw_dma_write_ctrl_vld),
    .dma_write_ctrl_rdy(dw_dma_write_ctrl_rdy),
    .dma_write_chnl_dat(dw_dma_write_chnl_dat),
    .dma_write_chnl_vld(dw_dma_write_chnl_vld),
    .dma_write_chnl_rdy(dw_dma_write_chnl_rdy),
    .acc_done(dw_acc_done)
  );

  fc_acc u_fc (
    .clk, .rst,
    .conf_info_dat(fc_conf_info_dat),
    .conf_info_vld(fc_conf_info_vld),
    .conf_info_rdy(fc_conf_info_rdy),
    .dma_read_ctrl_dat(fc_dma_read_ctrl_dat),
    .dma_read_ctrl_vld(fc_dma_read_ctrl_vld),
    .dma_read_ctrl_rdy(fc_dma_read_ctrl_rdy),
    .dma_read_chnl_dat(fc_dma_read_chnl_dat),
    .dma_read_chnl_vld(fc_dma_read_chnl_vld),
    .dma_read_chnl_rdy(fc_dma_read_chnl_rdy),
    .dma_write_ctrl_dat(fc_dma_write_ctrl_dat),
    .dma_write_ctrl_vld(fc_dma_write_ctrl_vld),
    .dma_write_ctrl_rdy(fc_dma_write_ctrl_rdy),
    .dma_write_chnl_dat(fc_dma_write_chnl_dat),
    .dma_write_chnl_vld(fc_dma_write_chnl_vld),
    .dma_write_chnl_rdy(fc_dma_write_chnl_rdy),
    .acc_done(fc_acc_done)
  );
endmodule

// conv2d_pkg: types and constants shared by the precision-scalable 2D-convolution
// accelerator and its testbenches.
//
// The accelerator talks to its socket through ESP-style latency-insensitive
// channels: a configuration word (conf_info_t), DMA control words (dma_info_t)
// and 64-bit DMA data words. The 14 configuration registers follow the field
// list of the accelerator's register map; several small fields share one
// register and are unpacked with masks (see conv2d_cfg). The DMA control word
// is {size, length, index}, size in the top three bits, as seen on the socket.
// The fixed-point formats of the quantization constants are this design's own
// choice; the register map does not fix them.
package conv2d_pkg;

  // Socket data path
  localparam int unsigned DMA_WIDTH  = 64;   // DMA data word
  localparam int unsigned DATA_WIDTH = 32;   // tensor word held in the PLMs
  localparam logic [2:0]  DMA_SIZE   = 3'd3; // 3 = 64-bit beats
  localparam logic [31:0] DEADBEEF   = 32'hdeadbeef; // filler for the upper half of a store beat

  // Number of user configuration registers of the socket
  localparam int unsigned N_CONF_REGS = 14;

  // DMA control word
  typedef struct packed {
    logic [2:0]  size;
    logic [31:0] length;
    logic [31:0] index;
  } dma_info_t;

  // Configuration registers as written by the processor (first field = MSBs)
  typedef struct packed {
    logic [31:0] in_add;          // word offset of the input tile
    logic [31:0] w_add;           // word offset of the weight tile
    logic [31:0] out_add;         // word offset of the output tile
    logic [31:0] flags;           // [0] q_flag, [1] acc_flag, [2] relu_flag
    logic [31:0] n_w;             // tile width
    logic [31:0] n_h;             // tile height
    logic [31:0] n_c;             // input channels of the tile
    logic [31:0] pad_stride_kern; // [3:0] pad, [7:4] stride, [11:8] pad_type, [15:12] kern
    logic [31:0] filt;            // output channels of the tile
    logic [31:0] offset_pe_out;   // distance between output channels in memory
    logic [31:0] offset_pe;       // distance between filters in memory
    logic [31:0] options;         // [3:0] CONFIG1 (MAC precision), [7:4] CONFIG2 (output width)
    logic [31:0] offset_q_data;   // word offset of the quantization constants
    logic [31:0] offset_read_ci;  // distance between input channels in memory
  } conf_info_t;

  // ST multiplier configurations
  typedef enum logic [2:0] {
    ST_16X16 = 3'b000,
    ST_4X4   = 3'b001,
    ST_8X8   = 3'b010,
    ST_8X4   = 3'b011,
    ST_16X8  = 3'b100
  } st_cfg_e;

  // Quantization constant formats
  localparam int unsigned W_CROSS_BITWIDTH = 32; // integer
  localparam int unsigned SF_BITWIDTH      = 32; // signed fixed point
  localparam int unsigned SF_FRAC          = 16; //   fractional bits of the scale factors and the bias
  localparam int unsigned Z_BITWIDTH       = 16; // integer

  // Unpacked and derived configuration of one tile
  typedef struct packed {
    logic [31:0] in_add;
    logic [31:0] w_add;
    logic [31:0] out_add;
    logic        q_flag;
    logic        acc_flag;
    logic        relu_flag;
    logic [15:0] n_w;
    logic [15:0] n_h;
    logic [15:0] n_c;
    logic [3:0]  kern;
    logic [15:0] filt;
    logic [3:0]  pad;
    logic [3:0]  pad_type;
    logic [3:0]  stride;
    logic [31:0] offset_pe_out;
    logic [31:0] offset_pe;
    logic [2:0]  config1;
    logic [1:0]  config2;
    logic [31:0] offset_q_data;
    logic [31:0] offset_read_ci;
    // derived
    logic [15:0] n_w_in;          // padded input width
    logic [15:0] n_h_in;          // padded input height
    logic [15:0] n_w_out;
    logic [15:0] n_h_out;
    logic [2:0]  lanes;           // values packed per operand: 1, 2 or 4
    logic [15:0] n_grp;           // packed input-channel groups, ceil(n_c / lanes)
    logic [31:0] len_in;          // words per input-channel DMA transaction
    logic [31:0] len_w;           // words per filter DMA transaction
    logic [31:0] len_out;         // words per output-channel DMA transaction
    logic [31:0] len_q;           // words of quantization constants
  } cfg_t;

  // Values packed per ST operand for a MAC precision (CONFIG1)
  function automatic logic [2:0] lanes_of(input logic [2:0] config1);
    case (config1)
      3'd1:       return 3'd4;
      3'd2, 3'd3: return 3'd2;
      default:    return 3'd1;
    endcase
  endfunction

  // Output width in bits selected by CONFIG2
  function automatic int unsigned out_bits_of(input logic [1:0] config2);
    case (config2)
      2'd1:    return 4;
      2'd2:    return 8;
      default: return 16;
    endcase
  endfunction

endpackage

// conv2d_compute: computation phase of the 2D-convolution accelerator.
//
// Output-stationary loop nest, one multiply-accumulate step per clock:
//   for oh < n_h_out, ow < n_w_out:            (one output pixel, all PEs)
//     init: each PE starts from 0, or from its partial sum in the accumulator
//           buffer when acc_flag continues an earlier input-channel tile
//     for g < n_grp, kh < kern, kw < kern:     (packed channel group, window)
//       A = packed input  at (oh*stride+kh, ow*stride+kw, g)
//       B = packed weight at (kh, kw, g), one 16-bit operand per PE
//       every PE: acc += ST(A, B[pe], config1)
//     write back: accumulator buffer <= acc; output PLM <= quantized value
//           when q_flag, else the raw 32-bit sum
// The PE loop is fully parallel (PE units, one per output channel), as are the
// PE re-quantizers. Memories are read synchronously: the operand address is
// issued one cycle before the PEs use the data, so a pixel takes
// n_grp*kern*kern + 4 cycles. The memory layouts are those the load and packing
// phases produce: input index N_C_MAX*(N_W_IN_MAX*h + w) + g, weight index
// N_C_MAX*(KERN_MAX*kh + kw) + g with PE lanes per word, output and accumulator
// index N_W_IN_MAX*oh + ow with PE lanes per word.
// start is a one-cycle request; done pulses for one cycle at the end.
module conv2d_compute
  import conv2d_pkg::*;
#(
  parameter int unsigned PE         = 16,
  parameter int unsigned N_C_MAX    = 16,
  parameter int unsigned N_H_IN_MAX = 18,
  parameter int unsigned N_W_IN_MAX = 18,
  parameter int unsigned KERN_MAX   = 7,
  localparam int unsigned A_DEPTH   = N_H_IN_MAX * N_W_IN_MAX * N_C_MAX,
  localparam int unsigned B_DEPTH   = KERN_MAX * KERN_MAX * N_C_MAX,
  localparam int unsigned O_DEPTH   = N_H_IN_MAX * N_W_IN_MAX,
  localparam int unsigned A_AW      = $clog2(A_DEPTH),
  localparam int unsigned B_AW      = $clog2(B_DEPTH),
  localparam int unsigned O_AW      = $clog2(O_DEPTH)
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic                         start,
  output logic                         done,
  // tile configuration
  input  logic [15:0]                  n_h_out,
  input  logic [15:0]                  n_w_out,
  input  logic [15:0]                  n_grp,
  input  logic [3:0]                   kern,
  input  logic [3:0]                   stride,
  input  logic [2:0]                   config1,
  input  logic [1:0]                   config2,
  input  logic                         acc_flag,
  input  logic                         q_flag,
  input  logic                         relu_flag,
  // quantization constants
  input  logic signed [31:0]           w_cross    [PE],
  input  logic signed [31:0]           sf_iw      [PE],
  input  logic signed [31:0]           bias       [PE],
  input  logic signed [31:0]           sf_out_inv,
  input  logic signed [15:0]           z_out,
  // packed input operands
  output logic [A_AW-1:0]              a_raddr,
  input  logic [15:0]                  a_rdata,
  // packed weight operands, one lane per PE
  output logic [B_AW-1:0]              b_raddr,
  input  logic [PE*16-1:0]             b_rdata,
  // accumulator buffer
  output logic [O_AW-1:0]              acc_raddr,
  input  logic [PE*32-1:0]             acc_rdata,
  output logic [PE-1:0]                acc_we,
  output logic [O_AW-1:0]              acc_waddr,
  output logic [PE*32-1:0]             acc_wdata,
  // output PLM
  output logic [PE-1:0]                out_we,
  output logic [O_AW-1:0]              out_waddr,
  output logic [PE*32-1:0]             out_wdata
);

  typedef enum logic [2:0] {C_IDLE, C_RDACC, C_INIT, C_MAC, C_DRAIN, C_WB, C_DONE} cstate_e;
  cstate_e st;

  logic [15:0] oh, ow, g;
  logic [3:0]  kh, kw;
  logic        mac_v;
  logic [O_AW-1:0] pix;

  logic signed [31:0] acc [PE];
  logic signed [31:0] q   [PE];

  assign pix = O_AW'(oh * N_W_IN_MAX + ow);

  wire last_kw  = (kw == kern - 4'd1);
  wire last_kh  = (kh == kern - 4'd1);
  wire last_g   = (g  == n_grp - 16'd1);
  wire last_ow  = (ow == n_w_out - 16'd1);
  wire last_oh  = (oh == n_h_out - 16'd1);

  // operand addresses for the current (g, kh, kw)
  always_comb begin
    a_raddr   = A_AW'((32'(oh) * 32'(stride) + 32'(kh)) * N_W_IN_MAX * N_C_MAX
                    + (32'(ow) * 32'(stride) + 32'(kw)) * N_C_MAX + 32'(g));
    b_raddr   = B_AW'((32'(kh) * KERN_MAX + 32'(kw)) * N_C_MAX + 32'(g));
    acc_raddr = pix;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= C_IDLE; oh <= '0; ow <= '0; g <= '0; kh <= '0; kw <= '0; mac_v <= 1'b0;
    end else begin
      mac_v <= 1'b0;
      case (st)
        C_IDLE:  if (start) begin oh <= '0; ow <= '0; st <= C_RDACC; end
        C_RDACC: st <= C_INIT;
        C_INIT:  begin g <= '0; kh <= '0; kw <= '0; st <= C_MAC; end
        C_MAC: begin
          mac_v <= 1'b1;
          if (!last_kw) kw <= kw + 4'd1;
          else begin
            kw <= '0;
            if (!last_kh) kh <= kh + 4'd1;
            else begin
              kh <= '0;
              if (!last_g) g <= g + 16'd1;
              else st <= C_DRAIN;
            end
          end
        end
        C_DRAIN: st <= C_WB;
        C_WB: begin
          if (!last_ow) begin ow <= ow + 16'd1; st <= C_RDACC; end
          else if (!last_oh) begin ow <= '0; oh <= oh + 16'd1; st <= C_RDACC; end
          else st <= C_DONE;
        end
        C_DONE:  st <= C_IDLE;
        default: st <= C_IDLE;
      endcase
    end
  end

  assign done = (st == C_DONE);

  for (genvar p = 0; p < PE; p++) begin : g_pe
    conv2d_pe u_pe (
      .clk  (clk),
      .rst_n(rst_n),
      .load (st == C_INIT),
      .init (acc_flag ? $signed(acc_rdata[p*32 +: 32]) : 32'sd0),
      .en   (mac_v),
      .a    (a_rdata),
      .b    (b_rdata[p*16 +: 16]),
      .cfg  (config1),
      .acc  (acc[p])
    );

    requant u_q (
      .acc       (acc[p]),
      .w_cross   (w_cross[p]),
      .sf_iw     (sf_iw[p]),
      .bias      (bias[p]),
      .sf_out_inv(sf_out_inv),
      .z_out     (z_out),
      .en_relu   (relu_flag),
      .config2   (config2),
      .q         (q[p])
    );

    assign acc_wdata[p*32 +: 32] = acc[p];
    assign out_wdata[p*32 +: 32] = q_flag ? q[p] : acc[p];
  end

  assign acc_we    = (st == C_WB) ? '1 : '0;
  assign out_we    = (st == C_WB) ? '1 : '0;
  assign acc_waddr = pix;
  assign out_waddr = pix;

endmodule

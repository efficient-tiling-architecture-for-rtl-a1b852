// requant: output quantization of one accumulated convolution result.
//
// The accelerator can re-quantize its 32-bit integer sums to 4, 8 or 16 bits
// (CONFIG2) with the per-channel constants it loads by DMA: the weight
// cross-product (quantized weights times input zero point), the product of the
// input and weight scale factors, the scaled bias, and the common inverse
// output scale factor and output zero point. The arithmetic is the usual
// integer-only affine re-quantization:
//     r = (acc - w_cross) * sf_iw + bias          (ReLU: r = max(r, 0))
//     q = round(r * sf_out_inv) + z_out,  saturated to the signed output width
// The exact rounding, the fixed-point formats (scale factors and bias signed
// Q15.16, see conv2d_pkg) and applying ReLU before the output scaling are this
// design's choices. Purely combinational; the result is sign-extended to 32
// bits.
module requant
  import conv2d_pkg::*;
(
  input  logic signed [31:0]                 acc,
  input  logic signed [W_CROSS_BITWIDTH-1:0] w_cross,
  input  logic signed [SF_BITWIDTH-1:0]      sf_iw,
  input  logic signed [SF_BITWIDTH-1:0]      bias,
  input  logic signed [SF_BITWIDTH-1:0]      sf_out_inv,
  input  logic signed [Z_BITWIDTH-1:0]       z_out,
  input  logic                               en_relu,
  input  logic [1:0]                         config2,
  output logic signed [31:0]                 q
);

  logic signed [32:0]  diff;   // acc - w_cross
  logic signed [65:0]  r;      // Q.16
  logic signed [97:0]  s;      // Q.32
  logic signed [65:0]  sr;     // rounded integer
  logic signed [65:0]  t;      // with zero point
  logic signed [31:0]  qmax, qmin;

  always_comb begin
    diff = 33'(acc) - 33'(w_cross);
    r    = 66'(diff) * 66'(sf_iw) + 66'(bias);
    if (en_relu && r < 0) r = '0;
    s    = 98'(r) * 98'(sf_out_inv);
    sr   = 66'((s + (98'sd1 <<< (2*SF_FRAC - 1))) >>> (2*SF_FRAC));
    t    = sr + 66'(z_out);
    qmax = 32'((64'sd1 <<< (out_bits_of(config2) - 1)) - 1);
    qmin = -qmax - 32'sd1;
    if (t > 66'(qmax))      q = qmax;
    else if (t < 66'(qmin)) q = qmin;
    else                    q = 32'(t);
  end

endmodule

// st_mult: Sum-Together (ST) precision-scalable multiplier.
//
// Both 16-bit operands are seen as four 4-bit groups, [15:12] [11:8] [7:4] [3:0].
// CONFIG selects what is computed, following the configuration table of the
// ST multiplier:
//   000 16x16 : A[15:0]*B[15:0]
//   100 16x8  : A[15:0]*B[7:0]
//   010 8x8   : A[15:8]*B[7:0]  + A[7:0]*B[15:8]
//   011 8x4   : A[15:8]*B[3:0]  + A[7:0]*B[11:8]
//   001 4x4   : A[15:12]*B[3:0] + A[11:8]*B[7:4] + A[7:4]*B[11:8] + A[3:0]*B[15:12]
// so at low precision one call is a 2- or 4-element dot product. All fields are
// two's-complement signed (this design's choice). The codes 101..111 are not in
// the table and behave as 16x16. The unit is purely combinational; the product
// P is 32 bits wide.
module st_mult
  import conv2d_pkg::*;
(
  input  logic [15:0]        a,
  input  logic [15:0]        b,
  input  logic [2:0]         cfg,
  output logic signed [31:0] p
);

  logic signed [31:0] p16x16, p16x8, p8x8, p8x4, p4x4;

  always_comb begin
    p16x16 = 32'($signed(a)) * 32'($signed(b));
    p16x8  = 32'($signed(a)) * 32'($signed(b[7:0]));
    p8x8   = 32'($signed(a[15:8])) * 32'($signed(b[7:0]))
           + 32'($signed(a[7:0]))  * 32'($signed(b[15:8]));
    p8x4   = 32'($signed(a[15:8])) * 32'($signed(b[3:0]))
           + 32'($signed(a[7:0]))  * 32'($signed(b[11:8]));
    p4x4   = 32'($signed(a[15:12])) * 32'($signed(b[3:0]))
           + 32'($signed(a[11:8]))  * 32'($signed(b[7:4]))
           + 32'($signed(a[7:4]))   * 32'($signed(b[11:8]))
           + 32'($signed(a[3:0]))   * 32'($signed(b[15:12]));
    case (cfg)
      ST_4X4:  p = p4x4;
      ST_8X8:  p = p8x8;
      ST_8X4:  p = p8x4;
      ST_16X8: p = p16x8;
      default: p = p16x16;
    endcase
  end

endmodule

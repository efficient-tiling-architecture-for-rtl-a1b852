// conv2d_pe: one processing element of the 2D-convolution accelerator.
//
// A PE owns one output channel. It holds an ST multiplier and a 32-bit
// accumulator (output stationary). `load` sets the accumulator to `init`
// (zero for a fresh output pixel, or the stored partial sum when partial
// results of an earlier input-channel tile are being continued); `en` adds the
// ST product of the current operand pair. Both take effect on the rising clock
// edge; `acc` is the registered sum. Reset (active low) clears the accumulator.
module conv2d_pe
  import conv2d_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  input  logic               load,
  input  logic signed [31:0] init,
  input  logic               en,
  input  logic [15:0]        a,
  input  logic [15:0]        b,
  input  logic [2:0]         cfg,
  output logic signed [31:0] acc
);

  logic signed [31:0] p;

  st_mult u_mult (.a(a), .b(b), .cfg(cfg), .p(p));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    acc <= '0;
    else if (load) acc <= init;
    else if (en)   acc <= acc + p;
  end

endmodule

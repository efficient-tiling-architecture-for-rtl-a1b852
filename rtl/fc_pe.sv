// fc_pe: processing element of the fully-connected accelerator.
//
// A PE owns one output neuron. It has two ST multipliers, each fed one pair of
// packed 16-bit operands (activations in a1/a2, weights in b1/b2), and a
// 32-bit accumulator that adds both products in the same clock, so one step
// consumes 2, 4 or 8 input activations at 16, 8 or 4 bits. `load` sets the
// accumulator to `init` (zero, or the partial sum of an earlier input tile);
// `en` accumulates. Both act on the rising clock edge; reset is active low.
// Two multipliers per PE follow the accelerator description; the accumulator
// width and the load/enable interface are this design's own choice.
module fc_pe (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               load,
  input  logic signed [31:0] init,
  input  logic               en,
  input  logic [15:0]        a1,
  input  logic [15:0]        b1,
  input  logic [15:0]        a2,
  input  logic [15:0]        b2,
  input  logic [2:0]         cfg,
  output logic signed [31:0] acc
);
  logic signed [31:0] p1, p2;

  st_mult u_m1 (.a(a1), .b(b1), .cfg(cfg), .p(p1));
  st_mult u_m2 (.a(a2), .b(b2), .cfg(cfg), .p(p2));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    acc <= '0;
    else if (load) acc <= init;
    else if (en)   acc <= acc + p1 + p2;
  end
endmodule

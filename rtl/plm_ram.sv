// plm_ram: private local memory (PLM) of the accelerator.
//
// One write port and one read port (1R1W), synchronous read with one cycle of
// latency, read-before-write when both ports hit the same word. A word holds
// LANES lanes of LANE_W bits, each with its own write enable; this models the
// interleaved (banked) memories that let all processing elements read or write
// their own output channel in the same cycle. With LANES = 1 it is a plain
// block RAM. The memory is not reset; whatever is read must have been written.
module plm_ram #(
  parameter int unsigned DEPTH  = 1024,
  parameter int unsigned LANES  = 1,
  parameter int unsigned LANE_W = 32,
  localparam int unsigned AW    = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic                      clk,
  input  logic [LANES-1:0]          we,
  input  logic [AW-1:0]             waddr,
  input  logic [LANES*LANE_W-1:0]   wdata,
  input  logic [AW-1:0]             raddr,
  output logic [LANES*LANE_W-1:0]   rdata
);

  logic [LANES-1:0][LANE_W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    rdata <= mem[raddr];
    for (int l = 0; l < LANES; l++)
      if (we[l]) mem[waddr][l] <= wdata[l*LANE_W +: LANE_W];
  end

endmodule

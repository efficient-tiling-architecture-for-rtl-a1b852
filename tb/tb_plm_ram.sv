// tb_plm_ram: self-checking test of the PLM model.
// A 4-lane, 64-word instance is written with random per-lane enables and read
// back; the bench keeps a shadow copy. Checks the one-cycle read latency, that
// disabled lanes keep their contents, and read-before-write on an address
// collision.
module tb_plm_ram;
  logic clk = 0;
  always #5 clk = ~clk;
  localparam int DEPTH = 64, LANES = 4, LW = 8;
  logic [LANES-1:0] we;
  logic [5:0] waddr, raddr;
  logic [LANES*LW-1:0] wdata, rdata;
  logic [LANES*LW-1:0] shadow [DEPTH];
  int checks = 0, failures = 0;

  plm_ram #(.DEPTH(DEPTH), .LANES(LANES), .LANE_W(LW)) dut (.*);

  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic [LANES*LW-1:0] exp;
    we = '0; waddr = 0; raddr = 0; wdata = 0;
    // fill every word
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge clk); we = '1; waddr = 6'(i); wdata = $urandom; shadow[i] = wdata;
    end
    @(negedge clk); we = '0;
    for (int n = 0; n < 4000; n++) begin
      @(negedge clk);
      we = 4'($urandom); waddr = 6'($urandom); wdata = $urandom;
      raddr = ($urandom % 4 == 0) ? waddr : 6'($urandom);
      exp = shadow[raddr];                 // value before this cycle's write
      for (int l = 0; l < LANES; l++) if (we[l]) shadow[waddr][l*LW +: LW] = wdata[l*LW +: LW];
      @(posedge clk); #1;
      checks++;
      if (rdata != exp) begin failures++; if (failures < 5) $display("FAIL n=%0d raddr=%0d rdata=%h exp=%h", n, raddr, rdata, exp); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

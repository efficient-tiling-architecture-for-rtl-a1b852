// tb_conv2d_pe: self-checking test of one processing element.
// Random sequences of load (with random initial values), accumulate and idle
// cycles in random precisions; a reference accumulator in the bench adds the
// expected ST product (computed here from the operand fields) and the
// registered sum is compared every cycle.
module tb_conv2d_pe;
  import conv2d_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic load, en;
  logic signed [31:0] init, acc;
  logic [15:0] a, b;
  logic [2:0] cfg;
  int checks = 0, failures = 0;
  int model;

  conv2d_pe dut (.*);

  function automatic int n4(logic [15:0] v, int i); return int'($signed(v[4*i +: 4])); endfunction
  function automatic int n8(logic [15:0] v, int i); return int'($signed(v[8*i +: 8])); endfunction
  function automatic int prod(logic [15:0] x, logic [15:0] y, logic [2:0] c);
    case (c)
      3'b001: return n4(x,3)*n4(y,0) + n4(x,2)*n4(y,1) + n4(x,1)*n4(y,2) + n4(x,0)*n4(y,3);
      3'b010: return n8(x,1)*n8(y,0) + n8(x,0)*n8(y,1);
      3'b011: return n8(x,1)*n4(y,0) + n8(x,0)*n4(y,2);
      3'b100: return int'($signed(x)) * n8(y,0);
      default: return int'($signed(x)) * int'($signed(y));
    endcase
  endfunction

  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    load = 0; en = 0; init = 0; a = 0; b = 0; cfg = 0; model = 0;
    repeat (2) @(posedge clk);
    #1 checks++; if (acc != 0) begin failures++; $display("FAIL reset value %0d", acc); end
    rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      load = ($urandom % 16 == 0);
      en   = ($urandom % 4 != 0);
      init = (($urandom % 2) != 0) ? 32'($urandom) : 32'sd0;
      a = 16'($urandom); b = 16'($urandom);
      if ($urandom % 32 == 0) cfg = 3'($urandom % 5);
      if (load) model = init;
      else if (en) model = model + prod(a, b, cfg);
      @(posedge clk); #1;
      checks++;
      if (acc != model) begin failures++; if (failures < 5) $display("FAIL n=%0d acc=%0d exp=%0d", n, acc, model); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

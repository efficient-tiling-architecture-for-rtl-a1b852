// tb_st_mult: self-checking test of the Sum-Together multiplier.
// Random and corner operands (all-ones, most negative fields) in all eight
// CONFIG codes; the expected product is built here from the 4-bit groups of
// the operands as listed in the configuration table (codes outside the table
// behave as 16x16).
module tb_st_mult;
  import conv2d_pkg::*;
  logic [15:0] a, b;
  logic [2:0]  cfg;
  logic signed [31:0] p;
  int checks = 0, failures = 0;

  st_mult dut (.a, .b, .cfg, .p);

  function automatic int n4(logic [15:0] v, int i); return int'($signed(v[4*i +: 4])); endfunction
  function automatic int n8(logic [15:0] v, int i); return int'($signed(v[8*i +: 8])); endfunction

  function automatic int ref_p(logic [15:0] x, logic [15:0] y, logic [2:0] c);
    case (c)
      3'b001: return n4(x,3)*n4(y,0) + n4(x,2)*n4(y,1) + n4(x,1)*n4(y,2) + n4(x,0)*n4(y,3);
      3'b010: return n8(x,1)*n8(y,0) + n8(x,0)*n8(y,1);
      3'b011: return n8(x,1)*n4(y,0) + n8(x,0)*n4(y,2);
      3'b100: return int'($signed(x)) * n8(y,0);
      default: return int'($signed(x)) * int'($signed(y));
    endcase
  endfunction

  initial begin
    #100000;
    failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic [15:0] corner [4];
    corner = '{16'h0000, 16'hffff, 16'h8888, 16'h7777};
    for (int c = 0; c < 8; c++) begin
      for (int i = 0; i < 4; i++) for (int j = 0; j < 4; j++) begin
        a = corner[i]; b = corner[j]; cfg = 3'(c); #1;
        checks++;
        if (p != ref_p(a, b, cfg)) begin failures++; $display("FAIL cfg=%b a=%h b=%h p=%0d exp=%0d", cfg, a, b, p, ref_p(a,b,cfg)); end
      end
      for (int n = 0; n < 500; n++) begin
        a = 16'($urandom); b = 16'($urandom); cfg = 3'(c); #1;
        checks++;
        if (p != ref_p(a, b, cfg)) begin failures++; $display("FAIL cfg=%b a=%h b=%h p=%0d exp=%0d", cfg, a, b, p, ref_p(a,b,cfg)); end
      end
    end
    // 4x4 mode is a 4-element dot product: (-8)*(-8)*4 = 256
    a = 16'h8888; b = 16'h8888; cfg = ST_4X4; #1;
    checks++; if (p != 256) begin failures++; $display("FAIL 4x4 corner %0d", p); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_requant: self-checking test of the output re-quantizer.
// Random accumulators and constants in the three output widths, with and
// without ReLU, plus directed cases: an identity scale (result equals the
// accumulator plus the zero point), rounding of a half, ReLU of a negative
// value, and saturation at both ends. The expected value is computed here with
// 128-bit arithmetic from the formula r = (acc - w_cross)*sf_iw + bias,
// q = round(r * sf_out_inv) + z_out, saturated.
module tb_requant;
  import conv2d_pkg::*;
  logic signed [31:0] acc, w_cross, sf_iw, bias, sf_out_inv, q;
  logic signed [15:0] z_out;
  logic en_relu;
  logic [1:0] config2;
  int checks = 0, failures = 0;
  int n_relu = 0, n_sat = 0;

  requant dut (.*);

  function automatic int expect_q();
    logic signed [127:0] r, s, t;
    longint qmax;
    int bits;
    bits = (config2 == 1) ? 4 : (config2 == 2) ? 8 : 16;
    qmax = (64'sd1 << (bits - 1)) - 1;
    r = (128'(acc) - 128'(w_cross)) * 128'(sf_iw) + 128'(bias);
    if (en_relu && r < 0) begin r = 0; n_relu++; end
    s = r * 128'(sf_out_inv);
    t = ((s + (128'sd1 <<< 31)) >>> 32) + 128'(z_out);
    if (t > 128'(qmax)) begin n_sat++; return int'(qmax); end
    if (t < -128'(qmax) - 1) begin n_sat++; return int'(-qmax - 1); end
    return int'(t);
  endfunction

  task automatic chk(int exp, string what);
    #1; checks++;
    if (q != exp) begin failures++; $display("FAIL %s: q=%0d exp=%0d", what, q, exp); end
  endtask

  initial begin
    #1000000;
    failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    // identity: sf_iw = 1.0, bias = 0, sf_out_inv = 1.0 -> acc + z
    acc = 100; w_cross = 0; sf_iw = 32'sh10000; bias = 0; sf_out_inv = 32'sh10000; z_out = 3; en_relu = 0; config2 = 0;
    chk(103, "identity");
    // cross-product removed
    w_cross = 40; chk(63, "w_cross");
    // half rounds up: 3 * 0.5 = 1.5 -> 2
    acc = 3; w_cross = 0; sf_out_inv = 32'sh8000; z_out = 0; chk(2, "round half");
    // relu of a negative value, then zero point
    acc = -50; sf_out_inv = 32'sh10000; en_relu = 1; z_out = 5; chk(5, "relu");
    // saturation at 4, 8 and 16 bits
    en_relu = 0; z_out = 0; acc = 1000; config2 = 1; chk(7, "sat4 hi");
    acc = -1000; chk(-8, "sat4 lo");
    acc = 1000; config2 = 2; chk(127, "sat8 hi");
    acc = -100000; config2 = 0; chk(-32768, "sat16 lo");
    for (int n = 0; n < 3000; n++) begin
      acc = 32'($urandom); if ($urandom % 2) acc = acc >>> 12;
      w_cross = int'($urandom_range(0, 4000)) - 2000;
      sf_iw = int'($urandom_range(1, 1 << 17));
      bias = 32'($urandom) >>> 8;
      sf_out_inv = int'($urandom_range(1, 1 << 18));
      z_out = 16'(int'($urandom_range(0, 40)) - 20);
      en_relu = 1'($urandom); config2 = 2'($urandom);
      chk(expect_q(), "random");
    end
    checks++;
    if (n_relu == 0 || n_sat == 0) begin failures++; $display("FAIL relu/saturation never exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

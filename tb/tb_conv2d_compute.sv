// tb_conv2d_compute: self-checking test of the computation phase.
// The packed operand memories, the accumulator buffer and the output PLM are
// modelled here as arrays with one cycle of read latency. Random packed
// operands are loaded, then two invocations run on the same tile: the first
// starts from zero and stores raw sums, the second continues the partial sums
// (acc_flag) and quantizes (q_flag). Each output is checked against a
// convolution computed here, and the cycle count against one MAC step per
// clock: n_h_out*n_w_out*(n_grp*kern*kern + 4) + 1 from start to done.
// Run at stride 1 and at stride 2 in two precisions.
module tb_conv2d_compute;
  import conv2d_pkg::*;
  localparam int PE = 16, NC = 16, NH = 18, NW = 18, KM = 7;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic start, done;
  logic [15:0] n_h_out, n_w_out, n_grp;
  logic [3:0] kern, stride;
  logic [2:0] config1;
  logic [1:0] config2;
  logic acc_flag, q_flag, relu_flag;
  logic signed [31:0] w_cross [PE], sf_iw [PE], bias [PE];
  logic signed [31:0] sf_out_inv;
  logic signed [15:0] z_out;
  logic [12:0] a_raddr; logic [15:0] a_rdata;
  logic [9:0]  b_raddr; logic [PE*16-1:0] b_rdata;
  logic [8:0]  acc_raddr, acc_waddr, out_waddr;
  logic [PE*32-1:0] acc_rdata, acc_wdata, out_wdata;
  logic [PE-1:0] acc_we, out_we;

  conv2d_compute dut (.*);

  logic [15:0]      amem [NH*NW*NC];
  logic [PE*16-1:0] bmem [KM*KM*NC];
  logic [PE*32-1:0] accmem [NH*NW];
  logic [PE*32-1:0] outmem [NH*NW];

  always @(posedge clk) begin
    a_rdata   <= amem[a_raddr];
    b_rdata   <= bmem[b_raddr];
    acc_rdata <= accmem[acc_raddr];
    for (int p = 0; p < PE; p++) begin
      if (acc_we[p]) accmem[acc_waddr][p*32 +: 32] <= acc_wdata[p*32 +: 32];
      if (out_we[p]) outmem[out_waddr][p*32 +: 32] <= out_wdata[p*32 +: 32];
    end
  end

  int checks = 0, failures = 0;

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
  function automatic int quant(int acc, int wc, int sf, int bs, int sfo, int zo, bit relu, int c2);
    logic signed [127:0] r, s, t;
    longint qmax;
    int bits;
    bits = (c2 == 1) ? 4 : (c2 == 2) ? 8 : 16;
    qmax = (64'sd1 << (bits - 1)) - 1;
    r = (128'(acc) - 128'(wc)) * 128'(sf) + 128'(bs);
    if (relu && r < 0) r = 0;
    s = r * 128'(sfo);
    t = ((s + (128'sd1 <<< 31)) >>> 32) + 128'(zo);
    if (t > 128'(qmax)) return int'(qmax);
    if (t < -128'(qmax) - 1) return int'(-qmax - 1);
    return int'(t);
  endfunction

  task automatic run(int hin, int win, int k, int s, int grp, int c1);
    int ho, wo, cyc, exp_cyc;
    int ref_acc [PE][NH][NW];
    ho = (hin - k) / s + 1; wo = (win - k) / s + 1;
    foreach (amem[i]) amem[i] = 16'($urandom);
    foreach (bmem[i]) bmem[i] = {PE{16'($urandom)}} ^ {$urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom};
    for (int p = 0; p < PE; p++) begin
      w_cross[p] = int'($urandom_range(0, 200)) - 100; sf_iw[p] = int'($urandom_range(1, 4000)); bias[p] = int'($urandom_range(0, 1 << 16)) - (1 << 15);
    end
    sf_out_inv = 32'sh10000; z_out = 2;
    for (int p = 0; p < PE; p++)
      for (int oh = 0; oh < ho; oh++) for (int ow = 0; ow < wo; ow++) begin
        ref_acc[p][oh][ow] = 0;
        for (int g = 0; g < grp; g++) for (int kh = 0; kh < k; kh++) for (int kw = 0; kw < k; kw++)
          ref_acc[p][oh][ow] += prod(amem[NC * (NW * (oh*s + kh) + ow*s + kw) + g],
                                     bmem[NC * (KM * kh + kw) + g][p*16 +: 16], 3'(c1));
      end
    n_h_out = 16'(ho); n_w_out = 16'(wo); n_grp = 16'(grp); kern = 4'(k); stride = 4'(s); config1 = 3'(c1);
    config2 = 2'd0; relu_flag = 1'b1;
    // two passes: fresh + raw, then accumulate + quantize
    for (int pass = 0; pass < 2; pass++) begin
      acc_flag = (pass == 1); q_flag = (pass == 1);
      @(negedge clk); start = 1; @(negedge clk); start = 0;
      cyc = 1;
      while (!done) begin @(negedge clk); cyc++; end
      exp_cyc = ho * wo * (grp * k * k + 4) + 1;
      checks++;
      if (cyc != exp_cyc) begin failures++; $display("FAIL cycles %0d expected %0d", cyc, exp_cyc); end
      @(negedge clk);
      for (int p = 0; p < PE; p++)
        for (int oh = 0; oh < ho; oh++) for (int ow = 0; ow < wo; ow++) begin
          int e, got;
          e = (pass == 0) ? ref_acc[p][oh][ow]
                          : quant(2 * ref_acc[p][oh][ow], w_cross[p], sf_iw[p], bias[p], sf_out_inv, z_out, 1'b1, 0);
          got = int'($signed(outmem[NW * oh + ow][p*32 +: 32]));
          checks++;
          if (got != e) begin failures++; if (failures < 8) $display("FAIL pass%0d p=%0d (%0d,%0d) got %0d exp %0d", pass, p, oh, ow, got, e); end
        end
    end
  endtask

  initial begin
    repeat (2_000_000) @(posedge clk);
    failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    start = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    run(6, 5, 3, 1, 2, 0);   // 16x16, 2 input channels
    run(7, 8, 3, 2, 3, 1);   // 4x4 packed, 12 input channels, stride 2
    run(4, 4, 2, 1, 4, 3);   // 8x4 packed
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

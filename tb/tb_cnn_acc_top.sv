// tb_cnn_acc_top: end-to-end test of the whole design (cnn_acc_top) with every
// parameter at its default.
//
// Each of the three accelerator sockets gets its own external memory and DMA
// engine (dma_mem_model, random stalls on every channel), and the three run
// at the same time:
//   2D convolution - an 8x8x16 input, 4 filters of 3x3x16, no padding, 4-bit
//                    MACs (four channels per ST operand), 8-bit quantized
//                    output with ReLU, in one tile; then the same layer at
//                    16-bit precision split into two input-channel tiles of 8
//                    whose partial sums are added on chip
//   depthwise      - a 16x16x16 input, 3x3 kernels, padding 1, 8-bit MACs,
//                    quantized 8-bit output
//   fully connected - 1024 inputs, 16 outputs, 4-bit MACs, in two input tiles
//                    of 512 accumulated on chip, raw 32-bit outputs
// Every output word is compared with a result computed here at the same
// operand precision. Counted mechanisms, each of which must occur: all three
// accelerators finishing, all three busy in the same clock, stalls on every
// socket, quantization, ReLU clamping, partial-sum accumulation, and raw
// outputs.
module tb_cnn_acc_top;
  import conv2d_pkg::*;

  localparam int W_BASE = 16384, O_BASE = 32768, Q_BASE = 61440;

  logic clk = 1'b0, rst = 1'b0;
  always #5 clk = ~clk;
  logic stalls_on = 1'b1;

  // one socket per accelerator
  conf_info_t  c2d_conf_info_dat, dw_conf_info_dat, fc_conf_info_dat;
  logic        c2d_conf_info_vld, dw_conf_info_vld, fc_conf_info_vld;
  logic        c2d_conf_info_rdy, dw_conf_info_rdy, fc_conf_info_rdy;
  dma_info_t   c2d_dma_read_ctrl_dat, dw_dma_read_ctrl_dat, fc_dma_read_ctrl_dat;
  logic        c2d_dma_read_ctrl_vld, dw_dma_read_ctrl_vld, fc_dma_read_ctrl_vld;
  logic        c2d_dma_read_ctrl_rdy, dw_dma_read_ctrl_rdy, fc_dma_read_ctrl_rdy;
  logic [63:0] c2d_dma_read_chnl_dat, dw_dma_read_chnl_dat, fc_dma_read_chnl_dat;
  logic        c2d_dma_read_chnl_vld, dw_dma_read_chnl_vld, fc_dma_read_chnl_vld;
  logic        c2d_dma_read_chnl_rdy, dw_dma_read_chnl_rdy, fc_dma_read_chnl_rdy;
  dma_info_t   c2d_dma_write_ctrl_dat, dw_dma_write_ctrl_dat, fc_dma_write_ctrl_dat;
  logic        c2d_dma_write_ctrl_vld, dw_dma_write_ctrl_vld, fc_dma_write_ctrl_vld;
  logic        c2d_dma_write_ctrl_rdy, dw_dma_write_ctrl_rdy, fc_dma_write_ctrl_rdy;
  logic [63:0] c2d_dma_write_chnl_dat, dw_dma_write_chnl_dat, fc_dma_write_chnl_dat;
  logic        c2d_dma_write_chnl_vld, dw_dma_write_chnl_vld, fc_dma_write_chnl_vld;
  logic        c2d_dma_write_chnl_rdy, dw_dma_write_chnl_rdy, fc_dma_write_chnl_rdy;
  logic        c2d_acc_done, dw_acc_done, fc_acc_done;

  cnn_acc_top dut (.*);

  dma_mem_model u_mem_c2d (
    .clk, .stalls_on,
    .dma_read_ctrl_dat(c2d_dma_read_ctrl_dat), .dma_read_ctrl_vld(c2d_dma_read_ctrl_vld), .dma_read_ctrl_rdy(c2d_dma_read_ctrl_rdy),
    .dma_read_chnl_dat(c2d_dma_read_chnl_dat), .dma_read_chnl_vld(c2d_dma_read_chnl_vld), .dma_read_chnl_rdy(c2d_dma_read_chnl_rdy),
    .dma_write_ctrl_dat(c2d_dma_write_ctrl_dat), .dma_write_ctrl_vld(c2d_dma_write_ctrl_vld), .dma_write_ctrl_rdy(c2d_dma_write_ctrl_rdy),
    .dma_write_chnl_dat(c2d_dma_write_chnl_dat), .dma_write_chnl_vld(c2d_dma_write_chnl_vld), .dma_write_chnl_rdy(c2d_dma_write_chnl_rdy));
  dma_mem_model u_mem_dw (
    .clk, .stalls_on,
    .dma_read_ctrl_dat(dw_dma_read_ctrl_dat), .dma_read_ctrl_vld(dw_dma_read_ctrl_vld), .dma_read_ctrl_rdy(dw_dma_read_ctrl_rdy),
    .dma_read_chnl_dat(dw_dma_read_chnl_dat), .dma_read_chnl_vld(dw_dma_read_chnl_vld), .dma_read_chnl_rdy(dw_dma_read_chnl_rdy),
    .dma_write_ctrl_dat(dw_dma_write_ctrl_dat), .dma_write_ctrl_vld(dw_dma_write_ctrl_vld), .dma_write_ctrl_rdy(dw_dma_write_ctrl_rdy),
    .dma_write_chnl_dat(dw_dma_write_chnl_dat), .dma_write_chnl_vld(dw_dma_write_chnl_vld), .dma_write_chnl_rdy(dw_dma_write_chnl_rdy));
  dma_mem_model u_mem_fc (
    .clk, .stalls_on,
    .dma_read_ctrl_dat(fc_dma_read_ctrl_dat), .dma_read_ctrl_vld(fc_dma_read_ctrl_vld), .dma_read_ctrl_rdy(fc_dma_read_ctrl_rdy),
    .dma_read_chnl_dat(fc_dma_read_chnl_dat), .dma_read_chnl_vld(fc_dma_read_chnl_vld), .dma_read_chnl_rdy(fc_dma_read_chnl_rdy),
    .dma_write_ctrl_dat(fc_dma_write_ctrl_dat), .dma_write_ctrl_vld(fc_dma_write_ctrl_vld), .dma_write_ctrl_rdy(fc_dma_write_ctrl_rdy),
    .dma_write_chnl_dat(fc_dma_write_chnl_dat), .dma_write_chnl_vld(fc_dma_write_chnl_vld), .dma_write_chnl_rdy(fc_dma_write_chnl_rdy));

  int checks = 0, failures = 0;
  int m_c2d_done = 0, m_dw_done = 0, m_fc_done = 0, m_all_busy = 0;
  int m_quant = 0, m_relu = 0, m_acc = 0, m_raw = 0;

  always @(posedge clk) begin
    if (c2d_acc_done) m_c2d_done++;
    if (dw_acc_done)  m_dw_done++;
    if (fc_acc_done)  m_fc_done++;
    if (!c2d_conf_info_rdy && !dw_conf_info_rdy && !fc_conf_info_rdy && rst) m_all_busy++;
  end

  // ------------------------------------------------------------------ reference arithmetic
  function automatic int xval(logic [31:0] wd, int c1);
    case (c1)
      1:       return int'($signed(wd[3:0]));
      2, 3:    return int'($signed(wd[7:0]));
      default: return int'($signed(wd[15:0]));
    endcase
  endfunction
  function automatic int wval(logic [31:0] wd, int c1);
    case (c1)
      1, 3:    return int'($signed(wd[3:0]));
      2, 4:    return int'($signed(wd[7:0]));
      default: return int'($signed(wd[15:0]));
    endcase
  endfunction
  function automatic int quant(int acc, int wc, int sf, int bs, int sfo, int zo, bit relu, int c2);
    logic signed [127:0] r, s, t;
    longint qmax;
    int bits;
    bits = (c2 == 1) ? 4 : (c2 == 2) ? 8 : 16;
    qmax = (64'sd1 << (bits - 1)) - 1;
    r = (128'(acc) - 128'(wc)) * 128'(sf) + 128'(bs);
    if (relu && r < 0) begin r = 0; m_relu++; end
    s = r * 128'(sfo);
    t = ((s + (128'sd1 <<< 31)) >>> 32) + 128'(zo);
    if (t > 128'(qmax))      return int'(qmax);
    if (t < -128'(qmax) - 1) return int'(-qmax - 1);
    return int'(t);
  endfunction
  function automatic logic [31:0] rnd_word();
    return (($urandom % 2) != 0) ? 32'($urandom) : {16'($urandom), 16'($signed(8'($urandom)))};
  endfunction

  // ------------------------------------------------------------------ 2D convolution
  task automatic run_c2d(int c1, int c2, bit q_en, int cin_t, string name);
    localparam int H = 8, WD = 8, CI = 16, CO = 4, K = 3, HO = 6, WO = 6;
    int exp_out [CO * HO * WO];
    int wc [CO], sf [CO], bs [CO];
    int sfo, zo, errs;
    for (int i = 0; i < CI * H * WD; i++) u_mem_c2d.mem[i] = rnd_word();
    for (int i = 0; i < CO * CI * K * K; i++) u_mem_c2d.mem[W_BASE + i] = rnd_word();
    for (int i = 0; i < CO * HO * WO; i++) u_mem_c2d.mem[O_BASE + i] = 32'h0bad_0bad;
    for (int co = 0; co < CO; co++) begin
      wc[co] = int'($urandom_range(0, 200)) - 100;
      sf[co] = int'($urandom_range(8, 300));
      bs[co] = int'($urandom_range(0, 1 << 21)) - (1 << 20);
      u_mem_c2d.mem[Q_BASE + co] = wc[co]; u_mem_c2d.mem[Q_BASE + CO + co] = sf[co];
      u_mem_c2d.mem[Q_BASE + 2 * CO + co] = bs[co];
    end
    sfo = int'($urandom_range(1 << 12, 1 << 15)); zo = 3;
    u_mem_c2d.mem[Q_BASE + 3 * CO] = sfo; u_mem_c2d.mem[Q_BASE + 3 * CO + 1] = zo;
    for (int co = 0; co < CO; co++)
      for (int oh = 0; oh < HO; oh++)
        for (int ow = 0; ow < WO; ow++) begin
          int acc;
          acc = 0;
          for (int ci = 0; ci < CI; ci++)
            for (int kh = 0; kh < K; kh++)
              for (int kw = 0; kw < K; kw++)
                acc += xval(u_mem_c2d.mem[(ci * H + oh + kh) * WD + ow + kw], c1)
                     * wval(u_mem_c2d.mem[W_BASE + ((co * CI + ci) * K + kh) * K + kw], c1);
          exp_out[(co * HO + oh) * WO + ow] = q_en ? quant(acc, wc[co], sf[co], bs[co], sfo, zo, 1'b1, c2) : acc;
        end
    for (int ci0 = 0; ci0 < CI; ci0 += cin_t) begin
      conf_info_t c;
      bit last;
      last = (ci0 + cin_t >= CI);
      c = '0;
      c.in_add = ci0 * H * WD; c.w_add = W_BASE + ci0 * K * K; c.out_add = O_BASE;
      c.flags = {29'd0, 1'b1, ci0 > 0, q_en && last};
      c.n_w = WD; c.n_h = H; c.n_c = cin_t;
      c.pad_stride_kern = {16'd0, 4'(K), 4'd0, 4'd1, 4'd0};
      c.filt = CO; c.offset_pe_out = HO * WO; c.offset_pe = CI * K * K;
      c.options = {24'd0, 2'd0, 2'(c2), 1'b0, 3'(c1)};
      c.offset_q_data = Q_BASE; c.offset_read_ci = H * WD;
      if (ci0 > 0) m_acc++;
      if (c.flags[0]) m_quant++; else m_raw++;
      @(posedge clk);
      c2d_conf_info_dat <= c; c2d_conf_info_vld <= 1'b1;
      do @(posedge clk); while (!c2d_conf_info_rdy);
      c2d_conf_info_vld <= 1'b0;
      while (!c2d_acc_done) @(posedge clk);
    end
    errs = 0;
    for (int i = 0; i < CO * HO * WO; i++) begin
      checks++;
      if (u_mem_c2d.mem[O_BASE + i] != 32'(exp_out[i])) begin
        failures++; errs++;
        if (errs <= 5) $display("FAIL %s out[%0d] = %0d expected %0d", name, i, $signed(u_mem_c2d.mem[O_BASE + i]), exp_out[i]);
      end
    end
    $display("2D convolution %s: %0d mismatches", name, errs);
  endtask

  // ------------------------------------------------------------------ depthwise convolution
  task automatic run_dw();
    localparam int H = 16, WD = 16, CH = 16, K = 3, P = 1, HO = 16, WO = 16, C1 = 2, C2 = 2;
    int exp_out [CH * HO * WO];
    int wc [CH], sf [CH], bs [CH];
    int sfo, zo, errs;
    conf_info_t c;
    for (int i = 0; i < CH * H * WD; i++) u_mem_dw.mem[i] = rnd_word();
    for (int i = 0; i < CH * K * K; i++) u_mem_dw.mem[W_BASE + i] = rnd_word();
    for (int ch = 0; ch < CH; ch++) begin
      wc[ch] = int'($urandom_range(0, 200)) - 100;
      sf[ch] = int'($urandom_range(8, 300));
      bs[ch] = int'($urandom_range(0, 1 << 21)) - (1 << 20);
      u_mem_dw.mem[Q_BASE + ch] = wc[ch]; u_mem_dw.mem[Q_BASE + CH + ch] = sf[ch];
      u_mem_dw.mem[Q_BASE + 2 * CH + ch] = bs[ch];
    end
    sfo = int'($urandom_range(1 << 12, 1 << 15)); zo = -2;
    u_mem_dw.mem[Q_BASE + 3 * CH] = sfo; u_mem_dw.mem[Q_BASE + 3 * CH + 1] = zo;
    for (int ch = 0; ch < CH; ch++)
      for (int oh = 0; oh < HO; oh++)
        for (int ow = 0; ow < WO; ow++) begin
          int acc;
          acc = 0;
          for (int kh = 0; kh < K; kh++)
            for (int kw = 0; kw < K; kw++) begin
              int ih, iw;
              ih = oh + kh - P; iw = ow + kw - P;
              if (ih >= 0 && ih < H && iw >= 0 && iw < WD)
                acc += xval(u_mem_dw.mem[(ch * H + ih) * WD + iw], C1)
                     * wval(u_mem_dw.mem[W_BASE + (ch * K + kh) * K + kw], C1);
            end
          exp_out[(ch * HO + oh) * WO + ow] = quant(acc, wc[ch], sf[ch], bs[ch], sfo, zo, 1'b0, C2);
        end
    c = '0;
    c.in_add = 0; c.w_add = W_BASE; c.out_add = O_BASE;
    c.flags = 32'd1;
    c.n_w = WD; c.n_h = H; c.n_c = CH;
    c.pad_stride_kern = {16'd0, 4'(K), 4'd4, 4'd1, 4'(P)};
    c.offset_pe_out = HO * WO; c.offset_pe = K * K;
    c.options = {24'd0, 2'd0, 2'(C2), 1'b0, 3'(C1)};
    c.offset_q_data = Q_BASE; c.offset_read_ci = H * WD;
    m_quant++;
    @(posedge clk);
    dw_conf_info_dat <= c; dw_conf_info_vld <= 1'b1;
    do @(posedge clk); while (!dw_conf_info_rdy);
    dw_conf_info_vld <= 1'b0;
    while (!dw_acc_done) @(posedge clk);
    errs = 0;
    for (int i = 0; i < CH * HO * WO; i++) begin
      checks++;
      if (u_mem_dw.mem[O_BASE + i] != 32'(exp_out[i])) begin
        failures++; errs++;
        if (errs <= 5) $display("FAIL dw out[%0d] = %0d expected %0d", i, $signed(u_mem_dw.mem[O_BASE + i]), exp_out[i]);
      end
    end
    $display("depthwise convolution: %0d mismatches", errs);
  endtask

  // ------------------------------------------------------------------ fully connected
  task automatic run_fc();
    localparam int N = 1024, M = 16, NT = 512, C1 = 1;
    int exp_out [M];
    int errs;
    for (int i = 0; i < N; i++) u_mem_fc.mem[i] = rnd_word();
    for (int i = 0; i < M * N; i++) u_mem_fc.mem[W_BASE + i] = rnd_word();
    for (int m = 0; m < M; m++) begin
      int acc;
      acc = 0;
      for (int i = 0; i < N; i++) acc += xval(u_mem_fc.mem[i], C1) * wval(u_mem_fc.mem[W_BASE + m * N + i], C1);
      exp_out[m] = acc;
    end
    for (int n0 = 0; n0 < N; n0 += NT) begin
      conf_info_t c;
      c = '0;
      c.in_add = n0; c.w_add = W_BASE + n0; c.out_add = O_BASE;
      c.flags = {30'd0, n0 > 0, 1'b0};
      c.n_c = NT; c.filt = M; c.offset_pe = N;
      c.options = {24'd0, 2'd0, 2'd0, 1'b0, 3'(C1)};
      if (n0 > 0) m_acc++;
      m_raw++;
      @(posedge clk);
      fc_conf_info_dat <= c; fc_conf_info_vld <= 1'b1;
      do @(posedge clk); while (!fc_conf_info_rdy);
      fc_conf_info_vld <= 1'b0;
      while (!fc_acc_done) @(posedge clk);
    end
    errs = 0;
    for (int m = 0; m < M; m++) begin
      checks++;
      if (u_mem_fc.mem[O_BASE + m] != 32'(exp_out[m])) begin
        failures++; errs++;
        $display("FAIL fc y[%0d] = %0d expected %0d", m, $signed(u_mem_fc.mem[O_BASE + m]), exp_out[m]);
      end
    end
    $display("fully connected: %0d mismatches", errs);
  endtask

  initial begin
    repeat (1_000_000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    c2d_conf_info_vld = 1'b0; dw_conf_info_vld = 1'b0; fc_conf_info_vld = 1'b0;
    c2d_conf_info_dat = '0; dw_conf_info_dat = '0; fc_conf_info_dat = '0;
    foreach (u_mem_c2d.mem[i]) begin u_mem_c2d.mem[i] = '0; u_mem_dw.mem[i] = '0; u_mem_fc.mem[i] = '0; end
    repeat (3) @(posedge clk);
    rst = 1'b1;

    fork
      begin
        run_c2d(1, 2, 1'b1, 16, "4-bit, one tile");
        run_c2d(0, 0, 1'b0, 8, "16-bit, two input-channel tiles");
      end
      run_dw();
      run_fc();
    join
    repeat (2) @(posedge clk);

    begin
      int mech [string];
      mech["conv2d_done"] = m_c2d_done; mech["dwconv_done"] = m_dw_done; mech["fc_done"] = m_fc_done;
      mech["all_three_busy"] = m_all_busy; mech["quantize"] = m_quant; mech["relu_clamp"] = m_relu;
      mech["accumulate"] = m_acc; mech["raw_output"] = m_raw;
      mech["c2d_read_stall"] = u_mem_c2d.n_rd_stall; mech["c2d_write_stall"] = u_mem_c2d.n_wr_stall;
      mech["dw_read_stall"] = u_mem_dw.n_rd_stall; mech["dw_write_stall"] = u_mem_dw.n_wr_stall;
      mech["fc_read_stall"] = u_mem_fc.n_rd_stall; mech["fc_write_stall"] = u_mem_fc.n_wr_stall;
      foreach (mech[k]) begin
        $display("mechanism %-16s %0d", k, mech[k]);
        checks++;
        if (mech[k] == 0) begin failures++; $display("FAIL mechanism %s never happened", k); end
      end
    end
    checks++;
    if (u_mem_c2d.errors + u_mem_dw.errors + u_mem_fc.errors != 0) begin
      failures++; $display("FAIL socket protocol errors");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

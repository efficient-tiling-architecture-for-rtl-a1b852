// tb_mobilenet_last: the last convolution layer of MobileNet (3x3x256 input,
// 256 filters of 1x1, stride 1, no padding) run in full on the 2D-convolution
// accelerator at its default parameters.
//
// The layer is far larger than the on-chip memories in both channel
// dimensions, so a tiling driver splits it into 16 output-channel tiles x 16
// input-channel tiles = 256 invocations of 3x3x16 inputs and 1x1x16x16
// weights. Inside one output-channel tile the first input-channel tile starts
// from zero, the other 15 continue the on-chip partial sums, and only the last
// quantizes to 8 bits with ReLU. MACs run at 8 bits (two channels per ST
// operand). External memory and the DMA engine are dma_mem_model with random
// stalls. Every one of the 2304 outputs is compared with a convolution
// computed here. Counted mechanisms, each of which must occur: accumulation,
// quantization, ReLU clamping, read and write stalls, and all 256 tiles.
module tb_mobilenet_last;
  import conv2d_pkg::*;

  localparam int H = 3, WD = 3, CI = 256, CO = 256, T = 16, C1 = 2, C2 = 2;
  localparam int W_BASE = 4096, O_BASE = 73728, Q_BASE = 81920;

  logic clk = 1'b0, rst = 1'b0;
  always #5 clk = ~clk;

  conf_info_t           conf_info_dat;
  logic                 conf_info_vld, conf_info_rdy;
  dma_info_t            dma_read_ctrl_dat, dma_write_ctrl_dat;
  logic                 dma_read_ctrl_vld, dma_read_ctrl_rdy;
  logic [63:0]          dma_read_chnl_dat;
  logic                 dma_read_chnl_vld, dma_read_chnl_rdy;
  logic                 dma_write_ctrl_vld, dma_write_ctrl_rdy;
  logic [63:0]          dma_write_chnl_dat;
  logic                 dma_write_chnl_vld, dma_write_chnl_rdy;
  logic                 acc_done;
  logic                 stalls_on = 1'b1;

  conv2d_acc dut (.*);
  dma_mem_model u_mem (.*);

  int checks = 0, failures = 0;
  int m_acc = 0, m_quant = 0, m_relu = 0, m_tiles = 0;

  function automatic int val8(logic [7:0] b);
    return int'($signed(b));
  endfunction
  function automatic int quant(int acc, int wc, int sf, int bs, int sfo, int zo);
    logic signed [127:0] r, s, t;
    r = (128'(acc) - 128'(wc)) * 128'(sf) + 128'(bs);
    if (r < 0) begin r = 0; m_relu++; end
    s = r * 128'(sfo);
    t = ((s + (128'sd1 <<< 31)) >>> 32) + 128'(zo);
    if (t > 127)  return 127;
    if (t < -128) return -128;
    return int'(t);
  endfunction

  initial begin
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int exp_out [CO * H * WD];
    int wc [CO], sf [CO], bs [CO];
    int sfo, zo, errs;
    conf_info_vld = 1'b0; conf_info_dat = '0;
    foreach (u_mem.mem[i]) u_mem.mem[i] = '0;
    for (int i = 0; i < CI * H * WD; i++) u_mem.mem[i] = $urandom;
    for (int i = 0; i < CO * CI; i++) u_mem.mem[W_BASE + i] = $urandom;
    for (int i = 0; i < CO * H * WD; i++) u_mem.mem[O_BASE + i] = 32'h0bad_0bad;
    for (int co = 0; co < CO; co++) begin
      wc[co] = int'($urandom_range(0, 2000)) - 1000;
      sf[co] = int'($urandom_range(8, 300));
      bs[co] = int'($urandom_range(0, 1 << 21)) - (1 << 20);
    end
    sfo = int'($urandom_range(1 << 10, 1 << 13)); zo = -1;
    for (int cot = 0; cot < CO / T; cot++) begin
      int qa;
      qa = Q_BASE + cot * (3 * T + 2);
      for (int i = 0; i < T; i++) begin
        u_mem.mem[qa + i] = wc[cot * T + i]; u_mem.mem[qa + T + i] = sf[cot * T + i];
        u_mem.mem[qa + 2 * T + i] = bs[cot * T + i];
      end
      u_mem.mem[qa + 3 * T] = sfo; u_mem.mem[qa + 3 * T + 1] = zo;
    end
    for (int co = 0; co < CO; co++)
      for (int p = 0; p < H * WD; p++) begin
        int acc;
        acc = 0;
        for (int ci = 0; ci < CI; ci++) acc += val8(u_mem.mem[ci * H * WD + p][7:0]) * val8(u_mem.mem[W_BASE + co * CI + ci][7:0]);
        exp_out[co * H * WD + p] = quant(acc, wc[co], sf[co], bs[co], sfo, zo);
      end

    repeat (3) @(posedge clk);
    rst = 1'b1;

    for (int cot = 0; cot < CO / T; cot++)
      for (int cit = 0; cit < CI / T; cit++) begin
        conf_info_t c;
        c = '0;
        c.in_add          = cit * T * H * WD;
        c.w_add           = W_BASE + cot * T * CI + cit * T;
        c.out_add         = O_BASE + cot * T * H * WD;
        c.flags           = {29'd0, 1'b1, cit > 0, cit == CI / T - 1};
        c.n_w             = WD;
        c.n_h             = H;
        c.n_c             = T;
        c.pad_stride_kern = {16'd0, 4'd1, 4'd0, 4'd1, 4'd0};
        c.filt            = T;
        c.offset_pe_out   = H * WD;
        c.offset_pe       = CI;
        c.options         = {24'd0, 2'd0, 2'(C2), 1'b0, 3'(C1)};
        c.offset_q_data   = Q_BASE + cot * (3 * T + 2);
        c.offset_read_ci  = H * WD;
        if (cit > 0) m_acc++;
        if (c.flags[0]) m_quant++;
        @(posedge clk);
        conf_info_dat <= c; conf_info_vld <= 1'b1;
        do @(posedge clk); while (!conf_info_rdy);
        conf_info_vld <= 1'b0;
        while (!acc_done) @(posedge clk);
        m_tiles++;
      end

    errs = 0;
    for (int i = 0; i < CO * H * WD; i++) begin
      checks++;
      if (u_mem.mem[O_BASE + i] != 32'(exp_out[i])) begin
        failures++; errs++;
        if (errs <= 5) $display("FAIL out[%0d] = %0d expected %0d", i, $signed(u_mem.mem[O_BASE + i]), exp_out[i]);
      end
    end
    $display("MobileNet last layer 3x3x256 -> 3x3x256: %0d tiles, %0d mismatches", m_tiles, errs);

    begin
      int mech [string];
      mech["accumulate"] = m_acc; mech["quantize"] = m_quant; mech["relu_clamp"] = m_relu;
      mech["dma_read_stall"] = u_mem.n_rd_stall; mech["dma_write_stall"] = u_mem.n_wr_stall;
      mech["all_256_tiles"] = (m_tiles == 256) ? 1 : 0;
      foreach (mech[k]) begin
        $display("mechanism %-16s %0d", k, mech[k]);
        checks++;
        if (mech[k] == 0) begin failures++; $display("FAIL mechanism %s never happened", k); end
      end
    end
    checks++;
    if (u_mem.errors != 0) begin failures++; $display("FAIL %0d socket protocol errors", u_mem.errors); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

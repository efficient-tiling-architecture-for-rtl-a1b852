// tb_fc_acc: end-to-end test of the fully-connected accelerator at its
// default sizes (16 output-neuron PEs, up to 1024 input activations per tile).
//
// External memory and the DMA engine are dma_mem_model, with random stalls on
// every channel. A tiling driver splits each layer y = W x into tiles of at
// most 16 output neurons (outer loop) and, inside, tiles of the input vector
// (inner loop): the first input tile starts from zero, later ones continue the
// on-chip partial sums (acc_flag), and only the last is quantized. The output
// vector is compared with a product computed here at the same operand
// precision, with the same re-quantization arithmetic. Layers cover every MAC
// precision, input lengths that fill the last operand pair only partly,
// accumulation over input tiles, quantization with ReLU and saturation, raw
// outputs and a tile with the maximum input length. Each mechanism is counted
// and must occur. On runs without stalls the compute phase is checked to take
// exactly one clock per step of 2, 4 or 8 activations.
module tb_fc_acc;
  import conv2d_pkg::*;

  localparam int W_BASE = 4096, O_BASE = 57344, Q_BASE = 61440;

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

  fc_acc dut (.*);
  dma_mem_model u_mem (.*);

  int checks = 0, failures = 0;

  int m_cfg [5];
  int m_quant = 0, m_relu = 0, m_sat = 0, m_raw_out = 0, m_partial_step = 0;
  int m_acc = 0, m_m_tiles = 0, m_tiles = 0, m_full_size = 0, m_timed = 0;

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
    if (t > 128'(qmax))       begin m_sat++; return int'(qmax); end
    if (t < -128'(qmax) - 1)  begin m_sat++; return int'(-qmax - 1); end
    return int'(t);
  endfunction

  // clock of the PE load and of the last accumulate step of an invocation
  int t_now = 0, t_load = 0, t_last_en = 0;
  always @(posedge clk) begin
    t_now++;
    if (dut.pe_load) t_load = t_now;
    if (dut.d_en)    t_last_en = t_now;
  end

  task automatic invoke(conf_info_t c);
    @(posedge clk);
    conf_info_dat <= c; conf_info_vld <= 1'b1;
    do @(posedge clk); while (!conf_info_rdy);
    conf_info_vld <= 1'b0;
    while (!acc_done) @(posedge clk);
    m_tiles++;
  endtask

  typedef struct {
    int n, m, c1, c2; bit q_en, relu;
    int n_t, m_t;
  } layer_t;

  task automatic run_layer(layer_t L, string name);
    int lanes, errs, sfo, zo;
    int exp_out [];
    int wc [], sf [], bs [];
    lanes = (L.c1 == 1) ? 4 : (L.c1 == 2 || L.c1 == 3) ? 2 : 1;
    exp_out = new[L.m];
    wc = new[L.m]; sf = new[L.m]; bs = new[L.m];

    for (int i = 0; i < L.n; i++)
      u_mem.mem[i] = (($urandom % 2) != 0) ? 32'($urandom) : {16'($urandom), 16'($signed(8'($urandom)))};
    for (int i = 0; i < L.m * L.n; i++)
      u_mem.mem[W_BASE + i] = (($urandom % 2) != 0) ? 32'($urandom) : {16'($urandom), 16'($signed(8'($urandom)))};
    for (int i = 0; i < L.m; i++) u_mem.mem[O_BASE + i] = 32'h0bad_0bad;
    for (int i = 0; i < L.m; i++) begin
      wc[i] = int'($urandom_range(0, 2000)) - 1000;
      sf[i] = int'($urandom_range(8, 300));
      bs[i] = int'($urandom_range(0, 1 << 21)) - (1 << 20);
    end
    sfo = int'($urandom_range(1 << 12, 1 << 15));
    zo  = int'($urandom_range(0, 10)) - 5;

    for (int mo = 0; mo < L.m; mo++) begin
      int acc;
      acc = 0;
      for (int i = 0; i < L.n; i++)
        acc += xval(u_mem.mem[i], L.c1) * wval(u_mem.mem[W_BASE + mo * L.n + i], L.c1);
      exp_out[mo] = L.q_en ? quant(acc, wc[mo], sf[mo], bs[mo], sfo, zo, L.relu, L.c2) : acc;
    end

    // tiling driver: output neurons outside, input activations inside
    for (int m0 = 0, mt = 0; m0 < L.m; m0 += L.m_t, mt++) begin
      int nm, qa;
      nm = (m0 + L.m_t > L.m) ? L.m - m0 : L.m_t;
      qa = Q_BASE + mt * (3 * 16 + 2);
      for (int i = 0; i < nm; i++) begin
        u_mem.mem[qa + i] = wc[m0 + i]; u_mem.mem[qa + nm + i] = sf[m0 + i]; u_mem.mem[qa + 2 * nm + i] = bs[m0 + i];
      end
      u_mem.mem[qa + 3 * nm] = sfo; u_mem.mem[qa + 3 * nm + 1] = zo;
      if (mt > 0) m_m_tiles++;
      for (int n0 = 0, nt = 0; n0 < L.n; n0 += L.n_t, nt++) begin
        conf_info_t c;
        int nn;
        bit last;
        nn = (n0 + L.n_t > L.n) ? L.n - n0 : L.n_t;
        last = (n0 + L.n_t >= L.n);
        c = '0;
        c.in_add        = n0;
        c.w_add         = W_BASE + m0 * L.n + n0;
        c.out_add       = O_BASE + m0;
        c.flags         = {29'd0, L.relu, nt > 0, L.q_en && last};
        c.n_c           = nn;
        c.filt          = nm;
        c.offset_pe     = L.n;
        c.options       = {24'd0, 2'd0, 2'(L.c2), 1'b0, 3'(L.c1)};
        c.offset_q_data = qa;
        if (nt > 0) m_acc++;
        if (c.flags[0]) m_quant++; else m_raw_out++;
        if (nn % (2 * lanes) != 0) m_partial_step++;
        m_cfg[L.c1]++;
        if (nn == 1024 && nm == 16) m_full_size++;
        invoke(c);
        if (!stalls_on) begin
          checks++; m_timed++;
          if (t_last_en - t_load != (nn + 2 * lanes - 1) / (2 * lanes) + 1) begin
            failures++;
            $display("FAIL %s compute %0d clocks for %0d steps", name, t_last_en - t_load, (nn + 2 * lanes - 1) / (2 * lanes));
          end
        end
      end
    end

    errs = 0;
    for (int i = 0; i < L.m; i++) begin
      checks++;
      if (u_mem.mem[O_BASE + i] != 32'(exp_out[i])) begin
        failures++; errs++;
        if (errs <= 5) $display("FAIL %s y[%0d] = %0d expected %0d", name, i, $signed(u_mem.mem[O_BASE + i]), exp_out[i]);
      end
    end
    $display("layer %s: %0d -> %0d, %0d mismatches", name, L.n, L.m, errs);
  endtask

  initial begin
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    layer_t L;
    conf_info_vld = 1'b0; conf_info_dat = '0;
    foreach (u_mem.mem[i]) u_mem.mem[i] = '0;
    foreach (m_cfg[i]) m_cfg[i] = 0;
    repeat (3) @(posedge clk);
    rst = 1'b1;

    // 16-bit MACs, 40 outputs in tiles of 16, 37 inputs in tiles of 16, 8-bit output with ReLU
    L = '{n:37, m:40, c1:0, c2:2, q_en:1, relu:1, n_t:16, m_t:16};
    run_layer(L, "A");
    // 4x4 MACs, 8 activations per step, 61 inputs (last step partly filled), 4-bit output
    L = '{n:61, m:7, c1:1, c2:1, q_en:1, relu:0, n_t:64, m_t:16};
    run_layer(L, "B");
    // 8x8 MACs, input tiles of 10, raw sums
    L = '{n:30, m:16, c1:2, c2:0, q_en:0, relu:0, n_t:10, m_t:16};
    run_layer(L, "C");
    // 8x4 MACs, 16-bit output
    L = '{n:23, m:5, c1:3, c2:0, q_en:1, relu:1, n_t:23, m_t:16};
    run_layer(L, "D");
    // no DMA stalls: 16x8 and 4x4 MACs with the compute time checked
    stalls_on = 1'b0;
    L = '{n:9, m:3, c1:4, c2:0, q_en:0, relu:0, n_t:9, m_t:16};
    run_layer(L, "E");
    L = '{n:50, m:4, c1:1, c2:2, q_en:1, relu:0, n_t:50, m_t:16};
    run_layer(L, "E2");
    stalls_on = 1'b1;
    // a tile of the maximum size: 1024 inputs, 16 outputs
    L = '{n:1024, m:16, c1:2, c2:2, q_en:1, relu:1, n_t:1024, m_t:16};
    run_layer(L, "F");

    begin
      int mech [string];
      mech["cfg_16x16"] = m_cfg[0]; mech["cfg_4x4"] = m_cfg[1]; mech["cfg_8x8"] = m_cfg[2];
      mech["cfg_8x4"] = m_cfg[3]; mech["cfg_16x8"] = m_cfg[4];
      mech["quantize"] = m_quant; mech["raw_output"] = m_raw_out; mech["relu_clamp"] = m_relu;
      mech["saturate"] = m_sat; mech["partial_step"] = m_partial_step; mech["accumulate"] = m_acc;
      mech["output_tiling"] = m_m_tiles; mech["dma_read_stall"] = u_mem.n_rd_stall;
      mech["dma_write_stall"] = u_mem.n_wr_stall; mech["dma_ctrl_stall"] = u_mem.n_ctrl_stall;
      mech["full_size_tile"] = m_full_size; mech["timed_tile"] = m_timed;
      foreach (mech[k]) begin
        $display("mechanism %-16s %0d", k, mech[k]);
        checks++;
        if (mech[k] == 0) begin failures++; $display("FAIL mechanism %s never happened", k); end
      end
    end
    checks++;
    if (u_mem.errors != 0) begin failures++; $display("FAIL %0d socket protocol errors", u_mem.errors); end
    $display("tiles run: %0d", m_tiles);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

// tb_dwconv_acc: end-to-end test of the depthwise-convolution accelerator at
// its default sizes (16 channel PEs, 18x18 input rows, 7x7 kernels).
//
// External memory and the DMA engine are dma_mem_model, with random stalls on
// every channel. A tiling driver splits each depthwise layer into tiles of at
// most 16 channels and, for stride 1, into height tiles with the matching
// padding types (first, middle, last tile), writes the configuration registers
// and waits for acc_done. The output tensor is then compared with a depthwise
// convolution computed here at the same operand precision, with the same
// re-quantization arithmetic. Layers cover every MAC precision, kernel sizes
// 1, 2, 3, 5 and 7 (windows that fill the last operand group only partly),
// every padding type, stride 2, quantization with ReLU and saturation, raw
// outputs and a tile at the maximum sizes; each mechanism is counted and must
// occur. The compute time of one pixel, ceil(kern*kern/lanes) + 3 clocks, is
// checked on a run without stalls.
module tb_dwconv_acc;
  import conv2d_pkg::*;

  localparam int W_BASE = 16384, O_BASE = 32768, Q_BASE = 61440;

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

  dwconv_acc dut (.*);
  dma_mem_model u_mem (.*);

  int checks = 0, failures = 0;

  int m_pad [5];
  int m_cfg [5];
  int m_kern [8];
  int m_stride2 = 0, m_quant = 0, m_relu = 0, m_sat = 0, m_raw_out = 0, m_partial_grp = 0;
  int m_c_tiles = 0, m_h_tiles = 0, m_tiles = 0, m_full_size = 0, m_timed = 0;

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
    if (t > 128'(qmax))       begin m_sat++; return int'(qmax); end
    if (t < -128'(qmax) - 1)  begin m_sat++; return int'(-qmax - 1); end
    return int'(t);
  endfunction

  // ------------------------------------------------------------------ compute-phase timing
  // cycles from the first to the last output-PLM write of one invocation
  int t_now = 0, t_first = -1, t_last = -1;
  always @(posedge clk) begin
    t_now++;
    if (dut.out_we != '0) begin
      if (t_first < 0) t_first = t_now;
      t_last = t_now;
    end
  end

  task automatic invoke(conf_info_t c);
    t_first = -1;
    @(posedge clk);
    conf_info_dat <= c; conf_info_vld <= 1'b1;
    do @(posedge clk); while (!conf_info_rdy);
    conf_info_vld <= 1'b0;
    while (!acc_done) @(posedge clk);
    m_tiles++;
  endtask

  typedef struct {
    int hin, win, ch, k, stride, pad;
    int c1, c2; bit q_en, relu;
    int ch_t; bit h_tiled;
  } layer_t;

  task automatic run_layer(layer_t L, string name);
    int hout, wout, n_h_tiles, lanes, errs, hp, wp, sfo, zo;
    int exp_out [];
    int wc [], sf [], bs [];
    hp = L.hin + 2 * L.pad; wp = L.win + 2 * L.pad;
    hout = (L.stride == 1) ? hp - L.k + 1 : (hp - L.k) / 2 + 1;
    wout = (L.stride == 1) ? wp - L.k + 1 : (wp - L.k) / 2 + 1;
    lanes = (L.c1 == 1) ? 4 : (L.c1 == 2 || L.c1 == 3) ? 2 : 1;
    exp_out = new[L.ch * hout * wout];
    wc = new[L.ch]; sf = new[L.ch]; bs = new[L.ch];

    for (int i = 0; i < L.ch * L.hin * L.win; i++)
      u_mem.mem[i] = (($urandom % 2) != 0) ? 32'($urandom) : {16'($urandom), 16'($signed(8'($urandom)))};
    for (int i = 0; i < L.ch * L.k * L.k; i++)
      u_mem.mem[W_BASE + i] = (($urandom % 2) != 0) ? 32'($urandom) : {16'($urandom), 16'($signed(8'($urandom)))};
    for (int i = 0; i < L.ch * hout * wout; i++) u_mem.mem[O_BASE + i] = 32'h0bad_0bad;
    for (int c = 0; c < L.ch; c++) begin
      wc[c] = int'($urandom_range(0, 2000)) - 1000;
      sf[c] = int'($urandom_range(8, 2000));
      bs[c] = int'($urandom_range(0, 1 << 21)) - (1 << 20);
    end
    sfo = int'($urandom_range(1 << 14, 3 << 16));
    zo  = int'($urandom_range(0, 10)) - 5;

    for (int c = 0; c < L.ch; c++)
      for (int oh = 0; oh < hout; oh++)
        for (int ow = 0; ow < wout; ow++) begin
          int acc;
          acc = 0;
          for (int kh = 0; kh < L.k; kh++)
            for (int kw = 0; kw < L.k; kw++) begin
              int ih, iw;
              ih = oh * L.stride + kh - L.pad;
              iw = ow * L.stride + kw - L.pad;
              if (ih >= 0 && ih < L.hin && iw >= 0 && iw < L.win)
                acc += xval(u_mem.mem[c * L.hin * L.win + ih * L.win + iw], L.c1)
                     * wval(u_mem.mem[W_BASE + (c * L.k + kh) * L.k + kw], L.c1);
            end
          exp_out[(c * hout + oh) * wout + ow] =
            L.q_en ? quant(acc, wc[c], sf[c], bs[c], sfo, zo, L.relu, L.c2) : acc;
        end

    // tiling driver: channels, then height
    n_h_tiles = (L.h_tiled && L.stride == 1) ? L.hin + 2 * L.pad - L.k + 1 : 1;
    for (int c0 = 0, ct = 0; c0 < L.ch; c0 += L.ch_t, ct++) begin
      int nc, qa;
      nc = (c0 + L.ch_t > L.ch) ? L.ch - c0 : L.ch_t;
      qa = Q_BASE + ct * (3 * 16 + 2);
      for (int i = 0; i < nc; i++) begin
        u_mem.mem[qa + i] = wc[c0 + i]; u_mem.mem[qa + nc + i] = sf[c0 + i]; u_mem.mem[qa + 2 * nc + i] = bs[c0 + i];
      end
      u_mem.mem[qa + 3 * nc] = sfo; u_mem.mem[qa + 3 * nc + 1] = zo;
      if (ct > 0) m_c_tiles++;
      for (int h = 0; h < n_h_tiles; h++) begin
        conf_info_t c;
        int r0, nh, ptype;
        if (n_h_tiles == 1) begin
          r0 = 0; nh = L.hin; ptype = (L.pad > 0) ? 4 : 0;
        end else begin
          // output row h needs padded rows h .. h+k-1
          int top, bot;
          top = (h < L.pad) ? L.pad - h : 0;
          r0  = h + top - L.pad;
          bot = (h + L.k > L.hin + L.pad) ? h + L.k - L.hin - L.pad : 0;
          nh  = L.k - top - bot;
          if (L.pad == 0) ptype = 0;
          else if (top > 0 && bot > 0) ptype = 4;
          else if (top > 0) ptype = 1;
          else if (bot > 0) ptype = 2;
          else ptype = 3;
          m_h_tiles++;
          // this driver needs a tile whose padding is exactly `pad` rows where present
          if ((top != 0 && top != L.pad) || (bot != 0 && bot != L.pad)) continue;
        end
        m_pad[ptype]++;
        c = '0;
        c.in_add          = (c0 * L.hin + r0) * L.win;
        c.w_add           = W_BASE + c0 * L.k * L.k;
        c.out_add         = O_BASE + c0 * hout * wout + h * wout;
        c.flags           = {29'd0, L.relu, 1'b0, L.q_en};
        c.n_w             = L.win;
        c.n_h             = nh;
        c.n_c             = nc;
        c.pad_stride_kern = {16'd0, 4'(L.k), 4'(ptype), 4'(L.stride), 4'(L.pad)};
        c.offset_pe_out   = hout * wout;
        c.offset_pe       = L.k * L.k;
        c.options         = {24'd0, 2'd0, 2'(L.c2), 1'b0, 3'(L.c1)};
        c.offset_q_data   = qa;
        c.offset_read_ci  = L.hin * L.win;
        if (L.q_en) m_quant++; else m_raw_out++;
        if (L.stride == 2) m_stride2++;
        if ((L.k * L.k) % lanes != 0) m_partial_grp++;
        m_cfg[L.c1]++;
        m_kern[L.k]++;
        if (nc == 16 && L.k == 7 && L.win + 2 * L.pad == 18 && nh + 2 * L.pad == 18) m_full_size++;
        invoke(c);
        if (!stalls_on) begin
          int px, steps;
          px = ((n_h_tiles == 1) ? hout : 1) * wout;
          steps = (L.k * L.k + lanes - 1) / lanes;
          checks++; m_timed++;
          if (t_last - t_first != (px - 1) * (steps + 3)) begin
            failures++;
            $display("FAIL %s compute time %0d cycles, expected %0d", name, t_last - t_first, (px - 1) * (steps + 3));
          end
        end
      end
    end

    errs = 0;
    for (int i = 0; i < L.ch * hout * wout; i++) begin
      checks++;
      if (u_mem.mem[O_BASE + i] != 32'(exp_out[i])) begin
        failures++; errs++;
        if (errs <= 5) $display("FAIL %s out[%0d] = %0d expected %0d", name, i, $signed(u_mem.mem[O_BASE + i]), exp_out[i]);
      end
    end
    $display("layer %s: %0dx%0dx%0d k%0d -> %0dx%0d, %0d mismatches", name, L.hin, L.win, L.ch, L.k, hout, wout, errs);
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
    foreach (m_pad[i]) m_pad[i] = 0;
    foreach (m_cfg[i]) m_cfg[i] = 0;
    foreach (m_kern[i]) m_kern[i] = 0;
    repeat (3) @(posedge clk);
    rst = 1'b1;

    // 16-bit MACs, 3x3, same padding, tiled in height, 8-bit output with ReLU
    L = '{hin:6, win:5, ch:5, k:3, stride:1, pad:1, c1:0, c2:2, q_en:1, relu:1, ch_t:16, h_tiled:1};
    run_layer(L, "A");
    // 4x4 MACs (9 window values in 3 operands), stride 2, 20 channels in two tiles, 4-bit output
    L = '{hin:7, win:6, ch:20, k:3, stride:2, pad:1, c1:1, c2:1, q_en:1, relu:0, ch_t:16, h_tiled:0};
    run_layer(L, "B");
    // 8x8 MACs, 5x5 kernel, no padding, raw outputs
    L = '{hin:7, win:8, ch:7, k:5, stride:1, pad:0, c1:2, c2:0, q_en:0, relu:0, ch_t:16, h_tiled:0};
    run_layer(L, "C");
    // 8x4 MACs, 2x2 kernel, valid padding tiled in height, 16-bit output
    L = '{hin:4, win:5, ch:16, k:2, stride:1, pad:0, c1:3, c2:0, q_en:1, relu:1, ch_t:16, h_tiled:1};
    run_layer(L, "D");
    // DMA without stalls: 16x8 MACs with a 1x1 kernel and 4x4 MACs with 3x3, cycle counts checked
    stalls_on = 1'b0;
    L = '{hin:3, win:4, ch:3, k:1, stride:1, pad:0, c1:4, c2:0, q_en:0, relu:0, ch_t:16, h_tiled:0};
    run_layer(L, "E");
    L = '{hin:5, win:5, ch:4, k:3, stride:1, pad:1, c1:1, c2:2, q_en:1, relu:0, ch_t:16, h_tiled:0};
    run_layer(L, "E2");
    stalls_on = 1'b1;
    // one tile at the maximum sizes: 18x18 padded input, 16 channels, 7x7 kernel
    L = '{hin:16, win:16, ch:16, k:7, stride:1, pad:1, c1:1, c2:2, q_en:1, relu:1, ch_t:16, h_tiled:0};
    run_layer(L, "F");

    begin
      int mech [string];
      mech["pad_type0"] = m_pad[0]; mech["pad_type1"] = m_pad[1]; mech["pad_type2"] = m_pad[2];
      mech["pad_type3"] = m_pad[3]; mech["pad_type4"] = m_pad[4];
      mech["cfg_16x16"] = m_cfg[0]; mech["cfg_4x4"] = m_cfg[1]; mech["cfg_8x8"] = m_cfg[2];
      mech["cfg_8x4"] = m_cfg[3]; mech["cfg_16x8"] = m_cfg[4];
      mech["kern1"] = m_kern[1]; mech["kern7"] = m_kern[7];
      mech["stride2"] = m_stride2; mech["quantize"] = m_quant; mech["raw_output"] = m_raw_out;
      mech["relu_clamp"] = m_relu; mech["saturate"] = m_sat; mech["partial_group"] = m_partial_grp;
      mech["channel_tiling"] = m_c_tiles; mech["h_tiling"] = m_h_tiles;
      mech["dma_read_stall"] = u_mem.n_rd_stall; mech["dma_write_stall"] = u_mem.n_wr_stall;
      mech["dma_ctrl_stall"] = u_mem.n_ctrl_stall; mech["full_size_tile"] = m_full_size;
      mech["timed_tile"] = m_timed;
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

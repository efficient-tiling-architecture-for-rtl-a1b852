// tb_conv2d_acc: end-to-end test of the 2D-convolution accelerator at its
// default sizes (16 PEs, 18x18x16 input PLM, 7x7x16x16 weight PLM).
//
// The bench plays the rest of the SoC: a word-addressed external memory, a DMA
// engine that serves the accelerator's read and write transactions with random
// stalls on every channel, and a tiling driver that splits each convolution
// layer into tiles along output channels, height and input channels, sets the
// configuration registers of every tile (pointers, offsets, padding type,
// accumulate and quantize flags) and waits for acc_done. After a layer the
// output tensor in memory is compared with a convolution computed here from
// the full tensors, with the same operand precision and the same
// re-quantization arithmetic. The layers cover every MAC precision, every
// padding type, stride 2, partial-sum accumulation, quantization with ReLU and
// saturation, partly filled operand groups, a tile at the maximum PLM sizes
// and a 7x7x7 tile with ten 3x3 filters; each of these mechanisms is counted
// and must occur.
module tb_conv2d_acc;
  import conv2d_pkg::*;

  localparam int PE = 16;
  localparam int MEM_WORDS = 1 << 16;
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

  conv2d_acc dut (.*);

  int checks = 0, failures = 0;

  // ------------------------------------------------------------------ memory and DMA model
  logic [31:0] mem [MEM_WORDS];
  logic        rd_active = 1'b0, wr_active = 1'b0;
  logic [31:0] rd_addr, rd_left, wr_addr, wr_left;
  bit          stalls_on = 1'b1;
  int          n_rd_stall = 0, n_wr_stall = 0, n_ctrl_stall = 0;

  always_comb begin
    dma_read_chnl_dat = {DEADBEEF, mem[rd_addr[15:0]]};
  end

  always @(posedge clk) begin
    // read control
    if (dma_read_ctrl_vld && dma_read_ctrl_rdy) begin
      if (dma_read_ctrl_dat.size != DMA_SIZE || dma_read_ctrl_dat.length == 0) begin
        failures++; $display("FAIL read ctrl %p", dma_read_ctrl_dat);
      end
      checks++;
      rd_active <= 1'b1; rd_addr <= dma_read_ctrl_dat.index; rd_left <= dma_read_ctrl_dat.length;
    end
    if (dma_read_ctrl_vld && !dma_read_ctrl_rdy) n_ctrl_stall++;
    dma_read_ctrl_rdy <= !rd_active && !(dma_read_ctrl_vld && dma_read_ctrl_rdy) && (!stalls_on || ($urandom % 4 != 0));
    // read data
    if (dma_read_chnl_vld && dma_read_chnl_rdy) begin
      rd_addr <= rd_addr + 1;
      rd_left <= rd_left - 1;
      if (rd_left == 1) rd_active <= 1'b0;
    end
    if (dma_read_chnl_rdy && !dma_read_chnl_vld && rd_active) n_rd_stall++;
    dma_read_chnl_vld <= rd_active && !(dma_read_chnl_vld && dma_read_chnl_rdy && rd_left == 1)
                         && (!stalls_on || ($urandom % 5 != 0));
    // write control
    if (dma_write_ctrl_vld && dma_write_ctrl_rdy) begin
      wr_active <= 1'b1; wr_addr <= dma_write_ctrl_dat.index; wr_left <= dma_write_ctrl_dat.length;
    end
    dma_write_ctrl_rdy <= !wr_active && !(dma_write_ctrl_vld && dma_write_ctrl_rdy) && (!stalls_on || ($urandom % 3 != 0));
    // write data
    if (dma_write_chnl_vld && dma_write_chnl_rdy) begin
      if (!wr_active) begin failures++; $display("FAIL write beat outside a transaction"); end
      if (dma_write_chnl_dat[63:32] != DEADBEEF) begin failures++; $display("FAIL store beat upper half %h", dma_write_chnl_dat[63:32]); end
      checks++;
      mem[wr_addr[15:0]] <= dma_write_chnl_dat[31:0];
      wr_addr <= wr_addr + 1;
      wr_left <= wr_left - 1;
      if (wr_left == 1) wr_active <= 1'b0;
    end
    if (dma_write_chnl_vld && !dma_write_chnl_rdy) n_wr_stall++;
    dma_write_chnl_rdy <= wr_active && !(dma_write_chnl_vld && dma_write_chnl_rdy && wr_left == 1)
                          && (!stalls_on || ($urandom % 4 != 0));
  end

  // ------------------------------------------------------------------ mechanism counters
  int m_pad [5];
  int m_cfg [5];
  int m_stride2 = 0, m_acc = 0, m_quant = 0, m_relu = 0, m_sat = 0, m_partial_grp = 0;
  int m_cout_tiles = 0, m_h_tiles = 0, m_cin_tiles = 0, m_tiles = 0, m_raw_out = 0, m_full_size = 0;

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

  // ------------------------------------------------------------------ one invocation
  task automatic invoke(conf_info_t c);
    int cyc;
    @(posedge clk);
    conf_info_dat <= c; conf_info_vld <= 1'b1;
    do @(posedge clk); while (!conf_info_rdy);
    conf_info_vld <= 1'b0;
    cyc = 0;
    while (!acc_done) begin @(posedge clk); cyc++; end
    m_tiles++;
  endtask

  // ------------------------------------------------------------------ one layer
  typedef struct {
    int hin, win, cin, cout, k, stride, pad;
    int c1, c2; bit q_en, relu;
    int cout_t, cin_t; bit h_tiled;
  } layer_t;

  task automatic run_layer(layer_t L, string name);
    int hout, wout, n_h_tiles, lanes, errs;
    int exp_out [];
    int wc [], sf [], bs [];
    int sfo, zo;
    int hp, wp;
    hp = L.hin + 2 * L.pad; wp = L.win + 2 * L.pad;
    hout = (L.stride == 1) ? hp - L.k + 1 : (hp - L.k) / 2 + 1;
    wout = (L.stride == 1) ? wp - L.k + 1 : (wp - L.k) / 2 + 1;
    lanes = (L.c1 == 1) ? 4 : (L.c1 == 2 || L.c1 == 3) ? 2 : 1;
    exp_out = new[L.cout * hout * wout];
    wc = new[L.cout]; sf = new[L.cout]; bs = new[L.cout];

    // tensors
    for (int i = 0; i < L.cin * L.hin * L.win; i++)
      mem[i] = (($urandom % 2) != 0) ? 32'($urandom) : {16'($urandom), 16'($signed(8'($urandom)))};
    for (int i = 0; i < L.cout * L.cin * L.k * L.k; i++)
      mem[W_BASE + i] = (($urandom % 2) != 0) ? 32'($urandom) : {16'($urandom), 16'($signed(8'($urandom)))};
    for (int i = 0; i < L.cout * hout * wout; i++) mem[O_BASE + i] = 32'h0bad_0bad;
    for (int co = 0; co < L.cout; co++) begin
      wc[co] = int'($urandom_range(0, 2000)) - 1000;
      sf[co] = int'($urandom_range(8, 300));
      bs[co] = int'($urandom_range(0, 1 << 21)) - (1 << 20);
    end
    sfo = int'($urandom_range(1 << 14, 3 << 16));
    zo  = int'($urandom_range(0, 10)) - 5;

    // reference
    for (int co = 0; co < L.cout; co++)
      for (int oh = 0; oh < hout; oh++)
        for (int ow = 0; ow < wout; ow++) begin
          int acc;
          acc = 0;
          for (int ci = 0; ci < L.cin; ci++)
            for (int kh = 0; kh < L.k; kh++)
              for (int kw = 0; kw < L.k; kw++) begin
                int ih, iw;
                ih = oh * L.stride + kh - L.pad;
                iw = ow * L.stride + kw - L.pad;
                if (ih >= 0 && ih < L.hin && iw >= 0 && iw < L.win)
                  acc += xval(mem[ci * L.hin * L.win + ih * L.win + iw], L.c1)
                       * wval(mem[W_BASE + ((co * L.cin + ci) * L.k + kh) * L.k + kw], L.c1);
              end
          exp_out[(co * hout + oh) * wout + ow] =
            L.q_en ? quant(acc, wc[co], sf[co], bs[co], sfo, zo, L.relu, L.c2) : acc;
        end

    // tiling driver: output channels, then height, then input channels (innermost)
    n_h_tiles = L.h_tiled ? ((L.stride == 1) ? L.hin - L.k + 1 : 1) : 1;
    for (int co0 = 0, cot = 0; co0 < L.cout; co0 += L.cout_t, cot++) begin
      int filt;
      int qa;
      filt = (co0 + L.cout_t > L.cout) ? L.cout - co0 : L.cout_t;
      qa = Q_BASE + cot * (3 * PE + 2);
      for (int i = 0; i < filt; i++) begin
        mem[qa + i] = wc[co0 + i]; mem[qa + filt + i] = sf[co0 + i]; mem[qa + 2 * filt + i] = bs[co0 + i];
      end
      mem[qa + 3 * filt] = sfo; mem[qa + 3 * filt + 1] = zo;
      m_cout_tiles++;
      for (int h = 0; h < n_h_tiles; h++) begin
        int r0, nh, ptype, o_start;
        if (n_h_tiles == 1) begin
          r0 = 0; nh = L.hin; ptype = (L.pad > 0) ? 4 : 0; o_start = 0;
        end else begin
          r0 = h; nh = L.k;
          if (L.pad == 0) ptype = 0;
          else if (h == 0) ptype = 1;
          else if (h == n_h_tiles - 1) ptype = 2;
          else ptype = 3;
          o_start = (h == 0 || L.pad == 0) ? h : h + L.pad;
          m_h_tiles++;
        end
        m_pad[ptype]++;
        for (int ci0 = 0, cit = 0; ci0 < L.cin; ci0 += L.cin_t, cit++) begin
          conf_info_t c;
          int nc;
          nc = (ci0 + L.cin_t > L.cin) ? L.cin - ci0 : L.cin_t;
          c = '0;
          c.in_add          = ci0 * L.hin * L.win + r0 * L.win;
          c.w_add           = W_BASE + (co0 * L.cin + ci0) * L.k * L.k;
          c.out_add         = O_BASE + co0 * hout * wout + o_start * wout;
          c.flags           = {29'd0, L.relu, cit > 0, L.q_en && (ci0 + L.cin_t >= L.cin)};
          c.n_w             = L.win;
          c.n_h             = nh;
          c.n_c             = nc;
          c.pad_stride_kern = {16'd0, 4'(L.k), 4'(ptype), 4'(L.stride), 4'(L.pad)};
          c.filt            = filt;
          c.offset_pe_out   = hout * wout;
          c.offset_pe       = L.cin * L.k * L.k;
          c.options         = {24'd0, 2'd0, 2'(L.c2), 1'b0, 3'(L.c1)};
          c.offset_q_data   = qa;
          c.offset_read_ci  = L.hin * L.win;
          if (cit > 0) m_acc++;
          if (cit > 0 || ci0 + L.cin_t < L.cin) m_cin_tiles++;
          if (nc % lanes != 0) m_partial_grp++;
          if (c.flags[0]) m_quant++; else m_raw_out++;
          if (L.stride == 2) m_stride2++;
          m_cfg[L.c1]++;
          if (nc == 16 && filt == 16 && L.k == 7 && L.win + 2 * L.pad == 18 && nh + 2 * L.pad == 18) m_full_size++;
          invoke(c);
        end
      end
    end

    // compare
    errs = 0;
    for (int i = 0; i < L.cout * hout * wout; i++) begin
      checks++;
      if (mem[O_BASE + i] != 32'(exp_out[i])) begin
        failures++; errs++;
        if (errs <= 5) $display("FAIL %s out[%0d] = %0d expected %0d", name, i, $signed(mem[O_BASE + i]), exp_out[i]);
      end
    end
    $display("layer %s: %0dx%0dx%0d -> %0dx%0dx%0d, %0d mismatches", name, L.hin, L.win, L.cin, hout, wout, L.cout, errs);
  endtask

  // ------------------------------------------------------------------ watchdog
  initial begin
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------------------ test
  initial begin
    layer_t L;
    conf_info_vld = 1'b0; conf_info_dat = '0;
    dma_read_ctrl_rdy = 1'b0; dma_read_chnl_vld = 1'b0; dma_write_ctrl_rdy = 1'b0; dma_write_chnl_rdy = 1'b0;
    rd_addr = '0; rd_left = '0; wr_addr = '0; wr_left = '0;
    foreach (mem[i]) mem[i] = '0;
    foreach (m_pad[i]) m_pad[i] = 0;
    foreach (m_cfg[i]) m_cfg[i] = 0;
    repeat (3) @(posedge clk);
    rst = 1'b1;

    // 16x16 MACs, same padding, tiled in Cout, H and Cin, quantized to 8 bits with ReLU
    L = '{hin:6, win:5, cin:6, cout:5, k:3, stride:1, pad:1, c1:0, c2:2, q_en:1, relu:1, cout_t:4, cin_t:4, h_tiled:1};
    run_layer(L, "A");
    // 4x4 MACs (four channels per operand, last group partly filled), stride 2, all-side padding, 4-bit output
    L = '{hin:5, win:6, cin:7, cout:3, k:3, stride:2, pad:1, c1:1, c2:1, q_en:1, relu:0, cout_t:16, cin_t:16, h_tiled:0};
    run_layer(L, "B");
    // 8x8 MACs, no padding, Cin tiled 4 + 1, raw 32-bit outputs
    L = '{hin:4, win:4, cin:5, cout:2, k:2, stride:1, pad:0, c1:2, c2:0, q_en:0, relu:0, cout_t:16, cin_t:4, h_tiled:0};
    run_layer(L, "C");
    // 8x4 MACs, all 16 PEs busy, valid padding tiled in H, 16-bit output with ReLU
    L = '{hin:5, win:5, cin:3, cout:16, k:3, stride:1, pad:0, c1:3, c2:0, q_en:1, relu:1, cout_t:16, cin_t:16, h_tiled:1};
    run_layer(L, "D");
    // 16x8 MACs, 1x1 kernel, stalls off (DMA at full rate)
    stalls_on = 1'b0;
    L = '{hin:3, win:4, cin:2, cout:3, k:1, stride:1, pad:0, c1:4, c2:0, q_en:0, relu:0, cout_t:16, cin_t:16, h_tiled:0};
    run_layer(L, "E");
    stalls_on = 1'b1;
    // one tile at the maximum PLM sizes: 18x18 padded input, 16 channels, 7x7 kernel, 16 filters
    L = '{hin:16, win:16, cin:16, cout:16, k:7, stride:1, pad:1, c1:1, c2:2, q_en:1, relu:1, cout_t:16, cin_t:16, h_tiled:0};
    run_layer(L, "F");
    // the 7x7x7 tile with 10 filters of 3x3 used to validate the accelerator model, 16-bit, raw sums
    L = '{hin:7, win:7, cin:7, cout:10, k:3, stride:1, pad:0, c1:0, c2:0, q_en:0, relu:0, cout_t:16, cin_t:16, h_tiled:0};
    run_layer(L, "G");

    // every mechanism must have happened
    begin
      int mech [string];
      mech["pad_type0"] = m_pad[0]; mech["pad_type1"] = m_pad[1]; mech["pad_type2"] = m_pad[2];
      mech["pad_type3"] = m_pad[3]; mech["pad_type4"] = m_pad[4];
      mech["cfg_16x16"] = m_cfg[0]; mech["cfg_4x4"] = m_cfg[1]; mech["cfg_8x8"] = m_cfg[2];
      mech["cfg_8x4"] = m_cfg[3]; mech["cfg_16x8"] = m_cfg[4];
      mech["stride2"] = m_stride2; mech["accumulate"] = m_acc; mech["quantize"] = m_quant;
      mech["raw_output"] = m_raw_out; mech["relu_clamp"] = m_relu; mech["saturate"] = m_sat;
      mech["partial_group"] = m_partial_grp; mech["cout_tiling"] = m_cout_tiles; mech["h_tiling"] = m_h_tiles;
      mech["cin_tiling"] = m_cin_tiles; mech["dma_read_stall"] = n_rd_stall; mech["dma_write_stall"] = n_wr_stall;
      mech["dma_ctrl_stall"] = n_ctrl_stall; mech["full_size_tile"] = m_full_size;
      foreach (mech[k]) begin
        $display("mechanism %-16s %0d", k, mech[k]);
        checks++;
        if (mech[k] == 0) begin failures++; $display("FAIL mechanism %s never happened", k); end
      end
    end
    $display("tiles run: %0d", m_tiles);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

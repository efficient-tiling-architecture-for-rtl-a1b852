// dwconv_acc: precision-scalable depthwise-convolution accelerator with the
// same ESP-style socket as conv2d_acc.
//
// A depthwise layer convolves every channel with its own kernel; there is no
// sum over input channels and no output-channel dimension. One invocation
// computes one tile and runs, in order:
//   load    - one DMA read per channel (in_add + c*offset_read_ci, n_w*n_h
//             words) with the same zero padding rules as the 2D accelerator
//             (pad, pad_type); the input is written, one channel per lane, into
//             four identical banks; then a single DMA read of all kernels
//             (w_add, kern*kern*n_c words, channel-major, then kernel row, then
//             kernel column); when q_flag, one read of 3*n_c + 2 quantization
//             constants (w_cross[n_c], sf_iw[n_c], bias[n_c], sf_out_inv, z_out)
//   packing - the kernel of every channel is cut into groups of `lanes`
//             consecutive window positions (raster order) and packed into one
//             16-bit ST operand per channel and group, the value of window
//             position k at the k-th highest field; positions past kern*kern
//             are zero
//   compute - one PE per channel. For each output pixel and group the four
//             input banks are read at the group's window positions, one bank
//             per position, so `lanes` input values reach each PE in one clock
//             and are packed with position k at the k-th lowest field; the ST
//             multiplier then adds a 4-, 2- or 1-term dot product of the window
//             per clock. A pixel takes ceil(kern*kern/lanes) + 3 clocks.
//   store   - one DMA write per channel (out_add + c*offset_pe_out,
//             n_w_out*n_h_out words), result in bits [31:0] and 0xdeadbeef in
//             bits [63:32] of every beat, then acc_done for one clock.
// Interface and timing of the socket are those of conv2d_acc: valid/ready
// channels, a word moves on a clock edge where both are high, active-low
// reset. Register fields are decoded by conv2d_cfg; filt, offset_pe and the
// accumulate flag are not used (depthwise layers need no partial sums).
// Following the accelerator description: same phases and padding as the 2D
// accelerator, one weight transaction, no accumulation, one channel per PE,
// ST operands built from values of the same channel. This design's own
// choices: the grouping of window positions into operands, the four read
// banks that deliver them in one clock, the quantization data length
// 3*n_c + 2, and the cycle schedule.
module dwconv_acc
  import conv2d_pkg::*;
#(
  parameter int unsigned N_C_MAX    = 16,
  parameter int unsigned N_H_IN_MAX = 18,
  parameter int unsigned N_W_IN_MAX = 18,
  parameter int unsigned KERN_MAX   = 7
) (
  input  logic                 clk,
  input  logic                 rst,
  input  conf_info_t           conf_info_dat,
  input  logic                 conf_info_vld,
  output logic                 conf_info_rdy,
  output dma_info_t            dma_read_ctrl_dat,
  output logic                 dma_read_ctrl_vld,
  input  logic                 dma_read_ctrl_rdy,
  input  logic [DMA_WIDTH-1:0] dma_read_chnl_dat,
  input  logic                 dma_read_chnl_vld,
  output logic                 dma_read_chnl_rdy,
  output dma_info_t            dma_write_ctrl_dat,
  output logic                 dma_write_ctrl_vld,
  input  logic                 dma_write_ctrl_rdy,
  output logic [DMA_WIDTH-1:0] dma_write_chnl_dat,
  output logic                 dma_write_chnl_vld,
  input  logic                 dma_write_chnl_rdy,
  output logic                 acc_done
);

  localparam int unsigned PE      = N_C_MAX;
  localparam int unsigned IN_DEPTH = N_H_IN_MAX * N_W_IN_MAX;
  localparam int unsigned F_DEPTH  = KERN_MAX * KERN_MAX;
  localparam int unsigned IN_AW    = $clog2(IN_DEPTH);
  localparam int unsigned F_AW     = $clog2(F_DEPTH);
  localparam int unsigned PW       = (PE > 1) ? $clog2(PE) : 1;
  localparam int unsigned NBANK    = 4;

  wire rst_n = rst;

  typedef enum logic [4:0] {
    S_IDLE, S_IN_CTRL, S_IN_DATA, S_W_CTRL, S_W_DATA, S_Q_CTRL, S_Q_DATA,
    S_PACK_B, S_PACK_B_FLUSH, S_C_INIT, S_C_MAC, S_C_DRAIN, S_C_WB,
    S_ST_CTRL, S_ST_DATA, S_DONE
  } state_e;
  state_e st;

  // ---------------------------------------------------------------- config
  conf_info_t conf_q;
  cfg_t       cfg;
  conv2d_cfg u_cfg (.conf(conf_q), .cfg(cfg));

  logic [7:0]  kk;                           // kern*kern window positions
  logic [7:0]  n_steps;                      // ceil(kk / lanes)
  logic [31:0] len_q;
  assign kk      = 8'(cfg.kern) * 8'(cfg.kern);
  assign n_steps = (cfg.lanes == 3'd4) ? 8'((kk + 8'd3) >> 2)
                 : (cfg.lanes == 3'd2) ? 8'((kk + 8'd1) >> 1) : kk;
  assign len_q   = 32'(cfg.n_c) * 3 + 32'd2;

  // ---------------------------------------------------------------- PLMs
  logic [PE-1:0]    in_we;
  logic [IN_AW-1:0] in_waddr;
  logic [PE*16-1:0] in_wdata;
  logic [IN_AW-1:0] in_raddr [NBANK];
  logic [PE*16-1:0] in_rdata [NBANK];
  logic [PE-1:0]    f_we;
  logic [F_AW-1:0]  f_waddr, f_raddr;
  logic [PE*16-1:0] f_wdata, f_rdata;
  logic [PE-1:0]    pb_we;
  logic [F_AW-1:0]  pb_waddr, pb_raddr;
  logic [PE*16-1:0] pb_wdata, pb_rdata;
  logic [PE-1:0]    out_we;
  logic [IN_AW-1:0] out_waddr, out_raddr;
  logic [PE*32-1:0] out_wdata, out_rdata;

  for (genvar b = 0; b < NBANK; b++) begin : g_bank
    plm_ram #(.DEPTH(IN_DEPTH), .LANES(PE), .LANE_W(16)) u_plm_in (
      .clk, .we(in_we), .waddr(in_waddr), .wdata(in_wdata), .raddr(in_raddr[b]), .rdata(in_rdata[b]));
  end
  plm_ram #(.DEPTH(F_DEPTH),  .LANES(PE), .LANE_W(16)) u_plm_f    (.clk, .we(f_we),   .waddr(f_waddr),   .wdata(f_wdata),   .raddr(f_raddr),   .rdata(f_rdata));
  plm_ram #(.DEPTH(F_DEPTH),  .LANES(PE), .LANE_W(16)) u_b_reconf (.clk, .we(pb_we),  .waddr(pb_waddr),  .wdata(pb_wdata),  .raddr(pb_raddr),  .rdata(pb_rdata));
  plm_ram #(.DEPTH(IN_DEPTH), .LANES(PE), .LANE_W(32)) u_plm_out  (.clk, .we(out_we), .waddr(out_waddr), .wdata(out_wdata), .raddr(out_raddr), .rdata(out_rdata));

  // ---------------------------------------------------------------- quantization constants
  logic signed [31:0] w_cross [PE];
  logic signed [31:0] sf_iw   [PE];
  logic signed [31:0] bias    [PE];
  logic signed [31:0] sf_out_inv;
  logic signed [15:0] z_out;

  // ---------------------------------------------------------------- counters
  logic [15:0] chan, row, col;               // input load
  logic [15:0] wci;  logic [3:0] wj, wi;     // weight load
  logic [31:0] qi;                           // quantization load
  logic [3:0]  bkh, bkw; logic [7:0] bp, bg; logic [2:0] bk; // weight packing
  logic [15:0] oh, ow;                       // compute pixel
  logic [3:0]  ckh, ckw; logic [7:0] cp, cg; // compute: first window position of the group
  logic [15:0] sco, sh, sw; logic primed;    // store

  // ---------------------------------------------------------------- padding
  logic pad_ok;
  always_comb begin
    case (cfg.pad_type)
      4'd1: pad_ok = (row >= 16'(cfg.pad)) && (col >= 16'(cfg.pad)) && (col < cfg.n_w_in - 16'(cfg.pad));
      4'd2: pad_ok = (col >= 16'(cfg.pad)) && (col < cfg.n_w_in - 16'(cfg.pad)) && (row < cfg.n_h_in - 16'(cfg.pad));
      4'd3: pad_ok = (col >= 16'(cfg.pad)) && (col < cfg.n_w_in - 16'(cfg.pad));
      4'd4: pad_ok = (row >= 16'(cfg.pad)) && (col >= 16'(cfg.pad)) && (col < cfg.n_w_in - 16'(cfg.pad))
                   && (row < cfg.n_h_in - 16'(cfg.pad));
      default: pad_ok = 1'b1;
    endcase
  end

  // ---------------------------------------------------------------- window positions
  // next raster position of a kern x kern window
  function automatic logic [7:0] next_pos(input logic [7:0] p, input logic [3:0] kern);
    logic [3:0] h, w;
    h = p[7:4]; w = p[3:0];
    if (w == kern - 4'd1) begin h = h + 4'd1; w = '0; end
    else w = w + 4'd1;
    return {h, w};
  endfunction

  // positions of the `lanes` values of the current compute group
  logic [7:0] cpos [NBANK];
  logic [NBANK-1:0] cval;
  always_comb begin
    cpos[0] = {ckh, ckw};
    for (int j = 1; j < NBANK; j++) cpos[j] = next_pos(cpos[j-1], cfg.kern);
    for (int j = 0; j < NBANK; j++)
      cval[j] = (j < int'(cfg.lanes)) && (32'(cp) + 32'(j) < 32'(kk));
  end
  // first position of the next group
  logic [7:0] cpos_next;
  assign cpos_next = (cfg.lanes == 3'd4) ? next_pos(cpos[3], cfg.kern)
                   : (cfg.lanes == 3'd2) ? cpos[2] : cpos[1];

  // ---------------------------------------------------------------- weight packing
  // a read issued in one cycle is placed in the next; all channel lanes at once
  logic             pb_v, pb_ok, pb_last;
  logic [2:0]       pb_k;
  logic [F_AW-1:0]  pb_dst;
  logic [PE*16-1:0] pb_word, pb_next;

  always_comb begin
    pb_next = pb_word;
    for (int c = 0; c < PE; c++) begin
      logic [15:0] v, r;
      v = pb_ok ? f_rdata[16*c +: 16] : 16'd0;
      r = pb_word[16*c +: 16];
      case (cfg.lanes)
        3'd4:    r[12 - 4*pb_k +: 4] = v[3:0];
        3'd2:    r[8 - 8*pb_k +: 8]  = v[7:0];
        default: r = v;
      endcase
      pb_next[16*c +: 16] = r;
    end
  end

  assign f_raddr  = F_AW'(32'(bkh) * KERN_MAX + 32'(bkw));
  assign pb_we    = (pb_v && pb_last) ? '1 : '0;
  assign pb_waddr = pb_dst;
  assign pb_wdata = pb_next;

  // ---------------------------------------------------------------- load writes
  always_comb begin
    in_we    = '0;
    in_waddr = IN_AW'(32'(row) * N_W_IN_MAX + 32'(col));
    in_wdata = '0;
    if (st == S_IN_DATA) begin
      if (!pad_ok || dma_read_chnl_vld) in_we = PE'(1) << chan[PW-1:0];
      if (pad_ok) in_wdata = {PE{dma_read_chnl_dat[15:0]}};
    end
    f_we    = (st == S_W_DATA && dma_read_chnl_vld) ? (PE'(1) << wci[PW-1:0]) : '0;
    f_waddr = F_AW'(32'(wj) * KERN_MAX + 32'(wi));
    f_wdata = {PE{dma_read_chnl_dat[15:0]}};
  end

  // ---------------------------------------------------------------- compute datapath
  logic             d_en;                  // operands of the step issued last cycle are valid
  logic [NBANK-1:0] d_val;
  logic             pe_load;
  logic signed [31:0] pe_acc [PE];
  logic signed [31:0] pe_q   [PE];

  always_comb begin
    for (int j = 0; j < NBANK; j++)
      in_raddr[j] = IN_AW'((32'(oh) * 32'(cfg.stride) + 32'(cpos[j][7:4])) * N_W_IN_MAX
                         + 32'(ow) * 32'(cfg.stride) + 32'(cpos[j][3:0]));
  end
  assign pb_raddr = F_AW'(cg);
  assign pe_load  = (st == S_C_INIT);

  for (genvar c = 0; c < PE; c++) begin : g_pe
    logic [15:0] a_op, v [NBANK];
    always_comb begin
      for (int j = 0; j < NBANK; j++) v[j] = d_val[j] ? in_rdata[j][16*c +: 16] : 16'd0;
      case (cfg.lanes)
        3'd4:    a_op = {v[3][3:0], v[2][3:0], v[1][3:0], v[0][3:0]};
        3'd2:    a_op = {v[1][7:0], v[0][7:0]};
        default: a_op = v[0];
      endcase
    end
    conv2d_pe u_pe (
      .clk, .rst_n, .load(pe_load), .init(32'sd0), .en(d_en),
      .a(a_op), .b(pb_rdata[16*c +: 16]), .cfg(cfg.config1), .acc(pe_acc[c]));
    requant u_rq (
      .acc(pe_acc[c]), .w_cross(w_cross[c]), .sf_iw(sf_iw[c]), .bias(bias[c]),
      .sf_out_inv, .z_out, .en_relu(cfg.relu_flag), .config2(cfg.config2), .q(pe_q[c]));
    assign out_wdata[32*c +: 32] = cfg.q_flag ? pe_q[c] : pe_acc[c];
  end

  assign out_we    = (st == S_C_WB) ? '1 : '0;
  assign out_waddr = IN_AW'(32'(oh) * N_W_IN_MAX + 32'(ow));

  // ---------------------------------------------------------------- DMA channels
  always_comb begin
    dma_read_ctrl_vld = 1'b0;
    dma_read_ctrl_dat = '0;
    case (st)
      S_IN_CTRL: begin dma_read_ctrl_vld = 1'b1; dma_read_ctrl_dat = '{DMA_SIZE, cfg.len_in, cfg.in_add + 32'(chan) * cfg.offset_read_ci}; end
      S_W_CTRL:  begin dma_read_ctrl_vld = 1'b1; dma_read_ctrl_dat = '{DMA_SIZE, cfg.len_w, cfg.w_add}; end
      S_Q_CTRL:  begin dma_read_ctrl_vld = 1'b1; dma_read_ctrl_dat = '{DMA_SIZE, len_q, cfg.offset_q_data}; end
      default: ;
    endcase
    dma_read_chnl_rdy  = ((st == S_IN_DATA) && pad_ok) || (st == S_W_DATA) || (st == S_Q_DATA);
    dma_write_ctrl_vld = (st == S_ST_CTRL);
    dma_write_ctrl_dat = '{DMA_SIZE, cfg.len_out, cfg.out_add + 32'(sco) * cfg.offset_pe_out};
  end

  wire rd_hs = dma_read_chnl_vld && dma_read_chnl_rdy;
  wire wr_hs = dma_write_chnl_vld && dma_write_chnl_rdy;

  wire [IN_AW-1:0] st_cur  = IN_AW'(32'(sh) * N_W_IN_MAX + 32'(sw));
  wire             st_lw   = (sw == cfg.n_w_out - 16'd1);
  wire [IN_AW-1:0] st_next = st_lw ? IN_AW'((32'(sh) + 1) * N_W_IN_MAX) : IN_AW'(st_cur + 1'b1);

  assign out_raddr          = (st == S_ST_DATA && wr_hs) ? st_next : st_cur;
  assign dma_write_chnl_vld = (st == S_ST_DATA) && primed;
  assign dma_write_chnl_dat = {DEADBEEF, out_rdata[32*PW'(sco) +: 32]};

  assign conf_info_rdy = (st == S_IDLE);
  assign acc_done      = (st == S_DONE);

  // ---------------------------------------------------------------- phase sequencer
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= S_IDLE;
      conf_q <= '0;
      chan <= '0; row <= '0; col <= '0;
      wci <= '0; wj <= '0; wi <= '0; qi <= '0;
      bkh <= '0; bkw <= '0; bp <= '0; bg <= '0; bk <= '0;
      oh <= '0; ow <= '0; ckh <= '0; ckw <= '0; cp <= '0; cg <= '0;
      d_en <= 1'b0; d_val <= '0;
      sco <= '0; sh <= '0; sw <= '0; primed <= 1'b0;
      pb_v <= 1'b0; pb_ok <= 1'b0; pb_last <= 1'b0; pb_k <= '0; pb_dst <= '0; pb_word <= '0;
      for (int p = 0; p < PE; p++) begin w_cross[p] <= '0; sf_iw[p] <= '0; bias[p] <= '0; end
      sf_out_inv <= '0; z_out <= '0;
    end else begin
      pb_v <= 1'b0;
      if (pb_v) pb_word <= pb_next;
      d_en <= 1'b0;

      case (st)
        S_IDLE: if (conf_info_vld) begin
          conf_q <= conf_info_dat;
          chan <= '0;
          st <= S_IN_CTRL;
        end

        // ---------------- input tile, one transaction per channel
        S_IN_CTRL: if (dma_read_ctrl_rdy) begin row <= '0; col <= '0; st <= S_IN_DATA; end
        S_IN_DATA: if (!pad_ok || rd_hs) begin
          if (col != cfg.n_w_in - 16'd1) col <= col + 16'd1;
          else begin
            col <= '0;
            if (row != cfg.n_h_in - 16'd1) row <= row + 16'd1;
            else begin
              row <= '0;
              if (chan != cfg.n_c - 16'd1) begin chan <= chan + 16'd1; st <= S_IN_CTRL; end
              else st <= S_W_CTRL;
            end
          end
        end

        // ---------------- all kernels in one transaction
        S_W_CTRL: if (dma_read_ctrl_rdy) begin wci <= '0; wj <= '0; wi <= '0; st <= S_W_DATA; end
        S_W_DATA: if (rd_hs) begin
          if (wi != cfg.kern - 4'd1) wi <= wi + 4'd1;
          else begin
            wi <= '0;
            if (wj != cfg.kern - 4'd1) wj <= wj + 4'd1;
            else begin
              wj <= '0;
              if (wci != cfg.n_c - 16'd1) wci <= wci + 16'd1;
              else begin
                bkh <= '0; bkw <= '0; bp <= '0; bg <= '0; bk <= '0;
                st <= cfg.q_flag ? S_Q_CTRL : S_PACK_B;
              end
            end
          end
        end

        // ---------------- quantization constants, one set per channel
        S_Q_CTRL: if (dma_read_ctrl_rdy) begin qi <= '0; st <= S_Q_DATA; end
        S_Q_DATA: if (rd_hs) begin
          if (qi < 32'(cfg.n_c))
            w_cross[PW'(qi)] <= dma_read_chnl_dat[31:0];
          else if (qi < 32'(cfg.n_c) * 2)
            sf_iw[PW'(qi - 32'(cfg.n_c))] <= dma_read_chnl_dat[31:0];
          else if (qi < 32'(cfg.n_c) * 3)
            bias[PW'(qi - 32'(cfg.n_c) * 2)] <= dma_read_chnl_dat[31:0];
          else if (qi == 32'(cfg.n_c) * 3)
            sf_out_inv <= dma_read_chnl_dat[31:0];
          else
            z_out <= dma_read_chnl_dat[15:0];
          qi <= qi + 32'd1;
          if (qi == len_q - 32'd1) st <= S_PACK_B;
        end

        // ---------------- packing of kernel operands: group bg, slot bk
        S_PACK_B: begin
          pb_v    <= 1'b1;
          pb_k    <= bk;
          pb_ok   <= bp < kk;
          pb_last <= (bk == cfg.lanes - 3'd1);
          pb_dst  <= F_AW'(bg);
          bp      <= bp + 8'd1;
          if (bp < kk) {bkh, bkw} <= next_pos({bkh, bkw}, cfg.kern);
          if (bk != cfg.lanes - 3'd1) bk <= bk + 3'd1;
          else begin
            bk <= '0;
            if (bg != n_steps - 8'd1) bg <= bg + 8'd1;
            else st <= S_PACK_B_FLUSH;
          end
        end
        S_PACK_B_FLUSH: begin oh <= '0; ow <= '0; st <= S_C_INIT; end

        // ---------------- compute, one output pixel of all channels at a time
        S_C_INIT: begin ckh <= '0; ckw <= '0; cp <= '0; cg <= '0; st <= S_C_MAC; end
        S_C_MAC: begin
          d_en  <= 1'b1;
          d_val <= cval;
          {ckh, ckw} <= cpos_next;
          cp <= cp + 8'(cfg.lanes);
          cg <= cg + 8'd1;
          if (cg == n_steps - 8'd1) st <= S_C_DRAIN;
        end
        S_C_DRAIN: st <= S_C_WB;
        S_C_WB: begin
          if (ow != cfg.n_w_out - 16'd1) begin ow <= ow + 16'd1; st <= S_C_INIT; end
          else begin
            ow <= '0;
            if (oh != cfg.n_h_out - 16'd1) begin oh <= oh + 16'd1; st <= S_C_INIT; end
            else begin sco <= '0; st <= S_ST_CTRL; end
          end
        end

        // ---------------- store, one transaction per channel
        S_ST_CTRL: if (dma_write_ctrl_rdy) begin sh <= '0; sw <= '0; primed <= 1'b0; st <= S_ST_DATA; end
        S_ST_DATA: begin
          primed <= 1'b1;
          if (wr_hs) begin
            if (!st_lw) sw <= sw + 16'd1;
            else begin
              sw <= '0;
              if (sh != cfg.n_h_out - 16'd1) sh <= sh + 16'd1;
              else begin
                primed <= 1'b0;
                if (sco != cfg.n_c - 16'd1) begin sco <= sco + 16'd1; st <= S_ST_CTRL; end
                else st <= S_DONE;
              end
            end
          end
        end

        S_DONE:  st <= S_IDLE;
        default: st <= S_IDLE;
      endcase
    end
  end

  // ---------------------------------------------------------------- socket rules
  a_rd_ctrl_stable: assert property (@(posedge clk) disable iff (!rst_n)
    dma_read_ctrl_vld && !dma_read_ctrl_rdy |=> dma_read_ctrl_vld && $stable(dma_read_ctrl_dat));
  a_wr_ctrl_stable: assert property (@(posedge clk) disable iff (!rst_n)
    dma_write_ctrl_vld && !dma_write_ctrl_rdy |=> dma_write_ctrl_vld && $stable(dma_write_ctrl_dat));
  a_wr_data_stable: assert property (@(posedge clk) disable iff (!rst_n)
    dma_write_chnl_vld && !dma_write_chnl_rdy |=> dma_write_chnl_vld && $stable(dma_write_chnl_dat));

endmodule

// conv2d_acc: precision-scalable 2D-convolution accelerator with an ESP-style
// socket interface (top of the design).
//
// One invocation computes one tile of a convolution layer. The processor (or a
// tiling driver) writes the 14 configuration registers, which arrive as one
// conf_info word; the accelerator then runs four phases in sequence and pulses
// acc_done:
//   load    - one DMA read per input channel (offset in_add + c*offset_read_ci,
//             n_w*n_h words) written into plm_in with zero padding inserted
//             around the tile as pad/pad_type ask; one DMA read per filter
//             (w_add + co*offset_pe, kern*kern*n_c words) into plm_f; when
//             q_flag, one read of 3*filt+2 quantization constants
//   packing - plm_in and plm_f are re-read and packed into 16-bit ST operands:
//             1 x 16-bit, 2 x 8-bit or 4 x 4-bit values of consecutive input
//             channels (CONFIG1), missing channels filled with zeros; weight
//             values go to the operand in the opposite order so that the ST
//             multiplier pairs equal channels
//   compute - conv2d_compute: PE processing elements, one per output channel,
//             output stationary, partial sums kept in an accumulator buffer
//             across invocations (acc_flag), optional quantization and ReLU
//   store   - one DMA write per output channel (out_add + co*offset_pe_out,
//             n_w_out*n_h_out words); each 64-bit beat carries the 32-bit
//             result in its low half and 0xdeadbeef in its high half
// All channels are valid/ready handshakes: a word moves on a clock edge where
// both are high, and an offered word is held until taken. Reset `rst` is
// active low. The load and store loops move one DMA word per clock when the
// socket keeps up; packing takes one clock per value read; compute one clock
// per MAC step plus four per output pixel.
// Following the accelerator description: the phase order, the loop orders,
// PLM layouts and DMA transactions, the padding rules, the packing order and
// the register map. This design's own choices: the handshake encoding of the
// channels, the conf_info field order, the fixed-point quantization formats,
// and that only the low 32 bits of a DMA read beat carry data.
module conv2d_acc
  import conv2d_pkg::*;
#(
  parameter int unsigned PE         = 16,
  parameter int unsigned N_C_MAX    = 16,
  parameter int unsigned N_H_IN_MAX = 18,
  parameter int unsigned N_W_IN_MAX = 18,
  parameter int unsigned KERN_MAX   = 7
) (
  input  logic                 clk,
  input  logic                 rst,
  // configuration registers
  input  conf_info_t           conf_info_dat,
  input  logic                 conf_info_vld,
  output logic                 conf_info_rdy,
  // DMA read
  output dma_info_t            dma_read_ctrl_dat,
  output logic                 dma_read_ctrl_vld,
  input  logic                 dma_read_ctrl_rdy,
  input  logic [DMA_WIDTH-1:0] dma_read_chnl_dat,
  input  logic                 dma_read_chnl_vld,
  output logic                 dma_read_chnl_rdy,
  // DMA write
  output dma_info_t            dma_write_ctrl_dat,
  output logic                 dma_write_ctrl_vld,
  input  logic                 dma_write_ctrl_rdy,
  output logic [DMA_WIDTH-1:0] dma_write_chnl_dat,
  output logic                 dma_write_chnl_vld,
  input  logic                 dma_write_chnl_rdy,
  // end of tile
  output logic                 acc_done
);

  localparam int unsigned IN_DEPTH = N_H_IN_MAX * N_W_IN_MAX * N_C_MAX;
  localparam int unsigned F_DEPTH  = KERN_MAX * KERN_MAX * N_C_MAX * PE;
  localparam int unsigned B_DEPTH  = KERN_MAX * KERN_MAX * N_C_MAX;
  localparam int unsigned O_DEPTH  = N_H_IN_MAX * N_W_IN_MAX;
  localparam int unsigned IN_AW    = $clog2(IN_DEPTH);
  localparam int unsigned F_AW     = $clog2(F_DEPTH);
  localparam int unsigned B_AW     = $clog2(B_DEPTH);
  localparam int unsigned O_AW     = $clog2(O_DEPTH);
  localparam int unsigned PW       = (PE > 1) ? $clog2(PE) : 1;

  wire rst_n = rst;

  typedef enum logic [4:0] {
    S_IDLE, S_IN_CTRL, S_IN_DATA, S_W_CTRL, S_W_DATA, S_Q_CTRL, S_Q_DATA,
    S_PACK_A, S_PACK_A_FLUSH, S_PACK_B, S_PACK_B_FLUSH, S_COMP, S_COMP_WAIT,
    S_ST_CTRL, S_ST_DATA, S_DONE
  } state_e;
  state_e st;

  // ---------------------------------------------------------------- config
  conf_info_t conf_q;
  cfg_t       cfg;

  conv2d_cfg u_cfg (.conf(conf_q), .cfg(cfg));

  // ---------------------------------------------------------------- PLMs
  logic             in_we;
  logic [IN_AW-1:0] in_waddr, in_raddr;
  logic [31:0]      in_wdata, in_rdata;
  logic             f_we;
  logic [F_AW-1:0]  f_waddr, f_raddr;
  logic [31:0]      f_wdata, f_rdata;
  logic             pa_we;
  logic [IN_AW-1:0] pa_waddr, pa_raddr;
  logic [15:0]      pa_wdata, pa_rdata;
  logic [PE-1:0]    pb_we;
  logic [B_AW-1:0]  pb_waddr, pb_raddr;
  logic [PE*16-1:0] pb_wdata, pb_rdata;
  logic [PE-1:0]    acc_we, out_we;
  logic [O_AW-1:0]  acc_waddr, acc_raddr, out_waddr, out_raddr;
  logic [PE*32-1:0] acc_wdata, acc_rdata, out_wdata, out_rdata;

  plm_ram #(.DEPTH(IN_DEPTH), .LANES(1),  .LANE_W(32)) u_plm_in  (.clk, .we(in_we), .waddr(in_waddr), .wdata(in_wdata), .raddr(in_raddr), .rdata(in_rdata));
  plm_ram #(.DEPTH(F_DEPTH),  .LANES(1),  .LANE_W(32)) u_plm_f   (.clk, .we(f_we),  .waddr(f_waddr),  .wdata(f_wdata),  .raddr(f_raddr),  .rdata(f_rdata));
  plm_ram #(.DEPTH(IN_DEPTH), .LANES(1),  .LANE_W(16)) u_a_reconf(.clk, .we(pa_we), .waddr(pa_waddr), .wdata(pa_wdata), .raddr(pa_raddr), .rdata(pa_rdata));
  plm_ram #(.DEPTH(B_DEPTH),  .LANES(PE), .LANE_W(16)) u_b_reconf(.clk, .we(pb_we), .waddr(pb_waddr), .wdata(pb_wdata), .raddr(pb_raddr), .rdata(pb_rdata));
  plm_ram #(.DEPTH(O_DEPTH),  .LANES(PE), .LANE_W(32)) u_buf_acc (.clk, .we(acc_we), .waddr(acc_waddr), .wdata(acc_wdata), .raddr(acc_raddr), .rdata(acc_rdata));
  plm_ram #(.DEPTH(O_DEPTH),  .LANES(PE), .LANE_W(32)) u_plm_out (.clk, .we(out_we), .waddr(out_waddr), .wdata(out_wdata), .raddr(out_raddr), .rdata(out_rdata));

  // ---------------------------------------------------------------- quantization constants
  logic signed [31:0] w_cross [PE];
  logic signed [31:0] sf_iw   [PE];
  logic signed [31:0] bias    [PE];
  logic signed [31:0] sf_out_inv;
  logic signed [15:0] z_out;

  // ---------------------------------------------------------------- counters
  logic [15:0] chan, row, col;               // input load
  logic [15:0] co, wci;  logic [3:0] wj, wi; // weight load
  logic [31:0] qi;                           // quantization load
  logic [15:0] ph, pw, pg; logic [2:0] pk;   // input packing
  logic [3:0]  bi, bj; logic [15:0] bg, bco; logic [2:0] bk; // weight packing
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

  // ---------------------------------------------------------------- operand packing helpers
  // Input operand: value k of a group at the k-th lowest field.
  function automatic logic [15:0] place_a(input logic [15:0] w, input logic [2:0] k,
                                          input logic [15:0] v, input logic [2:0] lanes);
    logic [15:0] r;
    r = w;
    case (lanes)
      3'd4:    r[4*k +: 4] = v[3:0];
      3'd2:    r[8*k +: 8] = v[7:0];
      default: r = v;
    endcase
    return r;
  endfunction

  // Weight operand: value k of a group at the k-th highest field.
  function automatic logic [15:0] place_b(input logic [15:0] w, input logic [2:0] k,
                                          input logic [15:0] v, input logic [2:0] lanes);
    logic [15:0] r;
    r = w;
    case (lanes)
      3'd4:    r[12 - 4*k +: 4] = v[3:0];
      3'd2:    r[8 - 8*k +: 8]  = v[7:0];
      default: r = v;
    endcase
    return r;
  endfunction

  // packing pipeline: a read issued in one cycle is placed in the next
  logic             pa_v, pa_ok, pa_last;
  logic [2:0]       pa_k;
  logic [IN_AW-1:0] pa_dst;
  logic [15:0]      pa_word, pa_next;
  logic             pb_v, pb_ok, pb_last;
  logic [2:0]       pb_k;
  logic [B_AW-1:0]  pb_dst;
  logic [15:0]      pb_lane;
  logic [15:0]      pb_word, pb_next;

  assign pa_next = place_a(pa_word, pa_k, pa_ok ? in_rdata[15:0] : 16'd0, cfg.lanes);
  assign pb_next = place_b(pb_word, pb_k, pb_ok ? f_rdata[15:0]  : 16'd0, cfg.lanes);

  wire [15:0] pa_ch = 16'(32'(pg) * 32'(cfg.lanes) + 32'(pk));
  wire [15:0] pb_ch = 16'(32'(bg) * 32'(cfg.lanes) + 32'(bk));

  always_comb begin
    in_raddr = IN_AW'((32'(ph) * N_W_IN_MAX + 32'(pw)) * N_C_MAX + 32'(pa_ch));
    f_raddr  = F_AW'(((32'(bi) * KERN_MAX + 32'(bj)) * N_C_MAX + 32'(pb_ch)) * PE + 32'(bco));
    pa_we    = pa_v && pa_last;
    pa_waddr = pa_dst;
    pa_wdata = pa_next;
    pb_we    = (pb_v && pb_last) ? (PE'(1) << pb_lane) : '0;
    pb_waddr = pb_dst;
    pb_wdata = {PE{pb_next}};
  end

  // ---------------------------------------------------------------- load writes
  always_comb begin
    in_we    = 1'b0;
    in_waddr = IN_AW'((32'(row) * N_W_IN_MAX + 32'(col)) * N_C_MAX + 32'(chan));
    in_wdata = '0;
    if (st == S_IN_DATA) begin
      if (!pad_ok)                in_we = 1'b1;
      else if (dma_read_chnl_vld) begin in_we = 1'b1; in_wdata = dma_read_chnl_dat[31:0]; end
    end
    f_we    = (st == S_W_DATA) && dma_read_chnl_vld;
    f_waddr = F_AW'(((32'(wj) * KERN_MAX + 32'(wi)) * N_C_MAX + 32'(wci)) * PE + 32'(co));
    f_wdata = dma_read_chnl_dat[31:0];
  end

  // ---------------------------------------------------------------- DMA channels
  always_comb begin
    dma_read_ctrl_vld = 1'b0;
    dma_read_ctrl_dat = '0;
    case (st)
      S_IN_CTRL: begin dma_read_ctrl_vld = 1'b1; dma_read_ctrl_dat = '{DMA_SIZE, cfg.len_in, cfg.in_add + 32'(chan) * cfg.offset_read_ci}; end
      S_W_CTRL:  begin dma_read_ctrl_vld = 1'b1; dma_read_ctrl_dat = '{DMA_SIZE, cfg.len_w,  cfg.w_add  + 32'(co)   * cfg.offset_pe}; end
      S_Q_CTRL:  begin dma_read_ctrl_vld = 1'b1; dma_read_ctrl_dat = '{DMA_SIZE, cfg.len_q,  cfg.offset_q_data}; end
      default: ;
    endcase
    dma_read_chnl_rdy = ((st == S_IN_DATA) && pad_ok) || (st == S_W_DATA) || (st == S_Q_DATA);
    dma_write_ctrl_vld = (st == S_ST_CTRL);
    dma_write_ctrl_dat = '{DMA_SIZE, cfg.len_out, cfg.out_add + 32'(sco) * cfg.offset_pe_out};
  end

  wire rd_hs = dma_read_chnl_vld && dma_read_chnl_rdy;
  wire wr_hs = dma_write_chnl_vld && dma_write_chnl_rdy;

  // store: the output PLM address advances on the handshake so data streams at one word per clock
  wire [O_AW-1:0] st_cur  = O_AW'(32'(sh) * N_W_IN_MAX + 32'(sw));
  wire            st_lw   = (sw == cfg.n_w_out - 16'd1);
  wire [O_AW-1:0] st_next = st_lw ? O_AW'((32'(sh) + 1) * N_W_IN_MAX) : O_AW'(st_cur + 1'b1);

  assign out_raddr          = (st == S_ST_DATA && wr_hs) ? st_next : st_cur;
  assign dma_write_chnl_vld = (st == S_ST_DATA) && primed;
  assign dma_write_chnl_dat = {DEADBEEF, out_rdata[32*PW'(sco) +: 32]};

  assign conf_info_rdy = (st == S_IDLE);
  assign acc_done      = (st == S_DONE);

  // ---------------------------------------------------------------- compute phase
  logic comp_start, comp_done;
  assign comp_start = (st == S_COMP);

  conv2d_compute #(
    .PE(PE), .N_C_MAX(N_C_MAX), .N_H_IN_MAX(N_H_IN_MAX), .N_W_IN_MAX(N_W_IN_MAX), .KERN_MAX(KERN_MAX)
  ) u_compute (
    .clk, .rst_n,
    .start(comp_start), .done(comp_done),
    .n_h_out(cfg.n_h_out), .n_w_out(cfg.n_w_out), .n_grp(cfg.n_grp), .kern(cfg.kern),
    .stride(cfg.stride), .config1(cfg.config1), .config2(cfg.config2),
    .acc_flag(cfg.acc_flag), .q_flag(cfg.q_flag), .relu_flag(cfg.relu_flag),
    .w_cross, .sf_iw, .bias, .sf_out_inv, .z_out,
    .a_raddr(pa_raddr), .a_rdata(pa_rdata),
    .b_raddr(pb_raddr), .b_rdata(pb_rdata),
    .acc_raddr, .acc_rdata, .acc_we, .acc_waddr, .acc_wdata,
    .out_we, .out_waddr, .out_wdata
  );

  // ---------------------------------------------------------------- phase sequencer
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= S_IDLE;
      conf_q <= '0;
      chan <= '0; row <= '0; col <= '0;
      co <= '0; wci <= '0; wj <= '0; wi <= '0; qi <= '0;
      ph <= '0; pw <= '0; pg <= '0; pk <= '0;
      bi <= '0; bj <= '0; bg <= '0; bco <= '0; bk <= '0;
      sco <= '0; sh <= '0; sw <= '0; primed <= 1'b0;
      pa_v <= 1'b0; pa_ok <= 1'b0; pa_last <= 1'b0; pa_k <= '0; pa_dst <= '0; pa_word <= '0;
      pb_v <= 1'b0; pb_ok <= 1'b0; pb_last <= 1'b0; pb_k <= '0; pb_dst <= '0; pb_lane <= '0; pb_word <= '0;
      for (int p = 0; p < PE; p++) begin w_cross[p] <= '0; sf_iw[p] <= '0; bias[p] <= '0; end
      sf_out_inv <= '0; z_out <= '0;
    end else begin
      // packing capture stage
      pa_v <= 1'b0;
      pb_v <= 1'b0;
      if (pa_v) pa_word <= pa_next;
      if (pb_v) pb_word <= pb_next;

      case (st)
        S_IDLE: if (conf_info_vld) begin
          conf_q <= conf_info_dat;
          chan <= '0;
          st <= S_IN_CTRL;
        end

        // ---------------- input tile
        S_IN_CTRL: if (dma_read_ctrl_rdy) begin row <= '0; col <= '0; st <= S_IN_DATA; end
        S_IN_DATA: if (!pad_ok || rd_hs) begin
          if (col != cfg.n_w_in - 16'd1) col <= col + 16'd1;
          else begin
            col <= '0;
            if (row != cfg.n_h_in - 16'd1) row <= row + 16'd1;
            else begin
              row <= '0;
              if (chan != cfg.n_c - 16'd1) begin chan <= chan + 16'd1; st <= S_IN_CTRL; end
              else begin co <= '0; st <= S_W_CTRL; end
            end
          end
        end

        // ---------------- weight tile
        S_W_CTRL: if (dma_read_ctrl_rdy) begin wci <= '0; wj <= '0; wi <= '0; st <= S_W_DATA; end
        S_W_DATA: if (rd_hs) begin
          if (wi != cfg.kern - 4'd1) wi <= wi + 4'd1;
          else begin
            wi <= '0;
            if (wj != cfg.kern - 4'd1) wj <= wj + 4'd1;
            else begin
              wj <= '0;
              if (wci != cfg.n_c - 16'd1) wci <= wci + 16'd1;
              else if (co != cfg.filt - 16'd1) begin co <= co + 16'd1; st <= S_W_CTRL; end
              else begin
                ph <= '0; pw <= '0; pg <= '0; pk <= '0;
                st <= cfg.q_flag ? S_Q_CTRL : S_PACK_A;
              end
            end
          end
        end

        // ---------------- quantization constants
        S_Q_CTRL: if (dma_read_ctrl_rdy) begin qi <= '0; st <= S_Q_DATA; end
        S_Q_DATA: if (rd_hs) begin
          if (qi < 32'(cfg.filt))
            w_cross[PW'(qi)] <= dma_read_chnl_dat[31:0];
          else if (qi < 32'(cfg.filt) * 2)
            sf_iw[PW'(qi - 32'(cfg.filt))] <= dma_read_chnl_dat[31:0];
          else if (qi < 32'(cfg.filt) * 3)
            bias[PW'(qi - 32'(cfg.filt) * 2)] <= dma_read_chnl_dat[31:0];
          else if (qi == 32'(cfg.filt) * 3)
            sf_out_inv <= dma_read_chnl_dat[31:0];
          else
            z_out <= dma_read_chnl_dat[15:0];
          qi <= qi + 32'd1;
          if (qi == cfg.len_q - 32'd1) st <= S_PACK_A;
        end

        // ---------------- packing of input operands
        S_PACK_A: begin
          pa_v    <= 1'b1;
          pa_k    <= pk;
          pa_ok   <= pa_ch < cfg.n_c;
          pa_last <= (pk == cfg.lanes - 3'd1);
          pa_dst  <= IN_AW'((32'(ph) * N_W_IN_MAX + 32'(pw)) * N_C_MAX + 32'(pg));
          if (pk != cfg.lanes - 3'd1) pk <= pk + 3'd1;
          else begin
            pk <= '0;
            if (pg != cfg.n_grp - 16'd1) pg <= pg + 16'd1;
            else begin
              pg <= '0;
              if (pw != cfg.n_w_in - 16'd1) pw <= pw + 16'd1;
              else begin
                pw <= '0;
                if (ph != cfg.n_h_in - 16'd1) ph <= ph + 16'd1;
                else st <= S_PACK_A_FLUSH;
              end
            end
          end
        end
        S_PACK_A_FLUSH: begin bi <= '0; bj <= '0; bg <= '0; bco <= '0; bk <= '0; st <= S_PACK_B; end

        // ---------------- packing of weight operands
        S_PACK_B: begin
          pb_v    <= 1'b1;
          pb_k    <= bk;
          pb_ok   <= pb_ch < cfg.n_c;
          pb_last <= (bk == cfg.lanes - 3'd1);
          pb_lane <= bco;
          pb_dst  <= B_AW'((32'(bi) * KERN_MAX + 32'(bj)) * N_C_MAX + 32'(bg));
          if (bk != cfg.lanes - 3'd1) bk <= bk + 3'd1;
          else begin
            bk <= '0;
            if (bco != cfg.filt - 16'd1) bco <= bco + 16'd1;
            else begin
              bco <= '0;
              if (bg != cfg.n_grp - 16'd1) bg <= bg + 16'd1;
              else begin
                bg <= '0;
                if (bj != cfg.kern - 4'd1) bj <= bj + 4'd1;
                else begin
                  bj <= '0;
                  if (bi != cfg.kern - 4'd1) bi <= bi + 4'd1;
                  else st <= S_PACK_B_FLUSH;
                end
              end
            end
          end
        end
        S_PACK_B_FLUSH: st <= S_COMP;

        // ---------------- compute
        S_COMP:      st <= S_COMP_WAIT;
        S_COMP_WAIT: if (comp_done) begin sco <= '0; st <= S_ST_CTRL; end

        // ---------------- store
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
                if (sco != cfg.filt - 16'd1) begin sco <= sco + 16'd1; st <= S_ST_CTRL; end
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

  // ---------------------------------------------------------------- handshake rules
  a_rd_ctrl_hold: assert property (@(posedge clk) disable iff (!rst_n)
    dma_read_ctrl_vld && !dma_read_ctrl_rdy |=> dma_read_ctrl_vld && $stable(dma_read_ctrl_dat));
  a_wr_ctrl_hold: assert property (@(posedge clk) disable iff (!rst_n)
    dma_write_ctrl_vld && !dma_write_ctrl_rdy |=> dma_write_ctrl_vld && $stable(dma_write_ctrl_dat));
  a_wr_chnl_hold: assert property (@(posedge clk) disable iff (!rst_n)
    dma_write_chnl_vld && !dma_write_chnl_rdy |=> dma_write_chnl_vld && $stable(dma_write_chnl_dat));

endmodule

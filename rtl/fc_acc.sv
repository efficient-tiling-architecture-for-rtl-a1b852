// fc_acc: precision-scalable fully-connected accelerator with the same
// ESP-style socket as conv2d_acc.
//
// Computes y[m] = sum_n x[n] * W[m][n] for one tile of up to N_MAX input
// activations and PE output neurons. One invocation runs, in order:
//   load    - one DMA read of the n input activations (in_add, n words); one
//             DMA read per output neuron m (w_add + m*offset_pe, n words) into
//             the weight PLM, neuron m in lane m of word n; when q_flag, one
//             read of 3*m + 2 quantization constants
//   packing - activations and weights are packed into pairs of 16-bit ST
//             operands: step s holds activations s*2L .. s*2L+2L-1 (L = 1, 2
//             or 4 values per operand by CONFIG1), the first L in operand 1
//             and the next L in operand 2, activation k of an operand at its
//             k-th lowest field and weight k at its k-th highest; positions
//             past n are zero
//   compute - PE processing elements, one per output neuron, each with two ST
//             multipliers, take one step per clock: ceil(n / 2L) steps plus 3
//             clocks. Each PE starts from zero or, with acc_flag, from its sum
//             of the previous invocation, so an input vector split into tiles
//             is summed on chip; the result is kept for the next tile and,
//             quantized (q_flag, with optional ReLU) or raw, placed in the
//             output registers
//   store   - one DMA write of the m outputs (out_add, m words), 0xdeadbeef in
//             the upper half of each beat, then acc_done for one clock.
// Register fields reuse the 2D accelerator's map (decoded by conv2d_cfg): n_c
// holds n, filt holds m, offset_pe the distance between weight rows; the
// spatial, padding and offset_read_ci fields are not used.
// Following the accelerator description: the load transactions and PLM index
// (weight word n, lane m), two ST multipliers per PE, the packing order and
// zero fill of the operands, accumulation over input tiles, a single store
// transaction. This design's own choices: N_MAX, the packed operand buffers,
// the register reuse and the cycle schedule.
module fc_acc
  import conv2d_pkg::*;
#(
  parameter int unsigned PE    = 16,
  parameter int unsigned N_MAX = 1024
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

  localparam int unsigned NW  = $clog2(N_MAX);
  localparam int unsigned S_MAX = N_MAX / 2;
  localparam int unsigned SW  = $clog2(S_MAX);
  localparam int unsigned PW  = (PE > 1) ? $clog2(PE) : 1;

  wire rst_n = rst;

  typedef enum logic [3:0] {
    S_IDLE, S_IN_CTRL, S_IN_DATA, S_W_CTRL, S_W_DATA, S_Q_CTRL, S_Q_DATA,
    S_PACK, S_PACK_FLUSH, S_C_INIT, S_C_MAC, S_C_DRAIN, S_C_WB,
    S_ST_CTRL, S_ST_DATA, S_DONE
  } state_e;
  state_e st;

  // ---------------------------------------------------------------- config
  conf_info_t conf_q;
  cfg_t       cfg;
  conv2d_cfg u_cfg (.conf(conf_q), .cfg(cfg));

  logic [15:0] n_in, m_out;
  logic [3:0]  l2;                 // activations per step, 2*lanes
  logic [15:0] n_steps;
  logic [31:0] len_q;
  assign n_in    = cfg.n_c;
  assign m_out   = cfg.filt;
  assign l2      = {cfg.lanes, 1'b0};
  assign n_steps = (cfg.lanes == 3'd4) ? (n_in + 16'd7) >> 3
                 : (cfg.lanes == 3'd2) ? (n_in + 16'd3) >> 2 : (n_in + 16'd1) >> 1;
  assign len_q   = 32'(m_out) * 3 + 32'd2;

  // ---------------------------------------------------------------- PLMs
  logic             in_we;
  logic [NW-1:0]    in_waddr, in_raddr;
  logic [15:0]      in_wdata, in_rdata;
  logic [PE-1:0]    f_we;
  logic [NW-1:0]    f_waddr, f_raddr;
  logic [PE*16-1:0] f_wdata, f_rdata;
  logic             pa_we;
  logic [SW-1:0]    pa_waddr, pa_raddr;
  logic [31:0]      pa_wdata, pa_rdata;
  logic [PE-1:0]    pb_we;
  logic [SW-1:0]    pb_waddr, pb_raddr;
  logic [PE*32-1:0] pb_wdata, pb_rdata;

  plm_ram #(.DEPTH(N_MAX), .LANES(1),  .LANE_W(16)) u_plm_in   (.clk, .we(in_we), .waddr(in_waddr), .wdata(in_wdata), .raddr(in_raddr), .rdata(in_rdata));
  plm_ram #(.DEPTH(N_MAX), .LANES(PE), .LANE_W(16)) u_plm_f    (.clk, .we(f_we),  .waddr(f_waddr),  .wdata(f_wdata),  .raddr(f_raddr),  .rdata(f_rdata));
  plm_ram #(.DEPTH(S_MAX), .LANES(1),  .LANE_W(32)) u_a_reconf (.clk, .we(pa_we), .waddr(pa_waddr), .wdata(pa_wdata), .raddr(pa_raddr), .rdata(pa_rdata));
  plm_ram #(.DEPTH(S_MAX), .LANES(PE), .LANE_W(32)) u_b_reconf (.clk, .we(pb_we), .waddr(pb_waddr), .wdata(pb_wdata), .raddr(pb_raddr), .rdata(pb_rdata));

  // ---------------------------------------------------------------- quantization constants, results
  logic signed [31:0] w_cross [PE];
  logic signed [31:0] sf_iw   [PE];
  logic signed [31:0] bias    [PE];
  logic signed [31:0] sf_out_inv;
  logic signed [15:0] z_out;
  logic signed [31:0] acc_buf [PE];      // partial sums kept across input tiles
  logic signed [31:0] out_reg [PE];      // values of the store phase

  // ---------------------------------------------------------------- counters
  logic [15:0] ni, mi;                   // loads
  logic [31:0] qi;
  logic [15:0] pn, ps; logic [3:0] pe_k; // packing: activation, step, slot
  logic [15:0] cs;                       // compute step
  logic [15:0] sco;                      // store

  // ---------------------------------------------------------------- packing pipeline
  // slot k < L goes to operand 1 field k, slot k >= L to operand 2 field k-L
  function automatic logic [31:0] place(input logic [31:0] w, input logic [3:0] k, input logic [15:0] v,
                                        input logic [2:0] lanes, input logic rev);
    logic [31:0] r;
    logic [3:0]  f;
    logic        hi;
    r  = w;
    hi = (k >= 4'(lanes));
    f  = hi ? k - 4'(lanes) : k;
    case (lanes)
      3'd4:    r[16*hi + (rev ? 12 - 4*f : 4*f) +: 4] = v[3:0];
      3'd2:    r[16*hi + (rev ? 8 - 8*f : 8*f) +: 8]  = v[7:0];
      default: r[16*hi +: 16] = v;
    endcase
    return r;
  endfunction

  logic             pk_v, pk_ok, pk_last;
  logic [3:0]       pk_k;
  logic [SW-1:0]    pk_dst;
  logic [31:0]      pa_word, pa_next;
  logic [PE*32-1:0] pb_word, pb_next;

  always_comb begin
    pa_next = place(pa_word, pk_k, pk_ok ? in_rdata : 16'd0, cfg.lanes, 1'b0);
    for (int m = 0; m < PE; m++)
      pb_next[32*m +: 32] = place(pb_word[32*m +: 32], pk_k, pk_ok ? f_rdata[16*m +: 16] : 16'd0, cfg.lanes, 1'b1);
  end

  assign in_raddr = NW'(pn);
  assign f_raddr  = NW'(pn);
  assign pa_we    = pk_v && pk_last;
  assign pa_waddr = pk_dst;
  assign pa_wdata = pa_next;
  assign pb_we    = (pk_v && pk_last) ? '1 : '0;
  assign pb_waddr = pk_dst;
  assign pb_wdata = pb_next;

  // ---------------------------------------------------------------- load writes
  assign in_we    = (st == S_IN_DATA) && dma_read_chnl_vld;
  assign in_waddr = NW'(ni);
  assign in_wdata = dma_read_chnl_dat[15:0];
  assign f_we     = (st == S_W_DATA && dma_read_chnl_vld) ? (PE'(1) << mi[PW-1:0]) : '0;
  assign f_waddr  = NW'(ni);
  assign f_wdata  = {PE{dma_read_chnl_dat[15:0]}};

  // ---------------------------------------------------------------- PEs
  logic d_en, pe_load;
  logic signed [31:0] pe_acc [PE];
  logic signed [31:0] pe_q   [PE];

  assign pa_raddr = SW'(cs);
  assign pb_raddr = SW'(cs);
  assign pe_load  = (st == S_C_INIT);

  for (genvar m = 0; m < PE; m++) begin : g_pe
    fc_pe u_pe (
      .clk, .rst_n, .load(pe_load), .init(cfg.acc_flag ? acc_buf[m] : 32'sd0), .en(d_en),
      .a1(pa_rdata[15:0]), .b1(pb_rdata[32*m +: 16]), .a2(pa_rdata[31:16]), .b2(pb_rdata[32*m+16 +: 16]),
      .cfg(cfg.config1), .acc(pe_acc[m]));
    requant u_rq (
      .acc(pe_acc[m]), .w_cross(w_cross[m]), .sf_iw(sf_iw[m]), .bias(bias[m]),
      .sf_out_inv, .z_out, .en_relu(cfg.relu_flag), .config2(cfg.config2), .q(pe_q[m]));
  end

  // ---------------------------------------------------------------- DMA channels
  always_comb begin
    dma_read_ctrl_vld = 1'b0;
    dma_read_ctrl_dat = '0;
    case (st)
      S_IN_CTRL: begin dma_read_ctrl_vld = 1'b1; dma_read_ctrl_dat = '{DMA_SIZE, 32'(n_in), cfg.in_add}; end
      S_W_CTRL:  begin dma_read_ctrl_vld = 1'b1; dma_read_ctrl_dat = '{DMA_SIZE, 32'(n_in), cfg.w_add + 32'(mi) * cfg.offset_pe}; end
      S_Q_CTRL:  begin dma_read_ctrl_vld = 1'b1; dma_read_ctrl_dat = '{DMA_SIZE, len_q, cfg.offset_q_data}; end
      default: ;
    endcase
    dma_read_chnl_rdy  = (st == S_IN_DATA) || (st == S_W_DATA) || (st == S_Q_DATA);
    dma_write_ctrl_vld = (st == S_ST_CTRL);
    dma_write_ctrl_dat = '{DMA_SIZE, 32'(m_out), cfg.out_add};
  end

  wire rd_hs = dma_read_chnl_vld && dma_read_chnl_rdy;
  wire wr_hs = dma_write_chnl_vld && dma_write_chnl_rdy;

  assign dma_write_chnl_vld = (st == S_ST_DATA);
  assign dma_write_chnl_dat = {DEADBEEF, out_reg[PW'(sco)]};
  assign conf_info_rdy      = (st == S_IDLE);
  assign acc_done           = (st == S_DONE);

  // ---------------------------------------------------------------- phase sequencer
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= S_IDLE;
      conf_q <= '0;
      ni <= '0; mi <= '0; qi <= '0;
      pn <= '0; ps <= '0; pe_k <= '0; cs <= '0; sco <= '0;
      pk_v <= 1'b0; pk_ok <= 1'b0; pk_last <= 1'b0; pk_k <= '0; pk_dst <= '0;
      pa_word <= '0; pb_word <= '0; d_en <= 1'b0;
      for (int p = 0; p < PE; p++) begin
        w_cross[p] <= '0; sf_iw[p] <= '0; bias[p] <= '0; acc_buf[p] <= '0; out_reg[p] <= '0;
      end
      sf_out_inv <= '0; z_out <= '0;
    end else begin
      pk_v <= 1'b0;
      if (pk_v) begin pa_word <= pa_next; pb_word <= pb_next; end
      d_en <= 1'b0;

      case (st)
        S_IDLE: if (conf_info_vld) begin conf_q <= conf_info_dat; st <= S_IN_CTRL; end

        // ---------------- input vector
        S_IN_CTRL: if (dma_read_ctrl_rdy) begin ni <= '0; st <= S_IN_DATA; end
        S_IN_DATA: if (rd_hs) begin
          ni <= ni + 16'd1;
          if (ni == n_in - 16'd1) begin mi <= '0; st <= S_W_CTRL; end
        end

        // ---------------- one weight row per output neuron
        S_W_CTRL: if (dma_read_ctrl_rdy) begin ni <= '0; st <= S_W_DATA; end
        S_W_DATA: if (rd_hs) begin
          ni <= ni + 16'd1;
          if (ni == n_in - 16'd1) begin
            if (mi != m_out - 16'd1) begin mi <= mi + 16'd1; st <= S_W_CTRL; end
            else begin
              pn <= '0; ps <= '0; pe_k <= '0;
              st <= cfg.q_flag ? S_Q_CTRL : S_PACK;
            end
          end
        end

        // ---------------- quantization constants
        S_Q_CTRL: if (dma_read_ctrl_rdy) begin qi <= '0; st <= S_Q_DATA; end
        S_Q_DATA: if (rd_hs) begin
          if (qi < 32'(m_out))
            w_cross[PW'(qi)] <= dma_read_chnl_dat[31:0];
          else if (qi < 32'(m_out) * 2)
            sf_iw[PW'(qi - 32'(m_out))] <= dma_read_chnl_dat[31:0];
          else if (qi < 32'(m_out) * 3)
            bias[PW'(qi - 32'(m_out) * 2)] <= dma_read_chnl_dat[31:0];
          else if (qi == 32'(m_out) * 3)
            sf_out_inv <= dma_read_chnl_dat[31:0];
          else
            z_out <= dma_read_chnl_dat[15:0];
          qi <= qi + 32'd1;
          if (qi == len_q - 32'd1) st <= S_PACK;
        end

        // ---------------- operand packing, one activation (and its weights) per clock
        S_PACK: begin
          pk_v    <= 1'b1;
          pk_k    <= pe_k;
          pk_ok   <= pn < n_in;
          pk_last <= (pe_k == l2 - 4'd1);
          pk_dst  <= SW'(ps);
          pn      <= pn + 16'd1;
          if (pe_k != l2 - 4'd1) pe_k <= pe_k + 4'd1;
          else begin
            pe_k <= '0;
            ps <= ps + 16'd1;
            if (ps == n_steps - 16'd1) st <= S_PACK_FLUSH;
          end
        end
        S_PACK_FLUSH: st <= S_C_INIT;

        // ---------------- compute
        S_C_INIT: begin cs <= '0; st <= S_C_MAC; end
        S_C_MAC: begin
          d_en <= 1'b1;
          cs <= cs + 16'd1;
          if (cs == n_steps - 16'd1) st <= S_C_DRAIN;
        end
        S_C_DRAIN: st <= S_C_WB;
        S_C_WB: begin
          for (int m = 0; m < PE; m++) begin
            acc_buf[m] <= pe_acc[m];
            out_reg[m] <= cfg.q_flag ? pe_q[m] : pe_acc[m];
          end
          sco <= '0;
          st <= S_ST_CTRL;
        end

        // ---------------- store
        S_ST_CTRL: if (dma_write_ctrl_rdy) st <= S_ST_DATA;
        S_ST_DATA: if (wr_hs) begin
          sco <= sco + 16'd1;
          if (sco == m_out - 16'd1) st <= S_DONE;
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

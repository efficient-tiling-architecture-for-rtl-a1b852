// tb_conv2d_cfg: self-checking test of the configuration unpacking.
// Random register values for every padding type, stride, kernel and precision;
// each unpacked field and derived size (padded input, output size, operand
// groups, DMA lengths) is recomputed here from the register map.
module tb_conv2d_cfg;
  import conv2d_pkg::*;
  conf_info_t conf;
  cfg_t cfg;
  int checks = 0, failures = 0;

  conv2d_cfg dut (.conf, .cfg);

  task automatic chk(longint got, longint exp, string what);
    checks++;
    if (got != exp) begin failures++; if (failures < 10) $display("FAIL %s: %0d exp %0d", what, got, exp); end
  endtask

  initial begin
    #1000000;
    failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int n = 0; n < 2000; n++) begin
      int nw, nh, nc, k, pad, pt, s, c1, c2, filt, wi, hi, wo, ho, lanes;
      nw = $urandom_range(1, 16); nh = $urandom_range(1, 16); nc = $urandom_range(1, 16);
      k = $urandom_range(1, 7); pad = $urandom_range(0, 3); pt = $urandom_range(0, 5);
      s = $urandom_range(1, 2); c1 = $urandom_range(0, 4); c2 = $urandom_range(0, 3); filt = $urandom_range(1, 16);
      conf = '0;
      conf.in_add = $urandom; conf.w_add = $urandom; conf.out_add = $urandom;
      conf.flags = 32'($urandom_range(0, 7));
      conf.n_w = nw; conf.n_h = nh; conf.n_c = nc; conf.filt = filt;
      conf.pad_stride_kern = (k << 12) | (pt << 8) | (s << 4) | pad;
      conf.options = (c2 << 4) | c1;
      conf.offset_pe = $urandom; conf.offset_pe_out = $urandom; conf.offset_q_data = $urandom; conf.offset_read_ci = $urandom;
      #1;
      case (pt)
        1, 2: begin wi = nw + 2*pad; hi = nh + pad; end
        3:    begin wi = nw + 2*pad; hi = nh; end
        4:    begin wi = nw + 2*pad; hi = nh + 2*pad; end
        default: begin wi = nw; hi = nh; end
      endcase
      if (wi < k || hi < k) continue;
      wo = (s == 1) ? wi - k + 1 : (wi - k) / 2 + 1;
      ho = (s == 1) ? hi - k + 1 : (hi - k) / 2 + 1;
      lanes = (c1 == 1) ? 4 : (c1 == 2 || c1 == 3) ? 2 : 1;
      chk(cfg.q_flag, conf.flags[0], "q_flag"); chk(cfg.acc_flag, conf.flags[1], "acc_flag"); chk(cfg.relu_flag, conf.flags[2], "relu_flag");
      chk(cfg.kern, k, "kern"); chk(cfg.pad, pad, "pad"); chk(cfg.pad_type, pt, "pad_type"); chk(cfg.stride, s, "stride");
      chk(cfg.config1, c1, "config1"); chk(cfg.config2, c2, "config2");
      chk(cfg.in_add, conf.in_add, "in_add"); chk(cfg.offset_read_ci, conf.offset_read_ci, "offset_read_ci");
      chk(cfg.n_w_in, wi, "n_w_in"); chk(cfg.n_h_in, hi, "n_h_in");
      chk(cfg.n_w_out, wo, "n_w_out"); chk(cfg.n_h_out, ho, "n_h_out");
      chk(cfg.lanes, lanes, "lanes"); chk(cfg.n_grp, (nc + lanes - 1) / lanes, "n_grp");
      chk(cfg.len_in, nw * nh, "len_in"); chk(cfg.len_w, k * k * nc, "len_w");
      chk(cfg.len_out, wo * ho, "len_out"); chk(cfg.len_q, 3 * filt + 2, "len_q");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// conv2d_cfg: configuration unpacking of the 2D-convolution accelerator.
//
// Takes the 14 configuration registers of one tile and returns the unpacked
// fields and the derived loop bounds. Packed fields: flags {relu, acc, q} in
// bits [2:0]; pad_stride_kern = {kern[15:12], pad_type[11:8], stride[7:4],
// pad[3:0]}; options = {CONFIG2[7:4], CONFIG1[3:0]}. Derived values:
//   padded input size by pad_type: 0 none, 1 and 2 sides plus one of top/bottom
//   (width + 2*pad, height + pad), 3 sides only, 4 all four sides;
//   output size (n_in - kern) + 1 for stride 1, (n_in - kern)/2 + 1 otherwise;
//   DMA lengths n_w*n_h (one input channel), kern*kern*n_c (one filter),
//   n_w_out*n_h_out (one output channel) and 3*filt + 2 (quantization data);
//   lanes = values per ST operand (4 for CONFIG1 = 1, 2 for 2 or 3, else 1)
//   and the number of packed input-channel groups ceil(n_c / lanes).
// Purely combinational; the caller registers the configuration words.
module conv2d_cfg
  import conv2d_pkg::*;
(
  input  conf_info_t conf,
  output cfg_t       cfg
);

  always_comb begin
    cfg = '0;
    cfg.in_add         = conf.in_add;
    cfg.w_add          = conf.w_add;
    cfg.out_add        = conf.out_add;
    cfg.q_flag         = conf.flags[0];
    cfg.acc_flag       = conf.flags[1];
    cfg.relu_flag      = conf.flags[2];
    cfg.n_w            = conf.n_w[15:0];
    cfg.n_h            = conf.n_h[15:0];
    cfg.n_c            = conf.n_c[15:0];
    cfg.kern           = conf.pad_stride_kern[15:12];
    cfg.pad_type       = conf.pad_stride_kern[11:8];
    cfg.stride         = conf.pad_stride_kern[7:4];
    cfg.pad            = conf.pad_stride_kern[3:0];
    cfg.filt           = conf.filt[15:0];
    cfg.offset_pe_out  = conf.offset_pe_out;
    cfg.offset_pe      = conf.offset_pe;
    cfg.config1        = conf.options[2:0];
    cfg.config2        = conf.options[5:4];
    cfg.offset_q_data  = conf.offset_q_data;
    cfg.offset_read_ci = conf.offset_read_ci;

    case (cfg.pad_type)
      4'd1, 4'd2: begin cfg.n_w_in = cfg.n_w + 16'(2 * cfg.pad); cfg.n_h_in = cfg.n_h + 16'(cfg.pad);     end
      4'd3:       begin cfg.n_w_in = cfg.n_w + 16'(2 * cfg.pad); cfg.n_h_in = cfg.n_h;                     end
      4'd4:       begin cfg.n_w_in = cfg.n_w + 16'(2 * cfg.pad); cfg.n_h_in = cfg.n_h + 16'(2 * cfg.pad); end
      default:    begin cfg.n_w_in = cfg.n_w;                    cfg.n_h_in = cfg.n_h;                     end
    endcase

    if (cfg.stride == 4'd1) begin
      cfg.n_w_out = cfg.n_w_in - 16'(cfg.kern) + 16'd1;
      cfg.n_h_out = cfg.n_h_in - 16'(cfg.kern) + 16'd1;
    end else begin
      cfg.n_w_out = ((cfg.n_w_in - 16'(cfg.kern)) >> 1) + 16'd1;
      cfg.n_h_out = ((cfg.n_h_in - 16'(cfg.kern)) >> 1) + 16'd1;
    end

    cfg.lanes   = lanes_of(cfg.config1);
    cfg.n_grp   = (cfg.n_c + 16'(cfg.lanes) - 16'd1) / 16'(cfg.lanes);
    cfg.len_in  = 32'(cfg.n_w) * 32'(cfg.n_h);
    cfg.len_w   = 32'(cfg.kern) * 32'(cfg.kern) * 32'(cfg.n_c);
    cfg.len_out = 32'(cfg.n_w_out) * 32'(cfg.n_h_out);
    cfg.len_q   = 32'(cfg.filt) * 32'd3 + 32'd2;
  end

endmodule

// dma_mem_model: behavioural external memory and DMA engine for the
// accelerator testbenches (not synthesizable, not part of the design).
//
// Serves one accelerator socket. A read request {size, length, index} on
// dma_read_ctrl starts a burst of `length` 64-bit beats from word `index`
// onwards, the 32-bit memory word in the low half and 0xdeadbeef in the high
// half; a write request makes the model take `length` beats and store their
// low halves from word `index` on. Only one read and one write burst are open
// at a time; a new request is accepted once the previous burst of its kind has
// ended. With `stalls_on` set every ready and valid the model drives is
// withheld at random, so the accelerator sees back-pressure and gaps on every
// channel. Memory is 128K words of 32 bits, reached by the testbench through
// the `mem` array. Protocol errors (wrong beat size, empty request, write beat
// outside a burst, wrong upper half) are counted in `errors`; handshake
// counters record how often each kind of stall happened.
module dma_mem_model
  import conv2d_pkg::*;
(
  input  logic                 clk,
  input  logic                 stalls_on,
  input  dma_info_t            dma_read_ctrl_dat,
  input  logic                 dma_read_ctrl_vld,
  output logic                 dma_read_ctrl_rdy,
  output logic [DMA_WIDTH-1:0] dma_read_chnl_dat,
  output logic                 dma_read_chnl_vld,
  input  logic                 dma_read_chnl_rdy,
  input  dma_info_t            dma_write_ctrl_dat,
  input  logic                 dma_write_ctrl_vld,
  output logic                 dma_write_ctrl_rdy,
  input  logic [DMA_WIDTH-1:0] dma_write_chnl_dat,
  input  logic                 dma_write_chnl_vld,
  output logic                 dma_write_chnl_rdy
);
  localparam int MEM_WORDS = 1 << 17;

  logic [31:0] mem [MEM_WORDS];
  logic        rd_active = 1'b0, wr_active = 1'b0;
  logic [31:0] rd_addr = '0, rd_left = '0, wr_addr = '0, wr_left = '0;
  int          errors = 0, beats_rd = 0, beats_wr = 0, bursts_rd = 0, bursts_wr = 0;
  int          n_rd_stall = 0, n_wr_stall = 0, n_ctrl_stall = 0;

  initial begin
    dma_read_ctrl_rdy = 1'b0; dma_read_chnl_vld = 1'b0;
    dma_write_ctrl_rdy = 1'b0; dma_write_chnl_rdy = 1'b0;
  end

  assign dma_read_chnl_dat = {DEADBEEF, mem[rd_addr[16:0]]};

  always @(posedge clk) begin
    if (dma_read_ctrl_vld && dma_read_ctrl_rdy) begin
      if (dma_read_ctrl_dat.size != DMA_SIZE || dma_read_ctrl_dat.length == 0) begin
        errors++; $display("dma_mem_model: bad read request %p", dma_read_ctrl_dat);
      end
      bursts_rd++;
      rd_active <= 1'b1; rd_addr <= dma_read_ctrl_dat.index; rd_left <= dma_read_ctrl_dat.length;
    end
    if ((dma_read_ctrl_vld && !dma_read_ctrl_rdy) || (dma_write_ctrl_vld && !dma_write_ctrl_rdy)) n_ctrl_stall++;
    dma_read_ctrl_rdy <= !rd_active && !(dma_read_ctrl_vld && dma_read_ctrl_rdy) && (!stalls_on || ($urandom % 4 != 0));

    if (dma_read_chnl_vld && dma_read_chnl_rdy) begin
      beats_rd++;
      rd_addr <= rd_addr + 1;
      rd_left <= rd_left - 1;
      if (rd_left == 1) rd_active <= 1'b0;
    end
    if (dma_read_chnl_rdy && !dma_read_chnl_vld && rd_active) n_rd_stall++;
    dma_read_chnl_vld <= rd_active && !(dma_read_chnl_vld && dma_read_chnl_rdy && rd_left == 1)
                         && (!stalls_on || ($urandom % 5 != 0));

    if (dma_write_ctrl_vld && dma_write_ctrl_rdy) begin
      if (dma_write_ctrl_dat.size != DMA_SIZE || dma_write_ctrl_dat.length == 0) begin
        errors++; $display("dma_mem_model: bad write request %p", dma_write_ctrl_dat);
      end
      bursts_wr++;
      wr_active <= 1'b1; wr_addr <= dma_write_ctrl_dat.index; wr_left <= dma_write_ctrl_dat.length;
    end
    dma_write_ctrl_rdy <= !wr_active && !(dma_write_ctrl_vld && dma_write_ctrl_rdy) && (!stalls_on || ($urandom % 3 != 0));

    if (dma_write_chnl_vld && dma_write_chnl_rdy) begin
      if (!wr_active) begin errors++; $display("dma_mem_model: write beat outside a burst"); end
      if (dma_write_chnl_dat[63:32] != DEADBEEF) begin errors++; $display("dma_mem_model: upper half %h", dma_write_chnl_dat[63:32]); end
      beats_wr++;
      mem[wr_addr[16:0]] <= dma_write_chnl_dat[31:0];
      wr_addr <= wr_addr + 1;
      wr_left <= wr_left - 1;
      if (wr_left == 1) wr_active <= 1'b0;
    end
    if (dma_write_chnl_vld && !dma_write_chnl_rdy) n_wr_stall++;
    dma_write_chnl_rdy <= wr_active && !(dma_write_chnl_vld && dma_write_chnl_rdy && wr_left == 1)
                          && (!stalls_on || ($urandom % 4 != 0));
  end
endmodule

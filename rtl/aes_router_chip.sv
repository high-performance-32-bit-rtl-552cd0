// aes_router_chip: AES crypto subsystem of a wireless-router chip.
//
// The router side (its controller and router block, outside this module)
// talks to the subsystem over the register bus of aes_regfile. Text words
// written to DATA go into the input dual-port memory; the memory control
// feeds whole blocks from it through the 32-bit AES core (aes_core,
// 44 cycles per block) and stores the results in the output dual-port memory,
// from which reads of DATA return them. Key and mode are set in the register
// file; loading a key triggers the 40-cycle preparation of the decryption
// key. The arrangement of blocks follows the router-chip block diagram; the
// bus protocol, register map and memory depth are this design's own.
//
// Ports: clk, active-low asynchronous rst_n, and the bus (see aes_regfile).
// irq_o is high while the output memory holds at least one whole block.
module aes_router_chip #(
  parameter int unsigned MEM_WORDS = 16   // words per buffer memory
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [2:0]  addr_i,
  input  logic        wr_i,
  input  logic [31:0] wdata_i,
  input  logic        rd_i,
  output logic [31:0] rdata_o,
  output logic        rvalid_o,
  output logic        irq_o
);

  localparam int unsigned AW = $clog2(MEM_WORDS);

  logic [127:0] key;
  logic mode_dec, key_load, err_clr, push, pop;
  logic [31:0] push_data;
  logic key_busy, core_ready, in_ovf, out_unf, stall;
  logic [AW:0] in_count, out_count;

  logic          im_we, im_re, om_we, om_re;
  logic [AW-1:0] im_waddr, im_raddr, om_waddr, om_raddr;
  logic [31:0]   im_wdata, im_rdata, om_wdata, om_rdata;

  logic core_start, core_dec, din_req, dout_valid;
  logic [31:0] core_din, core_dout;

  aes_regfile #(.CW(AW + 1)) u_regs (
    .clk(clk), .rst_n(rst_n),
    .addr_i(addr_i), .wr_i(wr_i), .wdata_i(wdata_i), .rd_i(rd_i),
    .rdata_o(rdata_o), .rvalid_o(rvalid_o),
    .key_o(key), .mode_dec_o(mode_dec), .key_load_o(key_load), .err_clr_o(err_clr),
    .push_o(push), .push_data_o(push_data), .pop_o(pop),
    .key_busy_i(key_busy), .core_busy_i(!core_ready && !key_busy),
    .in_ovf_i(in_ovf), .out_unf_i(out_unf), .stall_i(stall),
    .in_count_i(in_count), .out_count_i(out_count), .pop_data_i(om_rdata)
  );

  aes_mem_ctrl #(.DEPTH(MEM_WORDS)) u_memctl (
    .clk(clk), .rst_n(rst_n),
    .push_i(push), .push_data_i(push_data), .pop_i(pop),
    .mode_dec_i(mode_dec), .err_clr_i(err_clr),
    .in_count_o(in_count), .out_count_o(out_count),
    .in_ovf_o(in_ovf), .out_unf_o(out_unf), .stall_o(stall),
    .im_we_o(im_we), .im_waddr_o(im_waddr), .im_wdata_o(im_wdata),
    .im_re_o(im_re), .im_raddr_o(im_raddr), .im_rdata_i(im_rdata),
    .om_we_o(om_we), .om_waddr_o(om_waddr), .om_wdata_o(om_wdata),
    .om_re_o(om_re), .om_raddr_o(om_raddr),
    .core_ready_i(core_ready), .core_din_req_i(din_req),
    .core_dout_valid_i(dout_valid), .core_dout_i(core_dout),
    .core_start_o(core_start), .core_dec_o(core_dec), .core_din_o(core_din)
  );

  aes_dpram #(.WIDTH(32), .DEPTH(MEM_WORDS)) u_in_mem (
    .clk(clk), .we_i(im_we), .waddr_i(im_waddr), .wdata_i(im_wdata),
    .re_i(im_re), .raddr_i(im_raddr), .rdata_o(im_rdata)
  );

  aes_dpram #(.WIDTH(32), .DEPTH(MEM_WORDS)) u_out_mem (
    .clk(clk), .we_i(om_we), .waddr_i(om_waddr), .wdata_i(om_wdata),
    .re_i(om_re), .raddr_i(om_raddr), .rdata_o(om_rdata)
  );

  aes_core u_core (
    .clk(clk), .rst_n(rst_n),
    .key_load_i(key_load), .key_i(key), .key_busy_o(key_busy),
    .start_i(core_start), .dec_i(core_dec), .ready_o(core_ready),
    .din_req_o(din_req), .din_i(core_din),
    .dout_valid_o(dout_valid), .dout_o(core_dout), .done_o()
  );

  assign irq_o = out_count >= (AW + 1)'(4);

endmodule

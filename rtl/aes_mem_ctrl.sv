// aes_mem_ctrl: memory control between the bus, the two dual-port memories
// and the AES core.
//
// Both memories are run as circular FIFOs of 32-bit words (one state column
// per word). The bus side pushes text words into the input memory and pops
// result words from the output memory. On the AES side the controller starts
// a block when the input memory holds a whole block (4 words), the output
// memory has room for one (4 words) and the core is ready. It then reads the
// four columns out of the input memory one cycle ahead of the core's
// din_req_o (the memory read is registered) and writes the four result
// columns into the output memory as the core produces them. The block's
// mode is the mode bit as it stands when the block starts. If the output
// memory is short of room the next block waits ("output stall").
// A push into a full input memory or a pop from an empty output memory is
// dropped and sets the sticky error flags in_ovf_o / out_unf_o (cleared by
// err_clr_i). All of this is this design's choice: the architecture names
// the memory control but does not describe it.
module aes_mem_ctrl #(
  parameter int unsigned DEPTH = 16   // words per memory, a multiple of 4
) (
  input  logic                     clk,
  input  logic                     rst_n,
  // bus side
  input  logic                     push_i,
  input  logic [31:0]              push_data_i,
  input  logic                     pop_i,
  input  logic                     mode_dec_i,
  input  logic                     err_clr_i,
  output logic [$clog2(DEPTH):0]   in_count_o,
  output logic [$clog2(DEPTH):0]   out_count_o,
  output logic                     in_ovf_o,
  output logic                     out_unf_o,
  output logic                     stall_o,      // a block is waiting for output room
  // input memory
  output logic                     im_we_o,
  output logic [$clog2(DEPTH)-1:0] im_waddr_o,
  output logic [31:0]              im_wdata_o,
  output logic                     im_re_o,
  output logic [$clog2(DEPTH)-1:0] im_raddr_o,
  input  logic [31:0]              im_rdata_i,
  // output memory
  output logic                     om_we_o,
  output logic [$clog2(DEPTH)-1:0] om_waddr_o,
  output logic [31:0]              om_wdata_o,
  output logic                     om_re_o,
  output logic [$clog2(DEPTH)-1:0] om_raddr_o,
  // AES core
  input  logic                     core_ready_i,
  input  logic                     core_din_req_i,
  input  logic                     core_dout_valid_i,
  input  logic [31:0]              core_dout_i,
  output logic                     core_start_o,
  output logic                     core_dec_o,
  output logic [31:0]              core_din_o
);

  localparam int unsigned AW = $clog2(DEPTH);
  typedef logic [AW-1:0] ptr_t;
  typedef logic [AW:0]   cnt_t;

  ptr_t im_wp, im_rp, om_wp, om_rp;
  cnt_t im_cnt, om_cnt, om_reserved;
  logic [1:0] feed_idx;
  logic push_ok, pop_ok, fetch, room, have_block;

  // words of the output memory promised to blocks in flight
  logic [2:0] inflight_q;   // result words still to come for started blocks

  assign push_ok    = push_i && (im_cnt != cnt_t'(DEPTH));
  assign pop_ok     = pop_i && (om_cnt != '0);
  assign have_block = im_cnt >= cnt_t'(4);
  assign om_reserved = om_cnt + cnt_t'(inflight_q);
  assign room       = (cnt_t'(DEPTH) - om_reserved) >= cnt_t'(4);
  assign core_start_o = have_block && room && core_ready_i;
  assign stall_o    = have_block && core_ready_i && !room;
  assign core_dec_o = mode_dec_i;

  // read the input memory one cycle ahead of the core's request
  assign fetch = core_start_o || (core_din_req_i && feed_idx != 2'd3);

  assign im_we_o    = push_ok;
  assign im_waddr_o = im_wp;
  assign im_wdata_o = push_data_i;
  assign im_re_o    = fetch;
  assign im_raddr_o = im_rp;
  assign core_din_o = im_rdata_i;

  assign om_we_o    = core_dout_valid_i;
  assign om_waddr_o = om_wp;
  assign om_wdata_o = core_dout_i;
  assign om_re_o    = pop_ok;
  assign om_raddr_o = om_rp;

  assign in_count_o  = im_cnt;
  assign out_count_o = om_cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      im_wp <= '0; im_rp <= '0; om_wp <= '0; om_rp <= '0;
      im_cnt <= '0; om_cnt <= '0;
      feed_idx <= '0;
      inflight_q <= '0;
      in_ovf_o <= 1'b0;
      out_unf_o <= 1'b0;
    end else begin
      if (push_ok) im_wp <= im_wp + ptr_t'(1);
      if (fetch)   im_rp <= im_rp + ptr_t'(1);
      im_cnt <= im_cnt + cnt_t'(push_ok) - cnt_t'(fetch);

      if (core_din_req_i) feed_idx <= feed_idx + 2'd1;

      if (core_dout_valid_i) om_wp <= om_wp + ptr_t'(1);
      if (pop_ok)            om_rp <= om_rp + ptr_t'(1);
      om_cnt <= om_cnt + cnt_t'(core_dout_valid_i) - cnt_t'(pop_ok);
      inflight_q <= inflight_q + (core_start_o ? 3'd4 : 3'd0) - 3'(core_dout_valid_i);

      if (err_clr_i) begin
        in_ovf_o  <= 1'b0;
        out_unf_o <= 1'b0;
      end else begin
        if (push_i && !push_ok) in_ovf_o  <= 1'b1;
        if (pop_i && !pop_ok)   out_unf_o <= 1'b1;
      end
    end
  end

  // the core never writes more than was reserved for it
  a_om_no_overflow: assert property (@(posedge clk) disable iff (!rst_n)
                                     core_dout_valid_i |-> om_cnt != cnt_t'(DEPTH));

endmodule

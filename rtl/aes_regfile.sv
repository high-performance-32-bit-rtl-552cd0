// aes_regfile: bus-visible register file of the AES subsystem.
//
// A simple synchronous register bus (word addresses, one access per cycle):
// a write takes effect at the rising edge that samples wr_i; a read sampled
// at one rising edge returns its data with rvalid_o in the next cycle.
//   addr 0 CTRL    W: bit0 mode (1 = decrypt), bit1 load key (strobe),
//                     bit2 clear error flags (strobe).  R: bit0 mode.
//   addr 1 STATUS  R: bit0 key preparation busy, bit1 core busy,
//                     bit2 input overflow, bit3 output underflow,
//                     bit4 output stall, [15:8] words in the input memory,
//                     [23:16] words in the output memory.
//   addr 2 DATA    W: push a text word into the input memory.
//                  R: pop a result word from the output memory.
//   addr 4..7 KEY  W/R: key words 0..3 (word 0 = key bits [127:96]).
// The register map is this design's own; the architecture names a register
// file on the router bus without giving its contents.
module aes_regfile #(
  parameter int unsigned CW = 5       // width of the memory word counts
) (
  input  logic           clk,
  input  logic           rst_n,
  // bus
  input  logic [2:0]     addr_i,
  input  logic           wr_i,
  input  logic [31:0]    wdata_i,
  input  logic           rd_i,
  output logic [31:0]    rdata_o,
  output logic           rvalid_o,
  // to the subsystem
  output logic [127:0]   key_o,
  output logic           mode_dec_o,
  output logic           key_load_o,
  output logic           err_clr_o,
  output logic           push_o,
  output logic [31:0]    push_data_o,
  output logic           pop_o,
  // status
  input  logic           key_busy_i,
  input  logic           core_busy_i,
  input  logic           in_ovf_i,
  input  logic           out_unf_i,
  input  logic           stall_i,
  input  logic [CW-1:0]  in_count_i,
  input  logic [CW-1:0]  out_count_i,
  input  logic [31:0]    pop_data_i   // output memory read data, valid a cycle after pop_o
);

  typedef enum logic [2:0] {
    A_CTRL   = 3'd0,
    A_STATUS = 3'd1,
    A_DATA   = 3'd2
  } reg_addr_e;

  logic [31:0] key_q [4];
  logic [31:0] rd_q;
  logic        rd_data_q;   // the pending read is a DATA pop

  assign key_o       = {key_q[0], key_q[1], key_q[2], key_q[3]};
  assign key_load_o  = wr_i && addr_i == A_CTRL && wdata_i[1];
  assign err_clr_o   = wr_i && addr_i == A_CTRL && wdata_i[2];
  assign push_o      = wr_i && addr_i == A_DATA;
  assign push_data_o = wdata_i;
  assign pop_o       = rd_i && addr_i == A_DATA;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < 4; i++) key_q[i] <= '0;
      mode_dec_o <= 1'b0;
      rd_q       <= '0;
      rd_data_q  <= 1'b0;
      rvalid_o   <= 1'b0;
    end else begin
      if (wr_i) begin
        if (addr_i == A_CTRL) mode_dec_o <= wdata_i[0];
        if (addr_i[2])        key_q[addr_i[1:0]] <= wdata_i;
      end
      rvalid_o  <= rd_i;
      rd_data_q <= pop_o;
      if (rd_i) begin
        unique casez (addr_i)
          A_CTRL:   rd_q <= {31'b0, mode_dec_o};
          A_STATUS: rd_q <= {8'b0, 8'(out_count_i), 8'(in_count_i), 3'b0,
                             stall_i, out_unf_i, in_ovf_i, core_busy_i, key_busy_i};
          3'b1??:   rd_q <= key_q[addr_i[1:0]];
          default:  rd_q <= '0;
        endcase
      end
    end
  end

  assign rdata_o = rd_data_q ? pop_data_i : rd_q;

endmodule

// aes_rcon: round-constant generator without a constant table.
//
// One 8-bit register holds the current Rcon. In encryption mode the next
// value is xtime(Rcon) (01, 02, 04, ... 80, 1b, 36); in decryption mode it is
// the inverse xtime (36, 1b, 80, ... 02, 01), so the sequence runs backwards
// on the fly and nothing of it is stored. load_i presets the register to
// Rcon(1) = 01 for encryption or to Rcon(10) = 36 for decryption (the value
// the forward run ends on); step_i advances it by one round.
// rcon_o is the register itself; it changes on the rising edge after step_i.
module aes_rcon
  import aes_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  load_i,
  input  logic  step_i,
  input  logic  dec_i,    // 0: forward (xtime), 1: backward (inverse xtime)
  output byte_t rcon_o
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      rcon_o <= 8'h01;
    else if (load_i) rcon_o <= dec_i ? 8'h36 : 8'h01;
    else if (step_i) rcon_o <= dec_i ? inv_xtime(rcon_o) : xtime(rcon_o);
  end

endmodule

// aes_shiftrows: ShiftRows / InvShiftRows as a 4-stage column pipeline.
//
// The state streams through one 32-bit column per cycle. Each state row runs
// through its own chain of four 8-bit registers, numbered as in the block
// diagram of this core:
//   row 0: reg1  -> reg5  -> reg9  -> reg13
//   row 1: reg2  -> reg6  -> reg10 -> reg14
//   row 2: reg3  -> reg7  -> reg11 -> reg15
//   row 3: reg4  -> reg8  -> reg12 -> reg16
// Row 0 is a plain 4-cycle delay. The other rows reach the rotation by
// holding some bytes back and letting later bytes skip registers, steered by
// five 8-bit 2:1 multiplexers and by the column phase (0..3, the column of the
// state that is at the input this cycle):
//   rotate left by one  (row 1 encrypt, row 3 decrypt): the first byte of the
//     row waits in the first register (reg2 / reg4) while bytes 1..3 bypass
//     it; it leaves at the next phase 0.
//   rotate right by one (row 1 decrypt, row 3 encrypt): at phase 3 the last
//     byte goes straight into the last register (reg14 / reg16) while the
//     first three registers hold.
//   rotate by two (row 2, both directions): bytes 0 and 1 wait in reg3 and
//     reg7 while bytes 2 and 3 go straight into reg11.
// The mux and hold sequencing is this design's own reading of the register
// positions; the register layout and the mux count follow the architecture.
//
// Interface: din_i is the state column of the current phase; dout_o
// (reg13..reg16) carries column j of the shifted state 3+j rising edges after
// column 0 entered, i.e. the whole pass is a 4-stage pipeline and a new
// state can enter on the cycle after the previous one's last column.
// en_i = 0 freezes every register.
module aes_shiftrows
  import aes_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       en_i,
  input  logic       dec_i,    // 0: ShiftRows, 1: InvShiftRows
  input  logic [1:0] phase_i,  // column index of din_i
  input  word_t      din_i,
  output word_t      dout_o
);

  // sr[r][k]: row r, stage k (stage 3 drives the output)
  byte_t sr [4][4];
  byte_t in_b [4];

  always_comb for (int r = 0; r < 4; r++) in_b[r] = col_byte(din_i, r);

  // rotate-left-by-one chain (first byte held in stage 0)
  function automatic void row_left(input byte_t cur [4], input byte_t d,
                                   input logic [1:0] ph, output byte_t nxt [4]);
    nxt[0] = (ph == 2'd0) ? d : cur[0];
    nxt[1] = (ph == 2'd0) ? cur[0] : d;
    nxt[2] = cur[1];
    nxt[3] = cur[2];
  endfunction

  // rotate-right-by-one chain (last byte straight into stage 3)
  function automatic void row_right(input byte_t cur [4], input byte_t d,
                                    input logic [1:0] ph, output byte_t nxt [4]);
    if (ph == 2'd3) begin
      nxt[0] = cur[0];
      nxt[1] = cur[1];
      nxt[2] = cur[2];
      nxt[3] = d;
    end else begin
      nxt[0] = d;
      nxt[1] = cur[0];
      nxt[2] = cur[1];
      nxt[3] = cur[2];
    end
  endfunction

  byte_t nx [4][4];

  always_comb begin
    // row 0: plain delay line
    nx[0][0] = in_b[0];
    nx[0][1] = sr[0][0];
    nx[0][2] = sr[0][1];
    nx[0][3] = sr[0][2];
    // rows 1 and 3: direction depends on the mode
    if (dec_i) begin
      row_right(sr[1], in_b[1], phase_i, nx[1]);
      row_left (sr[3], in_b[3], phase_i, nx[3]);
    end else begin
      row_left (sr[1], in_b[1], phase_i, nx[1]);
      row_right(sr[3], in_b[3], phase_i, nx[3]);
    end
    // row 2: same in both modes
    if (phase_i[1]) begin
      nx[2][0] = sr[2][0];
      nx[2][1] = sr[2][1];
      nx[2][2] = in_b[2];
    end else begin
      nx[2][0] = in_b[2];
      nx[2][1] = sr[2][0];
      nx[2][2] = sr[2][1];
    end
    nx[2][3] = sr[2][2];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int r = 0; r < 4; r++)
        for (int k = 0; k < 4; k++) sr[r][k] <= '0;
    end else if (en_i) begin
      for (int r = 0; r < 4; r++)
        for (int k = 0; k < 4; k++) sr[r][k] <= nx[r][k];
    end
  end

  assign dout_o = {sr[0][3], sr[1][3], sr[2][3], sr[3][3]};

endmodule

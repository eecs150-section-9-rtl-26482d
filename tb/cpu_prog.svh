// cpu_prog.svh: test program for the 16-bit processor, shared by the
// processor and top-level testbenches (include inside a module that
// imports cpu16_pkg). It touches every instruction: the arithmetic and
// logic group, addi with positive and negative offsets, sw and lw, beq
// taken forwards, not taken and taken backwards (a count-down loop), j,
// a store to the display word and halt.
//
// Expected results: r0 = 0, r1 = 0, r2 = 255, r3 = 8, r4 = 8, r5 = 1,
// r6 = 7, r7 = 1; mem[40] = 8; mem[50..55] = 0, 8, 8, 1, 7, 1; display
// (mem[255]) = 8. Cycles from reset release until halted is raised:
// 8 x 3 (arith) + 4 (sw) + 5 (lw) + 4 (beq taken) + 3 (beq not taken)
// + 3 (j) + 4 x (3 + 3 + 4) + (3 + 4) (loop) + 6 x 4 (sw) + 4 x 3 (arith)
// + 4 (sw) + 2 (fetch and decode of halt) = 132.

localparam int PROG_LEN     = 31;
localparam int PROG_CYCLES  = 132;

function automatic word_t prog_word(input int a);
  case (a)
    0:  return enc_r(FN_SUB, 3'd0, 3'd0, 3'd0);        // r0 = r0 - r0 = 0
    1:  return enc_i(OP_ADDI, 3'd1, 3'd0, 7'd5);       // r1 = 5
    2:  return enc_i(OP_ADDI, 3'd2, 3'd0, 7'd3);       // r2 = 3
    3:  return enc_r(FN_ADD, 3'd3, 3'd1, 3'd2);        // r3 = 8
    4:  return enc_r(FN_SUB, 3'd4, 3'd1, 3'd2);        // r4 = 2
    5:  return enc_r(FN_AND, 3'd5, 3'd1, 3'd2);        // r5 = 1
    6:  return enc_r(FN_OR,  3'd6, 3'd1, 3'd2);        // r6 = 7
    7:  return enc_r(FN_SLT, 3'd7, 3'd2, 3'd1);        // r7 = (3 < 5) = 1
    8:  return enc_i(OP_SW,  3'd3, 3'd0, 7'd40);       // mem[40] = r3
    9:  return enc_i(OP_LW,  3'd4, 3'd0, 7'd40);       // r4 = mem[40] = 8
    10: return enc_i(OP_BEQ, 3'd3, 3'd4, 7'd2);        // r4 == r3: taken, to 13
    11: return enc_i(OP_ADDI, 3'd6, 3'd0, 7'd63);      // skipped
    12: return enc_j(OP_HALT, 13'd0);                  // skipped
    13: return enc_i(OP_BEQ, 3'd2, 3'd1, 7'd5);        // r1 != r2: not taken
    14: return enc_j(OP_J, 13'd16);                    // jump to 16
    15: return enc_j(OP_HALT, 13'd0);                  // skipped
    16: return enc_i(OP_ADDI, 3'd1, 3'd1, 7'h7f);      // loop: r1 = r1 - 1
    17: return enc_i(OP_BEQ, 3'd0, 3'd1, 7'd1);        // r1 == 0: exit to 19
    18: return enc_i(OP_BEQ, 3'd0, 3'd0, 7'h7d);       // always: back to 16 (19 - 3)
    19: return enc_i(OP_SW,  3'd1, 3'd0, 7'd50);       // mem[50] = r1
    20: return enc_i(OP_SW,  3'd3, 3'd0, 7'd51);
    21: return enc_i(OP_SW,  3'd4, 3'd0, 7'd52);
    22: return enc_i(OP_SW,  3'd5, 3'd0, 7'd53);
    23: return enc_i(OP_SW,  3'd6, 3'd0, 7'd54);
    24: return enc_i(OP_SW,  3'd7, 3'd0, 7'd55);
    25: return enc_i(OP_ADDI, 3'd2, 3'd0, 7'd63);      // r2 = 63
    26: return enc_r(FN_ADD, 3'd2, 3'd2, 3'd2);        // r2 = 126
    27: return enc_r(FN_ADD, 3'd2, 3'd2, 3'd2);        // r2 = 252
    28: return enc_i(OP_ADDI, 3'd2, 3'd2, 7'd3);       // r2 = 255
    29: return enc_i(OP_SW,  3'd3, 3'd2, 7'd0);        // display = r3
    30: return enc_j(OP_HALT, 13'd0);
    default: return '0;
  endcase
endfunction

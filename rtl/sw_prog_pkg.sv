// sw_prog_pkg: the Smith-Waterman program of the CREC array, in the form the
// parallel compiler would emit it: for every EU and every slice, the
// instruction it executes and its direct operand.
//
// Register map (0-based indices; the assembly names R1..R6 of a PE are
// EUs 6k..6k+5 of PE k):
//   PE k:  6k+0 S character (R1, also holds 0/sub during a step)
//          6k+1 T character (R2)          6k+2 a, then d (R3)
//          6k+3 b (R4)                    6k+4 c (R5)
//          6k+5 copy of S (R6)
//   6*NPE+0 CNT  loop counter EU         6*NPE+1 PASS pass counter EU
//   6*NPE+2 TOP  top-row value H[0][j] of the current pass
//   then the parameter EUs INS, DEL, SUB, LEN (length L of T) and NPASS.
//
// The cell update is d = min(a + (T==S ? 0 : sub), b + ins, c + del), with
// a = H[i-1][j-1], b = H[i-1][j], c = H[i][j-1]. One step of a PE is the
// nine slices of the per-PE task table: shift (T, a<-c, b<-d, c<-left d,
// save S), compare S with T, select 0 or sub, add it to a, add ins and del,
// two compare/move-if-above pairs for the minimum, restore b and c. These
// nine slices are the documented schedule; everything around them is this
// design's own:
//   * S is loaded by shifting it through the R1 registers from the last PE
//     towards PE 0 (NPE characters per pass, two slices each);
//   * PE 0 starts each pass with a = H[0][j0] and b = H[0][j0+1] taken from
//     TOP, which assumes the top row H[0][j] = j*del; every other PE starts
//     with a and d at SENTINEL, a value above any real distance, so its
//     first step (row 0) computes c + del = H[0][j] by itself;
//   * the T stream reaches PE k k steps late, so one pass takes L + NPE
//     steps, run as three copies of the nine-slice body: NPE steps that only
//     read the T and d FIFOs, L - NPE steps that read and write, and NPE
//     steps that only write the last PE's d of the previous step to the d
//     FIFO (its port write in slice 1 sends the d of the step before);
//   * the CNT EU counts steps (DEC in slice 1, JNZ in slice 9), PASS counts
//     passes, and a jump to its own slice ends the program.
// Requires L > NPE. Per pass 9*(L+NPE) + 2*NPE + 7 cycles, plus 2 for the
// first and the halting slice.
package sw_prog_pkg;
  import crec_pkg::*;

  localparam int unsigned NSLICE   = 38;
  localparam int unsigned N_PAR    = 5;
  localparam logic [15:0] SENTINEL = 16'hF000;

  // slice addresses
  localparam int unsigned S_INIT  = 0;
  localparam int unsigned S_PASS  = 1;
  localparam int unsigned S_SLOAD = 2;
  localparam int unsigned S_SJMP  = 3;
  localparam int unsigned S_ACNT  = 4;
  localparam int unsigned S_A     = 5;
  localparam int unsigned S_BCNT0 = 14;
  localparam int unsigned S_BCNT1 = 15;
  localparam int unsigned S_B     = 16;
  localparam int unsigned S_CCNT  = 25;
  localparam int unsigned S_C     = 26;
  localparam int unsigned S_PDEC  = 35;
  localparam int unsigned S_PJMP  = 36;
  localparam int unsigned S_HALT  = 37;

  // instruction word and direct operand of one EU in one slice
  typedef logic [IW+15:0] op_word_t;

  // parameter EU order
  localparam int unsigned P_INS = 0, P_DEL = 1, P_SUB = 2, P_LEN = 3, P_NPASS = 4;

  function automatic int unsigned n_eu(int unsigned npe);
    return 6 * npe + 3;
  endfunction

  function automatic int unsigned cycles(int unsigned npe, int unsigned len, int unsigned passes);
    return 2 + passes * (9 * (len + npe) + 2 * npe + 7);
  endfunction

  // One step (nine slices) of every PE. `s` is 0..8, `base` the address of
  // the body's first slice.
  function automatic op_word_t body(int unsigned npe, int unsigned e,
                                    int unsigned s, logic [15:0] base,
                                    bit rd, bit wr);
    int unsigned k, u, cnt, par;
    instr_t      ins;
    logic [15:0] imm;
    cnt = 6 * npe;
    par = n_eu(npe);
    ins = '0;
    imm = '0;
    if (e == cnt) begin
      if (s == 0) ins = mk(OP_DEC, C_ALWAYS, SRC_REG, 0);
      if (s == 8) begin ins = mk(OP_JMP, C_NZ, SRC_IMM, 0); imm = base; end
      return {ins, imm};
    end
    if (e >= cnt) return {ins, imm};
    k = e / 6;
    u = e % 6;
    case (s)
      0: case (u)
           0: if (wr && k == npe - 1) ins = mk(OP_OUT, C_ALWAYS, SRC_REG, 6 * k + 2);
           1: if (k != 0)  ins = mk(OP_MOV, C_ALWAYS, SRC_REG, 6 * (k - 1) + 1);
              else if (rd) ins = mk(OP_MOV, C_ALWAYS, SRC_PORT, 0);
           2: ins = mk(OP_MOV, C_ALWAYS, SRC_REG, 6 * k + 4);
           3: ins = mk(OP_MOV, C_ALWAYS, SRC_REG, 6 * k + 2);
           4: if (k != 0)  ins = mk(OP_MOV, C_ALWAYS, SRC_REG, 6 * (k - 1) + 2);
              else if (rd) ins = mk(OP_MOV, C_ALWAYS, SRC_PORT, 0);
           5: ins = mk(OP_MOV, C_ALWAYS, SRC_REG, 6 * k + 0);
           default: ;
         endcase
      1: case (u)
           0: ins = mk(OP_CMP, C_ALWAYS, SRC_REG, 6 * k + 1);
           3: ins = mk(OP_ADD, C_ALWAYS, SRC_REG, par + P_INS);
           4: ins = mk(OP_ADD, C_ALWAYS, SRC_REG, par + P_DEL);
           default: ;
         endcase
      2: if (u == 0) ins = mk(OP_MOV, C_Z, SRC_IMM, 0);
      3: if (u == 0) ins = mk(OP_MOV, C_NZ, SRC_REG, par + P_SUB);
      4: case (u)
           0: ins = mk(OP_MOV, C_ALWAYS, SRC_REG, 6 * k + 5);
           2: ins = mk(OP_ADD, C_ALWAYS, SRC_REG, 6 * k + 0);
           default: ;
         endcase
      5: if (u == 2) ins = mk(OP_CMP, C_ALWAYS, SRC_REG, 6 * k + 3);
      6: case (u)
           2: ins = mk(OP_MOV, C_A, SRC_REG, 6 * k + 3);
           3: ins = mk(OP_SUB, C_ALWAYS, SRC_REG, par + P_INS);
           default: ;
         endcase
      7: if (u == 2) ins = mk(OP_CMP, C_ALWAYS, SRC_REG, 6 * k + 4);
      8: case (u)
           2: ins = mk(OP_MOV, C_A, SRC_REG, 6 * k + 4);
           4: ins = mk(OP_SUB, C_ALWAYS, SRC_REG, par + P_DEL);
           default: ;
         endcase
      default: ;
    endcase
    return {ins, imm};
  endfunction

  // Instruction and direct operand of EU `e` in slice `sl`.
  function automatic op_word_t sw_op(int unsigned npe, int unsigned e, int unsigned sl);
    int unsigned cnt, pass, top, par, k, u;
    instr_t      ins;
    logic [15:0] imm;
    cnt  = 6 * npe;
    pass = cnt + 1;
    top  = cnt + 2;
    par  = n_eu(npe);
    k    = e / 6;
    u    = e % 6;
    ins  = '0;
    imm  = '0;
    if (sl >= S_A && sl < S_A + 9)
      return body(npe, e, sl - S_A, 16'(S_A), 1'b1, 1'b0);
    else if (sl >= S_B && sl < S_B + 9)
      return body(npe, e, sl - S_B, 16'(S_B), 1'b1, 1'b1);
    else if (sl >= S_C && sl < S_C + 9)
      return body(npe, e, sl - S_C, 16'(S_C), 1'b0, 1'b1);
    else begin
      case (sl)
        S_INIT: begin
          if (e == pass) ins = mk(OP_MOV, C_ALWAYS, SRC_REG, par + P_NPASS);
          if (e == top)  ins = mk(OP_MOV, C_ALWAYS, SRC_IMM, 0);
        end
        S_PASS: begin
          if (e == cnt) begin ins = mk(OP_MOV, C_ALWAYS, SRC_IMM, 0); imm = 16'(npe); end
          if (e < cnt && (u == 2 || u == 4)) begin
            if (k == 0) ins = mk(OP_MOV, C_ALWAYS, SRC_REG, top);
            else begin ins = mk(OP_MOV, C_ALWAYS, SRC_IMM, 0); imm = SENTINEL; end
          end
        end
        S_SLOAD: begin
          if (e == cnt) ins = mk(OP_DEC, C_ALWAYS, SRC_REG, 0);
          if (e == top) ins = mk(OP_ADD, C_ALWAYS, SRC_REG, par + P_DEL);
          if (e < cnt && u == 0) begin
            if (k == npe - 1) ins = mk(OP_MOV, C_ALWAYS, SRC_PORT, 0);
            else              ins = mk(OP_MOV, C_ALWAYS, SRC_REG, 6 * (k + 1));
          end
        end
        S_SJMP:
          if (e == cnt) begin ins = mk(OP_JMP, C_NZ, SRC_IMM, 0); imm = 16'(S_SLOAD); end
        S_ACNT: begin
          if (e == cnt) begin ins = mk(OP_MOV, C_ALWAYS, SRC_IMM, 0); imm = 16'(npe); end
          if (e == 2)   ins = mk(OP_ADD, C_ALWAYS, SRC_REG, par + P_DEL);
        end
        S_BCNT0:
          if (e == cnt) ins = mk(OP_MOV, C_ALWAYS, SRC_REG, par + P_LEN);
        S_BCNT1:
          if (e == cnt) begin ins = mk(OP_SUB, C_ALWAYS, SRC_IMM, 0); imm = 16'(npe); end
        S_CCNT:
          if (e == cnt) begin ins = mk(OP_MOV, C_ALWAYS, SRC_IMM, 0); imm = 16'(npe); end
        S_PDEC:
          if (e == pass) ins = mk(OP_DEC, C_ALWAYS, SRC_REG, 0);
        S_PJMP:
          if (e == pass) begin ins = mk(OP_JMP, C_NZ, SRC_IMM, 0); imm = 16'(S_PASS); end
        S_HALT:
          if (e == cnt) begin ins = mk(OP_JMP, C_ALWAYS, SRC_IMM, 0); imm = 16'(S_HALT); end
        default: ;
      endcase
    end
    return {ins, imm};
  endfunction

endpackage

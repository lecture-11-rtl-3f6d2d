// parc_tb_pkg: test support shared by the processor testbenches.
//
// - An assembler: one function per PARCv1 instruction, returning its
//   32-bit encoding (same encoding as the design's package).
// - A program generator: a directed program that exercises every
//   instruction, a loop with a taken/not-taken bne, a jal/jr call, a j,
//   back-to-back register dependences and lw.ai (also with rt == rs),
//   followed by a block of pseudo-random addu/addiu/mul/lw/sw/lw.ai
//   instructions; the program ends by storing r1..r31 to a result area and
//   spinning on "j ." (the halt).
// - An instruction-set simulator (ISS) that runs the program to the halt and
//   records the architectural results, plus the cycle counts each
//   microarchitecture should take: dynamic instruction count (single-cycle),
//   the sum of per-instruction state counts (FSM), and a stage-timing model
//   of the pipeline with stalls until the producer has written back,
//   one-cycle jump squash and two-cycle taken-branch squash.
package parc_tb_pkg;

  typedef logic [31:0] w_t;

  localparam int MEMW      = 4096;          // words of test memory (16 KiB)
  localparam int DATA_BASE = 32'h2000;      // byte address of the data area
  localparam int RES_BASE  = 32'h3000;      // byte address of the result area

  // ------------------------------------------------------------ assembler
  function automatic w_t r_type(int op, int rs, int rt, int rd, int fn);
    return {op[5:0], rs[4:0], rt[4:0], rd[4:0], 5'd0, fn[5:0]};
  endfunction
  function automatic w_t i_type(int op, int rs, int rt, int imm);
    return {op[5:0], rs[4:0], rt[4:0], imm[15:0]};
  endfunction
  function automatic w_t a_addu (int rd, int rs, int rt); return r_type(6'h00, rs, rt, rd, 6'h21); endfunction
  function automatic w_t a_mul  (int rd, int rs, int rt); return r_type(6'h1C, rs, rt, rd, 6'h02); endfunction
  function automatic w_t a_jr   (int rs);                 return r_type(6'h00, rs, 0, 0, 6'h08);   endfunction
  function automatic w_t a_addiu(int rt, int rs, int imm); return i_type(6'h09, rs, rt, imm); endfunction
  function automatic w_t a_lw   (int rt, int imm, int rs); return i_type(6'h23, rs, rt, imm); endfunction
  function automatic w_t a_lwai (int rt, int imm, int rs); return i_type(6'h3B, rs, rt, imm); endfunction
  function automatic w_t a_sw   (int rt, int imm, int rs); return i_type(6'h2B, rs, rt, imm); endfunction
  // branch/jump targets are given as word indices of the destination
  function automatic w_t a_bne(int rs, int rt, int at, int to);
    return i_type(6'h05, rs, rt, to - (at + 1));
  endfunction
  function automatic w_t a_j  (int to); w_t t = to; return {6'h02, t[25:0]}; endfunction
  function automatic w_t a_jal(int to); w_t t = to; return {6'h03, t[25:0]}; endfunction

  // ------------------------------------------------------------ program
  w_t prog [MEMW];
  int halt_word;

  function automatic int rnd(int n); return $urandom_range(n - 1, 0); endfunction

  // nrand: number of random instructions in the middle block
  function automatic void gen_program(int nrand);
    int pc, loop_at, sub_at, jal_at, j_at, skip_at;
    for (int i = 0; i < MEMW; i++) prog[i] = '0;
    // data area: a recognisable pattern
    for (int i = 0; i < 256; i++) prog[DATA_BASE/4 + i] = 32'h1000_0000 + i * 32'h0001_0003;
    pc = 0;
    prog[pc++] = a_addiu(1, 0, 5);
    prog[pc++] = a_addiu(2, 0, -3);
    prog[pc++] = a_addu (3, 1, 2);          // RAW on r1, r2
    prog[pc++] = a_mul  (4, 1, 2);          // 5 * -3
    prog[pc++] = a_addiu(28, 0, DATA_BASE);
    prog[pc++] = a_sw   (4, 0, 28);         // RAW on r28
    prog[pc++] = a_sw   (3, 4, 28);
    prog[pc++] = a_lw   (5, 4, 28);
    prog[pc++] = a_lwai (6, 0, 28);         // r6 = M[r28], r28 += 4
    prog[pc++] = a_lwai (7, 0, 28);         // uses the incremented r28
    prog[pc++] = a_addu (5, 5, 7);          // load-use
    prog[pc++] = a_lwai (28, 8, 28);        // rt == rs: rs + 4 wins
    prog[pc++] = a_addiu(8, 0, 0);
    prog[pc++] = a_addiu(9, 0, 6);
    prog[pc++] = a_addiu(10, 0, 1);
    loop_at = pc;
    prog[pc++] = a_addu (8, 8, 9);
    prog[pc++] = a_mul  (10, 10, 9);
    prog[pc++] = a_addiu(9, 9, -1);
    prog[pc]   = a_bne  (9, 0, pc, loop_at); pc++;
    jal_at = pc++;                          // jal sub (patched below)
    prog[pc++] = a_addiu(12, 11, 100);      // after return
    j_at = pc++;                            // j skip (patched below)
    prog[pc++] = a_addiu(13, 0, 99);        // skipped
    prog[pc++] = a_addiu(13, 0, 98);        // skipped
    skip_at = pc;
    prog[j_at] = a_j(skip_at);
    prog[pc++] = a_addiu(14, 0, 1);
    prog[pc]   = a_bne  (14, 14, pc, 0); pc++;  // never taken (r14 == r14)
    prog[pc++] = a_addiu(15, 0, 0);
    // random block
    for (int k = 0; k < nrand; k++) begin
      int sel, rd, rs, rt;
      sel = rnd(6); rd = 1 + rnd(15); rs = rnd(16); rt = rnd(16);
      if (rs == 28) rs = 1;
      unique case (sel)
        0: prog[pc++] = a_addu (rd, rs, rt);
        1: prog[pc++] = a_addiu(rd, rs, rnd(65536) - 32768);
        2: prog[pc++] = a_mul  (rd, rs, rt);
        3: prog[pc++] = a_lw   (rd, DATA_BASE + 4 * rnd(64), 0);
        4: prog[pc++] = a_sw   (rt, DATA_BASE + 4 * rnd(64), 0);
        default: prog[pc++] = a_lwai(rd, 4 * rnd(4), 28);
      endcase
    end
    // results
    for (int r = 1; r < 32; r++) prog[pc++] = a_sw(r, RES_BASE + 4 * r, 0);
    halt_word = pc;
    prog[pc] = a_j(pc); pc++;
    // subroutine
    sub_at = pc;
    prog[jal_at] = a_jal(sub_at);
    prog[pc++] = a_addiu(11, 0, 7);
    prog[pc++] = a_mul  (11, 11, 11);
    prog[pc++] = a_jr   (31);
  endfunction

  // ------------------------------------------------------------ ISS
  w_t iss_mem [MEMW];
  w_t iss_rf  [32];
  int n_inst;            // dynamic instructions before the halt
  int fsm_cycles;        // expected FSM cycles until the halt's fetch (F0)
  int pipe_halt_cycle;   // expected cycle in which the pipeline fetches the halt
  int pipe_stall_cycles; // expected cycles in which D originates a stall
  int pipe_jumps;        // expected squashes originated in D
  int pipe_taken;        // expected squashes originated in X
  int n_mul, n_lwai, n_taken, n_nottaken, n_jal, n_jr;

  function automatic int max2(int a, int b); return a > b ? a : b; endfunction

  function automatic void run_iss();
    w_t pc, ir, a, b;
    int ready [32];
    int e, dfirst, d, prev_d, prev_dfirst, prev_kind;  // kind: 0 seq, 1 jump, 2 taken
    int op, fn, rs, rt, rd, cyc;
    w_t imm;
    for (int i = 0; i < MEMW; i++) iss_mem[i] = prog[i];
    for (int i = 0; i < 32; i++) begin iss_rf[i] = '0; ready[i] = 0; end
    pc = 0; n_inst = 0; fsm_cycles = 0;
    pipe_stall_cycles = 0; pipe_jumps = 0; pipe_taken = 0;
    n_mul = 0; n_lwai = 0; n_taken = 0; n_nottaken = 0; n_jal = 0; n_jr = 0;
    prev_d = -100; prev_dfirst = 0; prev_kind = 0;
    forever begin
      ir = iss_mem[pc[13:2]];
      // pipeline fetch time of this instruction
      if (n_inst == 0)         e = 0;
      else if (prev_kind == 1) e = prev_d + 1;
      else if (prev_kind == 2) e = prev_d + 2;
      else                     e = prev_dfirst;
      if (ir == a_j(pc[27:2])) begin
        pipe_halt_cycle = e;
        break;
      end
      op = ir[31:26]; fn = ir[5:0]; rs = ir[25:21]; rt = ir[20:16]; rd = ir[15:11];
      imm = {{16{ir[15]}}, ir[15:0]};
      a = iss_rf[rs]; b = iss_rf[rt];
      dfirst = max2(e + 1, prev_d + 1);
      d = dfirst;
      prev_kind = 0;
      cyc = 3;
      case (op)
        6'h00: if (fn == 6'h21) begin           // addu
                 d = max2(d, max2(ready[rs], ready[rt]));
                 iss_rf[rd] = a + b; ready[rd] = d + 4; cyc += 3; pc += 4;
               end else begin                    // jr
                 d = max2(d, ready[rs]);
                 pc = a; prev_kind = 1; cyc += 1; n_jr++; pipe_jumps++;
               end
        6'h1C: begin                             // mul
                 d = max2(d, max2(ready[rs], ready[rt]));
                 iss_rf[rd] = a * b; ready[rd] = d + 4; cyc += 35; pc += 4; n_mul++;
               end
        6'h09: begin                             // addiu
                 d = max2(d, ready[rs]);
                 iss_rf[rt] = a + imm; ready[rt] = d + 4; cyc += 3; pc += 4;
               end
        6'h23: begin                             // lw
                 d = max2(d, ready[rs]);
                 iss_rf[rt] = iss_mem[(a + imm) >> 2]; ready[rt] = d + 4; cyc += 4; pc += 4;
               end
        6'h3B: begin                             // lw.ai
                 d = max2(d, ready[rs]);
                 iss_rf[rt] = iss_mem[(a + imm) >> 2]; iss_rf[rs] = a + 4;
                 ready[rt] = d + 4; ready[rs] = d + 4; cyc += 5; pc += 4; n_lwai++;
               end
        6'h2B: begin                             // sw
                 d = max2(d, max2(ready[rs], ready[rt]));
                 iss_mem[(a + imm) >> 2] = b; cyc += 4; pc += 4;
               end
        6'h02: begin                             // j
                 pc = {pc[31:28] , ir[25:0], 2'b00}; prev_kind = 1; cyc += 2; pipe_jumps++;
               end
        6'h03: begin                             // jal
                 iss_rf[31] = pc + 4; ready[31] = d + 4;
                 pc = {pc[31:28], ir[25:0], 2'b00}; prev_kind = 1; cyc += 3; pipe_jumps++; n_jal++;
               end
        6'h05: begin                             // bne
                 d = max2(d, max2(ready[rs], ready[rt]));
                 if (a != b) begin
                   pc = pc + 4 + (imm << 2); prev_kind = 2; cyc += 5; pipe_taken++; n_taken++;
                 end else begin
                   pc += 4; cyc += 3; n_nottaken++;
                 end
               end
        default: begin pc += 4; cyc = 3; end
      endcase
      iss_rf[0] = '0;
      pipe_stall_cycles += d - dfirst;
      prev_d = d; prev_dfirst = dfirst;
      fsm_cycles += cyc;
      n_inst++;
    end
  endfunction

endpackage

// cf_tb_pkg: test programs for the control flow checker testbenches.
//
// A program is a map from instruction word address to an abstract
// instruction (no-op, direct branch with a taken probability, direct jump,
// call, return, or end of run). build(D) lays out three programs for a CPU
// with D delay slots after each control flow instruction (CFI), and computes
// the tables an offline program analyser would produce for them:
//  - the CFI-method table (one entry per CFI plus checking start/end flags),
//  - the CF-method basic block table of program 1.
// Program 1 is the loop of the classic example: a for loop (branch A exits
// to label a), an if inside (branch B skips to label b) and the loop-back
// jump C to label c. Its last basic block before C is a single instruction
// when D = 0. Program 2 calls a function twice; the function calls another
// one. Program 3 returns with nothing on the return stack. Jumps between the
// programs lie outside the checked regions.
package cf_tb_pkg;

  typedef enum int {OP_NOP, OP_BR, OP_JMP, OP_CALL, OP_RET, OP_LOOP} op_e;

  typedef struct {
    op_e op;
    int  target;
    int  prob;     // taken probability of a branch, percent
    bit  start;    // checking start address
    bit  stop;     // checking end address
    bit  uf;       // decode address of a return pair expected to underflow
  } instr_t;

  typedef struct { int from; int to; int kind; int next; } cfi_entry_t;
  typedef struct { int e; int kind; int succ; int sig; } bb_entry_t;

  // encodings of cf_pkg, repeated here as integers for the table builder
  localparam int K_BRANCH = 0, K_JUMP = 1, K_CALL = 2, K_RET = 3, K_START = 4, K_END = 5;
  localparam int B_FALL = 0, B_BRANCH = 1, B_JUMP = 2, B_END = 3;

  // Instruction word the test programs hold at a word address: an arbitrary
  // mix of the address bits (the checkers only compare words).
  function automatic int instr_word(int addr);
    return (addr * 32'h9E37_79B1) ^ 32'h5A5A_0F0F;
  endfunction

  // Block signature as the offline analyser computes it: CRC-16-CCITT
  // (x^16+x^12+x^5+1, preset 0xFFFF) of the block's words, each fed MSB first.
  function automatic int block_sig(int first, int last);
    int c = 'hFFFF;
    for (int a = first; a <= last; a++) begin
      int w = instr_word(a);
      for (int b = 31; b >= 0; b--) begin
        int fb = ((c >> 15) ^ (w >> b)) & 1;
        c = (c << 1) & 'hFFFF;
        if (fb != 0) c = c ^ 'h1021;
      end
    end
    return c;
  endfunction

  // Saved fetch state of the CPU model, used to roll back on a restart.
  class cpu_snap;
    int q[$];
    int stk[$];
  endclass

  class cf_prog;
    instr_t     imem [int];
    cfi_entry_t cfi [$];
    bb_entry_t  bb [$];
    int         seg_start;
    int         first_pc;

    function void put(int addr, op_e op, int target = 0, int prob = 0);
      instr_t i;
      i.op = op; i.target = target; i.prob = prob; i.start = 0; i.stop = 0; i.uf = 0;
      imem[addr] = i;
    endfunction

    function void flag(int addr, bit start, bit stop, bit uf);
      if (!imem.exists(addr)) put(addr, OP_NOP);
      imem[addr].start |= start;
      imem[addr].stop  |= stop;
      imem[addr].uf    |= uf;
    endfunction

    function instr_t get(int addr);
      instr_t i;
      i.op = OP_NOP; i.target = 0; i.prob = 0; i.start = 0; i.stop = 0; i.uf = 0;
      if (imem.exists(addr)) i = imem[addr];
      return i;
    endfunction

    function void add_cfi(int from, int to, int kind, int next);
      cfi_entry_t e;
      e.from = from; e.to = to; e.kind = kind; e.next = next;
      cfi.push_back(e);
    endfunction

    function void add_bb(int e, int kind, int succ);
      bb_entry_t b;
      b.e = e; b.kind = kind; b.succ = succ;
      bb.push_back(b);
    endfunction

    function void build(int d);
      int a0, c_lbl, A, b3, B, b4, b_lbl, C, a_lbl, END1;
      int m0, CALL1, r1, CALL2, r2, END2, f, CALLG, rg, RETF, g, RETG, p3, RET3, LOOP;
      // program 1: the loop example
      a0 = 'h100; c_lbl = a0 + 2; A = c_lbl + 1; b3 = A + 1 + d; B = b3 + 1;
      b4 = B + 1 + d; b_lbl = b4 + 3; C = b_lbl; a_lbl = C + 1 + d; END1 = a_lbl + 2;
      // program 2: calls and returns
      m0 = 'h200; CALL1 = m0 + 3; r1 = CALL1 + 1 + d; CALL2 = r1 + 2; r2 = CALL2 + 1 + d;
      END2 = r2 + 1; f = 'h300; CALLG = f + 1; rg = CALLG + 1 + d; RETF = rg + 1;
      g = 'h310; RETG = g + 1;
      // program 3: return without a call
      p3 = 'h400; RET3 = p3 + 1; LOOP = 'h500;
      imem.delete(); cfi.delete(); bb.delete();
      seg_start = a0; first_pc = a0;

      put(A, OP_BR, a_lbl, 30);
      put(B, OP_BR, b_lbl, 50);
      put(C, OP_JMP, c_lbl);
      put(a_lbl + 3, OP_JMP, m0);         // unchecked
      put(CALL1, OP_CALL, f);
      put(CALL2, OP_CALL, f);
      put(r2 + 2, OP_JMP, p3);            // unchecked
      put(CALLG, OP_CALL, g);
      put(RETF, OP_RET);
      put(RETG, OP_RET);
      put(RET3, OP_RET, LOOP);            // empty stack: goes to LOOP
      put(LOOP, OP_LOOP, a0);             // unchecked, ends one round
      flag(a0, 1, 0, 0); flag(END1, 0, 1, 0);
      flag(m0, 1, 0, 0); flag(END2, 0, 1, 0);
      flag(p3, 1, 0, 0); flag(RET3 + d, 0, 0, 1);

      add_cfi(a0,    0,     K_START, 1);   // 0
      add_cfi(A,     a_lbl, K_BRANCH, 4);  // 1
      add_cfi(B,     b_lbl, K_BRANCH, 3);  // 2
      add_cfi(C,     c_lbl, K_JUMP, 1);    // 3
      add_cfi(END1,  0,     K_END, 5);     // 4
      add_cfi(m0,    0,     K_START, 6);   // 5
      add_cfi(CALL1, f,     K_CALL, 9);    // 6
      add_cfi(CALL2, f,     K_CALL, 9);    // 7
      add_cfi(END2,  0,     K_END, 12);    // 8
      add_cfi(CALLG, g,     K_CALL, 11);   // 9
      add_cfi(RETF,  0,     K_RET, 0);     // 10
      add_cfi(RETG,  0,     K_RET, 0);     // 11
      add_cfi(p3,    0,     K_START, 13);  // 12
      add_cfi(RET3,  0,     K_RET, 0);     // 13

      add_bb(a0 + 1, B_FALL, 0);           // block 0: a0 .. a0+1
      add_bb(A + d,  B_BRANCH, 5);         // block 1: c .. A (+delay)
      add_bb(B + d,  B_BRANCH, 4);         // block 2
      add_bb(b4 + 2, B_FALL, 0);           // block 3
      add_bb(C + d,  B_JUMP, 1);           // block 4: b = C (+delay)
      add_bb(END1,   B_END, 0);            // block 5: a ..
      foreach (bb[i]) bb[i].sig = block_sig(i == 0 ? seg_start : bb[i-1].e + 1, bb[i].e);
    endfunction
  endclass

endpackage

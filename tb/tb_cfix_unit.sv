// tb_cfix_unit: end-to-end test of the CFI unit with a host pipeline model.
//
// A program generator writes instrumented SPARC V8 instruction traces, each
// instruction with its PC and nPC: direct calls (call + SetPC in the delay
// slot), indirect calls (jmpl + SetPCLabel, CheckLabel at the target),
// returns (retl + CheckPC), recursion through one call site, a direct call
// into an indirect target, setjmp (SJCFI two instructions below the call)
// and longjmp (LJCFI in the delay slot, a jump back onto the SJCFI).
// Attack traces then tamper with a return address, use a wrong label, skip
// the CheckLabel, return from an empty stack and nest calls past the stack
// depth; the unit is reset after each, as the host halts on a violation.
//
// The host model issues one instruction per cycle with random stalls
// (hold), bubbles and flushes (killed instructions are issued again) and
// a directed test of instructions annulled in execute, and
// mirrors the unit's five stages to know, cycle by cycle, which
// instruction is in EX (to drive ex_npc) and which is in XC. A reference
// model of the CFI rules, run on each instruction as it reaches the memory
// stage, gives the expected trap, cause and PC in XC in the next cycle, so
// the 4-cycle latency from decode to exception stage is checked exactly.
// Every mechanism (push, recursion mark, pop, recursive skip, suppress,
// label match, setjmp save/restore, longjmp, the five violations, stall,
// flush, kill by a trap) is counted and must occur at least once.
// Runs with the unit's default parameters (128-entry stack).
module tb_cfix_unit;
  import cfix_pkg::*;
  localparam int DEPTH = 128;
  localparam int IW = $clog2(DEPTH + 1);

  logic clk = 0, rst_n = 0;
  logic hold, flush, de_valid, ex_annul = 0;
  logic [31:0] de_inst, de_pc, ex_npc, xc_pc;
  logic xc_trap;
  violation_e xc_cause;
  logic [IW-1:0] stack_index;
  logic stack_empty, stack_full, in_indirect_call, lj_pending;
  logic [31:0] label_reg;
  cfi_events_t events;

  cfix_unit dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  longint cyc = 0;
  always @(posedge clk) cyc++;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------------------
  // program traces
  typedef struct {
    logic [31:0] inst;
    logic [31:0] pc;
    logic [31:0] npc;
  } ins_t;
  ins_t prog [$];

  localparam logic [31:0] I_ADD  = 32'h86004002;  // add %g1,%g2,%g3
  localparam logic [31:0] I_CALL = 32'h40000000;
  localparam logic [31:0] I_JMPL = 32'h9fc04000;  // jmpl %g1,%o7
  localparam logic [31:0] I_RETL = 32'h81c3e008;
  localparam logic [31:0] I_NOP  = 32'h01000000;

  function automatic logic [31:0] enc(cfi_op_e op, logic [17:0] l = '0);
    return cfi_encode(op, l);
  endfunction

  function automatic void emit(logic [31:0] inst, logic [31:0] pc, logic [31:0] npc);
    ins_t i;
    i.inst = inst; i.pc = pc; i.npc = npc;
    prog.push_back(i);
  endfunction

  // straight-line body of n ordinary instructions from pc; returns next pc
  function automatic logic [31:0] body(logic [31:0] pc, int n);
    for (int k = 0; k < n; k++) begin emit(I_ADD, pc, pc + 4); pc += 4; end
    return pc;
  endfunction

  // a call from site p (call at p, delay slot p+4) into target t
  function automatic void call_direct(logic [31:0] p, logic [31:0] t);
    emit(I_CALL, p, p + 4);
    emit(enc(CFI_SETPC), p + 4, t);
  endfunction

  function automatic void call_indirect(logic [31:0] p, logic [31:0] t,
                                        logic [17:0] l_site, logic [17:0] l_target,
                                        bit with_check = 1);
    emit(I_JMPL, p, p + 4);
    emit(enc(CFI_SETPCLABEL, l_site), p + 4, t);
    if (with_check) emit(enc(CFI_CHECKLABEL, l_target), t, t + 4);
  endfunction

  // return from a function whose retl sits at r, to address ra
  function automatic void ret_to(logic [31:0] r, logic [31:0] ra);
    emit(I_RETL, r, r + 4);
    emit(enc(CFI_CHECKPC), r + 4, ra);
  endfunction

  // random well-formed call tree. Each function f has its code at
  // 0x10000*f; call sites are distinct per (caller, slot).
  int fn_next;
  function automatic void gen_func(int depth, logic [31:0] base, bit indirect_target,
                                   logic [17:0] my_label);
    logic [31:0] pc = base;
    if (indirect_target) pc += 4;     // entry CheckLabel already emitted
    pc = body(pc, $urandom_range(0, 3));
    for (int c = 0; c < int'($urandom_range(0, 3)); c++) begin
      int kind = $urandom_range(0, 9);
      logic [31:0] t = 32'(fn_next++) << 16;
      if (depth == 0) break;
      if (kind < 5) begin
        call_direct(pc, t);
        gen_func(depth - 1, t, 0, 0);
      end else if (kind < 8) begin
        logic [17:0] l = 18'($urandom_range(1, 18'h3ffff));
        call_indirect(pc, t, l, l);
        gen_func(depth - 1, t, 1, l);
      end else begin
        // direct call into a function that is also an indirect target:
        // its entry CheckLabel is excused by the SetPC
        logic [17:0] l = 18'($urandom_range(1, 18'h3ffff));
        call_direct(pc, t);
        emit(enc(CFI_CHECKLABEL, l), t, t + 4);
        gen_func(depth - 1, t, 1, l);
      end
      pc = body(pc + 8, $urandom_range(0, 2));
    end
    pc = body(pc, $urandom_range(0, 2));
    // the caller's return address is found by the model on the program's
    // own call stack (see gen_return)
    ret_marker(pc);
  endfunction

  // Returns are emitted with a placeholder target; fix_returns fills in
  // the real return address by replaying the trace's call structure.
  function automatic void ret_marker(logic [31:0] r);
    ret_to(r, 32'hFFFF_FFFF);
  endfunction

  function automatic void fix_returns(int from);
    logic [31:0] cs [$];
    for (int i = from; i < prog.size(); i++) begin
      cfi_op_e op;
      op = (prog[i].inst[31:30] == 2'b00 && prog[i].inst[24:22] == 3'b101)
           ? cfi_op_e'(prog[i].inst[21:18]) : CFI_NONE;
      if (op == CFI_SETPC || op == CFI_SETPCLABEL) cs.push_back(prog[i].pc + 4);
      if (op == CFI_CHECKPC && prog[i].npc == 32'hFFFF_FFFF) prog[i].npc = cs.pop_back();
      else if (op == CFI_CHECKPC) void'(cs.pop_back());
    end
  endfunction

  // recursion: main calls r() from site s0; r calls itself from site s1
  // n times, then every level returns
  function automatic void gen_recursion(logic [31:0] s0, int n);
    logic [31:0] r = 32'h0080_0000;
    call_direct(s0, r);
    for (int k = 0; k < n; k++) begin
      void'(body(r, 1));
      call_direct(r + 4, r);
    end
    void'(body(r, 1));
    for (int k = 0; k <= n; k++) begin
      void'(body(r + 32'h100, 1));
      ret_to(r + 32'h104, (k < n) ? r + 32'h0c : s0 + 8);
    end
  endfunction

  // setjmp at site s, then calls d deep and a longjmp back onto the SJCFI
  function automatic void gen_setjmp_longjmp(logic [31:0] s, int d, logic [7:0] l);
    logic [31:0] sj = 32'h0090_0000, lj = 32'h0091_0000;
    call_direct(s, sj);                 // call setjmp
    ret_to(sj + 8, s + 8);              // setjmp returns
    emit(enc(CFI_SJCFI, 18'(l)), s + 8, s + 12);
    for (int k = 0; k < d; k++) call_direct(32'h00A0_0000 + 32'(k) * 32'h100, 32'h00A0_0000 + 32'(k + 1) * 32'h100 - 32'h80);
    emit(I_CALL, 32'h00B0_0000, 32'h00B0_0004);          // call longjmp
    emit(enc(CFI_LJCFI), 32'h00B0_0004, lj);
    void'(body(lj, 2));
    emit(I_JMPL, lj + 8, lj + 12);                        // jump to setjmp's return point
    emit(I_NOP, lj + 12, s + 8);
    emit(enc(CFI_SJCFI, 18'(l)), s + 8, s + 12);          // lands on SJCFI
    void'(body(s + 12, 1));
  endfunction

  // ------------------------------------------------------------------
  // reference model of the CFI rules
  logic [31:0] m_stk [DEPTH];
  bit          m_rec [DEPTH];
  int          m_idx;
  logic [31:0] m_lreg;
  bit          m_ind, m_setpc, m_lj;
  int          m_sj [128];

  int n_push, n_recmark, n_pop, n_recskip, n_sup, n_lok, n_save, n_restore, n_lj;
  int n_vio [6];
  int n_hold, n_flush, n_kill, n_bubble, n_annul;

  function automatic void model_reset();
    m_idx = 0; m_lreg = 0; m_ind = 0; m_setpc = 0; m_lj = 0;
    foreach (m_sj[i]) m_sj[i] = 0;
    foreach (m_rec[i]) m_rec[i] = 0;
  endfunction

  function automatic violation_e model_exec(ins_t i);
    violation_e e = VIO_NONE;
    cfi_op_e op;
    op = (i.inst[31:30] == 2'b00 && i.inst[24:22] == 3'b101 &&
          i.inst[21:18] >= 1 && i.inst[21:18] <= 6) ? cfi_op_e'(i.inst[21:18]) : CFI_NONE;
    // forward edge
    if (m_ind && op != CFI_CHECKLABEL) e = VIO_FLOW;
    else if (op == CFI_CHECKLABEL) begin
      if (m_setpc) n_sup++;
      else if (m_lreg == 0 || m_lreg != 32'(i.inst[17:0])) e = VIO_LABEL_MISMATCH;
      else n_lok++;
    end
    m_setpc = (op == CFI_SETPC);
    m_ind   = (op == CFI_SETPCLABEL);
    if (op == CFI_SETPCLABEL) m_lreg = 32'(i.inst[17:0]);
    else if (op == CFI_CHECKLABEL) m_lreg = 0;
    if (e != VIO_NONE) return e;
    // backward edge and setjmp/longjmp
    case (op)
      CFI_SETPC, CFI_SETPCLABEL:
        if (m_idx > 0 && m_stk[m_idx-1] == i.pc) begin m_rec[m_idx-1] = 1; n_recmark++; end
        else if (m_idx == DEPTH) e = VIO_FULL;
        else begin m_stk[m_idx] = i.pc; m_rec[m_idx] = 0; m_idx++; n_push++; end
      CFI_CHECKPC:
        if (m_idx == 0) e = VIO_EMPTY;
        else if (m_stk[m_idx-1] + 4 == i.npc) begin
          if (!m_rec[m_idx-1]) begin m_idx--; n_pop++; end
        end else if (m_rec[m_idx-1] && m_idx > 1 && m_stk[m_idx-2] + 4 == i.npc) begin
          m_idx--;
          if (!m_rec[m_idx-1]) m_idx--;
          n_pop++; n_recskip++;
        end else e = VIO_PC_MISMATCH;
      CFI_LJCFI: begin m_lj = 1; n_lj++; end
      CFI_SJCFI:
        if (m_lj) begin m_idx = m_sj[i.inst[6:0]]; m_lj = 0; n_restore++; end
        else begin m_sj[i.inst[6:0]] = m_idx; n_save++; end
      default: ;
    endcase
    return e;
  endfunction

  // ------------------------------------------------------------------
  // host pipeline model: mirrors RA, EX, ME, XC
  typedef struct {
    bit          v;
    int          idx;     // position in prog
    ins_t        i;
    violation_e  e;       // expected cause (set when leaving ME)
  } slot_t;
  slot_t s_ra, s_ex, s_me, s_xc;

  int  hold_pct = 0, bubble_pct = 0, flush_pct = 0;

  // run prog[from..] through the unit; returns after the last instruction
  // has left XC, or after a trap has been seen. Returns the trap count.
  task automatic run(int from, output int traps, input bit expect_trap);
    int pc_i = from;
    slot_t s_de, z;
    bit do_hold, do_flush, kill, tr;
    traps = 0;
    z = '{v: 0, idx: 0, i: '{0, 0, 0}, e: VIO_NONE};
    s_ra = z; s_ex = z; s_me = z; s_xc = z;
    forever begin
      @(negedge clk);
      do_hold  = ($urandom_range(0, 99) < hold_pct);
      do_flush = !do_hold && ($urandom_range(0, 99) < flush_pct) && (s_ra.v || s_ex.v || s_me.v);
      s_de = z;
      if (pc_i < prog.size() && !($urandom_range(0, 99) < bubble_pct)) begin
        s_de.v = 1; s_de.idx = pc_i; s_de.i = prog[pc_i];
      end else if (pc_i < prog.size()) n_bubble++;
      hold     = do_hold;
      flush    = do_flush;
      de_valid = s_de.v;
      de_inst  = s_de.v ? s_de.i.inst : $urandom;
      de_pc    = s_de.i.pc;
      ex_npc   = s_ex.i.npc;
      #1;
      // XC check (the instruction in the mirror's XC is on the outputs now)
      checks++;
      tr = s_xc.v && s_xc.e != VIO_NONE;
      if (xc_trap != tr || (tr && (xc_cause != s_xc.e || xc_pc != s_xc.i.pc))) begin
        failures++;
        $display("FAIL cyc=%0d trap=%b cause=%0d pc=%h expected %b/%0d/%h", cyc, xc_trap,
                 xc_cause, xc_pc, tr, s_xc.e, s_xc.i.pc);
      end
      if (do_hold) begin
        n_hold++;
        if (tr) n_hold += 0;
        continue;
      end
      if (tr) begin
        traps++;
        n_vio[s_xc.e]++;
        if (s_ra.v || s_ex.v || s_me.v || s_de.v) n_kill++;
      end
      kill = do_flush || tr;
      if (do_flush) n_flush++;
      // advance the mirror
      if (kill) s_xc = z;
      else if (s_me.v) begin
        s_xc = s_me;
        s_xc.i.npc = s_me.i.npc;
        s_xc.e = model_exec(s_me.i);
      end else s_xc = z;
      if (kill) begin
        // the host re-issues what was killed, unless a CFI trap halts it
        int oldest = s_de.v ? s_de.idx : pc_i;
        if (s_me.v) oldest = s_me.idx; else if (s_ex.v) oldest = s_ex.idx;
        else if (s_ra.v) oldest = s_ra.idx;
        if (do_flush && !tr) pc_i = oldest;
        s_ra = z; s_ex = z; s_me = z;
        if (tr) pc_i = prog.size();
      end else begin
        s_me = s_ex;
        s_ex = s_ra;
        s_ra = s_de;
        if (s_de.v) pc_i++;
      end
      // me slot's npc: the mirror already holds it from the trace
      if (pc_i >= prog.size() && !s_ra.v && !s_ex.v && !s_me.v && !s_xc.v) break;
    end
    @(negedge clk);
    hold = 0; flush = 0; de_valid = 0;
    // the stack depth must match the model once the pipe is empty
    checks++;
    if (stack_index != IW'(m_idx)) begin
      failures++;
      $display("FAIL stack index %0d, model %0d", stack_index, m_idx);
    end
    checks++;
    if (expect_trap != (traps > 0)) begin
      failures++;
      $display("FAIL expected trap %b, saw %0d", expect_trap, traps);
    end
  endtask

  task automatic do_reset();
    @(negedge clk);
    rst_n = 0;
    hold = 0; flush = 0; de_valid = 0; de_inst = 0; de_pc = 0; ex_npc = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    model_reset();
  endtask

  // one clean trace: main calls a random tree and returns into "_start"
  task automatic clean_trace(int depth);
    int from, traps;
    prog.delete();
    fn_next = 16;
    from = 0;
    call_direct(32'h0000_1000, 32'h000F_0000);           // _start -> main
    gen_func(depth, 32'h000F_0000, 0, 0);
    fix_returns(0);
    gen_recursion(32'h0000_1010, $urandom_range(1, 6));
    gen_setjmp_longjmp(32'h0000_1020, $urandom_range(1, 5), 8'($urandom_range(0, 255)));
    run(from, traps, 0);
  endtask

  task automatic attack(string name, violation_e want);
    int traps;
    fix_returns(0);
    run(0, traps, 1);
    checks++;
    if (n_vio[want] == 0) begin
      failures++;
      $display("FAIL attack %s: no %0d violation", name, want);
    end
    do_reset();
  endtask

  initial begin
    bit v0;
    hold = 0; flush = 0; de_valid = 0; de_inst = 0; de_pc = 0; ex_npc = 0;
    foreach (n_vio[i]) n_vio[i] = 0;
    {n_push, n_recmark, n_pop, n_recskip, n_sup, n_lok, n_save, n_restore, n_lj} = '0;
    {n_hold, n_flush, n_kill, n_bubble, n_annul} = '0;
    do_reset();

    // clean programs, first without disturbances, then with stalls,
    // bubbles and flushes
    for (int k = 0; k < 200; k++) begin
      hold_pct   = (k < 5) ? 0 : 15;
      bubble_pct = (k < 5) ? 0 : 15;
      flush_pct  = (k < 10) ? 0 : 3;
      clean_trace(5);
      do_reset();
    end
    hold_pct = 10; bubble_pct = 10; flush_pct = 0;

    // return address overwritten on the stack
    prog.delete();
    call_direct(32'h1000, 32'h20000); void'(body(32'h20000, 3));
    ret_to(32'h2000c, 32'h1234);
    attack("tampered return", VIO_PC_MISMATCH);

    // indirect call with the wrong label at the target
    prog.delete();
    call_indirect(32'h1000, 32'h30000, 18'h0c0de, 18'h0beef);
    attack("wrong label", VIO_LABEL_MISMATCH);

    // indirect call to a function that is no indirect target
    prog.delete();
    call_indirect(32'h1000, 32'h30000, 18'h0c0de, 18'h0, 0);
    void'(body(32'h30000, 2));
    attack("missing CheckLabel", VIO_FLOW);

    // CheckLabel reached by a jump, with no SetPCLabel before it
    prog.delete();
    void'(body(32'h1000, 2));
    emit(enc(CFI_CHECKLABEL, 18'h0c0de), 32'h1008, 32'h100c);
    attack("unannounced CheckLabel", VIO_LABEL_MISMATCH);

    // more returns than calls
    prog.delete();
    void'(body(32'h1000, 1));
    ret_to(32'h1004, 32'h5000);
    attack("return from empty stack", VIO_EMPTY);

    // call chain deeper than the stack
    prog.delete();
    for (int k = 0; k <= DEPTH; k++) begin
      call_direct(32'h0100_0000 + 32'(k) * 32'h100, 32'h0100_0000 + 32'(k + 1) * 32'h100 - 32'h80);
      if (k % 7 == 0) void'(body(32'h0100_0000 + 32'(k + 1) * 32'h100 - 32'h80, 1));
    end
    attack("stack overflow", VIO_FULL);

    // a trap kills the instructions behind it: the SetPC right after a
    // bad CheckPC must not reach the stack
    hold_pct = 0; bubble_pct = 0;
    prog.delete();
    call_direct(32'h1000, 32'h20000);
    ret_to(32'h20000, 32'h4444);
    emit(enc(CFI_SETPC), 32'h4444, 32'h20000);   // right behind the CheckPC
    void'(body(32'h20000, 2));
    begin
      int traps;
      fix_returns(0);
      run(0, traps, 1);
    end
    checks++;
    if (stack_index != IW'(1)) begin
      failures++;
      $display("FAIL instruction behind a trap changed the stack (%0d)", stack_index);
    end
    do_reset();

    // an annulled delay slot: a SetPC annulled in execute must not push,
    // and a SetPCLabel annulled there must not demand a CheckLabel
    begin
      automatic int k0 = 0;
      @(negedge clk);
      de_valid = 1; de_inst = enc(CFI_SETPC); de_pc = 32'h3000;
      @(negedge clk);
      de_inst = enc(CFI_SETPCLABEL, 18'h00777); de_pc = 32'h3004;
      @(negedge clk);
      de_inst = I_ADD; de_pc = 32'h3008;
      ex_annul = 1;                 // SetPC is in EX
      @(negedge clk);
      ex_annul = 1;                 // SetPCLabel is in EX
      @(negedge clk);
      ex_annul = 0;
      de_valid = 0;
      repeat (6) begin
        @(negedge clk);
        if (xc_trap) k0++;
      end
      checks++;
      if (stack_index != 0 || k0 != 0 || label_reg != 0) begin
        failures++;
        $display("FAIL annulled instructions acted: index=%0d traps=%0d label=%h",
                 stack_index, k0, label_reg);
      end else n_annul++;
      do_reset();
    end

    // latency: a violation issued at cycle t is raised at cycle t+4
    begin
      longint t0;
      @(negedge clk);
      de_valid = 1; de_inst = enc(CFI_CHECKPC); de_pc = 32'h2000; t0 = cyc;
      @(negedge clk);
      de_valid = 0;
      while (!xc_trap && cyc < t0 + 20) @(negedge clk);
      checks++;
      if (cyc - t0 != 4 || xc_cause != VIO_EMPTY) begin
        failures++;
        $display("FAIL trap after %0d cycles, cause %0d", cyc - t0, xc_cause);
      end
      do_reset();
    end

    $display("push=%0d recmark=%0d pop=%0d recskip=%0d suppressed=%0d label_ok=%0d",
             n_push, n_recmark, n_pop, n_recskip, n_sup, n_lok);
    $display("sj_save=%0d sj_restore=%0d lj=%0d hold=%0d bubble=%0d flush=%0d kill=%0d annul=%0d",
             n_save, n_restore, n_lj, n_hold, n_bubble, n_flush, n_kill, n_annul);
    $display("violations: label=%0d pc=%0d flow=%0d empty=%0d full=%0d",
             n_vio[1], n_vio[2], n_vio[3], n_vio[4], n_vio[5]);
    v0 = 1;
    foreach (n_vio[i]) if (i > 0 && n_vio[i] == 0) v0 = 0;
    checks++;
    if (!v0 || n_push == 0 || n_recmark == 0 || n_pop == 0 || n_recskip == 0 || n_sup == 0 ||
        n_lok == 0 || n_save == 0 || n_restore == 0 || n_lj == 0 || n_hold == 0 ||
        n_bubble == 0 || n_flush == 0 || n_kill == 0 || n_annul == 0) begin
      failures++;
      $display("FAIL a mechanism never occurred");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

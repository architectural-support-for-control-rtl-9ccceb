// tb_cfix_reduced: the CFI unit in its reduced configuration, without the
// recursion optimisation and without setjmp/longjmp support.
// A recursion through one call site must then push one entry per call
// (the full configuration would keep one entry with its recursion bit) and
// pop one per return; SJCFI and LJCFI must leave the stack alone and never
// enter the long-jump state. The expected stack depth after every
// instruction is worked out from the call/return structure of the trace.
module tb_cfix_reduced;
  import cfix_pkg::*;

  logic clk = 0, rst_n = 0;
  logic hold = 0, flush = 0, de_valid = 0, ex_annul = 0;
  logic [31:0] de_inst = 0, de_pc = 0, ex_npc = 0, xc_pc;
  logic xc_trap;
  violation_e xc_cause;
  logic [7:0] stack_index;
  logic stack_empty, stack_full, in_indirect_call, lj_pending;
  logic [31:0] label_reg;
  cfi_events_t events;
  int checks = 0, failures = 0, n_trap = 0, n_recmark = 0, n_lj = 0;

  cfix_unit #(.RECURSION_OPT(1'b0), .SJLJ_SUPPORT(1'b0)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) if (rst_n) begin
    n_trap    += int'(xc_trap);
    n_recmark += int'(events.rec_mark);
    n_lj      += int'(lj_pending);
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [31:0] q_inst [$], q_pc [$], q_npc [$];
  logic [31:0] npc_pipe [2];

  function automatic void emit(logic [31:0] i, logic [31:0] pc, logic [31:0] npc);
    q_inst.push_back(i); q_pc.push_back(pc); q_npc.push_back(npc);
  endfunction

  // issue everything queued, one per cycle, and let the pipe drain
  task automatic issue_all();
    while (q_inst.size() > 0 || npc_pipe[0] != 0 || npc_pipe[1] != 0) begin
      ex_npc = npc_pipe[1];
      npc_pipe[1] = npc_pipe[0];
      if (q_inst.size() > 0) begin
        de_valid = 1; de_inst = q_inst.pop_front(); de_pc = q_pc.pop_front();
        npc_pipe[0] = q_npc.pop_front();
      end else begin
        de_valid = 0; npc_pipe[0] = 0;
      end
      @(negedge clk);
    end
    de_valid = 0;
    repeat (4) @(negedge clk);
  endtask

  task automatic expect_depth(int d, string what);
    checks++;
    if (int'(stack_index) != d) begin
      failures++;
      $display("FAIL %s: depth %0d, expected %0d", what, stack_index, d);
    end
  endtask

  initial begin
    localparam int N = 5;
    automatic logic [31:0] r = 32'h8000;
    npc_pipe = '{0, 0};
    repeat (2) @(negedge clk);
    rst_n = 1;
    // main calls r from 0x1000; r calls itself N times from r+4
    emit(32'h40000000, 32'h1000, 32'h1004);
    emit(cfi_encode(CFI_SETPC, 0), 32'h1004, r);
    for (int k = 0; k < N; k++) begin
      emit(32'h40000000, r + 4, r + 8);
      emit(cfi_encode(CFI_SETPC, 0), r + 8, r);
    end
    issue_all();
    expect_depth(N + 1, "after recursive calls");
    for (int k = 0; k < N; k++) begin
      emit(32'h81c3e008, r + 32'h100, r + 32'h104);
      emit(cfi_encode(CFI_CHECKPC, 0), r + 32'h104, r + 32'h0c);
    end
    issue_all();
    expect_depth(1, "after inner returns");
    emit(32'h81c3e008, r + 32'h100, r + 32'h104);
    emit(cfi_encode(CFI_CHECKPC, 0), r + 32'h104, 32'h1008);
    issue_all();
    expect_depth(0, "after last return");
    // setjmp, two calls deeper, longjmp: the stack is not resynchronised
    emit(cfi_encode(CFI_SJCFI, 18'd9), 32'h2000, 32'h2004);
    emit(32'h40000000, 32'h2004, 32'h2008);
    emit(cfi_encode(CFI_SETPC, 0), 32'h2008, 32'h3000);
    emit(32'h40000000, 32'h3000, 32'h3004);
    emit(cfi_encode(CFI_SETPC, 0), 32'h3004, 32'h4000);
    emit(32'h40000000, 32'h4000, 32'h4004);
    emit(cfi_encode(CFI_LJCFI, 0), 32'h4004, 32'h5000);
    emit(32'h01000000, 32'h5000, 32'h2000);
    emit(cfi_encode(CFI_SJCFI, 18'd9), 32'h2000, 32'h2004);
    issue_all();
    expect_depth(2, "after longjmp without support");
    checks++;
    if (n_trap != 0 || n_recmark != 0 || n_lj != 0) begin
      failures++;
      $display("FAIL traps=%0d recursion marks=%0d long-jump cycles=%0d", n_trap, n_recmark, n_lj);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

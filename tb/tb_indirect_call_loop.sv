// tb_indirect_call_loop: the worst-case loop for the CFI instrumentation.
// A tight loop makes only indirect calls to a function that returns at
// once: jmpl + SetPCLabel, CheckLabel at the target, retl + CheckPC, then
// the loop branch. Each iteration is 7 instructions, 3 of them CFI
// instructions. The host issues one instruction per cycle with no stalls;
// the test checks that the unit never traps, that every CheckLabel matched
// and every CheckPC popped (events), that the shadow stack is empty and the
// Label Register clear at the end, and that the loop takes exactly
// 7 cycles per iteration plus the 4-cycle pipeline fill: the CFI
// instructions cost no more than the NOPs they stand in for.
module tb_indirect_call_loop;
  import cfix_pkg::*;
  localparam int ITER = 2000;

  logic clk = 0, rst_n = 0;
  logic hold = 0, flush = 0, de_valid = 0, ex_annul = 0;
  logic [31:0] de_inst = 0, de_pc = 0, ex_npc = 0, xc_pc;
  logic xc_trap;
  violation_e xc_cause;
  logic [7:0] stack_index;
  logic stack_empty, stack_full, in_indirect_call, lj_pending;
  logic [31:0] label_reg;
  cfi_events_t events;
  int checks = 0, failures = 0;
  int n_trap = 0, n_lok = 0, n_pop = 0, n_push = 0;
  longint cyc = 0, t_start, t_end;

  cfix_unit dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) begin
    cyc++;
    if (rst_n) begin
      n_trap += int'(xc_trap);
      n_lok  += int'(events.label_ok);
      n_pop  += int'(events.pop);
      n_push += int'(events.push);
    end
  end

  initial begin
    repeat (ITER * 10 + 1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // one iteration: {inst, pc, npc}
  logic [31:0] it_inst [7], it_pc [7], it_npc [7];
  logic [31:0] npc_pipe [3];

  initial begin
    it_inst[0] = 32'h9fc04000;                    it_pc[0] = 32'h2000;  it_npc[0] = 32'h2004;  // jmpl %g1
    it_inst[1] = cfi_encode(CFI_SETPCLABEL, 18'h0c0de); it_pc[1] = 32'h2004; it_npc[1] = 32'h8000;
    it_inst[2] = cfi_encode(CFI_CHECKLABEL, 18'h0c0de); it_pc[2] = 32'h8000; it_npc[2] = 32'h8004;
    it_inst[3] = 32'h81c3e008;                    it_pc[3] = 32'h8004;  it_npc[3] = 32'h8008;  // retl
    it_inst[4] = cfi_encode(CFI_CHECKPC, 18'h0);  it_pc[4] = 32'h8008;  it_npc[4] = 32'h2008;
    it_inst[5] = 32'h10bffffe;                    it_pc[5] = 32'h2008;  it_npc[5] = 32'h200c;  // ba loop
    it_inst[6] = 32'h01000000;                    it_pc[6] = 32'h200c;  it_npc[6] = 32'h2000;  // nop
    npc_pipe = '{0, 0, 0};
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    t_start = cyc;
    for (int n = 0; n < ITER * 7 + 4; n++) begin
      if (n < ITER * 7) begin
        de_valid = 1;
        de_inst  = it_inst[n % 7];
        de_pc    = it_pc[n % 7];
      end else de_valid = 0;
      // ex_npc belongs to the instruction issued two cycles ago
      ex_npc = npc_pipe[1];
      @(negedge clk);
      npc_pipe[1] = npc_pipe[0];
      npc_pipe[0] = (n < ITER * 7) ? it_npc[n % 7] : 32'h0;
    end
    @(negedge clk);
    t_end = cyc;
    checks++;
    if (n_trap != 0) begin failures++; $display("FAIL %0d traps", n_trap); end
    checks++;
    if (n_lok != ITER || n_pop != ITER || n_push != ITER) begin
      failures++;
      $display("FAIL label_ok=%0d pop=%0d push=%0d, expected %0d", n_lok, n_pop, n_push, ITER);
    end
    checks++;
    if (stack_index != 0 || label_reg != 0 || in_indirect_call) begin
      failures++;
      $display("FAIL final state index=%0d label=%h ind=%b", stack_index, label_reg, in_indirect_call);
    end
    checks++;
    if (t_end - t_start != longint'(ITER * 7 + 5)) begin
      failures++;
      $display("FAIL %0d cycles, expected %0d", t_end - t_start, ITER * 7 + 5);
    end
    $display("%0d iterations in %0d cycles, %0d CFI instructions", ITER, t_end - t_start, ITER * 3);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

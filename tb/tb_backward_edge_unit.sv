// tb_backward_edge_unit: self-checking test of return-address checking.
// A small stack (DEPTH 8) is driven with random SetPC, SetPCLabel, CheckPC
// and restore requests. PCs come from a few call sites so that the
// recursion optimisation triggers; CheckPC targets are mostly top+4, some
// next+4 (the entry under a recursive top) and some random. A queue model
// written from the rules of the shadow stack gives the expected violation
// and stack depth each cycle. Counts that Full, Empty, PC Mismatch,
// recursion marking and the second comparison all occurred.
module tb_backward_edge_unit;
  import cfix_pkg::*;
  localparam int unsigned DEPTH = 8;
  localparam int unsigned IW = $clog2(DEPTH + 1);

  logic clk = 0, rst_n = 0;
  logic en, restore;
  cfi_op_e op;
  logic [31:0] pc, npc;
  logic [IW-1:0] restore_idx, index;
  violation_e vio;
  logic empty, full, ev_push, ev_rec_mark, ev_pop, ev_rec_skip;
  int checks = 0, failures = 0;
  int n_full = 0, n_empty = 0, n_mis = 0, n_rec = 0, n_skip = 0, n_ok = 0;

  logic [31:0] md [DEPTH];
  logic        mr [DEPTH];
  int          mi;

  backward_edge_unit #(.DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // expected violation for the request currently applied; updates the model
  function automatic violation_e model_step();
    violation_e e = VIO_NONE;
    if (restore) begin
      mi = int'(restore_idx);
      return VIO_NONE;
    end
    if (!en) return VIO_NONE;
    if (op == CFI_SETPC || op == CFI_SETPCLABEL) begin
      if (mi > 0 && md[mi-1] == pc) begin mr[mi-1] = 1; n_rec++; end
      else if (mi == DEPTH) begin e = VIO_FULL; n_full++; end
      else begin md[mi] = pc; mr[mi] = 0; mi++; end
    end else if (op == CFI_CHECKPC) begin
      if (mi == 0) begin e = VIO_EMPTY; n_empty++; end
      else if (md[mi-1] + 4 == npc) begin
        if (!mr[mi-1]) mi--;
        n_ok++;
      end else if (mr[mi-1] && mi > 1 && md[mi-2] + 4 == npc) begin
        mi--;
        if (!mr[mi-1]) mi--;
        n_skip++;
      end else begin e = VIO_PC_MISMATCH; n_mis++; end
    end
    return e;
  endfunction

  initial begin
    violation_e exp_v;
    int r;
    en = 0; restore = 0; op = CFI_NONE; pc = 0; npc = 0; restore_idx = 0;
    mi = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < 20000; k++) begin
      @(negedge clk);
      en = 1; restore = 0;
      r = $urandom_range(0, 99);
      pc = 32'h4000 + 32'($urandom_range(0, 5)) * 32'h40;
      if (r < 45)      op = (r < 30) ? CFI_SETPC : CFI_SETPCLABEL;
      else if (r < 90) op = CFI_CHECKPC;
      else if (r < 93) begin en = 0; restore = 1; restore_idx = IW'($urandom_range(0, mi)); op = CFI_SJCFI; end
      else             op = CFI_NONE;
      r = $urandom_range(0, 9);
      if (mi > 0 && r < 6)      npc = md[mi-1] + 4;
      else if (mi > 1 && r < 8) npc = md[mi-2] + 4;
      else                      npc = 32'h4000 + 32'($urandom_range(0, 5)) * 32'h40 + 4;
      #1;
      exp_v = model_step();
      checks++;
      if (vio != exp_v) begin
        failures++;
        $display("FAIL k=%0d op=%0d vio=%0d expected %0d", k, op, vio, exp_v);
      end
      @(posedge clk); #1;
      checks++;
      if (index != IW'(mi)) begin
        failures++;
        $display("FAIL k=%0d index=%0d model=%0d", k, index, mi);
      end
    end
    en = 0;
    checks++;
    if (n_full == 0 || n_empty == 0 || n_mis == 0 || n_rec == 0 || n_skip == 0) begin
      failures++;
      $display("FAIL a mechanism never occurred");
    end
    $display("full=%0d empty=%0d mismatch=%0d rec=%0d skip=%0d ok=%0d",
             n_full, n_empty, n_mis, n_rec, n_skip, n_ok);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_sjlj_unit: self-checking test of the setjmp/longjmp unit.
// Directed: SJCFI saves the index under its label; LJCFI followed by other
// instructions and then SJCFI restores that index and leaves the long-jump
// state; the next SJCFI saves again. Then a random stream of SJCFI, LJCFI
// and other instructions with random stack indices is checked against an
// array model of the label memory and the flag.
module tb_sjlj_unit;
  import cfix_pkg::*;
  localparam int unsigned IW = 8;

  logic clk = 0, rst_n = 0;
  logic en;
  cfi_op_e op;
  logic [7:0] sj_label;
  logic [IW-1:0] stack_index, restore_idx;
  logic restore, lj_pending, ev_save;
  int checks = 0, failures = 0, n_save = 0, n_restore = 0;

  logic [IW-1:0] m_mem [128];
  logic          m_flag;

  sjlj_unit dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic step(input cfi_op_e o, input logic [7:0] l, input logic [IW-1:0] si);
    logic          e_restore;
    logic [IW-1:0] e_idx;
    @(negedge clk);
    en = 1; op = o; sj_label = l; stack_index = si;
    #1;
    e_restore = (o == CFI_SJCFI) && m_flag;
    e_idx     = m_mem[l[6:0]];
    checks++;
    if (restore != e_restore || (e_restore && restore_idx != e_idx) ||
        ev_save != ((o == CFI_SJCFI) && !m_flag)) begin
      failures++;
      $display("FAIL op=%0d label=%0d restore=%b/%0d expected %b/%0d", o, l, restore,
               restore_idx, e_restore, e_idx);
    end
    if (o == CFI_LJCFI) m_flag = 1;
    else if (o == CFI_SJCFI) begin
      if (m_flag) begin m_flag = 0; n_restore++; end
      else begin m_mem[l[6:0]] = si; n_save++; end
    end
    @(posedge clk); #1;
    checks++;
    if (lj_pending != m_flag) begin
      failures++;
      $display("FAIL lj_pending=%b model %b", lj_pending, m_flag);
    end
  endtask

  initial begin
    cfi_op_e ops [4] = '{CFI_SJCFI, CFI_LJCFI, CFI_NONE, CFI_SETPC};
    en = 0; op = CFI_NONE; sj_label = 0; stack_index = 0;
    foreach (m_mem[i]) m_mem[i] = 0;
    m_flag = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    step(CFI_SJCFI, 8'd10, 8'd3);     // setjmp at depth 3
    step(CFI_NONE, 0, 8'd7);          // deeper calls
    step(CFI_LJCFI, 0, 8'd7);         // longjmp underway
    step(CFI_NONE, 0, 8'd7);
    step(CFI_NONE, 0, 8'd7);
    step(CFI_SJCFI, 8'd10, 8'd7);     // lands: restore 3
    step(CFI_SJCFI, 8'd10, 8'd5);     // next one saves again
    for (int k = 0; k < 20000; k++)
      step(ops[$urandom_range(0, 3)], 8'($urandom_range(0, 255)), IW'($urandom_range(0, 128)));
    en = 0;
    checks++;
    if (n_save == 0 || n_restore == 0) begin
      failures++;
      $display("FAIL a mechanism never occurred");
    end
    $display("save=%0d restore=%0d", n_save, n_restore);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

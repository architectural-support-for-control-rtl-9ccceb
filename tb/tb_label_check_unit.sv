// tb_label_check_unit: self-checking test of forward-edge checking.
// Runs directed sequences (a good indirect call, a wrong label, a missing
// CheckLabel, a CheckLabel with no SetPCLabel, a direct call into an
// indirect target) and then a long random instruction stream, comparing
// the violation, the Label Register and the indirect-call state with a
// model written from the rules of SetPCLabel / CheckLabel / SetPC.
module tb_label_check_unit;
  import cfix_pkg::*;

  logic clk = 0, rst_n = 0;
  logic en;
  cfi_op_e op;
  logic [LABEL_W-1:0] label;
  violation_e vio;
  logic in_indirect_call, ev_suppressed;
  logic [31:0] label_reg;
  int checks = 0, failures = 0;
  int n_flow = 0, n_mis = 0, n_ok = 0, n_sup = 0;

  // model
  logic [31:0] m_reg;
  logic        m_ind, m_setpc;

  label_check_unit dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic violation_e model_step();
    violation_e e = VIO_NONE;
    if (!en) return e;
    if (m_ind && op != CFI_CHECKLABEL) begin e = VIO_FLOW; n_flow++; end
    else if (op == CFI_CHECKLABEL) begin
      if (m_setpc) n_sup++;
      else if (m_reg == 0 || m_reg != 32'(label)) begin e = VIO_LABEL_MISMATCH; n_mis++; end
      else n_ok++;
    end
    m_setpc = (op == CFI_SETPC);
    m_ind   = (op == CFI_SETPCLABEL);
    if (op == CFI_SETPCLABEL) m_reg = 32'(label);
    else if (op == CFI_CHECKLABEL) m_reg = 0;
    return e;
  endfunction

  task automatic step(input cfi_op_e o, input logic [LABEL_W-1:0] l, input logic e = 1);
    violation_e exp_v;
    @(negedge clk);
    en = e; op = o; label = l;
    #1;
    exp_v = model_step();
    checks++;
    if (vio != exp_v) begin
      failures++;
      $display("FAIL op=%0d label=%h vio=%0d expected %0d", o, l, vio, exp_v);
    end
    @(posedge clk); #1;
    checks++;
    if (label_reg != m_reg || in_indirect_call != m_ind) begin
      failures++;
      $display("FAIL reg=%h/%b model %h/%b", label_reg, in_indirect_call, m_reg, m_ind);
    end
  endtask

  initial begin
    cfi_op_e ops [6] = '{CFI_SETPC, CFI_SETPCLABEL, CFI_CHECKPC, CFI_CHECKLABEL, CFI_NONE, CFI_SJCFI};
    en = 0; op = CFI_NONE; label = 0;
    m_reg = 0; m_ind = 0; m_setpc = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // good indirect call
    step(CFI_SETPCLABEL, 18'h0c0de); step(CFI_CHECKLABEL, 18'h0c0de); step(CFI_NONE, 0);
    // wrong label
    step(CFI_SETPCLABEL, 18'h0c0de); step(CFI_CHECKLABEL, 18'h00bad);
    // target without a CheckLabel
    step(CFI_SETPCLABEL, 18'h00123); step(CFI_NONE, 0);
    // CheckLabel reached without any SetPCLabel
    step(CFI_NONE, 0); step(CFI_CHECKLABEL, 18'h00123);
    // direct call into an indirect target: SetPC excuses the CheckLabel
    step(CFI_SETPC, 0); step(CFI_CHECKLABEL, 18'h00123);
    // a bubble (en low) between the pair does not count as an instruction
    step(CFI_SETPCLABEL, 18'h3ffff); step(CFI_NONE, 0, 0); step(CFI_CHECKLABEL, 18'h3ffff);
    // random stream, few labels so that matches happen
    for (int k = 0; k < 20000; k++)
      step(ops[$urandom_range(0, 5)], 18'($urandom_range(0, 3)), 1'($urandom_range(0, 7) != 0));
    checks++;
    if (n_flow == 0 || n_mis == 0 || n_ok == 0 || n_sup == 0) begin
      failures++;
      $display("FAIL a mechanism never occurred");
    end
    $display("flow=%0d mismatch=%0d ok=%0d suppressed=%0d", n_flow, n_mis, n_ok, n_sup);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_cfi_decoder: self-checking test of the CFI instruction decoder.
// Encodes every CFI instruction with random labels and random rd bits and
// checks the decoded op and labels; then checks that ordinary SPARC words
// (SETHI, call, branches, arithmetic) and the unused sub-opcodes decode as
// CFI_NONE. Expected values come from the field layout, not from the DUT.
module tb_cfi_decoder;
  import cfix_pkg::*;

  logic [31:0]           inst;
  cfi_op_e               op;
  logic [LABEL_W-1:0]    label;
  logic [SJ_LABEL_W-1:0] sj_label;
  int checks = 0, failures = 0;

  cfi_decoder dut (.inst, .op, .label, .sj_label);

  task automatic expect_dec(input logic [31:0] w, input cfi_op_e eop);
    inst = w;
    #1;
    checks++;
    if (op != eop) begin
      failures++;
      $display("FAIL inst=%h op=%0d expected %0d", w, op, eop);
    end
    if (eop != CFI_NONE) begin
      checks++;
      if (label != w[17:0] || sj_label != w[7:0]) begin
        failures++;
        $display("FAIL inst=%h labels %h/%h", w, label, sj_label);
      end
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] w;
    for (int k = 0; k < 200; k++) begin
      for (int s = 1; s <= 6; s++) begin
        w = {2'b00, 5'($urandom), 3'b101, 4'(s), 18'($urandom)};
        expect_dec(w, cfi_op_e'(s));
      end
    end
    // the package helper produces words the decoder accepts
    expect_dec(cfi_encode(CFI_CHECKLABEL, 18'h0c0de), CFI_CHECKLABEL);
    // unused sub-opcodes
    for (int s = 7; s < 16; s++) expect_dec({2'b00, 5'd0, 3'b101, 4'(s), 18'h3}, CFI_NONE);
    expect_dec({2'b00, 5'd0, 3'b101, 4'd0, 18'h3}, CFI_NONE);
    // ordinary instructions
    expect_dec(32'h01000000, CFI_NONE);   // nop (sethi 0,%g0)
    expect_dec(32'h40000040, CFI_NONE);   // call
    expect_dec(32'h81c3e008, CFI_NONE);   // retl
    expect_dec(32'h10800004, CFI_NONE);   // ba
    for (int k = 0; k < 500; k++) begin
      w = $urandom;
      if (w[31:30] == 2'b00 && w[24:22] == 3'b101) w[22] = 1'b0;
      expect_dec(w, CFI_NONE);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

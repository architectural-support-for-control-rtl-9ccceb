// cfi_decoder: recognises the six CFI instructions in a 32-bit word.
//
// Purely combinational; it is the "label stage" beside the host's decode
// stage, where the description places the extraction of the labels.
// An instruction belongs to the extension when bits 31:30 = 00 and
// bits 24:22 = 101 (an op2 value SPARC V8 does not use) and bits 21:18 hold
// a sub-opcode from 1 to 6. SetPCLabel and CheckLabel take their label from
// bits 17:0, SJCFI from bits 7:0, as described. The encoding itself is this
// design's choice (see cfix_pkg). Any other word decodes as CFI_NONE.
//
// Interface: inst in; op, label, sj_label out, in the same cycle.
module cfi_decoder
  import cfix_pkg::*;
(
  input  logic [31:0]           inst,
  output cfi_op_e               op,
  output logic [LABEL_W-1:0]    label,
  output logic [SJ_LABEL_W-1:0] sj_label
);

  logic [3:0] sub;
  logic       in_space;

  always_comb begin
    sub      = inst[21:18];
    in_space = (inst[31:30] == CFI_OP) && (inst[24:22] == CFI_OP2);
    op       = CFI_NONE;
    if (in_space) begin
      unique case (sub)
        4'd1:    op = CFI_SETPC;
        4'd2:    op = CFI_SETPCLABEL;
        4'd3:    op = CFI_CHECKPC;
        4'd4:    op = CFI_CHECKLABEL;
        4'd5:    op = CFI_SJCFI;
        4'd6:    op = CFI_LJCFI;
        default: op = CFI_NONE;
      endcase
    end
    label    = inst[LABEL_W-1:0];
    sj_label = inst[SJ_LABEL_W-1:0];
  end

endmodule

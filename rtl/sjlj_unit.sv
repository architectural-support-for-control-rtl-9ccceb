// sjlj_unit: setjmp/longjmp support for the shadow stack.
//
// A small memory of ENTRIES words (128 x 8 bits in the prototype), indexed by
// the SJCFI label, and a long-jump flag.
//   LJCFI (delay slot of the call to longjmp) sets the flag.
//   SJCFI (the instruction a setjmp call returns to) carries an 8-bit label.
//     Flag clear: store the current shadow-stack index under the label
//       ("save top shadow stack index").
//     Flag set: read the index stored under the label, hand it to the
//       shadow stack as restore/restore_idx, and clear the flag
//       ("shadow stack sync").
// Every other instruction leaves the flag as it is, so any number of
// instructions may run between LJCFI and the SJCFI it lands on.
//
// Acts in the CFI memory stage when en is high: the read is combinational,
// the memory and flag change at the clock edge. The description reads in the
// execute stage and writes in the memory stage; both are done in the memory
// stage here. The label is 8 bits wide but the memory has 128 entries, so
// the low log2(ENTRIES) bits of the label select the entry. Memory words
// are IW bits wide, enough for an index 0..DEPTH (8 bits for 128 entries).
// An SJCFI that restores from a label never saved restores index 0 since
// the memory is cleared at reset.
module sjlj_unit
  import cfix_pkg::*;
#(
  parameter int unsigned ENTRIES = 128,
  parameter int unsigned DEPTH   = 128,   // shadow-stack depth
  localparam int unsigned IW     = $clog2(DEPTH + 1),
  localparam int unsigned EAW    = $clog2(ENTRIES)
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  en,
  input  cfi_op_e               op,
  input  logic [SJ_LABEL_W-1:0] sj_label,
  input  logic [IW-1:0]         stack_index,
  output logic                  restore,
  output logic [IW-1:0]         restore_idx,
  output logic                  lj_pending,   // long jump state
  output logic                  ev_save
);

  logic [IW-1:0]  mem [ENTRIES];
  logic           lj_flag;
  logic [EAW-1:0] a;

  always_comb begin
    a           = EAW'(sj_label);
    restore     = en && op == CFI_SJCFI && lj_flag;
    restore_idx = mem[a];
    ev_save     = en && op == CFI_SJCFI && !lj_flag;
    lj_pending  = lj_flag;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      lj_flag <= 1'b0;
      for (int i = 0; i < int'(ENTRIES); i++) mem[i] <= '0;
    end else if (en) begin
      if (op == CFI_LJCFI) lj_flag <= 1'b1;
      else if (op == CFI_SJCFI) begin
        if (lj_flag) lj_flag <= 1'b0;
        else         mem[a]  <= stack_index;
      end
    end
  end

endmodule

// cfix_pkg: shared types and constants of the CFI extension.
//
// The extension adds six instructions to a SPARC V8 integer pipeline:
// SetPC, SetPCLabel, CheckPC, CheckLabel, SJCFI and LJCFI. SetPCLabel and
// CheckLabel carry an 18-bit label in their low bits, SJCFI an 8-bit label;
// those widths follow the description of the extension. The bit encoding
// below is this design's own choice: it uses the SPARC V8 format-2 space
// (op = 00) with op2 = 101, a value the base ISA leaves unused, so the
// 22-bit immediate field holds a 4-bit sub-opcode in bits 21:18 and the
// label in bits 17:0. Bits 29:25 (rd) are ignored.
package cfix_pkg;

  localparam int unsigned XLEN       = 32;  // SPARC V8 address width
  localparam int unsigned LABEL_W    = 18;  // forward-edge label
  localparam int unsigned SJ_LABEL_W = 8;   // setjmp label

  localparam logic [1:0] CFI_OP  = 2'b00;
  localparam logic [2:0] CFI_OP2 = 3'b101;

  // sub-opcode in instruction bits 21:18
  typedef enum logic [3:0] {
    CFI_NONE       = 4'd0,
    CFI_SETPC      = 4'd1,
    CFI_SETPCLABEL = 4'd2,
    CFI_CHECKPC    = 4'd3,
    CFI_CHECKLABEL = 4'd4,
    CFI_SJCFI      = 4'd5,
    CFI_LJCFI      = 4'd6
  } cfi_op_e;

  // Violation causes. All of them end as one control-flow exception; the
  // cause is kept so that a handler or a debugger can tell them apart.
  typedef enum logic [2:0] {
    VIO_NONE           = 3'd0,
    VIO_LABEL_MISMATCH = 3'd1,  // forward edge: CheckLabel label differs
    VIO_PC_MISMATCH    = 3'd2,  // backward edge: return target differs
    VIO_FLOW           = 3'd3,  // forward edge: no CheckLabel after SetPCLabel
    VIO_EMPTY          = 3'd4,  // backward edge: CheckPC on empty stack
    VIO_FULL           = 3'd5   // push onto a full shadow stack
  } violation_e;

  // One instruction as it travels down the CFI stages.
  typedef struct packed {
    logic                  valid;   // a real (not annulled) instruction
    cfi_op_e               op;      // CFI_NONE for every other instruction
    logic [LABEL_W-1:0]    label;   // SetPCLabel / CheckLabel label
    logic [SJ_LABEL_W-1:0] sj_label;// SJCFI label
    logic [XLEN-1:0]       pc;      // address of the instruction
    logic [XLEN-1:0]       npc;     // next PC, filled in at the PC stage
  } cfi_slot_t;

  // One-cycle event strobes, for performance counters and tests.
  typedef struct packed {
    logic push;        // return address pushed
    logic rec_mark;    // recursion: push replaced by marking the top
    logic pop;         // CheckPC popped one or two entries
    logic rec_skip;    // CheckPC matched the entry below a recursive top
    logic suppressed;  // CheckLabel excused by a preceding SetPC
    logic label_ok;    // CheckLabel matched the Label Register
    logic sj_save;     // SJCFI saved the stack index
    logic sj_restore;  // SJCFI restored the stack index after LJCFI
    logic lj_set;      // LJCFI entered the long-jump state
  } cfi_events_t;

  // Build an instruction word of the extension (used by testbenches and
  // by anyone writing an assembler for it).
  function automatic logic [31:0] cfi_encode(cfi_op_e op, logic [LABEL_W-1:0] label);
    return {CFI_OP, 5'b00000, CFI_OP2, op, label};
  endfunction

endpackage

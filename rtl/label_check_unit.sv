// label_check_unit: forward-edge (indirect call) checking.
//
// Holds the Label Register and the indirect-call state machine:
//   NORMAL --SetPCLabel--> INDIRECT_CALL --CheckLabel--> label verification
// SetPCLabel (in the delay slot of an indirect call) writes its 18-bit label
// into the Label Register and enters INDIRECT_CALL. The next real
// instruction must be a CheckLabel (at the callee's entry); anything else is
// a Flow violation. CheckLabel compares its own label with the register:
// a difference, or a register still zero (never set; no call target is given
// label zero), is a Label Mismatch. The register is cleared after every
// CheckLabel, so one SetPCLabel authorises one call.
// A SetPC immediately before a CheckLabel suppresses the check: a function
// that is an indirect target may also be called directly.
//
// Like the other units it acts in the CFI memory stage, one instruction per
// cycle when en is high: vio is combinational from the instruction and the
// state, the register and state change at the clock edge. The description
// compares in the execute stage and writes the register in the memory
// stage; doing both in the memory stage keeps the pair
// SetPCLabel-then-CheckLabel, which always arrive back to back, free of a
// forwarding path. The register is 32 bits wide as in the prototype and
// holds the zero-extended 18-bit label.
module label_check_unit
  import cfix_pkg::*;
#(
  parameter int unsigned LREG_W = 32
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               en,
  input  cfi_op_e            op,
  input  logic [LABEL_W-1:0] label,
  output violation_e         vio,
  output logic               in_indirect_call,  // SETLABEL state
  output logic [LREG_W-1:0]  label_reg,
  output logic               ev_suppressed      // a SetPC excused a CheckLabel
);

  typedef enum logic {NORMAL, INDIRECT_CALL} fe_state_e;

  fe_state_e         state;
  logic              setpc_last;
  logic [LREG_W-1:0] lreg;
  logic              match;

  always_comb begin
    match         = (lreg != '0) && (lreg == LREG_W'(label));
    vio           = VIO_NONE;
    ev_suppressed = 1'b0;
    if (en) begin
      if (state == INDIRECT_CALL && op != CFI_CHECKLABEL) vio = VIO_FLOW;
      else if (op == CFI_CHECKLABEL) begin
        if (setpc_last)  ev_suppressed = 1'b1;
        else if (!match) vio = VIO_LABEL_MISMATCH;
      end
    end
    in_indirect_call = (state == INDIRECT_CALL);
    label_reg        = lreg;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= NORMAL;
      setpc_last <= 1'b0;
      lreg       <= '0;
    end else if (en) begin
      setpc_last <= (op == CFI_SETPC);
      state      <= (op == CFI_SETPCLABEL) ? INDIRECT_CALL : NORMAL;
      if (op == CFI_SETPCLABEL)      lreg <= LREG_W'(label);
      else if (op == CFI_CHECKLABEL) lreg <= '0;
    end
  end

endmodule

// backward_edge_unit: return-address checking on the shadow stack.
//
// Acts in the CFI memory stage on one instruction per cycle (en = the
// instruction in that stage is real and the stage advances):
//   SetPC / SetPCLabel  push the instruction's own PC. With the recursion
//       optimisation the top is compared with that PC first; if equal, the
//       PC is not pushed again and the top entry is marked recursive.
//       A push onto a full stack raises Full and leaves the stack alone.
//   CheckPC  compares top+4 (the instruction after the SetPC, i.e. after
//       the call's delay slot) with the instruction's nPC, which is the
//       return target because CheckPC sits in the return's delay slot.
//       Match: pop, unless the top is recursive. Mismatch on a recursive
//       top: discard it and compare the next entry; on a match pop that one
//       too unless it is recursive as well. Otherwise PC Mismatch; an empty
//       stack gives Empty. A violating CheckPC changes nothing.
//   restore  (from the setjmp unit) sets the stack index.
// The comparison is combinational and the stack changes at the clock edge,
// so the violation cause is valid in the same cycle as en and goes to the
// exception stage register of the caller.
// RECURSION_OPT = 0 gives the smaller first configuration of the design,
// without the recursion optimisation: every call is pushed and the bitmap
// stays clear (synthesis then removes it).
//
// The description tops the stack in the register-access stage, compares in
// the execute stage and makes the second (recursive) comparison in the
// memory stage. Here the reads, both comparisons and the update all happen
// in the memory stage: the stack then changes strictly in program order and
// back-to-back CFI instructions (a SetPC followed closely by a CheckPC in a
// leaf function) need no forwarding. The exception still reaches the
// exception stage with its instruction, so the host sees the same timing.
module backward_edge_unit
  import cfix_pkg::*;
#(
  parameter int unsigned DEPTH = 128,
  parameter bit RECURSION_OPT  = 1'b1,  // 0: push every call, no bitmap use
  localparam int unsigned IW   = $clog2(DEPTH + 1)
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            en,
  input  cfi_op_e         op,
  input  logic [XLEN-1:0] pc,
  input  logic [XLEN-1:0] npc,
  input  logic            restore,
  input  logic [IW-1:0]   restore_idx,
  output violation_e      vio,
  output logic [IW-1:0]   index,
  output logic            empty,
  output logic            full,
  // event strobes, for performance counting and tests
  output logic            ev_push,
  output logic            ev_rec_mark,
  output logic            ev_pop,
  output logic            ev_rec_skip
);

  logic            push, mark_rec, pop, pop2;
  logic [XLEN-1:0] top, next;
  logic            top_rec, next_rec;
  logic            top_hit, next_hit;

  shadow_stack #(.DEPTH(DEPTH), .WIDTH(XLEN)) u_stack (
    .clk, .rst_n,
    .push, .wdata(pc), .mark_rec, .pop, .pop2,
    .load(restore), .load_idx(restore_idx),
    .top, .top_rec, .next, .next_rec,
    .index, .empty, .full
  );

  always_comb begin
    push     = 1'b0;
    mark_rec = 1'b0;
    pop      = 1'b0;
    pop2     = 1'b0;
    vio      = VIO_NONE;
    top_hit  = (top + XLEN'(4)) == npc;
    next_hit = (next + XLEN'(4)) == npc && (index > IW'(1));
    if (en) begin
      unique case (op)
        CFI_SETPC, CFI_SETPCLABEL: begin
          if (RECURSION_OPT && !empty && top == pc) mark_rec = 1'b1;
          else if (full)           vio      = VIO_FULL;
          else                     push     = 1'b1;
        end
        CFI_CHECKPC: begin
          if (empty)                   vio  = VIO_EMPTY;
          else if (top_hit)            pop  = !top_rec;
          else if (top_rec && next_hit) begin
            if (next_rec) pop  = 1'b1;
            else          pop2 = 1'b1;
          end
          else                         vio  = VIO_PC_MISMATCH;
        end
        default: ;
      endcase
    end
    ev_push     = push;
    ev_rec_mark = mark_rec;
    ev_pop      = pop || pop2;
    ev_rec_skip = en && op == CFI_CHECKPC && !empty && !top_hit && top_rec && next_hit;
  end

  // a restore comes only from an SJCFI, which never touches the stack
  // otherwise, so it cannot collide with a push or pop
  a_no_collision: assert property (@(posedge clk) disable iff (!rst_n)
    restore |-> !(push || mark_rec || pop || pop2));

endmodule

// cfix_unit: control-flow integrity unit for a 7-stage SPARC V8 pipeline.
//
// The unit is a separate pipeline that runs in step with the host integer
// unit (fetch, decode, register access, execute, memory, exception,
// write-back), so that the host's critical path is not touched. The host
// hands it each instruction as it leaves decode, the nPC of the
// instruction in execute, its stall and flush signals, and takes back one
// control-flow exception per instruction in the exception stage.
//
//   DE  label stage: cfi_decoder recognises SetPC, SetPCLabel, CheckPC,
//       CheckLabel, SJCFI, LJCFI and extracts the 18- or 8-bit label
//   RA  carried along
//   EX  PC stage: the instruction's nPC (the return target when the
//       instruction sits in a return's delay slot) is captured
//   ME  CFI memory stage: label_check_unit (Label Register, indirect-call
//       state), backward_edge_unit (shadow stack with recursion bitmap) and
//       sjlj_unit (setjmp label memory, long-jump flag) act on the
//       instruction in program order
//   XC  CFI exception stage: a registered violation is raised as xc_trap
//       with its cause and PC, while the instruction is in the host's
//       exception stage; the host turns it into an illegal-instruction trap
//
// Timing: an instruction presented on de_* in cycle t (with hold low) is
// in XC, and its trap visible, in cycle t+4. ex_npc must carry, in each
// cycle, the nPC of the instruction presented two cycles earlier (the one
// in EX), and ex_annul marks that instruction annulled (an annulled delay
// slot), so that it neither acts nor counts as the "next instruction" after
// a SetPC or SetPCLabel. hold freezes every stage. flush (the host traps in its exception
// stage) annuls every younger instruction: the ones in DE, RA and EX are
// dropped and the one in ME changes no CFI state. A CFI trap in XC does the
// same by itself, so nothing behind a violating instruction takes effect.
//
// Follows the description: the six instructions and their semantics, the
// stage names, the sizes (128 x 32 stack, 128-bit recursion bitmap, 32-bit
// Label Register, 128 x 8 setjmp memory) and the five violations. This
// design's own choices: the instruction encoding (cfix_pkg); the host
// handshake (de_valid, ex_annul, hold, flush); all memory
// element reads, comparisons and writes are made in ME instead of being
// spread over RA, EX and ME, which removes the need for forwarding between
// back-to-back CFI instructions; an instruction that raises a violation
// changes no shadow stack or setjmp state; when one instruction has two
// causes, Flow wins, then the instruction's own check.
//
// RECURSION_OPT and SJLJ_SUPPORT (both on by default, the main
// configuration) switch off the recursion optimisation and the
// setjmp/longjmp support, which gives the smaller first configuration the
// design was also built in; SJCFI and LJCFI are then no-operations.
module cfix_unit
  import cfix_pkg::*;
#(
  parameter int unsigned STACK_DEPTH = 128,
  parameter int unsigned SJ_ENTRIES  = 128,
  parameter int unsigned LREG_W      = 32,
  parameter bit          RECURSION_OPT = 1'b1,
  parameter bit          SJLJ_SUPPORT  = 1'b1,
  localparam int unsigned IW         = $clog2(STACK_DEPTH + 1)
) (
  input  logic            clk,
  input  logic            rst_n,
  // from the host pipeline
  input  logic            hold,        // pipeline stalled
  input  logic            flush,       // host trap: annul instructions in DE..ME
  input  logic            de_valid,    // instruction leaving decode, not annulled
  input  logic [31:0]     de_inst,
  input  logic [XLEN-1:0] de_pc,
  input  logic [XLEN-1:0] ex_npc,      // nPC of the instruction in execute
  input  logic            ex_annul,    // the instruction in execute is annulled
  // to the host pipeline (exception stage)
  output logic            xc_trap,
  output violation_e      xc_cause,
  output logic [XLEN-1:0] xc_pc,
  // status
  output logic [IW-1:0]   stack_index,
  output logic            stack_empty,
  output logic            stack_full,
  output logic            in_indirect_call,
  output logic            lj_pending,
  output logic [LREG_W-1:0] label_reg,
  output cfi_events_t     events
);

  cfi_slot_t de_s, ra_q, ex_q, me_q;
  cfi_op_e   de_op;
  logic [LABEL_W-1:0]    de_label;
  logic [SJ_LABEL_W-1:0] de_sj_label;

  // ---------------- DE: label stage ----------------
  cfi_decoder u_dec (
    .inst(de_inst), .op(de_op), .label(de_label), .sj_label(de_sj_label)
  );

  always_comb begin
    de_s          = '0;
    de_s.valid    = de_valid;
    de_s.op       = de_valid ? de_op : CFI_NONE;
    de_s.label    = de_label;
    de_s.sj_label = de_sj_label;
    de_s.pc       = de_pc;
  end

  // ---------------- RA, EX (PC stage), ME registers ----------------
  logic kill;
  assign kill = flush || xc_trap;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ra_q <= '0;
      ex_q <= '0;
      me_q <= '0;
    end else if (!hold) begin
      if (kill) begin
        ra_q <= '0;
        ex_q <= '0;
        me_q <= '0;
      end else begin
        ra_q     <= de_s;
        ex_q     <= ra_q;
        me_q       <= ex_q;
        me_q.valid <= ex_q.valid && !ex_annul;
        me_q.npc   <= ex_npc;
      end
    end
  end

  // ---------------- ME: CFI memory stage ----------------
  logic       me_en, st_en;
  violation_e fe_vio, be_vio, me_vio;
  logic       restore;
  logic [IW-1:0] restore_idx;
  logic       ev_push, ev_rec_mark, ev_pop, ev_rec_skip, ev_suppressed, ev_sj_save;

  assign me_en = me_q.valid && !hold && !kill;

  label_check_unit #(.LREG_W(LREG_W)) u_fe (
    .clk, .rst_n,
    .en(me_en), .op(me_q.op), .label(me_q.label),
    .vio(fe_vio), .in_indirect_call, .label_reg,
    .ev_suppressed
  );

  // a Flow violation stops the instruction from touching the stack
  assign st_en = me_en && (fe_vio == VIO_NONE);

  if (SJLJ_SUPPORT) begin : g_sjlj
    sjlj_unit #(.ENTRIES(SJ_ENTRIES), .DEPTH(STACK_DEPTH)) u_sj (
      .clk, .rst_n,
      .en(st_en), .op(me_q.op), .sj_label(me_q.sj_label),
      .stack_index, .restore, .restore_idx, .lj_pending,
      .ev_save(ev_sj_save)
    );
  end else begin : g_no_sjlj
    // SJCFI and LJCFI execute as no-operations
    assign restore     = 1'b0;
    assign restore_idx = '0;
    assign lj_pending  = 1'b0;
    assign ev_sj_save  = 1'b0;
  end

  backward_edge_unit #(.DEPTH(STACK_DEPTH), .RECURSION_OPT(RECURSION_OPT)) u_be (
    .clk, .rst_n,
    .en(st_en), .op(me_q.op), .pc(me_q.pc), .npc(me_q.npc),
    .restore, .restore_idx,
    .vio(be_vio), .index(stack_index), .empty(stack_empty), .full(stack_full),
    .ev_push, .ev_rec_mark, .ev_pop, .ev_rec_skip
  );

  assign me_vio = (fe_vio != VIO_NONE) ? fe_vio : be_vio;

  always_comb begin
    events            = '0;
    events.push       = ev_push;
    events.rec_mark   = ev_rec_mark;
    events.pop        = ev_pop;
    events.rec_skip   = ev_rec_skip;
    events.suppressed = ev_suppressed;
    events.label_ok   = me_en && me_q.op == CFI_CHECKLABEL && fe_vio == VIO_NONE
                        && !ev_suppressed;
    events.sj_save    = ev_sj_save;
    events.sj_restore = restore;
    events.lj_set     = SJLJ_SUPPORT && st_en && me_q.op == CFI_LJCFI;
  end

  // ---------------- XC: CFI exception stage ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      xc_trap  <= 1'b0;
      xc_cause <= VIO_NONE;
      xc_pc    <= '0;
    end else if (!hold) begin
      xc_trap  <= me_en && (me_vio != VIO_NONE);
      xc_cause <= me_en ? me_vio : VIO_NONE;
      xc_pc    <= me_q.pc;
    end
  end

endmodule

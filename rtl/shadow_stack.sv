// shadow_stack: on-core return-address stack with a recursion bitmap.
//
// DEPTH words of WIDTH bits (128 x 32 in the described prototype) plus one
// recursion bit per entry, "a bitmap of 128 bits" parallel to the stack.
// Neither is memory mapped: only the CFI unit reaches them through the ports
// below. The index register counts the valid entries (0 = empty,
// DEPTH = full), so it is one bit wider than an address.
//
// Reads are combinational (the top two entries and their recursion bits are
// always presented); every change is taken at the rising clock edge, so an
// access costs one cycle, as described. At most one command per cycle:
//   push      write wdata above the top, clear its recursion bit, index+1
//   mark_rec  set the recursion bit of the top entry
//   pop       index-1;  pop2  index-2  (CheckPC after a recursive entry)
//   load      index := load_idx (SJCFI after LJCFI)
// A push when full and a pop when empty are ignored here; the caller reports
// the Full and Empty violations. Reset empties the stack and clears the
// bitmap; the data words are not reset since nothing reads a word that was
// not pushed first.
module shadow_stack #(
  parameter int unsigned DEPTH = 128,
  parameter int unsigned WIDTH = 32,
  localparam int unsigned IW   = $clog2(DEPTH + 1),
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             push,
  input  logic [WIDTH-1:0] wdata,
  input  logic             mark_rec,
  input  logic             pop,
  input  logic             pop2,
  input  logic             load,
  input  logic [IW-1:0]    load_idx,
  output logic [WIDTH-1:0] top,
  output logic             top_rec,
  output logic [WIDTH-1:0] next,
  output logic             next_rec,
  output logic [IW-1:0]    index,
  output logic             empty,
  output logic             full
);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [DEPTH-1:0] rec;
  logic [IW-1:0]    idx;
  logic [AW-1:0]    a_top, a_next, a_push;

  always_comb begin
    // addresses wrap only when the entry does not exist; the outputs are
    // then meaningless and the caller looks at empty / index first
    a_push = AW'(idx);
    a_top  = AW'(idx - IW'(1));
    a_next = AW'(idx - IW'(2));
    empty  = (idx == '0);
    full   = (idx == IW'(DEPTH));
    index  = idx;
    top      = mem[a_top];
    top_rec  = rec[a_top] && !empty;
    next     = mem[a_next];
    next_rec = rec[a_next] && (idx > IW'(1));
  end

  always_ff @(posedge clk) begin
    if (push && !full) mem[a_push] <= wdata;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      idx <= '0;
      rec <= '0;
    end else if (push) begin
      if (!full) begin
        rec[a_push] <= 1'b0;
        idx         <= idx + IW'(1);
      end
    end else if (mark_rec) begin
      if (!empty) rec[a_top] <= 1'b1;
    end else if (pop) begin
      if (!empty) idx <= idx - IW'(1);
    end else if (pop2) begin
      if (idx > IW'(1)) idx <= idx - IW'(2);
    end else if (load) begin
      if (load_idx <= IW'(DEPTH)) idx <= load_idx;
    end
  end

  // one command per cycle
  a_one_cmd: assert property (@(posedge clk) disable iff (!rst_n)
    $onehot0({push, mark_rec, pop, pop2, load}));

endmodule

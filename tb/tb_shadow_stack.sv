// tb_shadow_stack: self-checking test of the shadow stack.
// Drives random push / mark_rec / pop / pop2 / load commands at a small
// depth and compares top, next, their recursion bits, index, empty and full
// with a queue-based model after every cycle. Fills the stack to check that
// a push when full is ignored and that an access costs one cycle.
module tb_shadow_stack;
  localparam int unsigned DEPTH = 8;
  localparam int unsigned IW = $clog2(DEPTH + 1);

  logic clk = 0, rst_n = 0;
  logic push, mark_rec, pop, pop2, load;
  logic [31:0] wdata, top, next;
  logic [IW-1:0] load_idx, index;
  logic top_rec, next_rec, empty, full;
  int checks = 0, failures = 0;

  logic [31:0] m_data [DEPTH];
  logic        m_rec  [DEPTH];
  int          m_idx;

  shadow_stack #(.DEPTH(DEPTH), .WIDTH(32)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_state;
    checks++;
    if (index != IW'(m_idx) || empty != (m_idx == 0) || full != (m_idx == DEPTH)) begin
      failures++;
      $display("FAIL index=%0d model=%0d empty=%b full=%b", index, m_idx, empty, full);
    end
    if (m_idx > 0) begin
      checks++;
      if (top != m_data[m_idx-1] || top_rec != m_rec[m_idx-1]) begin
        failures++;
        $display("FAIL top=%h/%b model %h/%b", top, top_rec, m_data[m_idx-1], m_rec[m_idx-1]);
      end
    end
    if (m_idx > 1) begin
      checks++;
      if (next != m_data[m_idx-2] || next_rec != m_rec[m_idx-2]) begin
        failures++;
        $display("FAIL next=%h/%b model %h/%b", next, next_rec, m_data[m_idx-2], m_rec[m_idx-2]);
      end
    end
  endtask

  task automatic idle;
    {push, mark_rec, pop, pop2, load} = '0;
  endtask

  initial begin
    int c;
    idle();
    wdata = 0; load_idx = 0;
    m_idx = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    check_state();
    // fill: every push visible one cycle later
    for (int i = 0; i < DEPTH + 2; i++) begin
      idle(); push = 1; wdata = 32'h1000 + 32'(i) * 8;
      @(negedge clk);
      if (m_idx < DEPTH) begin m_data[m_idx] = wdata; m_rec[m_idx] = 0; m_idx++; end
      check_state();
    end
    // random commands
    for (int k = 0; k < 3000; k++) begin
      idle();
      c = $urandom_range(0, 9);
      case (c)
        0, 1, 2: begin push = 1; wdata = $urandom; end
        3:       mark_rec = 1;
        4, 5:    pop = 1;
        6:       pop2 = 1;
        7:       begin load = 1; load_idx = IW'($urandom_range(0, DEPTH)); end
        default: ;
      endcase
      @(negedge clk);
      if (push && m_idx < DEPTH) begin m_data[m_idx] = wdata; m_rec[m_idx] = 0; m_idx++; end
      else if (mark_rec && m_idx > 0) m_rec[m_idx-1] = 1;
      else if (pop && m_idx > 0) m_idx--;
      else if (pop2 && m_idx > 1) m_idx -= 2;
      else if (load) m_idx = int'(load_idx);
      check_state();
    end
    idle();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

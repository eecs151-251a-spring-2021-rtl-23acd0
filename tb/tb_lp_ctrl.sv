// tb_lp_ctrl: self-checking testbench of the one-hot list-processor controller.
// A reference state machine written from the state table (START, COMPUTE_SUM,
// GET_NEXT, DONE and their per-state control values) runs beside the DUT
// under random start/next_zero stimulus; every control output and DONE is
// compared each cycle, and each state and transition is counted.
module tb_lp_ctrl;
  import lp_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic    start = 1'b1, next_zero = 1'b0, done;
  lp_ctl_t ctl;
  int checks = 0, failures = 0;
  int visits [4];

  lp_ctrl dut (.clk, .start, .next_zero, .ctl, .done);

  typedef enum {M_START, M_COMP, M_GET, M_DONE} mstate_e;
  mstate_e m;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic compare();
    // {ld_sum, sum_sel, ld_next, next_sel, a_sel, add_sel, done}
    logic [6:0] exp, got;
    unique case (m)
      M_START: exp = 7'b1010000;
      M_COMP:  exp = 7'b1100110;
      M_GET:   exp = 7'b0011000;
      M_DONE:  exp = 7'b0000001;
    endcase
    got = {ctl.ld_sum, ctl.sum_sel, ctl.ld_next, ctl.next_sel, ctl.a_sel, ctl.add_sel, done};
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL: state %s outputs %b expected %b", m.name(), got, exp);
    end
  endtask

  initial begin
    @(posedge clk); #1;
    m = M_START;
    for (int i = 0; i < 3000; i++) begin
      compare();
      visits[m]++;
      start     = 1'($urandom % 20 == 0);
      next_zero = 1'($urandom % 4 == 0);
      @(posedge clk);
      if (start) m = M_START;
      else unique case (m)
        M_START: m = M_COMP;
        M_COMP:  m = M_GET;
        M_GET:   m = next_zero ? M_DONE : M_COMP;
        M_DONE:  m = M_DONE;
      endcase
      #1;
    end
    for (int s = 0; s < 4; s++) begin
      checks++;
      if (visits[s] == 0) begin failures++; $display("FAIL: state %0d never visited", s); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// list_proc2: linked-list summer, Architecture #2 (NUMA register).
//
// Same problem as list_proc1 (sum of the values of a linked list at address
// 0, node = {pointer at p, value at p+1}, pointer 0 ends the list). The +1 is
// moved out of the cycle that does the 15-bit add: a register NUMA holds the
// address of the next value to add, so the long path memory -> adder no longer
// sits behind an address adder. Under the lp_ctrl controller:
//
//   START:    NEXT <- 0, SUM <- 0, NUMA <- 1
//   loop:     SUM  <- SUM + Memory[NUMA];                       (COMP_SUM)
//             NUMA <- Memory[NEXT] + 1, NEXT <- Memory[NEXT];   (GET_NEXT)
//   until the loaded pointer is 0.
//
// NUMA is loaded together with NEXT (LD_NEXT) through a mux on NEXT_SEL
// (memory data + 1, or the constant 1). The address mux picks NEXT (A_SEL=0)
// or NUMA (A_SEL=1). Widths, sign extension and timing as list_proc1: two
// cycles per node, done 2n+1 edges after start falls, no reset.
// The controller's ADD_SEL output is left unused here: only Architecture #3
// shares its adder.
//
// Interface: clk, start; mem_a/mem_d to an asynchronous-read memory; done, r.
module list_proc2
  import lp_pkg::*;
#(
  parameter int unsigned DW    = 8,
  parameter int unsigned AW    = 8,
  parameter int unsigned SUM_W = 15
) (
  input  logic             clk,
  input  logic             start,
  output logic [AW-1:0]    mem_a,
  input  logic [DW-1:0]    mem_d,
  output logic             done,
  output logic [SUM_W-1:0] r
);

  lp_ctl_t          ctl;
  logic             next_zero;
  logic [AW-1:0]    next_q, next_d, numa_q, numa_d, d_inc;
  logic [SUM_W-1:0] sum_q, sum_d, sum_add;

  lp_ctrl u_ctrl (.clk, .start, .next_zero, .ctl, .done);

  // NEXT: pointer to the current node.
  assign next_d    = ctl.next_sel ? AW'(mem_d) : '0;
  assign next_zero = (next_d == '0);
  ce_reg #(.W(AW)) u_next (.clk, .ce(ctl.ld_next), .d(next_d), .q(next_q));

  // NUMA: address of the value of the current node (8-bit adder on the data).
  assign d_inc  = AW'(mem_d) + AW'(1);
  assign numa_d = ctl.next_sel ? d_inc : AW'(1);
  ce_reg #(.W(AW)) u_numa (.clk, .ce(ctl.ld_next), .d(numa_d), .q(numa_q));

  assign mem_a = ctl.a_sel ? numa_q : next_q;

  // SUM: running total (sign-extended memory value).
  assign sum_add = sum_q + SUM_W'($signed(mem_d));
  assign sum_d   = ctl.sum_sel ? sum_add : '0;
  ce_reg #(.W(SUM_W)) u_sum (.clk, .ce(ctl.ld_sum), .d(sum_d), .q(sum_q));

  assign r = sum_q;

endmodule

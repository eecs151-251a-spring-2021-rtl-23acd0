// list_proc3: linked-list summer, Architecture #3 (one shared adder).
//
// Architecture #2 performs only one addition per cycle (the sum in COMP_SUM,
// the +1 in GET_NEXT), so here both share a single SUM_W-bit adder. One adder
// input is always the memory data (sign-extended); the other comes from a mux
// on ADD_SEL: SUM when adding a value, the constant 1 when forming NUMA.
//
//   START:    NEXT <- 0, SUM <- 0, NUMA <- 1
//   loop:     SUM  <- SUM + Memory[NUMA];                       (COMP_SUM, ADD_SEL=1)
//             NUMA <- Memory[NEXT] + 1, NEXT <- Memory[NEXT];   (GET_NEXT, ADD_SEL=0)
//   until the loaded pointer is 0.
//
// NUMA takes the low AW bits of the adder result. The controller is lp_ctrl,
// whose ADD_SEL output equals its COMP_SUM state (this design's choice of
// encoding; the architecture only names the control). Performance and timing
// are those of list_proc2: two cycles per node, done 2n+1 edges after start
// falls, no reset.
//
// Interface: clk, start; mem_a/mem_d to an asynchronous-read memory; done, r.
module list_proc3
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
  logic [AW-1:0]    next_q, next_d, numa_q, numa_d;
  logic [SUM_W-1:0] sum_q, sum_d, add_a, add_y;

  lp_ctrl u_ctrl (.clk, .start, .next_zero, .ctl, .done);

  // The one adder.
  assign add_a = ctl.add_sel ? sum_q : SUM_W'(1);
  assign add_y = add_a + SUM_W'($signed(mem_d));

  // NEXT: pointer to the current node.
  assign next_d    = ctl.next_sel ? AW'(mem_d) : '0;
  assign next_zero = (next_d == '0);
  ce_reg #(.W(AW)) u_next (.clk, .ce(ctl.ld_next), .d(next_d), .q(next_q));

  // NUMA: address of the value of the current node.
  assign numa_d = ctl.next_sel ? add_y[AW-1:0] : AW'(1);
  ce_reg #(.W(AW)) u_numa (.clk, .ce(ctl.ld_next), .d(numa_d), .q(numa_q));

  assign mem_a = ctl.a_sel ? numa_q : next_q;

  // SUM: running total.
  assign sum_d = ctl.sum_sel ? add_y : '0;
  ce_reg #(.W(SUM_W)) u_sum (.clk, .ce(ctl.ld_sum), .d(sum_d), .q(sum_q));

  assign r = sum_q;

endmodule

// list_proc1: linked-list summer, Architecture #1 (direct implementation).
//
// Sums the two's-complement values of a linked list that starts at memory
// address 0. A node is two consecutive bytes: the pointer to the next node at
// address p and the value at p+1; a pointer of 0 ends the list (at least one
// node). The datapath executes, under the one-hot controller lp_ctrl:
//
//   START:    NEXT <- 0, SUM <- 0
//   loop:     SUM  <- SUM + Memory[NEXT+1];      (COMP_SUM, address NEXT+1)
//             NEXT <- Memory[NEXT];              (GET_NEXT, address NEXT)
//   until the loaded pointer is 0, then DONE=1 with the sum on r.
//
// Registers NEXT and SUM are clock-enable registers; NEXT_ZERO is taken from
// the NEXT mux output, so the loop ends in the GET_NEXT cycle that loads the 0
// pointer. The +1 for the value address has its own adder, the sum its own
// adder. SUM is SUM_W=15 bits (wide enough for 128 nodes of 8-bit values);
// memory values are sign-extended. r is the SUM register itself.
// The controller's ADD_SEL output is left unused here: only Architecture #3
// shares its adder.
//
// Interface: clk, start; mem_a/mem_d to an asynchronous-read memory; done, r.
// Timing: two cycles per node; with start dropped after a clock edge, done
// rises 2n+1 edges later for an n-node list and holds until the next start.
// There is no reset: start initialises everything.
module list_proc1
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
  logic [AW-1:0]    next_q, next_d, next_inc;
  logic [SUM_W-1:0] sum_q, sum_d, sum_add;

  lp_ctrl u_ctrl (.clk, .start, .next_zero, .ctl, .done);

  // NEXT: pointer to the current node.
  assign next_d    = ctl.next_sel ? AW'(mem_d) : '0;
  assign next_zero = (next_d == '0);
  ce_reg #(.W(AW)) u_next (.clk, .ce(ctl.ld_next), .d(next_d), .q(next_q));

  // Address of the value byte: NEXT + 1 (8-bit adder).
  assign next_inc = next_q + AW'(1);
  assign mem_a    = ctl.a_sel ? next_inc : next_q;

  // SUM: running total (sign-extended memory value).
  assign sum_add = sum_q + SUM_W'($signed(mem_d));
  assign sum_d   = ctl.sum_sel ? sum_add : '0;
  ce_reg #(.W(SUM_W)) u_sum (.clk, .ce(ctl.ld_sum), .d(sum_d), .q(sum_q));

  assign r = sum_q;

endmodule

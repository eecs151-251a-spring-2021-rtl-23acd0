// lp_ctrl: one-hot controller of the list processor, Architectures #1-#3.
//
// Four states, one flip-flop each: START, COMP_SUM, GET_NEXT, DONE. START
// clears NEXT and SUM (and sets NUMA to 1 in the later architectures);
// COMP_SUM adds the value of the current node to SUM; GET_NEXT loads the
// pointer of the current node into NEXT and leaves the loop when that pointer
// is 0. Two cycles per list node.
//
//   START    --start=0-->               COMP_SUM
//   COMP_SUM --start=0-->               GET_NEXT
//   GET_NEXT --start=0 & next_zero=0--> COMP_SUM
//   GET_NEXT --next_zero=1-->           DONE
//   any      --start=1-->               START
//
// The state outputs and the output equations (LD_SUM = START|COMP_SUM,
// SUM_SEL = A_SEL = COMP_SUM, LD_NEXT = START|GET_NEXT, NEXT_SEL = GET_NEXT)
// follow the list-processor controller. Two choices are this design's own:
// DONE is held until the next START (the state diagram gives DONE no other
// exit), and ADD_SEL, used only by Architecture #3, equals COMP_SUM. START has
// priority everywhere, so one cycle of start=1 also brings the flip-flops
// into a legal one-hot state: there is no reset, as in the component library.
//
// Interface: clk, start, next_zero (NEXT mux output == 0) in; ctl (control
// points, see lp_pkg) and done out. All outputs are decoded from the state
// flip-flops only (Moore), so they are valid shortly after each clock edge.
module lp_ctrl
  import lp_pkg::*;
(
  input  logic    clk,
  input  logic    start,
  input  logic    next_zero,
  output lp_ctl_t ctl,
  output logic    done
);

  logic [3:0] st, st_n;

  always_comb begin
    st_n             = '0;
    st_n[S_START]    = start;
    st_n[S_COMP_SUM] = !start && (st[S_START] || (st[S_GET_NEXT] && !next_zero));
    st_n[S_GET_NEXT] = !start && st[S_COMP_SUM];
    st_n[S_DONE]     = !start && ((st[S_GET_NEXT] && next_zero) || st[S_DONE]);
  end

  always_ff @(posedge clk) st <= st_n;

  always_comb begin
    ctl.ld_sum   = st[S_START] | st[S_COMP_SUM];
    ctl.sum_sel  = st[S_COMP_SUM];
    ctl.ld_next  = st[S_START] | st[S_GET_NEXT];
    ctl.next_sel = st[S_GET_NEXT];
    ctl.a_sel    = st[S_COMP_SUM];
    ctl.add_sel  = st[S_COMP_SUM];
  end

  assign done = st[S_DONE];

  // A cycle with start=1 brings the controller into START, and a legal
  // one-hot state only ever moves to another one.
  a_start_forces_start: assert property (@(posedge clk) start |=> st == 4'b0001);
  a_onehot_kept: assert property (@(posedge clk) $onehot(st) |=> $onehot(st));

endmodule

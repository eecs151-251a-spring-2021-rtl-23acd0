// list_proc4: linked-list summer, Architecture #4 (pipelined, modulo scheduled).
//
// Same problem as list_proc1..3, but the fetch of a value and its addition are
// split into different cycles by an X register, so no cycle contains both a
// memory access and an addition that depend on each other. The loop body is
//
//   1. X    <- Memory[NUMA], NUMA <- NEXT + 1;
//   2. NEXT <- Memory[NEXT], SUM  <- SUM + X;
//
// and the work of three list nodes overlaps: while the value of node i is
// added, NUMA already holds the value address of node i+1 and the memory
// reads node i+1's pointer field, the address of node i+2. One adder serves both additions through ADD_SEL1 (SUM or
// constant 1) and ADD_SEL2 (X or NEXT). The clock period is bounded by
// max(memory, adder) instead of their sum, at two cycles per node.
//
// Control (this design's own sequence; the loop pair and the initial values
// x=0, numa=1, sum=0, next=Memory[0] are the architecture's):
//   INIT     SUM <- 0, X <- 0, NEXT <- 0, NUMA <- 1      (held while start=1)
//   FIRST    NEXT <- Memory[NEXT]                        (pointer of node 1)
//   FETCH_X  loop step 1; if NEXT == 0 the value just fetched is the last one
//   ADD_SUM  loop step 2, back to FETCH_X
//   LAST_SUM SUM <- SUM + X
//   DONE     done=1 until the next start
// NEXT_ZERO is decoded from the NEXT register. start=1 sends any state to
// INIT; there is no reset. SUM is SUM_W=15 bits, values are sign-extended,
// the NEXT+1 address is the low AW bits of the shared adder.
//
// Interface: clk, start; mem_a/mem_d to an asynchronous-read memory; done, r.
// Timing: with start dropped after a clock edge, done rises 2n+2 edges later
// for an n-node list.
module list_proc4 #(
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

  typedef enum logic [2:0] {
    INIT, FIRST, FETCH_X, ADD_SUM, LAST_SUM, DONE
  } state_e;

  typedef struct packed {
    logic ld_x, x_sel;        // X:    1 = memory data, 0 = constant 0
    logic ld_next, ld_numa;   // NEXT and NUMA load enables
    logic next_sel;           // NEXT: 1 = memory data, 0 = 0; NUMA: 1 = adder, 0 = 1
    logic add_sel1, add_sel2; // adder: (1 ? SUM : 1) + (1 ? X : NEXT)
    logic ld_sum, sum_sel;    // SUM:  1 = adder, 0 = constant 0
    logic a_sel;              // address: 0 = NEXT, 1 = NUMA
  } ctl_t;

  state_e           st, st_n;
  ctl_t             c;
  logic             next_zero;
  logic [DW-1:0]    x_q, x_d;
  logic [AW-1:0]    next_q, next_d, numa_q, numa_d;
  logic [SUM_W-1:0] sum_q, sum_d, add_a, add_b, add_y;

  // ---------------- controller ----------------
  always_comb begin
    st_n = st;
    if (start) st_n = INIT;
    else begin
      unique case (st)
        INIT:     st_n = FIRST;
        FIRST:    st_n = FETCH_X;
        FETCH_X:  st_n = next_zero ? LAST_SUM : ADD_SUM;
        ADD_SUM:  st_n = FETCH_X;
        LAST_SUM: st_n = DONE;
        DONE:     st_n = DONE;
        default:  st_n = INIT;
      endcase
    end
  end

  always_ff @(posedge clk) st <= st_n;

  always_comb begin
    c = '0;
    unique case (st)
      INIT: begin
        c.ld_x = 1'b1;    c.x_sel = 1'b0;
        c.ld_next = 1'b1; c.ld_numa = 1'b1; c.next_sel = 1'b0;
        c.ld_sum = 1'b1;  c.sum_sel = 1'b0;
      end
      FIRST: begin
        c.a_sel = 1'b0; c.ld_next = 1'b1; c.next_sel = 1'b1;
      end
      FETCH_X: begin
        c.a_sel = 1'b1; c.ld_x = 1'b1; c.x_sel = 1'b1;
        c.add_sel1 = 1'b0; c.add_sel2 = 1'b0; c.next_sel = 1'b1; c.ld_numa = 1'b1;
      end
      ADD_SUM: begin
        c.a_sel = 1'b0; c.ld_next = 1'b1; c.next_sel = 1'b1;
        c.add_sel1 = 1'b1; c.add_sel2 = 1'b1; c.ld_sum = 1'b1; c.sum_sel = 1'b1;
      end
      LAST_SUM: begin
        c.add_sel1 = 1'b1; c.add_sel2 = 1'b1; c.ld_sum = 1'b1; c.sum_sel = 1'b1;
      end
      default: ;
    endcase
  end

  assign done = (st == DONE);

  // ---------------- datapath ----------------
  assign add_a = c.add_sel1 ? sum_q : SUM_W'(1);
  assign add_b = c.add_sel2 ? SUM_W'($signed(x_q)) : SUM_W'(next_q);
  assign add_y = add_a + add_b;

  assign x_d = c.x_sel ? mem_d : '0;
  ce_reg #(.W(DW)) u_x (.clk, .ce(c.ld_x), .d(x_d), .q(x_q));

  assign next_d = c.next_sel ? AW'(mem_d) : '0;
  ce_reg #(.W(AW)) u_next (.clk, .ce(c.ld_next), .d(next_d), .q(next_q));
  assign next_zero = (next_q == '0);

  assign numa_d = c.next_sel ? add_y[AW-1:0] : AW'(1);
  ce_reg #(.W(AW)) u_numa (.clk, .ce(c.ld_numa), .d(numa_d), .q(numa_q));

  assign sum_d = c.sum_sel ? add_y : '0;
  ce_reg #(.W(SUM_W)) u_sum (.clk, .ce(c.ld_sum), .d(sum_d), .q(sum_q));

  assign mem_a = c.a_sel ? numa_q : next_q;
  assign r     = sum_q;

  // The memory is single ported and the adder is shared: each control word
  // uses each of them for at most one transfer.
  a_one_adder_use: assert property (@(posedge clk) !(c.ld_numa && c.next_sel && c.ld_sum && c.sum_sel));

endmodule

// list_proc_al: linked-list summer for nodes aligned on 2-byte boundaries.
//
// If every node starts at an even address, the address of a node's value is
// the node address with its low bit set, so the NUMA register and its +1 of
// Architecture #4 disappear: the controller drives the low address bit itself
// (0 for the pointer, 1 for the value). The X register still separates the
// value fetch from its addition:
//
//   INIT:     NEXT <- 0, SUM <- 0                    (held while start=1)
//   GET_X:    X    <- Memory[{NEXT[AW-1:1], 1}]
//   GET_NEXT: NEXT <- Memory[{NEXT[AW-1:1], 0}], SUM <- SUM + X
//             back to GET_X, or to DONE when the loaded pointer is 0
//
// The only adder is the SUM_W-bit accumulator; no cycle holds a memory read
// and an addition that depends on it. The state sequence is this design's
// own, built from the alignment idea. Node pointers are byte addresses whose
// low bit is ignored. No reset: start=1 sends any state to INIT.
// The low bit of NEXT is never used, since nodes sit at even addresses.
//
// Interface: clk, start; mem_a/mem_d to an asynchronous-read byte memory;
// done, r. Timing: two cycles per node; done rises 2n+1 edges after start
// falls and holds until the next start.
module list_proc_al #(
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

  typedef enum logic [1:0] {INIT, GET_X, GET_NEXT, DONE} state_e;

  state_e           st;
  logic             next_zero;
  logic [AW-1:0]    next_q, next_d;
  logic [DW-1:0]    x_q;
  logic [SUM_W-1:0] sum_q;

  assign next_d    = (st == INIT) ? '0 : AW'(mem_d);
  assign next_zero = (next_d == '0);

  always_ff @(posedge clk) begin
    if (start) st <= INIT;
    else begin
      unique case (st)
        INIT:     st <= GET_X;
        GET_X:    st <= GET_NEXT;
        GET_NEXT: st <= next_zero ? DONE : GET_X;
        default:  st <= DONE;
      endcase
    end
  end

  always_ff @(posedge clk) begin
    unique case (st)
      INIT:     begin next_q <= next_d; sum_q <= '0; end
      GET_X:    x_q <= mem_d;
      GET_NEXT: begin next_q <= next_d; sum_q <= sum_q + SUM_W'($signed(x_q)); end
      default:  ;
    endcase
  end

  assign mem_a = {next_q[AW-1:1], (st == GET_X)};
  assign done  = (st == DONE);
  assign r     = sum_q;

endmodule

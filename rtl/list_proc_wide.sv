// list_proc_wide: linked-list summer with aligned nodes and a 16-bit memory.
//
// With nodes on 2-byte boundaries and a memory word holding a whole node, one
// read returns both the pointer and the value, and the loop becomes a single
// transfer per node:
//
//   {NEXT, X} <- Memory[NEXT], SUM <- SUM + X;
//
// X is a pipeline register: the value fetched in one cycle is added in the
// next, so the memory read and the addition sit in different cycles. The
// memory word at word address w holds the node at byte address 2w, pointer in
// the upper DW bits, value in the lower DW bits (the order of {NEXT, X}).
// Pointers stay byte addresses; their low bit is ignored.
//
//   INIT:  NEXT <- 0, X <- 0, SUM <- 0          (held while start=1)
//   LOOP:  {NEXT, X} <- Memory[NEXT], SUM <- SUM + X; to LAST when the
//          pointer just read is 0
//   LAST:  SUM <- SUM + X
//   DONE:  done=1 until the next start
// The state sequence is this design's own; no reset, start=1 sends any state
// to INIT.
// The low bit of NEXT is never used, since nodes sit at even addresses.
//
// Interface: clk, start; mem_a (word address, AW-1 bits) and mem_d (2*DW
// bits) to an asynchronous-read memory; done, r. Timing: one cycle per node;
// done rises n+2 edges after start falls.
module list_proc_wide #(
  parameter int unsigned DW    = 8,
  parameter int unsigned AW    = 8,
  parameter int unsigned SUM_W = 15
) (
  input  logic             clk,
  input  logic             start,
  output logic [AW-2:0]    mem_a,
  input  logic [2*DW-1:0]  mem_d,
  output logic             done,
  output logic [SUM_W-1:0] r
);

  typedef enum logic [1:0] {INIT, LOOP, LAST, DONE} state_e;

  state_e           st;
  logic [AW-1:0]    next_q, ptr;
  logic [DW-1:0]    x_q;
  logic [SUM_W-1:0] sum_q, sum_add;

  assign ptr     = AW'(mem_d[2*DW-1:DW]);
  assign sum_add = sum_q + SUM_W'($signed(x_q));

  always_ff @(posedge clk) begin
    if (start) st <= INIT;
    else begin
      unique case (st)
        INIT:    st <= LOOP;
        LOOP:    st <= (ptr == '0) ? LAST : LOOP;
        LAST:    st <= DONE;
        default: st <= DONE;
      endcase
    end
  end

  always_ff @(posedge clk) begin
    unique case (st)
      INIT:    begin next_q <= '0; x_q <= '0; sum_q <= '0; end
      LOOP:    begin next_q <= ptr; x_q <= mem_d[DW-1:0]; sum_q <= sum_add; end
      LAST:    sum_q <= sum_add;
      default: ;
    endcase
  end

  assign mem_a = next_q[AW-1:1];
  assign done  = (st == DONE);
  assign r     = sum_q;

endmodule

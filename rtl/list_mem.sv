// list_mem: single-ported memory that holds the linked list.
//
// 2^AW words of DW bits with one address port. Reads are asynchronous: d
// follows a combinationally, as in the component library (10 ns read, no
// clock). A synchronous write (we, wd) through the same address port lets a
// host load the list before a run; the write port is this design's addition,
// the list processors themselves only read. There is no reset.
//
// Interface: clk; a[AW-1:0] address; d[DW-1:0] read data; we, wd[DW-1:0].
// Timing: a write at a rising edge is visible on d right after that edge.
module list_mem #(
  parameter int unsigned DW = 8,
  parameter int unsigned AW = 8
) (
  input  logic          clk,
  input  logic [AW-1:0] a,
  output logic [DW-1:0] d,
  input  logic          we,
  input  logic [DW-1:0] wd
);

  logic [DW-1:0] mem [2**AW];

  always_ff @(posedge clk) begin
    if (we) mem[a] <= wd;
  end

  assign d = mem[a];

endmodule

// dp_mem: dual-port memory for the modulo-scheduled adder example.
//
// 2^AW words of DW bits. Both ports read asynchronously (data follows the
// address in the same cycle); port 2 also writes on a rising edge when we2 is
// high. Port 1 is read-only because the schedule only ever stores on port 2.
// If both ports address the word being written, they see the new value after
// the edge. The port split and the asynchronous read are this design's
// choices: the example only asks for "a dual port memory".
//
// Interface: clk; a1/d1 (port 1); a2/d2/we2/wd2 (port 2).
module dp_mem #(
  parameter int unsigned DW = 8,
  parameter int unsigned AW = 8
) (
  input  logic          clk,
  input  logic [AW-1:0] a1,
  output logic [DW-1:0] d1,
  input  logic [AW-1:0] a2,
  output logic [DW-1:0] d2,
  input  logic          we2,
  input  logic [DW-1:0] wd2
);

  logic [DW-1:0] mem [2**AW];

  always_ff @(posedge clk) begin
    if (we2) mem[a2] <= wd2;
  end

  assign d1 = mem[a1];
  assign d2 = mem[a2];

endmodule

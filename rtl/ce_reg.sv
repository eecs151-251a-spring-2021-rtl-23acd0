// ce_reg: n-bit register with clock enable.
//
// On a rising clock edge the register loads d when ce is 1 and otherwise keeps
// its value, i.e. a 2:1 mux in front of a plain register, selected by CE. As in
// the component library this design is built from, there is no reset input:
// whoever uses the register must load it before reading it.
//
// Interface: clk, ce, d[W-1:0] in; q[W-1:0] out. Timing: q changes one clock
// edge after a cycle with ce=1. The width W is this design's choice (the
// library speaks only of an "n-bit" register).
module ce_reg #(
  parameter int unsigned W = 8
) (
  input  logic         clk,
  input  logic         ce,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);

  always_ff @(posedge clk) begin
    if (ce) q <= d;
  end

endmodule

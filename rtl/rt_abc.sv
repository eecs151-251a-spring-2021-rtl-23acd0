// rt_abc: datapath and controller derived together from an RT description.
//
// The four-cycle register-transfer sequence
//   regA <- IN;  regB <- IN;  regC <- regA + regB;  regB <- regC;
// implies the hardware: IN fans out to A and to B, A and B feed an adder, the
// adder feeds C, and B takes its input from a mux that selects IN (0) or C (1).
// C has no enable and loads A+B on every edge. The control points are the
// clock enables of A and B and the B mux select, driven by a four-state FSM,
// one state per cycle of the sequence. After the fourth state the FSM starts
// the sequence again; that repetition, the synchronous reset of the FSM and
// the width W are this design's choices.
//
// Interface: clk, rst (synchronous, FSM to the first state), in_data (IN);
// a, b, c show the registers. Timing: the first edge after rst falls loads A.
module rt_abc #(
  parameter int unsigned W = 8
) (
  input  logic         clk,
  input  logic         rst,
  input  logic [W-1:0] in_data,
  output logic [W-1:0] a,
  output logic [W-1:0] b,
  output logic [W-1:0] c
);

  typedef enum logic [1:0] {LOAD_A, LOAD_B, ADD, WRITE_B} state_e;

  state_e       st;
  logic         ce_a, ce_b, b_sel;
  logic [W-1:0] a_q, b_q, c_q, b_d;

  always_ff @(posedge clk) begin
    if (rst) st <= LOAD_A;
    else     st <= state_e'(st + 2'd1);
  end

  always_comb begin
    ce_a  = 1'b0;
    ce_b  = 1'b0;
    b_sel = 1'b0;
    if (!rst) begin
      unique case (st)
        LOAD_A:  ce_a = 1'b1;
        LOAD_B:  ce_b = 1'b1;
        ADD:     ;
        WRITE_B: begin ce_b = 1'b1; b_sel = 1'b1; end
        default: ;
      endcase
    end
  end

  assign b_d = b_sel ? c_q : in_data;

  ce_reg #(.W(W)) u_a (.clk, .ce(ce_a), .d(in_data), .q(a_q));
  ce_reg #(.W(W)) u_b (.clk, .ce(ce_b), .d(b_d),     .q(b_q));

  always_ff @(posedge clk) c_q <= a_q + b_q;

  assign a = a_q;
  assign b = b_q;
  assign c = c_q;

endmodule

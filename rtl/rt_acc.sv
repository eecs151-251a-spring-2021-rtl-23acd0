// rt_acc: accumulator datapath sequenced from a register-transfer description.
//
// Three W-bit registers R0, R1 and ACC, an adder and four 2:1 muxes S0-S3:
//   R0 input  S0: 0 = bus, 1 = R0 (hold)      bus = S3: 0 = S2 output, 1 = ACC
//   R1 input  S1: 0 = bus, 1 = R1 (hold)      S2: 0 = R0, 1 = R1
//   ACC       <- ACC + S2 output, every cycle (ACC has no enable)
// A three-state sequencer drives the selects so that the datapath performs,
// over and over,
//   step 1: ACC <- ACC + R0, R1 <- R0;
//   step 2: ACC <- ACC + R1, R0 <- R1;
//   step 3: R0  <- ACC;
// Because ACC loads on every edge, step 3 also performs ACC <- ACC + R0 (S2=0
// is this design's choice for that cycle). The datapath is the one drawn for
// this example; the repetition, the reset of the sequencer and the width are
// this design's choices. The registers have no reset and no load port: they
// start from whatever they hold.
//
// Interface: clk, rst (synchronous, puts the sequencer at step 1); r0, r1,
// acc show the registers. Timing: one step per clock edge; the first edge
// after rst falls performs step 1.
module rt_acc #(
  parameter int unsigned W = 8
) (
  input  logic         clk,
  input  logic         rst,
  output logic [W-1:0] r0,
  output logic [W-1:0] r1,
  output logic [W-1:0] acc
);

  typedef enum logic [1:0] {STEP1, STEP2, STEP3} step_e;

  step_e        st;
  logic         s0, s1, s2, s3;
  logic [W-1:0] s2_y, bus, r0_q, r1_q, acc_q;

  // Sequencer: one state per step of the register-transfer description.
  always_ff @(posedge clk) begin
    if (rst) st <= STEP1;
    else begin
      unique case (st)
        STEP1:   st <= STEP2;
        STEP2:   st <= STEP3;
        default: st <= STEP1;
      endcase
    end
  end

  always_comb begin
    {s0, s1, s2, s3} = 4'b1100;   // hold R0 and R1
    if (!rst) begin
      unique case (st)
        STEP1:   {s0, s1, s2, s3} = 4'b1000;
        STEP2:   {s0, s1, s2, s3} = 4'b0110;
        STEP3:   {s0, s1, s2, s3} = 4'b0101;
        default: ;
      endcase
    end
  end

  // Datapath.
  assign s2_y = s2 ? r1_q : r0_q;
  assign bus  = s3 ? acc_q : s2_y;

  always_ff @(posedge clk) begin
    r0_q  <= s0 ? r0_q : bus;
    r1_q  <= s1 ? r1_q : bus;
    acc_q <= acc_q + s2_y;
  end

  assign r0  = r0_q;
  assign r1  = r1_q;
  assign acc = acc_q;

endmodule

// tb_rt_acc: self-checking testbench of rt_acc.
// The registers start from unknown values, so the testbench reads them when
// the sequencer leaves reset and then predicts every later value from the
// three-step register-transfer sequence (plus the ACC <- ACC + R0 that the
// third step performs because ACC has no enable).
module tb_rt_acc;
  localparam int unsigned W = 8;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic         rst = 1'b1;
  logic [W-1:0] r0, r1, acc, m0, m1, ma, t;
  int checks = 0, failures = 0;

  rt_acc #(.W(W)) dut (.clk, .rst, .r0, .r1, .acc);

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;
    m0 = r0; m1 = r1; ma = acc;
    for (int i = 0; i < 300; i++) begin
      @(posedge clk); #1;
      unique case (i % 3)
        0: begin ma = ma + m0; m1 = m0; end
        1: begin ma = ma + m1; m0 = m1; end
        2: begin t = m0; m0 = ma; ma = ma + t; end
      endcase
      checks++;
      if ({r0, r1, acc} !== {m0, m1, ma}) begin
        failures++;
        $display("FAIL: step %0d r0=%h r1=%h acc=%h expected %h %h %h", i % 3 + 1, r0, r1, acc, m0, m1, ma);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

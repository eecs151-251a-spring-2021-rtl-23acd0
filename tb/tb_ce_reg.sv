// tb_ce_reg: self-checking testbench of ce_reg.
// Drives random data and clock enables and checks that q loads d exactly on
// edges with ce=1 and holds its value otherwise.
module tb_ce_reg;
  localparam int unsigned W = 8;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic         ce = 1'b1;
  logic [W-1:0] d = '0, q, model;
  int checks = 0, failures = 0;

  ce_reg #(.W(W)) dut (.clk, .ce, .d, .q);

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(posedge clk); #1;          // first load with ce=1
    model = d;
    for (int i = 0; i < 500; i++) begin
      ce = 1'($urandom % 3 == 0);
      d  = W'($urandom);
      @(posedge clk); #1;
      if (ce) model = d;
      checks++;
      if (q !== model) begin failures++; $display("FAIL: cycle %0d q=%h expected %h", i, q, model); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

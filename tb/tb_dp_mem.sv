// tb_dp_mem: self-checking testbench of dp_mem.
// Fills the memory through port 2, then reads both ports at random addresses
// while port 2 writes at random, comparing with a model array.
module tb_dp_mem;
  localparam int unsigned DW = 8, AW = 8;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [AW-1:0] a1 = '0, a2 = '0;
  logic [DW-1:0] d1, d2, wd2 = '0;
  logic          we2 = 1'b0;
  logic [DW-1:0] model [2**AW];
  int checks = 0, failures = 0;

  dp_mem #(.DW(DW), .AW(AW)) dut (.clk, .a1, .d1, .a2, .d2, .we2, .wd2);

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 2**AW; i++) begin
      we2 = 1'b1; a2 = AW'(i); wd2 = DW'($urandom); model[i] = wd2;
      @(posedge clk); #1;
    end
    for (int i = 0; i < 1000; i++) begin
      we2 = 1'($urandom % 3 == 0); a1 = AW'($urandom); a2 = AW'($urandom); wd2 = DW'($urandom);
      if (i % 7 == 0) a1 = a2;
      #1;
      checks += 2;
      if (d1 !== model[a1]) begin failures++; $display("FAIL: port 1 a=%0d", a1); end
      if (d2 !== model[a2]) begin failures++; $display("FAIL: port 2 a=%0d", a2); end
      @(posedge clk); #1;
      if (we2) model[a2] = wd2;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_list_mem: self-checking testbench of list_mem.
// Writes every word, then mixes random writes with random asynchronous reads
// and compares each read with a model array; a read right after a write to
// the same address must return the new data.
module tb_list_mem;
  localparam int unsigned DW = 8, AW = 8;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [AW-1:0] a = '0;
  logic [DW-1:0] d, wd = '0;
  logic          we = 1'b0;
  logic [DW-1:0] model [2**AW];
  int checks = 0, failures = 0;

  list_mem #(.DW(DW), .AW(AW)) dut (.clk, .a, .d, .we, .wd);

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 2**AW; i++) begin
      we = 1'b1; a = AW'(i); wd = DW'($urandom); model[i] = wd;
      @(posedge clk); #1;
      checks++;
      if (d !== model[i]) begin failures++; $display("FAIL: write-then-read %0d", i); end
    end
    for (int i = 0; i < 1000; i++) begin
      we = 1'($urandom % 4 == 0); a = AW'($urandom); wd = DW'($urandom);
      #1;
      checks++;
      if (d !== model[a]) begin failures++; $display("FAIL: read a=%0d d=%h expected %h", a, d, model[a]); end
      @(posedge clk); #1;
      if (we) model[a] = wd;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

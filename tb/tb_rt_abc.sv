// tb_rt_abc: self-checking testbench of rt_abc.
// Feeds random IN values and checks A, B and C after every cycle against the
// four-step sequence A<-IN; B<-IN; C<-A+B; B<-C, with C loading A+B each
// cycle as in the datapath. Each full sequence must leave B = A + B_loaded.
module tb_rt_abc;
  localparam int unsigned W = 8;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic         rst = 1'b1;
  logic [W-1:0] in_data = '0, a, b, c, ma, mb, mc, na, nb, nc;
  int checks = 0, failures = 0;

  rt_abc #(.W(W)) dut (.clk, .rst, .in_data, .a, .b, .c);

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;
    ma = a; mb = b; mc = c;
    for (int i = 0; i < 400; i++) begin
      in_data = W'($urandom);
      na = ma; nb = mb; nc = ma + mb;
      unique case (i % 4)
        0: na = in_data;
        1: nb = in_data;
        2: ;
        3: nb = mc;
      endcase
      @(posedge clk); #1;
      ma = na; mb = nb; mc = nc;
      checks++;
      if ({a, b, c} !== {ma, mb, mc}) begin
        failures++;
        $display("FAIL: step %0d a=%h b=%h c=%h expected %h %h %h", i % 4 + 1, a, b, c, ma, mb, mc);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

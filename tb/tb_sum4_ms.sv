// tb_sum4_ms: self-checking testbench of the modulo-scheduled adder.
// Loads random data through the host port, runs the unit with random
// iteration counts and array placements, and checks every E[i] against
// A[i]+B[i]+C[i]+D[i] computed here, that no other word changed, and that the
// run takes exactly 3(n+1) cycles (3-cycle section per iteration plus one
// epilogue section). Includes the n=1 and largest disjoint (n=51) runs.
module tb_sum4_ms;
  localparam int unsigned DW = 8, AW = 8;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic          rst = 1'b1, start = 1'b0, busy, done, host_we = 1'b0;
  logic [AW-1:0] n = '0, ba = '0, bb = '0, bc = '0, bd = '0, be = '0, host_a = '0;
  logic [DW-1:0] host_wd = '0, host_rd;
  logic [DW-1:0] image [256];
  int checks = 0, failures = 0;

  sum4_ms #(.DW(DW), .AW(AW)) dut (
    .clk, .rst, .start, .n, .base_a(ba), .base_b(bb), .base_c(bc), .base_d(bd), .base_e(be),
    .busy, .done, .host_we, .host_a, .host_wd, .host_rd);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input int nn);
    int cycles = 0;
    int regions [5];
    int order [5] = '{0, 1, 2, 3, 4};
    int span = 51;
    // five disjoint regions of 51 words in a random order
    for (int i = 4; i > 0; i--) begin
      int j = int'($urandom % (i + 1));
      int t = order[i]; order[i] = order[j]; order[j] = t;
    end
    for (int i = 0; i < 5; i++) regions[i] = order[i] * span + int'($urandom % (span - nn + 1));
    for (int a = 0; a < 256; a++) begin
      image[a] = DW'($urandom);
      host_we = 1'b1; host_a = AW'(a); host_wd = image[a];
      @(posedge clk); #1;
    end
    host_we = 1'b0;
    n = AW'(nn);
    {ba, bb, bc, bd, be} = {AW'(regions[0]), AW'(regions[1]), AW'(regions[2]), AW'(regions[3]), AW'(regions[4])};
    start = 1'b1; @(posedge clk); #1 start = 1'b0;
    while (busy && cycles < 1000) begin @(posedge clk); #1; cycles++; end
    check(done, "done not set");
    check(cycles == 3 * (nn + 1), $sformatf("n=%0d: busy for %0d cycles, expected %0d", nn, cycles, 3 * (nn + 1)));
    for (int i = 0; i < nn; i++)
      image[be + i] = image[ba + i] + image[bb + i] + image[bc + i] + image[bd + i];
    for (int a = 0; a < 256; a++) begin
      host_a = AW'(a); #1;
      check(host_rd == image[a], $sformatf("n=%0d: word %0d = %h expected %h", nn, a, host_rd, image[a]));
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    #1 rst = 1'b0;
    @(posedge clk); #1;
    run(1);
    run(51);
    for (int t = 0; t < 6; t++) run(1 + int'($urandom % 51));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_list_proc4_schedule: cycle-by-cycle check of the modulo schedule of
// list_proc4 on a four-node list.
//
// After start-up the single memory port must alternate between a value read
// (X <- Memory[NUMA]) and a pointer read (NEXT <- Memory[NEXT]), and the single
// adder between NUMA <- NEXT+1 and SUM <- SUM+X, so that one node completes
// every two cycles:
//
//   cycle   FIRST  FETCH_X  ADD_SUM  FETCH_X  ADD_SUM  FETCH_X  ADD_SUM  FETCH_X  LAST_SUM
//   memory  p1     p1+1     p2       p2+1     p3       p3+1     p4       p4+1     -
//   SUM     -      -        x1       -        x1+x2    -        ..+x3    -        ..+x4
//
// where p1 = 0 and pk is the address of node k. The testbench places the
// nodes, then compares the memory address and the SUM output in every cycle.
module tb_list_proc4_schedule;
  localparam int unsigned DW = 8, AW = 8, SUM_W = 15;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic             start = 1'b1, host_we = 1'b0, done;
  logic [AW-1:0]    proc_a, mem_a, host_a = '0;
  logic [DW-1:0]    mem_d, host_wd = '0;
  logic [SUM_W-1:0] r;

  assign mem_a = host_we ? host_a : proc_a;
  list_mem #(.DW(DW), .AW(AW)) u_mem (.clk, .a(mem_a), .d(mem_d), .we(host_we), .wd(host_wd));
  list_proc4 dut (.clk, .start, .mem_a(proc_a), .mem_d, .done, .r);

  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic poke(input int a, input int v);
    host_we = 1'b1; host_a = AW'(a); host_wd = DW'(v);
    @(posedge clk); #1;
    host_we = 1'b0;
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int p [4] = '{0, 0, 0, 0};
    int x [4];
    int sum = 0;
    for (int trial = 0; trial < 20; trial++) begin
      // four nodes at distinct random addresses, node 1 at 0
      for (int k = 1; k < 4; k++) begin
        bit ok;
        do begin
          p[k] = 2 + int'($urandom % 250);
          ok = 1'b1;
          for (int j = 0; j < k; j++) if (p[k] <= p[j] + 1 && p[j] <= p[k] + 1) ok = 1'b0;
        end while (!ok);
      end
      sum = 0;
      for (int k = 0; k < 4; k++) begin
        x[k] = int'($signed(8'($urandom)));
        poke(p[k], (k == 3) ? 0 : p[k+1]);
        poke(p[k] + 1, x[k]);
      end
      start = 1'b1; repeat (2) @(posedge clk); #1 start = 1'b0;
      // INIT cycle: no memory use checked
      @(posedge clk); #1;
      // FIRST: pointer of node 1
      check(proc_a == 0, $sformatf("FIRST reads %0d, expected 0", proc_a));
      @(posedge clk); #1;
      for (int k = 0; k < 4; k++) begin
        check(proc_a == AW'(p[k] + 1), $sformatf("value read of node %0d at %0d, expected %0d", k + 1, proc_a, p[k] + 1));
        check(r == SUM_W'(sum), $sformatf("SUM changed in the value-read cycle of node %0d", k + 1));
        @(posedge clk); #1;
        sum += x[k];
        if (k < 3)
          check(proc_a == AW'(p[k+1]), $sformatf("pointer read of node %0d at %0d, expected %0d", k + 2, proc_a, p[k+1]));
        check(r == SUM_W'(sum - x[k]), "SUM must update at the end of this cycle, not before");
        @(posedge clk); #1;
        check(r == SUM_W'(sum), $sformatf("SUM after node %0d: %0d, expected %0d", k + 1, $signed(r), sum));
      end
      check(done, "done one cycle after the last addition");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

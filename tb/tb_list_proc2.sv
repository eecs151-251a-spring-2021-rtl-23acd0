// tb_list_proc2: self-checking testbench of list_proc2 (Architecture #2).
//
// A host port in the testbench writes a memory image into list_mem, then the
// processor is started and its result and latency are compared with a
// reference computed here from the same image. Lists are placed at random
// addresses (unaligned unless the design requires alignment) over random
// background bytes; the two largest lists that
// fit a 256-byte memory (128 aligned nodes of -128 and of +127) check the
// 15-bit sum at both extremes. A START raised in the middle of a run must
// restart the processor. Latency: done must rise CPN*n+EXTRA edges after start
// falls (CPN cycles per node plus start-up).
module tb_list_proc2;
  localparam int unsigned DW = 8, AW = 8, SUM_W = 15;
  localparam int EXTRA = 1;       // start-up cycles beyond CPN cycles per node
  localparam int CPN = 2;           // cycles per node
  localparam bit ALIGNED = 1'b0;   // nodes only at even addresses

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic             start = 1'b1, host_we = 1'b0, done;
  logic [AW-1:0]    proc_a, mem_a, host_a = '0;
  logic [DW-1:0]    mem_d, host_wd = '0;
  logic [SUM_W-1:0] r;

  assign mem_a = host_we ? host_a : proc_a;
  list_mem #(.DW(DW), .AW(AW)) u_mem (.clk, .a(mem_a), .d(mem_d), .we(host_we), .wd(host_wd));
  list_proc2 #(.DW(DW), .AW(AW), .SUM_W(SUM_W)) dut (.clk, .start, .mem_a(proc_a), .mem_d, .done, .r);

  int checks = 0, failures = 0;
  logic [7:0] image [256];
  bit         used  [256];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic load_image();
    for (int a = 0; a < 256; a++) begin
      host_we = 1'b1; host_a = AW'(a); host_wd = image[a];
      @(posedge clk); #1;
    end
    host_we = 1'b0;
  endtask

  // Builds an n-node list at address 0; returns the expected sum.
  // mode 0: random unaligned nodes and values; 1: aligned, all -128; 2: aligned, all +127.
  function automatic int build_list(input int n, input int mode);
    int p [128];
    int s = 0;
    for (int a = 0; a < 256; a++) begin image[a] = 8'($urandom); used[a] = 1'b0; end
    p[0] = 0; used[0] = 1'b1; used[1] = 1'b1;
    if (mode == 0 && !ALIGNED) begin
      for (int i = 1; i < n; i++) begin
        int a;
        do a = 1 + int'($urandom % 254); while (used[a] || used[a+1]);
        p[i] = a; used[a] = 1'b1; used[a+1] = 1'b1;
      end
    end else begin
      for (int i = 1; i < n; i++) p[i] = 2 * i;
      for (int i = n - 1; i > 1; i--) begin   // shuffle nodes 1..n-1
        int j = 1 + int'($urandom % i);
        int t = p[i]; p[i] = p[j]; p[j] = t;
      end
    end
    for (int i = 0; i < n; i++) begin
      logic [7:0] v;
      image[p[i]] = (i == n - 1) ? 8'd0 : 8'(p[i+1]);
      v = (mode == 1) ? 8'h80 : (mode == 2) ? 8'h7f : 8'($urandom);
      image[p[i] + 1] = v;
      s += int'($signed(v));
    end
    return s;
  endfunction

  task automatic run_and_check(input int n, input int expected, input string tag);
    int cycles = 0;
    start = 1'b1;
    repeat (2) @(posedge clk);
    #1 start = 1'b0;
    while (!done && cycles < 1000) begin
      @(posedge clk); #1; cycles++;
    end
    check(done, $sformatf("%s: done never rose", tag));
    check(r == SUM_W'(expected), $sformatf("%s: n=%0d r=%0d expected %0d", tag, n, $signed(r), expected));
    check(cycles == CPN * n + EXTRA, $sformatf("%s: n=%0d took %0d cycles, expected %0d", tag, n, cycles, CPN * n + EXTRA));
    repeat (3) @(posedge clk);
    #1 check(done && r == SUM_W'(expected), $sformatf("%s: done/r not held", tag));
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int e, n;
    repeat (2) @(posedge clk);
    // single node
    e = build_list(1, 0); load_image(); run_and_check(1, e, "one node");
    // random lists
    for (int t = 0; t < 12; t++) begin
      n = 1 + int'($urandom % 60);
      e = build_list(n, 0); load_image(); run_and_check(n, e, "random");
    end
    // extremes of the 15-bit sum
    e = build_list(128, 1); load_image(); run_and_check(128, e, "128 x -128");
    e = build_list(128, 2); load_image(); run_and_check(128, e, "128 x +127");
    // START in the middle of a run restarts from the head of the list
    e = build_list(20, 0); load_image();
    start = 1'b1; repeat (2) @(posedge clk); #1 start = 1'b0;
    repeat (15) @(posedge clk);
    #1 check(!done, "restart: done early");
    run_and_check(20, e, "restart");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_rtl_examples_top: end-to-end testbench of rtl_examples_top at its default
// parameters (8-bit data and addresses, 15-bit sums, 256-word memories).
//
// The six list processors get the same list image, run side by side and must
// all return the reference sum, Architectures #1-#3 and the aligned byte-memory
// design in 2n+1 cycles, #4 in 2n+2 and the 16-bit-memory design in n+2
// cycles after start falls (the aligned designs only on aligned lists). The
// runs cover a one-node list, random unaligned and aligned lists, the two 128-node extremes of the 15-bit sum and a START
// that restarts a run. Meanwhile the R0/R1/ACC and A/B/C datapaths are
// checked every cycle against their register-transfer sequences, and the
// modulo-scheduled adder computes E=A+B+C+D over arrays, checked word by word
// and for its 3(n+1)-cycle run time. Every mechanism is counted and a count
// of zero is a failure.
module tb_rtl_examples_top;
  localparam int unsigned DW = 8, AW = 8, SUM_W = 15;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic                  rst = 1'b1;
  logic [4:0]            lp_start = '1, lp_host_we = '0, lp_done;
  logic [4:0][AW-1:0]    lp_host_a = '0;
  logic [4:0][DW-1:0]    lp_host_wd = '0, lp_host_rd;
  logic [4:0][SUM_W-1:0] lp_r;
  logic                  wide_start = 1'b1, wide_host_we = 1'b0, wide_done;
  logic [AW-2:0]         wide_host_a = '0;
  logic [2*DW-1:0]       wide_host_wd = '0, wide_host_rd;
  logic [SUM_W-1:0]      wide_r;
  logic [DW-1:0]         acc_r0, acc_r1, acc_acc, abc_in = '0, abc_a, abc_b, abc_c;
  logic                  ms_start = 1'b0, ms_busy, ms_done, ms_host_we = 1'b0;
  logic [AW-1:0]         ms_n = '0, ms_host_a = '0;
  logic [4:0][AW-1:0]    ms_base = '0;
  logic [DW-1:0]         ms_host_wd = '0, ms_host_rd;

  rtl_examples_top dut (.*);

  int checks = 0, failures = 0;
  // mechanism counters
  int n_lp_runs [6], n_one_node, n_max_list, n_restart;
  int n_acc_steps [3], n_abc_steps [4], n_ms_runs, n_ms_overlap;
  bit side_done = 1'b0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- list processors ----------------
  logic [7:0] image [256];
  bit         used  [256];

  function automatic int build_list(input int n, input int mode);
    int p [128];
    int s = 0;
    for (int a = 0; a < 256; a++) begin image[a] = 8'($urandom); used[a] = 1'b0; end
    p[0] = 0; used[0] = 1'b1; used[1] = 1'b1;
    for (int i = 1; i < n; i++) begin
      if (mode == 0) begin   // anywhere, unaligned
        int a;
        do a = 1 + int'($urandom % 254); while (used[a] || used[a+1]);
        p[i] = a; used[a] = 1'b1; used[a+1] = 1'b1;
      end else p[i] = 2 * i;  // aligned
    end
    if (mode != 0)
      for (int i = n - 1; i > 1; i--) begin
        int j = 1 + int'($urandom % i);
        int t = p[i]; p[i] = p[j]; p[j] = t;
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

  task automatic load_lists();
    for (int a = 0; a < 256; a++) begin
      lp_host_we = '1;
      for (int k = 0; k < 5; k++) begin lp_host_a[k] = AW'(a); lp_host_wd[k] = image[a]; end
      wide_host_we = a[0];
      wide_host_a  = (AW-1)'(a / 2);
      wide_host_wd = {image[a & 254], image[a | 1]};
      @(posedge clk); #1;
    end
    lp_host_we = '0;
    wide_host_we = 1'b0;
  endtask

  // k = 0..3: Architectures #1-#4, 4: aligned byte memory, 5: 16-bit memory.
  // The two aligned designs are only checked on aligned lists.
  task automatic run_lists(input int n, input int expected, input string tag, input bit aligned);
    int cycles = 0;
    int took [6] = '{-1, -1, -1, -1, -1, -1};
    int nk = aligned ? 6 : 4;
    lp_start = '1; wide_start = 1'b1;
    repeat (2) @(posedge clk);
    #1 lp_start = '0; wide_start = 1'b0;
    while ((lp_done[3:0] != 4'hf || (aligned && !(lp_done[4] && wide_done))) && cycles < 1000) begin
      @(posedge clk); #1; cycles++;
      for (int k = 0; k < 5; k++) if (lp_done[k] && took[k] < 0) took[k] = cycles;
      if (wide_done && took[5] < 0) took[5] = cycles;
    end
    for (int k = 0; k < nk; k++) begin
      int want = (k == 5) ? n + 2 : 2 * n + ((k == 3) ? 2 : 1);
      logic [SUM_W-1:0] got = (k == 5) ? wide_r : lp_r[k];
      check(got == SUM_W'(expected), $sformatf("%s proc%0d: n=%0d r=%0d expected %0d", tag, k + 1, n, $signed(got), expected));
      check(took[k] == want, $sformatf("%s proc%0d: n=%0d took %0d cycles, expected %0d", tag, k + 1, n, took[k], want));
      n_lp_runs[k]++;
    end
    if (n == 1) n_one_node++;
    if (n == 128) n_max_list++;
  endtask

  // ---------------- R0/R1/ACC and A/B/C, checked every cycle ----------------
  logic [DW-1:0] m0, m1, ma, t, xa, xb, xc, na, nb, nc;
  initial begin
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;
    m0 = acc_r0; m1 = acc_r1; ma = acc_acc;
    xa = abc_a; xb = abc_b; xc = abc_c;
    for (int i = 0; i < 600; i++) begin
      abc_in = DW'($urandom);
      na = xa; nb = xb; nc = xa + xb;
      unique case (i % 4)
        0: na = abc_in;
        1: nb = abc_in;
        2: ;
        3: nb = xc;
      endcase
      @(posedge clk); #1;
      unique case (i % 3)
        0: begin ma = ma + m0; m1 = m0; end
        1: begin ma = ma + m1; m0 = m1; end
        2: begin t = m0; m0 = ma; ma = ma + t; end
      endcase
      xa = na; xb = nb; xc = nc;
      check({acc_r0, acc_r1, acc_acc} == {m0, m1, ma}, $sformatf("rt_acc step %0d", i % 3 + 1));
      check({abc_a, abc_b, abc_c} == {xa, xb, xc}, $sformatf("rt_abc step %0d", i % 4 + 1));
      n_acc_steps[i % 3]++;
      n_abc_steps[i % 4]++;
    end
    side_done = 1'b1;
  end

  // ---------------- modulo-scheduled adder ----------------
  logic [DW-1:0] ms_image [256];
  task automatic run_ms(input int nn);
    int cycles = 0;
    int span = 51;
    for (int a = 0; a < 256; a++) begin
      ms_image[a] = DW'($urandom);
      ms_host_we = 1'b1; ms_host_a = AW'(a); ms_host_wd = ms_image[a];
      @(posedge clk); #1;
    end
    ms_host_we = 1'b0;
    ms_n = AW'(nn);
    for (int i = 0; i < 5; i++) ms_base[i] = AW'(((i + 2) % 5) * span);
    ms_start = 1'b1; @(posedge clk); #1 ms_start = 1'b0;
    while (ms_busy && cycles < 1000) begin @(posedge clk); #1; cycles++; end
    check(ms_done && cycles == 3 * (nn + 1), $sformatf("sum4_ms n=%0d: %0d cycles, expected %0d", nn, cycles, 3 * (nn + 1)));
    for (int i = 0; i < nn; i++)
      ms_image[ms_base[4] + i] = ms_image[ms_base[0] + i] + ms_image[ms_base[1] + i]
                               + ms_image[ms_base[2] + i] + ms_image[ms_base[3] + i];
    for (int a = 0; a < 256; a++) begin
      ms_host_a = AW'(a); #1;
      check(ms_host_rd == ms_image[a], $sformatf("sum4_ms n=%0d word %0d", nn, a));
    end
    n_ms_runs++;
    if (nn >= 3) n_ms_overlap++;
  endtask

  initial begin
    int e, n;
    repeat (5) @(posedge clk);
    #1;
    run_ms(1);
    run_ms(51);
    e = build_list(1, 0);   load_lists(); run_lists(1, e, "one node", 1'b1);
    for (int i = 0; i < 4; i++) begin
      n = 2 + int'($urandom % 60);
      e = build_list(n, 0); load_lists(); run_lists(n, e, "random", 1'b0);
      n = 2 + int'($urandom % 120);
      e = build_list(n, 3); load_lists(); run_lists(n, e, "random aligned", 1'b1);
    end
    e = build_list(128, 1); load_lists(); run_lists(128, e, "128 x -128", 1'b1);
    e = build_list(128, 2); load_lists(); run_lists(128, e, "128 x +127", 1'b1);
    // START during a run
    e = build_list(30, 3);  load_lists();
    lp_start = '1; wide_start = 1'b1; repeat (2) @(posedge clk); #1 lp_start = '0; wide_start = 1'b0;
    repeat (25) @(posedge clk);
    #1 check(lp_done == '0 && !wide_done, "restart: a processor finished early");
    run_lists(30, e, "restart", 1'b1);
    n_restart++;
    wait (side_done);
    for (int k = 0; k < 6; k++) check(n_lp_runs[k] > 0, $sformatf("list processor %0d never ran", k + 1));
    check(n_one_node > 0, "no one-node list");
    check(n_max_list > 0, "no 128-node list");
    check(n_restart > 0, "no restart");
    for (int s = 0; s < 3; s++) check(n_acc_steps[s] > 0, $sformatf("rt_acc step %0d never ran", s + 1));
    for (int s = 0; s < 4; s++) check(n_abc_steps[s] > 0, $sformatf("rt_abc step %0d never ran", s + 1));
    check(n_ms_runs > 0 && n_ms_overlap > 0, "modulo-scheduled adder never ran with overlapped iterations");
    $display("mechanisms: list runs %0d/%0d/%0d/%0d/%0d/%0d one-node %0d 128-node %0d restarts %0d; acc steps %0d %0d %0d; abc steps %0d %0d %0d %0d; ms runs %0d overlapped %0d",
             n_lp_runs[0], n_lp_runs[1], n_lp_runs[2], n_lp_runs[3], n_lp_runs[4], n_lp_runs[5], n_one_node, n_max_list, n_restart,
             n_acc_steps[0], n_acc_steps[1], n_acc_steps[2],
             n_abc_steps[0], n_abc_steps[1], n_abc_steps[2], n_abc_steps[3], n_ms_runs, n_ms_overlap);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

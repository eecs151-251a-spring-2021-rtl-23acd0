// rtl_examples_top: every example design of this collection, side by side.
//
// The designs are independent and share only the clock:
//   * five linked-list summing processors on byte-wide memories: Architectures
//     #1-#4 (list_proc1..4) and the aligned-node variant (list_proc_al), each
//     with its own single-ported list memory (list_mem). Index k of the lp_*
//     port arrays belongs to Architecture #k+1 for k=0..3 and to the aligned
//     variant for k=4; only that one requires nodes at even addresses. While lp_host_we[k] is
//     high the host address replaces the processor address, so the host can
//     write the list; lp_host_rd[k] shows the memory data at the current
//     address (the processor's address when the host is not writing).
//   * the aligned-node processor with a 16-bit memory (list_proc_wide), with
//     its own wide_* ports; its memory word w holds the node at byte 2w.
//   * rt_acc, the R0/R1/ACC datapath with its three-step sequencer;
//   * rt_abc, the A/B/C datapath derived from a four-cycle RT description;
//   * sum4_ms, the modulo-scheduled E=(A+B)+(C+D) unit with its dual-port
//     memory and host port.
// rst is the synchronous reset of the examples that have one; the list
// processors have no reset and are initialised by their start input.
// Timing of each design is described in its own module.
module rtl_examples_top #(
  parameter int unsigned DW    = 8,
  parameter int unsigned AW    = 8,
  parameter int unsigned SUM_W = 15
) (
  input  logic                       clk,
  input  logic                       rst,
  // byte-memory list processors, index k = Architecture #k+1, 4 = aligned
  input  logic [4:0]                 lp_start,
  input  logic [4:0]                 lp_host_we,
  input  logic [4:0][AW-1:0]         lp_host_a,
  input  logic [4:0][DW-1:0]         lp_host_wd,
  output logic [4:0][DW-1:0]         lp_host_rd,
  output logic [4:0]                 lp_done,
  output logic [4:0][SUM_W-1:0]      lp_r,
  // aligned-node list processor on a 16-bit memory
  input  logic                       wide_start,
  input  logic                       wide_host_we,
  input  logic [AW-2:0]              wide_host_a,
  input  logic [2*DW-1:0]            wide_host_wd,
  output logic [2*DW-1:0]            wide_host_rd,
  output logic                       wide_done,
  output logic [SUM_W-1:0]           wide_r,
  // R0/R1/ACC example
  output logic [DW-1:0]              acc_r0,
  output logic [DW-1:0]              acc_r1,
  output logic [DW-1:0]              acc_acc,
  // A/B/C example
  input  logic [DW-1:0]              abc_in,
  output logic [DW-1:0]              abc_a,
  output logic [DW-1:0]              abc_b,
  output logic [DW-1:0]              abc_c,
  // modulo-scheduled four-input adder
  input  logic                       ms_start,
  input  logic [AW-1:0]              ms_n,
  input  logic [4:0][AW-1:0]         ms_base,   // [0]=A .. [4]=E
  output logic                       ms_busy,
  output logic                       ms_done,
  input  logic                       ms_host_we,
  input  logic [AW-1:0]              ms_host_a,
  input  logic [DW-1:0]              ms_host_wd,
  output logic [DW-1:0]              ms_host_rd
);

  for (genvar k = 0; k < 5; k++) begin : g_lp
    logic [AW-1:0] proc_a, mem_a;
    logic [DW-1:0] mem_d;

    assign mem_a         = lp_host_we[k] ? lp_host_a[k] : proc_a;
    assign lp_host_rd[k] = mem_d;

    list_mem #(.DW(DW), .AW(AW)) u_mem (
      .clk, .a(mem_a), .d(mem_d), .we(lp_host_we[k]), .wd(lp_host_wd[k])
    );

    if (k == 0) begin : g_arch1
      list_proc1 #(.DW(DW), .AW(AW), .SUM_W(SUM_W)) u_proc (
        .clk, .start(lp_start[k]), .mem_a(proc_a), .mem_d, .done(lp_done[k]), .r(lp_r[k]));
    end else if (k == 1) begin : g_arch2
      list_proc2 #(.DW(DW), .AW(AW), .SUM_W(SUM_W)) u_proc (
        .clk, .start(lp_start[k]), .mem_a(proc_a), .mem_d, .done(lp_done[k]), .r(lp_r[k]));
    end else if (k == 2) begin : g_arch3
      list_proc3 #(.DW(DW), .AW(AW), .SUM_W(SUM_W)) u_proc (
        .clk, .start(lp_start[k]), .mem_a(proc_a), .mem_d, .done(lp_done[k]), .r(lp_r[k]));
    end else if (k == 3) begin : g_arch4
      list_proc4 #(.DW(DW), .AW(AW), .SUM_W(SUM_W)) u_proc (
        .clk, .start(lp_start[k]), .mem_a(proc_a), .mem_d, .done(lp_done[k]), .r(lp_r[k]));
    end else begin : g_aligned
      list_proc_al #(.DW(DW), .AW(AW), .SUM_W(SUM_W)) u_proc (
        .clk, .start(lp_start[k]), .mem_a(proc_a), .mem_d, .done(lp_done[k]), .r(lp_r[k]));
    end
  end

  // Aligned nodes, one node per 16-bit memory word.
  logic [AW-2:0]   wide_proc_a, wide_mem_a;
  logic [2*DW-1:0] wide_mem_d;

  assign wide_mem_a   = wide_host_we ? wide_host_a : wide_proc_a;
  assign wide_host_rd = wide_mem_d;

  list_mem #(.DW(2 * DW), .AW(AW - 1)) u_wide_mem (
    .clk, .a(wide_mem_a), .d(wide_mem_d), .we(wide_host_we), .wd(wide_host_wd)
  );

  list_proc_wide #(.DW(DW), .AW(AW), .SUM_W(SUM_W)) u_wide_proc (
    .clk, .start(wide_start), .mem_a(wide_proc_a), .mem_d(wide_mem_d), .done(wide_done), .r(wide_r)
  );

  rt_acc #(.W(DW)) u_rt_acc (.clk, .rst, .r0(acc_r0), .r1(acc_r1), .acc(acc_acc));

  rt_abc #(.W(DW)) u_rt_abc (.clk, .rst, .in_data(abc_in), .a(abc_a), .b(abc_b), .c(abc_c));

  sum4_ms #(.DW(DW), .AW(AW)) u_sum4_ms (
    .clk, .rst, .start(ms_start), .n(ms_n),
    .base_a(ms_base[0]), .base_b(ms_base[1]), .base_c(ms_base[2]),
    .base_d(ms_base[3]), .base_e(ms_base[4]),
    .busy(ms_busy), .done(ms_done),
    .host_we(ms_host_we), .host_a(ms_host_a), .host_wd(ms_host_wd), .host_rd(ms_host_rd)
  );

endmodule

// sum4_ms: modulo-scheduled E = (A + B) + (C + D) over arrays in memory.
//
// One iteration of a repeating calculation reads A, B, C and D and writes
// E = (A+B)+(C+D). With a dual-port memory and a single adder each iteration
// needs 3 memory cycles (two double loads and a store) and 3 additions, so
// the shortest repeating section is 3 cycles. The schedule wraps one
// iteration around that section; in section s:
//
//   cycle  port 1     port 2          adder
//   0      load A[s]  load B[s]       E    <- T + U   (iteration s-1)
//   1      load C[s]  load D[s]       T    <- A + B   (iteration s)
//   2      -          store E[s-1]    U    <- C + D   (iteration s)
//
// Loads land in registers R1 (port 1) and R2 (port 2) at the end of their
// cycle. Section 0 leaves out the parts of iteration -1 and a final section N
// keeps only them, so N iterations take 3(N+1) cycles: two iterations are in
// flight in every section. Where the arrays are is this design's choice: the
// element of iteration i of array X is at address base_x + i (modulo 2^AW).
// Data are DW-bit and the sums wrap modulo 2^DW.
//
// The dual-port memory (dp_mem) is inside. While the unit is idle, a host
// reads and writes it through port 2 (host_a, host_we, host_wd, host_rd).
//
// Interface: clk, rst (synchronous), start (one cycle while idle), n
// (iterations), base_a..base_e; busy while running; done from the end of a
// run until the next start. Timing: busy for exactly 3(n+1) cycles.
module sum4_ms #(
  parameter int unsigned DW = 8,
  parameter int unsigned AW = 8
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          start,
  input  logic [AW-1:0] n,
  input  logic [AW-1:0] base_a,
  input  logic [AW-1:0] base_b,
  input  logic [AW-1:0] base_c,
  input  logic [AW-1:0] base_d,
  input  logic [AW-1:0] base_e,
  output logic          busy,
  output logic          done,
  input  logic          host_we,
  input  logic [AW-1:0] host_a,
  input  logic [DW-1:0] host_wd,
  output logic [DW-1:0] host_rd
);

  logic [1:0]    phase;
  logic [AW:0]   sec;                         // section number 0..n
  logic [AW-1:0] n_q, ba, bb, bc, bd, be;
  logic [AW-1:0] idx, a1, a2;
  logic [DW-1:0] d1, d2, wd2, r1, r2, t_q, u_q, e_q, add_x, add_y, add_s;
  logic          we2, iter_live, prev_live;

  // ---------------- sequencing ----------------
  always_ff @(posedge clk) begin
    if (rst) begin
      busy  <= 1'b0;
      done  <= 1'b0;
      phase <= '0;
      sec   <= '0;
    end else if (!busy) begin
      if (start) begin
        busy  <= 1'b1;
        done  <= 1'b0;
        phase <= '0;
        sec   <= '0;
        n_q   <= n;
        {ba, bb, bc, bd, be} <= {base_a, base_b, base_c, base_d, base_e};
      end
    end else if (phase == 2'd2) begin
      phase <= '0;
      if (sec == (AW+1)'(n_q)) begin
        busy <= 1'b0;
        done <= 1'b1;
      end else begin
        sec <= sec + 1'b1;
      end
    end else begin
      phase <= phase + 2'd1;
    end
  end

  assign idx       = sec[AW-1:0];
  assign iter_live = busy && (sec < (AW+1)'(n_q));   // iteration s present
  assign prev_live = busy && (sec != '0);            // iteration s-1 present

  // ---------------- memory ports ----------------
  always_comb begin
    a1  = '0;
    a2  = host_a;
    we2 = 1'b0;
    wd2 = host_wd;
    if (!busy) begin
      we2 = host_we;
    end else begin
      unique case (phase)
        2'd0:    begin a1 = ba + idx; a2 = bb + idx; end
        2'd1:    begin a1 = bc + idx; a2 = bd + idx; end
        default: begin a2 = be + idx - AW'(1); we2 = prev_live; wd2 = e_q; end
      endcase
    end
  end

  dp_mem #(.DW(DW), .AW(AW)) u_mem (
    .clk, .a1, .d1, .a2, .d2, .we2, .wd2
  );

  assign host_rd = d2;

  // ---------------- the single adder ----------------
  assign add_x = (phase == 2'd0) ? t_q : r1;
  assign add_y = (phase == 2'd0) ? u_q : r2;
  assign add_s = add_x + add_y;

  always_ff @(posedge clk) begin
    if (busy) begin
      unique case (phase)
        2'd0: begin
          if (iter_live) begin r1 <= d1; r2 <= d2; end
          if (prev_live) e_q <= add_s;
        end
        2'd1: begin
          if (iter_live) begin r1 <= d1; r2 <= d2; t_q <= add_s; end
        end
        default: begin
          if (iter_live) u_q <= add_s;
        end
      endcase
    end
  end

  a_no_store_when_idle_start: assert property (@(posedge clk) disable iff (rst)
    (busy && phase == 2'd2 && sec == '0) |-> !we2);

endmodule

// The five adder rows of the 4x4 pipelined array multiplier.
//
// Row k reads the bundle held by latch bar k-1 (bar 0 holds the operands) and
// produces the bundle that latch bar k captures. The adder positions follow
// the published floorplan, where bit weights are the product columns s0..s7:
//   row 1 : adders at weights 1..3, adding partial products b0*A and b1*A
//   row 2 : adders at weights 2..4, adding b2*A into the carry-save pair
//   row 3 : adders at weights 3..5, adding b3*A into the carry-save pair
//   row 4 : adders at weights 4 and 5, a two-bit ripple of the carry-propagate
//           adder
//   row 5 : one adder at weight 6; its carry is product bit 7
// Rows 1..3 are carry-save: every carry moves one weight up into the next
// row. Partial products are formed where they enter a row, from the operands
// that travel down with the data. Twelve adders in all. Which signal feeds
// which adder input, and the ripple inside row 4, are this design's reading
// of the floorplan. Purely combinational: one adder delay per row, two in
// row 4.
module mult_rows
  import mult_pkg::*;
#(
  parameter int unsigned FA_STYLE = 1
) (
  input  stage_t bar0_q,   // latch bar k-1 feeds row k
  input  stage_t bar1_q,
  input  stage_t bar2_q,
  input  stage_t bar3_q,
  input  stage_t bar4_q,
  output stage_t row1_d,   // row k is captured by latch bar k
  output stage_t row2_d,
  output stage_t row3_d,
  output stage_t row4_d,
  output stage_t row5_d
);
  // ---------------- row 1 ----------------
  logic [N-1:0] pp0, pp1, pp2, pp3;
  assign pp0 = bar0_q.a & {N{bar0_q.b[0]}};
  assign pp1 = bar0_q.a & {N{bar0_q.b[1]}};

  logic [3:1] r1_s;
  logic [4:2] r1_c;
  for (genvar w = 1; w <= 3; w++) begin : g_r1
    array_adder #(.STYLE(FA_STYLE)) u_add (
      .x(pp0[w]), .y(pp1[w-1]), .z(1'b0), .sum(r1_s[w]), .cout(r1_c[w+1])
    );
  end

  always_comb begin
    row1_d        = '0;
    row1_d.a      = bar0_q.a;
    row1_d.b      = bar0_q.b;
    row1_d.p[0]   = pp0[0];
    row1_d.s[3:1] = r1_s;
    row1_d.s[4]   = pp1[3];
    row1_d.c[4:2] = r1_c;
  end

  // ---------------- row 2 ----------------
  assign pp2 = bar1_q.a & {N{bar1_q.b[2]}};
  logic [4:2] r2_s;
  logic [5:3] r2_c;
  for (genvar w = 2; w <= 4; w++) begin : g_r2
    array_adder #(.STYLE(FA_STYLE)) u_add (
      .x(bar1_q.s[w]), .y(pp2[w-2]), .z(bar1_q.c[w]),
      .sum(r2_s[w]), .cout(r2_c[w+1])
    );
  end

  always_comb begin
    row2_d        = '0;
    row2_d.a      = bar1_q.a;
    row2_d.b      = bar1_q.b;
    row2_d.p[0]   = bar1_q.p[0];
    row2_d.p[1]   = bar1_q.s[1];
    row2_d.s[4:2] = r2_s;
    row2_d.s[5]   = pp2[3];
    row2_d.c[5:3] = r2_c;
  end

  // ---------------- row 3 ----------------
  assign pp3 = bar2_q.a & {N{bar2_q.b[3]}};
  logic [5:3] r3_s;
  logic [6:4] r3_c;
  for (genvar w = 3; w <= 5; w++) begin : g_r3
    array_adder #(.STYLE(FA_STYLE)) u_add (
      .x(bar2_q.s[w]), .y(pp3[w-3]), .z(bar2_q.c[w]),
      .sum(r3_s[w]), .cout(r3_c[w+1])
    );
  end

  always_comb begin
    row3_d        = '0;
    row3_d.a      = bar2_q.a;
    row3_d.b      = bar2_q.b;
    row3_d.p[1:0] = bar2_q.p[1:0];
    row3_d.p[2]   = bar2_q.s[2];
    row3_d.s[5:3] = r3_s;
    row3_d.s[6]   = pp3[3];
    row3_d.c[6:4] = r3_c;
  end

  // ---------------- row 4: carry-propagate, weights 4 and 5 ----------------
  logic r4_s4, r4_s5, r4_k5, r4_k6;
  array_adder #(.STYLE(FA_STYLE)) u_r4_w4 (
    .x(bar3_q.s[4]), .y(bar3_q.c[4]), .z(1'b0), .sum(r4_s4), .cout(r4_k5)
  );
  array_adder #(.STYLE(FA_STYLE)) u_r4_w5 (
    .x(bar3_q.s[5]), .y(bar3_q.c[5]), .z(r4_k5), .sum(r4_s5), .cout(r4_k6)
  );

  always_comb begin
    row4_d        = '0;
    row4_d.a      = bar3_q.a;
    row4_d.b      = bar3_q.b;
    row4_d.p[2:0] = bar3_q.p[2:0];
    row4_d.p[3]   = bar3_q.s[3];
    row4_d.p[4]   = r4_s4;
    row4_d.p[5]   = r4_s5;
    row4_d.s[6]   = bar3_q.s[6];
    row4_d.c[6]   = bar3_q.c[6];
    row4_d.r      = r4_k6;
  end

  // ---------------- row 5: carry-propagate, weight 6 ----------------
  logic r5_s6, r5_k7;
  array_adder #(.STYLE(FA_STYLE)) u_r5_w6 (
    .x(bar4_q.s[6]), .y(bar4_q.c[6]), .z(bar4_q.r), .sum(r5_s6), .cout(r5_k7)
  );

  always_comb begin
    row5_d        = '0;
    row5_d.a      = bar4_q.a;
    row5_d.b      = bar4_q.b;
    row5_d.p[5:0] = bar4_q.p[5:0];
    row5_d.p[6]   = r5_s6;
    row5_d.p[7]   = r5_k7;
  end
endmodule

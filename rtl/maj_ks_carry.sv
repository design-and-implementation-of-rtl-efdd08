// Kogge-Stone carry network in majority logic.
//
// Bit 0 first absorbs the input carry, C1 = M(a0, b0, C0), and is held as the
// resolved pair (C1, C1); every other bit i starts as the pair (a_i, b_i). In
// prefix stage k (k = 1 .. ceil(log2 WIDTH)), with d = 2^(k-1), each position
// i >= d merges its pair with that of position i - d; lower positions pass
// their pair on. When the lower group already reaches bit 0 (i < 2d) it is a
// carry C, and the merge M(x, y, C) is a single majority gate yielding the
// carry C_{i+1}; otherwise the full two-gate prefix operator is used. After
// the last stage every position i holds C_{i+1}.
//
// Depth: one gate for C1 plus one per stage, so all carries are ready after
// log2(WIDTH) + 1 majority gate delays (four for the 8-bit adder, whose carry
// C8 takes twelve majority gates). Folding C0 in at bit 0 and reusing the
// lower carries follows the source formulation; the graph is the usual
// Kogge-Stone graph with the majority operator in its nodes. Widths that are
// not powers of two are accepted (the graph is truncated at the top).
// CARRY_DELAY states the carry depth in majority gates for users and benches.
//
// Interface: a, b, c0 in; c[0] = C0 and c[i] = C_i for i = 1 .. WIDTH, so
// c[WIDTH] is the output carry. Purely combinational.
module maj_ks_carry
  import maj_pkg::*;
#(
  parameter int unsigned WIDTH = 8
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             c0,
  output logic [WIDTH:0]   c
);

  localparam int unsigned STAGES      = prefix_stages(KOGGE_STONE, WIDTH);
  localparam int unsigned CARRY_DELAY = STAGES + 1;

  for (genvar k = 0; k <= STAGES; k++) begin : stg
    localparam int D = (k == 0) ? 0 : (1 << (k - 1));
    maj_pair_t p [WIDTH];
    for (genvar i = 0; i < WIDTH; i++) begin : bitpos
      if (k == 0 && i == 0) begin : g_c1
        logic c1;
        maj_gate u_c1 (.x(a[0]), .y(b[0]), .z(c0), .m(c1));
        assign p[i] = '{x: c1, y: c1};
      end else if (k == 0) begin : g_init
        assign p[i] = '{x: a[i], y: b[i]};
      end else if (i >= 2 * D) begin : g_op
        maj_prefix_op u_op (
          .hi (stg[k-1].p[i]),
          .lo (stg[k-1].p[i - D]),
          .res(p[i])
        );
      end else if (i >= D) begin : g_carry_op
        logic cy;
        maj_gate u_cy (.x(stg[k-1].p[i].x), .y(stg[k-1].p[i].y), .z(stg[k-1].p[i - D].x), .m(cy));
        assign p[i] = '{x: cy, y: cy};
      end else begin : g_pass
        assign p[i] = stg[k-1].p[i];
      end
    end
  end

  // After the last stage every position holds a resolved carry.
  assign c[0] = c0;
  for (genvar i = 0; i < WIDTH; i++) begin : g_carry
    assign c[i+1] = stg[STAGES].p[i].x;
  end

endmodule

// Ladner-Fischer carry network in majority logic.
//
// Bit 0 first absorbs the input carry, C1 = M(a0, b0, C0), held as the
// resolved pair (C1, C1); every other bit i starts as the pair (a_i, b_i). In
// prefix stage k (k = 1 .. ceil(log2 WIDTH)) the bits are split into blocks
// of 2^k; each position in the upper half of a block merges with the top
// position J of the lower half, which already covers [J : block start]. This
// is the minimum-depth (Sklansky) form of the Ladner-Fischer graph, with its
// high fan-out. In the lowest block J's group reaches bit 0 and is a carry, so
// the merge is a single majority gate; elsewhere it is the two-gate majority
// prefix operator. After the last stage position i holds C_{i+1}.
//
// Depth: log2(WIDTH) + 1 majority gate delays, four for 8 bits, as for
// Kogge-Stone, with fewer operators. CARRY_DELAY states this depth for users
// and benches.
//
// Interface: a, b, c0 in; c[0] = C0, c[i] = C_i, c[WIDTH] = output carry.
// Purely combinational.
module maj_lf_carry
  import maj_pkg::*;
#(
  parameter int unsigned WIDTH = 8
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             c0,
  output logic [WIDTH:0]   c
);

  localparam int unsigned STAGES      = prefix_stages(LADNER_FISCHER, WIDTH);
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
      end else if ((i / D) % 2 == 1 && i >= 2 * D) begin : g_op
        // Top position of the lower half of this block.
        localparam int J = (i / D) * D - 1;
        maj_prefix_op u_op (
          .hi (stg[k-1].p[i]),
          .lo (stg[k-1].p[J]),
          .res(p[i])
        );
      end else if ((i / D) % 2 == 1) begin : g_carry_op
        // Lowest block: the lower half ends at bit 0 and is a carry.
        logic cy;
        maj_gate u_cy (.x(stg[k-1].p[i].x), .y(stg[k-1].p[i].y), .z(stg[k-1].p[D-1].x), .m(cy));
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

// Brent-Kung carry network in majority logic.
//
// Bit 0 first absorbs the input carry, C1 = M(a0, b0, C0), held as the
// resolved pair (C1, C1); every other bit i starts as the pair (a_i, b_i).
// With L = ceil(log2 WIDTH), stages 1 .. L form the up-sweep: in stage k,
// with d = 2^(k-1), every position i with (i + 1) a multiple of 2d merges with
// position i - d, building groups of 2d bits; the group at i = 2d - 1 reaches
// bit 0, so that merge is a single majority gate giving the carry C_{2d}.
// Stages L+1 .. 2L-1 form the down-sweep: with d running from 2^(L-2) down to
// 1, every position i with (i + 1) an odd multiple of d above d merges with
// position i - d, which already holds the carry C_{i-d+1}; these are all
// single-gate carry merges. Other merges use the two-gate majority prefix
// operator. After 2L-1 stages position i holds C_{i+1}.
//
// Depth: the stage count bounds the carry delay at 2*log2(WIDTH) majority
// gates (five stages plus the C1 gate, six for 8 bits), the figure usually
// quoted for this graph, and CARRY_DELAY states that bound. The slowest
// carries pass through stage L untouched, so the longest gate path is in fact
// one gate shorter (five gates at 8 bits). The carry of the top bit follows
// only the up-sweep and is ready after log2(WIDTH) + 1 delays, as in the other
// two graphs. Of the three graphs this one uses the fewest gates.
//
// Interface: a, b, c0 in; c[0] = C0, c[i] = C_i, c[WIDTH] = output carry.
// Purely combinational.
module maj_bk_carry
  import maj_pkg::*;
#(
  parameter int unsigned WIDTH = 8
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             c0,
  output logic [WIDTH:0]   c
);

  localparam int unsigned L           = levels(WIDTH);
  localparam int unsigned STAGES      = prefix_stages(BRENT_KUNG, WIDTH);
  localparam int unsigned CARRY_DELAY = STAGES + 1;

  for (genvar k = 0; k <= STAGES; k++) begin : stg
    // Distance spanned by the merges of this stage.
    localparam int D = (k == 0) ? 0
                     : (k <= L) ? (1 << (k - 1))
                                : (1 << (2 * L - 1 - k));
    localparam bit UP = (k <= L);
    maj_pair_t p [WIDTH];
    for (genvar i = 0; i < WIDTH; i++) begin : bitpos
      if (k == 0 && i == 0) begin : g_c1
        logic c1;
        maj_gate u_c1 (.x(a[0]), .y(b[0]), .z(c0), .m(c1));
        assign p[i] = '{x: c1, y: c1};
      end else if (k == 0) begin : g_init
        assign p[i] = '{x: a[i], y: b[i]};
      end else if (UP && ((i + 1) % (2 * D)) == 0 && i + 1 > 2 * D) begin : g_op
        maj_prefix_op u_op (
          .hi (stg[k-1].p[i]),
          .lo (stg[k-1].p[i - D]),
          .res(p[i])
        );
      end else if (( UP && i + 1 == 2 * D) ||
                   (!UP && ((i + 1) % (2 * D)) == D && (i + 1) > D)) begin : g_carry_op
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

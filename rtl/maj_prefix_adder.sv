// n-bit majority-logic parallel prefix adder.
//
// The adder computes {cout, sum} = a + b + cin using only three-input majority
// gates and inverters. The carries come from a prefix network whose nodes are
// the two-gate majority prefix operator: no generate or propagate signals are
// formed and every prefix stage costs one majority gate delay. The input
// carry is absorbed at bit 0 (C1 = M(a0, b0, cin)) and the lower carries are
// reused for the higher ones. The output carry is ready after log2(WIDTH) + 1
// gate delays in all three graphs; all carries are ready after the same
// log2(WIDTH) + 1 for Kogge-Stone and Ladner-Fischer, and within
// 2*log2(WIDTH) for Brent-Kung. The sum stage then adds two gate delays
// (see maj_sum).
//
// TOPOLOGY picks the prefix graph. The default, Kogge-Stone with WIDTH = 8, is
// the main configuration of the source design; Ladner-Fischer and Brent-Kung
// are the same operator on the other two graphs it presents. The design is
// purely combinational; registering the inputs and outputs for a clocked
// system is left to the user.
//
// Interface: a, b (WIDTH bits), cin in; sum (WIDTH bits), cout out.
module maj_prefix_adder
  import maj_pkg::*;
#(
  parameter int unsigned      WIDTH    = 8,
  parameter prefix_topology_e TOPOLOGY = KOGGE_STONE
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  output logic [WIDTH-1:0] sum,
  output logic             cout
);

  logic [WIDTH:0] c;

  if (TOPOLOGY == LADNER_FISCHER) begin : g_net
    maj_lf_carry #(.WIDTH(WIDTH)) u_carry (.a(a), .b(b), .c0(cin), .c(c));
  end else if (TOPOLOGY == BRENT_KUNG) begin : g_net
    maj_bk_carry #(.WIDTH(WIDTH)) u_carry (.a(a), .b(b), .c0(cin), .c(c));
  end else begin : g_net
    maj_ks_carry #(.WIDTH(WIDTH)) u_carry (.a(a), .b(b), .c0(cin), .c(c));
  end

  maj_sum #(.WIDTH(WIDTH)) u_sum (.a(a), .b(b), .c(c), .s(sum));

  assign cout = c[WIDTH];

endmodule

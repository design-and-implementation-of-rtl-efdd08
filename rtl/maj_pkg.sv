// Shared types and constants of the majority-logic prefix adders.
//
// A group of adjacent bit positions [i:j] is carried through every prefix
// network as a pair (x, y) of signals, maj_pair_t, rather than as the usual
// generate/propagate pair. The carry leaving the group is the majority
// M(x, y, cin) of the pair and the carry entering it. A single bit i starts as
// the pair (a_i, b_i), so no generate or propagate signal is ever formed.
//
// prefix_topology_e selects which prefix graph an adder uses. The stage-count
// functions give, for an n-bit adder, the number of operator stages of each
// graph; the carries are ready one majority gate later, when C0 is merged.
package maj_pkg;

  typedef struct packed {
    logic x;
    logic y;
  } maj_pair_t;

  typedef enum logic [1:0] {
    KOGGE_STONE    = 2'd0,
    LADNER_FISCHER = 2'd1,
    BRENT_KUNG     = 2'd2
  } prefix_topology_e;

  // Number of prefix levels needed to cover n bits: ceil(log2(n)).
  function automatic int unsigned levels(input int unsigned n);
    int unsigned l;
    l = 0;
    while ((1 << l) < n) l++;
    return l;
  endfunction

  // Operator stages of each graph. Brent-Kung needs 2*log2(n)-1 stages
  // (an up-sweep of log2(n) and a down-sweep of log2(n)-1); the other two
  // need log2(n).
  function automatic int unsigned prefix_stages(input prefix_topology_e topo,
                                                input int unsigned n);
    int unsigned l;
    l = levels(n);
    if (topo == BRENT_KUNG && l > 1) return 2 * l - 1;
    return l;
  endfunction

endpackage

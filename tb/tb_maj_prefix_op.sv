// Self-checking testbench of maj_prefix_op. For all 16 pairs of input pairs it
// checks that the merged pair acts on a carry-in exactly as the two groups do
// in sequence, M(res, c) == M(hi, M(lo, c)) for c = 0 and 1, and that the
// gates produce the expected pair (M(hi.x, hi.y, lo.x), M(hi.x, hi.y, lo.y)).
// It also checks associativity: (p2 o p1) o p0 == p2 o (p1 o p0) over all 64
// triples, using two further operator instances.
module tb_maj_prefix_op;
  import maj_pkg::*;

  maj_pair_t hi, lo, res;
  maj_pair_t p2, p1, p0, l21, l_left, l10, l_right;
  int checks = 0, failures = 0;

  maj_prefix_op dut (.hi(hi), .lo(lo), .res(res));

  // (p2 o p1) o p0 and p2 o (p1 o p0)
  maj_prefix_op u_a1 (.hi(p2),  .lo(p1),  .res(l21));
  maj_prefix_op u_a2 (.hi(l21), .lo(p0),  .res(l_left));
  maj_prefix_op u_b1 (.hi(p1),  .lo(p0),  .res(l10));
  maj_prefix_op u_b2 (.hi(p2),  .lo(l10), .res(l_right));

  function automatic logic vote(input logic p, input logic q, input logic r);
    return (int'(p) + int'(q) + int'(r)) >= 2;
  endfunction

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 16; v++) begin
      {hi, lo} = 4'(v);
      #1;
      for (int cin = 0; cin < 2; cin++) begin
        checks++;
        if (vote(res.x, res.y, 1'(cin)) !== vote(hi.x, hi.y, vote(lo.x, lo.y, 1'(cin)))) begin
          failures++;
          $display("FAIL compose hi=%b lo=%b c=%0d res=%b", hi, lo, cin, res);
        end
      end
      checks++;
      if (res !== {vote(hi.x, hi.y, lo.x), vote(hi.x, hi.y, lo.y)}) begin
        failures++;
        $display("FAIL pair hi=%b lo=%b res=%b", hi, lo, res);
      end
    end
    for (int v = 0; v < 64; v++) begin
      {p2, p1, p0} = 6'(v);
      #1;
      checks++;
      if (l_left !== l_right) begin
        failures++;
        $display("FAIL assoc %b %b %b: %b vs %b", p2, p1, p0, l_left, l_right);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// Test harness for one majority carry network (tb use only).
//
// Instantiates the network selected by TOPOLOGY at WIDTH bits and compares
// every carry c[i] with the carry into bit i of a + b + c0, computed with
// ordinary integer addition of the operands masked to bits below i. Inputs
// are exhaustive when 2*WIDTH+1 <= 17, otherwise NRAND random vectors, a
// third of them with b = ~a so that carries run the whole length. It also
// checks the network's stage count and carry delay in majority gates against
// the figures for each graph: log2(n)+1 for Kogge-Stone and Ladner-Fischer,
// 2*log2(n) for Brent-Kung (2*log2(n)-1 stages plus the C1 gate).
// Reports its counts through ports and raises done when finished.
module carry_harness
  import maj_pkg::*;
#(
  parameter int unsigned      WIDTH    = 8,
  parameter prefix_topology_e TOPOLOGY = KOGGE_STONE,
  parameter int unsigned      NRAND    = 2000
) (
  output int   checks,
  output int   failures,
  output logic done
);

  logic [WIDTH-1:0] a, b;
  logic             c0;
  logic [WIDTH:0]   c;
  int               stages, delay;

  if (TOPOLOGY == LADNER_FISCHER) begin : g_net
    maj_lf_carry #(.WIDTH(WIDTH)) u (.a(a), .b(b), .c0(c0), .c(c));
    assign stages = int'(u.STAGES);
    assign delay  = int'(u.CARRY_DELAY);
  end else if (TOPOLOGY == BRENT_KUNG) begin : g_net
    maj_bk_carry #(.WIDTH(WIDTH)) u (.a(a), .b(b), .c0(c0), .c(c));
    assign stages = int'(u.STAGES);
    assign delay  = int'(u.CARRY_DELAY);
  end else begin : g_net
    maj_ks_carry #(.WIDTH(WIDTH)) u (.a(a), .b(b), .c0(c0), .c(c));
    assign stages = int'(u.STAGES);
    assign delay  = int'(u.CARRY_DELAY);
  end

  task automatic check_vector();
    logic [WIDTH:0] ma, mb, s;
    #1;
    for (int i = 0; i <= WIDTH; i++) begin
      ma = '0;
      mb = '0;
      for (int j = 0; j < i; j++) begin
        ma[j] = a[j];
        mb[j] = b[j];
      end
      s = ma + mb + (WIDTH+1)'(c0);
      checks++;
      if (c[i] !== s[i]) begin
        failures++;
        if (failures < 10)
          $display("FAIL %s W=%0d a=%h b=%h c0=%b: c[%0d]=%b expected %b",
                   TOPOLOGY.name(), WIDTH, a, b, c0, i, c[i], s[i]);
      end
    end
  endtask

  initial begin
    int unsigned lg, exp_stages, exp_delay;
    logic [127:0] r;
    checks   = 0;
    failures = 0;
    done     = 1'b0;
    a        = '0;
    b        = '0;
    c0       = 1'b0;
    lg = $clog2(WIDTH);
    exp_stages = (TOPOLOGY == BRENT_KUNG && lg > 1) ? 2 * lg - 1 : lg;
    exp_delay  = (TOPOLOGY == BRENT_KUNG && lg > 1) ? 2 * lg : lg + 1;
    #1;
    checks += 2;
    if (stages != int'(exp_stages) || delay != int'(exp_delay)) begin
      failures++;
      $display("FAIL %s W=%0d: %0d stages / %0d gate delays, expected %0d / %0d",
               TOPOLOGY.name(), WIDTH, stages, delay, exp_stages, exp_delay);
    end
    if (2 * WIDTH + 1 <= 17) begin
      for (int v = 0; v < (1 << (2 * WIDTH + 1)); v++) begin
        {a, b, c0} = (2*WIDTH+1)'(v);
        check_vector();
      end
    end else begin
      for (int n = 0; n < int'(NRAND); n++) begin
        r  = {$urandom, $urandom, $urandom, $urandom};
        a  = r[WIDTH-1:0];
        r  = {$urandom, $urandom, $urandom, $urandom};
        b  = (n % 3 == 0) ? ~a : r[WIDTH-1:0];
        c0 = 1'($urandom);
        check_vector();
      end
    end
    done = 1'b1;
  end

endmodule

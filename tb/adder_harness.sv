// Test harness for one maj_prefix_adder configuration (tb use only).
//
// Drives the adder with every input when 2*WIDTH+1 <= 17, otherwise with NRAND
// random vectors (a third of them with b = ~a so that the carry runs through
// every bit), and compares {cout, sum} with a + b + cin. It counts how often
// the adder's mechanisms were exercised: a carry-in of 1, an output carry
// (overflow), and a full-length propagation where cin alone sets every carry.
// Reports its counts through ports and raises done when finished.
module adder_harness
  import maj_pkg::*;
#(
  parameter int unsigned      WIDTH    = 8,
  parameter prefix_topology_e TOPOLOGY = KOGGE_STONE,
  parameter int unsigned      NRAND    = 2000
) (
  output int   checks,
  output int   failures,
  output int   n_cin,
  output int   n_cout,
  output int   n_full_prop,
  output logic done
);

  logic [WIDTH-1:0] a, b, sum;
  logic             cin, cout;

  maj_prefix_adder #(.WIDTH(WIDTH), .TOPOLOGY(TOPOLOGY)) dut (
    .a(a), .b(b), .cin(cin), .sum(sum), .cout(cout)
  );

  task automatic check_vector();
    logic [WIDTH:0] exp;
    exp = {1'b0, a} + {1'b0, b} + (WIDTH+1)'(cin);
    #1;
    checks++;
    if ({cout, sum} !== exp) begin
      failures++;
      if (failures < 10)
        $display("FAIL %s W=%0d a=%h b=%h cin=%b: got %b_%h expected %b_%h",
                 TOPOLOGY.name(), WIDTH, a, b, cin, cout, sum, exp[WIDTH], exp[WIDTH-1:0]);
    end
    if (cin) n_cin++;
    if (cout) n_cout++;
    if (cin && (a ^ b) == '1) n_full_prop++;
  endtask

  initial begin
    logic [127:0] r;
    checks      = 0;
    failures    = 0;
    n_cin       = 0;
    n_cout      = 0;
    n_full_prop = 0;
    done        = 1'b0;
    if (2 * WIDTH + 1 <= 17) begin
      for (int v = 0; v < (1 << (2 * WIDTH + 1)); v++) begin
        {a, b, cin} = (2*WIDTH+1)'(v);
        check_vector();
      end
    end else begin
      for (int n = 0; n < int'(NRAND); n++) begin
        r   = {$urandom, $urandom, $urandom, $urandom};
        a   = r[WIDTH-1:0];
        r   = {$urandom, $urandom, $urandom, $urandom};
        b   = (n % 3 == 0) ? ~a : r[WIDTH-1:0];
        cin = 1'($urandom);
        check_vector();
      end
    end
    done = 1'b1;
  end

endmodule

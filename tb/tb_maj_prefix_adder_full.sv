// Full-size testbench of maj_prefix_adder at its default configuration
// (8-bit Kogge-Stone), with no parameter overridden. Applies all 2^17
// combinations of a, b and cin and compares {cout, sum} with a + b + cin.
// Counts carry-ins, output carries and end-to-end carry propagations, and
// fails if any of them never happens.
module tb_maj_prefix_adder_full;
  localparam int W = 8;

  logic [W-1:0] a, b, sum;
  logic         cin, cout;
  int checks = 0, failures = 0;
  int n_cin = 0, n_cout = 0, n_prop = 0;

  maj_prefix_adder dut (.a(a), .b(b), .cin(cin), .sum(sum), .cout(cout));

  initial begin : watchdog
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [W:0] exp;
    for (int v = 0; v < (1 << (2 * W + 1)); v++) begin
      {a, b, cin} = (2*W+1)'(v);
      exp = {1'b0, a} + {1'b0, b} + (W+1)'(cin);
      #1;
      checks++;
      if ({cout, sum} !== exp) begin
        failures++;
        if (failures < 10) $display("FAIL a=%h b=%h cin=%b got %b_%h", a, b, cin, cout, sum);
      end
      if (cin) n_cin++;
      if (cout) n_cout++;
      if (cin && (a ^ b) == '1) n_prop++;
    end
    $display("cin=%0d cout=%0d full_propagate=%0d", n_cin, n_cout, n_prop);
    checks += 3;
    if (n_cin == 0)  failures++;
    if (n_cout == 0) failures++;
    if (n_prop == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

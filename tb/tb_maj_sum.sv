// Self-checking testbench of maj_sum at its default 8 bits. For all 2^17 combinations of
// a, b and C0 the bench computes the carries itself, by integer addition of
// the operands masked below each bit, drives them into the sum stage and
// compares the result with the low 8 bits of a + b + C0.
module tb_maj_sum;
  localparam int W = 8;

  logic [W-1:0] a, b, s;
  logic [W:0]   c;
  int checks = 0, failures = 0;

  maj_sum dut (.a(a), .b(b), .c(c), .s(s));

  initial begin : watchdog
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [W:0] full, part;
    logic       c0;
    for (int v = 0; v < (1 << (2 * W + 1)); v++) begin
      {a, b, c0} = (2*W+1)'(v);
      for (int i = 0; i <= W; i++) begin
        part = ({1'b0, a} & ((W+1)'(1) << i) - 1'b1) + ({1'b0, b} & ((W+1)'(1) << i) - 1'b1) + (W+1)'(c0);
        c[i] = part[i];
      end
      full = {1'b0, a} + {1'b0, b} + (W+1)'(c0);
      #1;
      checks++;
      if (s !== full[W-1:0]) begin
        failures++;
        if (failures < 10) $display("FAIL a=%h b=%h c0=%b s=%h expected %h", a, b, c0, s, full[W-1:0]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// Self-checking testbench of maj_gate: all eight input combinations, each
// compared with "at least two of three inputs are 1" counted in the bench.
module tb_maj_gate;
  logic x, y, z, m;
  int checks = 0, failures = 0;

  maj_gate dut (.x(x), .y(y), .z(z), .m(m));

  initial begin : watchdog
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      {x, y, z} = 3'(v);
      #1;
      checks++;
      if (m !== ((int'(x) + int'(y) + int'(z)) >= 2)) begin
        failures++;
        $display("FAIL x=%0b y=%0b z=%0b m=%0b", x, y, z, m);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

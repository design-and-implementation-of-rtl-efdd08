// End-to-end testbench of maj_prefix_adder. Runs the adder in each of its
// three prefix graphs: all 2^17 inputs at the default 8 bits for Kogge-Stone,
// Ladner-Fischer and Brent-Kung, and random inputs at 13, 16, 32 and 64 bits.
// Every sum and output carry is compared with integer addition. The
// mechanisms of the adder (carry-in, output carry, a carry propagated from
// cin through every bit) must each occur in every configuration, and each
// graph must be exercised; a mechanism that never occurs counts as a failure.
module tb_maj_prefix_adder;
  import maj_pkg::*;

  localparam int N = 8;
  int   chk [N], fail [N], ncin [N], ncout [N], nprop [N];
  logic dn [N];
  int   checks, failures;
  int   per_topo [3];

  adder_harness #(.WIDTH(8),  .TOPOLOGY(KOGGE_STONE))    h0 (chk[0], fail[0], ncin[0], ncout[0], nprop[0], dn[0]);
  adder_harness #(.WIDTH(8),  .TOPOLOGY(LADNER_FISCHER)) h1 (chk[1], fail[1], ncin[1], ncout[1], nprop[1], dn[1]);
  adder_harness #(.WIDTH(8),  .TOPOLOGY(BRENT_KUNG))     h2 (chk[2], fail[2], ncin[2], ncout[2], nprop[2], dn[2]);
  adder_harness #(.WIDTH(16), .TOPOLOGY(KOGGE_STONE))    h3 (chk[3], fail[3], ncin[3], ncout[3], nprop[3], dn[3]);
  adder_harness #(.WIDTH(13), .TOPOLOGY(LADNER_FISCHER)) h4 (chk[4], fail[4], ncin[4], ncout[4], nprop[4], dn[4]);
  adder_harness #(.WIDTH(32), .TOPOLOGY(BRENT_KUNG))     h5 (chk[5], fail[5], ncin[5], ncout[5], nprop[5], dn[5]);
  adder_harness #(.WIDTH(64), .TOPOLOGY(KOGGE_STONE))    h6 (chk[6], fail[6], ncin[6], ncout[6], nprop[6], dn[6]);
  adder_harness #(.WIDTH(64), .TOPOLOGY(LADNER_FISCHER)) h7 (chk[7], fail[7], ncin[7], ncout[7], nprop[7], dn[7]);

  localparam prefix_topology_e TOPO [N] = '{KOGGE_STONE, LADNER_FISCHER, BRENT_KUNG, KOGGE_STONE,
                                            LADNER_FISCHER, BRENT_KUNG, KOGGE_STONE, LADNER_FISCHER};

  function automatic int total(input int v [N]);
    int s = 0;
    foreach (v[i]) s += v[i];
    return s;
  endfunction

  initial begin : watchdog
    #10000000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", total(chk), total(fail) + 1);
    $finish;
  end

  initial begin
    #1;
    wait (dn.and() == 1'b1);
    checks   = total(chk);
    failures = total(fail);
    per_topo = '{0, 0, 0};
    for (int i = 0; i < N; i++) begin
      per_topo[int'(TOPO[i])] += chk[i];
      $display("config %0d %s: checks=%0d cin=%0d cout=%0d full_propagate=%0d",
               i, TOPO[i].name(), chk[i], ncin[i], ncout[i], nprop[i]);
      checks += 3;
      if (ncin[i] == 0)  begin failures++; $display("FAIL config %0d never had cin=1", i); end
      if (ncout[i] == 0) begin failures++; $display("FAIL config %0d never overflowed", i); end
      if (nprop[i] == 0) begin failures++; $display("FAIL config %0d never propagated end to end", i); end
    end
    for (int t = 0; t < 3; t++) begin
      checks++;
      if (per_topo[t] == 0) begin
        failures++;
        $display("FAIL topology %0d never exercised", t);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

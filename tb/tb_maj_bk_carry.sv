// Self-checking testbench of maj_bk_carry: every carry of the network
// against integer addition, exhaustively at 1, 2, 3, 4, 5, 7 and 8 bits (the
// 8-bit run covers all 2^17 inputs) and at random at 12, 16, 32 and 64 bits,
// plus the stage count and carry delay of each size.
module tb_maj_bk_carry;
  import maj_pkg::*;

  localparam int N = 10;
  localparam int unsigned W [N] = '{1, 2, 3, 4, 5, 7, 8, 12, 16, 32};
  int   chk [N+1];
  int   fail [N+1];
  logic dn [N+1];
  int   checks, failures;

  for (genvar g = 0; g < N; g++) begin : g_w
    carry_harness #(.WIDTH(W[g]), .TOPOLOGY(BRENT_KUNG), .NRAND(3000))
      u_h (.checks(chk[g]), .failures(fail[g]), .done(dn[g]));
  end
  carry_harness #(.WIDTH(64), .TOPOLOGY(BRENT_KUNG), .NRAND(3000))
    u_h64 (.checks(chk[N]), .failures(fail[N]), .done(dn[N]));

  function automatic int total(input int v [N+1]);
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
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_fault_locator: checks the intersection of the two configurations' results.
// Random pass/fail vectors for both configurations are applied to a 4x4 meander
// locator and a 4x4 partition locator; every block's expected verdict is worked
// out here from pairs found by walking the meanders (or from the P_0/P_1 rule),
// together with the suspect count, the failing-pair counts and the per-block
// recorded operations. Also checked: the worked example (only the pair of
// C3R3/C3R4 fails in configuration 0 and only C3R3/C4R3 in configuration 1
// gives exactly block C3R3), and that nothing is reported until both results
// are valid.
module tb_fault_locator;
  localparam int R = 4, C = 4, N = 16, NP = 8;
  logic [1:0] valid;
  logic [NP-1:0] fail0, fail1;
  logic [NP-1:0][1:0] op0, op1;
  logic diag_valid, dv_p;
  logic [N-1:0] suspect, sus_p;
  logic [N-1:0][1:0] sop0, sop1, sop0_p, sop1_p;
  logic [4:0] n_suspect, ns_p;
  logic [3:0] n_fail0, n_fail1, nf0_p, nf1_p;
  int checks = 0, failures = 0;

  fault_locator dut (.valid(valid), .fail0(fail0), .fail1(fail1), .op0(op0), .op1(op1),
    .diag_valid(diag_valid), .suspect(suspect), .suspect_op0(sop0), .suspect_op1(sop1),
    .n_suspect(n_suspect), .n_fail0(n_fail0), .n_fail1(n_fail1));
  fault_locator #(.MAP_ALGO(bist_pkg::MAP_PARTITION)) dutp (.valid(valid), .fail0(fail0),
    .fail1(fail1), .op0(op0), .op1(op1), .diag_valid(dv_p), .suspect(sus_p),
    .suspect_op0(sop0_p), .suspect_op1(sop1_p), .n_suspect(ns_p), .n_fail0(nf0_p), .n_fail1(nf1_p));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #100000; failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int pair_walk(input bit horiz, input int blk);
    int r = 0, c = 0, dir = 1;
    for (int i = 0; i < N; i++) begin
      if (c * R + r == blk) return i / 2;
      if (!horiz) begin
        if ((dir == 1 && r == R - 1) || (dir == -1 && r == 0)) begin c++; dir = -dir; end
        else r += dir;
      end else begin
        if ((dir == 1 && c == C - 1) || (dir == -1 && c == 0)) begin r++; dir = -dir; end
        else c += dir;
      end
    end
    return -1;
  endfunction

  initial begin
    int ns, nsp, nf0, nf1;
    for (int it = 0; it < 300; it++) begin
      valid = (it < 10) ? 2'($urandom_range(0, 2)) : 2'b11;
      fail0 = 8'($urandom) & 8'($urandom);
      fail1 = 8'($urandom) & 8'($urandom);
      op0 = 16'($urandom);
      op1 = 16'($urandom);
      #1;
      ns = 0; nsp = 0; nf0 = $countones(fail0); nf1 = $countones(fail1);
      for (int b = 0; b < N; b++) begin
        automatic int p0 = pair_walk(0, b), p1 = pair_walk(1, b);
        automatic int q0 = b / 2, q1 = ((b % 2) == 1) ? (b - 1) / 2 : (b == 0 ? NP - 1 : (b - 2) / 2);
        automatic bit e  = (valid == 2'b11) && fail0[p0] && fail1[p1];
        automatic bit ep = (valid == 2'b11) && fail0[q0] && fail1[q1];
        ns += e; nsp += ep;
        check(suspect[b] == e, $sformatf("meander verdict block %0d", b));
        check(sus_p[b] == ep, $sformatf("partition verdict block %0d", b));
        check(sop0[b] == op0[p0] && sop1[b] == op1[p1], "recorded operations");
      end
      check(diag_valid == (valid == 2'b11), "diag_valid");
      check(n_suspect == 5'(ns) && ns_p == 5'(nsp), "suspect counts");
      check(n_fail0 == 4'(nf0) && n_fail1 == 4'(nf1), "failing pair counts");
    end
    valid = 2'b11;
    fail0 = 8'b0010_0000;   // pair 5 in configuration 0: C3R3 + C3R4
    fail1 = 8'b0010_0000;   // pair 5 in configuration 1: C3R3 + C4R3
    #1;
    check(suspect == 16'(1 << 10) && n_suspect == 1, "worked example isolates C3R3");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// bist_harness: drives and checks one bist_top instance. Testbench only.
//
// It holds the ROWS x COLS behavioural cores under test (core_model), injects
// faults into chosen cores, and runs diagnosis sessions: reset, a run in
// configuration 0, a run in configuration 1. For every session it works out on
// its own which pairs must fail (a pair fails when it holds a faulty core; the
// pairs are found by walking the meanders or by the P_0/P_1 rule) and which
// cores must be reported (those whose pair fails in both configurations), and
// compares with: the live pair flags when DONE rises, the serial stream on
// scan_out, the failing-pair counts, the suspect list and count, and the
// recorded operation of single faults. It also checks the cycle counts of a
// run (START high NUM_OPS*PATS_PER_OP cycles, DONE high N/2*(1+OP_W) cycles)
// and counts how often each mechanism happened. CAPTURE_OP must match the
// DUT's; with 0 the recorded-operation checks are skipped. Session 0 is fault free,
// session 1 has one fault at column 3, row 3, session 2 one fault exercised by
// a single operation (op 2), session 3 two faults, the rest one to three
// random faults.
module bist_harness #(
  parameter int unsigned         ROWS        = 4,
  parameter int unsigned         COLS        = 4,
  parameter int unsigned         PATS_PER_OP = 64,
  parameter bist_pkg::map_algo_e MAP_ALGO    = bist_pkg::MAP_MEANDER,
  parameter int unsigned         SESSIONS    = 8,
  parameter bit                  CAPTURE_OP  = 1'b1,
  parameter string               NAME        = "bist"
) (
  input  logic                              clk,
  output logic                              rst_n,
  output logic                              go,
  output logic                              cfg_sel,
  input  logic                              start,
  input  logic                              done,
  input  logic                              finished,
  input  logic                              scan_out,
  input  logic [35:0]                       core_din,
  input  logic [1:0]                        core_op,
  output logic [ROWS*COLS-1:0][47:0]        core_dout,
  input  logic [ROWS*COLS/2-1:0]            pair_flags,
  input  logic [1:0]                        result_valid,
  input  logic                              diag_valid,
  input  logic [ROWS*COLS-1:0]              suspect,
  input  logic [ROWS*COLS-1:0][1:0]         suspect_op0,
  input  logic [ROWS*COLS-1:0][1:0]         suspect_op1,
  input  logic [$clog2(ROWS*COLS+1)-1:0]    n_suspect,
  input  logic [$clog2(ROWS*COLS/2+1)-1:0]  n_fail0,
  input  logic [$clog2(ROWS*COLS/2+1)-1:0]  n_fail1,
  output logic                              finished_all,
  output int                                checks,
  output int                                failures
);
  localparam int N = ROWS * COLS, NP = N / 2, CELL = CAPTURE_OP ? 3 : 1;
  localparam int TEST_LEN = 4 * PATS_PER_OP, CHAIN = NP * CELL;

  logic [N-1:0]       fault_en;
  logic [N-1:0][5:0]  fault_bit;
  logic [N-1:0][3:0]  fault_ops;

  for (genvar b = 0; b < N; b++) begin : g_core
    core_model u_core (.clk(clk), .rst_n(rst_n), .din(core_din), .op(core_op),
      .fault_en(fault_en[b]), .fault_bit(fault_bit[b]), .fault_ops(fault_ops[b]), .p(core_dout[b]));
  end

  // mechanism counters
  int n_runs_cfg [2];
  int n_start_cycles, n_done_cycles, n_mismatch, n_isolated, n_multi, n_op_recorded, n_clean;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s: %s", NAME, what); end
  endtask

  function automatic int pair_walk(input int cfg, input int blk);
    int r = 0, c = 0, dir = 1;
    if (MAP_ALGO == bist_pkg::MAP_PARTITION) begin
      if (cfg == 0) return blk / 2;
      return (blk % 2 == 1) ? (blk - 1) / 2 : (blk == 0 ? NP - 1 : (blk - 2) / 2);
    end
    for (int i = 0; i < N; i++) begin
      if (c * ROWS + r == blk) return i / 2;
      if (cfg == 0) begin
        if ((dir == 1 && r == ROWS - 1) || (dir == -1 && r == 0)) begin c++; dir = -dir; end
        else r += dir;
      end else begin
        if ((dir == 1 && c == COLS - 1) || (dir == -1 && c == 0)) begin r++; dir = -dir; end
        else c += dir;
      end
    end
    return -1;
  endfunction

  // one run in configuration c; returns the flags seen when DONE rose
  task automatic run(input bit c, input logic [NP-1:0] exp_fail);
    int t_start = 0, t_done = 0, t_total = 0;
    logic [CHAIN-1:0] stream;
    @(negedge clk);
    cfg_sel = c; go = 1;
    @(negedge clk);
    go = 0;
    while (!finished) begin
      t_total++;
      if (start) t_start++;
      if (done) begin
        if (t_done == 0) begin
          check(pair_flags == exp_fail, $sformatf("cfg %0d pair flags %h, expected %h", c, pair_flags, exp_fail));
          for (int k = 0; k < NP; k++) if (pair_flags[k]) n_mismatch++;
        end
        stream = {stream[CHAIN-2:0], scan_out};
        t_done++;
      end
      check(t_total < 4 * (TEST_LEN + CHAIN) + 100, "run ends");
      if (t_total >= 4 * (TEST_LEN + CHAIN) + 100) break;
      @(negedge clk);
    end
    n_runs_cfg[c]++;
    n_start_cycles += t_start;
    n_done_cycles += t_done;
    check(t_start == TEST_LEN, $sformatf("START high %0d cycles, expected %0d", t_start, TEST_LEN));
    check(t_done == CHAIN, $sformatf("DONE high %0d cycles, expected %0d", t_done, CHAIN));
    check(t_total == TEST_LEN + 2 + CHAIN, $sformatf("run took %0d cycles", t_total));
    for (int k = 0; k < NP; k++)
      check(stream[k*CELL] == exp_fail[k], $sformatf("serial flag of pair %0d", k));
    @(negedge clk);
    check(result_valid[c], "result stored");
    check((c ? n_fail1 : n_fail0) == $countones(exp_fail), "failing pair count");
  endtask

  initial begin
    finished_all = 0; checks = 0; failures = 0;
    rst_n = 0; go = 0; cfg_sel = 0;
    fault_en = '0; fault_bit = '0; fault_ops = '0;
    n_runs_cfg[0] = 0; n_runs_cfg[1] = 0;
    n_start_cycles = 0; n_done_cycles = 0; n_mismatch = 0; n_isolated = 0;
    n_multi = 0; n_op_recorded = 0; n_clean = 0;
    for (int s = 0; s < SESSIONS; s++) begin
      logic [NP-1:0] f0, f1;
      logic [N-1:0] exp_sus;
      int nf, first_op;
      fault_en = '0;
      nf = (s == 0) ? 0 : (s < 3) ? 1 : (s == 3) ? 2 : int'($urandom_range(1, 3));
      for (int i = 0; i < nf; i++) begin
        automatic int b = (s == 1) ? 2 * ROWS + 2 : int'($urandom_range(0, N - 1));
        fault_en[b]  = 1;
        fault_bit[b] = 6'($urandom_range(0, 47));
        case ((s == 2) ? 2 : (s > 3) ? $urandom_range(0, 3) : 0)
          0: fault_ops[b] = 4'b1111;
          1: fault_ops[b] = 4'b0001;
          2: fault_ops[b] = 4'b0100;
          default: fault_ops[b] = 4'b0101;
        endcase
        // an operand product never reaches bits 36..47, a pass-through can:
        // make op-0-only faults hit a bit op 0 actually drives
        if (fault_ops[b] == 4'b0001 && fault_bit[b] >= 36) fault_bit[b] = 6'($urandom_range(36, 47));
      end
      f0 = '0; f1 = '0;
      for (int b = 0; b < N; b++)
        if (fault_en[b]) begin f0[pair_walk(0, b)] = 1; f1[pair_walk(1, b)] = 1; end
      for (int b = 0; b < N; b++) exp_sus[b] = f0[pair_walk(0, b)] && f1[pair_walk(1, b)];
      rst_n = 0;
      repeat (2) @(negedge clk);
      rst_n = 1;
      @(negedge clk);
      check(result_valid == 0 && !diag_valid && suspect == 0, "no diagnosis after reset");
      run(1'b0, f0);
      check(!diag_valid, "diagnosis waits for the second configuration");
      run(1'b1, f1);
      check(diag_valid, "diagnosis valid after both configurations");
      check(suspect == exp_sus, $sformatf("session %0d suspects %h, expected %h", s, suspect, exp_sus));
      check(n_suspect == $countones(exp_sus), "suspect count");
      for (int b = 0; b < N; b++) check(!fault_en[b] || suspect[b], $sformatf("faulty core %0d reported", b));
      if (nf == 0) n_clean++;
      if (nf > 1) n_multi++;
      if (nf == 1 && $countones(suspect) == 1) n_isolated++;
      if (nf == 1 && CAPTURE_OP) begin
        for (int b = 0; b < N; b++) if (fault_en[b]) begin
          first_op = (fault_ops[b][0]) ? 0 : (fault_ops[b][1]) ? 1 : (fault_ops[b][2]) ? 2 : 3;
          check(suspect_op0[b] == 2'(first_op) && suspect_op1[b] == 2'(first_op),
                $sformatf("recorded operation %0d/%0d, expected %0d", suspect_op0[b], suspect_op1[b], first_op));
          if (first_op != 0) n_op_recorded++;
        end
      end
      if (s == 1) check(suspect == N'(1) << (2 * ROWS + 2), "fault at column 3, row 3 isolated");
    end
    $display("%s mechanisms: cfg0 runs %0d, cfg1 runs %0d, START cycles %0d, DONE shift cycles %0d, pair mismatches %0d, single faults isolated %0d, multi-fault sessions %0d, non-zero operations recorded %0d, clean sessions %0d",
             NAME, n_runs_cfg[0], n_runs_cfg[1], n_start_cycles, n_done_cycles, n_mismatch, n_isolated,
             n_multi, n_op_recorded, n_clean);
    check(n_runs_cfg[0] > 0 && n_runs_cfg[1] > 0, "both configurations used");
    check(n_start_cycles > 0, "START asserted");
    check(n_done_cycles > 0, "DONE scan shift happened");
    check(n_mismatch > 0, "pair mismatch detected");
    check(n_isolated > 0, "single fault isolated");
    check(n_multi > 0, "multiple faults diagnosed");
    check(!CAPTURE_OP || n_op_recorded > 0, "failing operation recorded");
    check(n_clean > 0, "fault-free device passes");
    finished_all = 1;
  end
endmodule

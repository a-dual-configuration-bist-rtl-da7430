// tb_detector_array: checks the replicated detectors and their scan chain on a
// 2-row by 4-column grid (4 pairs, CORE_LAT = 2).
// Every block outputs the same random word except one chosen faulty block,
// which differs on chosen cycles. After the compare window the flag must be set
// exactly for the pair holding the faulty block in the active configuration
// (found here by walking the meander), with the operation that was on the bus
// CORE_LAT cycles before the first mismatch. Then done is raised for 12 cycles
// and the serial stream must be detector 3's {op, flag} first, MSB first,
// down to detector 0.
module tb_detector_array;
  localparam int R = 2, C = 4, N = 8, NP = 4, LAT = 2;
  logic clk = 0, rst_n = 0, cfg = 0, cmp_en = 0, clear = 0, done = 0;
  logic [N-1:0][47:0] core_out;
  logic [1:0] op_in = 0;
  logic scan_out;
  logic [NP-1:0] flags;
  logic [NP-1:0][1:0] op_cap;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  detector_array #(.ROWS(R), .COLS(C), .CORE_LAT(LAT)) dut (
    .clk(clk), .rst_n(rst_n), .cfg(cfg), .core_out(core_out), .cmp_en(cmp_en),
    .op_in(op_in), .clear(clear), .done(done), .scan_out(scan_out), .flags(flags), .op_cap(op_cap));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #1000000; failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int pair_of_walk(input bit horiz, input int blk);
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
    logic [1:0] ops [$];
    logic [1:0] exp_op;
    int fb, fail_t, kp;
    logic [11:0] image;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int run = 0; run < 16; run++) begin
      cfg = 1'(run % 2);
      fb = $urandom_range(0, N - 1);
      fail_t = $urandom_range(LAT + 3, 40);
      clear = 1; @(negedge clk); clear = 0;
      ops = {};
      exp_op = 0;
      for (int t = 0; t < 50; t++) begin
        op_in = 2'($urandom);
        ops.push_back(op_in);
        cmp_en = (t >= LAT);
        for (int b = 0; b < N; b++) core_out[b] = 48'(t * 7919 + run);
        if (t >= fail_t && (t % 3 == 0 || t == fail_t)) core_out[fb] ^= 48'h8000_0000_0001;
        if (t == fail_t) exp_op = ops[t - LAT];
        @(negedge clk);
      end
      cmp_en = 0;
      kp = pair_of_walk(cfg, fb);
      for (int k = 0; k < NP; k++) begin
        check(flags[k] == (k == kp), $sformatf("run %0d flag of pair %0d (faulty block %0d)", run, k, fb));
        if (k == kp) check(op_cap[k] == exp_op, "recorded operation");
      end
      for (int k = 0; k < NP; k++) image[k*3 +: 3] = {(k == kp) ? exp_op : 2'b00, k == kp};
      done = 1;
      for (int s = 0; s < 3 * NP; s++) begin
        check(scan_out == image[3*NP-1-s], $sformatf("run %0d serial bit %0d", run, s));
        @(negedge clk);
      end
      done = 0;
      check(flags == 0, "chain empty after shifting");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

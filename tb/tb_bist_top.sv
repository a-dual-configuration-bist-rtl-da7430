// tb_bist_top: end-to-end test of bist_top at its default size (4 x 4 blocks,
// 256 vectors per run, meander pairing). bist_harness supplies the sixteen
// behavioural cores, injects faults and checks every diagnosis session; this
// module provides the clock, a watchdog and the final verdict.
module tb_bist_top;
  logic clk = 0;
  logic rst_n, go, cfg_sel, start, done, finished, scan_out, diag_valid, fin;
  logic [35:0] core_din;
  logic [1:0]  core_op;
  logic [15:0][47:0] core_dout;
  logic [7:0]  pair_flags;
  logic [7:0][1:0] pair_ops;   // observed in waveforms only
  logic [1:0]  result_valid;
  logic [15:0] suspect;
  logic [15:0][1:0] suspect_op0, suspect_op1;
  logic [4:0]  n_suspect;
  logic [3:0]  n_fail0, n_fail1;
  int checks, failures;

  always #5 clk = ~clk;

  bist_top dut (
    .clk(clk), .rst_n(rst_n), .go(go), .cfg_sel(cfg_sel), .start(start), .done(done),
    .finished(finished), .scan_out(scan_out), .core_din(core_din), .core_op(core_op),
    .core_dout(core_dout), .pair_flags(pair_flags), .pair_ops(pair_ops),
    .result_valid(result_valid), .diag_valid(diag_valid), .suspect(suspect),
    .suspect_op0(suspect_op0), .suspect_op1(suspect_op1), .n_suspect(n_suspect),
    .n_fail0(n_fail0), .n_fail1(n_fail1));

  bist_harness #(.ROWS(4), .COLS(4), .PATS_PER_OP(64), .SESSIONS(12), .NAME("4x4")) h (
    .clk(clk), .rst_n(rst_n), .go(go), .cfg_sel(cfg_sel), .start(start), .done(done),
    .finished(finished), .scan_out(scan_out), .core_din(core_din), .core_op(core_op),
    .core_dout(core_dout), .pair_flags(pair_flags), .result_valid(result_valid),
    .diag_valid(diag_valid), .suspect(suspect), .suspect_op0(suspect_op0),
    .suspect_op1(suspect_op1), .n_suspect(n_suspect), .n_fail0(n_fail0), .n_fail1(n_fail1),
    .finished_all(fin), .checks(checks), .failures(failures));

  initial begin
    #10000000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    #1 wait (fin);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

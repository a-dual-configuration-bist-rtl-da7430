// tb_bist_workloads: bist_top at device sizes and with the alternative pairing.
//  * dsp:  512 blocks as 8 columns x 64 rows (a DSP-slice array of that size)
//  * bram: 320 blocks as 8 columns x 40 rows (a block-RAM array of that size)
//  * part: 4 x 4 blocks paired by the P_0/P_1 partition rule instead of the
//          meanders, wrap-around pair (n-1, 0) included
//  * flag: 4 x 4 blocks with CAPTURE_OP = 0, i.e. one flag bit per pair and a
//          12-bit chain
// Each instance is driven and checked by its own bist_harness (the cores are
// the same DSP-like behavioural model in all three: the BIST logic does not
// depend on what the cores compute). Runs with the default 256 vectors.
module tb_bist_workloads;
  logic clk = 0;
  int checks [4], failures [4];
  logic [3:0] fin;

  always #5 clk = ~clk;

`define BIST_CASE(IDX, INST, R, C, ALGO, CAP, NM) \
  logic INST``_rst_n, INST``_go, INST``_cfg, INST``_start, INST``_done, INST``_fin, INST``_so, INST``_dv; \
  logic [35:0] INST``_din; logic [1:0] INST``_op; \
  logic [R*C-1:0][47:0] INST``_dout; \
  logic [R*C/2-1:0] INST``_pf; logic [R*C/2-1:0][1:0] INST``_po; \
  logic [1:0] INST``_rv; logic [R*C-1:0] INST``_sus; logic [R*C-1:0][1:0] INST``_so0, INST``_so1; \
  logic [$clog2(R*C+1)-1:0] INST``_ns; logic [$clog2(R*C/2+1)-1:0] INST``_nf0, INST``_nf1; \
  bist_top #(.ROWS(R), .COLS(C), .MAP_ALGO(ALGO), .CAPTURE_OP(CAP)) INST``_dut ( \
    .clk(clk), .rst_n(INST``_rst_n), .go(INST``_go), .cfg_sel(INST``_cfg), .start(INST``_start), \
    .done(INST``_done), .finished(INST``_fin), .scan_out(INST``_so), .core_din(INST``_din), \
    .core_op(INST``_op), .core_dout(INST``_dout), .pair_flags(INST``_pf), .pair_ops(INST``_po), \
    .result_valid(INST``_rv), .diag_valid(INST``_dv), .suspect(INST``_sus), \
    .suspect_op0(INST``_so0), .suspect_op1(INST``_so1), .n_suspect(INST``_ns), \
    .n_fail0(INST``_nf0), .n_fail1(INST``_nf1)); \
  bist_harness #(.ROWS(R), .COLS(C), .MAP_ALGO(ALGO), .CAPTURE_OP(CAP), .SESSIONS(5), .NAME(NM)) INST``_h ( \
    .clk(clk), .rst_n(INST``_rst_n), .go(INST``_go), .cfg_sel(INST``_cfg), .start(INST``_start), \
    .done(INST``_done), .finished(INST``_fin), .scan_out(INST``_so), .core_din(INST``_din), \
    .core_op(INST``_op), .core_dout(INST``_dout), .pair_flags(INST``_pf), .result_valid(INST``_rv), \
    .diag_valid(INST``_dv), .suspect(INST``_sus), .suspect_op0(INST``_so0), .suspect_op1(INST``_so1), \
    .n_suspect(INST``_ns), .n_fail0(INST``_nf0), .n_fail1(INST``_nf1), \
    .finished_all(fin[IDX]), .checks(checks[IDX]), .failures(failures[IDX]));

  `BIST_CASE(0, dsp,  64, 8, bist_pkg::MAP_MEANDER,   1'b1, "dsp512")
  `BIST_CASE(1, bram, 40, 8, bist_pkg::MAP_MEANDER,   1'b1, "bram320")
  `BIST_CASE(2, part,  4, 4, bist_pkg::MAP_PARTITION, 1'b1, "partition4x4")
  `BIST_CASE(3, flag,  4, 4, bist_pkg::MAP_MEANDER,   1'b0, "flagonly4x4")

  initial begin
    #20000000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks[0] + checks[1] + checks[2] + checks[3],
             failures[0] + failures[1] + failures[2] + failures[3] + 1);
    $finish;
  end

  initial begin
    #1 wait (&fin);
    $display("TB_RESULT checks=%0d failures=%0d", checks[0] + checks[1] + checks[2] + checks[3],
             failures[0] + failures[1] + failures[2] + failures[3]);
    $finish;
  end
endmodule

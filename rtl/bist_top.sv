// bist_top: dual-configuration built-in self-test and diagnosis of an array of
// identical embedded hard blocks (DSP slices, multipliers, block RAMs).
//
// The N = ROWS*COLS blocks under test are outside this module: it drives their
// shared input bus (core_din, core_op) and reads their outputs (core_dout). A
// pattern generator broadcasts the same vectors to every block. The blocks are
// grouped in pairs and a comparator per pair sets a sticky error flag when the
// two outputs differ. When the run ends the controller raises DONE, the flags
// become a scan chain and the results leave serially on scan_out. A run is made
// once in configuration 0 and once in configuration 1, which pair the blocks
// differently (cfg_sel, sampled on go, stands for loading the second
// bitstream). The result collector receives both serial streams and the fault
// locator reports as faulty every block whose pair failed in both runs.
//
// Timing of one run: go (1 cycle) -> START high for TEST_LEN = NUM_OPS *
// PATS_PER_OP cycles -> 1 + CORE_LAT flush cycles -> DONE high for CHAIN_LEN =
// N/2 * CELL_W cycles -> finished high until the next go. The blocks must
// produce their output CORE_LAT cycles after the vector appears on the bus.
// The structure (pattern generator, pair comparators, DONE-switched scan chain,
// two pairings, intersection) follows the method; widths, the operation set
// and test length, the on-chip collection of both results and the cfg_sel
// input are this design's choices.
// The two assertions below use rst_n synchronously (disable iff) while the
// flip-flops use it asynchronously; lint reports that mix, which is harmless.
module bist_top #(
  parameter int unsigned         ROWS        = 4,
  parameter int unsigned         COLS        = 4,
  parameter int unsigned         DIN_W       = 36,
  parameter int unsigned         DOUT_W      = 48,
  parameter int unsigned         OP_W        = 2,
  parameter int unsigned         NUM_OPS     = 4,
  parameter int unsigned         PATS_PER_OP = 64,
  parameter int unsigned         CORE_LAT    = 1,
  parameter bit                  CAPTURE_OP  = 1'b1,
  parameter bist_pkg::map_algo_e MAP_ALGO    = bist_pkg::MAP_MEANDER,
  parameter logic [63:0]         SEED        = 64'h9E37_79B9_7F4A_7C15
) (
  input  logic                               clk,
  input  logic                               rst_n,
  // run control
  input  logic                               go,
  input  logic                               cfg_sel,
  output logic                               start,
  output logic                               done,
  output logic                               finished,
  output logic                               scan_out,
  // blocks under test
  output logic [DIN_W-1:0]                   core_din,
  output logic [OP_W-1:0]                    core_op,
  input  logic [ROWS*COLS-1:0][DOUT_W-1:0]   core_dout,
  // flags of the current run, live
  output logic [ROWS*COLS/2-1:0]             pair_flags,
  output logic [ROWS*COLS/2-1:0][OP_W-1:0]   pair_ops,
  // diagnosis
  output logic [1:0]                         result_valid,
  output logic                               diag_valid,
  output logic [ROWS*COLS-1:0]               suspect,
  output logic [ROWS*COLS-1:0][OP_W-1:0]     suspect_op0,
  output logic [ROWS*COLS-1:0][OP_W-1:0]     suspect_op1,
  output logic [$clog2(ROWS*COLS+1)-1:0]     n_suspect,
  output logic [$clog2(ROWS*COLS/2+1)-1:0]   n_fail0,
  output logic [$clog2(ROWS*COLS/2+1)-1:0]   n_fail1
);
  localparam int unsigned N         = ROWS * COLS;
  localparam int unsigned NP        = N / 2;
  localparam int unsigned CELL_W    = CAPTURE_OP ? 1 + OP_W : 1;
  localparam int unsigned CHAIN_LEN = NP * CELL_W;
  localparam int unsigned TEST_LEN  = NUM_OPS * PATS_PER_OP;

  logic cmp_en, clear, cfg, pat_valid;
  logic [NP-1:0]            fail0, fail1;
  logic [NP-1:0][OP_W-1:0]  op0, op1;

  test_controller #(.TEST_LEN(TEST_LEN), .CORE_LAT(CORE_LAT), .CHAIN_LEN(CHAIN_LEN)) u_ctrl (
    .clk(clk), .rst_n(rst_n), .go(go), .cfg_in(cfg_sel),
    .start(start), .cmp_en(cmp_en), .clear(clear), .done(done),
    .finished(finished), .cfg(cfg)
  );

  pattern_generator #(.DIN_W(DIN_W), .OP_W(OP_W), .NUM_OPS(NUM_OPS),
                      .PATS_PER_OP(PATS_PER_OP), .SEED(SEED)) u_pgen (
    .clk(clk), .rst_n(rst_n), .start(start),
    .data_out(core_din), .op_out(core_op), .valid(pat_valid)
  );

  detector_array #(.ROWS(ROWS), .COLS(COLS), .DOUT_W(DOUT_W), .OP_W(OP_W),
                   .CAPTURE_OP(CAPTURE_OP), .CORE_LAT(CORE_LAT), .MAP_ALGO(MAP_ALGO)) u_det (
    .clk(clk), .rst_n(rst_n), .cfg(cfg), .core_out(core_dout),
    .cmp_en(cmp_en), .op_in(core_op), .clear(clear), .done(done),
    .scan_out(scan_out), .flags(pair_flags), .op_cap(pair_ops)
  );

  result_collector #(.N_PAIRS(NP), .OP_W(OP_W), .CAPTURE_OP(CAPTURE_OP)) u_coll (
    .clk(clk), .rst_n(rst_n), .done(done), .scan_in(scan_out), .run_cfg(cfg),
    .valid(result_valid), .fail0(fail0), .fail1(fail1), .op0(op0), .op1(op1)
  );

  fault_locator #(.ROWS(ROWS), .COLS(COLS), .OP_W(OP_W), .MAP_ALGO(MAP_ALGO)) u_loc (
    .valid(result_valid), .fail0(fail0), .fail1(fail1), .op0(op0), .op1(op1),
    .diag_valid(diag_valid), .suspect(suspect),
    .suspect_op0(suspect_op0), .suspect_op1(suspect_op1),
    .n_suspect(n_suspect), .n_fail0(n_fail0), .n_fail1(n_fail1)
  );

  // The pattern bus must carry a vector on every START cycle but the first.
  assert property (@(posedge clk) disable iff (!rst_n) $past(start) |-> pat_valid);
  // DONE and START are never high together.
  assert property (@(posedge clk) disable iff (!rst_n) !(start && done));
endmodule

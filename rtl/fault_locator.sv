// fault_locator: combines the results of the two configurations into the
// location of the faulty blocks.
//
// A failing pair says only that at least one of its two blocks is faulty.
// Because the two configurations never pair the same two blocks, a block whose
// pair failed in configuration 0 and whose pair failed in configuration 1 is
// the one the method reports as faulty: suspect[b] = fail0[pair_of(0,b)] &
// fail1[pair_of(1,b)]. Also reported: the number of suspect blocks, the number
// of failing pairs of each run, and for every block the operation recorded by
// its pair in each configuration (its failure mode). Outputs are meaningful when
// diag_valid (both results present) is high; otherwise suspect is all zero.
// The intersection rule is the method's; doing it in logic is this design's.
// Purely combinational.
module fault_locator #(
  parameter int unsigned        ROWS     = 4,
  parameter int unsigned        COLS     = 4,
  parameter int unsigned        OP_W     = 2,
  parameter bist_pkg::map_algo_e MAP_ALGO = bist_pkg::MAP_MEANDER
) (
  input  logic [1:0]                          valid,
  input  logic [ROWS*COLS/2-1:0]              fail0,
  input  logic [ROWS*COLS/2-1:0]              fail1,
  input  logic [ROWS*COLS/2-1:0][OP_W-1:0]    op0,
  input  logic [ROWS*COLS/2-1:0][OP_W-1:0]    op1,
  output logic                                diag_valid,
  output logic [ROWS*COLS-1:0]                suspect,
  output logic [ROWS*COLS-1:0][OP_W-1:0]      suspect_op0,
  output logic [ROWS*COLS-1:0][OP_W-1:0]      suspect_op1,
  output logic [$clog2(ROWS*COLS+1)-1:0]      n_suspect,
  output logic [$clog2(ROWS*COLS/2+1)-1:0]    n_fail0,
  output logic [$clog2(ROWS*COLS/2+1)-1:0]    n_fail1
);
  localparam int unsigned N  = ROWS * COLS;
  localparam int unsigned NP = N / 2;

  assign diag_valid = &valid;

  for (genvar b = 0; b < N; b++) begin : g_blk
    localparam int unsigned P0 = bist_pkg::pair_of(0, MAP_ALGO, ROWS, COLS, b);
    localparam int unsigned P1 = bist_pkg::pair_of(1, MAP_ALGO, ROWS, COLS, b);
    assign suspect[b]    = diag_valid && fail0[P0] && fail1[P1];
    assign suspect_op0[b] = op0[P0];
    assign suspect_op1[b] = op1[P1];
  end

  always_comb begin
    n_suspect = '0;
    for (int b = 0; b < N; b++) n_suspect += $bits(n_suspect)'(suspect[b]);
    n_fail0 = '0;
    n_fail1 = '0;
    for (int k = 0; k < NP; k++) begin
      n_fail0 += $bits(n_fail0)'(fail0[k]);
      n_fail1 += $bits(n_fail1)'(fail1[k]);
    end
  end
endmodule

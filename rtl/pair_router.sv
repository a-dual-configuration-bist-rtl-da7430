// pair_router: connects the blocks under test to the comparators according to
// the active test configuration.
//
// Comparator k receives the outputs of the two blocks that form pair k in
// configuration cfg (0 or 1). The pairs come from the mapping functions in
// bist_pkg: with MAP_MEANDER configuration 0 pairs vertical neighbours along a
// column-by-column meander and configuration 1 horizontal neighbours along a
// row-by-row meander; with MAP_PARTITION configuration 0 pairs (i, i+1) for i
// even and configuration 1 pairs (q, (q+1) mod n) for q odd. On the FPGA the
// two configurations are two separate placements; here both wirings exist and
// cfg selects one, which models reloading the device with the other bitstream.
// Purely combinational.
module pair_router #(
  parameter int unsigned        ROWS     = 4,
  parameter int unsigned        COLS     = 4,
  parameter int unsigned        DOUT_W   = 48,
  parameter bist_pkg::map_algo_e MAP_ALGO = bist_pkg::MAP_MEANDER
) (
  input  logic                    cfg,
  input  logic [ROWS*COLS-1:0][DOUT_W-1:0]   core_out,
  output logic [ROWS*COLS/2-1:0][DOUT_W-1:0] pair_a,
  output logic [ROWS*COLS/2-1:0][DOUT_W-1:0] pair_b
);
  localparam int unsigned N  = ROWS * COLS;
  localparam int unsigned NP = N / 2;

  for (genvar k = 0; k < NP; k++) begin : g_pair
    localparam int unsigned A0 = bist_pkg::member_of(0, MAP_ALGO, ROWS, COLS, k, 0);
    localparam int unsigned B0 = bist_pkg::member_of(0, MAP_ALGO, ROWS, COLS, k, 1);
    localparam int unsigned A1 = bist_pkg::member_of(1, MAP_ALGO, ROWS, COLS, k, 0);
    localparam int unsigned B1 = bist_pkg::member_of(1, MAP_ALGO, ROWS, COLS, k, 1);
    assign pair_a[k] = cfg ? core_out[A1] : core_out[A0];
    assign pair_b[k] = cfg ? core_out[B1] : core_out[B0];
  end

  initial assert (N % 2 == 0 && N >= 2) else $error("the number of blocks must be even");
endmodule

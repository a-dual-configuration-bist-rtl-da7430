// detector_array: the replicated error detectors of all pairs and the scan
// chain through them.
//
// One error_detector per pair (N/2 of them) receives its two block outputs from
// pair_router. The detectors are chained: detector 0 takes a constant 0 as
// scan input, detector k takes detector k-1's output, and the last detector
// drives scan_out. After CHAIN_LEN = N/2 * CELL_W shift cycles the serial
// stream has delivered detector N/2-1's bits first (MSB first) and detector
// 0's last. The operation recorded on a mismatch is the pattern bus operation
// delayed by CORE_LAT cycles, i.e. the one that produced the compared output.
// Replication, chaining and serial output follow the method; chain order and
// the operation delay line are this design's.
module detector_array #(
  parameter int unsigned        ROWS       = 4,
  parameter int unsigned        COLS       = 4,
  parameter int unsigned        DOUT_W     = 48,
  parameter int unsigned        OP_W       = 2,
  parameter bit                 CAPTURE_OP = 1'b1,
  parameter int unsigned        CORE_LAT   = 1,
  parameter bist_pkg::map_algo_e MAP_ALGO   = bist_pkg::MAP_MEANDER
) (
  input  logic                                clk,
  input  logic                                rst_n,
  input  logic                                cfg,
  input  logic [ROWS*COLS-1:0][DOUT_W-1:0]    core_out,
  input  logic                                cmp_en,
  input  logic [OP_W-1:0]                     op_in,
  input  logic                                clear,
  input  logic                                done,
  output logic                                scan_out,
  output logic [ROWS*COLS/2-1:0]              flags,
  output logic [ROWS*COLS/2-1:0][OP_W-1:0]    op_cap
);
  localparam int unsigned NP = ROWS * COLS / 2;

  logic [NP-1:0][DOUT_W-1:0] pair_a, pair_b;
  logic [NP:0]               chain;
  logic [CORE_LAT:0][OP_W-1:0] op_pipe;

  pair_router #(.ROWS(ROWS), .COLS(COLS), .DOUT_W(DOUT_W), .MAP_ALGO(MAP_ALGO)) u_router (
    .cfg(cfg), .core_out(core_out), .pair_a(pair_a), .pair_b(pair_b)
  );

  assign op_pipe[0] = op_in;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) op_pipe[CORE_LAT:1] <= '0;
    else        op_pipe[CORE_LAT:1] <= op_pipe[CORE_LAT-1:0];
  end

  assign chain[0] = 1'b0;
  for (genvar k = 0; k < NP; k++) begin : g_det
    error_detector #(.DOUT_W(DOUT_W), .OP_W(OP_W), .CAPTURE_OP(CAPTURE_OP)) u_det (
      .clk(clk), .rst_n(rst_n),
      .out_a(pair_a[k]), .out_b(pair_b[k]),
      .cmp_en(cmp_en), .op_in(op_pipe[CORE_LAT]),
      .clear(clear), .done(done),
      .scan_in(chain[k]), .scan_out(chain[k+1]),
      .flag(flags[k]), .op_cap(op_cap[k])
    );
  end
  assign scan_out = chain[NP];
endmodule

// error_detector: comparator, mode multiplexer and sticky error register of
// one pair of blocks under test.
//
// In test mode (done low) the two pair outputs are compared every cycle that
// cmp_en is high; the first mismatch sets the error flag, which then stays set
// for the rest of the run. With CAPTURE_OP = 1 the operation that produced the
// mismatching output is recorded next to the flag, so the result also tells
// which function of the core failed. In scan mode (done high) the register of
// this pair becomes CELL_W stages of a shift register: every cycle it takes one
// bit from the previous detector (scan_in) and passes its top bit on
// (scan_out). Comparison, sticky flag, DONE-selected scan path and optional
// recording of the active control state follow the method; the bit layout
// {op, flag} and the clear input are this design's.
//
// Register layout (CELL_W = 1 + OP_W when CAPTURE_OP, else 1): bit 0 is the
// flag, bits CELL_W-1:1 the captured operation. Bits leave the cell MSB first.
// Timing: a mismatch in cycle t is visible on flag in cycle t+1. clear has
// priority over done, done over compare.
module error_detector #(
  parameter int unsigned DOUT_W     = 48,
  parameter int unsigned OP_W       = 2,
  parameter bit          CAPTURE_OP = 1'b1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [DOUT_W-1:0] out_a,
  input  logic [DOUT_W-1:0] out_b,
  input  logic              cmp_en,
  input  logic [OP_W-1:0]   op_in,
  input  logic              clear,
  input  logic              done,
  input  logic              scan_in,
  output logic              scan_out,
  output logic              flag,
  output logic [OP_W-1:0]   op_cap
);
  localparam int unsigned CELL_W = CAPTURE_OP ? 1 + OP_W : 1;

  logic [CELL_W-1:0] cell_q, capture, shifted;
  logic              mismatch;

  assign mismatch = cmp_en && (out_a != out_b);

  generate
    if (CAPTURE_OP) begin : g_cap
      assign capture = {op_in, 1'b1};
      assign shifted = {cell_q[CELL_W-2:0], scan_in};
      assign op_cap  = cell_q[CELL_W-1:1];
    end else begin : g_nocap
      assign capture = 1'b1;
      assign shifted = scan_in;
      assign op_cap  = '0;
    end
  endgenerate

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                      cell_q <= '0;
    else if (clear)                  cell_q <= '0;
    else if (done)                   cell_q <= shifted;
    else if (mismatch && !cell_q[0]) cell_q <= capture;
  end

  assign flag     = cell_q[0];
  assign scan_out = cell_q[CELL_W-1];
endmodule

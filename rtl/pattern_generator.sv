// pattern_generator: stimulus source shared by every block under test.
//
// While START is high it puts one new test vector on the broadcast bus every
// clock: the data part comes from a maximal-length Fibonacci LFSR
// (pseudo-random operands) and the control part from a small state machine that
// walks through the NUM_OPS operations of the core, holding each one for
// PATS_PER_OP vectors (deterministic control sequence). Pairing an LFSR for data
// with an FSM for control follows the scheme the method suggests; the widths,
// seed, operation order and hold length are this design's choices.
//
// Interface: start (level) enables generation. When start is low the LFSR is
// reloaded with SEED and the FSM returns to operation 0, so every run (and both
// configurations) sees exactly the same vector sequence.
// Timing: vectors are registered; data_out/op_out/valid change one cycle after
// the start cycle that produced them. valid is start delayed by one cycle.
module pattern_generator #(
  parameter int unsigned    DIN_W       = 36,
  parameter int unsigned    OP_W        = 2,
  parameter int unsigned    NUM_OPS     = 4,
  parameter int unsigned    PATS_PER_OP = 64,
  parameter logic [63:0]    SEED        = 64'h9E37_79B9_7F4A_7C15
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  output logic [DIN_W-1:0] data_out,
  output logic [OP_W-1:0]  op_out,
  output logic             valid
);
  localparam logic [63:0] TAPS64 = bist_pkg::lfsr_taps(DIN_W);
  localparam logic [DIN_W-1:0] TAPS = TAPS64[DIN_W-1:0];
  localparam logic [DIN_W-1:0] SEED_W = (SEED[DIN_W-1:0] == '0) ? DIN_W'(1) : SEED[DIN_W-1:0];
  localparam int unsigned HOLD_W = (PATS_PER_OP > 1) ? $clog2(PATS_PER_OP) : 1;

  logic [DIN_W-1:0]  lfsr_q;
  logic [OP_W-1:0]   op_q;
  logic [HOLD_W-1:0] hold_q;
  logic              fb;

  assign fb = ^(lfsr_q & TAPS);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      lfsr_q   <= SEED_W;
      op_q     <= '0;
      hold_q   <= '0;
      data_out <= '0;
      op_out   <= '0;
      valid    <= 1'b0;
    end else begin
      valid <= start;
      if (start) begin
        data_out <= lfsr_q;
        op_out   <= op_q;
        lfsr_q   <= {lfsr_q[DIN_W-2:0], fb};
        if (hold_q == HOLD_W'(PATS_PER_OP - 1)) begin
          hold_q <= '0;
          op_q   <= (op_q == OP_W'(NUM_OPS - 1)) ? '0 : op_q + 1'b1;
        end else begin
          hold_q <= hold_q + 1'b1;
        end
      end else begin
        lfsr_q <= SEED_W;
        op_q   <= '0;
        hold_q <= '0;
      end
    end
  end

  initial begin
    assert (DIN_W >= 2 && DIN_W <= 64) else $error("DIN_W must be 2..64");
    assert (NUM_OPS <= (1 << OP_W)) else $error("NUM_OPS does not fit in OP_W bits");
  end
endmodule

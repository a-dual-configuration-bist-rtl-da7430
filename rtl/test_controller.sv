// test_controller: sequences one self-test run.
//
// A run is started by go (e.g. at the end of device configuration). The
// controller then raises START for TEST_LEN cycles so the pattern generator
// drives TEST_LEN vectors, waits until the last vector has passed through the
// pattern register and the cores (1 + CORE_LAT cycles), and then raises DONE
// for CHAIN_LEN cycles, which turns the error flip-flops into a scan chain and
// shifts every result bit out to the serial pin. Keeping DONE high for a time
// set by the number of blocks, and the START/DONE roles, follow the method; the
// state encoding, the go/finished handshake and the flush delay are this
// design's.
//
// Outputs: start (pattern generator enable), cmp_en (comparators may record
// mismatches; start delayed by 1 + CORE_LAT so it lines up with core outputs),
// clear (one-cycle pulse on go, empties the error flags), done, finished
// (level, from the end of the shift until the next go), cfg (the configuration
// number sampled from cfg_in on go).
module test_controller #(
  parameter int unsigned TEST_LEN  = 256,
  parameter int unsigned CORE_LAT  = 1,
  parameter int unsigned CHAIN_LEN = 24
) (
  input  logic clk,
  input  logic rst_n,
  input  logic go,
  input  logic cfg_in,
  output logic start,
  output logic cmp_en,
  output logic clear,
  output logic done,
  output logic finished,
  output logic cfg
);
  typedef enum logic [2:0] {S_IDLE, S_RUN, S_FLUSH, S_SHIFT, S_END} state_e;

  localparam int unsigned FLUSH = 1 + CORE_LAT;
  localparam int unsigned MAXC  = (TEST_LEN > CHAIN_LEN) ? TEST_LEN : CHAIN_LEN;
  localparam int unsigned CNT_W = $clog2(MAXC + FLUSH + 1);

  state_e            state_q;
  logic [CNT_W-1:0]  cnt_q;
  logic [FLUSH-1:0]  en_pipe_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= S_IDLE;
      cnt_q   <= '0;
      cfg     <= 1'b0;
      clear   <= 1'b0;
    end else begin
      clear <= 1'b0;
      unique case (state_q)
        S_IDLE, S_END: if (go) begin
          state_q <= S_RUN;
          cnt_q   <= '0;
          cfg     <= cfg_in;
          clear   <= 1'b1;
        end
        S_RUN: begin
          if (cnt_q == CNT_W'(TEST_LEN - 1)) begin
            state_q <= S_FLUSH;
            cnt_q   <= '0;
          end else cnt_q <= cnt_q + 1'b1;
        end
        S_FLUSH: begin
          if (cnt_q == CNT_W'(FLUSH - 1)) begin
            state_q <= S_SHIFT;
            cnt_q   <= '0;
          end else cnt_q <= cnt_q + 1'b1;
        end
        S_SHIFT: begin
          if (cnt_q == CNT_W'(CHAIN_LEN - 1)) begin
            state_q <= S_END;
            cnt_q   <= '0;
          end else cnt_q <= cnt_q + 1'b1;
        end
        default: state_q <= S_IDLE;
      endcase
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) en_pipe_q <= '0;
    else        en_pipe_q <= {en_pipe_q[FLUSH-2:0], start};
  end

  assign start    = (state_q == S_RUN);
  assign done     = (state_q == S_SHIFT);
  assign finished = (state_q == S_END);
  assign cmp_en   = en_pipe_q[FLUSH-1];

  initial assert (TEST_LEN >= 1 && CHAIN_LEN >= 1 && CORE_LAT >= 1)
    else $error("TEST_LEN, CHAIN_LEN and CORE_LAT must be at least 1");
endmodule

// result_collector: receives the serialized results of each test run and keeps
// one result set per configuration.
//
// It watches only the serial result pin and DONE, as an off-chip tester would.
// While done is high every scan_in bit is shifted into a CHAIN_LEN-bit
// register. When done falls the register holds the detector array's chain image
// (detector k in bits k*CELL_W +: CELL_W, flag in the lowest bit); if exactly
// CHAIN_LEN bits arrived it is stored as the result of configuration run_cfg and
// that configuration is marked valid. The per-pair flags and recorded
// operations are unpacked from the stored words. Keeping both configurations'
// results for post-processing follows the method; doing it in logic, and the
// bit-count check, are this design's.
module result_collector #(
  parameter int unsigned N_PAIRS    = 8,
  parameter int unsigned OP_W       = 2,
  parameter bit          CAPTURE_OP = 1'b1
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          done,
  input  logic                          scan_in,
  input  logic                          run_cfg,
  output logic [1:0]                    valid,
  output logic [N_PAIRS-1:0]            fail0,
  output logic [N_PAIRS-1:0]            fail1,
  output logic [N_PAIRS-1:0][OP_W-1:0]  op0,
  output logic [N_PAIRS-1:0][OP_W-1:0]  op1
);
  localparam int unsigned CELL_W    = CAPTURE_OP ? 1 + OP_W : 1;
  localparam int unsigned CHAIN_LEN = N_PAIRS * CELL_W;
  localparam int unsigned CNT_W     = $clog2(CHAIN_LEN + 2);

  logic [CHAIN_LEN-1:0] shift_q;
  logic [1:0][CHAIN_LEN-1:0] res_q;
  logic [CNT_W-1:0]     cnt_q;
  logic                 done_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      shift_q <= '0;
      res_q   <= '0;
      cnt_q   <= '0;
      done_q  <= 1'b0;
      valid   <= '0;
    end else begin
      done_q <= done;
      if (done) begin
        shift_q <= CHAIN_LEN'({shift_q, scan_in});
        if (cnt_q != '1) cnt_q <= cnt_q + 1'b1;
      end else if (done_q) begin
        cnt_q <= '0;
        if (cnt_q == CNT_W'(CHAIN_LEN)) begin
          res_q[run_cfg] <= shift_q;
          valid[run_cfg] <= 1'b1;
        end
      end
    end
  end

  for (genvar k = 0; k < N_PAIRS; k++) begin : g_unpack
    assign fail0[k] = res_q[0][k*CELL_W];
    assign fail1[k] = res_q[1][k*CELL_W];
    if (CAPTURE_OP) begin : g_op
      assign op0[k] = res_q[0][k*CELL_W+1 +: OP_W];
      assign op1[k] = res_q[1][k*CELL_W+1 +: OP_W];
    end else begin : g_noop
      assign op0[k] = '0;
      assign op1[k] = '0;
    end
  end
endmodule

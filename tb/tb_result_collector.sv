// tb_result_collector: feeds serial result streams as the scan chain produces
// them (detector N_PAIRS-1 first, {op, flag} MSB first) and checks that the
// stored flags and operations of each configuration equal the words sent, that
// a run stores only into the configuration given by run_cfg, that valid bits
// are set only after a complete stream, and that a stream of the wrong length
// is discarded.
module tb_result_collector;
  localparam int NP = 8;
  logic clk = 0, rst_n = 0, done = 0, scan_in = 0, run_cfg = 0;
  logic [1:0] valid;
  logic [NP-1:0] fail0, fail1;
  logic [NP-1:0][1:0] op0, op1;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  result_collector #(.N_PAIRS(NP)) dut (.clk(clk), .rst_n(rst_n), .done(done), .scan_in(scan_in),
    .run_cfg(run_cfg), .valid(valid), .fail0(fail0), .fail1(fail1), .op0(op0), .op1(op1));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #1000000; failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic send(input logic [NP-1:0] f, input logic [NP-1:0][1:0] o, input bit c, input int len);
    run_cfg = c;
    done = 1;
    for (int s = 0; s < len; s++) begin
      int k = NP - 1 - s / 3;
      int bitpos = 2 - s % 3;
      scan_in = (bitpos == 0) ? f[k] : o[k][bitpos - 1];
      @(negedge clk);
    end
    done = 0;
    @(negedge clk);
    @(negedge clk);
  endtask

  initial begin
    logic [NP-1:0] f [2];
    logic [NP-1:0][1:0] o [2];
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    check(valid == 2'b00, "nothing valid after reset");
    // a short stream is ignored
    send(8'hFF, '1, 0, 3 * NP - 1);
    check(valid == 2'b00, "short stream discarded");
    for (int it = 0; it < 20; it++) begin
      automatic int c = it % 2;
      f[c] = 8'($urandom);
      o[c] = 16'($urandom);
      for (int k = 0; k < NP; k++) if (!f[c][k]) o[c][k] = 0;
      send(f[c], o[c], 1'(c), 3 * NP);
      check(valid[c] == 1, "valid after a complete stream");
      check(it > 0 || valid[1] == 0, "other configuration untouched");
      if (c == 0) check(fail0 == f[0] && op0 == o[0], $sformatf("config 0 result %h", fail0));
      else        check(fail1 == f[1] && op1 == o[1], "config 1 result");
      if (it > 0) check(fail0 == f[0] && fail1 == f[1], "both results kept");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_test_controller: checks the run sequence cycle by cycle.
// For TEST_LEN = 10, CORE_LAT = 2, CHAIN_LEN = 7 it checks that after go:
// clear pulses for one cycle, start is high exactly 10 cycles, cmp_en is start
// delayed by 3 cycles, done follows 3 flush cycles after start and stays high
// exactly 7 cycles, finished then stays high until the next go, and cfg holds
// the value cfg_in had at go. Two runs are made with different cfg_in.
module tb_test_controller;
  localparam int TL = 10, LAT = 2, CL = 7;
  logic clk = 0, rst_n = 0, go = 0, cfg_in = 0;
  logic start, cmp_en, clear, done, finished, cfg;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  test_controller #(.TEST_LEN(TL), .CORE_LAT(LAT), .CHAIN_LEN(CL)) dut (
    .clk(clk), .rst_n(rst_n), .go(go), .cfg_in(cfg_in), .start(start), .cmp_en(cmp_en),
    .clear(clear), .done(done), .finished(finished), .cfg(cfg));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #100000; failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Expected waveform, cycle t = 0 is the first cycle after the go edge.
  task automatic run(input bit c);
    @(negedge clk);
    cfg_in = c; go = 1;
    @(negedge clk);
    go = 0; cfg_in = ~c;
    for (int t = 0; t < TL + LAT + 1 + CL + 3; t++) begin
      check(start == (t < TL), $sformatf("start at t=%0d", t));
      check(clear == (t == 0), $sformatf("clear at t=%0d", t));
      check(cmp_en == (t >= LAT + 1 && t < TL + LAT + 1), $sformatf("cmp_en at t=%0d", t));
      check(done == (t >= TL + LAT + 1 && t < TL + LAT + 1 + CL), $sformatf("done at t=%0d", t));
      check(finished == (t >= TL + LAT + 1 + CL), $sformatf("finished at t=%0d", t));
      check(cfg == c, "cfg sampled at go");
      @(negedge clk);
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    check(!start && !done && !finished, "idle after reset");
    run(1'b0);
    run(1'b1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_error_detector: checks one pair's comparator, sticky flag, recorded
// operation and scan shifting against a reference model written here.
// Random outputs with occasional mismatches are applied with cmp_en toggling;
// the flag must rise one cycle after the first enabled mismatch and stay set,
// the recorded operation must be the one present at that mismatch, and in
// scan mode the cell must shift scan_in through its 3 bits MSB first. Also
// checked: clear, and mismatches while cmp_en is low being ignored.
module tb_error_detector;
  logic clk = 0, rst_n = 0;
  logic [47:0] a, b;
  logic cmp_en = 0, clear = 0, done = 0, scan_in = 0;
  logic [1:0] op_in;
  logic scan_out, flag;
  logic [1:0] op_cap;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  error_detector dut (.clk(clk), .rst_n(rst_n), .out_a(a), .out_b(b), .cmp_en(cmp_en),
    .op_in(op_in), .clear(clear), .done(done), .scan_in(scan_in), .scan_out(scan_out),
    .flag(flag), .op_cap(op_cap));

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

  bit  m_flag;
  logic [1:0] m_op;
  logic [2:0] m_cell;
  initial begin
    a = 0; b = 0; op_in = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int run = 0; run < 40; run++) begin
      // clear
      clear = 1; @(negedge clk); clear = 0;
      check(flag == 0 && op_cap == 0, "cleared");
      m_flag = 0; m_op = 0;
      // compare phase
      for (int t = 0; t < 50; t++) begin
        a = 48'({$urandom, $urandom});
        b = ($urandom_range(0, 30) == 0) ? a ^ (48'd1 << $urandom_range(0, 47)) : a;
        cmp_en = ($urandom_range(0, 3) != 0);
        op_in = 2'($urandom);
        if (cmp_en && a != b && !m_flag) begin m_flag = 1; m_op = op_in; end
        @(negedge clk);
        check(flag == m_flag, $sformatf("flag run %0d t %0d", run, t));
        check(!m_flag || op_cap == m_op, "recorded operation");
      end
      // scan phase: shift 3 known bits in, expect the cell's bits out MSB first
      cmp_en = 0;
      m_cell = {m_op, m_flag};
      done = 1;
      for (int s = 0; s < 6; s++) begin
        check(scan_out == m_cell[2], $sformatf("scan bit %0d", s));
        scan_in = 1'($urandom);
        a = ~b;   // a mismatch during scan must not disturb shifting
        @(negedge clk);
        m_cell = {m_cell[1:0], scan_in};
      end
      done = 0;
      check(flag == m_cell[0] && op_cap == m_cell[2:1], "cell holds shifted-in bits");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

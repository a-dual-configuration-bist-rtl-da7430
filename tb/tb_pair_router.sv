// tb_pair_router: checks the pairings of both configurations.
// Each block drives its own index as output, so every comparator input tells
// which block reached it. The expected pairs are built here by walking the
// meanders step by step (up/down the columns, then right/left along the rows)
// and, for the partition mapping, from the P_0/P_1 rule. Checked on the 4x4
// grid and on a 6x4 grid, plus the worked example: the block in column 3, row 3
// pairs with column 3, row 4 in configuration 0 and with column 4, row 3 in
// configuration 1 (physical index = col*ROWS + row, zero-based).
module tb_pair_router;
  logic cfg;
  logic [15:0][47:0] out44;
  logic [7:0][47:0]  a44, b44, pa44, pb44;
  logic [23:0][47:0] out64;
  logic [11:0][47:0] a64, b64;
  int checks = 0, failures = 0;

  pair_router #(.ROWS(4), .COLS(4)) dut44 (.cfg(cfg), .core_out(out44), .pair_a(a44), .pair_b(b44));
  pair_router #(.ROWS(6), .COLS(4)) dut64 (.cfg(cfg), .core_out(out64), .pair_a(a64), .pair_b(b64));
  pair_router #(.ROWS(4), .COLS(4), .MAP_ALGO(bist_pkg::MAP_PARTITION)) dutp (
    .cfg(cfg), .core_out(out44), .pair_a(pa44), .pair_b(pb44));

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

  // Walk a meander and return the visiting order of physical indices.
  function automatic void walk(input int rows, input int cols, input bit horiz, output int order[]);
    int r, c, dir, i;
    order = new[rows * cols];
    r = 0; c = 0; dir = 1;
    for (i = 0; i < rows * cols; i++) begin
      order[i] = c * rows + r;
      if (!horiz) begin
        if ((dir == 1 && r == rows - 1) || (dir == -1 && r == 0)) begin c++; dir = -dir; end
        else r += dir;
      end else begin
        if ((dir == 1 && c == cols - 1) || (dir == -1 && c == 0)) begin r++; dir = -dir; end
        else c += dir;
      end
    end
  endfunction

  initial begin
    int order[];
    for (int i = 0; i < 16; i++) out44[i] = 48'(i);
    for (int i = 0; i < 24; i++) out64[i] = 48'(i);
    for (int c = 0; c < 2; c++) begin
      cfg = 1'(c);
      #1;
      walk(4, 4, c == 1, order);
      for (int k = 0; k < 8; k++)
        check(a44[k] == 48'(order[2*k]) && b44[k] == 48'(order[2*k+1]),
              $sformatf("4x4 cfg %0d pair %0d: %0d,%0d", c, k, a44[k], b44[k]));
      walk(6, 4, c == 1, order);
      for (int k = 0; k < 12; k++)
        check(a64[k] == 48'(order[2*k]) && b64[k] == 48'(order[2*k+1]),
              $sformatf("6x4 cfg %0d pair %0d", c, k));
      for (int k = 0; k < 8; k++) begin
        automatic int i0 = (c == 0) ? 2 * k : 2 * k + 1;
        check(pa44[k] == 48'(i0) && pb44[k] == 48'(32'((i0 + 1) % 16)),
              $sformatf("partition cfg %0d pair %0d", c, k));
      end
    end
    // worked example: C3R3 = index 2*4+2 = 10
    cfg = 0; #1;
    check(a44[5] == 10 && b44[5] == 11, "C3R3 pairs with C3R4 in configuration 0");
    cfg = 1; #1;
    check(a44[5] == 10 && b44[5] == 14, "C3R3 pairs with C4R3 in configuration 1");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_pattern_generator: checks the stimulus generator.
// 1) At DIN_W = 8 the data sequence repeats after exactly 255 vectors and
//    visits 255 distinct non-zero values (maximal-length LFSR).
// 2) The operation field holds each operation for PATS_PER_OP vectors and
//    walks 0,1,..,NUM_OPS-1 then wraps.
// 3) valid follows start by one cycle; after start drops and rises again the
//    sequence restarts from the same first vector.
// 4) At the default 36-bit width each vector equals the previous one shifted
//    left with the XOR of bits 35 and 24 (x^36 + x^25 + 1) shifted in.
module tb_pattern_generator;
  logic clk = 0, rst_n = 0, start = 0;
  logic [7:0]  d8;  logic [1:0] op8;  logic v8;
  logic [35:0] d36; logic [1:0] op36; logic v36;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  pattern_generator #(.DIN_W(8), .OP_W(2), .NUM_OPS(3), .PATS_PER_OP(5), .SEED(64'h1)) dut8 (
    .clk(clk), .rst_n(rst_n), .start(start), .data_out(d8), .op_out(op8), .valid(v8));
  pattern_generator dut36 (
    .clk(clk), .rst_n(rst_n), .start(start), .data_out(d36), .op_out(op36), .valid(v36));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #200000; failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  bit seen [256];
  logic [7:0] first8;
  logic [35:0] prev36;
  int distinct;
  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    check(v8 == 0, "valid low before start");
    start = 1;
    @(negedge clk);
    check(v8 == 1, "valid one cycle after start");
    first8 = d8;
    prev36 = d36;
    distinct = 0;
    for (int i = 0; i < 255; i++) begin
      if (i > 0) begin
        check(d36 == {prev36[34:0], prev36[35] ^ prev36[24]}, "36-bit LFSR step");
        prev36 = d36;
      end
      check(d8 != 0, "LFSR never zero");
      if (!seen[d8]) distinct++;
      seen[d8] = 1;
      check(op8 == 2'((i / 5) % 3), $sformatf("op sequence at vector %0d: %0d", i, op8));
      check(op36 == 2'((i / 64) % 4), "default op sequence");
      @(negedge clk);
    end
    check(distinct == 255, $sformatf("255 distinct values, got %0d", distinct));
    check(d8 == first8, "period is 255");
    start = 0;
    @(negedge clk);
    check(v8 == 0, "valid drops one cycle after start");
    @(negedge clk);
    start = 1;
    @(negedge clk);
    check(d8 == first8 && op8 == 0, "restart from first vector");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

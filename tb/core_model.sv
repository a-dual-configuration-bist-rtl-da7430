// core_model: behavioural stand-in for one embedded hard block under test (a
// DSP-like multiply/accumulate slice), with fault injection. Testbench only.
//
// Input din carries two 18-bit operands, a = din[17:0] and b = din[35:18]; op
// selects one of four registered operations:
//   0: p = a*b   1: p = p + a*b   2: p = {din, din[11:0]}   3: p = p + din
// The output p is registered, so it follows its inputs by one cycle
// (CORE_LAT = 1). When fault_en is high and the operation being performed has
// its bit set in fault_ops, bit fault_bit of the result is forced to 1
// (stuck-at-1), which models a defect exercised only by some functions.
module core_model (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [35:0] din,
  input  logic [1:0]  op,
  input  logic        fault_en,
  input  logic [5:0]  fault_bit,
  input  logic [3:0]  fault_ops,
  output logic [47:0] p
);
  logic [17:0] a, b;
  logic [47:0] nxt;
  assign a = din[17:0];
  assign b = din[35:18];

  always_comb begin
    case (op)
      2'd0:    nxt = 48'(a) * 48'(b);
      2'd1:    nxt = p + 48'(a) * 48'(b);
      2'd2:    nxt = {din, din[11:0]};
      default: nxt = p + 48'(din);
    endcase
    if (fault_en && fault_ops[op] && fault_bit < 6'd48) nxt[fault_bit] = 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) p <= '0;
    else        p <= nxt;
endmodule

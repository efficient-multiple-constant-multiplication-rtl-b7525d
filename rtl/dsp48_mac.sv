// dsp48_mac: the part of a DSP48E1-style slice that the constant-multiplication
// method uses, P = A * B + C.
//
// The slice has a signed A x B multiplier (25 x 18 bits) followed by a 48-bit
// adder that adds the C operand. A, B and C are registered on entry (the
// slice's AREG/BREG/CREG stage) and P on exit (PREG), so P appears two clock
// cycles after its operands. The multiplier width and the 48-bit adder follow
// the DSP48E1; the slice's pre-adder, pattern detector, cascade paths and
// run-time opcode selection are not used by the method and are left out. The
// registers have no reset, as the method never needs P before its operands
// have passed through.
//
// Ports: a, b signed operands; c 48-bit addend; p the registered result.
module dsp48_mac #(
  parameter int A_W = 25,
  parameter int B_W = 18,
  parameter int P_W = 48
) (
  input  logic                  clk,
  input  logic signed [A_W-1:0] a,
  input  logic signed [B_W-1:0] b,
  input  logic        [P_W-1:0] c,
  output logic        [P_W-1:0] p
);

  logic signed [A_W-1:0]     a_r;
  logic signed [B_W-1:0]     b_r;
  logic        [P_W-1:0]     c_r;
  logic signed [A_W+B_W-1:0] m;

  // Multiplier stage (combinational between the input and output registers).
  assign m = a_r * b_r;

  always_ff @(posedge clk) begin
    a_r <= a;
    b_r <= b;
    c_r <= c;
    p   <= P_W'(m) + c_r;
  end

endmodule

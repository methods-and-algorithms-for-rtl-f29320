// ff_op_unit: one operation unit of the data processing scheme.
//
// The resource restriction of the complex-multiplier example allows two
// operations per step, multiplications, additions or subtractions alike, so the
// data processing scheme owns two of these units and gives each an operation per
// step. The unit is purely combinational: r_o follows op_i, x_i and y_i in the
// same cycle.
//
// Operands and result are 2*W+1 bits, signed, wide enough for a sum or
// difference of two W x W products. A multiplication uses only the low W bits
// of each operand, read as signed W-bit numbers, since it is only ever applied
// to the W-bit input values. That a unit can do all three operations is a
// reading of the restriction "2 multiplications / additions / subtractions per
// step"; the word width W is this design's choice.
module ff_op_unit
  import ff_pkg::*;
#(
  parameter int unsigned W = 16
) (
  input  op_e                 op_i,
  input  logic signed [2*W:0] x_i,
  input  logic signed [2*W:0] y_i,
  output logic signed [2*W:0] r_o
);

  logic signed [W-1:0]   xm, ym;
  logic signed [2*W-1:0] prod;

  assign xm   = x_i[W-1:0];
  assign ym   = y_i[W-1:0];
  assign prod = xm * ym;

  always_comb begin
    unique case (op_i)
      OP_MUL:  r_o = (2*W+1)'(prod);
      OP_ADD:  r_o = x_i + y_i;
      OP_SUB:  r_o = x_i - y_i;
      default: r_o = '0;
    endcase
  end

endmodule

// ff_interp_automaton: automaton of the interpretation operator.
//
// An interpretation vertex (":" in the graphs) applies a function to a data
// list. Once parallel lists are opened it has exactly one data-ready and one
// function-ready input, and its automaton is the AND of the two. In the complex
// multiplier the functions (*, +, -) are constants, so func_rdy_i is tied to the
// constant ready signal 1 and the gate reduces to the data-ready signal at
// synthesis. Combinational, no clock.
module ff_interp_automaton (
  input  logic data_rdy_i,
  input  logic func_rdy_i,
  output logic rdy_o
);

  assign rdy_o = data_rdy_i & func_rdy_i;

endmodule

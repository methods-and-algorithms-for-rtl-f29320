// ff_control_scheme: synthesized control scheme of the complex multiplier.
//
// The control scheme carries no data and computes no conditions: it only moves
// data-ready signals through the automata of the optimized control-flow graph
// of (a + jb)(c + jd). Every output bit v_rdy_o[k] is the ready signal of graph
// vertex k:
//   3..6   input data-ready registers of ports a, b, c, d (D = rdy_i)
//   7, 9, 13, 15  operand lists (a,c), (b,d), (a,d), (b,c): AND gates
//   8, 10, 14, 16 products a*c, b*d, a*d, b*c ready: registers after the gates
//   11, 17 lists (ac, bd) and (ad, bc): AND gates
//   12, 18 real part (ac - bd) and imaginary part (ad + bc) ready: registers
//   19     result list (re, im): AND gate; its register is the output port
//          (vertex 20, ff_return_port).
// The connections, the gate and register numbers and the order of the list
// elements are those of the synthesized scheme and of the optimized graph. Each
// list is a list automaton in "AND gate and next register" form; the register
// belongs to the list, and the interpretation automaton that follows is an AND
// with the constant function-ready signal of *, + or -.
//
// Timing: with all four rdy_i raised together in cycle 0, vertices 3..6 rise at
// edge 1, 8/10/14/16 at edge 2, 12/18 at edge 3, and 19 in the same cycle; the
// ready signals are levels and fall the same way when rdy_i fall. Reset is
// asynchronous and active low (this design's choice).
module ff_control_scheme
  import ff_pkg::*;
(
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic [NUM_PORTS-1:0]     rdy_i,
  output logic [V_LAST:V_FIRST]    v_rdy_o
);

  logic [6:3] v_in;                              // vertices 3..6
  logic v7, v9, v13, v15, v11, v17, v19;         // list AND gates
  logic v8, v10, v14, v16, v12, v18;             // operation ready
  logic r7, r9, r13, r15, r11, r17, unused_r19;  // list registers

  // Vertices 3..6: input ports, data-ready recorded in registers.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) v_in <= '0;
    else        v_in <= rdy_i;
  end

  // First level: operand lists of the four products. Element 1 of each list
  // is the lower bit.
  ff_list_automaton #(.N(2), .STYLE(LIST_AND_REG)) u_list7 (
    .clk, .rst_n, .clr_i(1'b0), .rdy_i({v_in[5], v_in[3]}), .all_o(v7),  .rdy_o(r7));
  ff_list_automaton #(.N(2), .STYLE(LIST_AND_REG)) u_list9 (
    .clk, .rst_n, .clr_i(1'b0), .rdy_i({v_in[6], v_in[4]}), .all_o(v9),  .rdy_o(r9));
  ff_list_automaton #(.N(2), .STYLE(LIST_AND_REG)) u_list13 (
    .clk, .rst_n, .clr_i(1'b0), .rdy_i({v_in[6], v_in[3]}), .all_o(v13), .rdy_o(r13));
  ff_list_automaton #(.N(2), .STYLE(LIST_AND_REG)) u_list15 (
    .clk, .rst_n, .clr_i(1'b0), .rdy_i({v_in[5], v_in[4]}), .all_o(v15), .rdy_o(r15));

  // Multiplications: interpretation automata with the constant ready of '*'.
  ff_interp_automaton u_op8  (.data_rdy_i(r7),  .func_rdy_i(1'b1), .rdy_o(v8));
  ff_interp_automaton u_op10 (.data_rdy_i(r9),  .func_rdy_i(1'b1), .rdy_o(v10));
  ff_interp_automaton u_op14 (.data_rdy_i(r13), .func_rdy_i(1'b1), .rdy_o(v14));
  ff_interp_automaton u_op16 (.data_rdy_i(r15), .func_rdy_i(1'b1), .rdy_o(v16));

  // Second level: (ac, bd) for '-', (ad, bc) for '+'.
  ff_list_automaton #(.N(2), .STYLE(LIST_AND_REG)) u_list11 (
    .clk, .rst_n, .clr_i(1'b0), .rdy_i({v10, v8}),  .all_o(v11), .rdy_o(r11));
  ff_list_automaton #(.N(2), .STYLE(LIST_AND_REG)) u_list17 (
    .clk, .rst_n, .clr_i(1'b0), .rdy_i({v16, v14}), .all_o(v17), .rdy_o(r17));

  ff_interp_automaton u_op12 (.data_rdy_i(r11), .func_rdy_i(1'b1), .rdy_o(v12));
  ff_interp_automaton u_op18 (.data_rdy_i(r17), .func_rdy_i(1'b1), .rdy_o(v18));

  // Result list (re, im); its register is the output port, vertex 20.
  ff_list_automaton #(.N(2), .STYLE(LIST_AND)) u_list19 (
    .clk, .rst_n, .clr_i(1'b0), .rdy_i({v18, v12}), .all_o(v19), .rdy_o(unused_r19));

  assign v_rdy_o = {v19, v18, v17, v16, v15, v14, v13, v12, v11, v10, v9, v8, v7, v_in};

endmodule

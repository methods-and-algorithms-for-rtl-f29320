// ff_pkg: types and constants shared by the functional-flow complex multiplier.
//
// The multiplier is built the way a functional-flow (FF) synthesis route builds
// hardware from a data-flow graph: a data processing scheme (operation units and
// registers) and a control scheme made only of data-ready automata. This package
// holds the operation codes of the shared operation units, the implementation
// styles of the data-list automaton and the vertex numbering of the optimized
// control-flow graph, which the control scheme uses to name its ready signals.
package ff_pkg;

  // Operation of one operation unit in one step.
  typedef enum logic [1:0] {
    OP_MUL = 2'd0,
    OP_ADD = 2'd1,
    OP_SUB = 2'd2
  } op_e;

  // How a data-list automaton is realised.
  //   LIST_AND     : AND of the input ready signals, no register
  //   LIST_AND_REG : AND of the input ready signals followed by a register
  //   LIST_COUNTER : counter of incoming ready events; ready on reaching N
  typedef enum logic [1:0] {
    LIST_AND     = 2'd0,
    LIST_AND_REG = 2'd1,
    LIST_COUNTER = 2'd2
  } list_style_e;

  // Input ports of the complex product (a + jb)(c + jd), in the order of the
  // input vertices 3, 4, 5 and 6 of the control-flow graph.
  localparam int unsigned PORT_A = 0;  // vertex 3
  localparam int unsigned PORT_B = 1;  // vertex 4
  localparam int unsigned PORT_C = 2;  // vertex 5
  localparam int unsigned PORT_D = 3;  // vertex 6
  localparam int unsigned NUM_PORTS = 4;

  // Lowest and highest vertex numbers whose ready signal the control scheme
  // drives (vertex 20, the result return, sits in the output port).
  localparam int unsigned V_FIRST = 3;
  localparam int unsigned V_LAST  = 19;

endpackage

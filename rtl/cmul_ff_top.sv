// cmul_ff_top: the synthesized ComplexNumsMult unit, (a + jb)(c + jd).
//
// Four input ports a, b, c, d, each with its own data-ready signal, feed the
// control scheme (ready automata only) and the data processing scheme (two
// shared operation units, three steps). The control scheme's list-ready
// signals allow each step of the datapath to fire; the result list's ready
// signal (vertex 19) is registered in the output port (vertex 20) together
// with the two result elements, real and imaginary part.
//
// Handshake (this design's choice; the document gives only the ready-signal
// network): a producer raises in_rdy_i[k] with in_data_i[k] and holds both
// until out_rdy_o is high; it then lowers all in_rdy_i for at least one cycle
// before the next operation. The consumer reads out_re_o/out_im_o while
// out_rdy_o is high. With all inputs ready in cycle 0, out_rdy_o rises after
// the fourth clock edge, as in the synthesized control scheme (input registers,
// product registers, sum/difference registers, output register).
// v_rdy_o, step_o and stall_o expose the vertex ready signals and the
// datapath's progress for observation. Reset is asynchronous and active low.
module cmul_ff_top
  import ff_pkg::*;
#(
  parameter int unsigned W = 16
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic [NUM_PORTS-1:0]  in_rdy_i,
  input  logic signed [W-1:0]   in_data_i [NUM_PORTS],
  output logic                  out_rdy_o,
  output logic signed [2*W:0]   out_re_o,
  output logic signed [2*W:0]   out_im_o,
  // Status, for observation only
  output logic [V_LAST:V_FIRST] v_rdy_o,    // ready of control-graph vertices 3..19
  output logic [1:0]            step_o,     // datapath step firing (0 = none)
  output logic                  stall_o     // datapath waiting for operand lists
);

  logic [V_LAST:V_FIRST] v_rdy;
  logic                  res_load;
  logic signed [2*W:0]   re, im;

  ff_control_scheme u_ctrl (
    .clk, .rst_n, .rdy_i(in_rdy_i), .v_rdy_o(v_rdy));

  cmul_datapath #(.W(W)) u_dp (
    .clk, .rst_n,
    .load_i(in_rdy_i), .data_i(in_data_i),
    .go1_i(v_rdy[7]  & v_rdy[9]),
    .go2_i(v_rdy[13] & v_rdy[15]),
    .go3_i(v_rdy[11] & v_rdy[17]),
    .step_o, .stall_o,
    .res_load_o(res_load), .re_o(re), .im_o(im));

  ff_return_port #(.W(W)) u_ret (
    .clk, .rst_n, .rdy_i(v_rdy[19]), .load_i(res_load),
    .re_i(re), .im_i(im), .rdy_o(out_rdy_o), .re_o(out_re_o), .im_o(out_im_o));

  assign v_rdy_o = v_rdy;

  // The datapath must have delivered the result by the time the output
  // ready register rises.
  logic loaded_q;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                        loaded_q <= 1'b0;
    else if (v_rdy[19] && !out_rdy_o)  loaded_q <= 1'b0;  // result handed over
    else if (res_load)                 loaded_q <= 1'b1;
  end

  a_result_ready: assert property (@(posedge clk) disable iff (!rst_n)
    (v_rdy[19] && !out_rdy_o) |-> (loaded_q || res_load));

endmodule

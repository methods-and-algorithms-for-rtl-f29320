// ff_return_port: automaton of result return, the output port of the function.
//
// The output vertex (20) of the complex multiplier is an output port of two
// elements, the real and the imaginary part, together with the output
// data-ready signal, which is generated in a register. rdy_o is rdy_i delayed
// by one clock. The two data elements are loaded from the data processing
// scheme whenever load_i is high and hold their value otherwise; the data
// processing scheme loads them no later than the cycle in which rdy_i first
// rises, so they are valid whenever rdy_o is high. Reset (asynchronous, active
// low) clears the ready register and the data; the reset and the separate load
// strobe for the data are this design's choices.
module ff_return_port #(
  parameter int unsigned W = 16
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                rdy_i,
  input  logic                load_i,
  input  logic signed [2*W:0] re_i,
  input  logic signed [2*W:0] im_i,
  output logic                rdy_o,
  output logic signed [2*W:0] re_o,
  output logic signed [2*W:0] im_o
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rdy_o <= 1'b0;
      re_o  <= '0;
      im_o  <= '0;
    end else begin
      rdy_o <= rdy_i;
      if (load_i) begin
        re_o <= re_i;
        im_o <= im_i;
      end
    end
  end

endmodule

// ff_list_automaton: data-list automaton of the control scheme.
//
// A data list (vertices drawn "(----)" in the control-flow graph) becomes ready
// once as many data-ready signals have arrived as the list has elements, N. Two
// realisations are described for it and both are available here:
//   LIST_AND_REG : the AND of the N level ready inputs, followed by a register.
//                  all_o is the AND gate, rdy_o the register (one cycle later).
//                  This is the form drawn in the synthesized control scheme.
//   LIST_COUNTER : a counter of incoming ready events (each rdy_i bit high for a
//                  cycle counts once); rdy_o is its overflow, raised in the cycle
//                  after the N-th event and held until clr_i.
//   LIST_AND     : the AND gate alone (all_o = rdy_o, combinational), used where
//                  the register that follows belongs to the next vertex.
// clr_i is a synchronous clear, added in this design so that a counter can be
// reused; in the AND forms it forces the registered output low. Reset is
// asynchronous and active low. In LIST_COUNTER form all_o shows the count
// reaching N in the current cycle.
module ff_list_automaton
  import ff_pkg::*;
#(
  parameter int unsigned N     = 2,
  parameter list_style_e STYLE = LIST_AND_REG
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         clr_i,
  input  logic [N-1:0] rdy_i,
  output logic         all_o,
  output logic         rdy_o
);

  localparam int unsigned CW = $clog2(N + 1);

  if (STYLE == LIST_COUNTER) begin : g_counter
    logic [CW-1:0] cnt_q;
    logic [CW:0]   sum;

    always_comb begin
      sum = {1'b0, cnt_q};
      for (int unsigned i = 0; i < N; i++) sum = sum + (CW + 1)'(rdy_i[i]);
    end

    assign all_o = (sum >= (CW + 1)'(N));

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        cnt_q <= '0;
        rdy_o <= 1'b0;
      end else if (clr_i) begin
        cnt_q <= '0;
        rdy_o <= 1'b0;
      end else if (all_o) begin
        cnt_q <= CW'(N);  // saturate at the list size
        rdy_o <= 1'b1;
      end else begin
        cnt_q <= sum[CW-1:0];
      end
    end
  end else if (STYLE == LIST_AND_REG) begin : g_and_reg
    assign all_o = &rdy_i;

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n)     rdy_o <= 1'b0;
      else if (clr_i) rdy_o <= 1'b0;
      else            rdy_o <= all_o;
    end
  end else begin : g_and
    assign all_o = &rdy_i & ~clr_i;
    assign rdy_o = all_o;
  end

endmodule

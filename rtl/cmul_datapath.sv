// cmul_datapath: three-step data processing scheme of the complex multiplier.
//
// Computes (a + jb)(c + jd) = (ac - bd) + j(ad + bc) with two shared operation
// units, two operations per step, in three steps:
//   step 1: a*c and b*d        (products of vertices 8 and 10)
//   step 2: a*d and b*c        (vertices 14 and 16)
//   step 3: ac - bd and ad + bc (vertices 12 and 18)
// The four multiplications, the subtraction, the addition, the two-operation
// restriction and the three-step schedule follow the document; which product
// pair goes to step 1 is this design's choice.
//
// Each input port has its own data register, loaded in every cycle its
// load_i bit (the port's data-ready signal) is high. A step fires only when
// the control scheme reports its operand lists ready (go1_i: lists 7 and 9,
// go2_i: lists 13 and 15, go3_i: lists 11 and 17), otherwise the datapath waits
// in that step (stall_o). Step 1 and 2 results go to four product registers;
// step 3 is combinational into the output port: res_load_o is high in the
// cycle re_o/im_o are valid. After step 3 the datapath waits in DONE until go1_i
// falls (the inputs were withdrawn), then accepts the next operation.
// Reset is asynchronous and active low.
module cmul_datapath
  import ff_pkg::*;
#(
  parameter int unsigned W = 16
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic [NUM_PORTS-1:0]       load_i,
  input  logic signed [W-1:0]        data_i [NUM_PORTS],
  input  logic                       go1_i,
  input  logic                       go2_i,
  input  logic                       go3_i,
  output logic [1:0]                 step_o,     // step firing this cycle, 0 = none
  output logic                       stall_o,    // waiting for operand lists
  output logic                       res_load_o,
  output logic signed [2*W:0]        re_o,
  output logic signed [2*W:0]        im_o
);

  typedef enum logic [1:0] {DP_IDLE, DP_S2, DP_S3, DP_DONE} dp_state_e;

  dp_state_e             state_q, state_d;
  logic signed [W-1:0]   in_q [NUM_PORTS];
  logic signed [2*W:0]   p_q  [4];          // ac, bd, ad, bc
  op_e                   op0, op1;
  logic signed [2*W:0]   x0, y0, x1, y1, r0, r1;
  logic                  fire;

  // Input data registers, one per port.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NUM_PORTS; i++) in_q[i] <= '0;
    end else begin
      for (int i = 0; i < NUM_PORTS; i++) if (load_i[i]) in_q[i] <= data_i[i];
    end
  end

  // Step selection: operands and operation of the two units.
  always_comb begin
    state_d = state_q;
    fire    = 1'b0;
    step_o  = 2'd0;
    op0     = OP_MUL;
    op1     = OP_MUL;
    x0 = (2*W+1)'(in_q[PORT_A]); y0 = (2*W+1)'(in_q[PORT_C]);
    x1 = (2*W+1)'(in_q[PORT_B]); y1 = (2*W+1)'(in_q[PORT_D]);
    unique case (state_q)
      DP_IDLE: begin
        fire = go1_i;
        if (fire) begin step_o = 2'd1; state_d = DP_S2; end
      end
      DP_S2: begin
        y0 = (2*W+1)'(in_q[PORT_D]);
        y1 = (2*W+1)'(in_q[PORT_C]);
        fire = go2_i;
        if (fire) begin step_o = 2'd2; state_d = DP_S3; end
      end
      DP_S3: begin
        op0 = OP_SUB; x0 = p_q[0]; y0 = p_q[1];
        op1 = OP_ADD; x1 = p_q[2]; y1 = p_q[3];
        fire = go3_i;
        if (fire) begin step_o = 2'd3; state_d = DP_DONE; end
      end
      DP_DONE: begin
        if (!go1_i) state_d = DP_IDLE;
      end
      default: state_d = DP_IDLE;
    endcase
  end

  ff_op_unit #(.W(W)) u_unit0 (.op_i(op0), .x_i(x0), .y_i(y0), .r_o(r0));
  ff_op_unit #(.W(W)) u_unit1 (.op_i(op1), .x_i(x1), .y_i(y1), .r_o(r1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= DP_IDLE;
      for (int i = 0; i < 4; i++) p_q[i] <= '0;
    end else begin
      state_q <= state_d;
      if (step_o == 2'd1) begin p_q[0] <= r0; p_q[1] <= r1; end
      if (step_o == 2'd2) begin p_q[2] <= r0; p_q[3] <= r1; end
    end
  end

  assign stall_o    = (state_q == DP_S2 || state_q == DP_S3) && !fire;
  assign res_load_o = (step_o == 2'd3);
  assign re_o       = r0;
  assign im_o       = r1;

endmodule

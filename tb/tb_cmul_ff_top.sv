// tb_cmul_ff_top: end-to-end test of the complex multiplier at its default size.
//
// Runs a sequence of complex products (a + jb)(c + jd) through the unit with
// the handshake of the input ports: each port's ready signal and data rise at
// its own cycle and are held until the output is ready, then all are lowered
// for one or more cycles (one cycle gives back-to-back operation). The output
// of an operation is the first rise of the output ready after it has been low:
// the previous result's ready may still be high when the next operation's
// inputs arrive, and falls for at least one cycle before the new one rises. For every
// operation it checks
//   - the real and imaginary part against integer arithmetic in the testbench,
//   - the latency: the output ready rises four clocks after the last input
//     ready, the depth of the ready network,
//   - that the output ready does not rise before that,
//   - that the datapath used exactly three steps.
// It counts the mechanisms of the design and fails if one never occurred:
// inputs arriving together, inputs arriving at different cycles, a datapath
// step 1 waiting while only some operand lists are complete, back-to-back
// operations with a one-cycle gap, and corner operands of full magnitude. Once
// step 1 has fired all four inputs are present, so steps 2 and 3 can never
// stall here (they are made to stall in the datapath's own test); the test
// checks that none does.
module tb_cmul_ff_top;
  import ff_pkg::*;

  localparam int unsigned W = 16;  // the top's default word width
  localparam int NOPS = 500;

  logic clk = 0, rst_n = 0;
  logic [3:0] in_rdy;
  logic signed [W-1:0] in_data [4];
  logic out_rdy;
  logic signed [2*W:0] out_re, out_im;
  logic [V_LAST:V_FIRST] v_rdy;
  logic [1:0] step;
  logic stall;
  int checks = 0, failures = 0;
  int n_together = 0, n_staggered = 0, n_wait = 0, n_stall = 0, n_b2b = 0, n_corner = 0;

  always #5 clk = ~clk;

  cmul_ff_top dut (
    .clk, .rst_n, .in_rdy_i(in_rdy), .in_data_i(in_data),
    .out_rdy_o(out_rdy), .out_re_o(out_re), .out_im_o(out_im),
    .v_rdy_o(v_rdy), .step_o(step), .stall_o(stall));

  task automatic check(string what, bit ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    repeat (NOPS * 40 + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint x [4];
    int arr [4];
    int last, c, steps, stalled, waited, gap;
    bit seen_low;
    in_rdy = '0;
    for (int k = 0; k < 4; k++) in_data[k] = '0;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    gap = 1;
    for (int op = 0; op < NOPS; op++) begin
      // Operands
      for (int k = 0; k < 4; k++) x[k] = longint'($signed(16'($urandom)));
      if (op % 50 == 3) begin
        for (int k = 0; k < 4; k++) x[k] = -32768;
        x[op % 4] = (op % 100 == 3) ? -32768 : 32767;
        n_corner++;
      end
      // Arrival offsets of the four ports
      last = 0;
      for (int k = 0; k < 4; k++) begin
        arr[k] = (op % 3 == 0) ? 0 : int'($urandom % 4);
        if (arr[k] > last) last = arr[k];
      end
      if (arr[0] == arr[1] && arr[1] == arr[2] && arr[2] == arr[3]) n_together++;
      else n_staggered++;
      if (gap == 1 && op > 0) n_b2b++;
      steps = 0; stalled = 0; waited = 0; seen_low = 0;
      c = 0;
      forever begin
        for (int k = 0; k < 4; k++) begin
          in_rdy[k] = (c >= arr[k]);
          in_data[k] = (c >= arr[k]) ? W'(x[k]) : W'($urandom);
        end
        #1;
        if (step != 0) steps++;
        if (stall) stalled = 1;
        // a product's operand list is complete but step 1 still waits
        if ((v_rdy[7] || v_rdy[9] || v_rdy[13] || v_rdy[15]) && !(v_rdy[7] && v_rdy[9])) waited = 1;
        if (!out_rdy) seen_low = 1;
        else if (seen_low) break;
        if (c > last + 10) break;
        @(negedge clk);
        c++;
      end
      check("latency: output ready 4 clocks after last input", c == last + 4);
      if (c != last + 4) $display("  op %0d: out_rdy at +%0d, last input at +%0d", op, c, last);
      check("three datapath steps", steps == 3);
      check("real part", longint'(out_re) == x[0] * x[2] - x[1] * x[3]);
      check("imaginary part", longint'(out_im) == x[0] * x[3] + x[1] * x[2]);
      if (longint'(out_re) != x[0] * x[2] - x[1] * x[3] || longint'(out_im) != x[0] * x[3] + x[1] * x[2])
        $display("  op %0d: got %0d %0d", op, out_re, out_im);
      if (stalled) n_stall++;
      if (waited) n_wait++;
      // Hold one more cycle sometimes, then withdraw for gap cycles.
      @(negedge clk);
      in_rdy = '0;
      gap = ($urandom % 3 == 0) ? 1 + int'($urandom % 6) : 1;
      repeat (gap) @(negedge clk);
    end
    $display("together=%0d staggered=%0d partial_wait=%0d stall=%0d back_to_back=%0d corner=%0d",
             n_together, n_staggered, n_wait, n_stall, n_b2b, n_corner);
    check("inputs arrived together", n_together > 0);
    check("inputs arrived staggered", n_staggered > 0);
    check("step 1 waited on a partial operand set", n_wait > 0);
    // Step 1 needs lists 7 and 9, i.e. all four inputs, so steps 2 and 3
    // always find their lists ready: no stall may occur inside the unit.
    check("no stall after step 1", n_stall == 0);
    check("back-to-back operations", n_b2b > 0);
    check("corner operands", n_corner > 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

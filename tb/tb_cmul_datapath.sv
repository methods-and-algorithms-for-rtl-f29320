// tb_cmul_datapath: self-checking test of the three-step data processing scheme.
//
// The testbench plays the control scheme: it loads the four input registers and
// then raises the three step permissions go1..go3 after random delays. It
// checks that the steps fire in the order 1, 2, 3, one per cycle at the
// earliest, and never before their permission; that the datapath stalls while
// a permission is missing; that step 3 delivers re = ac - bd and im = ad + bc,
// computed here in integer arithmetic; and that no step fires again until go1
// has been withdrawn. Corner values (-2^(W-1)) are included.
module tb_cmul_datapath;
  import ff_pkg::*;

  localparam int unsigned W = 16;

  logic clk = 0, rst_n = 0;
  logic [3:0] load;
  logic signed [W-1:0] data [4];
  logic go1, go2, go3;
  logic [1:0] step;
  logic stall, res_load;
  logic signed [2*W:0] re, im;
  int checks = 0, failures = 0, stalls = 0;

  always #5 clk = ~clk;

  cmul_datapath #(.W(W)) dut (
    .clk, .rst_n, .load_i(load), .data_i(data), .go1_i(go1), .go2_i(go2), .go3_i(go3),
    .step_o(step), .stall_o(stall), .res_load_o(res_load), .re_o(re), .im_o(im));

  task automatic check(string what, bit ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint a, b, c, d;
    int g1, g2, g3, seen_step, last_step_cyc, cyc;
    load = '0; go1 = 0; go2 = 0; go3 = 0;
    for (int k = 0; k < 4; k++) data[k] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int op = 0; op < 200; op++) begin
      if (op == 0) begin a = -32768; b = -32768; c = -32768; d = 32767; end
      else if (op == 1) begin a = -32768; b = 32767; c = -32768; d = -32768; end
      else begin
        a = longint'($signed(16'($urandom))); b = longint'($signed(16'($urandom)));
        c = longint'($signed(16'($urandom))); d = longint'($signed(16'($urandom)));
      end
      @(negedge clk);
      data[PORT_A] = W'(a); data[PORT_B] = W'(b); data[PORT_C] = W'(c); data[PORT_D] = W'(d);
      load = 4'hF;
      @(negedge clk);
      load = '0;
      for (int k = 0; k < 4; k++) data[k] = W'($urandom);  // must not be taken
      // Permission times (cycles from now); go2/go3 may come before go1.
      g1 = $urandom % 3; g2 = $urandom % 5; g3 = $urandom % 7;
      seen_step = 0; last_step_cyc = -1;
      for (cyc = 0; cyc < 20; cyc++) begin
        go1 = (cyc >= g1); go2 = (cyc >= g2); go3 = (cyc >= g3);
        #1;
        if (stall) stalls++;
        if (step != 0) begin
          check("steps in order", int'(step) == seen_step + 1);
          check("one step per cycle", cyc > last_step_cyc);
          case (step)
            2'd1: check("step 1 only with go1", go1);
            2'd2: check("step 2 only with go2", go2);
            default: check("step 3 only with go3", go3);
          endcase
          check("result load only in step 3", res_load == (step == 2'd3));
          if (step == 2'd3) begin
            check("real part", longint'(re) == a * c - b * d);
            check("imaginary part", longint'(im) == a * d + b * c);
            if (longint'(re) != a * c - b * d || longint'(im) != a * d + b * c)
              $display("  got %0d %0d expected %0d %0d", re, im, a*c - b*d, a*d + b*c);
          end
          seen_step = step;
          last_step_cyc = cyc;
        end else begin
          // A step that is allowed and due must fire.
          check("no needless wait",
                !((seen_step == 0 && go1) || (seen_step == 1 && go2) || (seen_step == 2 && go3)));
        end
        @(negedge clk);
      end
      check("all three steps done", seen_step == 3);
      // Hold go1 a little longer: nothing may restart.
      repeat (2) begin #1; check("no restart while go1 held", step == 0); @(negedge clk); end
      go1 = 0; go2 = 0; go3 = 0;
      @(negedge clk);
    end
    check("stalls occurred", stalls > 0);
    $display("stall cycles: %0d", stalls);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

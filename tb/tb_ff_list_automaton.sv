// tb_ff_list_automaton: self-checking test of the data-list automaton.
//
// Drives one random stimulus into four instances: the AND-and-register form
// and the plain AND form with N = 2, and the counter form with N = 2 and
// N = 3. A reference model in the testbench computes, cycle by cycle, the AND
// of the levels (delayed by one clock for the registered form) and the number
// of ready events seen since the last clear (ready once it reaches N), and
// every output is compared with it. The counter is also checked to raise
// ready exactly one clock after the N-th event.
module tb_ff_list_automaton;
  import ff_pkg::*;

  logic clk = 0, rst_n = 0, clr;
  logic [1:0] r2;
  logic [2:0] r3;
  logic and_all, and_rdy, areg_all, areg_rdy, c2_all, c2_rdy, c3_all, c3_rdy;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  ff_list_automaton #(.N(2), .STYLE(LIST_AND))     u_and  (.clk, .rst_n, .clr_i(clr), .rdy_i(r2), .all_o(and_all),  .rdy_o(and_rdy));
  ff_list_automaton #(.N(2), .STYLE(LIST_AND_REG)) u_areg (.clk, .rst_n, .clr_i(clr), .rdy_i(r2), .all_o(areg_all), .rdy_o(areg_rdy));
  ff_list_automaton #(.N(2), .STYLE(LIST_COUNTER)) u_c2   (.clk, .rst_n, .clr_i(clr), .rdy_i(r2), .all_o(c2_all),   .rdy_o(c2_rdy));
  ff_list_automaton #(.N(3), .STYLE(LIST_COUNTER)) u_c3   (.clk, .rst_n, .clr_i(clr), .rdy_i(r3), .all_o(c3_all),   .rdy_o(c3_rdy));

  task automatic check(string what, logic got, logic exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %b expected %b at %0t", what, got, exp, $time);
    end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic exp_areg;
    int   cnt2, cnt3;
    logic exp_c2, exp_c3;
    int   c2_fired = 0, c3_fired = 0;
    clr = 0; r2 = '0; r3 = '0;
    exp_areg = 0; cnt2 = 0; cnt3 = 0; exp_c2 = 0; exp_c3 = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 1000; i++) begin
      @(negedge clk);
      clr = ($urandom % 8) == 0;
      r2  = 2'($urandom) & 2'($urandom);  // events are sparse
      r3  = 3'($urandom) & 3'($urandom);
      #1;
      check("AND all", and_all, (&r2) & ~clr);
      check("AND rdy", and_rdy, (&r2) & ~clr);
      check("AND_REG all", areg_all, &r2);
      check("COUNTER2 all", c2_all, (cnt2 + $countones(r2)) >= 2);
      check("COUNTER3 all", c3_all, (cnt3 + $countones(r3)) >= 3);
      @(posedge clk);
      // reference update
      exp_areg = clr ? 1'b0 : &r2;
      if (clr) begin cnt2 = 0; exp_c2 = 0; end
      else begin
        cnt2 += $countones(r2);
        if (cnt2 >= 2) begin
          if (!exp_c2) c2_fired++;
          cnt2 = 2; exp_c2 = 1;
        end
      end
      if (clr) begin cnt3 = 0; exp_c3 = 0; end
      else begin
        cnt3 += $countones(r3);
        if (cnt3 >= 3) begin
          if (!exp_c3) c3_fired++;
          cnt3 = 3; exp_c3 = 1;
        end
      end
      #1;
      check("AND_REG rdy", areg_rdy, exp_areg);
      check("COUNTER2 rdy", c2_rdy, exp_c2);
      check("COUNTER3 rdy", c3_rdy, exp_c3);
    end
    checks++;
    if (c2_fired < 5 || c3_fired < 5) begin
      failures++;
      $display("FAIL counters overflowed too rarely: %0d %0d", c2_fired, c3_fired);
    end
    $display("counter overflows: N=2 %0d, N=3 %0d", c2_fired, c3_fired);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

// tb_ff_interp_automaton: self-checking test of the interpretation automaton.
//
// Walks the four combinations of data-ready and function-ready and checks that
// the automaton is ready only when both are; then checks that with the
// function-ready tied to the constant 1 the output follows the data-ready.
module tb_ff_interp_automaton;

  logic d, f, r, rc;
  int checks = 0, failures = 0;

  ff_interp_automaton dut  (.data_rdy_i(d), .func_rdy_i(f),    .rdy_o(r));
  ff_interp_automaton dutc (.data_rdy_i(d), .func_rdy_i(1'b1), .rdy_o(rc));

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 4; i++) begin
      {d, f} = 2'(i);
      #1;
      checks++;
      if (r !== (i == 3)) begin
        failures++;
        $display("FAIL data=%b func=%b rdy=%b", d, f, r);
      end
      checks++;
      if (rc !== d) begin
        failures++;
        $display("FAIL constant function: data=%b rdy=%b", d, rc);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

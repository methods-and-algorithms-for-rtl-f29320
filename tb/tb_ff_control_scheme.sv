// tb_ff_control_scheme: self-checking test of the ready-signal network.
//
// For each operation the four input ready signals rise at random cycles and
// are held. The expected rise cycle of every vertex is computed from the
// graph in the testbench: an input register rises one clock after its input,
// an AND gate with the later of its inputs, a list register one clock after
// its gate. Every vertex is sampled every cycle and must be low before its
// expected rise and high from then on. All inputs then fall and every vertex
// must be low again after the network has drained.
module tb_ff_control_scheme;
  import ff_pkg::*;

  logic clk = 0, rst_n = 0;
  logic [3:0] rdy;
  logic [V_LAST:V_FIRST] v;
  int checks = 0, failures = 0;
  int cyc = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  ff_control_scheme dut (.clk, .rst_n, .rdy_i(rdy), .v_rdy_o(v));

  function automatic int max2(int a, int b);
    return (a > b) ? a : b;
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int t [V_LAST+1];
    int arr [4];
    int start;
    rdy = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int op = 0; op < 60; op++) begin
      // Input arrival offsets (0 = all at once for the first operations).
      for (int k = 0; k < 4; k++) arr[k] = (op < 5) ? 0 : int'($urandom % 4);
      @(negedge clk);
      start = cyc;  // cycle in which an offset-0 input is high
      // Expected first cycle each vertex is high, relative to start.
      for (int k = 0; k < 4; k++) t[3 + k] = arr[k] + 1;
      t[7]  = max2(t[3], t[5]);  t[8]  = t[7] + 1;
      t[9]  = max2(t[4], t[6]);  t[10] = t[9] + 1;
      t[13] = max2(t[3], t[6]);  t[14] = t[13] + 1;
      t[15] = max2(t[4], t[5]);  t[16] = t[15] + 1;
      t[11] = max2(t[8], t[10]); t[12] = t[11] + 1;
      t[17] = max2(t[14], t[16]); t[18] = t[17] + 1;
      t[19] = max2(t[12], t[18]);
      for (int c = 0; c <= t[19] + 1; c++) begin
        for (int k = 0; k < 4; k++) rdy[k] = (c >= arr[k]);
        #1;
        for (int n = V_FIRST; n <= V_LAST; n++) begin
          checks++;
          if (v[n] !== (c >= t[n])) begin
            failures++;
            $display("FAIL op %0d cycle +%0d: vertex %0d = %b, expected rise at +%0d",
                     op, c, n, v[n], t[n]);
          end
        end
        @(negedge clk);
      end
      // Withdraw and let the network drain.
      rdy = '0;
      repeat (5) @(negedge clk);
      checks++;
      if (v !== '0) begin
        failures++;
        $display("FAIL op %0d: network did not drain: %b", op, v);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

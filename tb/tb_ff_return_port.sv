// tb_ff_return_port: self-checking test of the output port (result return).
//
// Checks that the output ready is the input ready one clock later, that the
// two data elements load only on load_i and hold otherwise, and the reset
// values. Expected values come from a one-cycle delay model in the testbench.
module tb_ff_return_port;

  localparam int unsigned W = 8;

  logic clk = 0, rst_n = 0;
  logic rdy_i, load_i, rdy_o;
  logic signed [2*W:0] re_i, im_i, re_o, im_o;
  logic exp_rdy;
  logic signed [2*W:0] exp_re, exp_im;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  ff_return_port #(.W(W)) dut (.*);

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rdy_i = 0; load_i = 0; re_i = '0; im_i = '0;
    exp_rdy = 0; exp_re = '0; exp_im = '0;
    repeat (2) @(posedge clk);
    #1;
    checks++;
    if (rdy_o !== 1'b0 || re_o !== '0 || im_o !== '0) begin
      failures++; $display("FAIL reset values");
    end
    rst_n = 1;
    for (int i = 0; i < 400; i++) begin
      @(negedge clk);
      rdy_i  = 1'($urandom);
      load_i = ($urandom % 3) == 0;
      re_i   = (2*W+1)'($urandom);
      im_i   = (2*W+1)'($urandom);
      @(posedge clk);
      exp_rdy = rdy_i;
      if (load_i) begin exp_re = re_i; exp_im = im_i; end
      #1;
      checks++;
      if (rdy_o !== exp_rdy || re_o !== exp_re || im_o !== exp_im) begin
        failures++;
        $display("FAIL cycle %0d: rdy=%b re=%0d im=%0d expected %b %0d %0d",
                 i, rdy_o, re_o, im_o, exp_rdy, exp_re, exp_im);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

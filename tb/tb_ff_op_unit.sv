// tb_ff_op_unit: self-checking test of the operation unit.
//
// Applies random and corner-case signed operands for each of multiply, add and
// subtract and compares r_o with a result computed in 64-bit integer
// arithmetic. The unit is combinational; a small clock paces the test and a
// watchdog ends it if it hangs.
module tb_ff_op_unit;
  import ff_pkg::*;

  localparam int unsigned W = 16;

  op_e                 op;
  logic signed [2*W:0] x, y, r;
  int checks = 0, failures = 0;

  ff_op_unit #(.W(W)) dut (.op_i(op), .x_i(x), .y_i(y), .r_o(r));

  function automatic longint ref_op(op_e o, longint a, longint b);
    longint am, bm;
    am = longint'($signed(a[W-1:0]));
    bm = longint'($signed(b[W-1:0]));
    case (o)
      OP_MUL:  return am * bm;
      OP_ADD:  return a + b;
      default: return a - b;
    endcase
  endfunction

  task automatic apply(op_e o, longint a, longint b);
    longint e;
    op = o; x = (2*W+1)'(a); y = (2*W+1)'(b);
    #1;
    e = ref_op(o, a, b);
    checks++;
    if (longint'(r) != e) begin
      failures++;
      $display("FAIL op=%s x=%0d y=%0d r=%0d expected %0d", o.name(), a, b, r, e);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint a, b;
    // Corner cases of the W-bit multiply.
    apply(OP_MUL, -32768, -32768);
    apply(OP_MUL, 32767, -32768);
    apply(OP_MUL, -1, 1);
    apply(OP_MUL, 0, 12345);
    // Corner cases of the 2W+1-bit add and subtract.
    apply(OP_SUB, 1073741824, -1073741824);
    apply(OP_ADD, 1073741824, 1073741824);
    apply(OP_SUB, -1073741823, 1073741824);
    for (int i = 0; i < 300; i++) begin
      a = longint'($signed(16'($urandom)));
      b = longint'($signed(16'($urandom)));
      apply(OP_MUL, a, b);
      a = longint'($signed(31'($urandom)));
      b = longint'($signed(31'($urandom)));
      apply(OP_ADD, a, b);
      apply(OP_SUB, a, b);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

// tb_sign_mult_cell: exhaustive check of the one-bit signed multiplication cell.
// Each of the 16 operand combinations is turned into signed integers
// (value = magnitude, negated when the sign bit is set), multiplied, and the
// cell's magnitude and sign outputs are compared with that product: the
// magnitude must be 1 exactly when the product is nonzero and the sign must
// be 1 exactly when the product is negative.
module tb_sign_mult_cell;
  logic x, y, sx, sy, xy, sxy;
  int checks = 0, failures = 0;

  sign_mult_cell dut (.x(x), .y(y), .sign_x(sx), .sign_y(sy), .xy(xy), .sign_xy(sxy));

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 16; v++) begin
      int vx, vy, p;
      {x, y, sx, sy} = 4'(v);
      #1;
      vx = sx ? -int'(x) : int'(x);
      vy = sy ? -int'(y) : int'(y);
      p  = vx * vy;
      checks++;
      if (xy !== (p != 0) || sxy !== (p < 0)) begin
        failures++;
        $display("FAIL x=%0d y=%0d sx=%0d sy=%0d: got xy=%0d sign=%0d, product %0d",
                 x, y, sx, sy, xy, sxy, p);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

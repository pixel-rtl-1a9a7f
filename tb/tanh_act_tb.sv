// tanh_act_tb: sweeps the activation over positive and negative inputs and
// checks it against the real hyperbolic tangent (within 3 output LSBs), odd
// symmetry, monotonicity and saturation at 1.0.
module tanh_act_tb;
  int checks = 0, failures = 0;
  logic signed [12:0] x;
  logic signed [7:0]  y;

  tanh_act #(.IN_W(13), .IN_FRAC(8), .OUT_W(8), .OUT_FRAC(6)) dut (.x, .y);

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int prev;
    real xr, ref_y, err;
    prev = -1000;
    for (int v = -4000; v <= 4000; v += 7) begin
      x = 13'(v);
      #1;
      xr = real'(v) / 256.0;
      ref_y = $tanh(xr) * 64.0;
      err = real'(y) - ref_y;
      if (err < 0) err = -err;
      checks++;
      if (err > 3.0) begin
        failures++;
        $display("FAIL x=%f y=%0d ref=%f", xr, y, ref_y);
      end
      checks++;
      if (32'(y) < prev) begin
        failures++;
        $display("FAIL not monotonic at x=%f", xr);
      end
      prev = int'(y);
    end
    // odd symmetry and saturation
    for (int v = 0; v < 4000; v += 37) begin
      int yp;
      x = 13'(v); #1; yp = int'(y);
      x = 13'(-v); #1;
      checks++;
      if (32'(y) !== -yp) begin failures++; $display("FAIL odd symmetry at %0d", v); end
    end
    x = 13'(4095); #1;
    checks++;
    if (y !== 8'sd64) begin failures++; $display("FAIL saturation y=%0d", y); end
    x = 13'(0); #1;
    checks++;
    if (y !== 8'sd0) begin failures++; $display("FAIL tanh(0)=%0d", y); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// oe_amplitude_decoder_tb: drives frames of 7 light levels (0..4) and checks
// that the decoded value, sum of level(t) * 2^t, appears with 'valid' exactly
// one clock after the frame's last bit period.
module oe_amplitude_decoder_tb;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic [2:0] amp = '0;
  logic [2:0] slot = '0;
  logic       frame_last = 0;
  logic [7:0] value;
  logic       valid;

  oe_amplitude_decoder #(.LEVELS(4), .SLOTS(7), .VAL_W(8)) dut (
    .clk, .rst_n, .amp, .slot, .frame_last, .value, .valid
  );

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic frame(int lv[7]);
    int exp;
    exp = 0;
    for (int t = 0; t < 7; t++) begin
      @(negedge clk);
      amp = 3'(lv[t]); slot = 3'(t); frame_last = (t == 6);
      exp += lv[t] << t;
      if (t > 0) begin
        checks++;
        if (valid) begin failures++; $display("FAIL valid mid-frame"); end
      end
    end
    @(negedge clk);
    frame_last = 0; slot = 0; amp = 0;
    checks++;
    if ((valid !== 1'b1) || 32'(value) !== (exp & 8'hFF)) begin
      failures++;
      $display("FAIL value=%0d valid=%b expected %0d", value, valid, exp);
    end
  endtask

  initial begin
    int lv[7];
    repeat (2) @(posedge clk);
    rst_n = 1;
    // the 0110 x 1101 grid: 6 * 13 = 78
    lv = '{0, 1, 1, 1, 2, 1, 0};
    frame(lv);
    // all ones: 15 * 15 = 225
    lv = '{1, 2, 3, 4, 3, 2, 1};
    frame(lv);
    for (int k = 0; k < 60; k++) begin
      logic [3:0] n, s;
      n = 4'($urandom); s = 4'($urandom);
      for (int t = 0; t < 7; t++) begin
        lv[t] = 0;
        for (int j = 0; j < 4; j++)
          if (t - j >= 0 && t - j < 4) lv[t] += 32'(n[t-j] & s[j]);
      end
      frame(lv);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// electrical_processor_tb: feeds the EP with groups of 16 four-bit words, one
// group per synapse bit position (shift 0..3), and checks the partial sum
// (sum of word sums shifted by their bit position), the tanh output against
// the real function, and that out_valid comes exactly one clock after the
// last group and at no other time.
module electrical_processor_tb;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic in_valid = 0, first = 0, last = 0;
  logic [15:0][3:0] words = '0;
  logic [1:0] shift = '0;
  logic [11:0] acc_init = '0;
  logic [11:0] psum;
  logic signed [7:0] act;
  logic out_valid;

  electrical_processor #(.NW(16), .IN_W(4), .ACC_W(12), .SH_W(2)) dut (
    .clk, .rst_n, .in_valid, .words, .shift, .first, .last, .acc_init, .psum, .act, .out_valid
  );

  always #5 clk = ~clk;

  initial begin
    #500000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic was_last = 0;
  always @(posedge clk) begin
    if (rst_n && out_valid && !was_last) begin
      failures++;
      $display("FAIL spurious out_valid");
    end
    was_last <= in_valid && last;
  end

  task automatic window(int gap);
    int exp;
    real r;
    acc_init = (gap == 2) ? 12'($urandom % 200) : 12'(0);
    exp = int'(acc_init);
    for (int c = 0; c < 4; c++) begin
      int s;
      @(negedge clk);
      s = 0;
      for (int w = 0; w < 16; w++) begin
        words[w] = 4'($urandom);
        s += int'(words[w]);
      end
      exp += s << c;
      in_valid = 1; shift = 2'(c); first = (c == 0); last = (c == 3);
      for (int g = 0; g < ((c < 3) ? gap : 0); g++) begin
        @(negedge clk);
        in_valid = 0;
        words = '1;   // ignored while in_valid is low
      end
    end
    @(negedge clk);
    in_valid = 0; first = 0; last = 0;
    checks++;
    if ((out_valid !== 1'b1) || 32'(psum) !== exp) begin
      failures++;
      $display("FAIL psum=%0d valid=%b expected %0d", psum, out_valid, exp);
    end
    r = $tanh(real'(exp) / 256.0) * 64.0;
    checks++;
    if (real'(act) < r - 3.0 || real'(act) > r + 3.0) begin
      failures++;
      $display("FAIL act=%0d expected about %f", act, r);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < 30; k++) window(k % 3);
    // all-ones: the largest single-window sum, 16*15*15 = 3600
    acc_init = 0;
    @(negedge clk);
    for (int c = 0; c < 4; c++) begin
      words = '1; in_valid = 1; shift = 2'(c); first = (c == 0); last = (c == 3);
      @(negedge clk);
    end
    in_valid = 0; last = 0;
    checks++;
    if ((out_valid !== 1'b1) || psum !== 12'd3600 || act !== 8'sd64) begin
      failures++;
      $display("FAIL max psum=%0d act=%0d", psum, act);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

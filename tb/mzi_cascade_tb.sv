// mzi_cascade_tb: feeds the MZI cascade model with the AND outputs of a
// neuron pulse train and the bits of a synapse weight, frame after frame
// (BITS pulses, then BITS-1 dark periods), and checks the light level of every
// bit period against the column sums of the partial-product grid, computed
// here from the two words. Includes the grid 0110 x 1101, whose column sums
// are 0,1,1,1,2,1,0.
module mzi_cascade_tb;
  localparam int B = 4;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic [B-1:0] in_i0 = '0;
  logic [2:0]   amp;

  mzi_cascade #(.STAGES(B)) dut (.clk, .rst_n, .in_i0, .amp);

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic frame(logic [B-1:0] n, logic [B-1:0] s);
    for (int t = 0; t < 2 * B - 1; t++) begin
      int exp;
      @(negedge clk);
      for (int j = 0; j < B; j++) in_i0[j] = (t < B) ? (n[t] & s[j]) : 1'b0;
      exp = 0;
      for (int j = 0; j < B; j++)
        if (t - j >= 0 && t - j < B) exp += 32'(n[t-j] & s[j]);
      #1;
      checks++;
      if (32'(amp) !== exp) begin
        failures++;
        $display("FAIL n=%b s=%b t=%0d amp=%0d expected %0d", n, s, t, amp, exp);
      end
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    frame(4'b0110, 4'b1101);
    frame(4'b1111, 4'b1111);
    frame(4'b0000, 4'b1111);
    for (int k = 0; k < 60; k++) frame(4'($urandom), 4'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

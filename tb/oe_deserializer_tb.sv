// oe_deserializer_tb: sends words as LSB-first pulse trains, one frame after
// another, and checks that each word is reassembled and flagged valid exactly
// one clock after the last pulse of its frame.
module oe_deserializer_tb;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic pulse = 0, frame_last = 0;
  logic [3:0] word;
  logic valid;

  oe_deserializer #(.BITS(4)) dut (.clk, .rst_n, .pulse, .frame_last, .word, .valid);

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [3:0] w;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 40; n++) begin
      w = (n < 16) ? 4'(n) : 4'($urandom);
      for (int b = 0; b < 4; b++) begin
        @(negedge clk);
        pulse = w[b];
        frame_last = (b == 3);
        // valid must be low everywhere except right after a frame end
        if (b !== 0) begin
          checks++;
          if (valid) begin failures++; $display("FAIL valid high mid-frame"); end
        end
      end
      @(negedge clk);
      pulse = 0; frame_last = 0;
      checks++;
      if ((valid !== 1'b1) || word !== w) begin
        failures++;
        $display("FAIL word %h valid %b, expected %h", word, valid, w);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// neuron_firing_tb: checks that every wavelength carries its word LSB first
// in bit periods 0..3, stays dark in later periods and when not firing.
module neuron_firing_tb;
  int checks = 0, failures = 0;
  logic fire;
  logic [2:0] slot;
  logic [15:0][3:0] words;
  logic [15:0] light;

  neuron_firing #(.NW(16), .BITS(4), .SLOT_W(3)) dut (.fire, .slot, .words, .light);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 20; n++) begin
      for (int w = 0; w < 16; w++) words[w] = 4'($urandom);
      for (int f = 0; f < 2; f++) begin
        fire = (f == 1);
        for (int t = 0; t < 8; t++) begin
          slot = 3'(t);
          #1;
          for (int w = 0; w < 16; w++) begin
            logic exp;
            exp = fire && t < 4 && words[w][t];
            checks++;
            if (light[w] !== exp) begin
              failures++;
              $display("FAIL w=%0d t=%0d fire=%b light=%b", w, t, fire, light[w]);
            end
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// mrr_and_bank_tb: checks the double-microring filter bank model: light
// reaches the drop port only when the ring voltage is on (AND), and the
// through port otherwise; all four input combinations and random patterns.
module mrr_and_bank_tb;
  int checks = 0, failures = 0;
  logic [15:0] light_in, v_on, o1, o0;

  mrr_and_bank #(.NW(16)) dut (.light_in, .v_on, .o1, .o0);

  task automatic apply(logic [15:0] l, logic [15:0] v);
    light_in = l; v_on = v;
    #1;
    for (int w = 0; w < 16; w++) begin
      checks++;
      if (o1[w] !== (l[w] && v[w]) || o0[w] !== (l[w] && !v[w])) begin
        failures++;
        $display("FAIL w=%0d light=%b v=%b o1=%b o0=%b", w, l[w], v[w], o1[w], o0[w]);
      end
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
    apply(16'h0000, 16'h0000);
    apply(16'hFFFF, 16'h0000);
    apply(16'h0000, 16'hFFFF);
    apply(16'hFFFF, 16'hFFFF);
    apply(16'hA5C3, 16'h0FF0);
    for (int n = 0; n < 50; n++) apply(16'($urandom), 16'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

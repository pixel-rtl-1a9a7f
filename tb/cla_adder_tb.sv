// cla_adder_tb: checks the carry-lookahead adder against integer addition,
// at two widths, over corner cases and random operands.
module cla_adder_tb;
  int checks = 0, failures = 0;

  logic [7:0]  a8, b8, s8;
  logic        ci8, co8;
  logic [12:0] a13, b13, s13;
  logic        ci13, co13;

  cla_adder #(.N(8))  u8  (.a(a8),  .b(b8),  .cin(ci8),  .sum(s8),  .cout(co8));
  cla_adder #(.N(13)) u13 (.a(a13), .b(b13), .cin(ci13), .sum(s13), .cout(co13));

  task automatic check8(logic [7:0] x, logic [7:0] y, logic c);
    logic [8:0] exp;
    a8 = x; b8 = y; ci8 = c;
    #1;
    exp = 9'(x) + 9'(y) + 9'(c);
    checks++;
    if ({co8, s8} !== exp) begin
      failures++;
      $display("FAIL 8-bit %0d+%0d+%0d = %0d, expected %0d", x, y, c, {co8, s8}, exp);
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
    // exhaustive 8-bit without carry-in, corners with carry-in
    for (int x = 0; x < 256; x += 3)
      for (int y = 0; y < 256; y += 5) check8(8'(x), 8'(y), 1'b0);
    check8(8'hFF, 8'h00, 1'b1);
    check8(8'hFF, 8'hFF, 1'b1);
    check8(8'h80, 8'h80, 1'b0);
    for (int n = 0; n < 500; n++) begin
      logic [13:0] exp;
      a13 = 13'($urandom); b13 = 13'($urandom); ci13 = 1'($urandom);
      #1;
      exp = 14'(a13) + 14'(b13) + 14'(ci13);
      checks++;
      if ({co13, s13} !== exp) begin
        failures++;
        $display("FAIL 13-bit %0d+%0d+%0d", a13, b13, ci13);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

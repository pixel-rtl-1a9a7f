// synapse_rf_tb: loads random weights through the write port and checks both
// read views (bit planes and element words) against a copy kept here.
module synapse_rf_tb;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic we = 0;
  logic [1:0] wlane = 0, welem = 0, bit_sel = 0, elem_sel = 0;
  logic [3:0] wdata = 0;
  logic [3:0][3:0] plane;
  logic [3:0][3:0] elem;
  logic [3:0] model [4][4];

  synapse_rf #(.LANES(4), .ELEMS(4), .BITS(4)) dut (
    .clk, .rst_n, .we, .wlane, .welem, .wdata, .bit_sel, .elem_sel, .plane, .elem
  );

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_all();
    for (int b = 0; b < 4; b++) begin
      bit_sel = 2'(b); elem_sel = 2'(b);
      #1;
      for (int l = 0; l < 4; l++) begin
        checks++;
        if (elem[l] !== model[l][b]) begin
          failures++; $display("FAIL elem[%0d] sel %0d", l, b);
        end
        for (int e = 0; e < 4; e++) begin
          checks++;
          if (plane[l][e] !== model[l][e][b]) begin
            failures++; $display("FAIL plane[%0d][%0d] bit %0d", l, e, b);
          end
        end
      end
    end
  endtask

  initial begin
    for (int l = 0; l < 4; l++) for (int e = 0; e < 4; e++) model[l][e] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    check_all();
    for (int round = 0; round < 5; round++) begin
      for (int n = 0; n < 16; n++) begin
        @(negedge clk);
        we = 1; wlane = 2'($urandom); welem = 2'($urandom); wdata = 4'($urandom);
        model[wlane][welem] = wdata;
      end
      @(negedge clk);
      we = 0;
      check_all();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

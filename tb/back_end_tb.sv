// back_end_tb: OMAC results arrive at different clocks; checks that nothing
// is written before all have arrived, that each {act, psum} is then written
// once to address r*COLS+k, one per clock, and that done follows the last
// write. Two rounds.
module back_end_tb;
  localparam int R = 2, C = 4;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic [R-1:0][C-1:0] out_valid = '0;
  logic [R-1:0][C-1:0][11:0] psum = '0;
  logic [R-1:0][C-1:0][7:0]  act = '0;
  logic ps_we, done;
  logic [2:0] ps_waddr;
  logic [19:0] ps_wdata;

  back_end #(.ROWS(R), .COLS(C), .ACC_W(12), .ACT_W(8)) dut (
    .clk, .rst_n, .out_valid, .psum, .act, .ps_we, .ps_waddr, .ps_wdata, .done
  );

  always #5 clk = ~clk;

  initial begin
    #500000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [19:0] expw [R*C];
  int nw, nd;
  logic all_in;
  always @(posedge clk) if (rst_n) begin
    if (ps_we) begin
      checks++;
      if ((all_in !== 1'b1) || ps_wdata !== expw[ps_waddr] || 32'(ps_waddr) !== nw) begin
        failures++; $display("FAIL write addr %0d data %h", ps_waddr, ps_wdata);
      end
      nw++;
    end
    if (done) nd++;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int round = 0; round < 2; round++) begin
      nw = 0; nd = 0; all_in = 0;
      for (int i = 0; i < R * C; i++) begin
        @(negedge clk);
        out_valid = '0;
        psum[i / C][i % C] = 12'($urandom);
        act[i / C][i % C]  = 8'($urandom);
        expw[i] = {act[i / C][i % C], psum[i / C][i % C]};
        out_valid[i / C][i % C] = 1'b1;
        if (i === R * C - 1) all_in = 1;
        @(negedge clk);
        out_valid = '0;
        psum = '1; act = '1;   // results are held, inputs may change
      end
      repeat (R * C + 3) @(negedge clk);
      checks++;
      if (nw !== R * C || nd !== 1) begin
        failures++; $display("FAIL round %0d: %0d writes, %0d done", round, nw, nd);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

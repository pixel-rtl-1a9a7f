// omac_sizes_tb: both OMAC kinds at the lane counts and bits per lane over
// which the single-MAC energy, area and latency are evaluated, within what
// the 64-bit reference arithmetic here allows: 2, 4 and 8 lanes; 2, 4, 8 and
// 16 bits per lane. Each configuration runs random windows (and one all-ones
// window) through omac_size_check, which checks the partial sum, the tanh
// output and the latency.
module omac_sizes_tb;
  localparam int NCFG = 7;
  localparam int CL [NCFG] = '{2, 2, 4, 4, 8, 8, 4};
  localparam int CB [NCFG] = '{2, 8, 2, 8, 4, 8, 16};
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  int         c_checks [2*NCFG];
  int         c_fail   [2*NCFG];
  logic [2*NCFG-1:0] fin;

  for (genvar i = 0; i < NCFG; i++) begin : g_cfg
    for (genvar o = 0; o < 2; o++) begin : g_kind
      omac_size_check #(.L(CL[i]), .B(CB[i]), .OPTICAL(o[0])) u_chk (
        .clk, .rst_n, .checks(c_checks[2*i+o]), .failures(c_fail[2*i+o]), .finished(fin[2*i+o])
      );
    end
  end

  task automatic report(int extra);
    int checks, failures;
    checks = 0; failures = extra;
    for (int i = 0; i < 2 * NCFG; i++) begin
      checks += c_checks[i]; failures += c_fail[i];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask

  initial begin
    #2000000;
    $display("watchdog expired");
    report(1);
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    wait (&fin);
    @(negedge clk);
    report(0);
  end
endmodule

// global_buffer_tb: writes the input array and the partial-sum array with
// random words and reads them back, checking the one-clock read latency.
module global_buffer_tb;
  int checks = 0, failures = 0;
  logic clk = 0;
  logic in_we = 0, in_re = 0, ps_we = 0;
  logic [6:0] in_waddr = 0, in_raddr = 0;
  logic [3:0] in_wdata = 0, in_rdata;
  logic [3:0] ps_waddr = 0, ps_raddr = 0;
  logic [19:0] ps_wdata = 0, ps_rdata, fe_ps_rdata;
  logic        fe_ps_re = 0;
  logic [3:0]  fe_ps_raddr = 0;
  logic [3:0]  m_in [128];
  logic [19:0] m_ps [16];

  global_buffer #(.BITS(4), .IN_DEPTH(128), .PS_W(20), .PS_DEPTH(16)) dut (
    .clk, .in_we, .in_waddr, .in_wdata, .in_re, .in_raddr, .in_rdata,
    .ps_we, .ps_waddr, .ps_wdata, .ps_raddr, .ps_rdata,
    .fe_ps_re, .fe_ps_raddr, .fe_ps_rdata
  );

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < 128; a++) begin
      @(negedge clk);
      in_we = 1; in_waddr = 7'(a); in_wdata = 4'($urandom); m_in[a] = in_wdata;
      if (a < 16) begin
        ps_we = 1; ps_waddr = 4'(a); ps_wdata = 20'($urandom); m_ps[a] = ps_wdata;
      end else ps_we = 0;
    end
    @(negedge clk);
    in_we = 0; ps_we = 0;
    for (int n = 0; n < 200; n++) begin
      int ai, ap;
      ai = $urandom % 128; ap = $urandom % 16;
      @(negedge clk);
      in_re = 1; in_raddr = 7'(ai); ps_raddr = 4'(ap);
      fe_ps_re = 1; fe_ps_raddr = 4'(15 - ap);
      @(negedge clk);
      in_re = 0; fe_ps_re = 0;
      checks++;
      if (in_rdata !== m_in[ai] || ps_rdata !== m_ps[ap] || fe_ps_rdata !== m_ps[15 - ap]) begin
        failures++;
        $display("FAIL read %0d/%0d", ai, ap);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// pixel_full_tb: one complete operation of the accelerator at its default
// configuration (4 lanes, 4 bits per lane, 4 x 4 hybrid OMAC grid): loads
// filters and neurons into the global buffer (row 0 / filter 0 hold the
// document's worked example, dot product 329; the rest random), runs one
// operation and checks all 16 partial sums and activations against values
// computed here, and that the neurons were fired for exactly BITS frames.
module pixel_full_tb;
  import pixel_pkg::*;
  localparam int L = LANES_DEF, B = BITS_DEF, R = ROWS_DEF;
  localparam int NF = L * L * L;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;

  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic       in_we = 0, start = 0, accum = 0;
  logic [6:0] in_waddr = 0;
  logic [3:0] in_wdata = 0;
  logic [3:0] ps_raddr = 0;
  logic       busy, done;
  logic [19:0] ps_psum;
  logic signed [7:0] ps_act;

  pixel_top dut (
    .clk, .rst_n, .in_we, .in_waddr, .in_wdata, .start, .accum, .busy, .done,
    .ps_raddr, .ps_psum, .ps_act
  );

  int fired;
  always @(posedge clk) if (rst_n && dut.fire) fired++;

  int img [R][L][L];
  int flt [L][L][L];

  initial begin
    fired = 0;
    for (int r = 0; r < R; r++) for (int l = 0; l < L; l++) for (int e = 0; e < L; e++)
      img[r][l][e] = $urandom % 16;
    for (int k = 0; k < L; k++) for (int l = 0; l < L; l++) for (int e = 0; e < L; e++)
      flt[k][l][e] = $urandom % 16;
    img[0] = '{'{2, 4, 6, 9}, '{0, 1, 3, 4}, '{3, 5, 1, 2}, '{8, 2, 8, 6}};
    flt[0] = '{'{6, 9, 13, 11}, '{1, 2, 1, 2}, '{2, 3, 4, 5}, '{3, 1, 3, 1}};
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < L; k++) for (int l = 0; l < L; l++) for (int e = 0; e < L; e++) begin
      @(negedge clk);
      in_we = 1; in_waddr = 7'(k * L * L + l * L + e); in_wdata = 4'(flt[k][l][e]);
    end
    for (int r = 0; r < R; r++) for (int l = 0; l < L; l++) for (int e = 0; e < L; e++) begin
      @(negedge clk);
      in_we = 1; in_waddr = 7'(NF + r * L * L + l * L + e); in_wdata = 4'(img[r][l][e]);
    end
    @(negedge clk);
    in_we = 0; start = 1;
    @(negedge clk);
    start = 0;
    checks++;
    if (!busy) begin failures++; $display("FAIL not busy after start"); end
    wait (done);
    @(negedge clk);
    checks++;
    if (fired !== B * B) begin failures++; $display("FAIL fired %0d bit periods", fired); end
    for (int r = 0; r < R; r++)
      for (int k = 0; k < L; k++) begin
        int exp;
        real t;
        exp = 0;
        for (int l = 0; l < L; l++) for (int e = 0; e < L; e++) exp += img[r][l][e] * flt[k][l][e];
        t = $tanh(real'(exp) / 256.0) * 64.0;
        ps_raddr = 4'(r * L + k);
        @(negedge clk);
        checks++;
        if (32'(ps_psum) !== exp) begin
          failures++; $display("FAIL r%0d k%0d psum=%0d expected %0d", r, k, ps_psum, exp);
        end
        checks++;
        if (real'(ps_act) < t - 3.0 || real'(ps_act) > t + 3.0) begin
          failures++; $display("FAIL r%0d k%0d act=%0d expected about %f", r, k, ps_act, t);
        end
        if (r === 0 && k === 0) begin
          checks++;
          if (ps_psum !== 20'd329) begin failures++; $display("FAIL worked example"); end
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// pixel_vgg_tb: a slice of the first convolution layer of VGG16 (3x3 kernel,
// 3 input channels, 27 terms per output neuron) run on the accelerator at its
// default size, once with hybrid and once with all-optical OMACs.
// The 27-term window does not fit the 16 terms (4 lanes x 4 elements) of one
// OMAC pass, so each output neuron is computed in two operations: terms 0-15,
// then terms 16-26 (padded with zeros) started with 'accum' so that the OMACs
// continue from the first operation's partial sums. Four random 4-bit filters
// (the grid's four columns) are applied to four horizontally adjacent output
// positions (the grid's four rows) of a random 4-bit 3 x 6 x 3 image patch.
// Term t of a window is (channel c, kernel row dy, kernel column dx) with
// t = c*9 + dy*3 + dx; term j of a slice goes to lane j/4, element j%4.
// Checks: the partial sums after the first operation, the full sums and the
// tanh activations after the second, in both instances.
module pixel_vgg_tb;
  localparam int L = 4, B = 4, R = 4;
  localparam int NF = L * L * L;
  localparam int TERMS = 27, SLICE = L * L, NSLICE = 2;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;

  always #5 clk = ~clk;

  initial begin
    #5000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic       in_we = 0, start = 0, accum = 0;
  logic [6:0] in_waddr = 0;
  logic [3:0] in_wdata = 0;
  logic [3:0] ps_raddr = 0;
  logic [1:0] busy, done;
  logic [1:0][19:0] ps_psum;
  logic signed [7:0] ps_act [2];

  pixel_top dut_oe (
    .clk, .rst_n, .in_we, .in_waddr, .in_wdata, .start, .accum, .busy(busy[0]), .done(done[0]),
    .ps_raddr, .ps_psum(ps_psum[0]), .ps_act(ps_act[0])
  );
  pixel_top #(.OPTICAL_ACCUM(1'b1)) dut_oo (
    .clk, .rst_n, .in_we, .in_waddr, .in_wdata, .start, .accum, .busy(busy[1]), .done(done[1]),
    .ps_raddr, .ps_psum(ps_psum[1]), .ps_act(ps_act[1])
  );

  int img [3][3][6];       // channel, row, column
  int wgt [L][3][3][3];    // filter, channel, dy, dx

  // term t of output position r (x = r) for filter k, zero beyond the window
  function automatic int neuron(int r, int t);
    if (t >= TERMS) return 0;
    return img[t / 9][(t % 9) / 3][r + t % 3];
  endfunction
  function automatic int weight(int k, int t);
    if (t >= TERMS) return 0;
    return wgt[k][t / 9][(t % 9) / 3][t % 3];
  endfunction

  task automatic run_slice(int s);
    for (int k = 0; k < L; k++) for (int j = 0; j < SLICE; j++) begin
      @(negedge clk);
      in_we = 1; in_waddr = 7'(k * SLICE + j); in_wdata = 4'(weight(k, s * SLICE + j));
    end
    for (int r = 0; r < R; r++) for (int j = 0; j < SLICE; j++) begin
      @(negedge clk);
      in_we = 1; in_waddr = 7'(NF + r * SLICE + j); in_wdata = 4'(neuron(r, s * SLICE + j));
    end
    @(negedge clk);
    in_we = 0; start = 1; accum = (s > 0);
    @(negedge clk);
    start = 0; accum = 0;
    wait (done[0] || done[1]);
    wait (busy === 2'b00);
    @(negedge clk);
  endtask

  initial begin
    for (int c = 0; c < 3; c++) for (int y = 0; y < 3; y++) for (int x = 0; x < 6; x++)
      img[c][y][x] = $urandom % 16;
    for (int k = 0; k < L; k++) for (int c = 0; c < 3; c++)
      for (int y = 0; y < 3; y++) for (int x = 0; x < 3; x++)
        wgt[k][c][y][x] = $urandom % 16;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int s = 0; s < NSLICE; s++) begin
      run_slice(s);
      for (int r = 0; r < R; r++)
        for (int k = 0; k < L; k++) begin
          int exp;
          real t;
          exp = 0;
          for (int i = 0; i < (s + 1) * SLICE; i++) exp += neuron(r, i) * weight(k, i);
          t = $tanh(real'(exp) / 256.0) * 64.0;
          ps_raddr = 4'(r * L + k);
          @(negedge clk);
          for (int v = 0; v < 2; v++) begin
            checks++;
            if (32'(ps_psum[v]) !== exp) begin
              failures++;
              $display("FAIL v%0d slice %0d r%0d k%0d psum=%0d expected %0d", v, s, r, k, ps_psum[v], exp);
            end
            if (s === NSLICE - 1) begin
              checks++;
              if (real'(ps_act[v]) < t - 3.0 || real'(ps_act[v]) > t + 3.0) begin
                failures++;
                $display("FAIL v%0d r%0d k%0d act=%0d expected about %f", v, r, k, ps_act[v], t);
              end
            end
          end
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

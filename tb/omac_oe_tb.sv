// omac_oe_tb: drives one hybrid OMAC the way the front end does: pre-loads a
// filter, then fires 16 neuron words as LSB-first pulse trains in 4 frames of
// 4 bit periods. Checks the partial sum against the dot product computed here,
// the tanh output, and the latency: out_valid exactly two clocks after the
// last bit period of the last frame (16 bit periods plus 2 clocks). The first
// window is the document's worked example (neuron lanes (2,4,6,9), (0,1,3,4),
// (3,5,1,2), (8,2,8,6); synapse lanes (6,9,13,11), (1,2,1,2), (2,3,4,5),
// (3,1,3,1)), whose dot product is 329.
module omac_oe_tb;
  localparam int L = 4, B = 4;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic rf_we = 0;
  logic [1:0] rf_lane = 0, rf_elem = 0;
  logic [3:0] rf_data = 0;
  logic [15:0] light = 0;
  logic frame_last = 0, cyc_first = 0, cyc_last = 0;
  logic [1:0] cyc = 0;
  logic [19:0] psum;
  logic [19:0] psum_in = '0;
  logic signed [7:0] act;
  logic out_valid;

  omac_oe dut (
    .clk, .rst_n, .rf_we, .rf_lane, .rf_elem, .rf_data, .light,
    .frame_last, .cyc, .cyc_first, .cyc_last, .psum_in, .psum, .act, .out_valid
  );

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int nin [L][L];
  int syn [L][L];

  task automatic run_window();
    int exp;
    real r;
    // pre-load the synapses
    for (int l = 0; l < L; l++)
      for (int e = 0; e < L; e++) begin
        @(negedge clk);
        rf_we = 1; rf_lane = 2'(l); rf_elem = 2'(e); rf_data = 4'(syn[l][e]);
      end
    @(negedge clk);
    rf_we = 0;
    exp = int'(psum_in);
    for (int l = 0; l < L; l++) for (int e = 0; e < L; e++) exp += nin[l][e] * syn[l][e];
    // fire: frame c applies synapse bit c
    for (int c = 0; c < B; c++)
      for (int t = 0; t < B; t++) begin
        for (int l = 0; l < L; l++)
          for (int e = 0; e < L; e++) light[l*L+e] = 1'((nin[l][e] >> t) & 1);
        cyc = 2'(c); cyc_first = (c == 0); cyc_last = (c == B - 1);
        frame_last = (t == B - 1);
        checks++;
        if (out_valid) begin failures++; $display("FAIL early out_valid"); end
        @(negedge clk);
      end
    light = '0; frame_last = 0;
    checks++;
    if (out_valid) begin failures++; $display("FAIL out_valid one clock early"); end
    @(negedge clk);
    checks++;
    if ((out_valid !== 1'b1) || 32'(psum) !== exp) begin
      failures++;
      $display("FAIL psum=%0d valid=%b expected %0d", psum, out_valid, exp);
    end
    r = $tanh(real'(exp) / 256.0) * 64.0;
    checks++;
    if (real'(act) < r - 3.0 || real'(act) > r + 3.0) begin
      failures++;
      $display("FAIL act=%0d expected about %f", act, r);
    end
    @(negedge clk);
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    nin = '{'{2, 4, 6, 9}, '{0, 1, 3, 4}, '{3, 5, 1, 2}, '{8, 2, 8, 6}};
    syn = '{'{6, 9, 13, 11}, '{1, 2, 1, 2}, '{2, 3, 4, 5}, '{3, 1, 3, 1}};
    run_window();
    checks++;
    if (psum !== 20'd329) begin failures++; $display("FAIL worked example %0d", psum); end
    for (int n = 0; n < 25; n++) begin
      for (int l = 0; l < L; l++)
        for (int e = 0; e < L; e++) begin
          nin[l][e] = (n == 0) ? 15 : $urandom % 16;
          syn[l][e] = (n == 0) ? 15 : $urandom % 16;
        end
      psum_in = (n % 2 == 1) ? 20'($urandom % 100000) : 20'(0);
      run_window();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

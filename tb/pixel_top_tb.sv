// pixel_top_tb: end-to-end test of the accelerator with both OMAC kinds side
// by side (hybrid OE and all-optical OO), default sizes otherwise: 4 lanes,
// 4 bits, a 4 x 4 OMAC grid. Each operation writes 64 filter words and 64
// neuron words into the global buffer, starts, waits for done and reads back
// the 16 {act, psum} results, which are compared with dot products and tanh
// values computed here. The first operation holds the document's worked
// example (row 0, filter 0, dot product 329); later ones are random, with one
// all-ones operation that saturates the activation, and one that continues
// the previous operation's partial sums ('accum').
// Mechanisms counted, each must occur: synapse pre-load writes, repeated
// firing of the same neurons (more than one frame per window), light sent to
// the through port by an off ring (AND 0), electrical shift-accumulate with a
// non-zero shift (OE), multi-level light out of the MZI cascade (OO),
// saturated and unsaturated activations, back-end write-back, partial sums
// fed back from the buffer.
module pixel_top_tb;
  localparam int L = 4, B = 4, R = 4;
  localparam int NF = L * L * L, NI = R * L * L;
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
  logic       busy [2], done [2];
  logic [19:0] ps_psum [2];
  logic signed [7:0] ps_act [2];

  pixel_top #(.OPTICAL_ACCUM(1'b0)) dut_oe (
    .clk, .rst_n, .in_we, .in_waddr, .in_wdata, .start, .accum, .busy(busy[0]), .done(done[0]),
    .ps_raddr, .ps_psum(ps_psum[0]), .ps_act(ps_act[0])
  );
  pixel_top #(.OPTICAL_ACCUM(1'b1)) dut_oo (
    .clk, .rst_n, .in_we, .in_waddr, .in_wdata, .start, .accum, .busy(busy[1]), .done(done[1]),
    .ps_raddr, .ps_psum(ps_psum[1]), .ps_act(ps_act[1])
  );

  // mechanism counters
  int n_preload, n_frames_oe, n_frames_oo, n_through, n_shift, n_multilevel;
  int n_sat, n_unsat, n_writeback, n_accum;
  always @(posedge clk) if (rst_n) begin
    if (|dut_oe.rf_we) n_preload++;
    if (dut_oe.frame_last) n_frames_oe++;
    if (dut_oo.frame_last) n_frames_oo++;
    if (|dut_oe.g_row[0].g_oe.g_col[0].u_omac.through) n_through++;
    if (dut_oe.g_row[0].g_oe.g_col[0].u_omac.u_ep.in_valid &&
        dut_oe.g_row[0].g_oe.g_col[0].u_omac.u_ep.shift != 0) n_shift++;
    if (dut_oo.g_row[0].g_oo.g_col[0].u_omac.g_wl[0].amp >= 2) n_multilevel++;
    if (dut_oe.ps_we) n_writeback++;
    if (dut_oe.fe_ps_re) n_accum++;
  end

  int img [R][L][L];
  int flt [L][L][L];

  int prev [R][L];
  task automatic load_and_run(int opn, bit acc);
    int cyc_start, cyc_done;
    for (int k = 0; k < L; k++)
      for (int l = 0; l < L; l++)
        for (int e = 0; e < L; e++) begin
          @(negedge clk);
          in_we = 1; in_waddr = 7'(k * L * L + l * L + e); in_wdata = 4'(flt[k][l][e]);
        end
    for (int r = 0; r < R; r++)
      for (int l = 0; l < L; l++)
        for (int e = 0; e < L; e++) begin
          @(negedge clk);
          in_we = 1; in_waddr = 7'(NF + r * L * L + l * L + e); in_wdata = 4'(img[r][l][e]);
        end
    @(negedge clk);
    in_we = 0;
    start = 1; accum = acc;
    @(negedge clk);
    start = 0; accum = 0;
    fork
      wait (done[0]);
      wait (done[1]);
    join
    @(negedge clk);
    for (int r = 0; r < R; r++)
      for (int k = 0; k < L; k++) begin
        int exp;
        real t;
        exp = acc ? prev[r][k] : 0;
        for (int l = 0; l < L; l++) for (int e = 0; e < L; e++) exp += img[r][l][e] * flt[k][l][e];
        t = $tanh(real'(exp) / 256.0) * 64.0;
        prev[r][k] = exp;
        ps_raddr = 4'(r * L + k);
        @(negedge clk);
        for (int v = 0; v < 2; v++) begin
          checks++;
          if (32'(ps_psum[v]) !== exp) begin
            failures++;
            $display("FAIL op %0d %s r%0d k%0d psum=%0d expected %0d", opn, v ? "OO" : "OE", r, k, ps_psum[v], exp);
          end
          checks++;
          if (real'(ps_act[v]) < t - 3.0 || real'(ps_act[v]) > t + 3.0) begin
            failures++;
            $display("FAIL op %0d %s r%0d k%0d act=%0d expected about %f", opn, v ? "OO" : "OE", r, k, ps_act[v], t);
          end
        end
        if (ps_act[0] === 8'sd64) n_sat++; else n_unsat++;
      end
  endtask

  initial begin
    int f0, f1;
    n_preload = 0; n_frames_oe = 0; n_frames_oo = 0; n_through = 0; n_shift = 0;
    n_multilevel = 0; n_sat = 0; n_unsat = 0; n_writeback = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    n_accum = 0;
    for (int op = 0; op < 5; op++) begin
      for (int r = 0; r < R; r++) for (int l = 0; l < L; l++) for (int e = 0; e < L; e++)
        img[r][l][e] = (op == 3) ? 15 : $urandom % 16;
      for (int k = 0; k < L; k++) for (int l = 0; l < L; l++) for (int e = 0; e < L; e++)
        flt[k][l][e] = (op == 3) ? 15 : ((op == 2) ? $urandom % 4 : $urandom % 16);
      if (op === 0) begin
        img[0] = '{'{2, 4, 6, 9}, '{0, 1, 3, 4}, '{3, 5, 1, 2}, '{8, 2, 8, 6}};
        flt[0] = '{'{6, 9, 13, 11}, '{1, 2, 1, 2}, '{2, 3, 4, 5}, '{3, 1, 3, 1}};
      end
      f0 = n_frames_oe; f1 = n_frames_oo;
      load_and_run(op, op == 2);
      checks++;
      if (n_frames_oe - f0 !== B || n_frames_oo - f1 !== L) begin
        failures++;
        $display("FAIL op %0d frames OE %0d OO %0d", op, n_frames_oe - f0, n_frames_oo - f1);
      end
    end
    $display("mechanisms: preload=%0d frames_oe=%0d frames_oo=%0d through=%0d shift=%0d multilevel=%0d sat=%0d unsat=%0d writeback=%0d accum=%0d",
             n_preload, n_frames_oe, n_frames_oo, n_through, n_shift, n_multilevel, n_sat, n_unsat, n_writeback, n_accum);
    checks++; if (n_preload === 0)    begin failures++; $display("FAIL no pre-load"); end
    checks++; if (n_frames_oe < 2)   begin failures++; $display("FAIL no repeated firing"); end
    checks++; if (n_through === 0)    begin failures++; $display("FAIL no through-port light"); end
    checks++; if (n_shift === 0)      begin failures++; $display("FAIL no shifted accumulate"); end
    checks++; if (n_multilevel === 0) begin failures++; $display("FAIL no multi-level light"); end
    checks++; if (n_sat === 0)        begin failures++; $display("FAIL no saturated activation"); end
    checks++; if (n_unsat === 0)      begin failures++; $display("FAIL no unsaturated activation"); end
    checks++; if (n_accum === 0)      begin failures++; $display("FAIL no partial-sum feedback"); end
    checks++; if (n_writeback === 0)  begin failures++; $display("FAIL no write-back"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

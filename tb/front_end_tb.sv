// front_end_tb: runs the front end against a buffer model. Checks that every
// filter word reaches the right register-file write (OMAC column, lane,
// element), that the staged neurons equal the image words, that exactly NCYC
// frames of FRAME bit periods are fired with the right cyc/first/last marks,
// that done follows be_done, and that partial sums are fetched into
// psum_init only when 'accum' is set (second operation). Run for both OMAC timings (hybrid: 4 frames
// of 4 periods, all-optical: 4 frames of 7 periods).
module front_end_tb;
  localparam int R = 2, L = 4, B = 4;
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

  logic [3:0] mem [128];
  logic [27:0] psm [16];
  logic start = 0, be_done = 0, accum = 0;
  logic            ps_re [2];
  logic [3:0]      ps_raddr [2];
  logic [27:0]     ps_rdata [2];
  logic [R-1:0][L-1:0][19:0] psum_init [2];

  // two front ends, one per OMAC timing, sharing the stimulus
  logic            busy [2], done [2], gb_re [2], fire [2], frame_last [2], cyc_first [2], cyc_last [2];
  logic [6:0]      gb_raddr [2];
  logic [3:0]      gb_rdata [2];
  logic [L-1:0]    rf_we [2];
  logic [1:0]      rf_lane [2], rf_elem [2], cyc [2];
  logic [3:0]      rf_data [2];
  logic [R-1:0][L*L-1:0][3:0] nstage [2];
  logic [2:0]      slot [2];

  for (genvar v = 0; v < 2; v++) begin : g_fe
    front_end #(
      .ROWS(R), .LANES(L), .BITS(B), .FRAME(v ? 2 * B - 1 : B), .NCYC(v ? L : B),
      .SLOT_W(3), .CYC_W(2), .IAW(7), .ACC_W(20), .PAW(3)
    ) dut (
      .clk, .rst_n, .start, .accum, .be_done,
      .ps_re(ps_re[v]), .ps_raddr(ps_raddr[v][2:0]), .ps_rdata(ps_rdata[v][19:0]), .psum_init(psum_init[v]), .busy(busy[v]), .done(done[v]),
      .gb_re(gb_re[v]), .gb_raddr(gb_raddr[v]), .gb_rdata(gb_rdata[v]),
      .rf_we(rf_we[v]), .rf_lane(rf_lane[v]), .rf_elem(rf_elem[v]), .rf_data(rf_data[v]),
      .nstage(nstage[v]), .fire(fire[v]), .slot(slot[v]), .cyc(cyc[v]),
      .frame_last(frame_last[v]), .cyc_first(cyc_first[v]), .cyc_last(cyc_last[v])
    );
    always_ff @(posedge clk) if (gb_re[v]) gb_rdata[v] <= mem[gb_raddr[v]];
    always_ff @(posedge clk) if (ps_re[v]) ps_rdata[v] <= psm[ps_raddr[v][2:0]];
    assign ps_raddr[v][3] = 1'b0;
  end

  int nwrites [2], nframes [2], nslots [2], ndone [2];
  logic [L*L*L-1:0] seen [2];

  always @(posedge clk) if (rst_n) begin
    for (int v = 0; v < 2; v++) begin
      for (int k = 0; k < L; k++) if (rf_we[v][k]) begin
        int a;
        a = k * L * L + int'(rf_lane[v]) * L + int'(rf_elem[v]);
        nwrites[v]++;
        seen[v][a] = 1'b1;
        checks++;
        if (rf_data[v] !== mem[a]) begin
          failures++; $display("FAIL v%0d rf write k=%0d addr %0d", v, k, a);
        end
      end
      if (fire[v]) begin
        nslots[v]++;
        if (frame_last[v]) begin
          checks++;
          if (32'(cyc[v]) !== nframes[v] || cyc_first[v] !== (nframes[v] === 0) ||
              cyc_last[v] !== (nframes[v] === (v ? L : B) - 1) ||
              int'(slot[v]) != (v ? 2 * B - 2 : B - 1)) begin
            failures++; $display("FAIL v%0d frame %0d marks", v, nframes[v]);
          end
          nframes[v]++;
        end
      end
      if (done[v]) ndone[v]++;
    end
  end

  initial begin
    for (int a = 0; a < 128; a++) mem[a] = 4'($urandom);
    for (int a = 0; a < 16; a++) psm[a] = 28'($urandom);
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int op = 0; op < 2; op++) begin
      for (int v = 0; v < 2; v++) begin
        nwrites[v] = 0; nframes[v] = 0; nslots[v] = 0; ndone[v] = 0; seen[v] = '0;
      end
      @(negedge clk);
      start = 1; accum = (op == 1);
      @(negedge clk);
      start = 0; accum = 0;
      wait (!fire[0] && !fire[1] && nframes[0] === B && nframes[1] === L);
      repeat (3) @(negedge clk);
      for (int v = 0; v < 2; v++) begin
        checks++;
        if (busy[v] !== 1'b1 || ndone[v] !== 0) begin failures++; $display("FAIL v%0d finished before be_done", v); end
      end
      be_done = 1;
      @(negedge clk);
      be_done = 0;
      @(negedge clk);
      for (int v = 0; v < 2; v++) begin
        checks++;
        if (nwrites[v] !== L * L * L || seen[v] !== '1) begin
          failures++; $display("FAIL v%0d rf writes %0d", v, nwrites[v]);
        end
        checks++;
        if (nslots[v] !== (v ? L * (2 * B - 1) : B * B)) begin
          failures++; $display("FAIL v%0d fired %0d bit periods", v, nslots[v]);
        end
        checks++;
        if (ndone[v] !== 1 || busy[v] !== 1'b0) begin failures++; $display("FAIL v%0d done", v); end
        for (int r = 0; r < R; r++)
          for (int i = 0; i < L * L; i++) begin
            checks++;
            if (nstage[v][r][i] !== mem[L * L * L + r * L * L + i]) begin
              failures++; $display("FAIL v%0d nstage[%0d][%0d]", v, r, i);
            end
          end
        for (int r = 0; r < R; r++)
          for (int k = 0; k < L; k++) begin
            checks++;
            if (psum_init[v][r][k] !== ((op === 1) ? psm[r * L + k][19:0] : 20'd0)) begin
              failures++; $display("FAIL v%0d op%0d psum_init[%0d][%0d]", v, op, r, k);
            end
          end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

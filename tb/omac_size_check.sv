// omac_size_check: drives one OMAC of a given size and kind (OPTICAL = 0:
// hybrid, 1: all-optical) through NWIN windows of random LANES x LANES
// neuron and synapse words of BITS bits, the same way the front end does, and
// counts checks and failures of the partial sum, the tanh output and the
// latency (out_valid two clocks after the last bit period). The first window
// uses all-ones words (the largest sum); odd windows start from a random
// partial sum. Used by omac_sizes_tb; raises 'finished' when done.
module omac_size_check #(
  parameter int L       = 4,
  parameter int B       = 4,
  parameter bit OPTICAL = 1'b0,
  parameter int NWIN    = 6
) (
  input  logic clk,
  input  logic rst_n,
  output int   checks,
  output int   failures,
  output logic finished
);
  localparam int MAXC   = (L > B) ? L : B;
  localparam int CYC_W  = (MAXC > 1) ? $clog2(MAXC) : 1;
  localparam int LW     = (L > 1) ? $clog2(L) : 1;
  localparam int SLOT_W = $clog2(2 * B - 1);
  localparam int ACC_W  = pixel_pkg::acc_width(L, B);
  localparam int NL     = OPTICAL ? L : L * L;   // wavelengths into the OMAC
  localparam int NCYC   = OPTICAL ? L : B;       // frames per window
  localparam int FRAME  = OPTICAL ? 2 * B - 1 : B;

  logic              rf_we;
  logic [LW-1:0]     rf_lane, rf_elem;
  logic [B-1:0]      rf_data;
  logic [NL-1:0]     light;
  logic [SLOT_W-1:0] slot;
  logic              frame_last, cyc_first, cyc_last;
  logic [CYC_W-1:0]  cyc;
  logic [ACC_W-1:0]  psum_in, psum;
  logic signed [7:0] act;
  logic              out_valid;

  if (OPTICAL) begin : g_oo
    omac_oo #(.LANES(L), .BITS(B), .CYC_W(CYC_W)) dut (
      .clk, .rst_n, .rf_we, .rf_lane, .rf_elem, .rf_data, .light, .slot,
      .frame_last, .cyc, .cyc_first, .cyc_last, .psum_in, .psum, .act, .out_valid
    );
  end else begin : g_oe
    omac_oe #(.LANES(L), .BITS(B), .CYC_W(CYC_W)) dut (
      .clk, .rst_n, .rf_we, .rf_lane, .rf_elem, .rf_data, .light,
      .frame_last, .cyc, .cyc_first, .cyc_last, .psum_in, .psum, .act, .out_valid
    );
  end

  longint nin [L][L];
  longint syn [L][L];

  function automatic longint rnd_word();
    return longint'({$urandom, $urandom}) & ((longint'(1) << B) - 1);
  endfunction

  task automatic run_window();
    longint exp;
    real r;
    for (int l = 0; l < L; l++)
      for (int e = 0; e < L; e++) begin
        @(negedge clk);
        rf_we = 1; rf_lane = LW'(l); rf_elem = LW'(e); rf_data = B'(syn[l][e]);
      end
    @(negedge clk);
    rf_we = 0;
    exp = longint'(psum_in);
    for (int l = 0; l < L; l++) for (int e = 0; e < L; e++) exp += nin[l][e] * syn[l][e];
    for (int c = 0; c < NCYC; c++)
      for (int t = 0; t < FRAME; t++) begin
        for (int l = 0; l < L; l++)
          for (int e = 0; e < L; e++)
            if (OPTICAL) begin
              if (e == c) light[l] = (t < B) ? 1'((nin[l][e] >> t) & 1) : 1'b0;
            end else begin
              light[l*L+e] = 1'((nin[l][e] >> t) & 1);
            end
        slot = SLOT_W'(t);
        cyc = CYC_W'(c); cyc_first = (c == 0); cyc_last = (c == NCYC - 1);
        frame_last = (t == FRAME - 1);
        checks++;
        if (out_valid !== 1'b0) begin failures++; $display("FAIL L%0d B%0d O%0d early out_valid", L, B, OPTICAL); end
        @(negedge clk);
      end
    light = '0; frame_last = 0; slot = '0;
    checks++;
    if (out_valid !== 1'b0) begin failures++; $display("FAIL L%0d B%0d O%0d out_valid one clock early", L, B, OPTICAL); end
    @(negedge clk);
    checks++;
    if (out_valid !== 1'b1 || 64'(psum) !== exp) begin
      failures++;
      $display("FAIL L%0d B%0d O%0d psum=%0d valid=%b expected %0d", L, B, OPTICAL, psum, out_valid, exp);
    end
    r = $tanh(real'(exp) / real'(longint'(1) << (2 * B))) * 64.0;
    checks++;
    if (real'(act) < r - 3.0 || real'(act) > r + 3.0) begin
      failures++;
      $display("FAIL L%0d B%0d O%0d act=%0d expected about %f", L, B, OPTICAL, act, r);
    end
  endtask

  initial begin
    checks = 0; failures = 0; finished = 0;
    rf_we = 0; rf_lane = '0; rf_elem = '0; rf_data = '0; light = '0; slot = '0;
    frame_last = 0; cyc_first = 0; cyc_last = 0; cyc = '0; psum_in = '0;
    wait (rst_n === 1'b1);
    for (int n = 0; n < NWIN; n++) begin
      for (int l = 0; l < L; l++)
        for (int e = 0; e < L; e++) begin
          nin[l][e] = (n == 0) ? (longint'(1) << B) - 1 : rnd_word();
          syn[l][e] = (n == 0) ? (longint'(1) << B) - 1 : rnd_word();
        end
      psum_in = (n % 2 == 1) ? ACC_W'($urandom % 100000) : '0;
      run_window();
    end
    finished = 1;
  end
endmodule

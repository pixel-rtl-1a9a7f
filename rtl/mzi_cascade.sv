// mzi_cascade: behavioural model of the cascaded Mach-Zehnder interferometers
// that add pulse trains optically (all-optical shift-accumulate) for one
// wavelength.
//
// Stage j receives on its i0 port the AND output of synapse lane j, i.e. the
// neuron pulse train gated by synapse bit j. Each MZI is tuned as a coupler
// that sends the sum of its two inputs to o0. The path from one stage's o0 to
// the next stage's i1 is cut to exactly one bit period, so the chain runs from
// stage STAGES-1 down to stage 0 and the contribution of stage j leaves the
// last stage j bit periods late:
//   amp(t) = sum_j in_j(t - j).
// With in_j = neuron bits AND synapse bit j this is the column sum of the
// partial-product grid of neuron x synapse, a multi-level light amplitude.
// Light amplitude is modelled as an unsigned integer count of unit pulses;
// the optical delay of one bit period is modelled as one clock register.
// Interface: in_i0[j] light entering stage j, amp light level at the output.
module mzi_cascade #(
  parameter int unsigned STAGES = 4,
  parameter int unsigned AMP_W  = $clog2(STAGES + 1)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [STAGES-1:0] in_i0,
  output logic [AMP_W-1:0]  amp
);
  // o0 of each stage, and the delayed copy that arrives at the next stage's i1
  logic [AMP_W-1:0] o0    [STAGES];
  logic [AMP_W-1:0] delay [STAGES];

  always_comb begin
    for (int j = STAGES - 1; j >= 0; j--) begin
      if (j == STAGES - 1) o0[j] = AMP_W'(in_i0[j]);
      else                 o0[j] = AMP_W'(in_i0[j]) + delay[j];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int j = 0; j < STAGES; j++) delay[j] <= '0;
    end else begin
      // delay[j] is the path from stage j+1's o0 to stage j's i1
      for (int j = 0; j < STAGES - 1; j++) delay[j] <= o0[j+1];
      delay[STAGES-1] <= '0;
    end
  end

  assign amp = o0[0];
endmodule

// oe_amplitude_decoder: second kind of optical-to-electrical converter, for
// multi-level light pulses such as those leaving the MZI cascade.
//
// A photodiode current proportional to the light amplitude is compared with
// LEVELS reference currents; the comparator outputs form a thermometer code
// whose count is the amplitude. The back-end logic then weights the amplitude
// seen in bit period t by 2^t and adds the periods of one frame, which turns
// the column sums of a partial-product grid into the binary product.
// The photodiode current is modelled as the integer amplitude 'amp'; the
// comparator array is modelled by the threshold tests amp > k.
// Timing: 'slot' gives the bit period within the frame (0..SLOTS-1) and
// 'frame_last' marks period SLOTS-1. One clock after frame_last, 'value'
// holds the frame's result and 'valid' is high for one clock.
module oe_amplitude_decoder #(
  parameter int unsigned LEVELS = 4,              // comparators (max amplitude)
  parameter int unsigned SLOTS  = 7,              // bit periods per frame
  parameter int unsigned AMP_W  = $clog2(LEVELS + 1),
  parameter int unsigned SLOT_W = $clog2(SLOTS),
  parameter int unsigned VAL_W  = SLOTS + 1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [AMP_W-1:0]  amp,
  input  logic [SLOT_W-1:0] slot,
  input  logic              frame_last,
  output logic [VAL_W-1:0]  value,
  output logic              valid
);
  logic [LEVELS-1:0] therm;
  logic [AMP_W-1:0]  level;
  logic [VAL_W-1:0]  weighted;
  logic [VAL_W-1:0]  run, run_next;

  // current comparator array
  always_comb begin
    for (int k = 0; k < LEVELS; k++) therm[k] = (amp > AMP_W'(k));
    level = '0;
    for (int k = 0; k < LEVELS; k++) level = level + AMP_W'(therm[k]);
  end

  assign weighted = VAL_W'(level) << slot;
  assign run_next = (slot == '0) ? weighted : run + weighted;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      run   <= '0;
      value <= '0;
      valid <= 1'b0;
    end else begin
      run   <= run_next;
      valid <= frame_last;
      if (frame_last) value <= run_next;
    end
  end
endmodule

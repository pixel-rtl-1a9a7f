// neuron_firing: electrical-to-optical firing of input neurons (the x-control
// E/O of a row of OMACs).
//
// Each of NW neuron words modulates its own wavelength as a serial pulse
// train, least significant bit first, one bit per clock in bit periods
// 0..BITS-1 of a frame; bit periods BITS and later of a frame are dark
// (used by the all-optical OMAC to let the shifted pulses leave the MZI
// cascade). The same words are fired again in every frame, so one loaded
// window can be fired as many times as the OMACs need. Pulses follow 'slot'
// combinationally (the modulator driver); 'fire' gates the lasers.
module neuron_firing #(
  parameter int unsigned NW     = 16,
  parameter int unsigned BITS   = 4,
  parameter int unsigned SLOT_W = 3
) (
  input  logic                    fire,
  input  logic [SLOT_W-1:0]       slot,
  input  logic [NW-1:0][BITS-1:0] words,
  output logic [NW-1:0]           light
);
  always_comb begin
    for (int w = 0; w < NW; w++) begin
      light[w] = 1'b0;
      for (int b = 0; b < BITS; b++)
        if (fire && slot == SLOT_W'(b)) light[w] = words[w][b];
    end
  end
endmodule

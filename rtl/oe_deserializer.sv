// oe_deserializer: first kind of optical-to-electrical converter, a
// photodiode followed by a shift register that turns the serial pulse train
// of one wavelength into a parallel word.
//
// The photodiode output is taken as a clean bit per bit period ('pulse').
// Pulses arrive least significant bit first, one per clock, for BITS clocks;
// 'frame_last' marks the clock that carries the last pulse of a word. One
// clock later 'word' holds the assembled word and 'valid' is high for one
// clock. LSB-first order is this design's choice.
module oe_deserializer #(
  parameter int unsigned BITS = 4
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            pulse,
  input  logic            frame_last,
  output logic [BITS-1:0] word,
  output logic            valid
);
  logic [BITS-2:0] shreg;    // pulses received so far, newest at the top
  logic [BITS-1:0] shifted;

  assign shifted = {pulse, shreg};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      shreg <= '0;
      word  <= '0;
      valid <= 1'b0;
    end else begin
      shreg <= shifted[BITS-1:1];
      valid <= frame_last;
      if (frame_last) word <= shifted;
    end
  end
endmodule

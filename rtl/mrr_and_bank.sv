// mrr_and_bank: behavioural model of a bank of cascaded double-microring
// filters, one per wavelength, used as an optical AND (multiply).
//
// Each filter is an analog photonic device. With its ring voltage off (v_on=0)
// the light of its wavelength stays on the through waveguide (o0, "bar"); with
// the voltage on (v_on=1) the light is coupled through both rings to the drop
// waveguide (o1, "cross"). Light present on o1 therefore means
// "neuron pulse AND synapse bit". A light level is modelled as one bit per
// wavelength per bit period; propagation delay (about 0.55 ps through the
// rings) is far below a bit period and is not modelled.
// Interface: light_in[w] pulse on wavelength w, v_on[w] ring drive voltage,
// o1[w] drop-port light (the AND), o0[w] through-port light.
module mrr_and_bank #(
  parameter int unsigned NW = 16  // wavelengths (filters in the bank)
) (
  input  logic [NW-1:0] light_in,
  input  logic [NW-1:0] v_on,
  output logic [NW-1:0] o1,
  output logic [NW-1:0] o0
);
  assign o1 = light_in & v_on;
  assign o0 = light_in & ~v_on;
endmodule

// pixel_pkg: constants shared by the PIXEL photonic accelerator RTL.
//
// The default array size follows the worked example of the hybrid OMAC:
// 4 neuron lanes and 4 bits per lane (wavelength), so one row of OMACs uses
// LANES*LANES = 16 wavelengths and 4 filters. The activation format (signed,
// 6 fraction bits, 1.0 = 64) and the number of OMAC rows are this design's
// own choices; the document gives neither.
// A linter that reads this package for a module which does not import it
// reports the *_DEF constants as unused; they are used by pixel_top and the
// OMAC modules.
package pixel_pkg;
  localparam int unsigned LANES_DEF    = 4;  // neuron lanes = wavelengths per lane
  localparam int unsigned BITS_DEF     = 4;  // bits per lane (synapse and neuron width)
  localparam int unsigned ROWS_DEF     = 4;  // rows of OMACs in the x/y grid
  localparam int unsigned ACT_W_DEF    = 8;  // activation output width
  localparam int unsigned ACT_FRAC_DEF = 6;  // activation fraction bits

  localparam int unsigned PSUM_HEADROOM_DEF = 8;  // extra partial-sum bits: 256 tiles

  // Width of a partial sum: one full dot product of LANES*LANES unsigned
  // BITS x BITS products, plus headroom for partial sums carried over from
  // earlier operations through the global buffer.
  function automatic int unsigned acc_width(int unsigned lanes, int unsigned bits);
    return 2 * bits + $clog2(lanes * lanes) + PSUM_HEADROOM_DEF;
  endfunction
endpackage

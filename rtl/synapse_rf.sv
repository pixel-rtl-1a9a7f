// synapse_rf: register file of one OMAC holding its filter's synapse weights,
// which drive the microring voltages.
//
// It holds LANES synapse lanes of ELEMS weights of BITS bits. Weights are
// pre-loaded through a write port (one weight per clock) before neurons are
// fired. Two read views serve the two OMAC kinds:
//   plane[l][e] = bit 'bit_sel' of weight (l, e)   (hybrid OMAC: one synapse
//                 bit per cycle for every wavelength)
//   elem[l]     = weight (l, elem_sel)             (all-optical OMAC: every
//                 bit of one element's weight per cycle)
// Reads are combinational; writes take effect on the next clock. Weights
// reset to zero.
module synapse_rf #(
  parameter int unsigned LANES = 4,
  parameter int unsigned ELEMS = 4,
  parameter int unsigned BITS  = 4,
  parameter int unsigned LW    = (LANES > 1) ? $clog2(LANES) : 1,
  parameter int unsigned EW    = (ELEMS > 1) ? $clog2(ELEMS) : 1,
  parameter int unsigned BW    = (BITS > 1) ? $clog2(BITS) : 1
) (
  input  logic                                  clk,
  input  logic                                  rst_n,
  input  logic                                  we,
  input  logic [LW-1:0]                         wlane,
  input  logic [EW-1:0]                         welem,
  input  logic [BITS-1:0]                       wdata,
  input  logic [BW-1:0]                         bit_sel,
  input  logic [EW-1:0]                         elem_sel,
  output logic [LANES-1:0][ELEMS-1:0]           plane,
  output logic [LANES-1:0][BITS-1:0]            elem
);
  logic [BITS-1:0] w [LANES][ELEMS];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int l = 0; l < LANES; l++)
        for (int e = 0; e < ELEMS; e++) w[l][e] <= '0;
    end else if (we) begin
      w[wlane][welem] <= wdata;
    end
  end

  always_comb begin
    for (int l = 0; l < LANES; l++) begin
      for (int e = 0; e < ELEMS; e++) plane[l][e] = w[l][e][bit_sel];
      elem[l] = w[l][elem_sel];
    end
  end
endmodule

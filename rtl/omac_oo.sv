// omac_oo: all-optical MAC (OO OMAC), one filter.
//
// LANES wavelengths arrive, wavelength l carrying element e of input neuron
// lane l in frame e (e = 0..LANES-1) as a BITS-bit pulse train followed by
// BITS-1 dark bit periods. The filter has BITS synapse lanes; synapse lane b
// drives the microring of wavelength l with bit b of weight (l, e), so all
// bits of a weight are applied at once. For each wavelength, the drop ports
// of the BITS synapse lanes feed a cascade of BITS MZIs whose one-bit-period
// links delay synapse lane b by b periods and add the pulses optically: the
// light level in period t is the column sum t of the neuron x weight
// partial-product grid. An amplitude-decoding o/e converter turns the
// 2*BITS-1 levels into the product, and the electrical processor adds the
// LANES products of a frame and accumulates them over the LANES frames, then
// applies tanh. Result: psum = psum_in + sum_{l,e} I[l][e]*S[l][e], with
// psum_in a partial sum carried over from earlier operations.
// Timing: same frame signals as omac_oe; a frame is 2*BITS-1 bit periods and
// a window LANES frames. psum/act/out_valid follow two clocks after the last
// bit period of the last frame.
// The optical dataflow follows the document's all-optical OMAC; the dark
// padding periods, which keep one frame's delayed pulses from mixing with
// the next, and the electrical sum over wavelengths are this design's choices.
// The rings' through-port light ('through') is modelled but not used: only
// the drop ports feed the MZI cascade.
module omac_oo
  import pixel_pkg::*;
#(
  parameter int unsigned LANES    = LANES_DEF,
  parameter int unsigned BITS     = BITS_DEF,
  parameter int unsigned ACT_W    = ACT_W_DEF,
  parameter int unsigned ACT_FRAC = ACT_FRAC_DEF,
  parameter int unsigned CYC_W    = 2,
  parameter int unsigned SLOT_W   = $clog2(2 * BITS - 1),
  parameter int unsigned ACC_W    = acc_width(LANES, BITS),
  parameter int unsigned LW       = (LANES > 1) ? $clog2(LANES) : 1
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    rf_we,
  input  logic [LW-1:0]           rf_lane,
  input  logic [LW-1:0]           rf_elem,
  input  logic [BITS-1:0]         rf_data,
  input  logic [LANES-1:0]        light,
  input  logic [SLOT_W-1:0]       slot,
  input  logic                    frame_last,
  input  logic [CYC_W-1:0]        cyc,
  input  logic                    cyc_first,
  input  logic                    cyc_last,
  // partial sum the window starts from
  input  logic [ACC_W-1:0]        psum_in,
  output logic [ACC_W-1:0]        psum,
  output logic signed [ACT_W-1:0] act,
  output logic                    out_valid
);
  localparam int unsigned SLOTS = 2 * BITS - 1;
  localparam int unsigned AMP_W = $clog2(BITS + 1);
  localparam int unsigned PW    = 2 * BITS;   // product width

  logic [LANES-1:0][LANES-1:0] unused_plane;
  logic [LANES-1:0][BITS-1:0]  weights;

  synapse_rf #(.LANES(LANES), .ELEMS(LANES), .BITS(BITS)) u_rf (
    .clk, .rst_n,
    .we(rf_we), .wlane(rf_lane), .welem(rf_elem), .wdata(rf_data),
    .bit_sel('0), .elem_sel(LW'(cyc)),
    .plane(unused_plane), .elem(weights)
  );

  // synapse lanes: one MRR bank per synapse bit, all seeing the same light
  logic [BITS-1:0][LANES-1:0] v_on, dropped, through;
  for (genvar b = 0; b < BITS; b++) begin : g_sl
    for (genvar l = 0; l < LANES; l++) begin : g_v
      assign v_on[b][l] = weights[l][b];
    end
    mrr_and_bank #(.NW(LANES)) u_mrr (
      .light_in(light), .v_on(v_on[b]), .o1(dropped[b]), .o0(through[b])
    );
  end

  logic [LANES-1:0][PW-1:0] products;
  logic [LANES-1:0]         pvalid;
  for (genvar l = 0; l < LANES; l++) begin : g_wl
    logic [BITS-1:0]  stage_in;
    logic [AMP_W-1:0] amp;
    for (genvar b = 0; b < BITS; b++) begin : g_in
      assign stage_in[b] = dropped[b][l];
    end
    mzi_cascade #(.STAGES(BITS), .AMP_W(AMP_W)) u_mzi (
      .clk, .rst_n, .in_i0(stage_in), .amp(amp)
    );
    oe_amplitude_decoder #(
      .LEVELS(BITS), .SLOTS(SLOTS), .AMP_W(AMP_W), .SLOT_W(SLOT_W), .VAL_W(PW)
    ) u_dec (
      .clk, .rst_n, .amp(amp), .slot(slot), .frame_last(frame_last),
      .value(products[l]), .valid(pvalid[l])
    );
  end

  logic first_q, last_q;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      first_q <= 1'b0;
      last_q  <= 1'b0;
    end else if (frame_last) begin
      first_q <= cyc_first;
      last_q  <= cyc_last;
    end
  end

  electrical_processor #(
    .NW(LANES), .IN_W(PW), .ACC_W(ACC_W), .SH_W(1),
    .ACT_IN_FRAC(2 * BITS), .ACT_W(ACT_W), .ACT_FRAC(ACT_FRAC)
  ) u_ep (
    .clk, .rst_n,
    .in_valid(&pvalid), .words(products), .shift(1'b0),
    .first(first_q), .last(last_q), .acc_init(psum_in),
    .psum(psum), .act(act), .out_valid(out_valid)
  );
endmodule

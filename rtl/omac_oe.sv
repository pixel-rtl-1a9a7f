// omac_oe: hybrid optical-electrical MAC (OE OMAC), one filter.
//
// All LANES input neuron lanes arrive as LANES*LANES wavelengths: wavelength
// l*LANES+e carries element e of lane l as a serial BITS-bit pulse train, the
// same words in every frame. In frame c (c = 0..BITS-1) the register file
// drives the microring of wavelength (l, e) with bit c of synapse weight
// (l, e), so the drop port carries the whole neuron word ANDed with one
// synapse bit. Per wavelength a photodiode and shift register restore the
// word; the electrical processor adds the LANES*LANES words with CLAs, shifts
// the sum left by c and accumulates. After BITS frames the sum is the dot
// product sum_{l,e} I[l][e]*S[l][e] plus 'psum_in' (a partial sum carried
// over from earlier operations, held stable during the window), and its tanh
// is the output neuron.
// Timing: 'slot' counts bit periods in a frame, 'frame_last' marks the last
// one, 'cyc' is the synapse bit of the frame, 'cyc_first'/'cyc_last' mark the
// first and last frame of a window. psum/act/out_valid follow two clocks
// after the last bit period of the last frame.
// The dataflow follows the document's hybrid OMAC; LSB-first pulse order and
// the frame signals are this design's choices.
// The rings' through-port light ('through') is modelled but not used: in the
// hybrid OMAC only the drop port carries the AND.
module omac_oe
  import pixel_pkg::*;
#(
  parameter int unsigned LANES    = LANES_DEF,
  parameter int unsigned BITS     = BITS_DEF,
  parameter int unsigned ACT_W    = ACT_W_DEF,
  parameter int unsigned ACT_FRAC = ACT_FRAC_DEF,
  parameter int unsigned CYC_W    = 2,
  parameter int unsigned NW       = LANES * LANES,
  parameter int unsigned ACC_W    = acc_width(LANES, BITS),
  parameter int unsigned LW       = (LANES > 1) ? $clog2(LANES) : 1
) (
  input  logic                    clk,
  input  logic                    rst_n,
  // synapse pre-load (y-dimension)
  input  logic                    rf_we,
  input  logic [LW-1:0]           rf_lane,
  input  logic [LW-1:0]           rf_elem,
  input  logic [BITS-1:0]         rf_data,
  // neuron light on the home channels (x-dimension)
  input  logic [NW-1:0]           light,
  // frame timing
  input  logic                    frame_last,
  input  logic [CYC_W-1:0]        cyc,
  input  logic                    cyc_first,
  input  logic                    cyc_last,
  // partial sum the window starts from
  input  logic [ACC_W-1:0]        psum_in,
  // output neuron lane
  output logic [ACC_W-1:0]        psum,
  output logic signed [ACT_W-1:0] act,
  output logic                    out_valid
);
  localparam int unsigned BW = (BITS > 1) ? $clog2(BITS) : 1;

  logic [LANES-1:0][LANES-1:0] plane;
  logic [LANES-1:0][BITS-1:0]  unused_elem;

  synapse_rf #(.LANES(LANES), .ELEMS(LANES), .BITS(BITS)) u_rf (
    .clk, .rst_n,
    .we(rf_we), .wlane(rf_lane), .welem(rf_elem), .wdata(rf_data),
    .bit_sel(BW'(cyc)), .elem_sel('0),
    .plane(plane), .elem(unused_elem)
  );

  logic [NW-1:0] dropped, through;
  mrr_and_bank #(.NW(NW)) u_mrr (
    .light_in(light), .v_on(plane), .o1(dropped), .o0(through)
  );

  logic [NW-1:0][BITS-1:0] words;
  logic [NW-1:0]           wvalid;
  for (genvar w = 0; w < NW; w++) begin : g_oe
    oe_deserializer #(.BITS(BITS)) u_deser (
      .clk, .rst_n, .pulse(dropped[w]), .frame_last(frame_last),
      .word(words[w]), .valid(wvalid[w])
    );
  end

  // frame attributes travel with the words into the EP
  logic [BW-1:0] shift_q;
  logic          first_q, last_q;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      shift_q <= '0;
      first_q <= 1'b0;
      last_q  <= 1'b0;
    end else if (frame_last) begin
      shift_q <= BW'(cyc);
      first_q <= cyc_first;
      last_q  <= cyc_last;
    end
  end

  electrical_processor #(
    .NW(NW), .IN_W(BITS), .ACC_W(ACC_W), .SH_W(BW),
    .ACT_IN_FRAC(2 * BITS), .ACT_W(ACT_W), .ACT_FRAC(ACT_FRAC)
  ) u_ep (
    .clk, .rst_n,
    .in_valid(&wvalid), .words(words), .shift(shift_q),
    .first(first_q), .last(last_q), .acc_init(psum_in),
    .psum(psum), .act(act), .out_valid(out_valid)
  );
endmodule

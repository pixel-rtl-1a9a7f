// pixel_top: PIXEL photonic neural-network accelerator.
//
// A grid of ROWS x LANES optical MAC units (OMACs). Column k holds filter k
// (LANES filters); its weights are pre-loaded into the register files of all
// OMACs of the column over the y-dimension. Row r receives its own window of
// input neurons over the x-dimension: the row's E/O firing broadcasts the
// neurons on wavelengths shared by every OMAC of the row, so one row computes
// LANES output neurons (one per filter) of one window, and the ROWS rows work
// on ROWS windows at once.
//
// Operation: the host (through filter/image decomposition) writes filter and
// image words into the global buffer input array (address map in front_end),
// pulses 'start', and waits for 'done'. The front end loads weights and
// neurons, fires the neurons frame after frame, the OMACs compute
//   psum[r][k] = P[r][k] + sum_{l,e} I_r[l][e] * S_k[l][e],  act = tanh(psum),
// where P is zero, or, if 'accum' is high with 'start', the partial sums the
// previous operation left in the buffer (a window longer than LANES*LANES
// terms is summed over several operations; the last one's act is final),
// and the back end writes {act, psum} of OMAC (r, k) to partial-sum address
// r*LANES+k, readable on ps_raddr/ps_rdata (one clock latency).
//
// OPTICAL_ACCUM selects the OMAC kind: 0 = hybrid (optical AND, electrical
// shift-accumulate; BITS frames of BITS bit periods), 1 = all-optical (MZI
// accumulation; LANES frames of 2*BITS-1 bit periods). The grid size (ROWS)
// and the default OMAC kind are this design's choices.
module pixel_top
  import pixel_pkg::*;
#(
  parameter int unsigned LANES         = LANES_DEF,
  parameter int unsigned BITS          = BITS_DEF,
  parameter int unsigned ROWS          = ROWS_DEF,
  parameter bit          OPTICAL_ACCUM = 1'b0,
  parameter int unsigned ACT_W         = ACT_W_DEF,
  parameter int unsigned ACT_FRAC      = ACT_FRAC_DEF,
  parameter int unsigned ACC_W         = acc_width(LANES, BITS),
  parameter int unsigned IN_DEPTH      = LANES * LANES * LANES + ROWS * LANES * LANES,
  parameter int unsigned IAW           = $clog2(IN_DEPTH),
  parameter int unsigned PAW           = $clog2(ROWS * LANES)
) (
  input  logic                    clk,
  input  logic                    rst_n,
  // global buffer input array (from filter/image decomposition)
  input  logic                    in_we,
  input  logic [IAW-1:0]          in_waddr,
  input  logic [BITS-1:0]         in_wdata,
  // control
  input  logic                    start,
  input  logic                    accum,
  output logic                    busy,
  output logic                    done,
  // partial-sum array read
  input  logic [PAW-1:0]          ps_raddr,
  output logic [ACC_W-1:0]        ps_psum,
  output logic signed [ACT_W-1:0] ps_act
);
  localparam int unsigned NWL    = LANES * LANES;
  localparam int unsigned FRAME  = OPTICAL_ACCUM ? 2 * BITS - 1 : BITS;
  localparam int unsigned NCYC   = OPTICAL_ACCUM ? LANES : BITS;
  localparam int unsigned SLOT_W = $clog2(2 * BITS - 1);
  localparam int unsigned MAXC   = (LANES > BITS) ? LANES : BITS;
  localparam int unsigned CYC_W  = (MAXC > 1) ? $clog2(MAXC) : 1;
  localparam int unsigned LW     = (LANES > 1) ? $clog2(LANES) : 1;
  localparam int unsigned PS_W   = ACT_W + ACC_W;

  // global buffer
  logic            gb_re;
  logic [IAW-1:0]  gb_raddr;
  logic [BITS-1:0] gb_rdata;
  logic            ps_we;
  logic [PAW-1:0]  ps_waddr;
  logic [PS_W-1:0] ps_wdata, ps_rdata;
  logic            fe_ps_re;
  logic [PAW-1:0]  fe_ps_raddr;
  logic [ACC_W-1:0] fe_ps_rdata;
  logic [ROWS-1:0][LANES-1:0][ACC_W-1:0] psum_init;

  global_buffer #(
    .BITS(BITS), .IN_DEPTH(IN_DEPTH), .PS_W(PS_W), .PS_DEPTH(ROWS * LANES), .FE_W(ACC_W),
    .IAW(IAW), .PAW(PAW)
  ) u_gb (
    .clk,
    .in_we, .in_waddr, .in_wdata,
    .in_re(gb_re), .in_raddr(gb_raddr), .in_rdata(gb_rdata),
    .ps_we, .ps_waddr, .ps_wdata,
    .ps_raddr, .ps_rdata,
    .fe_ps_re, .fe_ps_raddr, .fe_ps_rdata
  );
  assign ps_psum = ps_rdata[ACC_W-1:0];
  assign ps_act  = ps_rdata[PS_W-1:ACC_W];

  // front end
  logic [LANES-1:0]                      rf_we;
  logic [LW-1:0]                         rf_lane, rf_elem;
  logic [BITS-1:0]                       rf_data;
  logic [ROWS-1:0][NWL-1:0][BITS-1:0]    nstage;
  logic                                  fire, frame_last, cyc_first, cyc_last;
  logic [SLOT_W-1:0]                     slot;
  logic [CYC_W-1:0]                      cyc;
  logic                                  be_done;

  front_end #(
    .ROWS(ROWS), .LANES(LANES), .BITS(BITS), .FRAME(FRAME), .NCYC(NCYC),
    .SLOT_W(SLOT_W), .CYC_W(CYC_W), .IAW(IAW), .ACC_W(ACC_W), .PAW(PAW)
  ) u_fe (
    .clk, .rst_n, .start, .accum, .be_done, .busy, .done,
    .gb_re, .gb_raddr, .gb_rdata,
    .ps_re(fe_ps_re), .ps_raddr(fe_ps_raddr), .ps_rdata(fe_ps_rdata), .psum_init,
    .rf_we, .rf_lane, .rf_elem, .rf_data,
    .nstage,
    .fire, .slot, .cyc, .frame_last, .cyc_first, .cyc_last
  );

  // OMAC grid
  logic [ROWS-1:0][LANES-1:0]            o_valid;
  logic [ROWS-1:0][LANES-1:0][ACC_W-1:0] o_psum;
  logic [ROWS-1:0][LANES-1:0][ACT_W-1:0] o_act;

  for (genvar r = 0; r < ROWS; r++) begin : g_row
    if (!OPTICAL_ACCUM) begin : g_oe
      // x-dimension E/O: every element of every lane on its own wavelength
      logic [NWL-1:0] light;
      neuron_firing #(.NW(NWL), .BITS(BITS), .SLOT_W(SLOT_W)) u_fire (
        .fire, .slot, .words(nstage[r]), .light
      );
      for (genvar k = 0; k < LANES; k++) begin : g_col
        logic signed [ACT_W-1:0] a;
        omac_oe #(
          .LANES(LANES), .BITS(BITS), .ACT_W(ACT_W), .ACT_FRAC(ACT_FRAC), .CYC_W(CYC_W)
        ) u_omac (
          .clk, .rst_n,
          .rf_we(rf_we[k]), .rf_lane, .rf_elem, .rf_data,
          .light, .frame_last, .cyc, .cyc_first, .cyc_last,
          .psum_in(psum_init[r][k]), .psum(o_psum[r][k]), .act(a), .out_valid(o_valid[r][k])
        );
        assign o_act[r][k] = a;
      end
    end else begin : g_oo
      // x-dimension E/O: element 'cyc' of every lane, one wavelength per lane
      logic [LANES-1:0][BITS-1:0] words;
      logic [LANES-1:0]           light;
      for (genvar l = 0; l < LANES; l++) begin : g_sel
        assign words[l] = nstage[r][l * LANES + int'(cyc)];
      end
      neuron_firing #(.NW(LANES), .BITS(BITS), .SLOT_W(SLOT_W)) u_fire (
        .fire, .slot, .words, .light
      );
      for (genvar k = 0; k < LANES; k++) begin : g_col
        logic signed [ACT_W-1:0] a;
        omac_oo #(
          .LANES(LANES), .BITS(BITS), .ACT_W(ACT_W), .ACT_FRAC(ACT_FRAC),
          .CYC_W(CYC_W), .SLOT_W(SLOT_W)
        ) u_omac (
          .clk, .rst_n,
          .rf_we(rf_we[k]), .rf_lane, .rf_elem, .rf_data,
          .light, .slot, .frame_last, .cyc, .cyc_first, .cyc_last,
          .psum_in(psum_init[r][k]), .psum(o_psum[r][k]), .act(a), .out_valid(o_valid[r][k])
        );
        assign o_act[r][k] = a;
      end
    end
  end

  back_end #(
    .ROWS(ROWS), .COLS(LANES), .ACC_W(ACC_W), .ACT_W(ACT_W), .PAW(PAW)
  ) u_be (
    .clk, .rst_n,
    .out_valid(o_valid), .psum(o_psum), .act(o_act),
    .ps_we, .ps_waddr, .ps_wdata, .done(be_done)
  );
endmodule

// front_end: front-end processing of the accelerator: pre-loads synapses
// into the OMAC register files, stages the input neurons and times their
// firing.
//
// On 'start' it reads the global buffer word by word (read latency one clock):
//   addresses 0 .. LANES^3-1: filter k, lane l, element e at k*LANES^2+l*LANES+e,
//     written over the y-dimension into the register file of OMAC column k;
//   addresses LANES^3 .. LANES^3+ROWS*LANES^2-1: input neurons of row r,
//     lane l, element e, kept in the staging register 'nstage';
//   then, only if 'accum' was high with 'start', partial-sum addresses
//     0 .. ROWS*LANES-1, kept in 'psum_init' as the values the OMACs start
//     from (otherwise 'psum_init' is zero). This lets an output neuron whose
//     window is longer than one OMAC pass be summed over several operations.
// It then fires the staged neurons NCYC times (frames of FRAME bit periods),
// driving 'fire', 'slot', 'cyc', 'frame_last', 'cyc_first' and 'cyc_last'
// for every OMAC, and waits for 'be_done' from the back end before raising
// 'done' for one clock. Hybrid OMACs need NCYC = BITS frames of BITS periods;
// all-optical OMACs need NCYC = LANES frames of 2*BITS-1 periods.
// The sequence and address map are this design's choices; the document says
// only that synapses are pre-loaded and neurons fired repeatedly.
// 'rf_data' is the buffer read data passed straight on: the register files
// are written in the clock the word arrives.
module front_end #(
  parameter int unsigned ROWS   = 4,
  parameter int unsigned LANES  = 4,
  parameter int unsigned BITS   = 4,
  parameter int unsigned FRAME  = 4,
  parameter int unsigned NCYC   = 4,
  parameter int unsigned SLOT_W = 3,
  parameter int unsigned CYC_W  = 2,
  parameter int unsigned IAW    = 7,
  parameter int unsigned ACC_W  = 20,
  parameter int unsigned PAW    = $clog2(ROWS * LANES),
  parameter int unsigned LW     = (LANES > 1) ? $clog2(LANES) : 1
) (
  input  logic                                      clk,
  input  logic                                      rst_n,
  input  logic                                      start,
  input  logic                                      accum,
  input  logic                                      be_done,
  output logic                                      busy,
  output logic                                      done,
  // global buffer read port
  output logic                                      gb_re,
  output logic [IAW-1:0]                            gb_raddr,
  input  logic [BITS-1:0]                           gb_rdata,
  output logic                                      ps_re,
  output logic [PAW-1:0]                            ps_raddr,
  input  logic [ACC_W-1:0]                          ps_rdata,
  output logic [ROWS-1:0][LANES-1:0][ACC_W-1:0]     psum_init,
  // register-file pre-load (y-dimension)
  output logic [LANES-1:0]                          rf_we,
  output logic [LW-1:0]                             rf_lane,
  output logic [LW-1:0]                             rf_elem,
  output logic [BITS-1:0]                           rf_data,
  // staged neurons (x-dimension)
  output logic [ROWS-1:0][LANES*LANES-1:0][BITS-1:0] nstage,
  // firing
  output logic                                      fire,
  output logic [SLOT_W-1:0]                         slot,
  output logic [CYC_W-1:0]                          cyc,
  output logic                                      frame_last,
  output logic                                      cyc_first,
  output logic                                      cyc_last
);
  localparam int unsigned NF  = LANES * LANES * LANES;
  localparam int unsigned NI  = ROWS * LANES * LANES;
  localparam int unsigned NRD = NF + NI;
  localparam int unsigned NPS = ROWS * LANES;
  localparam int unsigned CW  = $clog2(NRD + NPS + 1);

  typedef enum logic [2:0] {S_IDLE, S_LOAD, S_TAIL, S_FIRE, S_DRAIN} state_t;
  state_t state;

  logic [CW-1:0] cnt;      // read index being issued
  logic          rvalid_q;
  logic [CW-1:0] raddr_q;
  logic          accum_q;

  assign gb_re    = (state == S_LOAD) && (cnt < CW'(NRD));
  assign gb_raddr = IAW'(cnt);
  assign ps_re    = (state == S_LOAD) && (cnt >= CW'(NRD));
  assign ps_raddr = PAW'(cnt - CW'(NRD));

  // decode the returning read
  int unsigned ridx, fk, fl, fe;
  always_comb begin
    ridx = int'(raddr_q);
    if (ridx < NF) begin
      fk = ridx / (LANES * LANES);
      fl = (ridx / LANES) % LANES;
      fe = ridx % LANES;
    end else begin
      fk = (ridx - NF) / (LANES * LANES);
      fl = ((ridx - NF) / LANES) % LANES;
      fe = (ridx - NF) % LANES;
    end
    rf_we = '0;
    if (rvalid_q && ridx < NF) rf_we[fk] = 1'b1;
    if (ridx >= NRD) begin
      fk = (ridx - NRD) / LANES;
      fl = (ridx - NRD) % LANES;
      fe = 0;
    end
  end
  assign rf_lane = LW'(fl);
  assign rf_elem = LW'(fe);
  assign rf_data = gb_rdata;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      nstage <= '0;
    end else if (rvalid_q && ridx >= NF && ridx < NRD) begin
      nstage[fk][fl*LANES+fe] <= gb_rdata;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      psum_init <= '0;
    end else if (state == S_IDLE && start) begin
      psum_init <= '0;
    end else if (rvalid_q && ridx >= NRD) begin
      psum_init[fk][fl] <= ps_rdata;
    end
  end

  assign fire       = (state == S_FIRE);
  assign frame_last = fire && (slot == SLOT_W'(FRAME - 1));
  assign cyc_first  = (cyc == '0);
  assign cyc_last   = (cyc == CYC_W'(NCYC - 1));
  assign busy       = (state != S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= S_IDLE;
      cnt      <= '0;
      rvalid_q <= 1'b0;
      raddr_q  <= '0;
      accum_q  <= 1'b0;
      slot     <= '0;
      cyc      <= '0;
      done     <= 1'b0;
    end else begin
      rvalid_q <= gb_re || ps_re;
      raddr_q  <= cnt;
      done     <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          state   <= S_LOAD;
          cnt     <= '0;
          accum_q <= accum;
        end
        S_LOAD: begin
          if (cnt == (accum_q ? CW'(NRD + NPS - 1) : CW'(NRD - 1))) state <= S_TAIL;
          else cnt <= cnt + 1'b1;
        end
        S_TAIL: begin
          state <= S_FIRE;
          slot  <= '0;
          cyc   <= '0;
        end
        S_FIRE: begin
          if (frame_last) begin
            slot <= '0;
            if (cyc_last) state <= S_DRAIN;
            else cyc <= cyc + 1'b1;
          end else begin
            slot <= slot + 1'b1;
          end
        end
        S_DRAIN: if (be_done) begin
          state <= S_IDLE;
          done  <= 1'b1;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // the address map must fit the buffer
  initial assert (NRD <= (1 << IAW)) else $error("front_end: buffer too small");
endmodule

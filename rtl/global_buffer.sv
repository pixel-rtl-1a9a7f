// global_buffer: the accelerator's on-chip buffer.
//
// Two arrays: the input array holds filter weights and image (input neuron)
// words of BITS bits; the partial-sum array holds one result word per OMAC.
// The input array is written from outside (after filter/image decomposition)
// and read by the front end; the partial-sum array is written by the back end
// and read both from outside and by the front end, which feeds stored partial
// sums back into the OMACs when an output neuron is computed over several
// operations. Every port handles one word per clock; reads are
// synchronous (data one clock after the address). Contents are not reset.
// The document names the buffer and its traffic only; sizes and ports are
// this design's choice.
module global_buffer #(
  parameter int unsigned BITS     = 4,
  parameter int unsigned IN_DEPTH = 128,
  parameter int unsigned PS_W     = 20,
  parameter int unsigned PS_DEPTH = 16,
  parameter int unsigned FE_W     = PS_W,  // low bits of a word returned to the front end
  parameter int unsigned IAW      = $clog2(IN_DEPTH),
  parameter int unsigned PAW      = $clog2(PS_DEPTH)
) (
  input  logic            clk,
  // input array: external write, front-end read
  input  logic            in_we,
  input  logic [IAW-1:0]  in_waddr,
  input  logic [BITS-1:0] in_wdata,
  input  logic            in_re,
  input  logic [IAW-1:0]  in_raddr,
  output logic [BITS-1:0] in_rdata,
  // partial-sum array: back-end write, external read
  input  logic            ps_we,
  input  logic [PAW-1:0]  ps_waddr,
  input  logic [PS_W-1:0] ps_wdata,
  input  logic [PAW-1:0]  ps_raddr,
  output logic [PS_W-1:0] ps_rdata,
  // partial-sum array: front-end read
  input  logic            fe_ps_re,
  input  logic [PAW-1:0]  fe_ps_raddr,
  output logic [FE_W-1:0] fe_ps_rdata
);
  logic [BITS-1:0] in_mem [IN_DEPTH];
  logic [PS_W-1:0] ps_mem [PS_DEPTH];

  always_ff @(posedge clk) begin
    if (in_we) in_mem[in_waddr] <= in_wdata;
    if (in_re) in_rdata <= in_mem[in_raddr];
  end

  always_ff @(posedge clk) begin
    if (ps_we) ps_mem[ps_waddr] <= ps_wdata;
    ps_rdata <= ps_mem[ps_raddr];
    if (fe_ps_re) fe_ps_rdata <= ps_mem[fe_ps_raddr][FE_W-1:0];
  end
endmodule

// electrical_processor: the electrical processing unit (EP) behind the
// optical AND of an OMAC.
//
// Each time 'in_valid' is high it receives NW words from the o/e converters,
// adds them with a chain of carry-lookahead adders, shifts the sum left by
// 'shift' (the bit position of the synapse bit that produced the words) and
// adds the result to a running sum with another CLA. 'first' starts a new
// running sum from 'acc_init' (zero, or a partial sum carried over from an
// earlier operation on the same output neuron); 'last' ends it: the final sum is registered as the partial sum
// 'psum' together with its hyperbolic tangent 'act' (the output neuron lane),
// and 'out_valid' pulses for one clock, one clock after the last input.
// The hybrid OMAC uses it with shift = synapse bit index; the all-optical
// OMAC, whose products are already shifted optically, uses it with shift = 0
// to add the per-wavelength products. The activation reads the running sum as
// a fixed-point number with ACT_IN_FRAC fraction bits (this design's choice:
// neuron and synapse words read as fractions of one).
// The carry outputs of the CLAs are left open on purpose: ACC_W is sized so
// that a sum never carries out of it.
module electrical_processor #(
  parameter int unsigned NW          = 16,  // words added per input
  parameter int unsigned IN_W        = 4,   // width of each word
  parameter int unsigned ACC_W       = 12,  // running sum width
  parameter int unsigned SH_W        = 2,   // width of the shift amount
  parameter int unsigned ACT_IN_FRAC = 8,
  parameter int unsigned ACT_W       = 8,
  parameter int unsigned ACT_FRAC    = 6
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  input  logic [NW-1:0][IN_W-1:0] words,
  input  logic [SH_W-1:0]         shift,
  input  logic                    first,
  input  logic                    last,
  input  logic [ACC_W-1:0]        acc_init,
  output logic [ACC_W-1:0]        psum,
  output logic signed [ACT_W-1:0] act,
  output logic                    out_valid
);
  // adder chain over the incoming words
  logic [ACC_W-1:0] part [NW];
  assign part[0] = ACC_W'(words[0]);
  for (genvar w = 1; w < NW; w++) begin : g_sum
    cla_adder #(.N(ACC_W)) u_add (
      .a(part[w-1]), .b(ACC_W'(words[w])), .cin(1'b0), .sum(part[w]), .cout()
    );
  end

  logic [ACC_W-1:0] shifted, acc, acc_base, acc_next;
  assign shifted  = part[NW-1] << shift;
  assign acc_base = first ? acc_init : acc;

  cla_adder #(.N(ACC_W)) u_acc (
    .a(acc_base), .b(shifted), .cin(1'b0), .sum(acc_next), .cout()
  );

  logic signed [ACT_W-1:0] act_next;
  tanh_act #(.IN_W(ACC_W + 1), .IN_FRAC(ACT_IN_FRAC), .OUT_W(ACT_W), .OUT_FRAC(ACT_FRAC))
    u_tanh (.x({1'b0, acc_next}), .y(act_next));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc       <= '0;
      psum      <= '0;
      act       <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= in_valid && last;
      if (in_valid) acc <= acc_next;
      if (in_valid && last) begin
        psum <= acc_next;
        act  <= act_next;
      end
    end
  end
endmodule

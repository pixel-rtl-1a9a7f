// back_end: back-end processing: recovers the results of all OMACs and
// writes them to the partial-sum array of the global buffer.
//
// Each OMAC (row r, column k) raises out_valid[r][k] for one clock with its
// partial sum and tanh output; the back end holds each result until every
// OMAC has delivered, then writes them one per clock to address r*COLS+k as
// {act, psum}, and pulses 'done' one clock after the last write.
// The write order and word layout are this design's choices.
module back_end #(
  parameter int unsigned ROWS  = 4,
  parameter int unsigned COLS  = 4,
  parameter int unsigned ACC_W = 12,
  parameter int unsigned ACT_W = 8,
  parameter int unsigned PAW   = $clog2(ROWS * COLS)
) (
  input  logic                                clk,
  input  logic                                rst_n,
  input  logic [ROWS-1:0][COLS-1:0]           out_valid,
  input  logic [ROWS-1:0][COLS-1:0][ACC_W-1:0] psum,
  input  logic [ROWS-1:0][COLS-1:0][ACT_W-1:0] act,
  output logic                                ps_we,
  output logic [PAW-1:0]                      ps_waddr,
  output logic [ACT_W+ACC_W-1:0]              ps_wdata,
  output logic                                done
);
  localparam int unsigned N = ROWS * COLS;

  logic [N-1:0]                   pending;
  logic [N-1:0][ACT_W+ACC_W-1:0]  hold;
  logic                           writing;
  logic [PAW:0]                   wcnt;

  assign ps_we    = writing;
  assign ps_waddr = PAW'(wcnt);
  assign ps_wdata = hold[wcnt[PAW-1:0]];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pending <= '0;
      hold    <= '0;
      writing <= 1'b0;
      wcnt    <= '0;
      done    <= 1'b0;
    end else begin
      done <= 1'b0;
      for (int r = 0; r < ROWS; r++)
        for (int k = 0; k < COLS; k++)
          if (out_valid[r][k]) begin
            pending[r*COLS+k] <= 1'b1;
            hold[r*COLS+k]    <= {act[r][k], psum[r][k]};
          end
      if (!writing && &pending) begin
        writing <= 1'b1;
        wcnt    <= '0;
      end else if (writing) begin
        if (wcnt == (PAW+1)'(N - 1)) begin
          writing <= 1'b0;
          pending <= '0;
          done    <= 1'b1;
        end
        wcnt <= wcnt + 1'b1;
      end
    end
  end
endmodule

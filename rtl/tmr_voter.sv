// tmr_voter: bitwise two-out-of-three majority voter.
// Each output bit is the value held by at least two of the three inputs, so
// a single wrong copy is outvoted. Purely combinational: y follows a, b, c
// in the same cycle. W sets the number of independent bits voted in
// parallel. The gate-level form (AND pairs into an OR) is the classic TMR
// voter; the vector width is this design's choice.
module tmr_voter #(
  parameter int unsigned W = 1
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic [W-1:0] c,
  output logic [W-1:0] y
);

  always_comb begin
    for (int i = 0; i < W; i++) begin
      y[i] = seu_pkg::maj3(a[i], b[i], c[i]);
    end
  end

endmodule

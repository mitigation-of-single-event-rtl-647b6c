// set_filter: AND-OR filter that merges the two copies of a DMR pair.
// When the held output is 0 the filter passes a AND b, when it is 1 it
// passes a OR b. The output therefore only changes when both copies agree
// on the new value; if one copy is upset the previous output is kept. The
// multiplexer of the original circuit is written as the equivalent AND/OR
// form, y = a&b | q&(a|b), i.e. the majority of a, b and q.
// The held value q is a flip-flop loaded with y on every clock edge (the
// original feeds the output back asynchronously; a register keeps this
// synchronous and free of combinational loops). y is combinational from
// a, b and q. upset[i] flips the stored q bit at a clock edge, for fault
// injection. Synchronous active-low reset clears q.
module set_filter #(
  parameter int unsigned W = 1
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic [W-1:0] upset,
  output logic [W-1:0] y
);

  logic [W-1:0] q;

  always_comb begin
    for (int i = 0; i < W; i++) begin
      y[i] = seu_pkg::maj3(a[i], b[i], q[i]);
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) q <= '0;
    else        q <= y ^ upset;
  end

endmodule

// dmr_filter_shift_register: implementation two of the SEU test structure,
// the DMR and SET-filter combination.
// Every stage holds two copies (a and b) of its bit. A set_filter merges
// the copies of each stage; the filtered bit feeds both copies of the next
// stage and the last filtered bit is dout. If one copy is upset the filter
// keeps its previous output instead of passing the disagreement, so an
// upset is masked whenever the stage's new bit equals the one before it,
// and otherwise the stage repeats its previous bit once. Each stage uses
// three flip-flops (a, b, filter state), matching the roughly threefold
// flip-flop count of this implementation against the unmitigated one.
// Latency: din reaches dout after DEPTH clock edges (the filter is
// combinational after the copies). upset is {filter state, b, a}, DEPTH
// bits each; a high bit inverts that flip-flop at a clock edge.
// Synchronous active-low reset clears all three.
module dmr_filter_shift_register #(
  parameter int unsigned DEPTH = seu_pkg::DEPTH_DEFAULT
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  din,
  input  logic [2:0][DEPTH-1:0] upset,
  output logic                  dout
);

  logic [DEPTH-1:0] a, b, f;
  logic [DEPTH-1:0] next;

  if (DEPTH == 1) begin : g_one
    assign next = din;
  end else begin : g_many
    assign next = {f[DEPTH-2:0], din};
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      a <= '0;
      b <= '0;
    end else begin
      a <= next ^ upset[0];
      b <= next ^ upset[1];
    end
  end

  set_filter #(.W(DEPTH)) u_filter (
    .clk   (clk),
    .rst_n (rst_n),
    .a     (a),
    .b     (b),
    .upset (upset[2]),
    .y     (f)
  );

  assign dout = f[DEPTH-1];

endmodule

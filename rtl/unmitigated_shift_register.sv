// unmitigated_shift_register: implementation one of the SEU test structure,
// a serial string of DEPTH D flip-flops with no mitigation.
// din enters stage 0 and appears at dout DEPTH clock edges later. Any upset
// in any stage travels unchanged to dout. The long back-to-back string is
// the test structure that avoids logic masking; the depth default (301) and
// the upset input are this design's choices. upset[i] high at a clock edge
// inverts the value stored in stage i (fault injection). Synchronous
// active-low reset clears the string.
module unmitigated_shift_register #(
  parameter int unsigned DEPTH = seu_pkg::DEPTH_DEFAULT
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             din,
  input  logic [DEPTH-1:0] upset,
  output logic             dout
);

  logic [DEPTH-1:0] sr;
  logic [DEPTH-1:0] sr_next;

  if (DEPTH == 1) begin : g_one
    assign sr_next = din;
  end else begin : g_many
    assign sr_next = {sr[DEPTH-2:0], din};
  end

  always_ff @(posedge clk) begin
    if (!rst_n) sr <= '0;
    else        sr <= sr_next ^ upset;
  end

  assign dout = sr[DEPTH-1];

endmodule

// xor_comparator: the monitor circuit's error detector.
// The outputs of two identical replicas of one implementation are compared
// with an XOR gate: equal outputs give 0, different outputs give 1 (an upset
// reached one replica's output). The XOR result is latched in a flip-flop,
// so mismatch is valid one clock edge after the compared outputs. The XOR
// comparison follows the monitor described for the test; registering its
// output and the synchronous active-low reset are this design's choices.
module xor_comparator (
  input  logic clk,
  input  logic rst_n,
  input  logic a,
  input  logic b,
  output logic mismatch
);

  always_ff @(posedge clk) begin
    if (!rst_n) mismatch <= 1'b0;
    else        mismatch <= a ^ b;
  end

endmodule

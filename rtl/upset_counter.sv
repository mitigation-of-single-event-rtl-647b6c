// upset_counter: counts detected upsets for one implementation.
// Each rising edge of the latched comparator flag adds one to count, so an
// upset that shows as a mismatch of several consecutive cycles is counted
// once. clear sets the count to zero (it wins over a simultaneous edge).
// The count saturates at its maximum instead of wrapping. count is updated
// one clock edge after the flag rises. Counting and clearing follow the
// logging described for the test, where it ran as host software; the
// edge counting, saturation and width are this design's choices.
module upset_counter #(
  parameter int unsigned COUNT_W = seu_pkg::COUNT_W_DEFAULT
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               flag,
  input  logic               clear,
  output logic [COUNT_W-1:0] count
);

  logic flag_q;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      flag_q <= 1'b0;
      count  <= '0;
    end else begin
      flag_q <= flag;
      if (clear)
        count <= '0;
      else if (flag && !flag_q && count != '1)
        count <= count + 1'b1;
    end
  end

  // The count only holds, steps up by one, or returns to zero on clear.
  a_count_step : assert property (
    @(posedge clk) disable iff (!rst_n)
      $past(rst_n) |-> (count == $past(count)) || (count == $past(count) + 1'b1) ||
                       ($past(clear) && count == '0)
  ) else $error("upset counter moved by more than one");

endmodule

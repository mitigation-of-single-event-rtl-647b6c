// tb_upset_counter: feeds flag pulses of random length, clears and a run to
// saturation into the counter and checks the count against the number of
// rising edges counted here.
module tb_upset_counter;
  localparam int unsigned COUNT_W = 4;
  logic clk = 0, rst_n = 0, flag = 0, clear = 0;
  logic [COUNT_W-1:0] count;
  int checks = 0, failures = 0;
  int expected = 0;
  logic flag_prev = 0;

  upset_counter #(.COUNT_W(COUNT_W)) dut (.clk(clk), .rst_n(rst_n), .flag(flag), .clear(clear), .count(count));

  always #5 clk = ~clk;

  initial begin
    #500000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic step(input logic f, input logic c);
    flag = f; clear = c;
    @(posedge clk);
    if (c) expected = 0;
    else if (f && !flag_prev && expected < (1 << COUNT_W) - 1) expected++;
    flag_prev = f;
    @(negedge clk);
    checks++;
    if (int'(count) != expected) begin
      failures++;
      $display("FAIL count=%0d expected=%0d", count, expected);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    // pulses of 1..3 cycles separated by gaps
    for (int n = 0; n < 10; n++) begin
      repeat ($urandom_range(1, 3)) step(1'b1, 1'b0);
      repeat ($urandom_range(1, 2)) step(1'b0, 1'b0);
    end
    step(1'b0, 1'b1);
    checks++;
    if (count != '0) failures++;
    // run into saturation
    for (int n = 0; n < 25; n++) begin
      step(1'b1, 1'b0);
      step(1'b0, 1'b0);
    end
    checks++;
    if (count != '1) begin
      failures++;
      $display("FAIL no saturation, count=%0d", count);
    end
    // clear while a new edge arrives: clear wins
    step(1'b1, 1'b1);
    for (int n = 0; n < 200; n++) step(1'($urandom), ($urandom_range(0, 30) == 0));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_set_filter: drives random copy pairs and state upsets into the AND-OR
// filter and compares its output with a reference rule: when the two copies
// agree the output is their value, when they differ it is the previously
// held output. Also checks that a disagreement never changes the output.
module tb_set_filter;
  localparam int unsigned W = 4;
  logic clk = 0, rst_n = 0;
  logic [W-1:0] a, b, upset, y;
  logic [W-1:0] held;
  int checks = 0, failures = 0, holds = 0;

  set_filter #(.W(W)) dut (.clk(clk), .rst_n(rst_n), .a(a), .b(b), .upset(upset), .y(y));

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [W-1:0] exp_y;
    a = '0; b = '0; upset = '0; held = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int n = 0; n < 2000; n++) begin
      a = W'($urandom);
      // mostly agreeing copies, sometimes one copy disagrees
      b = ($urandom_range(0, 2) == 0) ? W'($urandom) : a;
      upset = ($urandom_range(0, 9) == 0) ? W'($urandom) : '0;
      #1;
      for (int i = 0; i < W; i++) exp_y[i] = (a[i] == b[i]) ? a[i] : held[i];
      checks++;
      if (y !== exp_y) begin
        failures++;
        $display("FAIL n=%0d a=%b b=%b held=%b y=%b", n, a, b, held, y);
      end
      if ((a ^ b) != '0) holds++;
      @(posedge clk);
      held = exp_y ^ upset;
      @(negedge clk);
    end
    checks++;
    if (holds == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

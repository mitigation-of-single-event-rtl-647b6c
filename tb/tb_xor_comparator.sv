// tb_xor_comparator: applies all input pairs to the monitor comparator and
// checks that mismatch equals the XOR truth table one clock edge later.
module tb_xor_comparator;
  logic clk = 0, rst_n = 0, a = 0, b = 0, mismatch;
  int checks = 0, failures = 0;

  xor_comparator dut (.clk(clk), .rst_n(rst_n), .a(a), .b(b), .mismatch(mismatch));

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic exp_m;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    checks++;
    if (mismatch !== 1'b0) failures++;
    for (int n = 0; n < 200; n++) begin
      a = n[0] ^ n[3]; b = n[1] ^ n[4];
      if (n > 40) begin a = 1'($urandom); b = 1'($urandom); end
      exp_m = (a != b);
      @(posedge clk);
      @(negedge clk);
      checks++;
      if (mismatch !== exp_m) begin
        failures++;
        $display("FAIL a=%b b=%b mismatch=%b", a, b, mismatch);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_unmitigated_shift_register: shifts random data with random upsets
// through the plain string and compares every output bit with a bit-level
// model of the string; also checks that a single 1 appears at the output
// exactly DEPTH clock edges after it entered and that an injected upset
// always reaches the output.
module tb_unmitigated_shift_register;
  localparam int unsigned DEPTH = 12;
  logic clk = 0, rst_n = 0, din = 0, dout;
  logic [DEPTH-1:0] upset = '0;
  logic [DEPTH-1:0] model = '0;
  int checks = 0, failures = 0;

  unmitigated_shift_register #(.DEPTH(DEPTH)) dut (.clk(clk), .rst_n(rst_n), .din(din), .upset(upset), .dout(dout));

  always #5 clk = ~clk;

  initial begin
    #500000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic step();
    @(posedge clk);
    model = {model[DEPTH-2:0], din} ^ upset;
    @(negedge clk);
    checks++;
    if (dout !== model[DEPTH-1]) begin
      failures++;
      $display("FAIL dout=%b model=%b", dout, model[DEPTH-1]);
    end
  endtask

  initial begin
    int lat;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    // latency: single one
    din = 1;
    @(posedge clk);
    @(negedge clk) din = 0;
    lat = 1;
    while (dout !== 1'b1 && lat < 4 * DEPTH) begin
      @(posedge clk);
      @(negedge clk);
      lat++;
    end
    checks++;
    if (lat != DEPTH) begin
      failures++;
      $display("FAIL latency %0d, expected %0d", lat, DEPTH);
    end
    repeat (DEPTH) @(negedge clk);
    model = '0;
    // an upset in stage 3 of an all-zero string reaches dout
    upset = DEPTH'(1) << 3;
    step();
    upset = '0;
    begin
      int seen = 0;
      repeat (DEPTH) begin
        step();
        if (dout) seen++;
      end
      checks++;
      if (seen != 1) begin
        failures++;
        $display("FAIL upset seen %0d times", seen);
      end
    end
    // random data and upsets
    for (int n = 0; n < 1000; n++) begin
      din = 1'($urandom);
      upset = ($urandom_range(0, 7) == 0) ? (DEPTH'(1) << $urandom_range(0, DEPTH - 1)) : '0;
      step();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

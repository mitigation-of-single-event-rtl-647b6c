// tb_tmr_shift_register: checks the fully triplicated string. With at most
// one upset per clock edge the output must equal the input delayed by DEPTH
// edges (checked against a plain delay line); with two copies of the same
// stage upset together the output must follow a bit-level model of the
// three voted copies, which shows the wrong bit. Also checks latency and
// that one copy of the reset alone is outvoted by the other two.
module tb_tmr_shift_register;
  localparam int unsigned DEPTH = 10;
  logic clk = 0;
  logic [2:0] rst_n = '0;
  logic din = 0, dout;
  logic [2:0][DEPTH-1:0] upset = '0;
  logic [2:0][DEPTH-1:0] m = '0;
  logic [DEPTH-1:0] ideal = '0;
  int checks = 0, failures = 0;

  tmr_shift_register #(.DEPTH(DEPTH)) dut (
    .clk({3{clk}}), .rst_n(rst_n), .din({3{din}}), .upset(upset), .dout(dout));

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [DEPTH-1:0] vote(logic [2:0][DEPTH-1:0] s);
    return (s[0] & s[1]) | (s[0] & s[2]) | (s[1] & s[2]);
  endfunction

  task automatic step(input bit check_ideal);
    logic [DEPTH-1:0] v;
    v = vote(m);
    @(posedge clk);
    for (int k = 0; k < 3; k++) m[k] = {v[DEPTH-2:0], din} ^ upset[k];
    ideal = {ideal[DEPTH-2:0], din};
    @(negedge clk);
    v = vote(m);
    checks++;
    if (dout !== v[DEPTH-1]) begin
      failures++;
      $display("FAIL dout=%b model=%b", dout, v[DEPTH-1]);
    end
    if (check_ideal) begin
      checks++;
      if (dout !== ideal[DEPTH-1]) begin
        failures++;
        $display("FAIL single upset reached the output");
      end
    end
  endtask

  initial begin
    int lat, wrong;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = '1;
    din = 1;
    step(1);
    din = 0;
    lat = 1;
    while (dout !== 1'b1 && lat < 4 * DEPTH) begin
      step(1);
      lat++;
    end
    checks++;
    if (lat != DEPTH) begin
      failures++;
      $display("FAIL latency %0d, expected %0d", lat, DEPTH);
    end
    // single upsets with random data: never visible at dout
    for (int n = 0; n < 2000; n++) begin
      din = 1'($urandom);
      upset = '0;
      if ($urandom_range(0, 1) == 0)
        upset[$urandom_range(0, 2)] = DEPTH'(1) << $urandom_range(0, DEPTH - 1);
      step(1);
    end
    upset = '0;
    repeat (DEPTH) step(1);
    // two copies of stage 2 hit together in a zero stream: the error passes
    din = 0;
    repeat (DEPTH) step(1);
    upset[0] = DEPTH'(1) << 2;
    upset[1] = DEPTH'(1) << 2;
    step(0);
    upset = '0;
    wrong = 0;
    repeat (DEPTH) begin
      step(0);
      if (dout) wrong++;
    end
    checks++;
    if (wrong != 1) begin failures++; $display("FAIL double upset seen %0d times", wrong); end
    // one reset copy asserted alone is outvoted: the string keeps running
    ideal = '0;
    din = 1;
    repeat (DEPTH) step(0);
    rst_n = 3'b110;
    @(posedge clk);
    begin
      logic [DEPTH-1:0] v;
      v = vote(m);
      for (int k = 1; k < 3; k++) m[k] = {v[DEPTH-2:0], din};
      m[0] = '0;
    end
    @(negedge clk);
    rst_n = '1;
    checks++;
    if (dout !== 1'b1) begin failures++; $display("FAIL lone reset copy disturbed dout"); end
    repeat (DEPTH) step(0);
    checks++;
    if (m[0] != m[1]) begin failures++; $display("FAIL copy 0 not rewritten after reset"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

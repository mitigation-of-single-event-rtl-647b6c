// tb_dmr_filter_shift_register: checks the DMR + SET-filter string.
// A bit-level model keeps both copies and the held filter output of every
// stage: a stage outputs its copies' value when they agree and its previous
// output otherwise. Random data with random upsets is compared with the
// model cycle by cycle. Directed cases check the DEPTH-cycle latency, that
// one upset is masked in a constant bit stream and in the filter state, and
// that an upset at a data transition makes the stage repeat its previous bit.
module tb_dmr_filter_shift_register;
  localparam int unsigned DEPTH = 10;
  logic clk = 0, rst_n = 0, din = 0, dout;
  logic [2:0][DEPTH-1:0] upset = '0;
  logic [DEPTH-1:0] ma = '0, mb = '0, mh = '0, mf;
  int checks = 0, failures = 0;

  dmr_filter_shift_register #(.DEPTH(DEPTH)) dut (.clk(clk), .rst_n(rst_n), .din(din), .upset(upset), .dout(dout));

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [DEPTH-1:0] filt(logic [DEPTH-1:0] x, logic [DEPTH-1:0] y, logic [DEPTH-1:0] h);
    logic [DEPTH-1:0] r;
    for (int i = 0; i < DEPTH; i++) r[i] = (x[i] == y[i]) ? x[i] : h[i];
    return r;
  endfunction

  // advance model and design one clock edge, then compare
  task automatic step();
    logic [DEPTH-1:0] nxt;
    mf = filt(ma, mb, mh);
    nxt = {mf[DEPTH-2:0], din};
    @(posedge clk);
    ma = nxt ^ upset[0];
    mb = nxt ^ upset[1];
    mh = mf ^ upset[2];
    @(negedge clk);
    mf = filt(ma, mb, mh);
    checks++;
    if (dout !== mf[DEPTH-1]) begin
      failures++;
      $display("FAIL dout=%b model=%b", dout, mf[DEPTH-1]);
    end
  endtask

  // count ones at the output over the next n cycles
  task automatic count_ones(input int n, output int ones);
    ones = 0;
    repeat (n) begin
      step();
      if (dout) ones++;
    end
  endtask

  initial begin
    int lat, ones;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    // latency of a single one
    din = 1;
    step();
    din = 0;
    lat = 1;
    while (dout !== 1'b1 && lat < 4 * DEPTH) begin
      step();
      lat++;
    end
    checks++;
    if (lat != DEPTH) begin
      failures++;
      $display("FAIL latency %0d, expected %0d", lat, DEPTH);
    end
    repeat (2 * DEPTH) step();
    // constant zero stream: upset of copy a in stage 4 is masked
    upset[0] = DEPTH'(1) << 4;
    step();
    upset = '0;
    count_ones(2 * DEPTH, ones);
    checks++;
    if (ones != 0) begin failures++; $display("FAIL copy-a upset not masked"); end
    // upset of the filter state is masked too
    upset[2] = DEPTH'(1) << 6;
    step();
    upset = '0;
    count_ones(2 * DEPTH, ones);
    checks++;
    if (ones != 0) begin failures++; $display("FAIL state upset not masked"); end
    // at a transition (a one enters stage 0 while copy b of stage 0 is hit)
    // the stage keeps its previous zero, so the one is lost
    din = 1;
    upset[1] = DEPTH'(1);
    step();
    upset = '0;
    din = 0;
    count_ones(2 * DEPTH, ones);
    checks++;
    if (ones != 0) begin failures++; $display("FAIL transition upset was masked"); end
    // random data and upsets against the model
    for (int n = 0; n < 3000; n++) begin
      din = ($urandom_range(0, 3) == 0) ? ~din : din;
      upset = '0;
      if ($urandom_range(0, 5) == 0)
        upset[$urandom_range(0, 2)] = DEPTH'(1) << $urandom_range(0, DEPTH - 1);
      step();
    end
    upset = '0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

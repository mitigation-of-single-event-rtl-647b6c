// tb_seu_test_system: end-to-end test of the whole upset test setup at its
// default size (two replicas of three 301-stage strings, 32-bit counters).
// It runs the strings with random data and no upsets (all counts must stay
// zero), then injects single upsets one at a time and checks how each
// implementation's counter moves:
//   unmitigated - every upset is counted, DEPTH-k+1 clock edges after
//                 the edge that upset stage k;
//   DMR filter  - an upset of one copy is masked in a constant stream and
//                 counted at a data transition; a filter-state upset is
//                 masked;
//   TMR         - a single upset is never counted; two copies of one stage
//                 hit together are counted.
// It also checks that clear zeroes the counters. Each mechanism is counted
// and one that never happened is a failure.
module tb_seu_test_system;
  import seu_pkg::*;
  localparam int unsigned DEPTH = DEPTH_DEFAULT;
  localparam int unsigned REPLICAS = REPLICAS_DEFAULT;
  localparam int unsigned COUNT_W = COUNT_W_DEFAULT;

  logic clk = 0, rst_n = 0, din = 0, clear = 0;
  logic [REPLICAS-1:0][DEPTH-1:0]      upset_unmit = '0;
  logic [REPLICAS-1:0][2:0][DEPTH-1:0] upset_dmr = '0, upset_tmr = '0;
  logic [2:0][REPLICAS-1:0] dout;
  logic [2:0] mismatch;
  logic [2:0][COUNT_W-1:0] upset_count;

  int checks = 0, failures = 0;
  int exp_count [3] = '{0, 0, 0};
  int n_unmit_counted = 0, n_dmr_masked = 0, n_dmr_state_masked = 0;
  int n_dmr_counted = 0, n_tmr_masked = 0, n_tmr_double = 0, n_clear = 0;
  int n_latency_ok = 0;
  bit alternate = 0;

  seu_test_system dut (
    .clk(clk), .rst_n(rst_n), .tmr_clk({3{clk}}), .tmr_rst_n({3{rst_n}}),
    .din(din), .clear(clear),
    .upset_unmit(upset_unmit), .upset_dmr(upset_dmr), .upset_tmr(upset_tmr),
    .dout(dout), .mismatch(mismatch), .upset_count(upset_count));

  always #5 clk = ~clk;

  initial begin
    #20000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // one clock edge; data is constant zero or alternating
  task automatic step();
    @(posedge clk);
    @(negedge clk);
    din = alternate ? ~din : 1'b0;
  endtask

  task automatic settle();
    repeat (DEPTH + 4) step();
  endtask

  task automatic check_counts(input string what);
    for (int m = 0; m < 3; m++) begin
      checks++;
      if (int'(upset_count[m]) != exp_count[m]) begin
        failures++;
        $display("FAIL %s: impl %0d count=%0d expected=%0d", what, m, upset_count[m], exp_count[m]);
      end
    end
  endtask

  task automatic do_clear();
    clear = 1;
    step();
    clear = 0;
    exp_count = '{0, 0, 0};
    check_counts("clear");
    n_clear++;
  endtask

  // inject for one edge, then let the error run out of the strings
  task automatic inject_and_settle();
    step();
    upset_unmit = '0;
    upset_dmr = '0;
    upset_tmr = '0;
    settle();
  endtask

  initial begin
    int k, r, c, lat;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;

    // random traffic, no upsets
    for (int n = 0; n < 3 * DEPTH; n++) begin
      din = 1'($urandom);
      @(posedge clk);
      @(negedge clk);
      checks++;
      if (mismatch != '0) begin failures++; $display("FAIL mismatch without upset"); end
    end
    din = 0;
    settle();
    check_counts("no upsets");

    // unmitigated string: latency of the count from stage k
    for (int t = 0; t < 6; t++) begin
      alternate = t[0];
      k = $urandom_range(0, DEPTH - 1);
      r = $urandom_range(0, REPLICAS - 1);
      upset_unmit[r] = DEPTH'(1) << k;
      step();
      upset_unmit = '0;
      lat = 1;
      while (int'(upset_count[IMPL_UNMITIGATED]) == exp_count[IMPL_UNMITIGATED] && lat < 2 * DEPTH) begin
        step();
        lat++;
      end
      exp_count[IMPL_UNMITIGATED]++;
      n_unmit_counted++;
      checks++;
      // lat counts the injecting edge as edge 1
      if (lat != DEPTH - k + 2) begin
        failures++;
        $display("FAIL unmitigated latency from stage %0d: %0d, expected %0d", k, lat, DEPTH - k + 2);
      end else n_latency_ok++;
      settle();
      check_counts("unmitigated upset");
    end

    // DMR filter: constant stream, one copy hit -> masked
    alternate = 0; din = 0; settle();
    for (int t = 0; t < 6; t++) begin
      upset_dmr[$urandom_range(0, REPLICAS - 1)][$urandom_range(0, 1)] = DEPTH'(1) << $urandom_range(0, DEPTH - 1);
      inject_and_settle();
      n_dmr_masked++;
      check_counts("dmr masked");
    end
    // DMR filter: state upset -> masked, in either data pattern
    for (int t = 0; t < 6; t++) begin
      alternate = t[0];
      upset_dmr[$urandom_range(0, REPLICAS - 1)][2] = DEPTH'(1) << $urandom_range(0, DEPTH - 1);
      inject_and_settle();
      n_dmr_state_masked++;
      check_counts("dmr state masked");
    end
    // DMR filter: alternating stream, one copy hit -> counted
    alternate = 1; settle();
    for (int t = 0; t < 6; t++) begin
      upset_dmr[$urandom_range(0, REPLICAS - 1)][$urandom_range(0, 1)] = DEPTH'(1) << $urandom_range(0, DEPTH - 1);
      inject_and_settle();
      exp_count[IMPL_DMR_FILTER]++;
      n_dmr_counted++;
      check_counts("dmr transition");
    end

    do_clear();

    // TMR: single upsets in both patterns -> never counted
    for (int t = 0; t < 8; t++) begin
      alternate = t[0];
      upset_tmr[$urandom_range(0, REPLICAS - 1)][$urandom_range(0, 2)] = DEPTH'(1) << $urandom_range(0, DEPTH - 1);
      inject_and_settle();
      n_tmr_masked++;
      check_counts("tmr single");
    end
    // TMR: two copies of one stage hit together -> counted
    for (int t = 0; t < 4; t++) begin
      alternate = t[0];
      k = $urandom_range(0, DEPTH - 1);
      r = $urandom_range(0, REPLICAS - 1);
      c = $urandom_range(0, 2);
      upset_tmr[r][c] = DEPTH'(1) << k;
      upset_tmr[r][(c + 1) % 3] = DEPTH'(1) << k;
      inject_and_settle();
      exp_count[IMPL_TMR]++;
      n_tmr_double++;
      check_counts("tmr double");
    end

    // the same upset in both replicas at once is invisible to the comparator
    alternate = 0; din = 0; settle();
    upset_unmit[0] = DEPTH'(1) << 7;
    upset_unmit[1] = DEPTH'(1) << 7;
    inject_and_settle();
    check_counts("common-mode upset");

    do_clear();

    $display("mechanisms: unmit_counted=%0d latency_ok=%0d dmr_masked=%0d dmr_state_masked=%0d dmr_counted=%0d tmr_masked=%0d tmr_double=%0d clear=%0d",
             n_unmit_counted, n_latency_ok, n_dmr_masked, n_dmr_state_masked, n_dmr_counted,
             n_tmr_masked, n_tmr_double, n_clear);
    if (n_unmit_counted == 0) failures++;
    if (n_latency_ok == 0) failures++;
    if (n_dmr_masked == 0) failures++;
    if (n_dmr_state_masked == 0) failures++;
    if (n_dmr_counted == 0) failures++;
    if (n_tmr_masked == 0) failures++;
    if (n_tmr_double == 0) failures++;
    if (n_clear == 0) failures++;
    checks += 8;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

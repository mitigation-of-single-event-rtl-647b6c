// tb_seu_beam_runs: replays the upset counts recorded in six proton beam
// runs through the full-size test setup by fault injection. For each run
// the counts seen for the unmitigated, DMR-filter and TMR implementations
// are produced as that many visible upsets (any flip-flop of the
// unmitigated string; one copy of a DMR stage at a data transition; two
// copies of one TMR stage), mixed with masked upsets (DMR filter state,
// single TMR copies) so that every implementation takes as many hits as the
// unmitigated one. Upsets land at random stages and replicas while the data
// alternates; injection times are spread so that no two errors reach the
// comparator in adjacent cycles. After each run the three counters must
// hold exactly the recorded counts, then they are cleared.
// Runs (unmitigated / DMR filter / TMR upsets):
//   56.9 MeV 5 nA 180 s: 50/27/25      56.9 MeV 10 nA 180 s: 103/46/28
//   45.9 MeV 10 nA 180 s: 98/50/39     32.0 MeV 10 nA 180 s: 90/31/28
//   7.8 MeV 10 nA 180 s: 85/21/20      56.9 MeV 20 nA 600 s: 176/124/78
module tb_seu_beam_runs;
  import seu_pkg::*;
  localparam int unsigned DEPTH = DEPTH_DEFAULT;
  localparam int unsigned REPLICAS = REPLICAS_DEFAULT;
  localparam int unsigned COUNT_W = COUNT_W_DEFAULT;
  localparam int NRUNS = 6;
  localparam int SLOTS = 8192;

  logic clk = 0, rst_n = 0, din = 0, clear = 0;
  logic [REPLICAS-1:0][DEPTH-1:0]      upset_unmit = '0;
  logic [REPLICAS-1:0][2:0][DEPTH-1:0] upset_dmr = '0, upset_tmr = '0;
  logic [2:0][REPLICAS-1:0] dout;
  logic [2:0] mismatch;
  logic [2:0][COUNT_W-1:0] upset_count;

  int checks = 0, failures = 0;
  int unsigned cyc = 0;
  bit busy [3][SLOTS];

  // recorded counts per run: unmitigated, DMR filter, TMR
  int recorded [NRUNS][3] = '{
    '{50, 27, 25}, '{103, 46, 28}, '{98, 50, 39},
    '{90, 31, 28}, '{85, 21, 20}, '{176, 124, 78}};

  seu_test_system dut (
    .clk(clk), .rst_n(rst_n), .tmr_clk({3{clk}}), .tmr_rst_n({3{rst_n}}),
    .din(din), .clear(clear),
    .upset_unmit(upset_unmit), .upset_dmr(upset_dmr), .upset_tmr(upset_tmr),
    .dout(dout), .mismatch(mismatch), .upset_count(upset_count));

  always #5 clk = ~clk;

  initial begin
    #50000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic step();
    @(posedge clk);
    cyc++;
    @(negedge clk);
    din = ~din;
    upset_unmit = '0;
    upset_dmr = '0;
    upset_tmr = '0;
  endtask

  // pick a stage whose error would reach the output in a free slot
  function automatic int pick_stage(int m);
    for (int tries = 0; tries < 64; tries++) begin
      int k;
      int unsigned t;
      k = $urandom_range(0, DEPTH - 1);
      // the edge about to come is cycle cyc+1; the error shows DEPTH-1-k later
      t = (cyc + 1 + DEPTH - 1 - k) % SLOTS;
      if (!busy[m][t] && !busy[m][(t + 1) % SLOTS] && !busy[m][(t + SLOTS - 1) % SLOTS]) begin
        busy[m][t] = 1;
        return k;
      end
    end
    return -1;
  endfunction

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    repeat (DEPTH + 2) step();

    for (int run = 0; run < NRUNS; run++) begin
      int vis [3];
      int masked [3];
      int total_hits;
      total_hits = recorded[run][0];
      for (int m = 0; m < 3; m++) begin
        vis[m] = recorded[run][m];
        masked[m] = total_hits - recorded[run][m];
      end
      foreach (busy[m, t]) busy[m][t] = 0;

      while (vis[0] + vis[1] + vis[2] + masked[1] + masked[2] > 0) begin
        int k, r, c;
        // unmitigated: every hit is visible
        if (vis[0] > 0 && $urandom_range(0, 1) == 0) begin
          k = pick_stage(0);
          if (k >= 0) begin
            upset_unmit[$urandom_range(0, REPLICAS - 1)] = DEPTH'(1) << k;
            vis[0]--;
          end
        end
        // DMR filter
        if ($urandom_range(0, 1) == 0) begin
          r = $urandom_range(0, REPLICAS - 1);
          if (vis[1] > 0 && ($urandom_range(0, 1) == 0 || masked[1] == 0)) begin
            k = pick_stage(1);
            if (k >= 0) begin
              upset_dmr[r][$urandom_range(0, 1)] = DEPTH'(1) << k;
              vis[1]--;
            end
          end else if (masked[1] > 0) begin
            upset_dmr[r][2] = DEPTH'(1) << $urandom_range(0, DEPTH - 1);
            masked[1]--;
          end
        end
        // TMR
        if ($urandom_range(0, 1) == 0) begin
          r = $urandom_range(0, REPLICAS - 1);
          c = $urandom_range(0, 2);
          if (vis[2] > 0 && ($urandom_range(0, 1) == 0 || masked[2] == 0)) begin
            k = pick_stage(2);
            if (k >= 0) begin
              upset_tmr[r][c] = DEPTH'(1) << k;
              upset_tmr[r][(c + 1) % 3] = DEPTH'(1) << k;
              vis[2]--;
            end
          end else if (masked[2] > 0) begin
            upset_tmr[r][c] = DEPTH'(1) << $urandom_range(0, DEPTH - 1);
            masked[2]--;
          end
        end
        step();
      end
      repeat (DEPTH + 4) step();

      for (int m = 0; m < 3; m++) begin
        checks++;
        if (int'(upset_count[m]) != recorded[run][m]) begin
          failures++;
          $display("FAIL run %0d impl %0d: count %0d, recorded %0d", run, m, upset_count[m], recorded[run][m]);
        end
      end
      $display("run %0d: unmitigated %0d, DMR filter %0d, TMR %0d upsets counted",
               run, upset_count[0], upset_count[1], upset_count[2]);
      clear = 1;
      step();
      clear = 0;
      checks++;
      if (upset_count != '0) begin failures++; $display("FAIL clear"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

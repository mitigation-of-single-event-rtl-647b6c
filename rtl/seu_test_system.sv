// seu_test_system: the complete single-event-upset test setup.
// The device under test (seu_test_structure) carries two replicas of each
// of three shift-register implementations: unmitigated, DMR with an AND-OR
// SET filter, and full TMR with triplicated clock and reset. For each
// implementation a monitor compares the two replicas' outputs with an XOR
// gate and latches the result; an upset counter counts each new mismatch,
// and clear zeroes all counts. Under irradiation (or fault injection
// through the upset inputs) the three counts show how many upsets each
// mitigation let through. Latency: an upset that lands in stage i at a
// clock edge reaches dout DEPTH-1-i edges later, mismatch one edge after
// that and upset_count one edge after that. The monitor and counters run on clk; the
// TMR strings on tmr_clk, which must be copies of clk. Index 0/1/2 of
// mismatch, dout and upset_count follow seu_pkg::impl_e (unmitigated, DMR
// filter, TMR).
module seu_test_system #(
  parameter int unsigned DEPTH    = seu_pkg::DEPTH_DEFAULT,
  parameter int unsigned REPLICAS = seu_pkg::REPLICAS_DEFAULT,
  parameter int unsigned COUNT_W  = seu_pkg::COUNT_W_DEFAULT
) (
  input  logic                                    clk,
  input  logic                                    rst_n,
  input  logic [2:0]                              tmr_clk,
  input  logic [2:0]                              tmr_rst_n,
  input  logic                                    din,
  input  logic                                    clear,
  input  logic [REPLICAS-1:0][DEPTH-1:0]          upset_unmit,
  input  logic [REPLICAS-1:0][2:0][DEPTH-1:0]     upset_dmr,
  input  logic [REPLICAS-1:0][2:0][DEPTH-1:0]     upset_tmr,
  output logic [2:0][REPLICAS-1:0]                dout,
  output logic [2:0]                              mismatch,
  output logic [2:0][COUNT_W-1:0]                 upset_count
);

  import seu_pkg::*;

  seu_test_structure #(.DEPTH(DEPTH), .REPLICAS(REPLICAS)) u_dut (
    .clk         (clk),
    .rst_n       (rst_n),
    .tmr_clk     (tmr_clk),
    .tmr_rst_n   (tmr_rst_n),
    .din         (din),
    .upset_unmit (upset_unmit),
    .upset_dmr   (upset_dmr),
    .upset_tmr   (upset_tmr),
    .dout_unmit  (dout[IMPL_UNMITIGATED]),
    .dout_dmr    (dout[IMPL_DMR_FILTER]),
    .dout_tmr    (dout[IMPL_TMR])
  );

  // The monitor compares replica 0 with replica 1 of each implementation.
  for (genvar m = 0; m < NUM_IMPL; m++) begin : g_mon
    xor_comparator u_cmp (
      .clk      (clk),
      .rst_n    (rst_n),
      .a        (dout[m][0]),
      .b        (dout[m][REPLICAS-1]),
      .mismatch (mismatch[m])
    );

    upset_counter #(.COUNT_W(COUNT_W)) u_cnt (
      .clk   (clk),
      .rst_n (rst_n),
      .flag  (mismatch[m]),
      .clear (clear),
      .count (upset_count[m])
    );
  end

  initial begin
    assert (REPLICAS >= 2)
      else $error("the monitor needs at least two replicas to compare");
  end

endmodule

// seu_test_structure: the design loaded into the device under test.
// It holds REPLICAS identical copies of each of the three implementations
// (unmitigated string, DMR with SET filter, full TMR) side by side, all fed
// from the same serial input din. Because the copies are identical and see
// the same data, their outputs agree unless an upset reached one of them,
// which an external comparator detects. Replicating the strings to fill the
// device follows the test; two replicas of DEPTH = 301 stages, which gives
// the 602 flip-flops of the unmitigated implementation, is this design's
// reading of the flip-flop counts. Every output is valid DEPTH clock edges
// after the bit entered. The upset inputs inject faults (see the strings).
module seu_test_structure #(
  parameter int unsigned DEPTH    = seu_pkg::DEPTH_DEFAULT,
  parameter int unsigned REPLICAS = seu_pkg::REPLICAS_DEFAULT
) (
  input  logic                                 clk,
  input  logic                                 rst_n,
  input  logic [2:0]                           tmr_clk,
  input  logic [2:0]                           tmr_rst_n,
  input  logic                                 din,
  input  logic [REPLICAS-1:0][DEPTH-1:0]       upset_unmit,
  input  logic [REPLICAS-1:0][2:0][DEPTH-1:0]  upset_dmr,
  input  logic [REPLICAS-1:0][2:0][DEPTH-1:0]  upset_tmr,
  output logic [REPLICAS-1:0]                  dout_unmit,
  output logic [REPLICAS-1:0]                  dout_dmr,
  output logic [REPLICAS-1:0]                  dout_tmr
);

  for (genvar r = 0; r < REPLICAS; r++) begin : g_rep
    unmitigated_shift_register #(.DEPTH(DEPTH)) u_unmit (
      .clk   (clk),
      .rst_n (rst_n),
      .din   (din),
      .upset (upset_unmit[r]),
      .dout  (dout_unmit[r])
    );

    dmr_filter_shift_register #(.DEPTH(DEPTH)) u_dmr (
      .clk   (clk),
      .rst_n (rst_n),
      .din   (din),
      .upset (upset_dmr[r]),
      .dout  (dout_dmr[r])
    );

    tmr_shift_register #(.DEPTH(DEPTH)) u_tmr (
      .clk   (tmr_clk),
      .rst_n (tmr_rst_n),
      .din   ({3{din}}),
      .upset (upset_tmr[r]),
      .dout  (dout_tmr[r])
    );
  end

endmodule

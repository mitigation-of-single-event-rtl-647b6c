// tb_seu_test_structure: checks the device-under-test design. Without
// upsets every output of every replica must equal the input delayed by
// DEPTH clock edges. Then one upset per implementation is injected into
// replica 0 at a data transition: the unmitigated and DMR-filter replicas
// must differ from replica 1 at some point, the TMR replicas never.
module tb_seu_test_structure;
  localparam int unsigned DEPTH = 16;
  localparam int unsigned REPLICAS = 2;
  logic clk = 0, rst_n = 0, din = 0;
  logic [REPLICAS-1:0][DEPTH-1:0]      upset_unmit = '0;
  logic [REPLICAS-1:0][2:0][DEPTH-1:0] upset_dmr = '0, upset_tmr = '0;
  logic [REPLICAS-1:0] dout_unmit, dout_dmr, dout_tmr;
  logic [DEPTH-1:0] ideal = '0;
  int checks = 0, failures = 0;
  int diff_unmit = 0, diff_dmr = 0, diff_tmr = 0;

  seu_test_structure #(.DEPTH(DEPTH), .REPLICAS(REPLICAS)) dut (
    .clk(clk), .rst_n(rst_n), .tmr_clk({3{clk}}), .tmr_rst_n({3{rst_n}}), .din(din),
    .upset_unmit(upset_unmit), .upset_dmr(upset_dmr), .upset_tmr(upset_tmr),
    .dout_unmit(dout_unmit), .dout_dmr(dout_dmr), .dout_tmr(dout_tmr));

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic step(input bit clean);
    @(posedge clk);
    ideal = {ideal[DEPTH-2:0], din};
    @(negedge clk);
    if (clean) begin
      for (int r = 0; r < REPLICAS; r++) begin
        checks += 3;
        if (dout_unmit[r] !== ideal[DEPTH-1]) begin failures++; $display("FAIL unmit r%0d", r); end
        if (dout_dmr[r]   !== ideal[DEPTH-1]) begin failures++; $display("FAIL dmr r%0d", r); end
        if (dout_tmr[r]   !== ideal[DEPTH-1]) begin failures++; $display("FAIL tmr r%0d", r); end
      end
    end
    if (dout_unmit[0] != dout_unmit[1]) diff_unmit++;
    if (dout_dmr[0] != dout_dmr[1]) diff_dmr++;
    if (dout_tmr[0] != dout_tmr[1]) diff_tmr++;
  endtask

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int n = 0; n < 500; n++) begin
      din = 1'($urandom);
      step(1);
    end
    checks += 3;
    if (diff_unmit != 0 || diff_dmr != 0 || diff_tmr != 0) failures++;
    // alternating data: every stage changes each cycle
    for (int n = 0; n < DEPTH; n++) begin din = ~din; step(1); end
    upset_unmit[0] = DEPTH'(1) << 5;
    upset_dmr[0][0] = DEPTH'(1) << 5;
    upset_tmr[0][1] = DEPTH'(1) << 5;
    din = ~din;
    step(0);
    upset_unmit = '0; upset_dmr = '0; upset_tmr = '0;
    for (int n = 0; n < 2 * DEPTH; n++) begin din = ~din; step(0); end
    checks += 3;
    if (diff_unmit == 0) begin failures++; $display("FAIL unmitigated upset not seen"); end
    if (diff_dmr == 0) begin failures++; $display("FAIL dmr transition upset not seen"); end
    if (diff_tmr != 0) begin failures++; $display("FAIL tmr upset seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

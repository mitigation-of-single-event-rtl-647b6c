// tb_tmr_voter: checks the majority voter against a population count of the
// three inputs (two or more ones give a one), over every combination of one
// bit and random wider vectors.
module tb_tmr_voter;
  localparam int unsigned W = 8;
  logic [W-1:0] a, b, c, y;
  int checks = 0, failures = 0;

  tmr_voter #(.W(W)) dut (.a(a), .b(b), .c(c), .y(y));

  function automatic logic [W-1:0] ref_vote(logic [W-1:0] x0, logic [W-1:0] x1, logic [W-1:0] x2);
    logic [W-1:0] r;
    for (int i = 0; i < W; i++) begin
      int ones;
      ones = int'(x0[i]) + int'(x1[i]) + int'(x2[i]);
      r[i] = (ones >= 2);
    end
    return r;
  endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      a = {W{v[0]}}; b = {W{v[1]}}; c = {W{v[2]}};
      #1;
      checks++;
      if (y !== ref_vote(a, b, c)) begin
        failures++;
        $display("FAIL exhaustive %0d: y=%h", v, y);
      end
    end
    for (int n = 0; n < 500; n++) begin
      a = W'($urandom); b = W'($urandom); c = W'($urandom);
      #1;
      checks++;
      if (y !== ref_vote(a, b, c)) begin
        failures++;
        $display("FAIL random a=%h b=%h c=%h y=%h", a, b, c, y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

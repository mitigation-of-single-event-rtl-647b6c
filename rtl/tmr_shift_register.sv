// tmr_shift_register: implementation three of the SEU test structure, full
// TMR of the string including its clock, reset and input.
// Three copies of the DEPTH-stage string run on three clock copies clk[k]
// with three reset copies rst_n[k] and input copies din[k]. Every stage of
// every copy loads the majority of the three copies of the previous stage
// (voters between all stages), so a single upset is outvoted at the next
// stage and rewritten in its own copy at the next clock edge; a single
// upset never reaches dout. dout is the majority of the three last stages,
// DEPTH clock edges after din. The three clocks are expected to be copies
// of one clock (same frequency and phase). upset[k][i] high at an edge of
// clk[k] inverts stage i of copy k (fault injection). Voting between every
// stage follows the usual full-TMR scheme; the depth default is this
// design's choice.
module tmr_shift_register #(
  parameter int unsigned DEPTH = seu_pkg::DEPTH_DEFAULT
) (
  input  logic [2:0]            clk,
  input  logic [2:0]            rst_n,
  input  logic [2:0]            din,
  input  logic [2:0][DEPTH-1:0] upset,
  output logic                  dout
);

  logic [2:0][DEPTH-1:0] sr;
  logic [DEPTH-1:0]      voted;

  tmr_voter #(.W(DEPTH)) u_stage_voter (
    .a (sr[0]),
    .b (sr[1]),
    .c (sr[2]),
    .y (voted)
  );

  for (genvar k = 0; k < 3; k++) begin : g_copy
    logic [DEPTH-1:0] next;
    logic             din_v;

    // Each copy votes the three input copies too.
    assign din_v = seu_pkg::maj3(din[0], din[1], din[2]);

    if (DEPTH == 1) begin : g_one
      assign next = din_v;
    end else begin : g_many
      assign next = {voted[DEPTH-2:0], din_v};
    end

    always_ff @(posedge clk[k]) begin
      if (!rst_n[k]) sr[k] <= '0;
      else           sr[k] <= next ^ upset[k];
    end
  end

  assign dout = voted[DEPTH-1];

endmodule

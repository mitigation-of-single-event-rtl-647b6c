// seu_pkg: constants and the majority function shared by the SEU test
// structure. maj3 is the two-out-of-three vote used both by the TMR voters
// and by the AND-OR SET filter (which is a vote between the two DMR copies
// and its own previous output). The string depth of 301 stages per replica
// is derived from the flip-flop budget of the unmitigated test design
// (602 flip-flops = 2 replicas x 301); the replica count and counter width
// are this design's own choices.
package seu_pkg;

  // Stages in one shift-register string.
  parameter int unsigned DEPTH_DEFAULT = 301;
  // Identical copies of every implementation, compared by the monitor.
  parameter int unsigned REPLICAS_DEFAULT = 2;
  // Width of the upset counters.
  parameter int unsigned COUNT_W_DEFAULT = 32;

  // The three implementations under test.
  typedef enum logic [1:0] {
    IMPL_UNMITIGATED = 2'd0,
    IMPL_DMR_FILTER  = 2'd1,
    IMPL_TMR         = 2'd2
  } impl_e;

  parameter int unsigned NUM_IMPL = 3;

  // Bitwise two-out-of-three majority.
  function automatic logic maj3(input logic a, input logic b, input logic c);
    return (a & b) | (a & c) | (b & c);
  endfunction

endpackage

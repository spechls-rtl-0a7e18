// cd_controller: control logic for two speculated gamma nodes in a
// control-domination chain.
//
// gamma_a has the longer condition (CTRL_LAT_A cycles), gamma_b the shorter
// one (CTRL_LAT_B). Each has its own spec_fsm. Two rules tie them:
//  * a mispeculation of A restarts B: while A handles it (the cycle of the
//    mispeculation, Stall and Rollback) B is held in a fresh Fill, so B
//    starts refilling together with A's re-issued iteration;
//  * a mispeculation of B in cycle u hides A's mispeculation signals for
//    CTRL_LAT_B cycles, starting CTRL_LAT_A-CTRL_LAT_B cycles later, i.e.
//    in cycles u+LA-LB+1 .. u+LA. Those are the conditions of the
//    iterations B has just discarded, computed from wrong data.
// The two rules follow the control-domination scheme of SpecHLS; the
// default latencies, the shift-register mask and the way B is held are
// this design's choices. The mask needs CTRL_LAT_A > CTRL_LAT_B.
//
// Interface: cond_a/cond_b are the raw "slow path needed" outcomes of the
// iterations whose conditions resolve this cycle. issue is high when both
// FSMs let a new iteration enter; sel_slow_*/rollback_* drive each gamma
// node and its rollback node; commit is high when both commit.
// masked_pulse marks a hidden A signal.
module cd_controller
  import spechls_pkg::*;
#(
  parameter int unsigned CTRL_LAT_A = 4,
  parameter int unsigned SLOW_LAT_A = 6,
  parameter int unsigned CTRL_LAT_B = 2,
  parameter int unsigned SLOW_LAT_B = 4
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  logic        stop,
  input  logic        cond_a,
  input  logic        cond_b,
  output spec_state_e state_a,
  output spec_state_e state_b,
  output logic        issue,
  output logic        sel_slow_a,
  output logic        rollback_a,
  output logic        sel_slow_b,
  output logic        rollback_b,
  output logic        commit,
  output logic        mispec_a,
  output logic        mispec_b,
  output logic        masked_pulse
);

  initial begin
    assert (CTRL_LAT_A > CTRL_LAT_B) else $error("cd_controller: need CTRL_LAT_A > CTRL_LAT_B");
  end

  logic issue_a, issue_b, commit_a, commit_b, flush_b;
  logic [CTRL_LAT_A-1:0] b_hist;   // b_hist[k]: B mispeculated k+1 cycles ago
  logic mask_a;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) b_hist <= '0;
    else        b_hist <= {b_hist[CTRL_LAT_A-2:0], mispec_b};
  end

  always_comb begin
    mask_a = 1'b0;
    for (int k = int'(CTRL_LAT_A - CTRL_LAT_B); k < int'(CTRL_LAT_A); k++)
      mask_a |= b_hist[k];
  end

  assign mispec_a     = cond_a && (state_a == ST_PROCEED) && !mask_a;
  assign masked_pulse = cond_a && (state_a == ST_PROCEED) && mask_a;
  assign flush_b      = mispec_a || state_a == ST_STALL || state_a == ST_ROLLBACK;
  assign mispec_b     = cond_b && (state_b == ST_PROCEED) && !flush_b;

  spec_fsm #(.CTRL_LAT(CTRL_LAT_A), .SLOW_LAT(SLOW_LAT_A)) u_fsm_a (
    .clk, .rst_n, .start, .stop, .flush(1'b0), .mispec(mispec_a),
    .state(state_a), .issue(issue_a), .sel_slow(sel_slow_a),
    .rollback(rollback_a), .commit(commit_a));

  spec_fsm #(.CTRL_LAT(CTRL_LAT_B), .SLOW_LAT(SLOW_LAT_B)) u_fsm_b (
    .clk, .rst_n, .start, .stop, .flush(flush_b), .mispec(mispec_b),
    .state(state_b), .issue(issue_b), .sel_slow(sel_slow_b),
    .rollback(rollback_b), .commit(commit_b));

  // While A restarts, B's flush would block the re-issue: A decides alone.
  assign issue  = flush_b ? issue_a : (issue_a && issue_b);
  assign commit = commit_a && commit_b;

endmodule

// slp_loop: speculatively pipelined loop
//     do { if (C(x,z)) x = S(x); else x = F(x); } while (!x);
//
// The loop-carried dependency over x goes through the condition C
// (CTRL_LAT cycles) and the slow path S (SLOW_LAT cycles); only the fast
// path F takes one cycle. The accelerator speculates that every iteration
// takes the fast path and issues a new iteration each cycle (II=1) with
// x = F(previous x). Delay lines carry the condition, the slow value and
// the fast value to the cycle where the condition of their iteration is
// resolved. spec_fsm then either commits the iteration (fast path right)
// or, on a mispeculation, drops the younger iterations, waits for the slow
// value and issues it in its Rollback cycle (the gamma node's selSlow).
// Latencies 1/3/5 and the FSM structure follow the SpecHLS running
// example; the operators F, S, C are the example ones of spechls_pkg.
//
// Every iteration result is reported once on commit_valid/x_commit, in
// program order: fast results in Proceed, the slow result in Rollback.
// The first result whose stop flag (top bit) is set ends the loop: done
// pulses with x_result. Cost: 1 cycle per fast iteration, SLOW_LAT cycles
// per slow one. start is accepted only while idle (busy=0); z must be held
// for the whole run.
module slp_loop
  import spechls_pkg::*;
#(
  parameter int unsigned CTRL_LAT = 3,
  parameter int unsigned SLOW_LAT = 5
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  logic [SLP_W-1:0] x_init,
  input  logic [SLP_W-1:0] z,
  output logic             busy,
  output logic             commit_valid,
  output logic [SLP_W-1:0] x_commit,
  output logic             done,
  output logic [SLP_W-1:0] x_result,
  output logic             mispec_pulse,
  output spec_state_e      state
);

  logic             issue, sel_slow, rollback, commit, mispec, stop;
  logic [SLP_W-1:0] iss_val;
  logic [SLP_W-1:0] fast_tap [CTRL_LAT];
  logic [SLP_W-1:0] slow_tap [SLOW_LAT];
  logic [0:0]       ctrl_tap [CTRL_LAT];
  logic [SLP_W-1:0] slow_out, fast_out;

  spec_fsm #(.CTRL_LAT(CTRL_LAT), .SLOW_LAT(SLOW_LAT)) u_fsm (
    .clk, .rst_n, .start, .stop, .flush(1'b0), .mispec,
    .state, .issue, .sel_slow, .rollback, .commit
  );

  assign slow_out = slow_tap[SLOW_LAT-1];
  assign fast_out = fast_tap[CTRL_LAT-1];
  assign mispec   = ctrl_tap[CTRL_LAT-1][0] && (state == ST_PROCEED);

  // mu node (loop entry) and gamma node (fast or slow value).
  always_comb begin
    if (state == ST_IDLE) iss_val = x_init;
    else if (sel_slow)    iss_val = slow_out;
    else                  iss_val = fast_tap[0];
  end

  // Operators, each followed by its delay line. Only issued iterations
  // matter: the FSM never resolves a slot in which nothing was issued.
  delay_line #(.WIDTH(SLP_W), .DEPTH(CTRL_LAT)) u_fast (
    .clk, .rst_n, .d(slp_fast(iss_val, z)), .tap(fast_tap));
  delay_line #(.WIDTH(SLP_W), .DEPTH(SLOW_LAT)) u_slow (
    .clk, .rst_n, .d(slp_slow(iss_val, z)), .tap(slow_tap));
  delay_line #(.WIDTH(1), .DEPTH(CTRL_LAT)) u_ctrl (
    .clk, .rst_n, .d(issue & slp_cond(iss_val, z)), .tap(ctrl_tap));

  // Commit node: only resolved iterations leave the loop.
  assign commit_valid = commit | rollback;
  assign x_commit     = rollback ? slow_out : fast_out;
  assign stop         = commit_valid && x_commit[SLP_W-1];
  assign mispec_pulse = mispec;
  assign busy         = (state != ST_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      done     <= 1'b0;
      x_result <= '0;
    end else begin
      done <= stop;
      if (stop) x_result <= x_commit;
    end
  end

endmodule

// tb_spec_fsm: self-checking testbench of spec_fsm.
//
// Drives the FSM through the state sequence of the reference trace
// (Fill, Fill, Proceed, Proceed with a mispeculation, Stall, Rollback,
// Fill, Fill, Proceed...) and compares state, issue, sel_slow, rollback and
// commit cycle by cycle with expected values written out by hand. A second
// instance with SLOW_LAT = CTRL_LAT+1 checks that Stall is skipped, and
// flush and stop are exercised on the default instance.
module tb_spec_fsm;
  import spechls_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic start = 0, stop = 0, flush = 0, mispec = 0;
  spec_state_e state, state2;
  logic issue, sel_slow, rollback, commit;
  logic issue2, sel_slow2, rollback2, commit2;
  int checks = 0, failures = 0;

  spec_fsm dut (.clk, .rst_n, .start, .stop, .flush, .mispec,
                .state, .issue, .sel_slow, .rollback, .commit);
  spec_fsm #(.CTRL_LAT(2), .SLOW_LAT(3)) dut2 (.clk, .rst_n, .start, .stop, .flush, .mispec,
                .state(state2), .issue(issue2), .sel_slow(sel_slow2),
                .rollback(rollback2), .commit(commit2));

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // one cycle: set inputs at negedge, check outputs just before posedge
  task automatic step(input bit st, input bit mi, input spec_state_e es,
                      input bit e_issue, input bit e_rb, input bit e_commit);
    @(negedge clk);
    start = st; mispec = mi;
    #1;
    check(state == es, $sformatf("state %s want %s", state.name(), es.name()));
    check(issue == e_issue, $sformatf("issue %0b in %s", issue, es.name()));
    check(rollback == e_rb && sel_slow == e_rb, $sformatf("rollback %0b in %s", rollback, es.name()));
    check(commit == e_commit, $sformatf("commit %0b in %s", commit, es.name()));
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    //    start mis  state        issue rb commit
    step(1, 0, ST_IDLE,     1, 0, 0);   // loop starts
    step(0, 0, ST_FILL,     1, 0, 0);
    step(0, 0, ST_FILL,     1, 0, 0);
    step(0, 0, ST_PROCEED,  1, 0, 1);
    step(0, 1, ST_PROCEED,  0, 0, 0);   // mispeculation
    step(0, 0, ST_STALL,    0, 0, 0);
    step(0, 0, ST_ROLLBACK, 1, 1, 0);
    step(0, 0, ST_FILL,     1, 0, 0);
    step(0, 0, ST_FILL,     1, 0, 0);
    step(0, 0, ST_PROCEED,  1, 0, 1);
    step(0, 0, ST_PROCEED,  1, 0, 1);
    step(0, 1, ST_PROCEED,  0, 0, 0);
    step(0, 0, ST_STALL,    0, 0, 0);
    step(0, 0, ST_ROLLBACK, 1, 1, 0);
    step(0, 0, ST_FILL,     1, 0, 0);
    // flush restarts Fill
    @(negedge clk); flush = 1; #1 check(issue == 0, "no issue while flushed");
    @(negedge clk); flush = 0; #1 check(state == ST_FILL, "flush -> Fill");
    step(0, 0, ST_FILL,     1, 0, 0);
    step(0, 0, ST_PROCEED,  1, 0, 1);
    // stop ends the loop
    @(negedge clk); stop = 1; #1 check(issue == 0, "no issue on stop");
    @(negedge clk); stop = 0; #1 check(state == ST_IDLE, "stop -> Idle");
    check(state2 == ST_IDLE, "second FSM idle");
    // second instance: Fill 1 cycle, no Stall
    @(negedge clk); start = 1; #1 check(issue2, "dut2 issue at start");
    @(negedge clk); start = 0; #1 check(state2 == ST_FILL, "dut2 Fill");
    @(negedge clk); #1 check(state2 == ST_PROCEED && commit2, "dut2 Proceed");
    @(negedge clk); mispec = 1; #1 check(!issue2 && !commit2, "dut2 mispec");
    @(negedge clk); mispec = 0; #1 check(state2 == ST_ROLLBACK && rollback2 && sel_slow2, "dut2 Rollback without Stall");
    @(negedge clk); #1 check(state2 == ST_FILL, "dut2 Fill after Rollback");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

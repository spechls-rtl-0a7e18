// tb_cd_controller: self-checking testbench of cd_controller.
//
// Directed scenarios with the default latencies (A: condition 4, slow 6;
// B: condition 2, slow 4):
//  * B mispeculates in cycle u, then A raises its condition d cycles later
//    for d = 1..7 (one fresh run each). A's signal must be hidden exactly
//    for d in [LA-LB+1, LA] and must start A's rollback otherwise.
//  * A mispeculates: B must be held in Fill while A stalls and rolls back,
//    a simultaneous B condition must be ignored, and both must return to
//    Proceed after their own Fill lengths.
// Expected values come from the latencies, not from the design.
module tb_cd_controller;
  import spechls_pkg::*;

  localparam int LA = 4, SA = 6, LB = 2, SB = 4;

  logic clk = 0, rst_n = 0;
  logic start = 0, stop = 0, cond_a = 0, cond_b = 0;
  spec_state_e state_a, state_b;
  logic issue, sel_slow_a, rollback_a, sel_slow_b, rollback_b, commit;
  logic mispec_a, mispec_b, masked_pulse;
  int checks = 0, failures = 0;

  cd_controller dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic restart();
    @(negedge clk); stop = 1; cond_a = 0; cond_b = 0;
    @(negedge clk); stop = 0; start = 1;
    @(negedge clk); start = 0;
    // A fills for LA-1 cycles, B for LB-1 cycles
    repeat (LA - 2) begin #1 check(state_a == ST_FILL, "A in Fill after start"); @(negedge clk); end
    #1 check(state_a == ST_FILL && state_b == ST_PROCEED, "A Fill / B Proceed");
    @(negedge clk);
    #1 check(state_a == ST_PROCEED && state_b == ST_PROCEED && commit && issue, "both Proceed");
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    // B mispeculation masks A
    for (int d = 1; d <= 7; d++) begin
      bit exp_mask;
      restart();
      cond_b = 1; #1;
      check(mispec_b && !issue, "B mispeculation accepted");
      @(negedge clk); cond_b = 0; #1;
      check(state_b == ST_STALL, "B stalls");
      for (int t = 1; t < d; t++) @(negedge clk);
      cond_a = 1; #1;
      exp_mask = (d >= LA - LB + 1) && (d <= LA);
      check(masked_pulse == exp_mask && mispec_a == !exp_mask,
            $sformatf("d=%0d masked %0b mispec_a %0b", d, masked_pulse, mispec_a));
      @(negedge clk); cond_a = 0;
    end
    // A mispeculation restarts B
    restart();
    cond_a = 1; cond_b = 1; #1;
    check(mispec_a && !mispec_b && !issue, "A wins over simultaneous B");
    @(negedge clk); cond_a = 0; cond_b = 0; #1;
    for (int t = 0; t < SA - LA - 1; t++) begin
      check(state_a == ST_STALL && state_b == ST_FILL && !issue, "A Stall, B held");
      @(negedge clk); #1;
    end
    check(state_a == ST_ROLLBACK && rollback_a && sel_slow_a && issue && !rollback_b,
          "A rollback re-issues");
    @(negedge clk); #1;
    for (int t = 0; t < LB - 1; t++) begin
      check(state_a == ST_FILL && state_b == ST_FILL, "both refill");
      @(negedge clk); #1;
    end
    check(state_b == ST_PROCEED && state_a == ST_FILL, "B proceeds first");
    repeat (LA - LB) @(negedge clk);
    #1 check(state_a == ST_PROCEED && commit, "A proceeds again");
    // B rollback drives its own gamma node
    cond_b = 1;
    @(negedge clk); cond_b = 0;
    repeat (SB - LB - 1) @(negedge clk);
    #1 check(rollback_b && sel_slow_b && !rollback_a && issue, "B rollback");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_slp_loop: self-checking testbench of slp_loop.
//
// Runs the loop from random starting values and loop-invariant operands.
// A sequential reference executes the same loop one iteration at a time
// and predicts, for every iteration, its result and the cycle in which it
// must be committed: a fast iteration resolves CTRL_LAT cycles after it
// was issued and lets the next one issue one cycle later; a slow one is
// committed and reissued SLOW_LAT cycles after it was issued. Every
// commit, the final result, the done cycle and the mispeculation count are
// compared with the reference.
module tb_slp_loop;
  import spechls_pkg::*;

  localparam int unsigned CTRL_LAT = 3;
  localparam int unsigned SLOW_LAT = 5;
  localparam int MAXIT = 4096;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic start = 1'b0;
  logic [SLP_W-1:0] x_init = '0, z = '0;
  logic busy, commit_valid, done, mispec_pulse;
  logic [SLP_W-1:0] x_commit, x_result;
  spec_state_e state;

  int checks = 0, failures = 0;
  int cyc = 0;

  // reference trace
  logic [SLP_W-1:0] exp_val [MAXIT];
  int               exp_cyc [MAXIT];
  int               n_exp, exp_mis, done_cyc;
  int               n_got, got_mis, got_done_cyc;

  slp_loop #(.CTRL_LAT(CTRL_LAT), .SLOW_LAT(SLOW_LAT)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n && commit_valid) begin
      if (n_got < n_exp) begin
        check(x_commit == exp_val[n_got] && cyc == exp_cyc[n_got],
              $sformatf("commit %0d: got %h @%0d, want %h @%0d", n_got, x_commit, cyc,
                        exp_val[n_got], exp_cyc[n_got]));
      end else check(1'b0, "commit beyond the end of the loop");
      n_got++;
    end
    if (rst_n && mispec_pulse) got_mis++;
    if (rst_n && done) got_done_cyc = cyc;
  end

  task automatic build_ref(input logic [SLP_W-1:0] xi, input logic [SLP_W-1:0] zz);
    logic [SLP_W-1:0] x;
    int s;
    x = xi; s = 0; n_exp = 0; exp_mis = 0;
    forever begin
      if (slp_cond(x, zz)) begin
        x = slp_slow(x, zz); s = s + SLOW_LAT; exp_mis++;
        exp_val[n_exp] = x; exp_cyc[n_exp] = s;
      end else begin
        x = slp_fast(x, zz);
        exp_val[n_exp] = x; exp_cyc[n_exp] = s + CTRL_LAT;
        s = s + 1;
      end
      n_exp++;
      if (x[SLP_W-1] || n_exp == MAXIT) break;
    end
    done_cyc = exp_cyc[n_exp-1] + 1;
  endtask

  task automatic run(input logic [SLP_W-1:0] xi, input logic [SLP_W-1:0] zz);
    int t0;
    build_ref(xi, zz);
    @(negedge clk);
    x_init = xi; z = zz; start = 1'b1;
    n_got = 0; got_mis = 0; got_done_cyc = -1;
    t0 = cyc;
    for (int k = 0; k < n_exp; k++) exp_cyc[k] += t0;
    @(negedge clk);
    start = 1'b0;
    wait (done);
    @(posedge clk);
    @(negedge clk);
    check(n_got == n_exp, $sformatf("commits %0d, want %0d", n_got, n_exp));
    check(x_result == exp_val[n_exp-1], $sformatf("result %h want %h", x_result, exp_val[n_exp-1]));
    check(got_done_cyc == done_cyc + t0, $sformatf("done at %0d want %0d", got_done_cyc, done_cyc + t0));
    check(got_mis == exp_mis, $sformatf("mispec %0d want %0d", got_mis, exp_mis));
    check(!busy, "busy after done");
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    // fixed cases: no slow iteration at all, slow first iteration
    run(32'h0000_0001, {1'b0, 15'd9, 16'h0000});
    run(32'h0000_0000, {1'b0, 15'd20, 16'h0000});
    for (int r = 0; r < 40; r++) begin
      logic [SLP_W-1:0] xi, zz;
      xi = {1'b0, 16'($urandom), 15'($urandom_range(0, 15))};
      zz = {1'b0, 15'($urandom_range(1, 300)), 16'($urandom)};
      run(xi, zz);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

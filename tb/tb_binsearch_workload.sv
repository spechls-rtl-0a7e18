// tb_binsearch_workload: average cost of the two speculative binary
// searches on uniformly distributed data, at their default size.
//
// Fills both 1024-word arrays with the same sorted random words and runs
// 400 searches for random values (mostly absent, so every search goes to
// full depth). For each search the testbench counts the loop iterations
// of a sequential model, then measures the cycles the hardware needs for
// the iterations that are not the last one. Expected on such data: 1.5
// cycles per iteration for binsearch_spec (half the guesses wrong, at 2
// cycles), and for binsearch_unrolled at most 1.125 cycles per search
// step: a two-step iteration takes 1, 2 or 3 cycles with probabilities
// 1/4, 1/4 and 1/2 when the outcomes are independent (2.25 on average).
// In the last iterations of a search the probes fall on the same or
// neighbouring elements, the outcomes become correlated, and the average
// comes out lower. The unrolled average must lie in 0.95..1.2, the plain
// one in 1.4..1.6, and both must beat the 2 cycles per step of a
// non-speculative loop.
module tb_binsearch_workload;
  localparam int DEPTH = 1024, AW = 10, NSEARCH = 400;

  logic clk = 0, rst_n = 0;
  logic wr_en = 0, start = 0;
  logic [AW-1:0] wr_addr = '0;
  logic signed [31:0] wr_data = '0, value = '0;
  logic [AW:0] size = '0;
  logic bs_busy, bs_done, bs_iter, bs_mis;
  logic bu_busy, bu_done, bu_iter, bu_mis1, bu_mis2;
  logic [AW:0] bs_result, bu_result;
  int checks = 0, failures = 0;
  int arr [DEPTH];
  int n_mis1 = 0, n_mis2 = 0, n_iter = 0;

  always @(posedge clk) begin
    n_mis1 += int'(bu_mis1);
    n_mis2 += int'(bu_mis2);
    n_iter += int'(bu_iter);
  end

  binsearch_spec u_bs (.clk, .rst_n, .wr_en, .wr_addr, .wr_data, .start, .value, .size,
    .busy(bs_busy), .done(bs_done), .result(bs_result), .iter_pulse(bs_iter), .mispec_pulse(bs_mis));
  binsearch_unrolled u_bu (.clk, .rst_n, .wr_en, .wr_addr, .wr_data, .start, .value, .size,
    .busy(bu_busy), .done(bu_done), .result(bu_result), .iter_pulse(bu_iter),
    .mispec1_pulse(bu_mis1), .mispec2_pulse(bu_mis2));

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    longint bs_cyc = 0, bs_it = 0, bu_cyc = 0, bu_steps = 0;
    int v;
    repeat (2) @(negedge clk);
    rst_n = 1;
    v = 0;
    for (int a = 0; a < DEPTH; a++) begin
      v += $urandom_range(2, 6);
      arr[a] = v;
      @(negedge clk); wr_en = 1; wr_addr = AW'(a); wr_data = v;
    end
    @(negedge clk); wr_en = 0;
    for (int q = 0; q < NSEARCH; q++) begin
      int val, i, j, k, n1, k1, k2, k3, kp, n2, c, cb, cu, last2, res1, res2;
      bit c1, c2;
      val = (q % 8 == 0) ? arr[$urandom_range(0, DEPTH - 1)] : $urandom_range(0, v + 10);
      // sequential models: iteration counts and results
      i = 0; j = DEPTH - 1; n1 = 0; res1 = DEPTH;
      while (i <= j) begin
        n1++; k = (i + j) / 2;
        if (arr[k] < val) i = k + 1; else if (arr[k] > val) j = k - 1; else begin res1 = k; break; end
      end
      i = 0; j = DEPTH - 1; n2 = 0; last2 = 2; res2 = DEPTH;
      while (i <= j) begin
        n2++;
        k1 = (3 * i + j) / 4; k2 = (i + j) / 2; k3 = (i + 3 * j) / 4;
        c1 = arr[k2] < val; kp = c1 ? k3 : k1; c2 = arr[kp] < val;
        if (arr[k2] == val) begin res2 = k2; break; end
        if (arr[kp] == val) begin res2 = kp; last2 = 3; break; end
        if (c1 && c2) i = k3 + 1; else if (c1) begin i = k2 + 1; j = k3 - 1; end
        else if (c2) begin i = k1 + 1; j = k2 - 1; end else j = k1 - 1;
      end
      if (res1 == DEPTH) n1++;   // the final i>j check is an iteration of its own
      if (res2 == DEPTH) n2++;
      @(negedge clk); start = 1; value = val; size = (AW+1)'(DEPTH);
      @(negedge clk); start = 0; c = 1; cb = 0; cu = 0;
      while ((cb == 0 || cu == 0) && c < 1000) begin
        if (bs_done && cb == 0) cb = c;
        if (bu_done && cu == 0) cu = c;
        @(negedge clk); c++;
      end
      check(bs_result == (AW+1)'(res1) && bu_result == (AW+1)'(res2), $sformatf("results for %0d", val));
      // cycles spent on all iterations but the last: total minus start (1),
      // minus the last iteration until done (2, or 3 when found by the second probe)
      bs_cyc += cb - 3;      bs_it += n1 - 1;
      bu_cyc += cu - 1 - last2; bu_steps += 2 * (n2 - 1);
    end
    begin
      real cpi_bs, cpi_bu;
      cpi_bs = real'(bs_cyc) / real'(bs_it);
      cpi_bu = real'(bu_cyc) / real'(bu_steps);
      $display("speculative: %0d iterations, %.3f cycles per iteration (baseline 2)", bs_it, cpi_bs);
      $display("unrolled: %0d iterations, %0d first-guess and %0d second-guess recoveries", n_iter, n_mis1, n_mis2);
      $display("unrolled speculative: %0d search steps, %.3f cycles per step (baseline 2)", bu_steps, cpi_bu);
      check(cpi_bs > 1.4 && cpi_bs < 1.6, "speculative CPI near 1.5");
      check(cpi_bu > 0.95 && cpi_bu < 1.2, "unrolled cycles per step near 1.1");
      check(cpi_bu < cpi_bs && cpi_bs < 2.0, "both beat the non-speculative 2 cycles");
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

// tb_binsearch_unrolled: self-checking testbench of binsearch_unrolled.
//
// Loads sorted arrays of random signed words (with and without repeated
// values), then searches for values that are present, absent, below the
// first and above the last element, and for an empty array. A sequential
// model of the unrolled loop gives the expected index, the number of
// mispeculations of each kind and the expected cycle count: 1 cycle for an
// iteration with c1&&c2, 2 for !c1&&c2, 3 otherwise, and 2 (found by the
// first probe or loop ended) or 3 (found by the second probe) for the
// final iteration until done.
module tb_binsearch_unrolled;
  localparam int DEPTH = 64;
  localparam int AW = $clog2(DEPTH);

  logic clk = 0, rst_n = 0;
  logic wr_en = 0;
  logic [AW-1:0] wr_addr = '0;
  logic signed [31:0] wr_data = '0, value = '0;
  logic start = 0;
  logic [AW:0] size = '0;
  logic busy, done, iter_pulse, mispec1_pulse, mispec2_pulse;
  logic [AW:0] result;
  int checks = 0, failures = 0;
  int arr [DEPTH];
  int n_mis, n_mis2;

  binsearch_unrolled #(.DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) begin
    if (mispec1_pulse) n_mis++;
    if (mispec2_pulse) n_mis2++;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic load(input int n, input int step_max);
    int v;
    v = $urandom_range(0, 40) - 100;
    for (int a = 0; a < n; a++) begin
      v += $urandom_range(0, step_max);
      arr[a] = v;
      @(negedge clk); wr_en = 1; wr_addr = AW'(a); wr_data = v;
    end
    @(negedge clk); wr_en = 0;
  endtask

  task automatic search(input int n, input int val);
    int i, j, k1, k2, k3, kp, cyc, exp_cyc, exp_res, exp_mis, exp_mis2;
    bit c1, c2, found;
    i = 0; j = n - 1; exp_cyc = 1; exp_res = n; exp_mis = 0; exp_mis2 = 0; found = 0;
    while (i <= j) begin
      k1 = (3 * i + j) / 4; k2 = (i + j) / 2; k3 = (i + 3 * j) / 4;
      c1 = arr[k2] < val;
      kp = c1 ? k3 : k1;
      c2 = arr[kp] < val;
      if (arr[k2] == val) begin exp_res = k2; found = 1; break; end
      if (!c1) exp_mis++;   // stage 1 reacts before the second probe is seen
      if (arr[kp] == val) begin exp_res = kp; exp_cyc += 1; found = 1; break; end
      if (!c2) exp_mis2++;
      if (c1 && c2)       begin i = k3 + 1; exp_cyc += 1; end
      else if (c1 && !c2) begin i = k2 + 1; j = k3 - 1; exp_cyc += 3; end
      else if (!c1 && c2) begin j = k2 - 1; i = k1 + 1; exp_cyc += 2; end
      else                begin j = k1 - 1; exp_cyc += 3; end
    end
    exp_cyc += 2;
    @(negedge clk); start = 1; value = val; size = (AW+1)'(n); n_mis = 0; n_mis2 = 0;
    @(negedge clk); start = 0; cyc = 1;
    while (!done && cyc < 1000) begin @(negedge clk); cyc++; end
    check(result == (AW+1)'(exp_res), $sformatf("n=%0d val=%0d result %0d want %0d", n, val, result, exp_res));
    check(cyc == exp_cyc, $sformatf("n=%0d val=%0d cycles %0d want %0d", n, val, cyc, exp_cyc));
    check(n_mis == exp_mis && n_mis2 == exp_mis2,
          $sformatf("mispec %0d/%0d want %0d/%0d", n_mis, n_mis2, exp_mis, exp_mis2));
    @(negedge clk);
    check(!busy, "idle after done");
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int r = 0; r < 12; r++) begin
      int n;
      n = (r == 0) ? DEPTH : $urandom_range(1, DEPTH);
      load(n, (r % 3 == 0) ? 1 : 9);
      for (int q = 0; q < 20; q++) begin
        case (q % 4)
          0: search(n, arr[$urandom_range(0, n - 1)]);
          1: search(n, arr[0] - 1);
          2: search(n, arr[n - 1] + 1);
          default: search(n, $urandom_range(0, 400) - 150);
        endcase
      end
    end
    search(0, 5);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

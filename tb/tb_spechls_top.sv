// tb_spechls_top: end-to-end testbench of spechls_top at its default sizes.
//
// All five accelerators run at the same time (fork/join), each against a
// sequential reference computed in the testbench:
//  * generic loop: several runs, every committed value and the final
//    result checked, cycle count checked against 1 cycle per fast and 5 per
//    slow iteration;
//  * both binary searches: a full 1024-word sorted array, hits and misses,
//    index and cycle count checked against the reference loops;
//  * control-domination controller: one B mispeculation whose shadow hides
//    an A signal, then an A mispeculation that restarts B;
//  * gridding: a stream of updates with repeated pixels, whole grid read
//    back and compared;
//  * processor: a gcd program (Euclid with remu), result, instruction
//    count and cycle count checked.
// Each mechanism is counted: loop rollback and stall, binary-search
// mispeculations (single, first-level, second-level), masked A signal,
// B restarted by A, alias stall, input FIFO full, processor branch
// redirect and multiply/divide stall. A mechanism that never
// happened counts as a failure.
module tb_spechls_top;
  import spechls_pkg::*;

  localparam int BSD = 1024, AW = 10;
  localparam int GWD = 32, GHT = 32, NPIX = GWD * GHT, KS = 16;

  logic clk = 0, rst_n = 0;

  logic             slp_start = 0;
  logic [SLP_W-1:0] slp_x_init = '0, slp_z = '0;
  logic             slp_busy, slp_commit_valid, slp_done, slp_mispec;
  logic [SLP_W-1:0] slp_x_commit, slp_x_result;
  spec_state_e      slp_state;

  logic bs_wr_en = 0, bs_start = 0;
  logic [AW-1:0] bs_wr_addr = '0;
  logic signed [31:0] bs_wr_data = '0, bs_value = '0;
  logic [AW:0] bs_size = '0, bs_result;
  logic bs_busy, bs_done, bs_iter, bs_mispec;

  logic bu_wr_en = 0, bu_start = 0;
  logic [AW-1:0] bu_wr_addr = '0;
  logic signed [31:0] bu_wr_data = '0, bu_value = '0;
  logic [AW:0] bu_size = '0, bu_result;
  logic bu_busy, bu_done, bu_iter, bu_mispec1, bu_mispec2;

  logic cd_start = 0, cd_stop = 0, cd_cond_a = 0, cd_cond_b = 0;
  spec_state_e cd_state_a, cd_state_b;
  logic cd_issue, cd_sel_slow_a, cd_rollback_a, cd_sel_slow_b, cd_rollback_b;
  logic cd_commit, cd_mispec_a, cd_mispec_b, cd_masked;

  logic ska_upd_valid = 0, ska_upd_ready;
  logic [4:0] ska_upd_x = '0, ska_upd_y = '0;
  logic [3:0] ska_upd_k = '0, ska_kw_addr = '0;
  logic signed [15:0] ska_upd_v = '0, ska_kw_data = '0;
  logic ska_kw_en = 0, ska_host_we = 0;
  logic [9:0] ska_host_addr = '0;
  logic signed [31:0] ska_host_wdata = '0, ska_host_rdata;
  logic ska_busy, ska_stall;

  logic cpu_run = 0, cpu_host_we = 0, cpu_host_imem = 0;
  logic [31:0] cpu_host_addr = '0, cpu_host_wdata = '0, cpu_host_rdata;
  logic cpu_halted;
  logic [31:0] cpu_retired, cpu_cycles, cpu_redirects, cpu_md_stalls;

  spechls_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int cyc = 0;
  int n_slp_rb = 0, n_slp_stall = 0, n_bs_mis = 0, n_bu_mis1 = 0, n_bu_mis2 = 0;
  int n_cd_mask = 0, n_cd_restart = 0, n_ska_stall = 0, n_ska_full = 0;
  int n_cpu_redirect = 0, n_cpu_stall = 0;
  int arr [BSD];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n) begin
      if (slp_state == ST_ROLLBACK) n_slp_rb++;
      if (slp_state == ST_STALL) n_slp_stall++;
      if (bs_mispec) n_bs_mis++;
      if (bu_mispec1) n_bu_mis1++;
      if (bu_mispec2) n_bu_mis2++;
      if (cd_masked) n_cd_mask++;
      if (cd_state_a == ST_ROLLBACK && cd_state_b == ST_FILL) n_cd_restart++;
      if (ska_stall) n_ska_stall++;
      if (ska_upd_valid && !ska_upd_ready) n_ska_full++;
      if (cpu_halted) begin n_cpu_redirect = cpu_redirects; n_cpu_stall = cpu_md_stalls; end
    end
  end

  // ---------------- generic speculative loop ----------------
  task automatic slp_run(input logic [SLP_W-1:0] xi, input logic [SLP_W-1:0] zz);
    logic [SLP_W-1:0] x, q [$];
    int exp_cyc, t0, ncommit;
    x = xi; exp_cyc = 0;
    forever begin
      if (slp_cond(x, zz)) begin x = slp_slow(x, zz); exp_cyc += 5; end
      else begin x = slp_fast(x, zz); exp_cyc += 1; end
      q.push_back(x);
      if (x[SLP_W-1]) break;
    end
    @(negedge clk); slp_start = 1; slp_x_init = xi; slp_z = zz; t0 = cyc;
    @(negedge clk); slp_start = 0;
    ncommit = 0;
    while (!slp_done) begin
      if (slp_commit_valid) begin
        check(q.size() > 0 && slp_x_commit == q[0], "loop commit value");
        if (q.size() > 0) void'(q.pop_front());
        ncommit++;
      end
      @(negedge clk);
    end
    check(q.size() == 0 && slp_x_result == x, $sformatf("loop result %h want %h", slp_x_result, x));
    // last fast iteration resolves 3 cycles after issue, last slow one 5
    check(cyc - t0 >= exp_cyc && cyc - t0 <= exp_cyc + 3, $sformatf("loop cycles %0d for %0d", cyc - t0, exp_cyc));
  endtask

  // ---------------- binary searches ----------------
  task automatic bs_search(input int val);
    int i, j, k, c, exp_cyc, exp_res;
    i = 0; j = BSD - 1; exp_cyc = 3; exp_res = BSD;
    while (i <= j) begin
      k = (i + j) / 2;
      if (arr[k] < val) begin i = k + 1; exp_cyc += 1; end
      else if (arr[k] > val) begin j = k - 1; exp_cyc += 2; end
      else begin exp_res = k; break; end
    end
    @(negedge clk); bs_start = 1; bs_value = val; bs_size = (AW+1)'(BSD);
    @(negedge clk); bs_start = 0; c = 1;
    while (!bs_done && c < 500) begin @(negedge clk); c++; end
    check(bs_result == (AW+1)'(exp_res) && c == exp_cyc,
          $sformatf("bs val=%0d result %0d/%0d cycles %0d/%0d", val, bs_result, exp_res, c, exp_cyc));
  endtask

  task automatic bu_search(input int val);
    int i, j, k1, k2, k3, kp, c, exp_cyc, exp_res;
    bit c1, c2;
    i = 0; j = BSD - 1; exp_cyc = 3; exp_res = BSD;
    while (i <= j) begin
      k1 = (3 * i + j) / 4; k2 = (i + j) / 2; k3 = (i + 3 * j) / 4;
      c1 = arr[k2] < val; kp = c1 ? k3 : k1; c2 = arr[kp] < val;
      if (arr[k2] == val) begin exp_res = k2; break; end
      if (arr[kp] == val) begin exp_res = kp; exp_cyc += 1; break; end
      if (c1 && c2)       begin i = k3 + 1; exp_cyc += 1; end
      else if (c1)        begin i = k2 + 1; j = k3 - 1; exp_cyc += 3; end
      else if (c2)        begin i = k1 + 1; j = k2 - 1; exp_cyc += 2; end
      else                begin j = k1 - 1; exp_cyc += 3; end
    end
    @(negedge clk); bu_start = 1; bu_value = val; bu_size = (AW+1)'(BSD);
    @(negedge clk); bu_start = 0; c = 1;
    while (!bu_done && c < 500) begin @(negedge clk); c++; end
    check(bu_result == (AW+1)'(exp_res) && c == exp_cyc,
          $sformatf("bu val=%0d result %0d/%0d cycles %0d/%0d", val, bu_result, exp_res, c, exp_cyc));
  endtask

  // ---------------- control domination ----------------
  task automatic cd_scenario();
    @(negedge clk); cd_start = 1;
    @(negedge clk); cd_start = 0;
    while (cd_state_a != ST_PROCEED) @(negedge clk);
    cd_cond_b = 1;                       // B mispeculates in cycle u
    @(negedge clk); cd_cond_b = 0;
    @(negedge clk); @(negedge clk);      // A signal at u+3: in B's shadow
    cd_cond_a = 1; #1;
    check(cd_masked && !cd_mispec_a, "A signal hidden after B mispeculation");
    @(negedge clk); cd_cond_a = 0;
    repeat (6) @(negedge clk);
    cd_cond_a = 1; #1;
    check(cd_mispec_a, "A mispeculation outside the shadow");
    @(negedge clk); cd_cond_a = 0;
    repeat (8) @(negedge clk);
    check(cd_state_a == ST_PROCEED && cd_state_b == ST_PROCEED, "both FSMs back in Proceed");
    cd_stop = 1;
    @(negedge clk); cd_stop = 0;
  endtask

  // ---------------- processor ----------------
  // gcd: x1=mem[0], x2=mem[1]; while (x2) { x3 = x1 % x2; x1 = x2; x2 = x3; } mem[2] = x1
  task automatic cpu_gcd(input int ga, input int gb);
    logic [31:0] prog [9];
    int u, v, g, iters;
    prog[0] = {12'd0, 5'd0, 3'd2, 5'd1, 7'h03};                  // lw   x1, 0(x0)
    prog[1] = {12'd4, 5'd0, 3'd2, 5'd2, 7'h03};                  // lw   x2, 4(x0)
    prog[2] = {1'b0, 6'd0, 5'd0, 5'd2, 3'd0, 4'd10, 1'b0, 7'h63}; // beq  x2, x0, +20
    prog[3] = {7'd1, 5'd2, 5'd1, 3'd7, 5'd3, 7'h33};             // remu x3, x1, x2
    prog[4] = {7'd0, 5'd0, 5'd2, 3'd0, 5'd1, 7'h33};             // add  x1, x2, x0
    prog[5] = {7'd0, 5'd0, 5'd3, 3'd0, 5'd2, 7'h33};             // add  x2, x3, x0
    prog[6] = {1'b1, 10'h3f8, 1'b1, 8'hff, 5'd0, 7'h6f};         // jal  x0, -16
    prog[7] = {7'd0, 5'd1, 5'd0, 3'd2, 5'd8, 7'h23};             // sw   x1, 8(x0)
    prog[8] = 32'h0000_0073;                                     // ecall
    u = ga; v = gb; iters = 0;
    while (v != 0) begin g = u % v; u = v; v = g; iters++; end
    for (int k = 0; k < 9; k++) begin
      @(negedge clk); cpu_host_we = 1; cpu_host_imem = 1; cpu_host_addr = k; cpu_host_wdata = prog[k];
    end
    @(negedge clk); cpu_host_imem = 0; cpu_host_addr = 0; cpu_host_wdata = ga;
    @(negedge clk); cpu_host_addr = 1; cpu_host_wdata = gb;
    @(negedge clk); cpu_host_we = 0; cpu_run = 1;
    while (!cpu_halted) @(negedge clk);
    cpu_host_addr = 2;
    @(negedge clk);
    check(cpu_host_rdata == u, $sformatf("gcd(%0d,%0d) = %0d want %0d", ga, gb, cpu_host_rdata, u));
    // 2 loads, per iteration 5 instructions + 1 jump bubble + 1 remu stall,
    // final beq taken (+1), sw, ecall, plus one fetch cycle
    check(cpu_retired == 2 + 5 * iters + 3, $sformatf("gcd retired %0d", cpu_retired));
    check(cpu_cycles == 1 + 2 + 7 * iters + 4, $sformatf("gcd cycles %0d", cpu_cycles));
    cpu_run = 0;
    @(negedge clk);
  endtask

  // ---------------- gridding ----------------
  task automatic ska_stream();
    int kern [KS], refg [NPIX], hot [3], pix, kk, vv;
    for (int k = 0; k < KS; k++) begin
      kern[k] = $urandom_range(0, 200) - 100;
      @(negedge clk); ska_kw_en = 1; ska_kw_addr = 4'(k); ska_kw_data = 16'(kern[k]);
    end
    @(negedge clk); ska_kw_en = 0;
    for (int p = 0; p < NPIX; p++) begin
      refg[p] = 0;
      @(negedge clk); ska_host_we = 1; ska_host_addr = 10'(p); ska_host_wdata = 0;
    end
    @(negedge clk); ska_host_we = 0;
    for (int h = 0; h < 3; h++) hot[h] = $urandom_range(0, NPIX - 1);
    for (int n = 0; n < 3000; n++) begin
      pix = ($urandom_range(0, 99) < 50) ? hot[$urandom_range(0, 2)] : $urandom_range(0, NPIX - 1);
      kk = $urandom_range(0, KS - 1);
      vv = $urandom_range(0, 200) - 100;
      refg[pix] += kern[kk] * vv;
      @(negedge clk);
      ska_upd_valid = 1; ska_upd_x = 5'(pix % GWD); ska_upd_y = 5'(pix / GWD);
      ska_upd_k = 4'(kk); ska_upd_v = 16'(vv);
      @(posedge clk);
      while (!ska_upd_ready) @(posedge clk);
    end
    @(negedge clk); ska_upd_valid = 0;
    while (ska_busy) @(negedge clk);
    for (int p = 0; p < NPIX; p++) begin
      @(negedge clk); ska_host_addr = 10'(p);
      @(negedge clk);
      check(ska_host_rdata == refg[p], $sformatf("pixel %0d = %0d want %0d", p, ska_host_rdata, refg[p]));
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    fork
      begin
        slp_run(32'h0000_0003, {1'b0, 15'd40, 16'h0005});
        for (int r = 0; r < 10; r++)
          slp_run({1'b0, 16'($urandom), 15'($urandom_range(0, 7))},
                  {1'b0, 15'($urandom_range(20, 400)), 16'($urandom)});
      end
      begin
        int v;
        v = -5000;
        for (int a = 0; a < BSD; a++) begin
          v += $urandom_range(1, 20);
          arr[a] = v;
          @(negedge clk);
          bs_wr_en = 1; bs_wr_addr = AW'(a); bs_wr_data = v;
          bu_wr_en = 1; bu_wr_addr = AW'(a); bu_wr_data = v;
        end
        @(negedge clk); bs_wr_en = 0; bu_wr_en = 0;
        for (int q = 0; q < 60; q++) begin
          int val;
          val = (q % 2 == 0) ? arr[$urandom_range(0, BSD - 1)] : $urandom_range(0, 22000) - 6000;
          fork
            bs_search(val);
            bu_search(val);
          join
        end
      end
      cd_scenario();
      ska_stream();
      begin
        cpu_gcd(1071, 462);
        cpu_gcd($urandom_range(1, 1000000), $urandom_range(1, 1000000));
      end
    join
    check(n_slp_rb > 0,     "loop rollback happened");
    check(n_slp_stall > 0,  "loop stall happened");
    check(n_bs_mis > 0,     "binary search mispeculation happened");
    check(n_bu_mis1 > 0,    "unrolled first-level mispeculation happened");
    check(n_bu_mis2 > 0,    "unrolled second-level mispeculation happened");
    check(n_cd_mask > 0,    "masked A signal happened");
    check(n_cd_restart > 0, "B restarted by A happened");
    check(n_ska_stall > 0,  "alias stall happened");
    check(n_ska_full > 0,   "gridding input FIFO full happened");
    check(n_cpu_redirect > 0, "processor branch redirect happened");
    check(n_cpu_stall > 0,  "processor multiply/divide stall happened");
    $display("mechanisms: loop rollback %0d, loop stall %0d, bs mispec %0d, bu mispec %0d/%0d, cd masked %0d, cd restart %0d, ska stall %0d, ska fifo full %0d, cpu redirect %0d, cpu md stall %0d",
             n_slp_rb, n_slp_stall, n_bs_mis, n_bu_mis1, n_bu_mis2, n_cd_mask, n_cd_restart, n_ska_stall, n_ska_full, n_cpu_redirect, n_cpu_stall);
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

// tb_ska_gridding: self-checking testbench of ska_gridding.
//
// Loads a random kernel table, clears the grid through the host port,
// then streams updates back to back. Pixel coordinates are drawn from a
// small hot set part of the time so that updates to the same pixel come
// at distances 1, 2, 3 and beyond. A reference grid in the testbench
// accumulates kernel[k]*v. The testbench also predicts when each update
// is accepted (one per cycle, or 4 cycles after an in-flight update to
// the same pixel) and checks the number of stall cycles and of busy
// cycles, then reads the whole grid back and compares it.
module tb_ska_gridding;
  localparam int GWD = 16, GHT = 8, KS = 16;
  localparam int NPIX = GWD * GHT;
  localparam int NUPD = 3000;

  logic clk = 0, rst_n = 0;
  logic upd_valid = 0, upd_ready;
  logic [$clog2(GWD)-1:0] upd_x = '0;
  logic [$clog2(GHT)-1:0] upd_y = '0;
  logic [$clog2(KS)-1:0] upd_k = '0;
  logic signed [15:0] upd_v = '0;
  logic kw_en = 0;
  logic [$clog2(KS)-1:0] kw_addr = '0;
  logic signed [15:0] kw_data = '0;
  logic host_we = 0;
  logic [$clog2(NPIX)-1:0] host_addr = '0;
  logic signed [31:0] host_wdata = '0, host_rdata;
  logic busy, stall_pulse;

  int checks = 0, failures = 0;
  int kern [KS];
  int ref_grid [NPIX];
  int ux [NUPD], uy [NUPD], uk [NUPD], uv [NUPD];
  int n_stall = 0, n_busy = 0;

  ska_gridding #(.GRID_W(GWD), .GRID_H(GHT), .KSIZE(KS)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) begin
    if (rst_n && stall_pulse) n_stall++;
    if (rst_n && busy) n_busy++;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    int acc [NUPD];
    int exp_stall, pix, hot [4], d1, d2, d3;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int k = 0; k < KS; k++) begin
      kern[k] = $urandom_range(0, 2000) - 1000;
      @(negedge clk); kw_en = 1; kw_addr = 4'(k); kw_data = 16'(kern[k]);
    end
    @(negedge clk); kw_en = 0;
    for (int p = 0; p < NPIX; p++) begin
      ref_grid[p] = 0;
      @(negedge clk); host_we = 1; host_addr = 7'(p); host_wdata = 0;
    end
    @(negedge clk); host_we = 0;
    // build the update list and the reference
    for (int h = 0; h < 4; h++) hot[h] = $urandom_range(0, NPIX - 1);
    for (int n = 0; n < NUPD; n++) begin
      pix = ($urandom_range(0, 99) < 40) ? hot[$urandom_range(0, 3)] : $urandom_range(0, NPIX - 1);
      ux[n] = pix % GWD; uy[n] = pix / GWD;
      uk[n] = $urandom_range(0, KS - 1);
      uv[n] = $urandom_range(0, 600) - 300;
      ref_grid[pix] += kern[uk[n]] * uv[n];
    end
    // acceptance times: 4 cycles after an in-flight update to the same pixel
    exp_stall = 0;
    for (int n = 0; n < NUPD; n++) begin
      int t;
      t = (n == 0) ? 0 : acc[n-1] + 1;
      for (int m = (n > 3 ? n - 3 : 0); m < n; m++)
        if (ux[m] == ux[n] && uy[m] == uy[n] && acc[m] + 4 > t) t = acc[m] + 4;
      acc[n] = t;
    end
    exp_stall = acc[NUPD-1] - (NUPD - 1);
    // stream
    n_stall = 0; n_busy = 0;
    for (int n = 0; n < NUPD; n++) begin
      @(negedge clk);
      upd_valid = 1; upd_x = 4'(ux[n]); upd_y = 3'(uy[n]); upd_k = 4'(uk[n]); upd_v = 16'(uv[n]);
      @(posedge clk);
      while (!upd_ready) @(posedge clk);
    end
    @(negedge clk); upd_valid = 0;
    while (busy) @(negedge clk);
    check(n_stall == exp_stall, $sformatf("stall cycles %0d want %0d", n_stall, exp_stall));
    check(n_busy == acc[NUPD-1] + 4, $sformatf("busy cycles %0d want %0d", n_busy, acc[NUPD-1] + 4));
    check(exp_stall > 100, "aliases occurred");
    for (int p = 0; p < NPIX; p++) begin
      @(negedge clk); host_addr = 7'(p);
      @(negedge clk);
      check(host_rdata == ref_grid[p], $sformatf("pixel %0d = %0d want %0d", p, host_rdata, ref_grid[p]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

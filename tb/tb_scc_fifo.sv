// tb_scc_fifo: self-checking testbench of scc_fifo.
//
// Random valid and ready on both sides for many cycles; a queue in the
// testbench is the reference. Checks every word read, the level output,
// that in_ready drops exactly when DEPTH words are held and out_valid
// exactly when none are, and that full and empty both occurred.
module tb_scc_fifo;
  localparam int W = 16, D = 8;

  logic clk = 0, rst_n = 0;
  logic in_valid = 0, out_ready = 0;
  logic [W-1:0] in_data = '0;
  logic in_ready, out_valid;
  logic [W-1:0] out_data;
  logic [$clog2(D):0] level;
  int checks = 0, failures = 0, n_full = 0, n_empty = 0;
  logic [W-1:0] q [$];

  scc_fifo #(.WIDTH(W), .DEPTH(D)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int c = 0; c < 4000; c++) begin
      // phases: fill-biased, drain-biased, balanced
      int pin, pout;
      pin  = (c % 1000 < 300) ? 90 : (c % 1000 < 600) ? 20 : 60;
      pout = (c % 1000 < 300) ? 20 : (c % 1000 < 600) ? 90 : 60;
      in_valid  = $urandom_range(0, 99) < pin;
      out_ready = $urandom_range(0, 99) < pout;
      in_data   = W'($urandom);
      #1;
      check(level == ($clog2(D)+1)'(q.size()), $sformatf("level %0d want %0d", level, q.size()));
      check(in_ready == (q.size() < D), "in_ready");
      check(out_valid == (q.size() > 0), "out_valid");
      if (q.size() == D) n_full++;
      if (q.size() == 0) n_empty++;
      if (out_valid && q.size() > 0) check(out_data == q[0], $sformatf("data %h want %h", out_data, q[0]));
      @(posedge clk);
      if (out_valid && out_ready) void'(q.pop_front());
      if (in_valid && in_ready) q.push_back(in_data);
      @(negedge clk);
    end
    check(n_full > 0 && n_empty > 0, "full and empty both reached");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// delay_line: free-running k-cycle delay (the "k cycles delay" element of
// a speculatively pipelined loop).
//
// A chain of DEPTH registers. tap[k] is the input d as it was k+1 clock
// cycles earlier, so tap[DEPTH-1] is the fully delayed value. Every tap is
// brought out so that the datapath can also read intermediate distances.
// No enable: the loop pipelines it serves advance every cycle. Reset
// clears the chain so that nothing undefined is ever read.
module delay_line #(
  parameter int unsigned WIDTH = 32,
  parameter int unsigned DEPTH = 3
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] tap [DEPTH]
);

  logic [WIDTH-1:0] r [DEPTH];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < int'(DEPTH); k++) r[k] <= '0;
    end else begin
      r[0] <= d;
      for (int k = 1; k < int'(DEPTH); k++) r[k] <= r[k-1];
    end
  end

  assign tap = r;

endmodule

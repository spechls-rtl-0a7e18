// scc_fifo: first-in first-out buffer that decouples two strongly
// connected components (SCCs) of a pipelined loop, so that each side can
// stall or roll back on its own.
//
// Circular buffer of DEPTH entries (a power of two) with read and write
// pointers one bit wider than the address, so full and empty are told
// apart without a counter. Both sides use a valid/ready handshake: a word
// moves when valid and ready are high at a clock edge. out_data shows the
// oldest entry combinationally; a word written into an empty FIFO is
// visible on the next cycle. The FIFO between SCCs is named by SpecHLS;
// its depth, width and handshake are this design's choices. The level
// assertion is disabled while rst_n is low, so lint sees rst_n both as an
// asynchronous reset and as a clocked signal; that use is harmless.
module scc_fifo #(
  parameter int unsigned WIDTH = 32,
  parameter int unsigned DEPTH = 8
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  output logic             in_ready,
  input  logic [WIDTH-1:0] in_data,
  output logic             out_valid,
  input  logic             out_ready,
  output logic [WIDTH-1:0] out_data,
  output logic [$clog2(DEPTH):0] level
);

  localparam int unsigned AW = $clog2(DEPTH);

  logic [WIDTH-1:0] buf_q [DEPTH];
  logic [AW:0]      wp, rp;
  logic             push, pop;

  assign level     = wp - rp;
  assign in_ready  = level != (AW+1)'(DEPTH);
  assign out_valid = level != '0;
  assign push      = in_valid && in_ready;
  assign pop       = out_valid && out_ready;
  assign out_data  = buf_q[rp[AW-1:0]];

  always_ff @(posedge clk) begin
    if (push) buf_q[wp[AW-1:0]] <= in_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp <= '0;
      rp <= '0;
    end else begin
      if (push) wp <= wp + 1'b1;
      if (pop)  rp <= rp + 1'b1;
    end
  end

  // The occupancy never leaves 0..DEPTH.
  a_level: assert property (@(posedge clk) disable iff (!rst_n) level <= (AW+1)'(DEPTH))
    else $error("scc_fifo: occupancy out of range");

endmodule

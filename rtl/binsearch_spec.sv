// binsearch_spec: speculative binary-search accelerator.
//
// Searches a sorted array of signed words held in an internal RAM for
// `value` and returns its index, or `size` when it is absent, with the
// semantics of the classic loop
//     i = 0; j = size-1;
//     while (i <= j) { k = (i+j)/2;
//       if (a[k] < value) i = k+1; else if (a[k] > value) j = k-1; else return k; }
//     return size;
// Two stages. Stage 0 holds (i, j) of the iteration being issued,
// computes k and reads a[k] from the synchronous RAM. Stage 1 compares the
// word with value. The accelerator speculates that the first branch is
// taken: in the cycle after an iteration is issued, the next one is
// already issued with (k+1, j). When stage 1 finds a[k] > value, the
// speculative iteration in stage 0 is dropped and (i, k-1) is issued
// instead. A correct guess costs 1 cycle per iteration, a mispeculation 2
// (CPI 1.5 on uniformly distributed data), as in the SpecHLS binary-search
// example; the pipeline split and the interface are this design's own.
//
// Interface: wr_* loads the array (only while idle). start with value and
// size begins a search; done pulses for one cycle with result, one cycle
// after the deciding comparison. iter_pulse marks each resolved
// iteration, mispec_pulse each mispeculation.
module binsearch_spec #(
  parameter int unsigned DEPTH = 1024,  // array words
  parameter int unsigned DW    = 32     // word width
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     wr_en,
  input  logic [$clog2(DEPTH)-1:0] wr_addr,
  input  logic signed [DW-1:0]     wr_data,
  input  logic                     start,
  input  logic signed [DW-1:0]     value,
  input  logic [$clog2(DEPTH):0]   size,
  output logic                     busy,
  output logic                     done,
  output logic [$clog2(DEPTH):0]   result,
  output logic                     iter_pulse,
  output logic                     mispec_pulse
);

  localparam int unsigned AW = $clog2(DEPTH);
  localparam int unsigned IW = AW + 2;   // signed index: j may reach -1
  typedef logic signed [IW-1:0] idx_t;

  logic signed [DW-1:0] mem [DEPTH];
  logic signed [DW-1:0] rdata;

  // stage 0: issued iteration
  logic s0_v;
  idx_t s0_i, s0_j, s0_k;
  // stage 1: iteration being resolved
  logic s1_v, s1_ok;
  idx_t s1_i, s1_k;

  logic lt, gt, eq, fin, mis;
  logic running;

  assign s0_k = (s0_i + s0_j) >>> 1;

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_addr] <= wr_data;
    rdata <= mem[s0_k[AW-1:0]];
  end

  assign lt  = rdata < value;
  assign gt  = rdata > value;
  assign eq  = !lt && !gt;
  assign fin = s1_v && (!s1_ok || eq);
  assign mis = s1_v && s1_ok && gt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s0_v <= 1'b0; s0_i <= '0; s0_j <= '0;
      s1_v <= 1'b0; s1_ok <= 1'b0; s1_i <= '0; s1_k <= '0;
      running <= 1'b0; done <= 1'b0; result <= '0;
    end else begin
      done <= fin;
      if (fin) result <= !s1_ok ? size : ($clog2(DEPTH)+1)'(s1_k);
      // stage 1 takes the issued iteration unless it was squashed
      s1_v  <= s0_v && !fin && !mis;
      s1_i  <= s0_i;
      s1_k  <= s0_k;
      s1_ok <= s0_i <= s0_j;
      // stage 0: start, rollback or speculative next iteration
      if (start && !running) begin
        s0_v <= 1'b1; s0_i <= '0; s0_j <= idx_t'(size) - 1'b1; running <= 1'b1;
      end else if (fin) begin
        s0_v <= 1'b0; running <= 1'b0;
      end else if (mis) begin
        s0_v <= 1'b1; s0_i <= s1_i; s0_j <= s1_k - 1'b1;
      end else if (s0_v) begin
        s0_i <= s0_k + 1'b1;
      end
    end
  end

  assign busy         = running;
  assign iter_pulse   = s1_v;
  assign mispec_pulse = mis;

endmodule

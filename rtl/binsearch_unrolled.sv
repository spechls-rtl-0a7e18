// binsearch_unrolled: binary search unrolled by two, with two nested
// (data-dominated) speculations.
//
// One unrolled iteration performs two search steps:
//   k1=(3i+j)/4  k2=(i+j)/2  k3=(i+3j)/4
//   d1=a[k2]; c1=d1<value; kp=c1?k3:k1; d2=a[kp]; c2=d2<value;
//   d1==value -> return k2;  d2==value -> return kp;
//   c1&&c2: i=k3+1   c1&&!c2: i=k2+1,j=k3-1   !c1&&c2: i=k1+1,j=k2-1   else j=k1-1
// and the loop runs while i<=j, returning size when it ends.
// Three stages: stage 0 computes k1..k3 and reads a[k2] (RAM port A);
// stage 1 gets d1, forms c1 and kp and reads a[kp] (port B); stage 2 gets
// d2 and c2. The accelerator always issues the next iteration one cycle
// after the previous one with the shortest guess (c1&&c2: i=k3+1). When
// stage 1 finds !c1 it drops that guess and issues the second guess
// (!c1&&c2) one cycle later; when stage 2 finds !c2 it drops everything
// younger and issues the right values. An iteration thus costs 1 cycle
// (c1&&c2), 2 cycles (!c1&&c2) or 3 cycles (!c2): 1.125 cycles per search
// step on uniform data, as in the SpecHLS unrolled binary-search example.
// The stage split, the two-read-port RAM and the interface are this
// design's own.
//
// Interface as binsearch_spec: wr_* loads the array while idle, start
// begins a search, done pulses with result. mispec1_pulse and
// mispec2_pulse mark mispeculations found in stage 1 and stage 2.
module binsearch_unrolled #(
  parameter int unsigned DEPTH = 1024,
  parameter int unsigned DW    = 32
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
  output logic                     mispec1_pulse,
  output logic                     mispec2_pulse
);

  localparam int unsigned AW = $clog2(DEPTH);
  localparam int unsigned IW = AW + 3;
  typedef logic signed [IW-1:0] idx_t;

  typedef struct packed {
    idx_t i, j, k1, k2, k3;
  } iter_t;

  logic signed [DW-1:0] mem [DEPTH];
  logic signed [DW-1:0] d1, d2;

  logic  s0_v, s1_v, s1_ok, s2_v, s2_c1;
  idx_t  s0_i, s0_j;
  iter_t s0, s1, s2;
  idx_t  s1_kp, s2_kp;

  logic c1, eq1, c2, eq2;
  logic fin1, mis1, fin2, mis2;
  logic running;

  always_comb begin
    s0.i  = s0_i;
    s0.j  = s0_j;
    s0.k1 = (3 * s0_i + s0_j) >>> 2;
    s0.k2 = (s0_i + s0_j) >>> 1;
    s0.k3 = (s0_i + 3 * s0_j) >>> 2;
  end

  // stage 1 data and speculation point
  assign c1    = d1 < value;
  assign eq1   = d1 == value;
  assign s1_kp = c1 ? s1.k3 : s1.k1;
  // stage 2 data
  assign c2    = d2 < value;
  assign eq2   = d2 == value;

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_addr] <= wr_data;
    d1 <= mem[s0.k2[AW-1:0]];
    d2 <= mem[s1_kp[AW-1:0]];
  end

  // stage 2 (older) decisions override stage 1 decisions
  assign fin2 = s2_v && eq2;
  assign mis2 = s2_v && !eq2 && !c2;
  assign fin1 = s1_v && !fin2 && !mis2 && (!s1_ok || eq1);
  assign mis1 = s1_v && !fin2 && !mis2 && s1_ok && !eq1 && !c1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s0_v <= 1'b0; s0_i <= '0; s0_j <= '0;
      s1_v <= 1'b0; s1_ok <= 1'b0; s1 <= '0;
      s2_v <= 1'b0; s2_c1 <= 1'b0; s2 <= '0; s2_kp <= '0;
      running <= 1'b0; done <= 1'b0; result <= '0;
    end else begin
      done <= fin1 || fin2;
      if (fin2)      result <= (AW+1)'(s2_kp);
      else if (fin1) result <= !s1_ok ? size : (AW+1)'(s1.k2);
      // stage 2 takes the stage-1 iteration if it is still running
      s2_v  <= s1_v && s1_ok && !eq1 && !fin2 && !mis2;
      s2    <= s1;
      s2_c1 <= c1;
      s2_kp <= s1_kp;
      // stage 1 takes the issued iteration unless it was dropped
      s1_v  <= s0_v && !fin2 && !mis2 && !fin1 && !mis1;
      s1    <= s0;
      s1_ok <= s0_i <= s0_j;
      // stage 0: next iteration
      if (start && !running) begin
        s0_v <= 1'b1; s0_i <= '0; s0_j <= idx_t'(size) - 1'b1; running <= 1'b1;
      end else if (fin1 || fin2) begin
        s0_v <= 1'b0; running <= 1'b0;
      end else if (mis2) begin
        s0_v <= 1'b1;
        if (s2_c1) begin s0_i <= s2.k2 + 1'b1; s0_j <= s2.k3 - 1'b1; end
        else       begin s0_i <= s2.i;         s0_j <= s2.k1 - 1'b1; end
      end else if (mis1) begin
        s0_v <= 1'b1; s0_i <= s1.k1 + 1'b1; s0_j <= s1.k2 - 1'b1;
      end else if (s0_v) begin
        s0_i <= s0.k3 + 1'b1;
      end
    end
  end

  assign busy          = running;
  assign iter_pulse    = s1_v;
  assign mispec1_pulse = mis1;
  assign mispec2_pulse = mis2;

endmodule

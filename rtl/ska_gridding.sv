// ska_gridding: pixel-update pipeline of radio-astronomy gridding with a
// runtime alias check.
//
// Each update (x, y, k, v) adds kernel[k] * v to grid pixel (x, y):
//     grid[y*GRID_W + x] += kernel[k] * v;
// The read-modify-write of the grid is a loop-carried dependency through
// memory whose address depends on the data, so it cannot be pipelined
// statically. The unit speculates that consecutive updates do not touch
// the same pixel and accepts one update per cycle (II=1). An alias check
// compares the incoming pixel index with the indices of the updates
// still in flight and stalls the input while one matches, i.e. whenever
// the read-after-write reuse distance is below 4 updates. The pipeline:
//   S0  alias check, read grid[idx] and kernel[k]      (sync RAMs)
//   S1  multiply kernel word by v
//   S2  add to the grid word
//   S3  write the sum back to grid[idx]
// A read in cycle t+4 sees the write of the update read in cycle t, hence
// the distance of 4. Updates arrive through an scc_fifo that decouples the
// stream producer from this loop. The stall rule (distance 4, II=1) is the
// SpecHLS gridding example's; the operand widths, grid size, the S0..S3
// split and the host ports are this design's own.
//
// Interface: upd_* pushes updates (valid/ready). kw_* writes the kernel
// table. host_* reads and writes grid words while the unit is idle
// (host_rdata follows host_addr one cycle later). busy is high while
// updates are queued or in flight; stall_pulse marks a cycle in which the
// alias check held an update back.
module ska_gridding #(
  parameter int unsigned GRID_W = 32,
  parameter int unsigned GRID_H = 32,
  parameter int unsigned KSIZE  = 16,   // kernel table words
  parameter int unsigned GW     = 32,   // grid word width
  parameter int unsigned VW     = 16,   // sample and kernel word width
  parameter int unsigned FIFO_DEPTH = 8
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          upd_valid,
  output logic                          upd_ready,
  input  logic [$clog2(GRID_W)-1:0]     upd_x,
  input  logic [$clog2(GRID_H)-1:0]     upd_y,
  input  logic [$clog2(KSIZE)-1:0]      upd_k,
  input  logic signed [VW-1:0]          upd_v,
  input  logic                          kw_en,
  input  logic [$clog2(KSIZE)-1:0]      kw_addr,
  input  logic signed [VW-1:0]          kw_data,
  input  logic                          host_we,
  input  logic [$clog2(GRID_W*GRID_H)-1:0] host_addr,
  input  logic signed [GW-1:0]          host_wdata,
  output logic signed [GW-1:0]          host_rdata,
  output logic                          busy,
  output logic                          stall_pulse
);

  localparam int unsigned XW = $clog2(GRID_W);
  localparam int unsigned YW = $clog2(GRID_H);
  localparam int unsigned KW = $clog2(KSIZE);
  localparam int unsigned NPIX = GRID_W * GRID_H;
  localparam int unsigned PW = $clog2(NPIX);

  typedef struct packed {
    logic [YW-1:0]        y;
    logic [XW-1:0]        x;
    logic [KW-1:0]        k;
    logic signed [VW-1:0] v;
  } upd_t;

  logic signed [GW-1:0] grid [NPIX];
  logic signed [VW-1:0] kernel [KSIZE];

  upd_t    f_in, f_out;
  logic    f_valid, f_ready;
  logic [$clog2(FIFO_DEPTH):0] f_level;

  assign f_in = '{y: upd_y, x: upd_x, k: upd_k, v: upd_v};

  scc_fifo #(.WIDTH($bits(upd_t)), .DEPTH(FIFO_DEPTH)) u_fifo (
    .clk, .rst_n,
    .in_valid(upd_valid), .in_ready(upd_ready), .in_data(f_in),
    .out_valid(f_valid), .out_ready(f_ready), .out_data(f_out),
    .level(f_level));

  // in-flight updates
  logic                 s1_v, s2_v, s3_v;
  logic [PW-1:0]        s1_idx, s2_idx, s3_idx;
  logic signed [VW-1:0] s1_smp;
  logic signed [GW-1:0] g_rd, s2_g, s3_sum;
  logic signed [VW-1:0] k_rd;
  logic signed [GW-1:0] s2_prod;

  logic [PW-1:0] s0_idx, rd_addr;
  logic          alias_hit;

  assign s0_idx    = PW'(f_out.y) * PW'(GRID_W) + PW'(f_out.x);
  assign alias_hit = (s1_v && s1_idx == s0_idx) ||
                     (s2_v && s2_idx == s0_idx) ||
                     (s3_v && s3_idx == s0_idx);
  assign f_ready     = !alias_hit;
  assign stall_pulse = f_valid && alias_hit;
  assign rd_addr     = f_valid ? s0_idx : host_addr;

  // memories: grid has one read and one write port, kernel one of each
  always_ff @(posedge clk) begin
    g_rd <= grid[rd_addr];
    k_rd <= kernel[f_out.k];
    if (s3_v)         grid[s3_idx]   <= s3_sum;
    else if (host_we) grid[host_addr] <= host_wdata;
    if (kw_en) kernel[kw_addr] <= kw_data;
  end
  assign host_rdata = g_rd;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1_v <= 1'b0; s2_v <= 1'b0; s3_v <= 1'b0;
      s1_idx <= '0; s2_idx <= '0; s3_idx <= '0;
      s1_smp <= '0; s2_g <= '0; s2_prod <= '0; s3_sum <= '0;
    end else begin
      s1_v   <= f_valid && !alias_hit;
      s1_idx <= s0_idx;
      s1_smp <= f_out.v;
      s2_v    <= s1_v;
      s2_idx  <= s1_idx;
      s2_g    <= g_rd;
      s2_prod <= GW'(k_rd) * GW'(s1_smp);
      s3_v   <= s2_v;
      s3_idx <= s2_idx;
      s3_sum <= s2_g + s2_prod;
    end
  end

  assign busy = f_valid || s1_v || s2_v || s3_v;

endmodule

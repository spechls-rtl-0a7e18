// spechls_top: the speculative loop accelerators side by side.
//
// Speculative loop pipelining keeps a loop at one iteration per cycle
// although its loop-carried dependency passes through long operations: it
// guesses the outcome of a conditional (a gamma node) or the absence of a
// memory alias, issues the next iteration at once, and recovers when the
// guess was wrong. This top holds one accelerator of each kind, each with
// its own ports (prefixes):
//   slp_  slp_loop            generic loop with one speculated gamma node,
//                             its delay lines and speculation FSM
//   bs_   binsearch_spec      binary search, one speculation
//   bu_   binsearch_unrolled  binary search unrolled by two, two nested
//                             (data-dominated) speculations
//   cd_   cd_controller       control logic of two control-dominated gamma
//                             nodes (mask and restart rules)
//   ska_  ska_gridding        gridding pixel update with alias check and
//                             input FIFO
//   cpu_  riscv_opstall       RV32IM pipeline speculating "branch not taken"
//                             and stalling on multiply/divide
// They share only clock and reset. Every block's defaults are used.
module spechls_top
  import spechls_pkg::*;
#(
  parameter int unsigned CPU_IMEM_WORDS = 1024,
  parameter int unsigned CPU_DMEM_WORDS = 1024,
  parameter int unsigned BS_DEPTH = 1024,
  parameter int unsigned SKA_GRID_W = 32,
  parameter int unsigned SKA_GRID_H = 32,
  parameter int unsigned SKA_KSIZE = 16
) (
  input  logic clk,
  input  logic rst_n,
  // generic speculative loop
  input  logic             slp_start,
  input  logic [SLP_W-1:0] slp_x_init,
  input  logic [SLP_W-1:0] slp_z,
  output logic             slp_busy,
  output logic             slp_commit_valid,
  output logic [SLP_W-1:0] slp_x_commit,
  output logic             slp_done,
  output logic [SLP_W-1:0] slp_x_result,
  output logic             slp_mispec,
  output spec_state_e      slp_state,
  // speculative binary search
  input  logic                        bs_wr_en,
  input  logic [$clog2(BS_DEPTH)-1:0] bs_wr_addr,
  input  logic signed [31:0]          bs_wr_data,
  input  logic                        bs_start,
  input  logic signed [31:0]          bs_value,
  input  logic [$clog2(BS_DEPTH):0]   bs_size,
  output logic                        bs_busy,
  output logic                        bs_done,
  output logic [$clog2(BS_DEPTH):0]   bs_result,
  output logic                        bs_iter,
  output logic                        bs_mispec,
  // unrolled speculative binary search
  input  logic                        bu_wr_en,
  input  logic [$clog2(BS_DEPTH)-1:0] bu_wr_addr,
  input  logic signed [31:0]          bu_wr_data,
  input  logic                        bu_start,
  input  logic signed [31:0]          bu_value,
  input  logic [$clog2(BS_DEPTH):0]   bu_size,
  output logic                        bu_busy,
  output logic                        bu_done,
  output logic [$clog2(BS_DEPTH):0]   bu_result,
  output logic                        bu_iter,
  output logic                        bu_mispec1,
  output logic                        bu_mispec2,
  // control-domination controller
  input  logic        cd_start,
  input  logic        cd_stop,
  input  logic        cd_cond_a,
  input  logic        cd_cond_b,
  output spec_state_e cd_state_a,
  output spec_state_e cd_state_b,
  output logic        cd_issue,
  output logic        cd_sel_slow_a,
  output logic        cd_rollback_a,
  output logic        cd_sel_slow_b,
  output logic        cd_rollback_b,
  output logic        cd_commit,
  output logic        cd_mispec_a,
  output logic        cd_mispec_b,
  output logic        cd_masked,
  // gridding pixel update
  input  logic                                    ska_upd_valid,
  output logic                                    ska_upd_ready,
  input  logic [$clog2(SKA_GRID_W)-1:0]           ska_upd_x,
  input  logic [$clog2(SKA_GRID_H)-1:0]           ska_upd_y,
  input  logic [$clog2(SKA_KSIZE)-1:0]            ska_upd_k,
  input  logic signed [15:0]                      ska_upd_v,
  input  logic                                    ska_kw_en,
  input  logic [$clog2(SKA_KSIZE)-1:0]            ska_kw_addr,
  input  logic signed [15:0]                      ska_kw_data,
  input  logic                                    ska_host_we,
  input  logic [$clog2(SKA_GRID_W*SKA_GRID_H)-1:0] ska_host_addr,
  input  logic signed [31:0]                      ska_host_wdata,
  output logic signed [31:0]                      ska_host_rdata,
  output logic                                    ska_busy,
  output logic                                    ska_stall,
  // RV32IM processor
  input  logic        cpu_run,
  input  logic        cpu_host_we,
  input  logic        cpu_host_imem,
  input  logic [31:0] cpu_host_addr,
  input  logic [31:0] cpu_host_wdata,
  output logic [31:0] cpu_host_rdata,
  output logic        cpu_halted,
  output logic [31:0] cpu_retired,
  output logic [31:0] cpu_cycles,
  output logic [31:0] cpu_redirects,
  output logic [31:0] cpu_md_stalls
);

  slp_loop u_slp (
    .clk, .rst_n, .start(slp_start), .x_init(slp_x_init), .z(slp_z),
    .busy(slp_busy), .commit_valid(slp_commit_valid), .x_commit(slp_x_commit),
    .done(slp_done), .x_result(slp_x_result), .mispec_pulse(slp_mispec),
    .state(slp_state));

  binsearch_spec #(.DEPTH(BS_DEPTH)) u_bs (
    .clk, .rst_n, .wr_en(bs_wr_en), .wr_addr(bs_wr_addr), .wr_data(bs_wr_data),
    .start(bs_start), .value(bs_value), .size(bs_size),
    .busy(bs_busy), .done(bs_done), .result(bs_result),
    .iter_pulse(bs_iter), .mispec_pulse(bs_mispec));

  binsearch_unrolled #(.DEPTH(BS_DEPTH)) u_bu (
    .clk, .rst_n, .wr_en(bu_wr_en), .wr_addr(bu_wr_addr), .wr_data(bu_wr_data),
    .start(bu_start), .value(bu_value), .size(bu_size),
    .busy(bu_busy), .done(bu_done), .result(bu_result),
    .iter_pulse(bu_iter), .mispec1_pulse(bu_mispec1), .mispec2_pulse(bu_mispec2));

  cd_controller u_cd (
    .clk, .rst_n, .start(cd_start), .stop(cd_stop),
    .cond_a(cd_cond_a), .cond_b(cd_cond_b),
    .state_a(cd_state_a), .state_b(cd_state_b), .issue(cd_issue),
    .sel_slow_a(cd_sel_slow_a), .rollback_a(cd_rollback_a),
    .sel_slow_b(cd_sel_slow_b), .rollback_b(cd_rollback_b),
    .commit(cd_commit), .mispec_a(cd_mispec_a), .mispec_b(cd_mispec_b),
    .masked_pulse(cd_masked));

  ska_gridding #(.GRID_W(SKA_GRID_W), .GRID_H(SKA_GRID_H), .KSIZE(SKA_KSIZE)) u_ska (
    .clk, .rst_n,
    .upd_valid(ska_upd_valid), .upd_ready(ska_upd_ready),
    .upd_x(ska_upd_x), .upd_y(ska_upd_y), .upd_k(ska_upd_k), .upd_v(ska_upd_v),
    .kw_en(ska_kw_en), .kw_addr(ska_kw_addr), .kw_data(ska_kw_data),
    .host_we(ska_host_we), .host_addr(ska_host_addr), .host_wdata(ska_host_wdata),
    .host_rdata(ska_host_rdata), .busy(ska_busy), .stall_pulse(ska_stall));

  riscv_opstall #(.IMEM_WORDS(CPU_IMEM_WORDS), .DMEM_WORDS(CPU_DMEM_WORDS)) u_cpu (
    .clk, .rst_n, .run(cpu_run),
    .host_we(cpu_host_we), .host_imem(cpu_host_imem), .host_addr(cpu_host_addr),
    .host_wdata(cpu_host_wdata), .host_rdata(cpu_host_rdata),
    .halted(cpu_halted), .retired(cpu_retired), .cycles(cpu_cycles),
    .redirects(cpu_redirects), .md_stalls(cpu_md_stalls));

endmodule

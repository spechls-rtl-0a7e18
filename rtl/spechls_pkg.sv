// spechls_pkg: types and example operators shared by the speculative
// loop accelerators.
//
// spec_state_e encodes the states of the speculation-controlling FSM:
// Fill (the condition pipeline is refilling, nothing is resolved yet),
// Proceed (one condition is resolved per cycle and the speculated
// iteration commits), Stall (waiting for the slow path after a
// mispeculation) and Rollback (the slow-path value replaces the
// speculated one). The four states and their meaning follow the
// speculation FSM of the SpecHLS flow; Idle is this design's own state
// for "no loop running".
//
// The slp_* functions are the example operators of the generic
// speculative loop  do { if (C(x,z)) x = S(x); else x = F(x); } while (!x);
// The loop itself leaves F, S and C abstract. The operators here are
// this design's choice, picked so that the slow path is taken on about
// one iteration in eight and the loop runs for a controllable number of
// iterations. x is read as "zero" (loop continues) while its top bit is
// clear; the top bit is the stop flag.
package spechls_pkg;

  typedef enum logic [2:0] {
    ST_IDLE     = 3'd0,
    ST_FILL     = 3'd1,
    ST_PROCEED  = 3'd2,
    ST_STALL    = 3'd3,
    ST_ROLLBACK = 3'd4
  } spec_state_e;

  localparam int unsigned SLP_W = 32;

  // Condition C(x, z): slow path when the low three bits of x equal those of z.
  function automatic logic slp_cond(input logic [SLP_W-1:0] x, input logic [SLP_W-1:0] z);
    return (x[2:0] == z[2:0]);
  endfunction

  // Stop flag: set once the counter field reaches the limit held in z[30:16].
  function automatic logic [SLP_W-1:0] slp_mark(input logic [SLP_W-2:0] v,
                                                input logic [SLP_W-1:0] z);
    logic [SLP_W-1:0] r;
    r = {1'b0, v};
    if (v[14:0] >= z[30:16]) r[SLP_W-1] = 1'b1;
    return r;
  endfunction

  // Fast path F(x): count up by one.
  function automatic logic [SLP_W-1:0] slp_fast(input logic [SLP_W-1:0] x, input logic [SLP_W-1:0] z);
    logic [SLP_W-2:0] v;
    v = x[SLP_W-2:0] + 1'b1;
    return slp_mark(v, z);
  endfunction

  // Slow path S(x): count up by three and scramble the bits above the counter field.
  function automatic logic [SLP_W-1:0] slp_slow(input logic [SLP_W-1:0] x, input logic [SLP_W-1:0] z);
    logic [SLP_W-2:0] v;
    v        = x[SLP_W-2:0];
    v[14:0]  = v[14:0] + 15'd3;
    v[30:15] = (v[30:15] * 16'd5) ^ z[15:0];
    return slp_mark(v, z);
  endfunction

endpackage

// spec_fsm: speculation-controlling FSM of a speculatively pipelined loop.
//
// The loop issues one iteration per cycle along the fast (speculated)
// path. The condition of an iteration is known CTRL_LAT cycles after it
// was issued and the slow-path value SLOW_LAT cycles after it was issued.
// The FSM walks through four states:
//   Fill     - CTRL_LAT-1 cycles after a (re)start; iterations are issued
//              but no condition has come back yet.
//   Proceed  - one condition resolves per cycle. A fast outcome commits
//              the iteration (commit=1). A slow outcome (mispec=1) is a
//              mispeculation: every younger iteration is discarded.
//   Stall    - SLOW_LAT-CTRL_LAT-1 cycles waiting for the slow result;
//              skipped when that number is zero.
//   Rollback - one cycle: the slow value is selected (sel_slow=1) and
//              issued, then Fill starts again.
// The state set, the counter loaded with 2 on the way into Fill and with 1
// on the way into Stall, and the "c := c-1 until c == 0" self loops follow
// the SpecHLS speculation FSM for CTRL_LAT=3, SLOW_LAT=5. Deriving both
// loads from the two latencies, the Idle state, the start/stop handshake
// and the flush input (used by cd_controller to restart this FSM from an
// outer rollback) are this design's choices.
//
// Interface: start (in Idle) begins a loop, stop (any state) ends it.
// mispec is sampled only in Proceed. issue tells the datapath whether a
// new iteration enters the pipeline this cycle. All outputs are decoded
// combinationally from the registered state and the inputs of this cycle.
module spec_fsm
  import spechls_pkg::*;
#(
  parameter int unsigned CTRL_LAT = 3,  // condition latency (cycles)
  parameter int unsigned SLOW_LAT = 5   // slow-path latency (cycles)
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  logic        stop,
  input  logic        flush,
  input  logic        mispec,
  output spec_state_e state,
  output logic        issue,
  output logic        sel_slow,
  output logic        rollback,
  output logic        commit
);

  localparam int unsigned FILL_CYC  = CTRL_LAT - 1;
  localparam int unsigned STALL_CYC = SLOW_LAT - CTRL_LAT - 1;
  localparam int unsigned CW        = $clog2(SLOW_LAT + 1);

  initial begin
    assert (SLOW_LAT > CTRL_LAT && CTRL_LAT >= 1)
      else $error("spec_fsm: need SLOW_LAT > CTRL_LAT >= 1");
  end

  spec_state_e st_q, st_d;
  logic [CW-1:0] c_q, c_d;

  // Entering Fill: the counter holds the number of Fill cycles left.
  function automatic void enter_fill(output spec_state_e s, output logic [CW-1:0] c);
    if (FILL_CYC == 0) begin
      s = ST_PROCEED;
      c = '0;
    end else begin
      s = ST_FILL;
      c = CW'(FILL_CYC);
    end
  endfunction

  always_comb begin
    st_d = st_q;
    c_d  = c_q;
    unique case (st_q)
      ST_IDLE: if (start) enter_fill(st_d, c_d);
      ST_FILL: begin
        c_d = c_q - 1'b1;
        if (c_d == '0) st_d = ST_PROCEED;
      end
      ST_PROCEED: if (mispec) begin
        if (STALL_CYC == 0) st_d = ST_ROLLBACK;
        else begin
          st_d = ST_STALL;
          c_d  = CW'(STALL_CYC);
        end
      end
      ST_STALL: begin
        c_d = c_q - 1'b1;
        if (c_d == '0) st_d = ST_ROLLBACK;
      end
      ST_ROLLBACK: enter_fill(st_d, c_d);
      default: st_d = ST_IDLE;
    endcase
    if (flush && st_q != ST_IDLE) enter_fill(st_d, c_d);
    if (stop) begin
      st_d = ST_IDLE;
      c_d  = '0;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st_q <= ST_IDLE;
      c_q  <= '0;
    end else begin
      st_q <= st_d;
      c_q  <= c_d;
    end
  end

  assign state    = st_q;
  assign sel_slow = (st_q == ST_ROLLBACK);
  assign rollback = (st_q == ST_ROLLBACK);
  assign commit   = (st_q == ST_PROCEED) && !mispec;
  assign issue    = !stop && !flush &&
                    ((st_q == ST_IDLE && start) || st_q == ST_FILL ||
                     (st_q == ST_PROCEED && !mispec) || st_q == ST_ROLLBACK);

endmodule

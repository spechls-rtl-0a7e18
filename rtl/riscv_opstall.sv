// riscv_opstall: in-order pipelined RV32IM processor, "OpStall" style.
//
// The point of this core is its speculation scheme. The next pc is a
// gamma node that would have to wait for the branch decision; instead the
// core speculates that no branch or jump is taken and fetches pc+4 every
// cycle (II=1). When the execute stage finds a taken branch or a jump, the
// one wrongly fetched instruction is discarded and fetch restarts at the
// target (one lost cycle). Multiplications and divisions do not speculate:
// the pipeline stalls while one is issued (MD_LAT cycles in execute).
// Register values come from the register file or, for the instruction
// just ahead, from the write-back stage (the delayed values that feed the
// register gamma node), so there are no register stalls.
//
//   F  fetch: instruction RAM read at fetch_pc (synchronous)
//   X  decode, register read with bypass, ALU, branch resolution, data
//      RAM access (synchronous), multiply/divide
//   W  load alignment and register write
//
// Speculating "no branch taken" and stalling on multiplications are the
// OpStall configuration of the SpecHLS RISC-V example; the three-stage
// split, MD_LAT, memory sizes, the halting rule and the host port are this
// design's own. FENCE and CSR instructions execute as no-ops; ECALL and
// EBREAK halt the core. Misaligned accesses are not trapped.
//
// Interface: with run low the host reads and writes the memories
// (host_imem selects the instruction RAM, host_rdata follows host_addr by
// one cycle, data RAM only). Raising run starts execution at pc 0 from a
// cleared register file; halted rises when ECALL/EBREAK reaches execute
// and stays high until run is lowered.
// retired counts executed instructions, cycles the cycles since run rose,
// redirects the discarded fetches and md_stalls the stall cycles.
module riscv_opstall
  import rv32_pkg::*;
#(
  parameter int unsigned IMEM_WORDS = 1024,
  parameter int unsigned DMEM_WORDS = 1024,
  parameter int unsigned MD_LAT     = 2     // cycles a mul/div spends in X
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        run,
  input  logic        host_we,
  input  logic        host_imem,
  input  logic [31:0] host_addr,     // word address
  input  logic [31:0] host_wdata,
  output logic [31:0] host_rdata,
  output logic        halted,
  output logic [31:0] retired,
  output logic [31:0] cycles,
  output logic [31:0] redirects,
  output logic [31:0] md_stalls
);

  localparam int unsigned IAW = $clog2(IMEM_WORDS);
  localparam int unsigned DAW = $clog2(DMEM_WORDS);

  logic [31:0] imem [IMEM_WORDS];
  logic [31:0] dmem [DMEM_WORDS];
  logic [31:0] regs [32];

  logic        active;          // running and not halted
  logic        started;

  // F
  logic [31:0] fetch_pc;
  // X
  logic        x_valid;
  logic [31:0] x_pc, x_ins;
  // W
  logic        w_valid, w_wen, w_load;
  logic [4:0]  w_rd;
  logic [31:0] w_res;
  logic [2:0]  w_f3;
  logic [1:0]  w_off;
  logic [31:0] d_rdata, w_value;

  // ---------------- decode ----------------
  opcode_e     opc;
  logic [4:0]  rs1, rs2, rd;
  logic [2:0]  f3;
  logic [6:0]  f7;
  logic [31:0] a, b, res, target, mem_addr;
  logic        is_md, taken, wen, is_load, is_store, is_halt;
  logic        stall, redirect;
  logic [$clog2(MD_LAT+1)-1:0] md_cnt;

  assign opc = opcode_e'(x_ins[6:0]);
  assign rd  = x_ins[11:7];
  assign f3  = x_ins[14:12];
  assign rs1 = x_ins[19:15];
  assign rs2 = x_ins[24:20];
  assign f7  = x_ins[31:25];

  // W-stage value (bypass source and register write data)
  always_comb begin
    logic [31:0] sh;
    sh = d_rdata >> (8 * w_off);
    w_value = w_res;
    if (w_load) begin
      unique case (w_f3)
        3'd0:    w_value = {{24{sh[7]}}, sh[7:0]};
        3'd1:    w_value = {{16{sh[15]}}, sh[15:0]};
        3'd4:    w_value = {24'd0, sh[7:0]};
        3'd5:    w_value = {16'd0, sh[15:0]};
        default: w_value = d_rdata;
      endcase
    end
  end

  // register read with bypass from W
  always_comb begin
    a = (rs1 == 5'd0) ? 32'd0 : regs[rs1];
    b = (rs2 == 5'd0) ? 32'd0 : regs[rs2];
    if (w_valid && w_wen && w_rd != 5'd0 && w_rd == rs1) a = w_value;
    if (w_valid && w_wen && w_rd != 5'd0 && w_rd == rs2) b = w_value;
  end

  // execute
  always_comb begin
    logic [31:0] op2;
    logic        alt;
    res      = 32'd0;
    taken    = 1'b0;
    target   = x_pc + imm_b(x_ins);
    wen      = 1'b0;
    is_md    = 1'b0;
    is_load  = 1'b0;
    is_store = 1'b0;
    is_halt  = 1'b0;
    mem_addr = a + imm_i(x_ins);
    op2      = (opc == OPC_OP) ? b : imm_i(x_ins);
    alt      = (opc == OPC_OP) ? f7[5] : (f3 == 3'd5 && f7[5]);
    unique case (opc)
      OPC_LUI:   begin res = imm_u(x_ins); wen = 1'b1; end
      OPC_AUIPC: begin res = x_pc + imm_u(x_ins); wen = 1'b1; end
      OPC_JAL:   begin res = x_pc + 32'd4; wen = 1'b1; taken = 1'b1; target = x_pc + imm_j(x_ins); end
      OPC_JALR:  begin res = x_pc + 32'd4; wen = 1'b1; taken = 1'b1; target = (a + imm_i(x_ins)) & ~32'd1; end
      OPC_BRANCH: begin
        unique case (f3)
          3'd0:    taken = (a == b);
          3'd1:    taken = (a != b);
          3'd4:    taken = ($signed(a) < $signed(b));
          3'd5:    taken = ($signed(a) >= $signed(b));
          3'd6:    taken = (a < b);
          3'd7:    taken = (a >= b);
          default: taken = 1'b0;
        endcase
      end
      OPC_LOAD:  begin is_load = 1'b1; wen = 1'b1; end
      OPC_STORE: begin is_store = 1'b1; mem_addr = a + imm_s(x_ins); end
      OPC_OPIMM, OPC_OP: begin
        wen = 1'b1;
        if (opc == OPC_OP && f7 == 7'b0000001) begin
          is_md = 1'b1;
          res   = muldiv(f3, a, b);
        end else begin
          unique case (f3)
            3'd0:    res = (opc == OPC_OP && alt) ? a - op2 : a + op2;
            3'd1:    res = a << op2[4:0];
            3'd2:    res = {31'd0, $signed(a) < $signed(op2)};
            3'd3:    res = {31'd0, a < op2};
            3'd4:    res = a ^ op2;
            3'd5:    res = alt ? 32'($signed(a) >>> op2[4:0]) : a >> op2[4:0];
            3'd6:    res = a | op2;
            default: res = a & op2;
          endcase
        end
      end
      OPC_SYSTEM: is_halt = (f3 == 3'd0);
      default: ;
    endcase
  end

  assign stall    = active && x_valid && is_md && (md_cnt != $clog2(MD_LAT+1)'(MD_LAT - 1));
  assign redirect = active && x_valid && taken;

  // ---------------- memories ----------------
  logic [DAW-1:0] d_addr;
  logic [3:0]     d_be;
  logic [31:0]    d_wdata;
  logic           d_we;

  always_comb begin
    d_addr  = active ? mem_addr[DAW+1:2] : host_addr[DAW-1:0];
    d_we    = active ? (x_valid && is_store) : (host_we && !host_imem);
    d_wdata = active ? (b << (8 * mem_addr[1:0])) : host_wdata;
    d_be    = 4'b1111;
    if (active) begin
      unique case (f3[1:0])
        2'd0:    d_be = 4'b0001 << mem_addr[1:0];
        2'd1:    d_be = 4'b0011 << mem_addr[1:0];
        default: d_be = 4'b1111;
      endcase
    end
  end

  always_ff @(posedge clk) begin
    if (d_we) begin
      for (int k = 0; k < 4; k++)
        if (d_be[k]) dmem[d_addr][8*k +: 8] <= d_wdata[8*k +: 8];
    end
    d_rdata <= dmem[d_addr];
    if (!active && host_we && host_imem) imem[host_addr[IAW-1:0]] <= host_wdata;
    if (active && !stall) x_ins <= imem[fetch_pc[IAW+1:2]];
  end
  assign host_rdata = d_rdata;

  // register file (written from W)
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < 32; k++) regs[k] <= 32'd0;
    end else if (run && !started) begin
      for (int k = 0; k < 32; k++) regs[k] <= 32'd0;
    end else if (w_valid && w_wen && w_rd != 5'd0) begin
      regs[w_rd] <= w_value;
    end
  end

  // ---------------- pipeline control ----------------
  assign active = started && !halted;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      started <= 1'b0; halted <= 1'b0;
      fetch_pc <= '0; x_valid <= 1'b0; x_pc <= '0;
      w_valid <= 1'b0; w_wen <= 1'b0; w_load <= 1'b0; w_rd <= '0; w_res <= '0; w_f3 <= '0; w_off <= '0;
      md_cnt <= '0;
      retired <= '0; cycles <= '0; redirects <= '0; md_stalls <= '0;
    end else if (run && !started) begin
      started <= 1'b1; halted <= 1'b0;
      fetch_pc <= '0; x_valid <= 1'b0;
      w_valid <= 1'b0;
      md_cnt <= '0;
      retired <= '0; cycles <= '0; redirects <= '0; md_stalls <= '0;
    end else if (!run) begin
      started <= 1'b0;
      halted  <= 1'b0;
    end else if (active) begin
      cycles <= cycles + 1'b1;
      if (stall) begin
        md_cnt    <= md_cnt + 1'b1;
        md_stalls <= md_stalls + 1'b1;
        w_valid   <= 1'b0;
      end else begin
        md_cnt  <= '0;
        // X -> W
        w_valid <= x_valid && !is_halt;
        w_wen   <= wen;
        w_load  <= is_load;
        w_rd    <= rd;
        w_res   <= res;
        w_f3    <= f3;
        w_off   <= mem_addr[1:0];
        if (x_valid) retired <= retired + 1'b1;
        if (x_valid && is_halt) halted <= 1'b1;
        // F -> X, with the speculated pc+4 or the resolved target
        x_pc    <= fetch_pc;
        x_valid <= !redirect;
        if (redirect) begin
          fetch_pc  <= target;
          redirects <= redirects + 1'b1;
        end else begin
          fetch_pc <= fetch_pc + 32'd4;
        end
      end
    end else begin
      w_valid <= 1'b0;   // halted: let the last write-back finish
    end
  end

endmodule

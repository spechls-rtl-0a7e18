// rv32_pkg: RV32IM opcodes and instruction fields used by riscv_opstall.
// Values are those of the RISC-V unprivileged ISA.
package rv32_pkg;

  typedef enum logic [6:0] {
    OPC_LUI    = 7'b0110111,
    OPC_AUIPC  = 7'b0010111,
    OPC_JAL    = 7'b1101111,
    OPC_JALR   = 7'b1100111,
    OPC_BRANCH = 7'b1100011,
    OPC_LOAD   = 7'b0000011,
    OPC_STORE  = 7'b0100011,
    OPC_OPIMM  = 7'b0010011,
    OPC_OP     = 7'b0110011,
    OPC_FENCE  = 7'b0001111,
    OPC_SYSTEM = 7'b1110011
  } opcode_e;

  function automatic logic [31:0] imm_i(input logic [31:0] ins);
    return {{20{ins[31]}}, ins[31:20]};
  endfunction
  function automatic logic [31:0] imm_s(input logic [31:0] ins);
    return {{20{ins[31]}}, ins[31:25], ins[11:7]};
  endfunction
  function automatic logic [31:0] imm_b(input logic [31:0] ins);
    return {{19{ins[31]}}, ins[31], ins[7], ins[30:25], ins[11:8], 1'b0};
  endfunction
  function automatic logic [31:0] imm_u(input logic [31:0] ins);
    return {ins[31:12], 12'd0};
  endfunction
  function automatic logic [31:0] imm_j(input logic [31:0] ins);
    return {{11{ins[31]}}, ins[31], ins[19:12], ins[20], ins[30:21], 1'b0};
  endfunction

  // RV32M: MUL, MULH, MULHSU, MULHU, DIV, DIVU, REM, REMU (funct3 0..7)
  function automatic logic [31:0] muldiv(input logic [2:0] f3, input logic [31:0] a, input logic [31:0] b);
    logic signed [63:0] p;
    logic signed [32:0] as, bs;
    case (f3)
      3'd0, 3'd1, 3'd2, 3'd3: begin
        as = (f3 == 3'd3) ? {1'b0, a} : {a[31], a};
        bs = (f3 == 3'd2 || f3 == 3'd3) ? {1'b0, b} : {b[31], b};
        p  = 64'(as) * 64'(bs);
        return (f3 == 3'd0) ? p[31:0] : p[63:32];
      end
      3'd4: begin
        if (b == 0) return 32'hffff_ffff;
        if (a == 32'h8000_0000 && b == 32'hffff_ffff) return a;
        return 32'($signed(a) / $signed(b));
      end
      3'd5: begin
        if (b == 0) return 32'hffff_ffff;
        return a / b;
      end
      3'd6: begin
        if (b == 0) return a;
        if (a == 32'h8000_0000 && b == 32'hffff_ffff) return 32'd0;
        return 32'($signed(a) % $signed(b));
      end
      default: begin
        if (b == 0) return a;
        return a % b;
      end
    endcase
  endfunction

endpackage

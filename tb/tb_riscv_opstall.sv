// tb_riscv_opstall: self-checking testbench of riscv_opstall.
//
// Programs are assembled in the testbench (small encoder functions) and
// run on the core and on an instruction-set simulator written here. The
// programs: an instruction-coverage test (every RV32IM operation, loads
// and stores of every size, branches taken and not taken, call/return),
// gcd (Euclid with remu), a 4x4 integer matrix product (mul) and the
// median of nine values (insertion sort). After each run the whole data
// memory is read back and compared with the simulator's, and the cycle
// count is checked against 1 + instructions + taken branches/jumps +
// (MD_LAT-1) per multiply/divide. The kernels' results are also checked
// against values computed directly.
module tb_riscv_opstall;
  localparam int IW = 1024, DW = 1024, MD_LAT = 2;

  logic clk = 0, rst_n = 0;
  logic run = 0, host_we = 0, host_imem = 0;
  logic [31:0] host_addr = '0, host_wdata = '0, host_rdata;
  logic halted;
  logic [31:0] retired, cycles, redirects, md_stalls;
  int checks = 0, failures = 0;

  riscv_opstall dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // ---------------- assembler ----------------
  logic [31:0] prog [$];
  function automatic logic [31:0] r_t(int f7, int f3, int rd, int rs1, int rs2);
    return {7'(f7), 5'(rs2), 5'(rs1), 3'(f3), 5'(rd), 7'b0110011};
  endfunction
  function automatic logic [31:0] i_t(int opc, int f3, int rd, int rs1, int imm);
    return {12'(imm), 5'(rs1), 3'(f3), 5'(rd), 7'(opc)};
  endfunction
  function automatic logic [31:0] s_t(int f3, int rs1, int rs2, int imm);
    logic [11:0] m; m = 12'(imm);
    return {m[11:5], 5'(rs2), 5'(rs1), 3'(f3), m[4:0], 7'b0100011};
  endfunction
  function automatic logic [31:0] b_t(int f3, int rs1, int rs2, int imm);
    logic [12:0] m; m = 13'(imm);
    return {m[12], m[10:5], 5'(rs2), 5'(rs1), 3'(f3), m[4:1], m[11], 7'b1100011};
  endfunction
  function automatic logic [31:0] u_t(int opc, int rd, int imm20);
    return {20'(imm20), 5'(rd), 7'(opc)};
  endfunction
  function automatic logic [31:0] j_t(int rd, int imm);
    logic [20:0] m; m = 21'(imm);
    return {m[20], m[10:1], m[11], m[19:12], 5'(rd), 7'b1101111};
  endfunction
  function automatic void addi(int rd, int rs1, int imm); prog.push_back(i_t(7'h13, 0, rd, rs1, imm)); endfunction
  function automatic void lw(int rd, int rs1, int imm);   prog.push_back(i_t(7'h03, 2, rd, rs1, imm)); endfunction
  function automatic void sw(int rs2, int rs1, int imm);  prog.push_back(s_t(2, rs1, rs2, imm)); endfunction
  function automatic void ecall();                        prog.push_back(32'h0000_0073); endfunction

  // ---------------- instruction-set simulator ----------------
  logic [31:0] smem [DW];
  int s_n, s_taken, s_md;

  function automatic logic [31:0] ld(logic [31:0] addr, int f3);
    logic [31:0] w, sh;
    w = smem[addr[11:2]]; sh = w >> (8 * addr[1:0]);
    case (f3)
      0: return {{24{sh[7]}}, sh[7:0]};
      1: return {{16{sh[15]}}, sh[15:0]};
      4: return {24'd0, sh[7:0]};
      5: return {16'd0, sh[15:0]};
      default: return w;
    endcase
  endfunction

  task automatic iss();
    logic [31:0] x [32], pc, ins, a, b, r, imm, addr;
    logic signed [63:0] p;
    int f3, f7, rd, opc;
    bit wr;
    for (int k = 0; k < 32; k++) x[k] = 0;
    pc = 0; s_n = 0; s_taken = 0; s_md = 0;
    forever begin
      ins = prog[pc >> 2];
      opc = ins[6:0]; rd = ins[11:7]; f3 = ins[14:12]; f7 = ins[31:25];
      a = x[ins[19:15]]; b = x[ins[24:20]];
      s_n++; wr = 1; r = 0;
      if (ins == 32'h73) break;
      case (opc)
        7'h37: r = {ins[31:12], 12'd0};
        7'h17: r = pc + {ins[31:12], 12'd0};
        7'h6f: begin r = pc + 4; s_taken++;
                 pc = pc + {{11{ins[31]}}, ins[31], ins[19:12], ins[20], ins[30:21], 1'b0} - 4; end
        7'h67: begin r = pc + 4; s_taken++; pc = ((a + {{20{ins[31]}}, ins[31:20]}) & ~32'd1) - 4; end
        7'h63: begin
          bit t;
          wr = 0;
          case (f3)
            0: t = a == b; 1: t = a != b;
            4: t = $signed(a) < $signed(b); 5: t = $signed(a) >= $signed(b);
            6: t = a < b; default: t = a >= b;
          endcase
          if (t) begin
            s_taken++;
            pc = pc + {{19{ins[31]}}, ins[31], ins[7], ins[30:25], ins[11:8], 1'b0} - 4;
          end
        end
        7'h03: r = ld(a + {{20{ins[31]}}, ins[31:20]}, f3);
        7'h23: begin
          logic [31:0] w;
          wr = 0;
          addr = a + {{20{ins[31]}}, ins[31:25], ins[11:7]};
          w = smem[addr[11:2]];
          case (f3)
            0: w[8*addr[1:0] +: 8] = b[7:0];
            1: w[8*addr[1:0] +: 16] = b[15:0];
            default: w = b;
          endcase
          smem[addr[11:2]] = w;
        end
        7'h13, 7'h33: begin
          imm = (opc == 7'h33) ? b : {{20{ins[31]}}, ins[31:20]};
          if (opc == 7'h33 && f7 == 1) begin
            s_md++;
            case (f3)
              0: begin p = $signed(a) * $signed(b); r = p[31:0]; end
              1: begin p = $signed({{32{a[31]}}, a}) * $signed({{32{b[31]}}, b}); r = p[63:32]; end
              2: begin p = $signed({{32{a[31]}}, a}) * $signed({32'd0, b}); r = p[63:32]; end
              3: begin p = {32'd0, a} * {32'd0, b}; r = p[63:32]; end
              4: begin
                   if (b == 0) r = 32'hffffffff;
                   else if (a == 32'h80000000 && b == 32'hffffffff) r = a;
                   else r = $signed(a) / $signed(b);
                 end
              5: r = (b == 0) ? 32'hffffffff : a / b;
              6: begin
                   if (b == 0) r = a;
                   else if (a == 32'h80000000 && b == 32'hffffffff) r = 0;
                   else r = $signed(a) % $signed(b);
                 end
              default: r = (b == 0) ? a : a % b;
            endcase
          end else begin
            case (f3)
              0: r = (opc == 7'h33 && f7 == 7'h20) ? a - imm : a + imm;
              1: r = a << imm[4:0];
              2: r = $signed(a) < $signed(imm);
              3: r = a < imm;
              4: r = a ^ imm;
              5: begin
                   if (f7[5]) r = $signed(a) >>> imm[4:0];
                   else r = a >> imm[4:0];
                 end
              6: r = a | imm;
              default: r = a & imm;
            endcase
          end
        end
        default: wr = 0;
      endcase
      if (wr && rd != 0) x[rd] = r;
      pc = pc + 4;
    end
  endtask

  // ---------------- run one program on both ----------------
  task automatic run_prog(input string name, input logic [31:0] init [DW]);
    int exp_cyc;
    for (int k = 0; k < DW; k++) smem[k] = init[k];
    iss();
    // load the core
    @(negedge clk);
    for (int k = 0; k < prog.size(); k++) begin
      host_we = 1; host_imem = 1; host_addr = k; host_wdata = prog[k];
      @(negedge clk);
    end
    for (int k = 0; k < DW; k++) begin
      host_we = 1; host_imem = 0; host_addr = k; host_wdata = init[k];
      @(negedge clk);
    end
    host_we = 0;
    run = 1;
    while (!halted) @(negedge clk);
    @(negedge clk);
    exp_cyc = 1 + s_n + s_taken + s_md * (MD_LAT - 1);
    check(retired == s_n, $sformatf("%s: retired %0d want %0d", name, retired, s_n));
    check(cycles == exp_cyc, $sformatf("%s: cycles %0d want %0d", name, cycles, exp_cyc));
    check(redirects == s_taken, $sformatf("%s: redirects %0d want %0d", name, redirects, s_taken));
    check(md_stalls == s_md * (MD_LAT - 1), $sformatf("%s: md stalls %0d", name, md_stalls));
    for (int k = 0; k < DW; k++) begin
      host_addr = k;
      @(negedge clk);
      check(host_rdata == smem[k], $sformatf("%s: mem[%0d] = %h want %h", name, k, host_rdata, smem[k]));
    end
    $display("%s: %0d instructions, %0d cycles, CPI %0d.%02d", name, retired, cycles,
             cycles / retired, (cycles * 100 / retired) % 100);
    run = 0;
    @(negedge clk);
  endtask

  logic [31:0] init [DW];

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;

    // ---- coverage program ----
    begin
      int o;
      for (int k = 0; k < DW; k++) init[k] = 0;
      prog.delete();
      prog.push_back(u_t(7'h37, 1, 32'h80000));        // x1 = 0x80000000
      addi(2, 0, -7);                                  // x2 = -7
      addi(3, 0, 3);                                   // x3 = 3
      addi(5, 0, 0);                                   // x5 = 0
      addi(6, 0, -1);                                  // x6 = -1
      prog.push_back(u_t(7'h37, 7, 32'h12345));        // x7 = 0x12345678
      addi(7, 7, 12'h678);
      o = 1024;
      for (int f7 = 0; f7 < 3; f7++)
        for (int f3 = 0; f3 < 8; f3++) begin
          int ff7;
          ff7 = (f7 == 0) ? 0 : (f7 == 1) ? 1 : 7'h20;
          if (ff7 == 7'h20 && f3 != 0 && f3 != 5) continue;
          for (int pr = 0; pr < 6; pr++) begin
            int ra, rb;
            ra = (pr == 0) ? 1 : (pr == 1) ? 2 : (pr == 2) ? 7 : (pr == 3) ? 6 : (pr == 4) ? 2 : 7;
            rb = (pr == 0) ? 6 : (pr == 1) ? 3 : (pr == 2) ? 2 : (pr == 3) ? 5 : (pr == 4) ? 2 : 3;
            prog.push_back(r_t(ff7, f3, 4, ra, rb));
            sw(4, 0, o); o += 4;
          end
        end
      for (int f3 = 0; f3 < 8; f3++) begin
        int imm;
        imm = (f3 == 1 || f3 == 5) ? 13 : -300;
        prog.push_back(i_t(7'h13, f3, 4, 7, imm)); sw(4, 0, o); o += 4;
        prog.push_back(i_t(7'h13, f3, 4, 2, (f3 == 5) ? 12'h403 : 5)); sw(4, 0, o); o += 4;
      end
      // byte and halfword stores and loads
      prog.push_back(s_t(0, 0, 7, o + 1));
      prog.push_back(s_t(1, 0, 2, o + 6));
      o += 8;
      for (int f3 = 0; f3 < 6; f3++) begin
        if (f3 == 3) continue;
        prog.push_back(i_t(7'h03, f3, 4, 0, o - 8 + ((f3 == 1 || f3 == 5) ? 6 : (f3 == 2) ? 4 : 1)));
        sw(4, 0, o); o += 4;
        prog.push_back(i_t(7'h03, f3, 8, 0, o - 4));   // load-use through the bypass
        addi(8, 8, 1); sw(8, 0, o); o += 4;
      end
      // branches: x8 = 1 if taken, 2 if not
      for (int f3 = 0; f3 < 8; f3++) begin
        if (f3 == 2 || f3 == 3) continue;
        for (int pr = 0; pr < 3; pr++) begin
          int ra, rb;
          ra = (pr == 0) ? 2 : (pr == 1) ? 3 : 1;
          rb = (pr == 0) ? 3 : (pr == 1) ? 3 : 6;
          addi(8, 0, 1);
          prog.push_back(b_t(f3, ra, rb, 8));
          addi(8, 0, 2);
          sw(8, 0, o); o += 4;
        end
      end
      // auipc, call and return
      prog.push_back(u_t(7'h17, 9, 1)); sw(9, 0, o); o += 4;
      prog.push_back(j_t(1, 12));                      // call +12
      sw(10, 0, o); o += 4;
      prog.push_back(j_t(0, 12));                      // skip the function
      addi(10, 0, 77);                                 // function body
      prog.push_back(i_t(7'h67, 0, 0, 1, 0));          // ret
      sw(1, 0, o); o += 4;
      ecall();
      run_prog("coverage", init);
    end

    // ---- gcd ----
    for (int t = 0; t < 3; t++) begin
      int ga, gb, g, u, v;
      ga = $urandom_range(1, 100000); gb = $urandom_range(1, 100000);
      if (t == 0) begin ga = 1071; gb = 462; end
      u = ga; v = gb;
      while (v != 0) begin g = u % v; u = v; v = g; end
      for (int k = 0; k < DW; k++) init[k] = 0;
      init[0] = ga; init[1] = gb;
      prog.delete();
      lw(1, 0, 0); lw(2, 0, 4);
      prog.push_back(b_t(0, 2, 0, 20));
      prog.push_back(r_t(1, 7, 3, 1, 2));              // remu
      prog.push_back(r_t(0, 0, 1, 2, 0));
      prog.push_back(r_t(0, 0, 2, 3, 0));
      prog.push_back(j_t(0, -16));
      sw(1, 0, 8);
      ecall();
      run_prog("gcd", init);
      check(smem[2] == u, $sformatf("gcd(%0d,%0d) = %0d want %0d", ga, gb, smem[2], u));
    end

    // ---- matmul 4x4 ----
    begin
      int am [16], bm [16], cm;
      for (int k = 0; k < DW; k++) init[k] = 0;
      for (int k = 0; k < 16; k++) begin
        am[k] = $urandom_range(0, 200) - 100; bm[k] = $urandom_range(0, 200) - 100;
        init[16 + k] = am[k]; init[32 + k] = bm[k];
      end
      prog.delete();
      addi(13, 0, 4); addi(10, 0, 0);
      addi(11, 0, 0);                                  // 2  Li
      addi(12, 0, 0);                                  // 3  Lj
      addi(5, 0, 0);
      prog.push_back(i_t(7'h13, 1, 6, 10, 2));         // 5  Lk
      prog.push_back(r_t(0, 0, 6, 6, 12));
      prog.push_back(i_t(7'h13, 1, 6, 6, 2));
      lw(7, 6, 64);
      prog.push_back(i_t(7'h13, 1, 8, 12, 2));
      prog.push_back(r_t(0, 0, 8, 8, 11));
      prog.push_back(i_t(7'h13, 1, 8, 8, 2));
      lw(9, 8, 128);
      prog.push_back(r_t(1, 0, 7, 7, 9));              // mul
      prog.push_back(r_t(0, 0, 5, 5, 7));
      addi(12, 12, 1);
      prog.push_back(b_t(4, 12, 13, -44));             // 16 blt -> Lk
      prog.push_back(i_t(7'h13, 1, 6, 10, 2));
      prog.push_back(r_t(0, 0, 6, 6, 11));
      prog.push_back(i_t(7'h13, 1, 6, 6, 2));
      sw(5, 6, 192);
      addi(11, 11, 1);
      prog.push_back(b_t(4, 11, 13, -76));             // 22 blt -> Lj
      addi(10, 10, 1);
      prog.push_back(b_t(4, 10, 13, -88));             // 24 blt -> Li
      ecall();
      run_prog("matmul", init);
      for (int i = 0; i < 4; i++)
        for (int j = 0; j < 4; j++) begin
          cm = 0;
          for (int k = 0; k < 4; k++) cm += am[i*4+k] * bm[k*4+j];
          check(smem[48 + i*4 + j] == cm, $sformatf("C[%0d][%0d]", i, j));
        end
    end

    // ---- median of 9 ----
    begin
      int vals [9], sorted [9], tmp;
      for (int k = 0; k < DW; k++) init[k] = 0;
      for (int k = 0; k < 9; k++) begin vals[k] = $urandom_range(0, 2000) - 1000; init[64 + k] = vals[k]; end
      sorted = vals;
      for (int i = 0; i < 9; i++)
        for (int j = 0; j < 8 - i; j++)
          if (sorted[j] > sorted[j+1]) begin tmp = sorted[j]; sorted[j] = sorted[j+1]; sorted[j+1] = tmp; end
      prog.delete();
      addi(13, 0, 9); addi(10, 0, 1);
      prog.push_back(i_t(7'h13, 1, 6, 10, 2));         // 2  Li
      lw(7, 6, 256);
      addi(11, 10, -1);
      prog.push_back(b_t(4, 11, 0, 28));               // 5  Lj: blt j,0 -> 12
      prog.push_back(i_t(7'h13, 1, 8, 11, 2));
      lw(9, 8, 256);
      prog.push_back(b_t(5, 7, 9, 16));                // 8  bge key,a[j] -> 12
      sw(9, 8, 260);
      addi(11, 11, -1);
      prog.push_back(j_t(0, -24));                     // 11 -> 5
      prog.push_back(i_t(7'h13, 1, 8, 11, 2));         // 12
      sw(7, 8, 260);
      addi(10, 10, 1);
      prog.push_back(b_t(4, 10, 13, -52));             // 15 -> 2
      lw(5, 0, 272);
      sw(5, 0, 12);
      ecall();
      run_prog("median", init);
      check(smem[3] == sorted[4], $sformatf("median %0d want %0d", smem[3], sorted[4]));
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

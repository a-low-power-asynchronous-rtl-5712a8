// tb_msp430_core_random: random programs, core against a reference model.
//
// Each round builds a random straight-line program with msp430_asm_pkg:
// random double-operand instructions (all twelve, byte and word), RRC, RRA,
// SWPB, SXT and PUSH, with source operands in every addressing mode
// (register, @Rn, @Rn+, X(Rn), &ADDR, symbolic, immediates including the
// constant generator values) and register, indexed, absolute or symbolic
// destinations, plus conditional jumps over the next instruction. R4 and
// R5 serve as pointers into a data area, R8..R15 hold random data and the
// flags start random. The core runs the program against a memory with
// random wait states; an instruction-set model written here runs it too,
// and the registers, the status flags, the data area and the stack are
// compared when the program reaches its final jump-to-self.
module tb_msp430_core_random;
  import msp430_asm_pkg::*;

  localparam int ROUNDS = 150;
  localparam int BODY   = 40;
  localparam int unsigned DATA_LO = 16'h2000, DATA_HI = 16'h2300;

  logic        clk = 0, rst_n = 0;
  logic        bus_req, bus_we, bus_byte, bus_ack = 0;
  logic [15:0] bus_addr, bus_wdata, bus_rdata = 0;
  logic        irq = 0, irq_ack, sleeping, insn_fetch;

  int checks = 0, failures = 0;

  msp430_core dut (.*);

  always #5 clk = ~clk;

  logic [15:0] mem [32768];     // memory seen by the core
  logic [15:0] M   [32768];     // memory of the reference model
  logic [15:0] R   [16];        // registers of the reference model

  int wait_left = -1;
  always @(posedge clk) begin
    bus_ack <= 1'b0;
    if (!rst_n) wait_left = -1;
    else if (bus_req && !bus_ack) begin
      if (wait_left < 0) wait_left = int'($urandom_range(2));
      if (wait_left == 0) begin
        bus_ack   <= 1'b1;
        bus_rdata <= mem[bus_addr[15:1]];
        if (bus_we) begin
          if (!bus_byte || !bus_addr[0]) mem[bus_addr[15:1]][7:0]  <= bus_wdata[7:0];
          if (!bus_byte ||  bus_addr[0]) mem[bus_addr[15:1]][15:8] <= bus_wdata[15:8];
        end
        wait_left = -1;
      end else begin
        wait_left--;
      end
    end
  end

  // ------------------------------------------------------------------
  // reference model
  // ------------------------------------------------------------------
  function automatic int rd(int a, bit bw);
    int w = int'(M[(a >> 1) & 16'h7FFF]);
    if (!bw) return w;
    return (a & 1) ? (w >> 8) & 255 : w & 255;
  endfunction

  function automatic void wr(int a, int v, bit bw);
    int i = (a >> 1) & 16'h7FFF;
    if (!bw)         M[i] = 16'(v);
    else if (a & 1)  M[i][15:8] = 8'(v);
    else             M[i][7:0]  = 8'(v);
  endfunction

  function automatic int fetch();
    int w = rd(int'(R[0]), 0);
    R[0] = R[0] + 2;
    return w;
  endfunction

  // source operand: value (masked to width) and address (-1 for none)
  function automatic void get_src(int rs, int as, bit bw, output int val, output int addr);
    int mask = bw ? 255 : 65535;
    addr = -1;
    if (rs == 3) begin
      val = (as == 0) ? 0 : (as == 1) ? 1 : (as == 2) ? 2 : 65535;
      val &= mask;
      return;
    end
    if (rs == 2 && as >= 2) begin
      val = (as == 2) ? 4 : 8;
      return;
    end
    case (as)
      0: begin val = int'(R[rs]) & mask; return; end
      1: begin
        int x = fetch();
        int base = (rs == 0) ? int'(R[0]) - 2 : (rs == 2) ? 0 : int'(R[rs]);
        addr = (base + x) & 65535;
      end
      2: addr = int'(R[rs]);
      default: begin
        addr = int'(R[rs]);
        R[rs] = R[rs] + ((bw && rs > 1) ? 1 : 2);
      end
    endcase
    val = rd(addr, bw);
  endfunction

  function automatic int sgn(int v, bit bw);
    return bw ? ((v & 128) ? v - 256 : v) : ((v & 32768) ? v - 65536 : v);
  endfunction

  function automatic void set_flags(int r, bit bw, bit c, bit v);
    int mask = bw ? 255 : 65535;
    R[2][0] = c;
    R[2][1] = ((r & mask) == 0);
    R[2][2] = bw ? r[7] : r[15];
    R[2][8] = v;
  endfunction

  function automatic void step();
    int ir = fetch();
    bit c = R[2][0];
    if (ir[15:13] == 3'b001) begin
      bit n = R[2][2], z = R[2][1], v = R[2][8], t;
      case (ir[12:10])
        0: t = !z;  1: t = z;  2: t = !c;  3: t = c;
        4: t = n;   5: t = (n == v);  6: t = (n != v);  default: t = 1;
      endcase
      if (t) R[0] = 16'(int'(R[0]) + 2 * (ir[9] ? int'(ir[9:0]) - 1024 : int'(ir[9:0])));
    end else if (ir[15:12] >= 4) begin
      int op = ir[15:12], rs = ir[11:8], rd_ = ir[3:0], as = ir[5:4];
      bit ad = ir[7], bw = ir[6];
      int mask = bw ? 255 : 65535;
      int s, sa, d = 0, da = -1, r = 0, full;
      bit nc = 0, nv = 0, flags = 1, write = 1;
      get_src(rs, as, bw, s, sa);
      if (ad) begin
        int x = fetch();
        int base = (rd_ == 0) ? int'(R[0]) - 2 : (rd_ == 2) ? 0 : int'(R[rd_]);
        da = (base + x) & 65535;
        d = rd(da, bw);
      end else begin
        d = int'(R[rd_]) & mask;
      end
      case (op)
        MOV: begin r = s; flags = 0; end
        ADD, ADDC: begin
          full = d + s + ((op == ADDC) ? int'(c) : 0);
          r = full & mask; nc = full > mask;
          nv = (sgn(d, bw) + sgn(s, bw) + ((op == ADDC) ? int'(c) : 0)) != sgn(r, bw);
        end
        SUB, SUBC, CMP: begin
          int bor = (op == SUBC) ? 1 - int'(c) : 0;
          full = d - s - bor;
          r = full & mask; nc = full >= 0;
          nv = (sgn(d, bw) - sgn(s, bw) - bor) != sgn(r, bw);
          if (op == CMP) write = 0;
        end
        DADD: begin
          int cy = int'(c);
          r = 0;
          for (int k = 0; k < (bw ? 2 : 4); k++) begin
            int q = ((s >> (4 * k)) & 15) + ((d >> (4 * k)) & 15) + cy;
            cy = (q >= 10);
            if (cy) q -= 10;
            r |= (q & 15) << (4 * k);
          end
          nc = cy;
        end
        BIT, AND: begin r = d & s; nc = (r != 0); if (op == BIT) write = 0; end
        BIC: begin r = d & ~s & mask; flags = 0; end
        BIS: begin r = d | s; flags = 0; end
        default: begin r = d ^ s; nc = (r != 0); nv = (sgn(d, bw) < 0) && (sgn(s, bw) < 0); end
      endcase
      if (flags) set_flags(r, bw, nc, nv);
      if (write) begin
        if (ad) wr(da, r, bw);
        else    R[rd_] = 16'(r);
      end
    end else begin
      int op = ir[9:7], rn = ir[3:0], as = ir[5:4];
      bit bw = ir[6];
      int s, sa, r = 0;
      if (op == SWPB || op == SXT) bw = 0;
      get_src(rn, as, bw, s, sa);
      case (op)
        RRC:  begin r = (s >> 1) | (int'(c) << (bw ? 7 : 15)); set_flags(r, bw, s[0], 0); end
        RRA:  begin r = (s >> 1) | (s & (bw ? 128 : 32768)); set_flags(r, bw, s[0], 0); end
        SWPB: r = ((s & 255) << 8) | (s >> 8);
        SXT:  begin r = (s & 128) ? (s | 16'hFF00) : (s & 255); set_flags(r, 0, r != 0, 0); end
        PUSH: begin
          R[1] = R[1] - 2;
          wr(int'(R[1]), s, bw);
        end
        default: ;
      endcase
      if (op <= SXT) begin
        if (as == 0) R[rn] = 16'(r);
        else         wr(sa, r, bw);
      end
    end
  endfunction

  // ------------------------------------------------------------------
  // random program
  // ------------------------------------------------------------------
  function automatic opnd_t rnd_src();
    int p = $urandom_range(5, 4);
    case ($urandom_range(9))
      0, 1, 2: return reg_($urandom_range(15, 8));
      3: return ind(p);
      4: return inc(p);
      5: return idx($urandom_range(62), p);
      6: return abs_(16'h2200 + $urandom_range(127));
      7: return sym(16'h2200 + $urandom_range(127));
      8: begin
        int cg [6] = '{0, 1, 2, 4, 8, -1};
        return imm(cg[$urandom_range(5)]);
      end
      default: return immx($urandom_range(65535));
    endcase
  endfunction

  function automatic opnd_t rnd_dst();
    int p = $urandom_range(5, 4);
    case ($urandom_range(5))
      0, 1, 2: return reg_($urandom_range(15, 8));
      3: return idx($urandom_range(62), p);
      4: return abs_(16'h2200 + $urandom_range(127));
      default: return sym(16'h2200 + $urandom_range(127));
    endcase
  endfunction

  function automatic void rnd_insn();
    int k = $urandom_range(9);
    if (k < 7) begin
      i1($urandom_range(15, 4), rnd_src(), rnd_dst(), 1'($urandom));
    end else if (k < 9) begin
      int op = $urandom_range(4);
      opnd_t o = rnd_src();
      if (op <= SXT && o.r == 3) o = reg_($urandom_range(15, 8));          // no constant targets
      if (op <= SXT && o.r == 2 && o.m >= 2) o = reg_($urandom_range(15, 8));
      if (op <= SXT && o.r == 0 && o.m == 3) o = reg_($urandom_range(15, 8)); // no immediate targets
      i2(op, o, (op == SWPB || op == SXT) ? 1'b0 : 1'($urandom));
    end else begin
      int p = jf($urandom_range(6));
      i1($urandom_range(15, 4), rnd_src(), reg_($urandom_range(15, 8)), 1'($urandom));
      fix(p);
    end
  endfunction

  int unsigned halt_a;

  task automatic build_round();
    start(16'hC000);
    i1(MOV, immx(16'h0A00), reg_(1));
    i1(MOV, immx(DATA_LO + 2 * $urandom_range(63)), reg_(4));
    i1(MOV, immx(DATA_LO + 2 * $urandom_range(63)), reg_(5));
    for (int r = 8; r < 16; r++) i1(MOV, immx($urandom), reg_(r));
    i1(MOV, immx($urandom & 16'h0107), reg_(2));
    for (int n = 0; n < BODY; n++) rnd_insn();
    halt_a = here();
    halt();
  endtask

  task automatic chk(string what, logic [15:0] got, logic [15:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: core %h model %h", what, got, exp);
    end
  endtask

  initial begin
    for (int round = 0; round < ROUNDS; round++) begin
      int halts, steps;
      halts = 0;
      steps = 0;
      rst_n = 0;
      build_round();
      for (int i = 0; i < 32768; i++) mem[i] = 16'h0;
      for (int a = DATA_LO; a < DATA_HI; a += 2) mem[a >> 1] = 16'($urandom);
      for (int i = 0; i < code.size(); i++) mem[(org >> 1) + i] = code[i];
      mem[16'hFFFE >> 1] = 16'(org);
      for (int i = 0; i < 32768; i++) M[i] = mem[i];
      for (int i = 0; i < 16; i++) R[i] = 16'h0;
      R[0] = 16'(org);
      // model
      while (R[0] != 16'(halt_a) && steps < 1000) begin
        step();
        steps++;
      end
      // core
      repeat (3) @(posedge clk);
      rst_n = 1;
      while (halts < 2) begin
        @(posedge clk);
        if (insn_fetch && bus_addr == 16'(halt_a)) halts++;
      end
      @(posedge clk);
      // the core has fetched the final jump once more, PC is one word on
      chk($sformatf("round %0d PC", round), dut.u_rf.regs[0] - 16'd2, R[0]);
      for (int r = 1; r < 16; r++)
        if (r != 3) chk($sformatf("round %0d R%0d", round, r), dut.u_rf.regs[r], R[r]);
      for (int a = DATA_LO; a < DATA_HI; a += 2)
        chk($sformatf("round %0d [%h]", round, a), mem[a >> 1], M[a >> 1]);
      for (int a = 16'h09C0; a < 16'h0A00; a += 2)
        chk($sformatf("round %0d stack [%h]", round, a), mem[a >> 1], M[a >> 1]);
      if (failures > 20) break;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

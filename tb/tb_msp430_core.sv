// tb_msp430_core: instruction-level test of the compact core.
//
// The core runs a program built with msp430_asm_pkg against a memory model
// in this testbench that answers every request after a random number of
// wait cycles (0..3), so the core is stalled at random points. The program
// exercises every addressing mode, byte and word operations, the constant
// generators, flags and all jump conditions, PUSH, CALL (immediate and absolute) and RET, DADD, the
// low-power mode and an interrupt with RETI. At the end the registers and
// memory are compared with values worked out by hand from the instruction
// set (listed next to each instruction below). Every acknowledged request
// is also checked: a request must not change while it waits.
module tb_msp430_core;
  import msp430_asm_pkg::*;

  logic        clk = 0, rst_n = 0;
  logic        bus_req, bus_we, bus_byte, bus_ack = 0;
  logic [15:0] bus_addr, bus_wdata, bus_rdata = 0;
  logic        irq = 0, irq_ack, sleeping, insn_fetch;

  int checks = 0, failures = 0;
  int irq_acks = 0, sleep_cycles = 0, stall_cycles = 0;

  msp430_core dut (.*);

  always #5 clk = ~clk;

  logic [15:0] mem [32768];

  // memory model with random wait states
  int          wait_left = -1;
  logic [15:0] hold_addr, hold_wdata;
  logic        hold_we, hold_byte;
  always @(posedge clk) begin
    bus_ack <= 1'b0;
    if (bus_req && !bus_ack) begin
      if (wait_left < 0) begin
        wait_left  = int'($urandom_range(3));
        hold_addr  = bus_addr;
        hold_wdata = bus_wdata;
        hold_we    = bus_we;
        hold_byte  = bus_byte;
      end else if (bus_addr != hold_addr || bus_we != hold_we ||
                   bus_wdata != hold_wdata || bus_byte != hold_byte) begin
        failures++;
        $display("FAIL request changed while waiting at %h", bus_addr);
      end
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
        stall_cycles++;
      end
    end
  end

  task automatic chk(string what, logic [15:0] got, logic [15:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  int unsigned halt_addr, isr_addr, sub_addr, data_addr;
  int unsigned sub2_addr;
  int p_sub2, p_sub, p_data, p1, p2, p3, p4, p5, p6, p7;

  initial begin
    for (int i = 0; i < 32768; i++) mem[i] = 16'h0000;
    // ---------------- program ----------------
    start(16'hF000);
    i1(MOV, immx(16'h0A00), reg_(1));           // SP = 0A00
    i1(MOV, imm(0), abs_(16'h0210));            // irq counter = 0
    i1(MOV, immx(16'h1234), reg_(4));           // R4 = 1234
    i1(MOV, immx(16'h00FF), reg_(5));           // R5 = 00FF
    i1(ADD, reg_(4), reg_(5));                  // R5 = 1333
    i1(MOV, reg_(5), abs_(16'h0200));           // [0200] = 1333
    i1(MOV, immx(16'h0200), reg_(6));           // R6 = 0200
    i1(ADD, ind(6), reg_(5));                   // R5 = 2666
    i1(MOV, immx(5), reg_(8));                  // R8 = 5
    i1(MOV, immx(16'h80), reg_(7), 1);          // R7 = 0080
    i1(ADD, reg_(7), reg_(7), 1);               // R7 = 00, C=1 Z=1 V=1
    i1(ADDC, imm(0), reg_(8));                  // R8 = 6
    i1(MOV, inc(6), reg_(9));                   // R9 = 1333, R6 = 0202
    i1(MOV, immx(16'hABCD), idx(0, 6));         // [0202] = ABCD
    i1(MOV, idx(1, 6), reg_(10), 1);            // R10 = 00AB
    i1(MOV, imm(-1), abs_(16'h0204));           // [0204] = FFFF
    i1(MOV, immx(16'h5A), abs_(16'h0205), 1);   // [0204] = 5AFF
    i2(SWPB, reg_(4));                          // R4 = 3412
    i2(SXT, reg_(10));                          // R10 = FFAB
    i2(RRA, reg_(5));                           // R5 = 1333
    i1(BIS, imm(1), reg_(2));                   // SETC
    i2(RRC, reg_(8));                           // R8 = 8003
    i2(PUSH, immx(16'h7777));                   // [09FE] = 7777
    pop(11);                                    // R11 = 7777
    p_sub = code.size();
    i2(CALL, immx(0));                          // CALL #sub (patched)
    p_sub2 = code.size();
    i1(MOV, immx(0), abs_(16'h0220));           // [0220] = sub2 (patched)
    i2(CALL, abs_(16'h0220));                   // CALL &0220: R11 = 7778
    i1(MOV, immx(16'h0199), reg_(13));
    i1(BIC, imm(1), reg_(2));                   // CLRC
    i1(DADD, imm(1), reg_(13));                 // R13 = 0200 (BCD)
    i1(XOR, imm(-1), reg_(13));                 // R13 = FDFF
    i1(AND, immx(16'h00F0), reg_(13));          // R13 = 00F0
    i1(BIC, immx(16'h0030), reg_(13));          // R13 = 00C0
    i1(BIS, immx(16'h0003), reg_(13));          // R13 = 00C3
    i1(MOV, imm(0), reg_(14));
    i1(BIT, imm(4), reg_(13));                  // Z = 1
    p1 = jf(JNE);                               // not taken
    i1(BIS, imm(1), reg_(14));                  // R14 |= 01
    fix(p1);
    p2 = jf(JEQ);                               // taken
    i1(BIS, imm(2), reg_(14));
    fix(p2);
    i1(CMP, immx(5), reg_(8));                  // 8003-5: N=0 V=1 C=1
    p3 = jf(JGE);                               // not taken
    i1(BIS, imm(4), reg_(14));                  // R14 |= 04
    fix(p3);
    p4 = jf(JL);                                // taken
    i1(BIS, imm(8), reg_(14));
    fix(p4);
    p5 = jf(JC);                                // taken
    i1(BIS, immx(16), reg_(14));
    fix(p5);
    p6 = jf(JNC);                               // not taken
    i1(BIS, immx(32), reg_(14));                // R14 |= 20
    fix(p6);
    p7 = jf(JN);                                // not taken
    i1(BIS, immx(64), reg_(14));                // R14 |= 40 -> 0065
    fix(p7);
    p_data = code.size();
    i1(MOV, sym(0), reg_(15));                  // R15 = BEEF (patched)
    i1(BIS, immx(16'h0018), reg_(2));           // GIE + CPUOFF: sleep
    i1(BIC, imm(8), reg_(2));                   // after wake-up: DINT
    halt_addr = here();
    halt();
    sub_addr = here();
    i1(MOV, immx(16'h4242), reg_(12));          // R12 = 4242
    ret();
    sub2_addr = here();
    i1(ADD, imm(1), reg_(11));                  // R11 += 1
    ret();
    isr_addr = here();
    i1(ADD, imm(1), abs_(16'h0210));            // count
    i1(BIC, immx(16'h0010), idx(0, 1));         // clear CPUOFF in stacked SR
    reti();
    data_addr = here();
    w(16'hBEEF);
    // patch the forward references
    code[p_sub + 1] = 16'(sub_addr);
    code[p_sub2 + 1] = 16'(sub2_addr);
    code[p_data + 1] = 16'(data_addr - (org + 2 * (p_data + 1)));
    for (int i = 0; i < code.size(); i++) mem[(org >> 1) + i] = code[i];
    mem[16'hFFFE >> 1] = 16'(org);
    mem[16'hFFF0 >> 1] = 16'(isr_addr);

    repeat (3) @(posedge clk);
    rst_n = 1;
  end

  // interrupt source: raise irq some time after the core went to sleep
  always @(posedge clk) begin
    if (sleeping) sleep_cycles++;
    if (sleep_cycles == 20 && !irq && irq_acks == 0) irq <= 1'b1;
    if (irq_ack) begin
      irq <= 1'b0;
      irq_acks++;
    end
  end

  // stop when the halt loop has been fetched twice
  int halt_hits = 0;
  initial begin
    wait (rst_n);
    forever begin
      @(posedge clk);
      if (insn_fetch && bus_addr == 16'(halt_addr)) halt_hits++;
      if (halt_hits == 2) break;
    end
    chk("R1",  dut.u_rf.regs[1],  16'h0A00);
    chk("R4",  dut.u_rf.regs[4],  16'h3412);
    chk("R5",  dut.u_rf.regs[5],  16'h1333);
    chk("R6",  dut.u_rf.regs[6],  16'h0202);
    chk("R7",  dut.u_rf.regs[7],  16'h0000);
    chk("R8",  dut.u_rf.regs[8],  16'h8003);
    chk("R9",  dut.u_rf.regs[9],  16'h1333);
    chk("R10", dut.u_rf.regs[10], 16'hFFAB);
    chk("R11", dut.u_rf.regs[11], 16'h7778);
    chk("R12", dut.u_rf.regs[12], 16'h4242);
    chk("R13", dut.u_rf.regs[13], 16'h00C3);
    chk("R14", dut.u_rf.regs[14], 16'h0065);
    chk("R15", dut.u_rf.regs[15], 16'hBEEF);
    chk("SR GIE/CPUOFF", dut.u_rf.regs[2] & 16'h0018, 16'h0000);
    chk("[0200]", mem[16'h0200 >> 1], 16'h1333);
    chk("[0202]", mem[16'h0202 >> 1], 16'hABCD);
    chk("[0204]", mem[16'h0204 >> 1], 16'h5AFF);
    chk("[0210] irq count", mem[16'h0210 >> 1], 16'h0001);
    chk("stacked SR had CPUOFF cleared", mem[16'h09FC >> 1] & 16'h0010, 16'h0000);
    checks++;
    if (irq_acks != 1) begin failures++; $display("FAIL irq_ack count %0d", irq_acks); end
    checks++;
    if (sleep_cycles < 20) begin failures++; $display("FAIL core never slept"); end
    checks++;
    if (stall_cycles == 0) begin failures++; $display("FAIL no bus stall happened"); end
    $display("sleep cycles %0d, stall cycles %0d", sleep_cycles, stall_cycles);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

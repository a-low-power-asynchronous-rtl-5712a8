// tb_msp430_idle_sweep: RLE_stream over a range of idle times.
//
// The same duty-cycled RLE_stream program as in tb_msp430_system (sample,
// Schmitt-trigger threshold, run-length code, sleep), but the time the
// core sleeps between samples steps through 0.001, 0.05, 0.1, 0.4, 1, 1.5,
// 2, 4, 8, 16, 32, 64, 128 and 256 ms, with PER_POINT samples at each,
// counted at an assumed 1 MHz clock. For every point it checks that each
// sleep lasted exactly the programmed idle time plus the one cycle in which
// the core sees the interrupt, and it reports the duty cycle (active
// cycles over all cycles). The run list is compared with a reference
// model as in tb_msp430_system.
module tb_msp430_idle_sweep;
  import msp430_asm_pkg::*;

  localparam int NPOINT    = 14;
  localparam int PER_POINT = 3;
  localparam int NSAMP     = NPOINT * PER_POINT;
  // idle time per point in cycles of a 1 MHz clock (1 cycle stands for 0)
  localparam int IDLE_TAB [NPOINT] = '{1, 50, 100, 400, 1000, 1500, 2000, 4000,
                                       8000, 16000, 32000, 64000, 128000, 256000};
  localparam int HI = 16'h0A00, LO = 16'h0600;
  localparam logic [15:0] ADC_ADDR = 16'h0110, OUT_ADDR = 16'h0120;
  localparam logic [15:0] BUF_ADDR = 16'h0400;

  logic        clk = 0, rst_n = 0;
  logic        per_req, per_we, per_byte, per_ack = 0;
  logic [15:0] per_addr, per_wdata, per_rdata = 0;
  logic        irq = 0, irq_ack, sleeping, insn_fetch;

  msp430_system dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  logic [15:0] samples [NSAMP];
  logic [7:0]  exp_runs [$];
  logic [15:0] got_port [$];
  int          adc_reads = 0;

  task automatic chk(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0h expected %0h", what, got, exp);
    end
  endtask

  // ---------------- peripherals ----------------
  int wait_left = -1;
  always @(posedge clk) begin
    per_ack <= 1'b0;
    if (per_req && !per_ack) begin
      if (wait_left < 0) wait_left = int'($urandom_range(2));
      if (wait_left == 0) begin
        per_ack <= 1'b1;
        wait_left = -1;
        if (!per_we && per_addr == ADC_ADDR) begin
          per_rdata <= (adc_reads < NSAMP) ? samples[adc_reads] : 16'h0;
          adc_reads++;
        end else begin
          per_rdata <= 16'h0;
        end
        if (per_we && per_addr == OUT_ADDR) got_port.push_back(per_wdata);
      end else begin
        wait_left--;
      end
    end
  end

  // timer: one tick IDLE_CYCLES after the core stopped
  int idle_cnt = 0;
  always @(posedge clk) begin
    if (irq_ack) irq <= 1'b0;
    if (sleeping && !irq) begin
      idle_cnt++;
      if (idle_cnt == IDLE_TAB[(adc_reads < NSAMP ? adc_reads : NSAMP - 1) / PER_POINT]) begin
        irq <= 1'b1;
        idle_cnt = 0;
      end
    end
  end

  // ---------------- mechanism counters ----------------
  typedef enum int {
    M_OF_TWICE, M_ADDR_ALU, M_DOUBLE, M_SINGLE, M_JUMP_TAKEN, M_JUMP_NOT,
    M_STALL, M_BYTE_WR, M_PUSH, M_INT, M_RETI, M_SLEEP, M_N
  } mech_e;
  int mech [M_N];
  string mech_name [M_N] = '{"operand fetch for src and dst", "address on ALU",
    "double-operand", "single-operand", "jump taken", "jump not taken",
    "bus stall", "byte write", "push/call", "interrupt entry", "RETI", "sleep entry"};
  logic was_sleeping = 0;
  int   active_cycles = 0, sleep_cycles = 0, cur_sleep = 0;
  longint pt_sleep [NPOINT], pt_active [NPOINT];
  int   pend = 0;
  always @(posedge clk) if (rst_n) begin
    case (dut.u_core.state)
      dut.u_core.S_OF:       if (dut.u_core.of_dst) mech[M_OF_TWICE]++;
      dut.u_core.S_OF_ADDR:  mech[M_ADDR_ALU]++;
      dut.u_core.S_ID: begin
        if (dut.u_core.dec.cls == msp430_pkg::CLS_DOUBLE) mech[M_DOUBLE]++;
        if (dut.u_core.dec.cls == msp430_pkg::CLS_SINGLE) mech[M_SINGLE]++;
      end
      dut.u_core.S_OC: if (dut.u_core.jump_taken) mech[M_JUMP_TAKEN]++;
                       else mech[M_JUMP_NOT]++;
      dut.u_core.S_PUSH_SP:  mech[M_PUSH]++;
      dut.u_core.S_INT_VEC:  if (dut.u_core.bus_ack) mech[M_INT]++;
      dut.u_core.S_RETI_WB:  mech[M_RETI]++;
      default: ;
    endcase
    if (dut.bus_req && !dut.bus_ack) pend++; else pend = 0;
    if (pend >= 2) mech[M_STALL]++;           // wait beyond the minimum
    if (dut.bus_req && dut.bus_ack && dut.bus_we && dut.bus_byte) mech[M_BYTE_WR]++;
    if (sleeping && !was_sleeping) mech[M_SLEEP]++;
    was_sleeping <= sleeping;
    if (sleeping) sleep_cycles++; else active_cycles++;
    if (sleeping) cur_sleep++;
    if (!sleeping && was_sleeping && adc_reads < NSAMP) begin
      // a sleep ended: the next sample is adc_reads
      checks++;
      if (cur_sleep != IDLE_TAB[adc_reads / PER_POINT] + 1) begin
        failures++;
        $display("FAIL sleep before sample %0d lasted %0d cycles, expected %0d",
                 adc_reads, cur_sleep, IDLE_TAB[adc_reads / PER_POINT] + 1);
      end
      pt_sleep[adc_reads / PER_POINT] += cur_sleep;
    end
    if (!sleeping) cur_sleep = 0;
    if (!sleeping && adc_reads > 0 && adc_reads <= NSAMP) pt_active[(adc_reads - 1) / PER_POINT]++;
  end

  // ---------------- program ----------------
  int unsigned loop_a, same_a, inc_a, schmitt_a, emit_a, isr_a, halt_a;
  int c_s1, c_s2, c_e1, c_e2, c_e3, p_eq, p_ne, p_emit_skip, p_hi, p_lo_done, p_done1, p_done2, p_lvl;

  task automatic build();
    start(16'hE000);
    i1(MOV, immx(16'h0A00), reg_(1));          // stack
    i1(MOV, imm(0), reg_(4));                  // Schmitt state
    i1(MOV, imm(0), reg_(5));                  // run length
    i1(MOV, immx(NSAMP), reg_(6));             // samples left
    i1(MOV, immx(BUF_ADDR), reg_(7));          // output buffer pointer
    loop_a = here();
    i1(BIS, immx(16'h0018), reg_(2));          // sleep until the tick
    i1(MOV, abs_(ADC_ADDR), reg_(8));          // sample
    c_s1 = code.size();
    i2(CALL, immx(0));                         // CALL #schmitt -> R9
    i1(CMP, reg_(4), reg_(9));
    p_eq = jf(JEQ);
    c_e1 = code.size();
    i2(CALL, immx(0));                         // CALL #emit
    i1(MOV, reg_(9), reg_(4));
    i1(MOV, imm(0), reg_(5));
    fix(p_eq);
    same_a = here();
    i1(CMP, immx(127), reg_(5));
    p_ne = jf(JNE);
    c_e2 = code.size();
    i2(CALL, immx(0));                         // full run: CALL #emit
    i1(MOV, imm(0), reg_(5));
    fix(p_ne);
    inc_a = here();
    i1(ADD, imm(1), reg_(5));
    i1(SUB, imm(1), reg_(6));
    j(JNE, loop_a);
    c_e3 = code.size();
    i2(CALL, immx(0));                         // last run
    halt_a = here();
    halt();
    // schmitt: R8 sample, R4 state -> R9 new state
    schmitt_a = here();
    i1(MOV, reg_(4), reg_(9));
    i1(CMP, imm(0), reg_(4));
    p_hi = jf(JNE);
    i1(CMP, immx(HI), reg_(8));                // low: rise at or above HI
    p_done1 = jf(JNC);
    i1(MOV, imm(1), reg_(9));
    ret();
    fix(p_hi);
    i1(CMP, immx(LO), reg_(8));                // high: fall below LO
    p_done2 = jf(JC);
    i1(MOV, imm(0), reg_(9));
    fix(p_done1);
    fix(p_done2);
    ret();
    // emit: run (R4, R5) as one byte to the buffer and the port
    emit_a = here();
    i1(CMP, imm(0), reg_(5));
    p_emit_skip = jf(JEQ);
    i2(PUSH, reg_(10));
    i1(MOV, reg_(5), reg_(10));
    i1(CMP, imm(0), reg_(4));
    p_lvl = jf(JEQ);
    i1(BIS, immx(16'h0080), reg_(10));
    fix(p_lvl);
    i1(MOV, reg_(10), idx(0, 7), 1);           // byte store
    i1(ADD, imm(1), reg_(7));
    i1(MOV, reg_(10), abs_(OUT_ADDR));
    pop(10);
    fix(p_emit_skip);
    ret();
    // timer interrupt: keep the core awake after RETI only long enough to
    // process one sample (main loop sleeps again itself)
    isr_a = here();
    i1(BIC, immx(16'h0010), idx(0, 1));
    reti();
    code[c_s1 + 1] = 16'(schmitt_a);
    code[c_e1 + 1] = 16'(emit_a);
    code[c_e2 + 1] = 16'(emit_a);
    code[c_e3 + 1] = 16'(emit_a);
  endtask

  // reference: Schmitt trigger and run-length code of the samples
  task automatic reference();
    int st = 0, cnt = 0, b;
    for (int k = 0; k < NSAMP; k++) begin
      b = st;
      if (st == 0 && int'(samples[k]) >= HI) b = 1;
      if (st == 1 && int'(samples[k]) <  LO) b = 0;
      if (b != st) begin
        if (cnt != 0) exp_runs.push_back(8'((st << 7) | cnt));
        st = b;
        cnt = 0;
      end
      if (cnt == 127) begin
        exp_runs.push_back(8'((st << 7) | cnt));
        cnt = 0;
      end
      cnt++;
    end
    if (cnt != 0) exp_runs.push_back(8'((st << 7) | cnt));
  endtask

  initial begin
    int v = 16'h0800, seg = 0, level = 16'h0800;
    for (int k = 0; k < NSAMP; k++) begin
      // noisy levels that change every few samples, around and across
      // both thresholds, with one flat stretch longer than 127 samples
      if (seg == 0) begin
        seg = int'($urandom_range(12, 2));
        case ($urandom_range(4))
          0: level = 16'h0300;
          1: level = 16'h0800;   // inside the hysteresis band
          3: level = 16'h0200;
          2: level = 16'h0C00;
          default: level = 16'h0A00;
        endcase
      end
      seg--;
      v = level + int'($urandom_range(512)) - 256;
      if (k >= 100 && k < 240) v = 16'h0C80;
      if (v < 0) v = 0;
      samples[k] = 16'(v);
    end
    reference();
    build();
    for (int i = 0; i < code.size(); i++) dut.u_mem.mem[(org >> 1) + i] = code[i];
    dut.u_mem.mem[16'hFFFE >> 1] = 16'(org);
    dut.u_mem.mem[16'hFFF0 >> 1] = 16'(isr_a);
    repeat (3) @(posedge clk);
    rst_n = 1;
  end

  int halt_hits = 0;
  initial begin
    wait (rst_n);
    forever begin
      @(posedge clk);
      if (insn_fetch && dut.bus_addr == 16'(halt_a)) halt_hits++;
      if (halt_hits == 2) break;
    end
    chk("ADC samples read", adc_reads, NSAMP);
    chk("runs on the port", got_port.size(), exp_runs.size());
    foreach (exp_runs[i]) begin
      if (i < got_port.size()) chk($sformatf("port run %0d", i), got_port[i], exp_runs[i]);
      chk($sformatf("RAM run %0d", i), dut.u_mem.mem[(BUF_ADDR + i) >> 1][((BUF_ADDR + i) & 1) * 8 +: 8],
          exp_runs[i]);
    end
    chk("buffer pointer", dut.u_core.u_rf.regs[7], BUF_ADDR + exp_runs.size());
    chk("stack pointer", dut.u_core.u_rf.regs[1], 16'h0A00);
    for (int m = 0; m < M_N; m++) begin
      $display("mechanism %-32s %0d", mech_name[m], mech[m]);
      checks++;
      if (mech[m] == 0) begin
        failures++;
        $display("FAIL mechanism never happened: %s", mech_name[m]);
      end
    end
    $display("runs %0d from %0d samples", exp_runs.size(), NSAMP);
    for (int p = 0; p < NPOINT; p++)
      $display("idle %7.3f ms: active %0d cycles, idle %0d cycles, duty cycle %f",
               real'(IDLE_TAB[p]) / 1000.0, pt_active[p], pt_sleep[p],
               real'(pt_active[p]) / real'(pt_active[p] + pt_sleep[p]));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// msp430_core: compact MSP430 processor core with one shared ALU.
//
// The core executes the MSP430 instruction set (all three instruction
// classes, all seven source and both destination addressing modes, byte
// and word operations, constant generators R2/R3, interrupts and the
// CPUOFF low-power mode). It is built for area rather than speed: a single
// ALU performs the data operations and also every address and pointer
// computation (PC + 2, base + index, SP -/+ 2, PC + jump offset), and the
// controller reuses one operand-fetch sequence for the source and for the
// destination operand, one execute step and one write-back step for all
// instructions, so that each instruction is a walk through shared steps:
//
//   IF -> ID -+-> OF(src) -> OF(dst) -> EX -> WB        double operand
//             +-> OF(src) -> OF(dst) -> WB              MOV
//             +-> OF(src) -> EX -> WB                    single operand
//             +-> OF(src) -> push                        PUSH, CALL
//             +-> pop SR -> pop PC -> WB                 RETI
//             +-> OC -> WB                               jumps
//
// Storage besides the register file is the instruction register (ir), the
// address register (areg, "Addr_reg"), the data register (dreg,
// "Data_reg") and the source and destination temporaries (src_t, dst_t).
// The ALU's a input is the Src multiplexer, its b input the Dst
// multiplexer; the bus address is chosen from PC, SP, areg or a vector.
//
// Bus: one request/acknowledge channel for instructions and data. The core
// raises bus_req with bus_addr, bus_we, bus_byte and bus_wdata and holds
// them unchanged until a cycle with bus_ack; that cycle completes the
// transfer and carries bus_rdata. Any number of wait cycles is allowed,
// and the core simply waits, which is how slow memory stalls it. Byte
// accesses use bus_addr[0] to pick the lane; write data is repeated on both
// lanes.
//
// Interrupts: irq is a level request, taken at an instruction boundary
// when SR.GIE is set: PC and SR are pushed, SR is cleared except SCG0,
// irq_ack pulses, and PC is loaded from the word at IRQ_VECTOR. With
// SR.CPUOFF set the core stops at the next boundary (sleeping = 1) and
// makes no bus requests until an interrupt is taken.
//
// The architecture (registers, temporaries, shared ALU, the shared
// IF/ID/OF/EX/WB/OC steps) follows the document this design is based on;
// the original is an asynchronous handshake circuit, and this version is a
// synchronous equivalent that performs one step per clock. The single
// interrupt vector, the exact step boundaries and the bus protocol are this
// design's own choices.
//
// Lint note: rst_n clears the flops asynchronously and also disables the
// bus assertion at the end of this file; Verilator reports that double use
// (SYNCASYNCNET), which is intended.
module msp430_core
  import msp430_pkg::*;
#(
  parameter logic [15:0] RESET_VECTOR = 16'hFFFE,
  parameter logic [15:0] IRQ_VECTOR   = 16'hFFF0
) (
  input  logic        clk,
  input  logic        rst_n,
  // bus
  output logic        bus_req,
  output logic        bus_we,
  output logic        bus_byte,
  output logic [15:0] bus_addr,
  output logic [15:0] bus_wdata,
  input  logic [15:0] bus_rdata,
  input  logic        bus_ack,
  // interrupt and status
  input  logic        irq,
  output logic        irq_ack,
  output logic        sleeping,
  output logic        insn_fetch
);

  typedef enum logic [4:0] {
    S_RESET, S_BOUND, S_IF, S_ID,
    S_OF, S_OF_EXT, S_OF_ADDR, S_OF_READ,
    S_EX, S_WB, S_OC,
    S_PUSH_SP, S_PUSH_WR,
    S_RETI_SR, S_RETI_PC, S_RETI_WB,
    S_INT_SP1, S_INT_WR1, S_INT_SP2, S_INT_WR2, S_INT_VEC,
    S_SLEEP
  } state_e;

  state_e      state, state_n;
  logic        of_dst, of_dst_n;              // operand fetch phase: 0 src, 1 dst
  logic [15:0] ir, ir_n, areg, areg_n, dreg, dreg_n;
  logic [15:0] src_t, src_n, dst_t, dst_n;

  dec_t dec;
  msp430_decoder u_dec (.ir(ir), .dec(dec));

  // register file
  logic [3:0]  ra_src;
  logic [15:0] rd_src, rd_dst, pc, sp, sr;
  logic        rf_we, sr_we;
  logic [3:0]  rf_wa;
  logic [15:0] rf_wd, sr_wd;

  msp430_regfile u_rf (
    .clk, .rst_n,
    .ra_src(ra_src), .rd_src(rd_src), .ra_dst(dec.rd), .rd_dst(rd_dst),
    .we(rf_we), .wa(rf_wa), .wd(rf_wd), .sr_we(sr_we), .sr_wd(sr_wd),
    .pc(pc), .sp(sp), .sr(sr)
  );

  // the shared ALU
  alu_op_e     alu_op;
  logic        alu_bw;
  logic [15:0] alu_a, alu_b, alu_res;
  logic        alu_c, alu_z, alu_n, alu_v;

  msp430_alu u_alu (
    .op(alu_op), .bw(alu_bw), .a(alu_a), .b(alu_b), .cin(sr[SR_C]),
    .res(alu_res), .c_out(alu_c), .z_out(alu_z), .n_out(alu_n), .v_out(alu_v)
  );

  // ---------------------------------------------------------------------
  // Operand being fetched, constant generators, derived decode facts
  // ---------------------------------------------------------------------
  logic [3:0]  cur_rn;
  logic [15:0] cur_reg;
  amode_e      cur_mode;
  logic        src_const;
  logic [15:0] const_val, inc_val, rdata_sel, flags_sr;
  logic        is_double, is_single, double_mov, writes_result, upd_flags;
  logic        jump_taken, int_pending;
  alu_op_e     ex_op;

  assign cur_rn    = of_dst ? dec.rd : dec.rs;
  assign cur_mode  = of_dst ? (dec.ad ? AM_INDEXED : AM_REG) : dec.as;
  assign ra_src    = dec.rs;
  assign cur_reg   = of_dst ? rd_dst : rd_src;   // Dst or Src read port
  assign is_double = dec.cls == CLS_DOUBLE;
  assign is_single = dec.cls == CLS_SINGLE;
  assign double_mov = is_double && dec.op1 == OP_MOV;
  // R3 in any mode and R2 in the two indirect modes are constants.
  assign src_const = (dec.rs == REG_CG) || (dec.rs == REG_SR && dec.as[1]);
  assign inc_val   = (dec.bw && cur_rn != REG_PC && cur_rn != REG_SP) ? 16'd1 : 16'd2;
  assign rdata_sel = bus_byte ? {8'd0, (bus_addr[0] ? bus_rdata[15:8] : bus_rdata[7:0])}
                              : bus_rdata;
  assign int_pending = irq && sr[SR_GIE];
  assign flags_sr  = {sr[15:9], alu_v, sr[7:3], alu_n, alu_z, alu_c};

  always_comb begin
    unique case ({dec.rs == REG_CG, dec.as})
      3'b0_10: const_val = 16'd4;
      3'b0_11: const_val = 16'd8;
      3'b1_00: const_val = 16'd0;
      3'b1_01: const_val = 16'd1;
      3'b1_10: const_val = 16'd2;
      default: const_val = 16'hFFFF;
    endcase
  end

  // execute operation and its effects
  always_comb begin
    ex_op         = ALU_PASS_A;
    upd_flags     = 1'b0;
    writes_result = 1'b1;
    if (is_double) begin
      unique case (dec.op1)
        OP_MOV:  ex_op = ALU_PASS_A;
        OP_ADD:  ex_op = ALU_ADD;
        OP_ADDC: ex_op = ALU_ADDC;
        OP_SUBC: ex_op = ALU_SUBC;
        OP_SUB:  ex_op = ALU_SUB;
        OP_CMP:  ex_op = ALU_SUB;
        OP_DADD: ex_op = ALU_DADD;
        OP_BIT:  ex_op = ALU_AND;
        OP_BIC:  ex_op = ALU_BIC;
        OP_BIS:  ex_op = ALU_BIS;
        OP_XOR:  ex_op = ALU_XOR;
        OP_AND:  ex_op = ALU_AND;
        default: ex_op = ALU_PASS_A;
      endcase
      upd_flags     = !(dec.op1 inside {OP_MOV, OP_BIC, OP_BIS});
      writes_result = !(dec.op1 inside {OP_CMP, OP_BIT});
    end else begin
      unique case (dec.op2)
        OP_RRC:  ex_op = ALU_RRC;
        OP_SWPB: ex_op = ALU_SWPB;
        OP_RRA:  ex_op = ALU_RRA;
        OP_SXT:  ex_op = ALU_SXT;
        default: ex_op = ALU_PASS_A;
      endcase
      upd_flags     = dec.op2 inside {OP_RRC, OP_RRA, OP_SXT};
      // a constant operand has nowhere to be written back
      writes_result = !src_const;
    end
  end

  always_comb begin
    unique case (dec.cond)
      3'd0:    jump_taken = !sr[SR_Z];
      3'd1:    jump_taken =  sr[SR_Z];
      3'd2:    jump_taken = !sr[SR_C];
      3'd3:    jump_taken =  sr[SR_C];
      3'd4:    jump_taken =  sr[SR_N];
      3'd5:    jump_taken = !(sr[SR_N] ^ sr[SR_V]);
      3'd6:    jump_taken =  (sr[SR_N] ^ sr[SR_V]);
      default: jump_taken = 1'b1;
    endcase
  end

  // ---------------------------------------------------------------------
  // Controller: one shared step per state
  // ---------------------------------------------------------------------
  always_comb begin
    state_n   = state;
    of_dst_n  = of_dst;
    ir_n      = ir;
    areg_n    = areg;
    dreg_n    = dreg;
    src_n     = src_t;
    dst_n     = dst_t;
    bus_req   = 1'b0;
    bus_we    = 1'b0;
    bus_byte  = 1'b0;
    bus_addr  = pc;
    bus_wdata = dreg;
    alu_op    = ALU_ADD;
    alu_bw    = 1'b0;
    alu_a     = 16'd2;
    alu_b     = pc;
    rf_we     = 1'b0;
    rf_wa     = REG_PC;
    rf_wd     = alu_res;
    sr_we     = 1'b0;
    sr_wd     = flags_sr;
    irq_ack   = 1'b0;
    insn_fetch = 1'b0;
    sleeping  = 1'b0;

    unique case (state)
      S_RESET: begin
        bus_req  = 1'b1;
        bus_addr = RESET_VECTOR;
        if (bus_ack) begin
          rf_we   = 1'b1;
          rf_wd   = bus_rdata;
          state_n = S_BOUND;
        end
      end

      S_BOUND: begin
        if (int_pending)        state_n = S_INT_SP1;
        else if (sr[SR_CPUOFF]) state_n = S_SLEEP;
        else                    state_n = S_IF;
      end

      S_SLEEP: begin
        sleeping = 1'b1;
        if (int_pending) state_n = S_INT_SP1;
      end

      // IF: fetch the instruction word, PC + 2 on the ALU
      S_IF: begin
        bus_req = 1'b1;
        if (bus_ack) begin
          insn_fetch = 1'b1;
          ir_n    = bus_rdata;
          rf_we   = 1'b1;                    // PC <= PC + 2
          state_n = S_ID;
        end
      end

      // ID: choose the sequence for the instruction class
      S_ID: begin
        of_dst_n = 1'b0;
        unique case (dec.cls)
          CLS_DOUBLE: state_n = S_OF;
          CLS_SINGLE: state_n = (dec.op2 == OP_RETI) ? S_RETI_SR : S_OF;
          CLS_JUMP:   state_n = S_OC;
          default:    state_n = S_BOUND;    // not an instruction: skipped
        endcase
      end

      // OF: the shared operand fetch, for source and destination alike
      S_OF: begin
        if (!of_dst && src_const) begin
          src_n = const_val;
          if (is_double) of_dst_n = 1'b1;
          else           state_n  = S_EX;
        end else begin
          unique case (cur_mode)
            AM_REG: begin
              if (of_dst) begin
                dst_n   = cur_reg;
                state_n = S_EX;
                if (double_mov) begin          // MOV: OF -> WB, no EX
                  dreg_n  = dec.bw ? {8'd0, src_t[7:0]} : src_t;
                  state_n = S_WB;
                end
              end else begin
                src_n = cur_reg;
                if (is_double) of_dst_n = 1'b1;
                else           state_n  = S_EX;
              end
            end
            AM_INDEXED: state_n = S_OF_EXT;
            AM_INDIRECT: begin
              areg_n  = cur_reg;
              state_n = S_OF_READ;
            end
            default: begin                   // @Rn+ and #N
              areg_n  = cur_reg;
              alu_a   = inc_val;
              alu_b   = cur_reg;
              rf_we   = 1'b1;
              rf_wa   = cur_rn;
              state_n = S_OF_READ;
            end
          endcase
        end
      end

      // fetch the index word, remember its address for symbolic mode
      S_OF_EXT: begin
        bus_req = 1'b1;
        if (bus_ack) begin
          dreg_n  = bus_rdata;
          areg_n  = pc;
          rf_we   = 1'b1;                    // PC <= PC + 2
          state_n = S_OF_ADDR;
        end
      end

      // address = base + index on the ALU (base PC: the index word's
      // address; base R2: zero, absolute mode)
      S_OF_ADDR: begin
        alu_a   = dreg;
        alu_b   = (cur_rn == REG_PC) ? areg : (cur_rn == REG_SR) ? 16'd0 : cur_reg;
        areg_n  = alu_res;
        state_n = S_OF_READ;
        if (of_dst && double_mov) begin      // MOV: OF -> WB, no EX
          dreg_n  = dec.bw ? {8'd0, src_t[7:0]} : src_t;
          state_n = S_WB;
        end
      end

      S_OF_READ: begin
        bus_req  = 1'b1;
        bus_addr = areg;
        bus_byte = dec.bw;
        if (bus_ack) begin
          if (of_dst) begin
            dst_n   = rdata_sel;
            state_n = S_EX;
          end else begin
            src_n = rdata_sel;
            if (is_double) begin
              of_dst_n = 1'b1;
              state_n  = S_OF;
            end else begin
              state_n  = S_EX;
            end
          end
        end
      end

      // EX: the operation on the shared ALU, flags to SR
      S_EX: begin
        alu_op = ex_op;
        alu_bw = dec.bw;
        alu_a  = src_t;
        alu_b  = dst_t;
        if (is_single && dec.op2 inside {OP_PUSH, OP_CALL}) begin
          state_n = S_PUSH_SP;
        end else begin
          dreg_n  = alu_res;
          sr_we   = upd_flags;
          state_n = writes_result ? S_WB : S_BOUND;
        end
      end

      // WB: result to a register or to memory at areg
      S_WB: begin
        if (dec.cls == CLS_JUMP) begin
          rf_we   = 1'b1;
          rf_wd   = dreg;
          state_n = S_BOUND;
        end else if ((is_double && !dec.ad) || (is_single && dec.as == AM_REG)) begin
          rf_we   = 1'b1;
          rf_wa   = is_double ? dec.rd : dec.rs;
          rf_wd   = dreg;
          state_n = S_BOUND;
        end else begin
          bus_req   = 1'b1;
          bus_we    = 1'b1;
          bus_addr  = areg;
          bus_byte  = dec.bw;
          bus_wdata = dec.bw ? {dreg[7:0], dreg[7:0]} : dreg;
          if (bus_ack) state_n = S_BOUND;
        end
      end

      // OC: jump target PC + 2*offset on the ALU
      S_OC: begin
        alu_a  = dec.joff;
        dreg_n = alu_res;
        state_n = jump_taken ? S_WB : S_BOUND;
      end

      S_PUSH_SP: begin
        alu_op  = ALU_SUB;
        alu_b   = sp;
        rf_we   = 1'b1;
        rf_wa   = REG_SP;
        areg_n  = alu_res;
        state_n = S_PUSH_WR;
      end

      S_PUSH_WR: begin
        bus_req   = 1'b1;
        bus_we    = 1'b1;
        bus_addr  = areg;
        bus_byte  = dec.bw;
        if (dec.op2 == OP_CALL) bus_wdata = pc;
        else bus_wdata = dec.bw ? {src_t[7:0], src_t[7:0]} : src_t;
        if (bus_ack) begin
          if (dec.op2 == OP_CALL) begin
            rf_we = 1'b1;
            rf_wd = src_t;
          end
          state_n = S_BOUND;
        end
      end

      S_RETI_SR: begin
        bus_req  = 1'b1;
        bus_addr = sp;
        alu_b    = sp;
        if (bus_ack) begin
          sr_we   = 1'b1;
          sr_wd   = bus_rdata;
          rf_we   = 1'b1;
          rf_wa   = REG_SP;
          state_n = S_RETI_PC;
        end
      end

      S_RETI_PC: begin
        bus_req  = 1'b1;
        bus_addr = sp;
        alu_b    = sp;
        if (bus_ack) begin
          dreg_n  = bus_rdata;
          rf_we   = 1'b1;
          rf_wa   = REG_SP;
          state_n = S_RETI_WB;
        end
      end

      S_RETI_WB: begin
        rf_we   = 1'b1;
        rf_wd   = dreg;
        state_n = S_BOUND;
      end

      S_INT_SP1, S_INT_SP2: begin
        alu_op  = ALU_SUB;
        alu_b   = sp;
        rf_we   = 1'b1;
        rf_wa   = REG_SP;
        areg_n  = alu_res;
        state_n = (state == S_INT_SP1) ? S_INT_WR1 : S_INT_WR2;
      end

      S_INT_WR1: begin
        bus_req   = 1'b1;
        bus_we    = 1'b1;
        bus_addr  = areg;
        bus_wdata = pc;
        if (bus_ack) state_n = S_INT_SP2;
      end

      S_INT_WR2: begin
        bus_req   = 1'b1;
        bus_we    = 1'b1;
        bus_addr  = areg;
        bus_wdata = sr;
        if (bus_ack) begin
          sr_we   = 1'b1;
          sr_wd   = sr & (16'd1 << SR_SCG0);
          irq_ack = 1'b1;
          state_n = S_INT_VEC;
        end
      end

      S_INT_VEC: begin
        bus_req  = 1'b1;
        bus_addr = IRQ_VECTOR;
        if (bus_ack) begin
          rf_we   = 1'b1;
          rf_wd   = bus_rdata;
          state_n = S_BOUND;
        end
      end

      default: state_n = S_BOUND;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state  <= S_RESET;
      of_dst <= 1'b0;
      ir     <= '0;
      areg   <= '0;
      dreg   <= '0;
      src_t  <= '0;
      dst_t  <= '0;
    end else begin
      state  <= state_n;
      of_dst <= of_dst_n;
      ir     <= ir_n;
      areg   <= areg_n;
      dreg   <= dreg_n;
      src_t  <= src_n;
      dst_t  <= dst_n;
    end
  end

  // A request, once raised, is held with the same address, direction and
  // data until it is acknowledged.
  property p_bus_hold;
    @(posedge clk) disable iff (!rst_n)
      bus_req && !bus_ack |=> bus_req && $stable(bus_addr) && $stable(bus_we)
                              && $stable(bus_wdata) && $stable(bus_byte);
  endproperty
  a_bus_hold: assert property (p_bus_hold);

endmodule

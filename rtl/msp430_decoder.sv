// msp430_decoder: instruction decode (the ID steps of the controller).
//
// Splits a 16-bit instruction word into the three classes the controller
// schedules differently: double-operand instructions (MOV .. AND), which
// fetch up to two operands, execute and write back; single-operand
// instructions (RRC, SWPB, RRA, SXT, PUSH, CALL, RETI), decoded in a second
// step; and jumps, whose only work is the offset calculation. It also
// extracts the register numbers, addressing modes, byte flag, jump condition
// and the jump offset, already doubled and sign-extended to bytes.
//
// The original design draws a second decode step for single-operand
// instructions and another for jumps; because every MSP430 format is
// recognisable from the one instruction word, this design merges all three
// into this single combinational decoder.
//
// Purely combinational. The field positions are those of the MSP430
// instruction set; the struct layout is this design's own. Words outside the
// instruction set are reported as CLS_ILLEGAL.
module msp430_decoder
  import msp430_pkg::*;
(
  input  logic [15:0] ir,
  output dec_t        dec
);

  always_comb begin
    dec      = '0;
    dec.op1  = ir[15:12];
    dec.op2  = op2_e'(ir[9:7]);
    dec.bw   = ir[6];
    dec.as   = amode_e'(ir[5:4]);
    dec.ad   = ir[7];
    dec.rd   = ir[3:0];
    dec.cond = ir[12:10];
    dec.joff = {{5{ir[9]}}, ir[9:0], 1'b0};
    if (ir[15:14] != 2'b00) begin
      dec.cls = CLS_DOUBLE;
      dec.rs  = ir[11:8];
    end else if (ir[15:13] == 3'b001) begin
      dec.cls = CLS_JUMP;
      dec.bw  = 1'b0;
    end else if (ir[15:10] == 6'b000100 && ir[9:7] != 3'd7) begin
      dec.cls = CLS_SINGLE;
      dec.rs  = ir[3:0];
      dec.ad  = 1'b0;
      // SWPB, SXT, CALL and RETI have no byte form
      if (ir[9:7] == 3'd1 || ir[9:7] == 3'd3 || ir[9:7] >= 3'd5) dec.bw = 1'b0;
    end else begin
      dec.cls = CLS_ILLEGAL;
    end
  end

endmodule

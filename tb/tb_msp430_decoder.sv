// tb_msp430_decoder: decode of known instruction words.
//
// Words of each class, taken from the MSP430 encoding (for example
// 0x5405 is ADD R4,R5 and 0x3FFF is JMP $), are applied and the class and
// fields compared. Then every 16-bit word is classified and the class
// compared with a rule written independently from the opcode map.
module tb_msp430_decoder;
  import msp430_pkg::*;
  logic [15:0] ir;
  dec_t dec;
  int checks = 0, failures = 0;

  msp430_decoder dut (.*);

  task automatic chk(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s (ir=%h): got %0h expected %0h", what, ir, got, exp);
    end
  endtask

  initial begin
    ir = 16'h5405; #1;                                    // ADD R4,R5
    chk("cls", dec.cls, CLS_DOUBLE); chk("op1", dec.op1, OP_ADD);
    chk("rs", dec.rs, 4); chk("rd", dec.rd, 5); chk("as", dec.as, 0);
    chk("ad", dec.ad, 0); chk("bw", dec.bw, 0);
    ir = 16'h4FF2; #1;                                    // MOV.B @R15+, X(R2)
    chk("cls", dec.cls, CLS_DOUBLE); chk("op1", dec.op1, OP_MOV);
    chk("rs", dec.rs, 15); chk("as", dec.as, 3); chk("ad", dec.ad, 1);
    chk("bw", dec.bw, 1); chk("rd", dec.rd, 2);
    ir = 16'h1226; #1;                                    // PUSH @R6
    chk("cls", dec.cls, CLS_SINGLE); chk("op2", dec.op2, OP_PUSH);
    chk("rs", dec.rs, 6); chk("as", dec.as, 2);
    ir = 16'h1300; #1;                                    // RETI
    chk("cls", dec.cls, CLS_SINGLE); chk("op2", dec.op2, OP_RETI);
    ir = 16'h1087; #1;                                    // SWPB R7
    chk("op2", dec.op2, OP_SWPB); chk("bw", dec.bw, 0);
    ir = 16'h1145; #1;                                    // RRA.B R5
    chk("op2", dec.op2, OP_RRA); chk("bw", dec.bw, 1);
    ir = 16'h3FFF; #1;                                    // JMP $
    chk("cls", dec.cls, CLS_JUMP); chk("cond", dec.cond, 7); chk("joff", dec.joff, 16'hFFFE);
    ir = 16'h2005; #1;                                    // JNE +5 words
    chk("cls", dec.cls, CLS_JUMP); chk("cond", dec.cond, 0); chk("joff", dec.joff, 10);
    ir = 16'h3A00; #1;                                    // JL, most negative
    chk("cond", dec.cond, 6); chk("joff", dec.joff, 16'hFC00);
    for (int x = 0; x < 65536; x++) begin
      int exp_cls;
      ir = 16'(x); #1;
      if (x >= 16'h4000)                        exp_cls = CLS_DOUBLE;
      else if (x >= 16'h2000)                   exp_cls = CLS_JUMP;
      else if (x >= 16'h1000 && x < 16'h1380)   exp_cls = CLS_SINGLE;
      else                                      exp_cls = CLS_ILLEGAL;
      chk("class", dec.cls, exp_cls);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

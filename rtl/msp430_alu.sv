// msp430_alu: the single shared arithmetic/logic unit of the compact core.
//
// One combinational unit serves every computation in the core: the data
// operations of the instruction set and, because the core is made compact by
// sharing hardware, also the pointer and address arithmetic (PC + 2, SP - 2,
// base + index, PC + jump offset). Operand a comes from the Src multiplexer
// and operand b from the Dst multiplexer; subtraction computes b - a, as the
// instruction set defines SUB src,dst.
//
// Interface: op selects the operation, bw selects byte width (the result's
// upper byte is then zero and flags come from bit 7/8), cin is the carry
// flag taken from the status register. Outputs are the result and the four
// condition flags C, Z, N, V as the instruction set defines them for that
// operation; whether they are written to the status register is decided by
// the controller. Purely combinational: no clock, no latency.
//
// Flag rules and the BCD adder follow the MSP430 instruction set; the
// operation encoding (alu_op_e) is this design's own.
module msp430_alu
  import msp430_pkg::*;
(
  input  alu_op_e     op,
  input  logic        bw,
  input  logic [15:0] a,
  input  logic [15:0] b,
  input  logic        cin,
  output logic [15:0] res,
  output logic        c_out,
  output logic        z_out,
  output logic        n_out,
  output logic        v_out
);

  logic [16:0] sum;        // binary adder, 17 bits for the word carry
  logic [15:0] addend;     // a or ~a
  logic        add_cin;
  logic [15:0] bcd;        // decimal adder result
  logic        bcd_c;      // decimal carry out of the selected width
  logic [15:0] raw;        // result before byte masking
  logic        msb_a, msb_b, msb_r;

  // BCD addition, one nibble at a time, carry rippling upward.
  always_comb begin
    logic [4:0] nib;
    logic       cy;
    cy    = cin;
    bcd   = '0;
    bcd_c = 1'b0;
    for (int i = 0; i < 4; i++) begin
      nib = {1'b0, a[4*i +: 4]} + {1'b0, b[4*i +: 4]} + {4'd0, cy};
      if (nib > 5'd9) begin
        nib = nib + 5'd6;
        cy  = 1'b1;
      end else begin
        cy  = 1'b0;
      end
      bcd[4*i +: 4] = nib[3:0];
      if (i == 1) bcd_c = cy;           // carry out of the low byte
    end
    if (!bw) bcd_c = cy;
  end

  always_comb begin
    addend  = a;
    add_cin = 1'b0;
    unique case (op)
      ALU_ADDC: add_cin = cin;
      ALU_SUBC: begin addend = ~a; add_cin = cin;  end
      ALU_SUB:  begin addend = ~a; add_cin = 1'b1; end
      default:  ;
    endcase
    if (bw) sum = {8'd0, b[7:0]} + {8'd0, addend[7:0]} + {16'd0, add_cin};
    else    sum = {1'b0, b} + {1'b0, addend} + {16'd0, add_cin};
  end

  always_comb begin
    unique case (op)
      ALU_PASS_A: raw = a;
      ALU_ADD, ALU_ADDC, ALU_SUBC, ALU_SUB: raw = sum[15:0];
      ALU_DADD:  raw = bcd;
      ALU_AND:   raw = b & a;
      ALU_BIC:   raw = b & ~a;
      ALU_BIS:   raw = b | a;
      ALU_XOR:   raw = b ^ a;
      ALU_RRC:   raw = bw ? {8'd0, cin, a[7:1]} : {cin, a[15:1]};
      ALU_RRA:   raw = bw ? {8'd0, a[7], a[7:1]} : {a[15], a[15:1]};
      ALU_SWPB:  raw = {a[7:0], a[15:8]};
      ALU_SXT:   raw = {{8{a[7]}}, a[7:0]};
      default:   raw = a;
    endcase
    // SWPB and SXT are word-only; everything else is cut to the low byte.
    if (bw && op != ALU_SWPB && op != ALU_SXT) res = {8'd0, raw[7:0]};
    else                                       res = raw;
  end

  always_comb begin
    logic word_res;
    word_res = !bw || op == ALU_SXT || op == ALU_SWPB;
    msb_a = bw ? a[7] : a[15];
    msb_b = bw ? b[7] : b[15];
    msb_r = word_res ? res[15] : res[7];
    z_out = word_res ? (res == 16'd0) : (res[7:0] == 8'd0);
    n_out = msb_r;
    c_out = cin;
    v_out = 1'b0;
    unique case (op)
      ALU_ADD, ALU_ADDC: begin
        c_out = bw ? sum[8] : sum[16];
        v_out = (msb_a == msb_b) && (msb_r != msb_a);
      end
      ALU_SUB, ALU_SUBC: begin
        c_out = bw ? sum[8] : sum[16];
        v_out = (msb_a != msb_b) && (msb_r != msb_b);
      end
      ALU_DADD: c_out = bcd_c;
      ALU_AND, ALU_SXT: c_out = !z_out;
      ALU_XOR: begin
        c_out = !z_out;
        v_out = msb_a && msb_b;
      end
      ALU_RRC, ALU_RRA: c_out = a[0];
      default: ;
    endcase
  end

endmodule

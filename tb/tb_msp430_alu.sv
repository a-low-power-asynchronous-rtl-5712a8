// tb_msp430_alu: random and corner-case test of the shared ALU.
//
// Every operation is applied in byte and word width to random operands and
// carries, plus operand values at the signed and unsigned limits. The
// expected result and flags come from a reference written in this
// testbench with integer arithmetic: V from the signed value being out of
// range, C from the unsigned value exceeding the width, and BCD addition
// digit by digit in decimal.
module tb_msp430_alu;
  import msp430_pkg::*;

  alu_op_e     op;
  logic        bw, cin;
  logic [15:0] a, b, res;
  logic        c_out, z_out, n_out, v_out;
  int checks = 0, failures = 0;

  msp430_alu dut (.*);

  function automatic int sgn(int v, int bits);
    return (v >= (1 << (bits - 1))) ? v - (1 << bits) : v;
  endfunction

  task automatic check_one();
    int bits  = bw ? 8 : 16;
    int mask  = (1 << bits) - 1;
    int ua    = int'(a) & mask;
    int ub    = int'(b) & mask;
    int r = 0, full = 0, sr_ = 0;
    bit ec = cin, ev = 0, word_out = 0;
    logic [15:0] er;
    bit ez, en;
    case (op)
      ALU_PASS_A: r = ua;
      ALU_ADD, ALU_ADDC: begin
        full = ub + ua + ((op == ALU_ADDC) ? int'(cin) : 0);
        sr_  = sgn(ub, bits) + sgn(ua, bits) + ((op == ALU_ADDC) ? int'(cin) : 0);
        r = full & mask; ec = full > mask;
        ev = sr_ > (mask >> 1) || sr_ < -(mask >> 1) - 1;
      end
      ALU_SUB, ALU_SUBC: begin
        int borrow = (op == ALU_SUB) ? 0 : 1 - int'(cin);
        full = ub - ua - borrow;
        sr_  = sgn(ub, bits) - sgn(ua, bits) - borrow;
        r = full & mask; ec = full >= 0;
        ev = sr_ > (mask >> 1) || sr_ < -(mask >> 1) - 1;
      end
      ALU_DADD: begin
        // decimal value of each nibble string (digits above 9 are fed
        // through the same per-digit rule as the hardware uses)
        int cy = int'(cin);
        r = 0;
        for (int d = 0; d < bits / 4; d++) begin
          int s = ((ua >> (4 * d)) & 15) + ((ub >> (4 * d)) & 15) + cy;
          cy = (s >= 10) ? 1 : 0;
          if (cy) s = s - 10;
          r |= (s & 15) << (4 * d);
        end
        ec = cy;
      end
      ALU_AND: begin r = ub & ua; ec = (r != 0); end
      ALU_BIC: r = ub & ~ua & mask;
      ALU_BIS: r = ub | ua;
      ALU_XOR: begin
        r = ub ^ ua; ec = (r != 0);
        ev = (sgn(ua, bits) < 0) && (sgn(ub, bits) < 0);
      end
      ALU_RRC: begin r = (ua >> 1) | (int'(cin) << (bits - 1)); ec = ua[0]; end
      ALU_RRA: begin r = (ua >> 1) | (ua & (1 << (bits - 1))); ec = ua[0]; end
      ALU_SWPB: begin r = ((int'(a) & 255) << 8) | ((int'(a) >> 8) & 255); word_out = 1; end
      ALU_SXT: begin
        r = (int'(a) & 128) ? (int'(a) & 255) | 16'hFF00 : int'(a) & 255;
        word_out = 1; ec = (r != 0);
      end
      default: ;
    endcase
    er = 16'(r);
    ez = word_out ? (er == 0) : ((int'(er) & mask) == 0);
    en = word_out ? er[15] : er[bits - 1];
    checks++;
    if (res !== er || z_out !== ez || n_out !== en ||
        (!(op inside {ALU_PASS_A, ALU_BIC, ALU_BIS, ALU_SWPB}) &&
         (c_out !== ec || v_out !== ev))) begin
      failures++;
      $display("FAIL %s bw=%0b a=%h b=%h cin=%0b: res %h/%h C %0b/%0b V %0b/%0b Z %0b/%0b N %0b/%0b",
               op.name(), bw, a, b, cin, res, er, c_out, ec, v_out, ev, z_out, ez, n_out, en);
    end
  endtask

  localparam logic [15:0] CORNER[8] = '{16'h0000, 16'h0001, 16'h007F, 16'h0080,
                                        16'h00FF, 16'h7FFF, 16'h8000, 16'hFFFF};

  initial begin
    for (int o = 0; o <= int'(ALU_SXT); o++) begin
      op = alu_op_e'(o);
      for (int bwi = 0; bwi < 2; bwi++) begin
        bw = bwi[0];
        if (bw && (op == ALU_SWPB || op == ALU_SXT)) continue;
        for (int i = 0; i < 8; i++)
          for (int k = 0; k < 8; k++) begin
            a = CORNER[i]; b = CORNER[k]; cin = k[0]; #1 check_one();
          end
        for (int n = 0; n < 400; n++) begin
          a = 16'($urandom); b = 16'($urandom); cin = 1'($urandom);
          if (op == ALU_DADD) begin
            // valid BCD operands
            a = {4'($urandom_range(9)), 4'($urandom_range(9)), 4'($urandom_range(9)), 4'($urandom_range(9))};
            b = {4'($urandom_range(9)), 4'($urandom_range(9)), 4'($urandom_range(9)), 4'($urandom_range(9))};
          end
          #1 check_one();
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

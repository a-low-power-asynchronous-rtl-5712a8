// msp430_asm_pkg: a small MSP430 assembler for the testbenches.
//
// Test programs are written as calls that append machine words to `code`,
// starting at byte address `org`. Operands are described with opnd_t
// values built by reg_/imm/ind/inc/idx/abs_/sym; immediates that one of the
// constant generators can produce (0, 1, 2, 4, 8, -1) are encoded through
// R2/R3 without an extension word, as an MSP430 assembler does. Jumps to
// labels not yet known are emitted with jf() and patched with fix().
package msp430_asm_pkg;

  // double-operand opcodes
  localparam int MOV = 4, ADD = 5, ADDC = 6, SUBC = 7, SUB = 8, CMP = 9,
                 DADD = 10, BIT = 11, BIC = 12, BIS = 13, XOR = 14, AND = 15;
  // single-operand opcodes
  localparam int RRC = 0, SWPB = 1, RRA = 2, SXT = 3, PUSH = 4, CALL = 5, RETI = 6;
  // jump conditions
  localparam int JNE = 0, JEQ = 1, JNC = 2, JC = 3, JN = 4, JGE = 5, JL = 6, JMP = 7;

  typedef struct {
    int          r;       // register
    int          m;       // mode 0..3
    bit          has_ext;
    bit          sym;     // extension is relative to its own address
    logic [15:0] ext;
  } opnd_t;

  logic [15:0] code[$];
  int unsigned org;

  function automatic void start(int unsigned base);
    code.delete();
    org = base;
  endfunction

  function automatic int unsigned here();
    return org + 2 * code.size();
  endfunction

  function automatic void w(logic [15:0] x);
    code.push_back(x);
  endfunction

  function automatic opnd_t reg_(int n);
    opnd_t o = '{r: n, m: 0, has_ext: 0, sym: 0, ext: 0};
    return o;
  endfunction
  function automatic opnd_t ind(int n);
    opnd_t o = '{r: n, m: 2, has_ext: 0, sym: 0, ext: 0};
    return o;
  endfunction
  function automatic opnd_t inc(int n);
    opnd_t o = '{r: n, m: 3, has_ext: 0, sym: 0, ext: 0};
    return o;
  endfunction
  function automatic opnd_t idx(int x, int n);
    opnd_t o = '{r: n, m: 1, has_ext: 1, sym: 0, ext: 16'(x)};
    return o;
  endfunction
  function automatic opnd_t abs_(int a);
    opnd_t o = '{r: 2, m: 1, has_ext: 1, sym: 0, ext: 16'(a)};
    return o;
  endfunction
  function automatic opnd_t sym(int a);
    opnd_t o = '{r: 0, m: 1, has_ext: 1, sym: 1, ext: 16'(a)};
    return o;
  endfunction
  // immediate, through the constant generators where possible
  function automatic opnd_t imm(int v);
    opnd_t o = '{r: 0, m: 3, has_ext: 1, sym: 0, ext: 16'(v)};
    case (16'(v))
      16'h0000: o = '{r: 3, m: 0, has_ext: 0, sym: 0, ext: 0};
      16'h0001: o = '{r: 3, m: 1, has_ext: 0, sym: 0, ext: 0};
      16'h0002: o = '{r: 3, m: 2, has_ext: 0, sym: 0, ext: 0};
      16'hFFFF: o = '{r: 3, m: 3, has_ext: 0, sym: 0, ext: 0};
      16'h0004: o = '{r: 2, m: 2, has_ext: 0, sym: 0, ext: 0};
      16'h0008: o = '{r: 2, m: 3, has_ext: 0, sym: 0, ext: 0};
      default: ;
    endcase
    return o;
  endfunction
  // immediate always with an extension word (no constant generator)
  function automatic opnd_t immx(int v);
    opnd_t o = '{r: 0, m: 3, has_ext: 1, sym: 0, ext: 16'(v)};
    return o;
  endfunction

  function automatic void put_ext(opnd_t o);
    if (o.has_ext) begin
      if (o.sym) w(o.ext - 16'(here()));
      else       w(o.ext);
    end
  endfunction

  // double-operand instruction; the destination must be a register or
  // an indexed/absolute/symbolic operand
  function automatic void i1(int op, opnd_t s, opnd_t d, bit bw = 0);
    w({4'(op), 4'(s.r), (d.m != 0), bw, 2'(s.m), 4'(d.r)});
    put_ext(s);
    put_ext(d);
  endfunction

  function automatic void i2(int op, opnd_t s, bit bw = 0);
    w({6'b000100, 3'(op), bw, 2'(s.m), 4'(s.r)});
    put_ext(s);
  endfunction

  function automatic void reti();
    w(16'h1300);
  endfunction

  // jump to a known address
  function automatic void j(int cond, int unsigned target);
    int off = (int'(target) - int'(here()) - 2) / 2;
    w({3'b001, 3'(cond), 10'(off)});
  endfunction

  // jump forward: returns the word index to patch with fix()
  function automatic int jf(int cond);
    w({3'b001, 3'(cond), 10'd0});
    return code.size() - 1;
  endfunction

  function automatic void fix(int at);
    int off = (int'(here()) - int'(org + 2 * at) - 2) / 2;
    code[at][9:0] = 10'(off);
  endfunction

  // common emulated instructions
  function automatic void ret();  i1(MOV, inc(1), reg_(0)); endfunction
  function automatic void pop(int n); i1(MOV, inc(1), reg_(n)); endfunction
  function automatic void halt(); j(JMP, here()); endfunction

endpackage

// msp430_regfile: the sixteen 16-bit registers R0..R15 of the core.
//
// R0 is the program counter, R1 the stack pointer, R2 the status register
// and R3 the second constant generator; R4..R15 are general purpose. Two
// asynchronous read ports feed the Src and Dst operand multiplexers in front
// of the ALU. One synchronous write port takes the ALU result (or data from
// the bus); a second path writes only the status register, so that an
// instruction can store its result and its flags in the same step. When both
// target R2 in the same cycle, the general write wins, as a program writing
// SR expects.
//
// R0 and R1 always hold even values (bit 0 is forced to zero on write).
// R3 reads as zero: it holds nothing, constants are formed in the core.
// Reset clears every register; the controller loads PC from the reset
// vector afterwards. Writes take effect at the next rising clock edge.
//
// The register set and roles are those of the MSP430; port count and reset
// behaviour are this design's own choice.
module msp430_regfile (
  input  logic        clk,
  input  logic        rst_n,
  // read ports
  input  logic [3:0]  ra_src,
  output logic [15:0] rd_src,
  input  logic [3:0]  ra_dst,
  output logic [15:0] rd_dst,
  // general write port
  input  logic        we,
  input  logic [3:0]  wa,
  input  logic [15:0] wd,
  // status register flag write
  input  logic        sr_we,
  input  logic [15:0] sr_wd,
  // dedicated views
  output logic [15:0] pc,
  output logic [15:0] sp,
  output logic [15:0] sr
);

  logic [15:0] regs [16];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < 16; i++) regs[i] <= '0;
    end else begin
      if (sr_we) regs[2] <= sr_wd;
      if (we) begin
        unique case (wa)
          4'd0, 4'd1: regs[wa] <= {wd[15:1], 1'b0};
          4'd3:       ;                              // constant generator
          default:    regs[wa] <= wd;
        endcase
      end
    end
  end

  assign rd_src = (ra_src == 4'd3) ? 16'd0 : regs[ra_src];
  assign rd_dst = (ra_dst == 4'd3) ? 16'd0 : regs[ra_dst];
  assign pc = regs[0];
  assign sp = regs[1];
  assign sr = regs[2];

endmodule

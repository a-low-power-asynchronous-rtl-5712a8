// msp430_mem: program and data memory on the core's bus.
//
// A single word-wide array standing for the ROM and RAM that sit on the
// processor's address and data bus. It answers the core's
// request/acknowledge channel: a request is accepted when req is high and
// no acknowledge is pending, the array is read and, for a write, updated
// after WAIT_STATES further cycles, and ack is raised for exactly one cycle
// with the read word in rdata (registered). The minimum latency is one
// cycle. For byte writes (byte_en = 1) only the lane chosen by addr[0] is
// written, from the matching half of wdata; reads always return the whole
// word and the core picks the lane.
//
// The memory holds WORDS 16-bit words at byte addresses 0 .. 2*WORDS-1
// (addresses wrap). Its content at reset is whatever was loaded; reset
// only clears the handshake state. The size, wait states and the single
// read/write port are this design's own choices; the document names the
// ROM and RAM but does not describe them.
module msp430_mem #(
  parameter int unsigned WORDS       = 32768,
  parameter int unsigned WAIT_STATES = 0
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        req,
  input  logic        we,
  input  logic        byte_en,
  input  logic [15:0] addr,
  input  logic [15:0] wdata,
  output logic [15:0] rdata,
  output logic        ack
);

  localparam int unsigned AW = (WORDS > 1) ? $clog2(WORDS) : 1;

  logic [15:0] mem [WORDS];
  logic [AW-1:0] widx;
  logic [7:0]    wait_cnt;

  assign widx = addr[AW:1];

  always_ff @(posedge clk) begin
    if (req && !ack && wait_cnt == 8'(WAIT_STATES) && we) begin
      if (!byte_en || !addr[0]) mem[widx][7:0]  <= wdata[7:0];
      if (!byte_en ||  addr[0]) mem[widx][15:8] <= wdata[15:8];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ack      <= 1'b0;
      wait_cnt <= '0;
      rdata    <= '0;
    end else if (req && !ack) begin
      if (wait_cnt == 8'(WAIT_STATES)) begin
        ack      <= 1'b1;
        wait_cnt <= '0;
        rdata    <= mem[widx];
      end else begin
        wait_cnt <= wait_cnt + 8'd1;
      end
    end else begin
      ack <= 1'b0;
    end
  end

endmodule

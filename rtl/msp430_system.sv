// msp430_system: the compact MSP430 core with its memory on one bus.
//
// The core's request/acknowledge bus is split by address: byte addresses
// below PER_LIMIT form the peripheral window, which is brought out on the
// per_* ports for peripherals such as a timer or an ADC; every other
// address reaches the on-chip memory (msp430_mem). The peripheral side must
// follow the same handshake as the memory: hold per_ack low until the
// transfer is done, then raise it for one cycle with per_rdata valid. An
// interrupt request from a peripheral enters on irq and is acknowledged on
// irq_ack. sleeping is high while the core is stopped in its low-power
// mode (SR.CPUOFF), the idle time of a duty-cycled sensor node.
//
// The partition into core, memory and peripherals follows the document;
// the address of the peripheral window (the MSP430's usual 0x0000-0x01FF),
// the memory size and the wait states are this design's own choices.
module msp430_system #(
  parameter logic [15:0] PER_LIMIT    = 16'h0200,
  parameter int unsigned MEM_WORDS    = 32768,
  parameter int unsigned MEM_WAIT     = 0,
  parameter logic [15:0] RESET_VECTOR = 16'hFFFE,
  parameter logic [15:0] IRQ_VECTOR   = 16'hFFF0
) (
  input  logic        clk,
  input  logic        rst_n,
  // peripheral window
  output logic        per_req,
  output logic        per_we,
  output logic        per_byte,
  output logic [15:0] per_addr,
  output logic [15:0] per_wdata,
  input  logic [15:0] per_rdata,
  input  logic        per_ack,
  // interrupt and status
  input  logic        irq,
  output logic        irq_ack,
  output logic        sleeping,
  output logic        insn_fetch
);

  logic        bus_req, bus_we, bus_byte, bus_ack;
  logic [15:0] bus_addr, bus_wdata, bus_rdata;
  logic        mem_req, mem_ack, sel_per;
  logic [15:0] mem_rdata;

  msp430_core #(
    .RESET_VECTOR(RESET_VECTOR),
    .IRQ_VECTOR  (IRQ_VECTOR)
  ) u_core (
    .clk, .rst_n,
    .bus_req, .bus_we, .bus_byte, .bus_addr, .bus_wdata, .bus_rdata, .bus_ack,
    .irq, .irq_ack, .sleeping, .insn_fetch
  );

  assign sel_per   = bus_addr < PER_LIMIT;
  assign per_req   = bus_req && sel_per;
  assign mem_req   = bus_req && !sel_per;
  assign per_we    = bus_we;
  assign per_byte  = bus_byte;
  assign per_addr  = bus_addr;
  assign per_wdata = bus_wdata;
  assign bus_ack   = sel_per ? per_ack : mem_ack;
  assign bus_rdata = sel_per ? per_rdata : mem_rdata;

  msp430_mem #(
    .WORDS      (MEM_WORDS),
    .WAIT_STATES(MEM_WAIT)
  ) u_mem (
    .clk, .rst_n,
    .req(mem_req), .we(bus_we), .byte_en(bus_byte), .addr(bus_addr),
    .wdata(bus_wdata), .rdata(mem_rdata), .ack(mem_ack)
  );

endmodule

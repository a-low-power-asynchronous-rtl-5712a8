// tb_msp430_mem: handshake, latency and byte-lane test of the memory.
//
// Random word and byte reads and writes are issued one at a time,
// mirrored in a model, and each read compared. The cycles from raising req
// to seeing ack are counted and must equal WAIT_STATES + 1; ack must be a
// single-cycle pulse. The memory is instantiated small, with two wait
// states, to keep the run short.
module tb_msp430_mem;
  localparam int unsigned WORDS = 256;
  localparam int unsigned WAITS = 2;
  logic        clk = 0, rst_n = 0;
  logic        req = 0, we = 0, byte_en = 0, ack;
  logic [15:0] addr = 0, wdata = 0, rdata;
  int checks = 0, failures = 0;
  logic [15:0] model [WORDS];

  msp430_mem #(.WORDS(WORDS), .WAIT_STATES(WAITS)) dut (.*);

  always #5 clk = ~clk;

  task automatic access(logic w, logic b, logic [15:0] a, logic [15:0] d, output logic [15:0] q);
    int lat = 0;
    @(negedge clk);
    req = 1; we = w; byte_en = b; addr = a; wdata = d;
    do begin
      @(posedge clk); #1; lat++;
    end while (!ack);
    q = rdata;
    checks++;
    if (lat != WAITS + 1) begin
      failures++;
      $display("FAIL latency %0d expected %0d", lat, WAITS + 1);
    end
    req = 0;
    @(posedge clk); #1;
    checks++;
    if (ack) begin failures++; $display("FAIL ack longer than one cycle"); end
  endtask

  initial begin
    logic [15:0] q, a, d;
    #12 rst_n = 1;
    for (int i = 0; i < WORDS; i++) begin
      access(1, 0, 16'(2 * i), 16'(i * 16'h0101), q);
      model[i] = 16'(i * 16'h0101);
    end
    for (int n = 0; n < 2000; n++) begin
      a = 16'($urandom_range(2 * WORDS - 1));
      d = 16'($urandom);
      case ($urandom_range(2))
        0: begin
          access(1, 0, a, d, q);
          model[a[8:1]] = d;
        end
        1: begin
          access(1, 1, a, {d[7:0], d[7:0]}, q);
          if (a[0]) model[a[8:1]][15:8] = d[7:0];
          else      model[a[8:1]][7:0]  = d[7:0];
        end
        default: begin
          access(0, 0, a, 16'h0, q);
          checks++;
          if (q !== model[a[8:1]]) begin
            failures++;
            $display("FAIL read %h: got %h expected %h", a, q, model[a[8:1]]);
          end
        end
      endcase
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_msp430_regfile: random write/read test of the register file.
//
// Random writes through the general port and the status-register port are
// mirrored in a model array; after each clock both read ports are compared
// with it for random addresses. The model applies the rules the register
// file promises: PC and SP hold even values, R3 reads as zero, and a
// general write to R2 wins over a simultaneous flag write.
module tb_msp430_regfile;
  logic        clk = 0, rst_n = 0;
  logic [3:0]  ra_src, ra_dst, wa;
  logic [15:0] rd_src, rd_dst, wd, sr_wd, pc, sp, sr;
  logic        we, sr_we;
  int checks = 0, failures = 0;
  logic [15:0] model [16];

  msp430_regfile dut (.*);

  always #5 clk = ~clk;

  task automatic chk(string what, logic [15:0] got, logic [15:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    we = 0; sr_we = 0; wa = 0; wd = 0; sr_wd = 0; ra_src = 0; ra_dst = 0;
    for (int i = 0; i < 16; i++) model[i] = 0;
    #12 rst_n = 1;
    for (int i = 0; i < 16; i++) begin
      ra_src = 4'(i); ra_dst = 4'(15 - i); #1;
      chk("reset src", rd_src, 16'h0);
      chk("reset dst", rd_dst, 16'h0);
    end
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      we = 1'($urandom); wa = 4'($urandom); wd = 16'($urandom);
      sr_we = ($urandom_range(3) == 0); sr_wd = 16'($urandom);
      @(posedge clk);
      if (sr_we) model[2] = sr_wd;
      if (we && wa != 3) model[wa] = (wa <= 1) ? {wd[15:1], 1'b0} : wd;
      #1;
      we = 0; sr_we = 0;
      ra_src = 4'($urandom); ra_dst = 4'($urandom); #1;
      chk("src port", rd_src, model[ra_src]);
      chk("dst port", rd_dst, model[ra_dst]);
      chk("pc", pc, model[0]);
      chk("sp", sp, model[1]);
      chk("sr", sr, model[2]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_ph_csr: register slave test. Checks reset values, write-then-read of
// TimeBase and Command, the read of NumInPFIFO, zero for unused addresses
// and for read low, the one-cycle timing of a write, and the one-cycle soft
// reset pulse that reloads TimeBase.
module tb_ph_csr;
  import ph_pkg::*;
  logic clk = 0, rst;
  logic [3:0] address;
  logic read, write, soft_reset;
  logic [31:0] writedata, readdata, num_in_pfifo, time_base;
  int checks = 0, failures = 0;

  ph_csr dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  task automatic rd(input logic [3:0] a, output logic [31:0] d);
    @(negedge clk);
    address = a; read = 1; write = 0;
    #1 d = readdata;
    @(negedge clk) read = 0;
  endtask

  task automatic wr(input logic [3:0] a, input logic [31:0] d);
    @(negedge clk);
    address = a; write = 1; read = 0; writedata = d;
    @(negedge clk) write = 0;
  endtask

  logic [31:0] d;
  int pulse;

  initial begin
    rst = 1; address = 0; read = 0; write = 0; writedata = 0; num_in_pfifo = 32'd1234;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    rd(4'h2, d); check(d == 32'd50000, "TimeBase reset value");
    rd(4'h0, d); check(d == 32'h0, "Command reset value");
    rd(4'h1, d); check(d == 32'd1234, "NumInPFIFO");
    num_in_pfifo = 32'd77;
    rd(4'h1, d); check(d == 32'd77, "NumInPFIFO follows input");
    wr(4'h2, 32'hdead_0001);
    rd(4'h2, d); check(d == 32'hdead_0001, "TimeBase written");
    check(time_base == 32'hdead_0001, "time_base output");
    // unused registers and read low
    for (int a = 3; a < 16; a++) begin
      wr(4'(a), 32'hffff_ffff);
      rd(4'(a), d); check(d == 0, "unused register reads zero");
    end
    wr(4'h1, 32'h5555);
    rd(4'h1, d); check(d == 32'd77, "NumInPFIFO not writable");
    @(negedge clk); address = 4'h2; read = 0; #1 check(readdata == 0, "readdata zero when read low");
    // write then read in the same cycle returns the old value, next cycle the new
    @(negedge clk); address = 4'h2; write = 1; read = 1; writedata = 32'h1111;
    #1 check(readdata == 32'hdead_0001, "same-cycle read returns old value");
    @(negedge clk); write = 0; #1 check(readdata == 32'h1111, "next-cycle read returns new value");
    @(negedge clk) read = 0;
    // Command: upper bits kept, bit 0 self-clearing soft reset of one cycle
    pulse = 0;
    fork
      begin
        @(negedge clk); address = 4'h0; write = 1; writedata = 32'h0000_0a01;
        @(negedge clk) write = 0;
      end
      begin
        repeat (6) begin @(posedge clk); #1 if (soft_reset) pulse++; end
      end
    join
    check(pulse == 1, "soft reset lasts one cycle");
    rd(4'h0, d); check(d == 32'h0000_0a00, "Command bit 0 cleared, others kept");
    rd(4'h2, d); check(d == 32'd50000, "soft reset reloads TimeBase");
    // hard reset
    wr(4'h2, 32'd99);
    @(negedge clk) rst = 1; @(negedge clk) rst = 0;
    rd(4'h2, d); check(d == 32'd50000, "hard reset reloads TimeBase");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

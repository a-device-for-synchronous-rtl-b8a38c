// tb_descriptor_fifo: random pushes and pops of 48-bit descriptors compared
// with a queue model: head, empty, full and count every cycle, including
// pushes into an empty FIFO and back-to-back pops.
module tb_descriptor_fifo;
  import ph_pkg::*;
  localparam int unsigned DEPTH = 16;
  localparam int unsigned CW    = $clog2(DEPTH + 1);

  logic clk = 0, rst;
  logic push, pop, empty, full;
  descriptor_t din, head;
  logic [CW-1:0] count;
  int checks = 0, failures = 0, n_full = 0;

  descriptor_fifo #(.DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  descriptor_t q[$];

  initial begin
    rst = 1; push = 0; pop = 0; din = '0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    for (int cyc = 0; cyc < 10000; cyc++) begin
      bit pacc;
      int bias;
      bias = ((cyc / 500) % 2 == 0) ? 70 : 30;
      check(empty == (q.size() == 0), "empty");
      check(full == (q.size() == DEPTH), "full");
      check(count == CW'(q.size()), "count");
      if (q.size() != 0) check(head == q[0], "head");
      if (full) n_full++;
      push = (q.size() != DEPTH) && ($urandom_range(0, 99) < bias);
      pop  = (q.size() != 0) && ($urandom_range(0, 99) < 100 - bias);
      din  = '{bytes: 16'($urandom), due_time: $urandom};
      @(posedge clk);
      pacc = pop && q.size() != 0;
      if (pacc) void'(q.pop_front());
      if (push) q.push_back(din);
      @(negedge clk);
    end
    check(n_full > 0, "full was reached");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

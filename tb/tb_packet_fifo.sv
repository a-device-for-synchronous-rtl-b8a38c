// tb_packet_fifo: random test of the packet data FIFO against a queue model.
// Writes, commits, rollbacks and reads are drawn at random; every cycle the
// show-ahead word, empty, full, almost_full and the committed word count are
// compared with the model. A small depth keeps full and almost-full common.
module tb_packet_fifo;
  localparam int unsigned DEPTH = 64;
  localparam int unsigned HEAD  = 10;
  localparam int unsigned CW    = $clog2(DEPTH + 1);

  logic clk = 0, rst;
  logic wr, commit, rollback, rd;
  logic [31:0] wdata, rdata;
  logic full, almost_full, empty;
  logic [CW-1:0] usedw;
  int checks = 0, failures = 0;
  int n_full = 0, n_af = 0, n_rb = 0;

  packet_fifo #(.WIDTH(32), .DEPTH(DEPTH), .HEADROOM_WORDS(HEAD)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
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

  logic [31:0] com[$], unc[$];

  initial begin
    rst = 1; wr = 0; commit = 0; rollback = 0; rd = 0; wdata = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    for (int cyc = 0; cyc < 20000; cyc++) begin
      bit m_full, wacc, racc;
      int phase;
      phase = (cyc / 2000) % 2;  // alternate fill-heavy and drain-heavy phases
      // compare outputs with the model
      m_full = (com.size() + unc.size()) == DEPTH;
      check(empty == (com.size() == 0), "empty");
      check(full == m_full, "full");
      check(almost_full == ((DEPTH - com.size() - unc.size()) < HEAD), "almost_full");
      check(usedw == CW'(com.size()), "usedw");
      if (com.size() != 0) check(rdata == com[0], "rdata");
      if (full) n_full++;
      if (almost_full) n_af++;
      // drive
      wr       = ($urandom_range(0, 99) < (phase == 0 ? 70 : 30));
      wdata    = $urandom;
      rollback = ($urandom_range(0, 99) < 2);
      commit   = !rollback && ($urandom_range(0, 99) < 15);
      rd       = (com.size() != 0) && ($urandom_range(0, 99) < (phase == 0 ? 30 : 70));
      @(posedge clk);
      wacc = wr && !m_full && !rollback;
      racc = rd && com.size() != 0;
      if (racc) void'(com.pop_front());
      if (rollback) begin
        unc.delete();
        n_rb++;
      end else begin
        if (wacc) unc.push_back(wdata);
        if (commit) begin
          foreach (unc[i]) com.push_back(unc[i]);
          unc.delete();
        end
      end
      @(negedge clk);
    end
    check(n_full > 0, "full was reached");
    check(n_af > 0, "almost_full was reached");
    check(n_rb > 0, "rollback happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_ph_tx: transmit state machine test against queue models of the two
// FIFOs. Checks that a descriptor due at time T gives startofpacket at T+2,
// that nothing is sent earlier, the sop/eop/empty framing and the data order
// for lengths 1..300 bytes, holding under random source back pressure, the
// hold window across a wrap of the 32-bit counter, and that a queued packet
// whose due time lies beyond the current TimeBase window is released.
module tb_ph_tx;
  import ph_pkg::*;
  logic clk = 0, rst;
  logic [31:0] now, time_base;
  descriptor_t df_head;
  logic df_empty, df_pop, pf_rd;
  logic [31:0] pf_rdata, source_data;
  logic [1:0] source_empty;
  logic source_startofpacket, source_endofpacket, source_valid, source_error, source_ready;
  tx_state_e state;
  int checks = 0, failures = 0;
  int n_stall = 0;

  ph_tx dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
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

  descriptor_t dq[$];
  logic [31:0] wq[$];
  logic [31:0] set_now;
  bit          load_now = 0;

  assign df_empty = (dq.size() == 0);
  assign df_head  = df_empty ? descriptor_t'('0) : dq[0];
  assign pf_rdata = (wq.size() == 0) ? 32'h0 : wq[0];

  // received beats
  logic [31:0] rx_data[$];
  int rx_sop_t[$];
  int rx_bytes[$];
  int cur_bytes;
  logic [31:0] cycle;

  always @(posedge clk) begin
    if (rst) cycle <= 0; else cycle <= cycle + 1;
    if (load_now) now <= set_now; else now <= now + 1;
    if (!rst) begin
      if (df_pop) void'(dq.pop_front());
      if (pf_rd) begin
        check(wq.size() != 0, "read of an empty data FIFO");
        void'(wq.pop_front());
      end
      if (source_valid && !source_ready) n_stall++;
      if (source_valid && source_ready) begin
        rx_data.push_back(source_data);
        if (source_startofpacket) begin rx_sop_t.push_back(int'(now)); cur_bytes = 0; end
        if (source_endofpacket) begin
          cur_bytes += 4 - int'(source_empty);
          rx_bytes.push_back(cur_bytes);
        end else cur_bytes += 4;
      end
    end
  end

  task automatic enqueue(input int len, input logic [31:0] due, ref logic [31:0] exp[$]);
    for (int i = 0; i < (len + 3) / 4; i++) begin
      logic [31:0] w = $urandom;
      wq.push_back(w);
      exp.push_back(w);
    end
    dq.push_back('{bytes: 16'(len), due_time: due});
  endtask

  task automatic jump_now(input logic [31:0] v);
    @(negedge clk); set_now = v; load_now = 1;
    @(negedge clk); load_now = 0;
  endtask

  logic [31:0] exp[$];

  initial begin
    rst = 1; now = 0; time_base = 32'd100; source_ready = 1;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;

    // 1. latency and framing, one packet at a time
    for (int len = 1; len <= 300; len += (len < 12 ? 1 : 37)) begin
      logic [31:0] due;
      rx_data.delete(); rx_sop_t.delete(); rx_bytes.delete(); exp.delete();
      @(negedge clk);
      due = now + 60;
      time_base = 60;
      enqueue(len, due, exp);
      while (rx_bytes.size() == 0) @(posedge clk);
      #1;
      check(rx_sop_t[0] == int'(due + 2), "sop at due time + 2");
      check(rx_bytes[0] == len, "byte count from sop..eop/empty");
      check(rx_data.size() == exp.size(), "beat count");
      foreach (exp[i]) if (i < rx_data.size()) check(rx_data[i] == exp[i], "data order");
    end

    // 2. many packets, random back pressure, random lengths, all already due
    rx_data.delete(); rx_bytes.delete(); exp.delete();
    begin
      int lens[$];
      for (int p = 0; p < 100; p++) begin
        int len;
        len = $urandom_range(1, 200);
        lens.push_back(len);
        enqueue(len, now - 5, exp);
      end
      time_base = 0;
      fork
        begin while (rx_bytes.size() < 100) @(posedge clk); end
        begin
          repeat (20000) begin
            @(negedge clk) source_ready = ($urandom_range(0, 99) < 60);
            if (rx_bytes.size() >= 100) break;
          end
        end
      join
      @(negedge clk) source_ready = 1;
      check(rx_bytes.size() == 100, "all packets out");
      foreach (lens[i]) if (i < rx_bytes.size()) check(rx_bytes[i] == lens[i], "length under back pressure");
      check(rx_data.size() == exp.size(), "beats under back pressure");
      foreach (exp[i]) if (i < rx_data.size()) check(rx_data[i] == exp[i], "data under back pressure");
      check(n_stall > 0, "source back pressure exercised");
    end

    // 3. counter wrap: due time lies past 2^32
    rx_sop_t.delete(); rx_bytes.delete(); rx_data.delete(); exp.delete();
    time_base = 32'd40;
    jump_now(32'hffff_fff0);
    @(negedge clk);
    begin
      logic [31:0] due;
      due = now + 32'd40;
      enqueue(20, due, exp);
      while (rx_bytes.size() == 0) @(posedge clk);
      #1;
      check(rx_sop_t[0] == int'(due + 2), "sop at due + 2 across wrap");
    end

    // 4. a queued packet due beyond the current TimeBase window is released
    rx_sop_t.delete(); rx_bytes.delete(); rx_data.delete(); exp.delete();
    time_base = 32'd10;
    @(negedge clk);
    begin
      logic [31:0] t0;
      t0 = now;
      enqueue(16, now + 32'd1000, exp);
      while (rx_bytes.size() == 0) @(posedge clk);
      #1;
      check(rx_sop_t[0] - int'(t0) < 10, "released outside the hold window");
    end
    // and one inside the window waits
    rx_sop_t.delete(); rx_bytes.delete(); rx_data.delete(); exp.delete();
    time_base = 32'd1000;
    @(negedge clk);
    begin
      logic [31:0] due;
      due = now + 32'd700;
      enqueue(16, due, exp);
      while (rx_bytes.size() == 0) @(posedge clk);
      #1;
      check(rx_sop_t[0] == int'(due + 2), "held inside the window until due");
    end
    check(source_error == 0, "error output low");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

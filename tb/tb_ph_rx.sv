// tb_ph_rx: receive-side test. Sends packets of random length with random
// valid gaps and checks the words written to the data FIFO, the commit at the
// end of packet, the descriptor (byte count, arrival time + TimeBase), the
// back pressure rule (ready low between packets while the data FIFO is almost
// full or the descriptor FIFO full, high throughout a packet), the drop of a
// packet that meets a full data FIFO (rollback, frame_dropped, no
// descriptor, rest discarded) and the discard of words outside a packet.
module tb_ph_rx;
  import ph_pkg::*;
  logic clk = 0, rst;
  logic [31:0] now, time_base;
  logic [31:0] sink_data;
  logic [1:0]  sink_empty;
  logic sink_startofpacket, sink_endofpacket, sink_valid, sink_ready;
  logic pf_wr, pf_commit, pf_rollback, pf_full, pf_almost_full;
  logic [31:0] pf_wdata;
  logic df_push, df_full, frame_dropped;
  descriptor_t df_din;
  int checks = 0, failures = 0;
  int n_drop = 0, n_bp = 0;

  ph_rx dut (.*);

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

  // model of what the FIFOs hold
  logic [31:0] unc[$], com[$];
  descriptor_t descs[$];
  int drops_seen = 0;

  always @(posedge clk) begin
    if (rst) now <= 0; else now <= now + 1;
    if (!rst) begin
      if (pf_rollback) begin unc.delete(); end
      else if (pf_wr) unc.push_back(pf_wdata);
      if (pf_commit) begin foreach (unc[i]) com.push_back(unc[i]); unc.delete(); end
      if (df_push) descs.push_back(df_din);
      if (frame_dropped) drops_seen++;
    end
  end

  // Send one packet of len bytes; returns the time of the accepted sop.
  task automatic send(input int len, input int gap_pct, output logic [31:0] t_sop,
                      input logic [31:0] first = 32'h0, input bit use_first = 0);
    int nw = (len + 3) / 4;
    int w = 0;
    while (w < nw) begin
      @(negedge clk);
      sink_valid = ($urandom_range(0, 99) >= gap_pct);
      sink_data  = (use_first && w == 0) ? first : $urandom;
      sink_startofpacket = (w == 0);
      sink_endofpacket   = (w == nw - 1);
      sink_empty         = (w == nw - 1) ? 2'((4 - len % 4) % 4) : 2'd0;
      #1;
      if (sink_valid && sink_ready) begin
        if (w == 0) t_sop = now;
        exp_words.push_back(sink_data);
        w++;
      end
      @(posedge clk);
    end
    @(negedge clk) sink_valid = 0;
  endtask

  logic [31:0] exp_words[$];

  initial begin
    logic [31:0] t;
    rst = 1; time_base = 32'd1000; sink_valid = 0; sink_data = 0; sink_empty = 0;
    sink_startofpacket = 0; sink_endofpacket = 0;
    pf_full = 0; pf_almost_full = 0; df_full = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;

    // 1. normal packets
    for (int p = 0; p < 200; p++) begin
      int len;
      len = $urandom_range(1, 300);
      time_base = $urandom_range(0, 100000);
      exp_words.delete();
      com.delete();
      send(len, 30, t);
      @(posedge clk); #1;
      check(descs.size() == 1, "one descriptor per packet");
      if (descs.size() == 1) begin
        check(descs[0].bytes == 16'(len), "byte count");
        check(descs[0].due_time == t + time_base, "due time = arrival + TimeBase");
      end
      descs.delete();
      check(com.size() == exp_words.size(), "word count committed");
      foreach (com[i]) if (i < exp_words.size()) check(com[i] == exp_words[i], "word data");
    end

    // 2. back pressure between packets
    @(negedge clk) pf_almost_full = 1; #1;
    check(sink_ready == 0, "ready low while almost full");
    df_full = 1; pf_almost_full = 0; #1;
    check(sink_ready == 0, "ready low while descriptor FIFO full");
    df_full = 0; #1;
    check(sink_ready == 1, "ready high with room");
    // almost full rising during a packet does not stop it
    fork
      begin send(200, 0, t); end
      begin repeat (10) @(posedge clk); @(negedge clk) pf_almost_full = 1; end
    join
    @(posedge clk); #1;
    check(descs.size() == 1, "packet finished after almost full");
    descs.delete();
    @(negedge clk); #1 check(sink_ready == 0, "ready low after the packet");
    // sender waits while ready is low
    fork
      begin exp_words.delete(); com.delete(); send(40, 0, t); end
      begin repeat (20) begin @(negedge clk); #2 if (!sink_ready && sink_valid) n_bp++; end
            @(posedge clk); #1 pf_almost_full = 0; end
    join
    @(posedge clk); #1;
    check(n_bp >= 15, "sink held off by back pressure");
    check(descs.size() == 1 && com.size() == 10, "held-off packet stored after release");
    descs.delete();

    // 3. full data FIFO in the middle of a packet: dropped
    com.delete(); unc.delete();
    fork
      begin send(400, 0, t); end
      begin repeat (30) @(posedge clk); @(negedge clk) pf_full = 1; end
    join
    @(posedge clk); #1;
    pf_full = 0;
    check(drops_seen == 1, "frame_dropped pulsed once");
    check(descs.size() == 0, "no descriptor for a dropped frame");
    check(com.size() == 0 && unc.size() == 0, "dropped words rolled back");
    n_drop = drops_seen;
    // the next packet is fine
    exp_words.delete();
    send(64, 10, t);
    @(posedge clk); #1;
    check(descs.size() == 1 && descs[0].bytes == 16'd64, "packet after a drop");
    check(com.size() == 16, "words after a drop");
    descs.delete(); com.delete();

    // 4. words outside a packet are discarded
    @(negedge clk); sink_valid = 1; sink_startofpacket = 0; sink_endofpacket = 0; sink_data = 32'h1234;
    @(negedge clk); sink_endofpacket = 1;
    @(negedge clk); sink_valid = 0;
    @(posedge clk); #1;
    check(com.size() == 0 && unc.size() == 0 && descs.size() == 0, "stray words discarded");

    check(n_drop > 0, "drop exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

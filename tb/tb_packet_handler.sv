// tb_packet_handler: end-to-end test of one packet handler with a reduced
// data FIFO (1024 words) and descriptor FIFO (32).
//  A  two packets, the first paused mid-way, with TimeBase = 50: each start
//     of packet leaves exactly TimeBase + 2 cycles after it arrived.
//  B  random traffic, random TimeBase and random source back pressure: data,
//     lengths and order are kept and no packet leaves before its delay.
//  C  a long delay fills the data FIFO until the sink is back-pressured;
//     NumInPFIFO is read; a frame that no longer fits is dropped; lowering
//     TimeBase on the fly releases the queue.
//  D  soft reset through the Command register empties the handler and
//     reloads TimeBase.
//  E  short packets fill the descriptor FIFO, which back-pressures the sink.
module tb_packet_handler;
  import ph_pkg::*;
  localparam int unsigned PDEPTH = 1024;
  localparam int unsigned DDEPTH = 32;

  logic clk = 0, reset;
  logic [31:0] asi_sink_data, aso_source_data;
  logic [1:0]  asi_sink_empty, aso_source_empty;
  logic asi_sink_endofpacket, asi_sink_startofpacket, asi_sink_valid, asi_sink_ready;
  logic [5:0]  asi_sink_error;
  logic aso_source_endofpacket, aso_source_error, aso_source_startofpacket, aso_source_valid;
  logic aso_source_ready;
  logic [3:0]  avs_slave_address;
  logic avs_slave_read, avs_slave_write;
  logic [31:0] avs_slave_writedata, avs_slave_readdata;
  int checks = 0, failures = 0;

  packet_handler #(.PKT_FIFO_DEPTH(PDEPTH), .DESC_FIFO_DEPTH(DDEPTH)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (2000000) @(posedge clk);
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

  // ---------------- register access ----------------
  task automatic csr_write(input logic [3:0] a, input logic [31:0] d);
    @(negedge clk);
    avs_slave_address = a; avs_slave_writedata = d; avs_slave_write = 1;
    @(negedge clk) avs_slave_write = 0;
  endtask
  task automatic csr_read(input logic [3:0] a, output logic [31:0] d);
    @(negedge clk);
    avs_slave_address = a; avs_slave_read = 1;
    #1 d = avs_slave_readdata;
    @(negedge clk) avs_slave_read = 0;
  endtask

  // ---------------- stimulus and monitor ----------------
  int unsigned cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  typedef struct { int len; int unsigned t_in; logic [31:0] words[$]; } pkt_t;
  pkt_t sent[$];      // accepted and expected to come out
  pkt_t got[$];
  pkt_t cur;
  int n_src_stall = 0, n_sink_bp = 0;
  int src_ready_pct = 100;

  always @(posedge clk) begin
    if (aso_source_valid && !aso_source_ready) n_src_stall++;
    if (aso_source_valid && aso_source_ready) begin
      if (aso_source_startofpacket) begin cur.len = 0; cur.t_in = cycle; cur.words.delete(); end
      cur.words.push_back(aso_source_data);
      if (aso_source_endofpacket) begin
        cur.len = 4 * cur.words.size() - int'(aso_source_empty);
        got.push_back(cur);
      end
    end
  end
  always @(negedge clk) aso_source_ready = ($urandom_range(0, 99) < src_ready_pct);

  // Send one packet; pause_at >= 0 drops valid for 5 cycles at that word.
  task automatic send(input int len, input int gap_pct, input bit expect_out = 1,
                      input int pause_at = -1);
    pkt_t p;
    int nw = (len + 3) / 4;
    int w = 0;
    int paused = 0;
    p.len = len;
    while (w < nw) begin
      @(negedge clk);
      asi_sink_valid = ($urandom_range(0, 99) >= gap_pct);
      if (w == pause_at && paused < 5) begin asi_sink_valid = 0; paused++; end
      asi_sink_data  = $urandom;
      asi_sink_startofpacket = (w == 0);
      asi_sink_endofpacket   = (w == nw - 1);
      asi_sink_empty         = (w == nw - 1) ? 2'((4 - len % 4) % 4) : 2'd0;
      #1;
      if (asi_sink_valid && !asi_sink_ready) n_sink_bp++;
      if (asi_sink_valid && asi_sink_ready) begin
        if (w == 0) p.t_in = cycle;
        p.words.push_back(asi_sink_data);
        w++;
      end
      @(posedge clk);
    end
    @(negedge clk) asi_sink_valid = 0;
    if (expect_out) sent.push_back(p);
  endtask

  task automatic wait_out(input int n, input int limit = 200000);
    int k = 0;
    while (got.size() < n && k < limit) begin @(posedge clk); k++; end
    check(got.size() >= n, "packets came out");
  endtask

  task automatic compare_all(input string tag);
    check(got.size() == sent.size(), {tag, ": packet count"});
    foreach (sent[i]) if (i < got.size()) begin
      check(got[i].len == sent[i].len, {tag, ": length"});
      check(got[i].words == sent[i].words, {tag, ": data"});
    end
  endtask

  int n_drop = 0;
  always @(posedge clk) if (dut.frame_dropped) n_drop++;

  logic [31:0] d;

  initial begin
    reset = 1; asi_sink_valid = 0; asi_sink_data = 0; asi_sink_empty = 0; asi_sink_error = 0;
    asi_sink_startofpacket = 0; asi_sink_endofpacket = 0;
    avs_slave_address = 0; avs_slave_read = 0; avs_slave_write = 0; avs_slave_writedata = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) reset = 0;
    csr_read(4'h2, d); check(d == 32'd50000, "TimeBase after reset");

    // A: fixed delay of 50 cycles, two packets
    csr_write(4'h2, 32'd50);
    send(40, 0, 1, 4);
    send(38, 0);
    wait_out(2);
    compare_all("A");
    foreach (sent[i]) if (i < got.size())
      check(got[i].t_in - sent[i].t_in == 50 + 2, "A: start-of-packet latency TimeBase + 2");
    sent.delete(); got.delete();

    // B: random traffic with source back pressure
    src_ready_pct = 70;
    for (int p = 0; p < 150; p++) begin
      int len, tb;
      len = $urandom_range(1, 400);
      if (p % 30 == 0) begin
        tb = $urandom_range(0, 600);
        csr_write(4'h2, 32'(tb));
      end
      send(len, 20);
    end
    wait_out(150);
    compare_all("B");
    src_ready_pct = 100;
    sent.delete(); got.delete();

    // C: fill until back pressure, drop an oversize frame, release
    csr_write(4'h2, 32'd1_000_000);
    fork
      begin for (int p = 0; p < 6; p++) send(400, 0); end
    join
    csr_read(4'h1, d);
    check(d == 600, "NumInPFIFO counts stored words");
    // 600 + 380 headroom > 1024 - 380: next frame waits
    fork
      send(1500, 0);
      begin
        repeat (50) @(posedge clk);
        check(n_sink_bp > 0, "C: sink back-pressured by the data FIFO");
        csr_write(4'h2, 32'd0);    // release the queue on the fly
      end
    join
    wait_out(7);
    compare_all("C1");
    sent.delete(); got.delete();
    // an oversize frame meets a full FIFO and is dropped
    csr_write(4'h2, 32'd1_000_000);
    send(2400, 0);
    send(2400, 0, 0);              // starts with 424 words free: dropped
    check(n_drop == 1, "C: oversize frame dropped");
    csr_read(4'h1, d);
    check(d == 600, "C: dropped frame left nothing in the FIFO");
    csr_write(4'h2, 32'd0);
    wait_out(1);
    compare_all("C2");
    sent.delete(); got.delete();

    // D: soft reset empties the handler
    csr_write(4'h2, 32'd100_000);
    send(200, 0, 0);
    send(200, 0, 0);
    csr_read(4'h1, d); check(d == 100, "D: words stored before soft reset");
    csr_write(4'h0, 32'h1);
    csr_read(4'h1, d); check(d == 0, "D: soft reset empties the data FIFO");
    csr_read(4'h2, d); check(d == 32'd50000, "D: soft reset reloads TimeBase");
    csr_read(4'h0, d); check(d[0] == 0, "D: reset bit cleared");
    csr_write(4'h2, 32'd10);
    repeat (200) @(posedge clk);
    check(got.size() == 0, "D: nothing sent after soft reset");
    send(64, 0);
    wait_out(1);
    compare_all("D");
    sent.delete(); got.delete();

    // E: descriptor FIFO full back-pressures the sink
    csr_write(4'h2, 32'd3000);
    begin
      int bp0;
      bp0 = n_sink_bp;
      for (int p = 0; p < DDEPTH + 4; p++) send(8, 0);
      check(n_sink_bp > bp0, "E: sink back-pressured by the descriptor FIFO");
    end
    wait_out(DDEPTH + 4);
    compare_all("E");

    check(n_src_stall > 0, "source back pressure seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_delay_device: end-to-end test of the two-port delay device at reduced
// FIFO sizes (1024-word data FIFOs, 16-entry descriptor FIFOs). The CPU port
// programs both handlers through their addresses 0x10000000 and 0x10000040.
// Traffic runs in both directions at once, and every mechanism of the design
// is made to happen and counted:
//   delay        packets leave TimeBase + 2 cycles after arrival, per port
//   asymmetric   the two directions use different delays
//   src_bp       the transmitting MAC holds a word (source back pressure)
//   sink_bp_data the data FIFO is within a frame of full: sink held off
//   sink_bp_desc the descriptor FIFO is full: sink held off
//   drop         an oversize frame meets a full data FIFO and is dropped
//   retime       TimeBase changed while packets wait (on the fly)
//   soft_reset   a Command write empties a handler
//   level        NumInPFIFO read through the CPU port
// Every packet that is not dropped must come out on the other port with its
// data, length and order intact.
module tb_delay_device;
  import ph_pkg::*;
  localparam int unsigned PDEPTH = 1024;
  localparam int unsigned DDEPTH = 16;
  localparam logic [31:0] BASE [2] = '{32'h1000_0000, 32'h1000_0040};

  logic clk = 0, reset;
  // per-port stream signals; index = MAC port
  logic [31:0] rx_data [2];
  logic [1:0]  rx_empty [2];
  logic        rx_sop [2], rx_eop [2], rx_valid [2], rx_ready [2];
  logic [31:0] tx_data [2];
  logic [1:0]  tx_empty [2];
  logic        tx_sop [2], tx_eop [2], tx_valid [2], tx_ready [2], tx_error [2];
  logic [31:0] cpu_address, cpu_writedata, cpu_readdata;
  logic        cpu_read, cpu_write, cpu_waitrequest;

  delay_device #(.PKT_FIFO_DEPTH(PDEPTH), .DESC_FIFO_DEPTH(DDEPTH)) dut (
    .clk, .reset,
    .mac0_rx_data(rx_data[0]), .mac0_rx_empty(rx_empty[0]), .mac0_rx_startofpacket(rx_sop[0]),
    .mac0_rx_endofpacket(rx_eop[0]), .mac0_rx_error(6'h0), .mac0_rx_valid(rx_valid[0]),
    .mac0_rx_ready(rx_ready[0]),
    .mac0_tx_data(tx_data[0]), .mac0_tx_empty(tx_empty[0]), .mac0_tx_startofpacket(tx_sop[0]),
    .mac0_tx_endofpacket(tx_eop[0]), .mac0_tx_error(tx_error[0]), .mac0_tx_valid(tx_valid[0]),
    .mac0_tx_ready(tx_ready[0]),
    .mac1_rx_data(rx_data[1]), .mac1_rx_empty(rx_empty[1]), .mac1_rx_startofpacket(rx_sop[1]),
    .mac1_rx_endofpacket(rx_eop[1]), .mac1_rx_error(6'h0), .mac1_rx_valid(rx_valid[1]),
    .mac1_rx_ready(rx_ready[1]),
    .mac1_tx_data(tx_data[1]), .mac1_tx_empty(tx_empty[1]), .mac1_tx_startofpacket(tx_sop[1]),
    .mac1_tx_endofpacket(tx_eop[1]), .mac1_tx_error(tx_error[1]), .mac1_tx_valid(tx_valid[1]),
    .mac1_tx_ready(tx_ready[1]),
    .cpu_address, .cpu_read, .cpu_write, .cpu_writedata, .cpu_readdata, .cpu_waitrequest
  );

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  initial begin
    repeat (3000000) @(posedge clk);
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

  // mechanism counters
  int n_delay = 0, n_asym = 0, n_src_bp = 0, n_bp_data = 0, n_bp_desc = 0;
  int n_drop = 0, n_retime = 0, n_soft_reset = 0, n_level = 0;

  // ---------------- CPU ----------------
  task automatic cpu_wr(input int h, input int r, input logic [31:0] d);
    @(negedge clk);
    cpu_address = BASE[h] + 32'(4 * r); cpu_writedata = d; cpu_write = 1;
    #1 check(cpu_waitrequest == 0, "no wait states");
    @(negedge clk) cpu_write = 0;
  endtask
  task automatic cpu_rd(input int h, input int r, output logic [31:0] d);
    @(negedge clk);
    cpu_address = BASE[h] + 32'(4 * r); cpu_read = 1;
    #1 d = cpu_readdata;
    @(negedge clk) cpu_read = 0;
  endtask

  // ---------------- traffic ----------------
  int unsigned cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  typedef struct { int len; int unsigned t_in; int unsigned t_out; logic [31:0] words[$]; } pkt_t;
  pkt_t sent [2][$];   // by receiving port
  pkt_t got  [2][$];   // by receiving port of the packet (= 1 - tx port)
  pkt_t cur  [2];
  int   ready_pct [2] = '{100, 100};
  bit   in_desc_test = 0;

  // tx port t carries packets received on port 1 - t
  for (genvar t = 0; t < 2; t++) begin : g_mon
    always @(posedge clk) begin
      if (tx_valid[t] && !tx_ready[t]) n_src_bp++;
      if (tx_valid[t] && tx_ready[t]) begin
        if (tx_sop[t]) begin cur[t].t_out = cycle; cur[t].words.delete(); end
        cur[t].words.push_back(tx_data[t]);
        if (tx_eop[t]) begin
          cur[t].len = 4 * cur[t].words.size() - int'(tx_empty[t]);
          got[1 - t].push_back(cur[t]);
        end
      end
    end
    always @(negedge clk) tx_ready[t] = ($urandom_range(0, 99) < ready_pct[t]);
    always @(negedge clk) begin
      #2;
      if (rx_valid[t] && !rx_ready[t]) begin
        if (in_desc_test) n_bp_desc++; else n_bp_data++;
      end
    end
  end

  always @(posedge clk) begin
    if (dut.u_ph0.frame_dropped) n_drop++;
    if (dut.u_ph1.frame_dropped) n_drop++;
  end

  task automatic send(input int h, input int len, input int gap_pct, input bit expect_out = 1);
    pkt_t p;
    int nw = (len + 3) / 4;
    int w = 0;
    p.len = len;
    while (w < nw) begin
      @(negedge clk);
      rx_valid[h] = ($urandom_range(0, 99) >= gap_pct);
      rx_data[h]  = $urandom;
      rx_sop[h]   = (w == 0);
      rx_eop[h]   = (w == nw - 1);
      rx_empty[h] = (w == nw - 1) ? 2'((4 - len % 4) % 4) : 2'd0;
      #1;
      if (rx_valid[h] && rx_ready[h]) begin
        if (w == 0) p.t_in = cycle;
        p.words.push_back(rx_data[h]);
        w++;
      end
      @(posedge clk);
    end
    @(negedge clk) rx_valid[h] = 0;
    if (expect_out) sent[h].push_back(p);
  endtask

  task automatic wait_out(input int h, input int n);
    int k = 0;
    while (got[h].size() < n && k < 500000) begin @(posedge clk); k++; end
    check(got[h].size() >= n, "packets came out");
  endtask

  task automatic compare(input int h, input string tag);
    check(got[h].size() == sent[h].size(), {tag, ": packet count"});
    foreach (sent[h][i]) if (i < got[h].size()) begin
      check(got[h][i].len == sent[h][i].len, {tag, ": length"});
      check(got[h][i].words == sent[h][i].words, {tag, ": data"});
    end
    sent[h].delete(); got[h].delete();
  endtask

  logic [31:0] d;

  initial begin
    reset = 1; cpu_address = 0; cpu_read = 0; cpu_write = 0; cpu_writedata = 0;
    for (int h = 0; h < 2; h++) begin
      rx_valid[h] = 0; rx_data[h] = 0; rx_sop[h] = 0; rx_eop[h] = 0; rx_empty[h] = 0;
    end
    repeat (3) @(posedge clk);
    @(negedge clk) reset = 0;

    // unmapped address reads zero
    @(negedge clk) cpu_address = 32'h2008_1000; cpu_read = 1;
    #1 check(cpu_readdata == 0, "unmapped read is zero");
    @(negedge clk) cpu_read = 0;

    // 1. asymmetric delays, both directions at once
    cpu_wr(0, 2, 32'd100);
    cpu_wr(1, 2, 32'd300);
    cpu_rd(0, 2, d); check(d == 100, "TimeBase 0 readback");
    cpu_rd(1, 2, d); check(d == 300, "TimeBase 1 readback");
    fork
      for (int p = 0; p < 8; p++) begin send(0, 60 + 8 * p, 0); repeat (150) @(posedge clk); end
      for (int p = 0; p < 8; p++) begin send(1, 90 + 4 * p, 0); repeat (350) @(posedge clk); end
    join
    wait_out(0, 8); wait_out(1, 8);
    for (int h = 0; h < 2; h++)
      foreach (sent[h][i]) if (i < got[h].size()) begin
        int unsigned lat;
        lat = got[h][i].t_out - sent[h][i].t_in;
        check(lat == (h == 0 ? 102 : 302), "latency TimeBase + 2");
        if (lat == (h == 0 ? 102 : 302)) n_delay++;
        if (h == 1 && lat == 302) n_asym++;
      end
    compare(0, "asym0"); compare(1, "asym1");

    // 2. random traffic both ways with source back pressure
    ready_pct = '{60, 75};
    cpu_wr(0, 2, 32'd500);
    cpu_wr(1, 2, 32'd50);
    fork
      for (int p = 0; p < 60; p++) send(0, $urandom_range(1, 600), 20);
      for (int p = 0; p < 60; p++) send(1, $urandom_range(1, 600), 20);
    join
    wait_out(0, 60); wait_out(1, 60);
    foreach (sent[0][i]) if (i < got[0].size())
      check(got[0][i].t_out - sent[0][i].t_in >= 502, "never early");
    compare(0, "rand0"); compare(1, "rand1");
    ready_pct = '{100, 100};

    // 3. data FIFO back pressure, level, then release on the fly
    cpu_wr(0, 2, 32'd5_000_000);
    for (int p = 0; p < 4; p++) send(0, 600, 0);
    cpu_rd(0, 1, d); check(d == 600, "NumInPFIFO via the CPU port"); n_level++;
    fork
      send(0, 600, 0);
      begin
        repeat (100) @(posedge clk);
        check(got[0].size() == 0, "held while delayed");
        cpu_wr(0, 2, 32'd20);   // lower the delay while packets wait
        n_retime++;
      end
    join
    wait_out(0, 5);
    compare(0, "release");

    // 4. drop an oversize frame
    cpu_wr(1, 2, 32'd5_000_000);
    send(1, 2400, 0);
    send(1, 2400, 0, 0);
    cpu_rd(1, 1, d); check(d == 600, "dropped frame left nothing");
    cpu_wr(1, 2, 32'd0);
    wait_out(1, 1);
    compare(1, "drop");

    // 5. descriptor FIFO full
    in_desc_test = 1;
    cpu_wr(0, 2, 32'd2000);
    for (int p = 0; p < DDEPTH + 3; p++) send(0, 12, 0);
    in_desc_test = 0;
    wait_out(0, DDEPTH + 3);
    compare(0, "desc");

    // 6. soft reset of handler 1 while it holds packets; handler 0 unaffected
    cpu_wr(1, 2, 32'd100_000);
    cpu_wr(0, 2, 32'd200);
    send(1, 100, 0, 0);
    fork
      send(0, 100, 0);
      cpu_wr(1, 0, 32'h1);
    join
    cpu_rd(1, 1, d); check(d == 0, "soft reset emptied handler 1");
    cpu_rd(1, 2, d); check(d == 32'd50000, "soft reset reloaded TimeBase 1");
    cpu_rd(0, 2, d); check(d == 32'd200, "handler 0 TimeBase kept");
    if (d == 32'd200) n_soft_reset++;
    wait_out(0, 1);
    compare(0, "reset0");
    repeat (500) @(posedge clk);
    check(got[1].size() == 0, "nothing from the reset handler");

    $display("mechanisms: delay=%0d asym=%0d src_bp=%0d sink_bp_data=%0d sink_bp_desc=%0d drop=%0d retime=%0d soft_reset=%0d level=%0d",
             n_delay, n_asym, n_src_bp, n_bp_data, n_bp_desc, n_drop, n_retime, n_soft_reset, n_level);
    check(n_delay > 0, "delay happened");
    check(n_asym > 0, "asymmetric delay happened");
    check(n_src_bp > 0, "source back pressure happened");
    check(n_bp_data > 0, "data FIFO back pressure happened");
    check(n_bp_desc > 0, "descriptor FIFO back pressure happened");
    check(n_drop == 1, "exactly one drop happened");
    check(n_retime > 0, "on-the-fly delay change happened");
    check(n_soft_reset > 0, "soft reset happened");
    check(n_level > 0, "fill level read");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

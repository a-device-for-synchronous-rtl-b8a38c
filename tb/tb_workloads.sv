// tb_workloads: the delay device at its default sizes under two traffic
// patterns of the kind it is meant for.
//  1. UDP-like stream: 1512-byte frames (a 1470-byte datagram with its
//     headers) at 50 Mb/s into port 0, that is one frame every 20,160 cycles
//     of an 83.3 MHz clock, with a 10 ms delay (833,000 cycles) in each
//     direction. Every frame must leave port 1 exactly TimeBase + 2 cycles
//     after it arrived, intact, with the sink never held off.
//  2. Linear delay ramp: the CPU raises handler 1's TimeBase by 300 cycles
//     every 255 cycles while 64-byte frames enter port 1 every 500 cycles.
//     Each frame must leave port 0 exactly (TimeBase at its arrival) + 2
//     cycles after it arrived, so the delay grows with the ramp.
module tb_workloads;
  import ph_pkg::*;
  localparam int unsigned DELAY   = 833_000;   // 10 ms at 83.3 MHz
  localparam int unsigned GAP     = 20_160;    // 1512 bytes at 50 Mb/s
  localparam int unsigned NFRAMES = 60;
  localparam int unsigned NRAMP   = 200;

  logic clk = 0, reset;
  logic [31:0] rx_data [2];
  logic [1:0]  rx_empty [2];
  logic        rx_sop [2], rx_eop [2], rx_valid [2], rx_ready [2];
  logic [31:0] tx_data [2];
  logic [1:0]  tx_empty [2];
  logic        tx_sop [2], tx_eop [2], tx_valid [2], tx_ready [2], tx_error [2];
  logic [31:0] cpu_address, cpu_writedata, cpu_readdata;
  logic        cpu_read, cpu_write, cpu_waitrequest;

  delay_device dut (
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
    repeat (4_000_000) @(posedge clk);
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

  task automatic cpu_wr(input int h, input int r, input logic [31:0] d);
    @(negedge clk);
    cpu_address = 32'h1000_0000 + 32'(h * 'h40 + 4 * r); cpu_writedata = d; cpu_write = 1;
    @(negedge clk) cpu_write = 0;
  endtask

  // Model of each handler's TimeBase, updated by the CPU writes seen.
  logic [31:0] tb_model [2];
  always @(posedge clk)
    if (cpu_write)
      for (int h = 0; h < 2; h++)
        if (cpu_address == 32'h1000_0000 + 32'(h * 'h40 + 8)) tb_model[h] <= cpu_writedata;

  int unsigned cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  typedef struct { int len; int unsigned t_in; int unsigned t_out; int unsigned exp_lat;
                   logic [31:0] words[$]; } pkt_t;
  pkt_t sent [2][$];
  pkt_t got  [2][$];
  pkt_t cur  [2];
  int   n_bp = 0;

  for (genvar t = 0; t < 2; t++) begin : g_mon
    assign tx_ready[t] = 1'b1;
    always @(posedge clk) begin
      if (tx_valid[t] && tx_ready[t]) begin
        if (tx_sop[t]) begin cur[t].t_out = cycle; cur[t].words.delete(); end
        cur[t].words.push_back(tx_data[t]);
        if (tx_eop[t]) begin
          cur[t].len = 4 * cur[t].words.size() - int'(tx_empty[t]);
          got[1 - t].push_back(cur[t]);
        end
      end
    end
  end

  task automatic send(input int h, input int len);
    pkt_t p;
    int nw = (len + 3) / 4;
    int w = 0;
    p.len = len;
    while (w < nw) begin
      @(negedge clk);
      rx_valid[h] = 1;
      rx_data[h]  = $urandom;
      rx_sop[h]   = (w == 0);
      rx_eop[h]   = (w == nw - 1);
      rx_empty[h] = (w == nw - 1) ? 2'((4 - len % 4) % 4) : 2'd0;
      #1;
      if (!rx_ready[h]) n_bp++;
      if (rx_ready[h]) begin
        if (w == 0) begin p.t_in = cycle; p.exp_lat = tb_model[h] + 2; end
        p.words.push_back(rx_data[h]);
        w++;
      end
      @(posedge clk);
    end
    @(negedge clk) rx_valid[h] = 0;
    sent[h].push_back(p);
  endtask

  task automatic verify(input int h, input string tag);
    int k = 0;
    while (got[h].size() < sent[h].size() && k < 2_000_000) begin @(posedge clk); k++; end
    check(got[h].size() == sent[h].size(), {tag, ": all frames out"});
    foreach (sent[h][i]) if (i < got[h].size()) begin
      check(got[h][i].t_out - sent[h][i].t_in == sent[h][i].exp_lat, {tag, ": delay"});
      check(got[h][i].len == sent[h][i].len, {tag, ": length"});
      check(got[h][i].words == sent[h][i].words, {tag, ": data"});
    end
  endtask

  initial begin
    reset = 1; cpu_address = 0; cpu_read = 0; cpu_write = 0; cpu_writedata = 0;
    tb_model = '{TIMEBASE_RESET, TIMEBASE_RESET};
    for (int h = 0; h < 2; h++) begin
      rx_valid[h] = 0; rx_data[h] = 0; rx_sop[h] = 0; rx_eop[h] = 0; rx_empty[h] = 0;
    end
    repeat (3) @(posedge clk);
    @(negedge clk) reset = 0;

    // 1. 50 Mb/s stream, 10 ms each way
    cpu_wr(0, 2, DELAY);
    cpu_wr(1, 2, DELAY);
    for (int f = 0; f < NFRAMES; f++) begin
      int unsigned t0;
      t0 = cycle;
      send(0, 1512);
      while (cycle - t0 < GAP) @(posedge clk);
    end
    verify(0, "udp");
    check(n_bp == 0, "udp: no back pressure at 50 Mb/s");
    $display("udp: %0d frames, delay %0d cycles each", got[0].size(), DELAY + 2);

    // 2. linear ramp on handler 1
    cpu_wr(1, 2, 32'd1000);
    fork
      begin
        for (int f = 0; f < NRAMP; f++) begin
          int unsigned t0;
          t0 = cycle;
          send(1, 64);
          while (cycle - t0 < 500) @(posedge clk);
        end
      end
      begin
        int unsigned tbv;
        tbv = 1000;
        repeat (NRAMP * 500 / 255) begin
          int unsigned t0;
          t0 = cycle;
          tbv += 300;
          cpu_wr(1, 2, tbv);
          while (cycle - t0 < 255) @(posedge clk);
        end
      end
    join
    verify(1, "ramp");
    check(got[1].size() > 1 && got[1][$].t_out - sent[1][$].t_in > got[1][0].t_out - sent[1][0].t_in,
          "ramp: delay grew");
    $display("ramp: first delay %0d, last delay %0d", got[1][0].t_out - sent[1][0].t_in,
             got[1][$].t_out - sent[1][$].t_in);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

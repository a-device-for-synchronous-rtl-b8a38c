// tb_delay_device_full: the delay device at its full size (32768-word data
// FIFOs, 512-entry descriptor FIFOs, default parameters) through one
// complete operation:
//  1. the CPU sets a 25 ms one-way delay (2,082,500 cycles of an 83.3 MHz
//     clock) in both handlers;
//  2. a 74-byte echo request enters port 0, leaves port 1 after the delay,
//     and the echo reply sent back on port 1 leaves port 0 after the delay
//     again: a 50 ms round trip, each leg TimeBase + 2 cycles;
//  3. with the delay still set, 1514-byte frames are sent into port 0 until
//     the handler holds the sink off because its data FIFO is within one
//     frame of full; NumInPFIFO is read; lowering TimeBase then releases
//     every frame, intact and in order.
module tb_delay_device_full;
  import ph_pkg::*;
  localparam int unsigned DELAY = 2_082_500;   // 25 ms at 83.3 MHz

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
    repeat (12_000_000) @(posedge clk);
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
  task automatic cpu_rd(input int h, input int r, output logic [31:0] d);
    @(negedge clk);
    cpu_address = 32'h1000_0000 + 32'(h * 'h40 + 4 * r); cpu_read = 1;
    #1 d = cpu_readdata;
    @(negedge clk) cpu_read = 0;
  endtask

  int unsigned cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  typedef struct { int len; int unsigned t_in; int unsigned t_out; logic [31:0] words[$]; } pkt_t;
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
        if (w == 0) p.t_in = cycle;
        p.words.push_back(rx_data[h]);
        w++;
      end
      @(posedge clk);
    end
    @(negedge clk) rx_valid[h] = 0;
    sent[h].push_back(p);
  endtask

  task automatic wait_out(input int h, input int n);
    int k = 0;
    while (got[h].size() < n && k < 2_500_000) begin @(posedge clk); k++; end
    check(got[h].size() >= n, "packets came out");
  endtask

  logic [31:0] d;
  int n_frames;

  initial begin
    reset = 1; cpu_address = 0; cpu_read = 0; cpu_write = 0; cpu_writedata = 0;
    for (int h = 0; h < 2; h++) begin
      rx_valid[h] = 0; rx_data[h] = 0; rx_sop[h] = 0; rx_eop[h] = 0; rx_empty[h] = 0;
    end
    repeat (3) @(posedge clk);
    @(negedge clk) reset = 0;

    // 1. program the delay
    cpu_wr(0, 2, DELAY);
    cpu_wr(1, 2, DELAY);
    cpu_rd(0, 2, d); check(d == DELAY, "TimeBase 0");
    cpu_rd(1, 2, d); check(d == DELAY, "TimeBase 1");

    // 2. echo request and reply
    send(0, 74);
    wait_out(0, 1);
    check(got[0].size() == 1 && got[0][0].t_out - sent[0][0].t_in == DELAY + 2, "request leg");
    check(got[0].size() == 1 && got[0][0].words == sent[0][0].words, "request data");
    send(1, 74);
    wait_out(1, 1);
    check(got[1].size() == 1 && got[1][0].t_out - sent[1][0].t_in == DELAY + 2, "reply leg");
    check(got[1].size() == 1 && got[1][0].words == sent[1][0].words, "reply data");
    check(got[1].size() == 1 && got[1][0].t_out - sent[0][0].t_in >= 2 * DELAY + 4, "round trip");
    $display("round trip %0d cycles", got[1][0].t_out - sent[0][0].t_in);
    sent[0].delete(); got[0].delete();

    // 3. fill the data FIFO of handler 0 until the sink is held off
    n_frames = 0;
    forever begin
      @(negedge clk); #1;
      if (!rx_ready[0] || n_frames >= 200) break;
      send(0, 1514);
      n_frames++;
    end
    $display("frames accepted before back pressure: %0d", n_frames);
    fork
      begin send(0, 1514); n_frames++; end
      begin
        repeat (1000) @(posedge clk);
        check(n_bp >= 900, "sink held off by a full data FIFO");
        cpu_rd(0, 1, d);
        check(d >= 32768 - 379 && d <= 32768, "NumInPFIFO near full");
        $display("NumInPFIFO %0d", d);
        check(got[0].size() == 0, "held during the delay");
        cpu_wr(0, 2, 32'd0);
      end
    join
    wait_out(0, n_frames);
    check(got[0].size() == sent[0].size(), "all frames released");
    foreach (sent[0][i]) if (i < got[0].size())
      check(got[0][i].len == 1514 && got[0][i].words == sent[0][i].words, "frame data");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// packet_handler: delays every Avalon streaming packet by a programmable
// number of clock cycles (the "PacketHandlerOnChip" component).
//
// Packets arriving on the sink are stored word by word in an on-chip packet
// data FIFO (32768 x 32 bits). For each packet a 48-bit descriptor, its byte
// count and its due time (arrival time on a free-running 32-bit cycle counter
// plus TimeBase), goes into a descriptor FIFO (512 deep). The transmit state
// machine watches the oldest descriptor and, once it is due, streams the
// packet out of the source. Packets leave in arrival order, like a store-and-
// forward switch without priority queues. The CPU sets TimeBase and issues a
// soft reset through a 16-word Avalon-MM slave; NumInPFIFO reports the fill
// level of the packet data FIFO.
//
// Ports carry the Avalon names of the original component. All interfaces
// are zero-latency: the sink takes a word when valid and ready are high, the
// source offers a word until ready is high, slave reads answer in the same
// cycle and writes take effect at the next edge. One clock; `reset` is
// active high and synchronous, and a soft reset (Command bit 0) clears the
// counter, both FIFOs, both state machines and TimeBase for one cycle.
// The minimum delay from a start-of-packet accepted at counter value t to the
// start-of-packet offered is TimeBase + 2 cycles, provided the packet has
// been received completely by then; otherwise it leaves two cycles after its
// last word is stored. asi_sink_error is not used and aso_source_error is
// always 0, as in the original. The synchronous reset is this design's
// choice; the original's resets are asynchronous.
module packet_handler
  import ph_pkg::*;
#(
  parameter int unsigned PKT_FIFO_DEPTH  = 32768,
  parameter int unsigned DESC_FIFO_DEPTH = 512,
  parameter logic [TIME_W-1:0] TIMEBASE_INIT = TIMEBASE_RESET
) (
  input  logic               clk,
  input  logic               reset,
  // Avalon-ST sink (from the receiving MAC)
  input  logic [DATA_W-1:0]  asi_sink_data,
  input  logic [EMPTY_W-1:0] asi_sink_empty,
  input  logic               asi_sink_endofpacket,
  input  logic [ERROR_W-1:0] asi_sink_error,
  input  logic               asi_sink_startofpacket,
  input  logic               asi_sink_valid,
  output logic               asi_sink_ready,
  // Avalon-ST source (to the transmitting MAC)
  output logic [DATA_W-1:0]  aso_source_data,
  output logic [EMPTY_W-1:0] aso_source_empty,
  output logic               aso_source_endofpacket,
  output logic               aso_source_error,
  output logic               aso_source_startofpacket,
  output logic               aso_source_valid,
  input  logic               aso_source_ready,
  // Avalon-MM slave (registers)
  input  logic [CSR_AW-1:0]  avs_slave_address,
  input  logic               avs_slave_read,
  input  logic               avs_slave_write,
  input  logic [31:0]        avs_slave_writedata,
  output logic [31:0]        avs_slave_readdata
);

  localparam int unsigned PCW = $clog2(PKT_FIFO_DEPTH + 1);
  localparam int unsigned DCW = $clog2(DESC_FIFO_DEPTH + 1);

  logic              soft_reset, sh_reset;
  logic [TIME_W-1:0] current_time, time_base;

  logic              pf_wr, pf_commit, pf_rollback, pf_full, pf_almost_full;
  logic              pf_rd, pf_empty;
  logic [DATA_W-1:0] pf_wdata, pf_rdata;
  logic [PCW-1:0]    pf_usedw;

  logic              df_push, df_pop, df_empty, df_full;
  descriptor_t       df_din, df_head;
  logic [DCW-1:0]    df_count;

  logic              frame_dropped;
  tx_state_e         tx_state;

  assign sh_reset = reset || soft_reset;

  // Free-running local time base, one count per clock.
  always_ff @(posedge clk) begin
    if (sh_reset) current_time <= '0;
    else          current_time <= current_time + 1'b1;
  end

  ph_csr #(.TIMEBASE_INIT(TIMEBASE_INIT)) u_csr (
    .clk          (clk),
    .rst          (reset),
    .address      (avs_slave_address),
    .read         (avs_slave_read),
    .write        (avs_slave_write),
    .writedata    (avs_slave_writedata),
    .readdata     (avs_slave_readdata),
    .num_in_pfifo (32'(pf_usedw)),
    .soft_reset   (soft_reset),
    .time_base    (time_base)
  );

  ph_rx u_rx (
    .clk                (clk),
    .rst                (sh_reset),
    .now                (current_time),
    .time_base          (time_base),
    .sink_data          (asi_sink_data),
    .sink_empty         (asi_sink_empty),
    .sink_startofpacket (asi_sink_startofpacket),
    .sink_endofpacket   (asi_sink_endofpacket),
    .sink_valid         (asi_sink_valid),
    .sink_ready         (asi_sink_ready),
    .pf_wr              (pf_wr),
    .pf_wdata           (pf_wdata),
    .pf_commit          (pf_commit),
    .pf_rollback        (pf_rollback),
    .pf_full            (pf_full),
    .pf_almost_full     (pf_almost_full),
    .df_push            (df_push),
    .df_din             (df_din),
    .df_full            (df_full),
    .frame_dropped      (frame_dropped)
  );

  packet_fifo #(.WIDTH(DATA_W), .DEPTH(PKT_FIFO_DEPTH)) u_packet_fifo (
    .clk         (clk),
    .rst         (sh_reset),
    .wr          (pf_wr),
    .wdata       (pf_wdata),
    .commit      (pf_commit),
    .rollback    (pf_rollback),
    .full        (pf_full),
    .almost_full (pf_almost_full),
    .rd          (pf_rd),
    .rdata       (pf_rdata),
    .empty       (pf_empty),
    .usedw       (pf_usedw)
  );

  descriptor_fifo #(.DEPTH(DESC_FIFO_DEPTH)) u_descriptor_fifo (
    .clk   (clk),
    .rst   (sh_reset),
    .push  (df_push),
    .din   (df_din),
    .pop   (df_pop),
    .head  (df_head),
    .empty (df_empty),
    .full  (df_full),
    .count (df_count)
  );

  ph_tx u_tx (
    .clk                  (clk),
    .rst                  (sh_reset),
    .now                  (current_time),
    .time_base            (time_base),
    .df_head              (df_head),
    .df_empty             (df_empty),
    .df_pop               (df_pop),
    .pf_rdata             (pf_rdata),
    .pf_rd                (pf_rd),
    .source_data          (aso_source_data),
    .source_empty         (aso_source_empty),
    .source_startofpacket (aso_source_startofpacket),
    .source_endofpacket   (aso_source_endofpacket),
    .source_valid         (aso_source_valid),
    .source_error         (aso_source_error),
    .source_ready         (aso_source_ready),
    .state                (tx_state)
  );

  // Every word the transmitter takes must be in the data FIFO.
  a_data_present: assert property (@(posedge clk) disable iff (sh_reset)
    pf_rd |-> !pf_empty);

endmodule

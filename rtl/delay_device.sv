// delay_device: the FPGA core of a two-port Ethernet delay device.
//
// Two Ethernet MACs (outside this design) present received frames as Avalon
// streaming sources and take frames to send through Avalon streaming sinks.
// Packet handler 0 delays the traffic received on port 0 and hands it to the
// transmitter of port 1; packet handler 1 does the same from port 1 to port 0.
// A CPU reaches the register slaves of both handlers through its data master
// at 0x10000000 (handler 0) and 0x10000040 (handler 1). Setting both
// handlers' TimeBase to the same value makes a symmetric link delay, so the
// round trip grows by twice that value; different values make an asymmetric
// link.
//
// Ports: mac0_rx_* is what MAC 0 receives (into handler 0), mac1_tx_* what
// MAC 1 must send (out of handler 0), and likewise mac1_rx_* / mac0_tx_* for
// handler 1. cpu_* is the CPU data master, byte addressed, zero wait states.
// One clock domain, synchronous active-high reset. The MACs, CPU, memory
// controller, timers, UART, PLL and transceivers of the full system are not
// part of this RTL; their connections to the handlers are these ports.
module delay_device
  import ph_pkg::*;
#(
  parameter int unsigned PKT_FIFO_DEPTH  = 32768,
  parameter int unsigned DESC_FIFO_DEPTH = 512
) (
  input  logic               clk,
  input  logic               reset,
  // MAC 0 receive stream -> handler 0
  input  logic [DATA_W-1:0]  mac0_rx_data,
  input  logic [EMPTY_W-1:0] mac0_rx_empty,
  input  logic               mac0_rx_startofpacket,
  input  logic               mac0_rx_endofpacket,
  input  logic [ERROR_W-1:0] mac0_rx_error,
  input  logic               mac0_rx_valid,
  output logic               mac0_rx_ready,
  // handler 1 -> MAC 0 transmit stream
  output logic [DATA_W-1:0]  mac0_tx_data,
  output logic [EMPTY_W-1:0] mac0_tx_empty,
  output logic               mac0_tx_startofpacket,
  output logic               mac0_tx_endofpacket,
  output logic               mac0_tx_error,
  output logic               mac0_tx_valid,
  input  logic               mac0_tx_ready,
  // MAC 1 receive stream -> handler 1
  input  logic [DATA_W-1:0]  mac1_rx_data,
  input  logic [EMPTY_W-1:0] mac1_rx_empty,
  input  logic               mac1_rx_startofpacket,
  input  logic               mac1_rx_endofpacket,
  input  logic [ERROR_W-1:0] mac1_rx_error,
  input  logic               mac1_rx_valid,
  output logic               mac1_rx_ready,
  // handler 0 -> MAC 1 transmit stream
  output logic [DATA_W-1:0]  mac1_tx_data,
  output logic [EMPTY_W-1:0] mac1_tx_empty,
  output logic               mac1_tx_startofpacket,
  output logic               mac1_tx_endofpacket,
  output logic               mac1_tx_error,
  output logic               mac1_tx_valid,
  input  logic               mac1_tx_ready,
  // CPU data master (Avalon-MM)
  input  logic [31:0]        cpu_address,
  input  logic               cpu_read,
  input  logic               cpu_write,
  input  logic [31:0]        cpu_writedata,
  output logic [31:0]        cpu_readdata,
  output logic               cpu_waitrequest
);

  logic [CSR_AW-1:0] s_address   [2];
  logic              s_read      [2];
  logic              s_write     [2];
  logic [31:0]       s_writedata [2];
  logic [31:0]       s_readdata  [2];

  mm_decoder #(
    .N_SLAVES (2),
    .BASE     (32'h1000_0000),
    .SPAN     (32'h40),
    .SAW      (CSR_AW)
  ) u_decoder (
    .m_address     (cpu_address),
    .m_read        (cpu_read),
    .m_write       (cpu_write),
    .m_writedata   (cpu_writedata),
    .m_readdata    (cpu_readdata),
    .m_waitrequest (cpu_waitrequest),
    .s_address     (s_address),
    .s_read        (s_read),
    .s_write       (s_write),
    .s_writedata   (s_writedata),
    .s_readdata    (s_readdata)
  );

  // Handler 0: port 0 -> port 1
  packet_handler #(
    .PKT_FIFO_DEPTH  (PKT_FIFO_DEPTH),
    .DESC_FIFO_DEPTH (DESC_FIFO_DEPTH)
  ) u_ph0 (
    .clk                      (clk),
    .reset                    (reset),
    .asi_sink_data            (mac0_rx_data),
    .asi_sink_empty           (mac0_rx_empty),
    .asi_sink_endofpacket     (mac0_rx_endofpacket),
    .asi_sink_error           (mac0_rx_error),
    .asi_sink_startofpacket   (mac0_rx_startofpacket),
    .asi_sink_valid           (mac0_rx_valid),
    .asi_sink_ready           (mac0_rx_ready),
    .aso_source_data          (mac1_tx_data),
    .aso_source_empty         (mac1_tx_empty),
    .aso_source_endofpacket   (mac1_tx_endofpacket),
    .aso_source_error         (mac1_tx_error),
    .aso_source_startofpacket (mac1_tx_startofpacket),
    .aso_source_valid         (mac1_tx_valid),
    .aso_source_ready         (mac1_tx_ready),
    .avs_slave_address        (s_address[0]),
    .avs_slave_read           (s_read[0]),
    .avs_slave_write          (s_write[0]),
    .avs_slave_writedata      (s_writedata[0]),
    .avs_slave_readdata       (s_readdata[0])
  );

  // Handler 1: port 1 -> port 0
  packet_handler #(
    .PKT_FIFO_DEPTH  (PKT_FIFO_DEPTH),
    .DESC_FIFO_DEPTH (DESC_FIFO_DEPTH)
  ) u_ph1 (
    .clk                      (clk),
    .reset                    (reset),
    .asi_sink_data            (mac1_rx_data),
    .asi_sink_empty           (mac1_rx_empty),
    .asi_sink_endofpacket     (mac1_rx_endofpacket),
    .asi_sink_error           (mac1_rx_error),
    .asi_sink_startofpacket   (mac1_rx_startofpacket),
    .asi_sink_valid           (mac1_rx_valid),
    .asi_sink_ready           (mac1_rx_ready),
    .aso_source_data          (mac0_tx_data),
    .aso_source_empty         (mac0_tx_empty),
    .aso_source_endofpacket   (mac0_tx_endofpacket),
    .aso_source_error         (mac0_tx_error),
    .aso_source_startofpacket (mac0_tx_startofpacket),
    .aso_source_valid         (mac0_tx_valid),
    .aso_source_ready         (mac0_tx_ready),
    .avs_slave_address        (s_address[1]),
    .avs_slave_read           (s_read[1]),
    .avs_slave_write          (s_write[1]),
    .avs_slave_writedata      (s_writedata[1]),
    .avs_slave_readdata       (s_readdata[1])
  );

endmodule

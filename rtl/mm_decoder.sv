// mm_decoder: Avalon memory-mapped address decode from the CPU's data master
// to the register slaves of the packet handlers.
//
// Slave i occupies the byte range BASE + i*SPAN .. BASE + (i+1)*SPAN - 1
// (0x10000000-0x1000003F and 0x10000040-0x1000007F by default, as in the
// delay device's memory map). The slaves are word addressed: byte address
// BASE + i*SPAN + 4*k reaches register k of slave i. Reads and writes pass
// straight through with no wait states; readdata is the selected slave's
// readdata in the same cycle, and zero for addresses outside every range.
// waitrequest is always low because every slave answers in zero cycles.
// Other system slaves (MAC control ports, timers, UART, ...) are not decoded
// here. The arithmetic decode is this design's stand-in for the generated
// system interconnect.
module mm_decoder #(
  parameter int unsigned        N_SLAVES = 2,
  parameter logic [31:0]        BASE     = 32'h1000_0000,
  parameter int unsigned        SPAN     = 32'h40,
  parameter int unsigned        SAW      = 4,   // slave word address width
  localparam int unsigned       SEL_W    = (N_SLAVES > 1) ? $clog2(N_SLAVES) : 1
) (
  // master side
  input  logic [31:0]           m_address,
  input  logic                  m_read,
  input  logic                  m_write,
  input  logic [31:0]           m_writedata,
  output logic [31:0]           m_readdata,
  output logic                  m_waitrequest,
  // slave side
  output logic [SAW-1:0]        s_address   [N_SLAVES],
  output logic                  s_read      [N_SLAVES],
  output logic                  s_write     [N_SLAVES],
  output logic [31:0]           s_writedata [N_SLAVES],
  input  logic [31:0]           s_readdata  [N_SLAVES]
);

  logic [31:0] offset;
  logic        hit;
  logic [SEL_W-1:0] sel;

  assign offset        = m_address - BASE;
  assign hit           = (m_address >= BASE) && (offset < 32'(N_SLAVES * SPAN));
  assign sel           = SEL_W'(offset / SPAN);
  assign m_waitrequest = 1'b0;

  always_comb begin
    m_readdata = '0;
    for (int i = 0; i < N_SLAVES; i++) begin
      s_address[i]   = SAW'((offset % SPAN) >> 2);
      s_writedata[i] = m_writedata;
      s_read[i]      = hit && (sel == SEL_W'(i)) && m_read;
      s_write[i]     = hit && (sel == SEL_W'(i)) && m_write;
      if (hit && (sel == SEL_W'(i)) && m_read) m_readdata = s_readdata[i];
    end
  end

endmodule

// ph_csr: control and status registers of the packet handler.
//
// An Avalon memory-mapped read/write slave with sixteen 32-bit words at word
// addresses 0x0..0xF (the CPU sees them at base + 4 * address):
//   0x0 Command    R/W  writing 1 to bit 0 issues a soft reset
//   0x1 NumInPFIFO R    words currently held in the packet data FIFO
//   0x2 TimeBase   R/W  delay added to each packet's arrival time, in cycles
//   0x3..0xF            read as zero, writes ignored
// Reads have no wait states: readdata is decoded combinationally and is
// valid in the cycle `read` is high (zero when read is low). A write is
// taken at the clock edge that ends the cycle in which `write` is high, so a
// read of the same register returns the new value from the next cycle on.
// Bit 0 of Command clears itself one cycle after it was written, so the
// soft reset lasts exactly one cycle; the other Command bits are kept but
// have no function. A hard or soft reset loads TimeBase with 50000 cycles.
// The register map, zero-wait timing and soft reset follow the delay
// device; treating NumInPFIFO as read-only and keeping the upper Command bits
// are this design's choices.
module ph_csr
  import ph_pkg::*;
#(
  parameter logic [TIME_W-1:0] TIMEBASE_INIT = TIMEBASE_RESET
) (
  input  logic              clk,
  input  logic              rst,          // hard reset, synchronous
  input  logic [CSR_AW-1:0] address,
  input  logic              read,
  input  logic              write,
  input  logic [31:0]       writedata,
  output logic [31:0]       readdata,
  input  logic [31:0]       num_in_pfifo,
  output logic              soft_reset,   // one-cycle pulse
  output logic [TIME_W-1:0] time_base
);

  logic [31:0] command;

  assign soft_reset = command[0];

  always_ff @(posedge clk) begin
    if (rst) begin
      command <= '0;
    end else if (write && address == REG_COMMAND) begin
      command <= writedata;
    end else begin
      command[0] <= 1'b0;
    end
  end

  always_ff @(posedge clk) begin
    if (rst || soft_reset) begin
      time_base <= TIMEBASE_INIT;
    end else if (write && address == REG_TIMEBASE) begin
      time_base <= writedata;
    end
  end

  always_comb begin
    readdata = '0;
    if (read) begin
      unique case (address)
        REG_COMMAND:    readdata = command;
        REG_NUMINPFIFO: readdata = num_in_pfifo;
        REG_TIMEBASE:   readdata = time_base;
        default:        readdata = '0;
      endcase
    end
  end

endmodule

// packet_fifo: the packet data FIFO of the packet handler.
//
// Holds the 32-bit words of received Avalon packets until they are sent.
// The default size, 32768 words of 32 bits (1 Mbit), is the one the delay
// device uses. Two things go beyond a plain FIFO:
//  * almost_full is raised when fewer than HEADROOM_WORDS words are free,
//    that is when the FIFO is within one maximum frame (1518 bytes) of full.
//    The receiver only starts a frame while almost_full is low, so a normal
//    frame that has started always fits.
//  * Words written belong to the frame being received and stay invisible to
//    the reader until `commit` (end of packet). `rollback` throws away the
//    uncommitted words, which is how a frame that does not fit is dropped.
//    Commit and rollback are this design's way of dropping a frame without
//    leaving part of it in the FIFO; the document only says such a frame is
//    dropped.
//
// Read side is show-ahead: `rdata` is the oldest committed word whenever
// `empty` is low, and `rd` pops it. The memory is read through a register
// addressed with the next read pointer, with a write-first bypass, so there
// is no bubble between pops. `usedw` counts committed words (NumInPFIFO).
//
// Timing: a word written with commit in cycle N is readable in cycle N+1.
// Synchronous active-high reset empties the FIFO; the array is not reset.
module packet_fifo #(
  parameter int unsigned WIDTH          = 32,
  parameter int unsigned DEPTH          = 32768,
  parameter int unsigned HEADROOM_WORDS = (ph_pkg::MAX_FRAME_BYTES + 3) / 4,
  localparam int unsigned AW            = $clog2(DEPTH),
  localparam int unsigned CW            = $clog2(DEPTH + 1)
) (
  input  logic             clk,
  input  logic             rst,
  // write side
  input  logic             wr,
  input  logic [WIDTH-1:0] wdata,
  input  logic             commit,
  input  logic             rollback,
  output logic             full,
  output logic             almost_full,
  // read side
  input  logic             rd,
  output logic [WIDTH-1:0] rdata,
  output logic             empty,
  output logic [CW-1:0]    usedw
);

  logic [WIDTH-1:0] mem [DEPTH];

  logic [AW-1:0] wptr, cptr, rptr, rptr_next;
  logic [CW-1:0] com_count;   // committed words, visible to the reader
  logic [CW-1:0] unc_count;   // words of the frame still being written
  logic [CW-1:0] total;
  logic          wr_acc, rd_acc;

  assign total       = com_count + unc_count;
  assign full        = (total == CW'(DEPTH));
  assign almost_full = (CW'(DEPTH) - total) < CW'(HEADROOM_WORDS);
  assign empty       = (com_count == '0);
  assign usedw       = com_count;

  assign wr_acc    = wr && !full && !rollback;
  assign rd_acc    = rd && !empty;
  assign rptr_next = rd_acc ? AW'(rptr + 1'b1) : rptr;

  always_ff @(posedge clk) begin
    if (wr_acc) mem[wptr] <= wdata;
  end

  // Registered read of the next head, with bypass of a same-cycle write.
  always_ff @(posedge clk) begin
    if (wr_acc && wptr == rptr_next) rdata <= wdata;
    else                             rdata <= mem[rptr_next];
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      wptr      <= '0;
      cptr      <= '0;
      rptr      <= '0;
      com_count <= '0;
      unc_count <= '0;
    end else begin
      rptr <= rptr_next;
      if (rollback) begin
        wptr      <= cptr;
        unc_count <= '0;
        com_count <= com_count - CW'(rd_acc);
      end else begin
        wptr <= wr_acc ? AW'(wptr + 1'b1) : wptr;
        if (commit) begin
          cptr      <= wr_acc ? AW'(wptr + 1'b1) : wptr;
          com_count <= com_count + unc_count + CW'(wr_acc) - CW'(rd_acc);
          unc_count <= '0;
        end else begin
          com_count <= com_count - CW'(rd_acc);
          unc_count <= unc_count + CW'(wr_acc);
        end
      end
    end
  end

  // Usage rules.
  a_no_commit_and_rollback: assert property (@(posedge clk) disable iff (rst)
    !(commit && rollback));
  a_no_read_when_empty: assert property (@(posedge clk) disable iff (rst)
    rd |-> !empty);

endmodule

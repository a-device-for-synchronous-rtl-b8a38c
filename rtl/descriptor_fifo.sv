// descriptor_fifo: the descriptor FIFO of the packet handler.
//
// One 48-bit descriptor (ph_pkg::descriptor_t: byte count and due time) per
// stored packet, 512 entries deep by default, as in the delay device. The
// FIFO is show-ahead: `head` is the oldest descriptor whenever `empty` is
// low, so the transmit logic can test its due time before popping it; `pop`
// removes it. The memory is read through a register addressed with the next
// read pointer (write-first bypass), so a pushed descriptor is visible one
// cycle after the push and pops can follow each other without a bubble.
// Synchronous active-high reset empties it. The show-ahead read and the
// synchronous reset are this design's choices.
module descriptor_fifo
  import ph_pkg::*;
#(
  parameter int unsigned DEPTH = 512,
  localparam int unsigned AW   = $clog2(DEPTH),
  localparam int unsigned CW   = $clog2(DEPTH + 1)
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        push,
  input  descriptor_t din,
  input  logic        pop,
  output descriptor_t head,
  output logic        empty,
  output logic        full,
  output logic [CW-1:0] count
);

  descriptor_t   mem [DEPTH];
  logic [AW-1:0] wptr, rptr, rptr_next;
  logic          push_acc, pop_acc;

  assign empty     = (count == '0);
  assign full      = (count == CW'(DEPTH));
  assign push_acc  = push && !full;
  assign pop_acc   = pop && !empty;
  assign rptr_next = pop_acc ? AW'(rptr + 1'b1) : rptr;

  always_ff @(posedge clk) begin
    if (push_acc) mem[wptr] <= din;
  end

  always_ff @(posedge clk) begin
    if (push_acc && wptr == rptr_next) head <= din;
    else                               head <= mem[rptr_next];
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      wptr  <= '0;
      rptr  <= '0;
      count <= '0;
    end else begin
      wptr  <= push_acc ? AW'(wptr + 1'b1) : wptr;
      rptr  <= rptr_next;
      count <= count + CW'(push_acc) - CW'(pop_acc);
    end
  end

  a_no_push_when_full: assert property (@(posedge clk) disable iff (rst)
    push |-> !full);
  a_no_pop_when_empty: assert property (@(posedge clk) disable iff (rst)
    pop |-> !empty);

endmodule

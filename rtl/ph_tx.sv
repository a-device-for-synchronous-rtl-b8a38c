// ph_tx: transmit state machine (Avalon streaming source) of the packet
// handler.
//
// A Moore machine with five states:
//   idle       wait until the head descriptor is due
//   latch_desc pop the descriptor and load its byte count
//   sop        offer the first word with startofpacket
//   reg        offer the middle words, four bytes each
//   eop        offer the last word with endofpacket and empty = 4 - bytes left
// Each offered word is taken by the MAC in a cycle in which `source_ready` is
// high (ready latency zero); while it is low the machine holds its word. A
// word taken pops the packet data FIFO, whose show-ahead output is the
// source data bus.
//
// When a descriptor is due: descriptors hold arrival time + delay (T) on the
// 32-bit local counter. A descriptor is held back only while the counter is
// in the window [T - TimeBase, T), the time between its arrival and its due
// time, computed modulo 2^32 so that the counter may wrap; at every other
// time it may be sent. This is the rule of the delay device. Because the
// window uses the current TimeBase, lowering TimeBase can release packets
// already queued earlier than their own delay; they still leave in order.
//
// Timing: with the counter at T in cycle N and the descriptor at the head,
// startofpacket is offered in cycle N+2. The sop -> eop step for packets of
// 5..8 bytes, and a single sop+eop word for packets of up to 4 bytes, are
// this design's additions to the five-state flow.
module ph_tx
  import ph_pkg::*;
(
  input  logic               clk,
  input  logic               rst,
  input  logic [TIME_W-1:0]  now,
  input  logic [TIME_W-1:0]  time_base,
  // descriptor FIFO read side
  input  descriptor_t        df_head,
  input  logic               df_empty,
  output logic               df_pop,
  // packet data FIFO read side
  input  logic [DATA_W-1:0]  pf_rdata,
  output logic               pf_rd,
  // Avalon-ST source
  output logic [DATA_W-1:0]  source_data,
  output logic [EMPTY_W-1:0] source_empty,
  output logic               source_startofpacket,
  output logic               source_endofpacket,
  output logic               source_valid,
  output logic               source_error,
  input  logic               source_ready,
  // status
  output tx_state_e          state
);

  tx_state_e           state_n;
  logic [BCOUNT_W-1:0] left, left_n;   // bytes not yet taken by the MAC
  logic [TIME_W-1:0]   until_due;
  logic                held, popable, take, last;

  assign until_due = df_head.due_time - now;
  assign held      = (until_due != '0) && (until_due <= time_base);
  assign popable   = !df_empty && !held;

  assign last                 = (left <= BCOUNT_W'(4));
  assign source_valid         = (state == S_SOP) || (state == S_REG) || (state == S_EOP);
  assign source_startofpacket = (state == S_SOP);
  assign source_endofpacket   = (state == S_EOP) || (state == S_SOP && last);
  assign source_empty         = source_endofpacket ? EMPTY_W'(3'd4 - left[2:0]) : '0;
  assign source_data          = pf_rdata;
  assign source_error         = 1'b0;
  assign take                 = source_valid && source_ready;
  assign pf_rd                = take;
  assign df_pop               = (state == S_LATCH_DESC);

  always_comb begin
    state_n = state;
    left_n  = left;
    unique case (state)
      S_IDLE:       if (popable) state_n = S_LATCH_DESC;
      S_LATCH_DESC: begin
        left_n  = df_head.bytes;
        state_n = S_SOP;
      end
      S_SOP, S_REG: if (source_ready) begin
        left_n = left - BCOUNT_W'(4);
        if (state == S_SOP && last)          state_n = S_IDLE;
        else if (left_n <= BCOUNT_W'(4))     state_n = S_EOP;
        else                                 state_n = S_REG;
      end
      S_EOP:        if (source_ready) begin
        left_n  = '0;
        state_n = S_IDLE;
      end
      default:      state_n = S_IDLE;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= S_IDLE;
      left  <= '0;
    end else begin
      state <= state_n;
      left  <= left_n;
    end
  end

  // Avalon-ST source rule: an offered word is held until it is taken.
  a_hold_until_taken: assert property (@(posedge clk) disable iff (rst)
    source_valid && !source_ready |=> source_valid && $stable(source_data)
                                      && $stable(source_startofpacket)
                                      && $stable(source_endofpacket));

endmodule

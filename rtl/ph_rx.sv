// ph_rx: receive side (Avalon streaming sink) of the packet handler.
//
// Accepts a packet as 32-bit words from the MAC with a ready latency of zero:
// a word is taken in every cycle in which `valid` and `ready` are both high.
// At the start-of-packet word it latches the due time, the local time plus
// the programmed delay. It writes each word of the packet into the packet
// data FIFO and counts bytes, four per word and 4 - empty on the
// end-of-packet word. With the end-of-packet word it commits the packet in
// the data FIFO and pushes the descriptor {byte count, due time}.
//
// Back pressure: between packets, `ready` is low while the packet FIFO is
// within one maximum frame of full or the descriptor FIFO is full; once a
// packet has started, `ready` stays high until its end. If a packet still
// runs out of space (a frame longer than the headroom) or outgrows the 16-bit
// byte count, the words already written are rolled back and the rest of the
// packet is taken and discarded: the frame is dropped and `frame_dropped`
// pulses. Words outside a packet (no start-of-packet seen) are discarded.
// A start-of-packet word inside a packet is a protocol error: the packet in
// progress is dropped and the new one is discarded up to its end.
// The flow, the byte counting and the back-pressure rule follow the delay
// device; rollback, discard and the handling of protocol errors are this
// design's choices. The sink error bus is not used, as in the original.
module ph_rx
  import ph_pkg::*;
(
  input  logic               clk,
  input  logic               rst,
  input  logic [TIME_W-1:0]  now,
  input  logic [TIME_W-1:0]  time_base,
  // Avalon-ST sink
  input  logic [DATA_W-1:0]  sink_data,
  input  logic [EMPTY_W-1:0] sink_empty,
  input  logic               sink_startofpacket,
  input  logic               sink_endofpacket,
  input  logic               sink_valid,
  output logic               sink_ready,
  // packet data FIFO write side
  output logic               pf_wr,
  output logic [DATA_W-1:0]  pf_wdata,
  output logic               pf_commit,
  output logic               pf_rollback,
  input  logic               pf_full,
  input  logic               pf_almost_full,
  // descriptor FIFO write side
  output logic               df_push,
  output descriptor_t        df_din,
  input  logic               df_full,
  // event
  output logic               frame_dropped
);

  typedef enum logic [1:0] {RX_IDLE, RX_RUN, RX_DISCARD} rx_state_e;

  rx_state_e           state, state_n;
  logic [TIME_W-1:0]   due, due_n;
  logic [BCOUNT_W:0]   count, count_n;     // one spare bit to see overflow
  logic [BCOUNT_W:0]   beat_bytes;
  logic                beat;

  assign sink_ready = (state != RX_IDLE) || (!pf_almost_full && !df_full);
  assign beat       = sink_valid && sink_ready;
  assign beat_bytes = sink_endofpacket ? (BCOUNT_W+1)'(3'd4 - sink_empty)
                                       : (BCOUNT_W+1)'(3'd4);
  assign pf_wdata   = sink_data;

  always_comb begin
    state_n       = state;
    due_n         = due;
    count_n       = count;
    pf_wr         = 1'b0;
    pf_commit     = 1'b0;
    pf_rollback   = 1'b0;
    df_push       = 1'b0;
    df_din        = '{bytes: count[BCOUNT_W-1:0], due_time: due};
    frame_dropped = 1'b0;
    if (beat) begin
      unique case (state)
        RX_IDLE: if (sink_startofpacket) begin
          // ready was only high here with room for a whole frame
          due_n   = now + time_base;
          count_n = beat_bytes;
          pf_wr   = 1'b1;
          if (sink_endofpacket) begin
            pf_commit = 1'b1;
            df_push   = 1'b1;
            df_din    = '{bytes: count_n[BCOUNT_W-1:0], due_time: due_n};
          end else begin
            state_n = RX_RUN;
          end
        end
        RX_RUN: begin
          count_n = count + beat_bytes;
          if (sink_startofpacket || pf_full || count_n[BCOUNT_W]) begin
            pf_rollback   = 1'b1;
            frame_dropped = 1'b1;
            state_n       = sink_endofpacket ? RX_IDLE : RX_DISCARD;
          end else begin
            pf_wr = 1'b1;
            if (sink_endofpacket) begin
              pf_commit = 1'b1;
              df_push   = 1'b1;
              df_din    = '{bytes: count_n[BCOUNT_W-1:0], due_time: due};
              state_n   = RX_IDLE;
            end
          end
        end
        RX_DISCARD: if (sink_endofpacket) state_n = RX_IDLE;
        default: state_n = RX_IDLE;
      endcase
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= RX_IDLE;
      due   <= '0;
      count <= '0;
    end else begin
      state <= state_n;
      due   <= due_n;
      count <= count_n;
    end
  end

  a_no_push_when_full: assert property (@(posedge clk) disable iff (rst)
    df_push |-> !df_full);

endmodule

// tpiu_deformatter: unpacks the processor's trace port into tagged bytes.
//
// The trace port interface unit merges the trace of several sources (program
// trace, instrumentation trace, ...) into 16-byte frames. This block rebuilds
// the per-source byte stream the decoders need. Frame format (CoreSight trace
// formatter, from general protocol knowledge, not from the method
// description):
//   bytes 0..14   even bytes: bit 0 = 1 is an ID change, new ID = bits[7:1];
//                 bit 0 = 0 is a data byte whose bit 0 is the frame's
//                 auxiliary bit for that byte. Odd bytes are always data.
//   byte 15       auxiliary bits: bit k belongs to byte 2k. For an ID change
//                 it says when the new ID applies: 0 at once, 1 after the
//                 next (odd) byte, which still belongs to the old ID.
// The current ID carries over from frame to frame. A full synchronisation
// packet (FF FF FF 7F) aligns the frames: bytes before the first one are
// dropped, and a 0xFF where a frame would begin starts another sync packet
// (no frame begins with 0xFF, which would be the reserved ID 0x7F). Halfword
// syncs and trace-port triggers are not supported.
//
// Interface: an 8-bit trace port sampled on the checker clock (port_valid
// marks a byte); out_valid/out_id/out_data give one tagged data byte per cycle.
// Timing: a frame is decoded while the next one arrives: its 15 bytes leave on
// the 15 clocks after the frame's last byte, so one port byte per clock is
// sustained. The 8-bit port, the single clock and the frame-level double
// buffering are this design's choices.
module tpiu_deformatter (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       port_valid,
  input  logic [7:0] port_data,
  output logic       out_valid,
  output logic [6:0] out_id,
  output logic [7:0] out_data,
  output logic       synced       // at least one sync packet seen
);

  typedef enum logic [1:0] {A_HUNT, A_SYNC, A_FRAME} align_e;

  align_e            align;
  logic [3:0]        pos;          // byte position in the frame being received
  logic [14:0][7:0]  rx;           // frame being received
  logic [14:0][7:0]  fr;           // frame being unpacked
  logic [7:0]        aux;          // its auxiliary byte
  logic              busy;         // unpacking fr
  logic [3:0]        idx;          // byte of fr unpacked this cycle
  logic [6:0]        cur_id, next_id;
  logic              id_pending;   // delayed ID change waits for the next byte

  // ---------------- frame alignment and capture ----------------
  logic frame_done;
  assign frame_done = port_valid && (align == A_FRAME) && (pos == 4'd15);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      align  <= A_HUNT;
      pos    <= '0;
      rx     <= '0;
      synced <= 1'b0;
    end else if (port_valid) begin
      unique case (align)
        A_HUNT: if (port_data == 8'hFF) align <= A_SYNC;
        A_SYNC: begin
          if (port_data == 8'h7F) begin
            align  <= A_FRAME;
            pos    <= '0;
            synced <= 1'b1;
          end else if (port_data != 8'hFF) begin
            align <= A_HUNT;
          end
        end
        A_FRAME: begin
          if (pos == 4'd0 && port_data == 8'hFF) begin
            align <= A_SYNC;
          end else begin
            if (pos != 4'd15) rx[pos] <= port_data;
            pos <= pos + 4'd1;      // wraps to 0 after byte 15
          end
        end
        default: align <= A_HUNT;
      endcase
    end
  end

  // ---------------- unpacking ----------------
  logic [7:0] b;
  logic       b_aux, b_even;
  assign b      = fr[idx];
  assign b_even = ~idx[0];
  assign b_aux  = aux[idx[3:1]];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      fr         <= '0;
      aux        <= '0;
      busy       <= 1'b0;
      idx        <= '0;
      cur_id     <= '0;
      next_id    <= '0;
      id_pending <= 1'b0;
      out_valid  <= 1'b0;
      out_id     <= '0;
      out_data   <= '0;
    end else begin
      out_valid <= 1'b0;
      if (busy) begin
        if (b_even && b[0]) begin
          // ID change
          if (b_aux && idx != 4'd14) begin
            next_id    <= b[7:1];
            id_pending <= 1'b1;
          end else begin
            cur_id <= b[7:1];
          end
        end else begin
          out_valid <= 1'b1;
          out_id    <= cur_id;
          out_data  <= b_even ? {b[7:1], b_aux} : b;
          if (id_pending) begin
            cur_id     <= next_id;
            id_pending <= 1'b0;
          end
        end
        idx <= idx + 4'd1;
        if (idx == 4'd14) busy <= 1'b0;
      end
      if (frame_done) begin
        fr   <= rx;
        aux  <= port_data;
        busy <= 1'b1;
        idx  <= '0;
      end
    end
  end

  // a new frame must never arrive while the previous one is still unpacked
  a_no_overrun: assert property (@(posedge clk) disable iff (!rst_n)
                                 frame_done |-> !busy || idx == 4'd14)
    else $error("trace frame overrun");

endmodule

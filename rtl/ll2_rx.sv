// ll2_rx: low level 2 receiver (HDLC bit protocol, receive side).
//
// Layer 1 hands received line bits to layer 2 through the PH-DATA-INDICATION
// port: it writes the first bit, PCEI and PH-SAP, sets the primitive control
// block (ph_atn here), and then presents further bits, each with a one-cycle
// bit-clock strobe (ph_clk); ph_lst comes with the last bit, after which this
// block acknowledges the primitive. The bits form a continuous HDLC stream in
// which this block finds the frames:
//
//  * Every line bit enters an 8-bit window. A 0 that follows exactly five 1s
//    is marked as an inserted zero and later dropped. When the window holds
//    01111110 it is a flag: the window is emptied, and a flag that follows
//    frame bits ends that frame. Seven 1s in a row are an abort.
//  * A bit that leaves the window unmarked, inside a frame, is a frame bit.
//    It updates the CRC and enters a 16-bit delay line, so that the last 16
//    frame bits, the FCS, never leave it: bits that do leave it are data
//    bits, sent on to the receive memory interface (d_valid/d_bit).
//  * At the closing flag the frame is judged: RX_SHORT below 32 frame bits,
//    RX_FCS_ERR unless the CRC residue is 0xF0B8, else RX_OK. An abort inside
//    a frame gives RX_ABORT, a collision from layer 1 RX_COLL, an overrun
//    signalled by the memory interface RX_OVERRUN. d_end then pulses with the
//    status, and the first 32 data bits (the address, control and start of a
//    packet header) are offered as hdr for high level 2.
//
// On an overrun this block also ends the primitive with the abo bit, as a
// layer 2 abort of the primitive preparation.
//
// Following the design: the PH-DATA-INDICATION fields (bit, col, lst, clk from
// layer 1; abo to layer 1; PCEI and PH-SAP), layer 2 acknowledging after the
// last bit, the flag/zero-deletion/abort/FCS duties of low level 2, copying
// the first bytes for high level 2, and the error code on a bad frame. This
// design's own choices: the window and delay-line mechanism, the 32-bit
// minimum frame, CRC-16 as in HDLC (x^16+x^12+x^5+1), a header of 4 bytes (the
// design says 3 or 4), and that the hunt state carries over from one
// primitive to the next because the line is one continuous stream.
module ll2_rx
  import x25_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  // PH-DATA-INDICATION port from layer 1
  input  logic        ph_atn,
  output logic        ph_ack,
  input  logic        ph_bit,
  input  logic        ph_clk,
  input  logic        ph_lst,
  input  logic        ph_col,
  input  logic [3:0]  ph_pcei,
  input  logic [3:0]  ph_sap,
  output logic        ph_abo,
  // to the receive memory interface
  output logic        d_valid,
  output logic        d_bit,
  output logic        d_end,
  output rx_status_e  d_status,
  output logic [31:0] hdr,        // first data bits of the frame, first in bit 0
  output logic [3:0]  pcei,
  output logic [3:0]  sap,
  input  logic        m_overrun,
  // statistics
  output logic [15:0] frames_ok,
  output logic [15:0] frames_bad
);
  typedef enum logic [1:0] {S_IDLE, S_RUN, S_ACK} state_e;
  state_e st;

  logic [7:0]  win, win_vld;
  logic [2:0]  ones;
  logic        in_frame;
  logic [15:0] crc;
  logic [15:0] dly;
  logic [4:0]  dly_n;
  logic [15:0] nbits;           // frame bits (saturating)
  logic [5:0]  hdr_n;           // data bits copied into hdr (0..32)

  // a line bit is handled when the primitive starts (the first bit) and on
  // every bit-clock strobe after that
  logic take, first;
  assign first = (st == S_IDLE) && ph_atn;
  assign take  = first || ((st == S_RUN) && ph_clk && !ph_col);

  // ---- work out the effect of one line bit ----
  logic        b;
  logic [2:0]  ones_n;
  logic        new_vld, out_vld, out_bit, is_flag, is_abort;
  logic [7:0]  win_n;
  logic [15:0] crc_n;
  logic        dly_out;
  logic        frame_end;
  rx_status_e  end_status;
  always_comb begin
    b        = ph_bit;
    ones_n   = b ? ((ones == 3'd7) ? 3'd7 : ones + 1'b1) : 3'd0;
    new_vld  = !(!b && ones == 3'd5);
    out_bit  = win[0];
    out_vld  = win_vld[0] && in_frame;
    win_n    = {b, win[7:1]};
    is_flag  = (win_n == HDLC_FLAG);
    is_abort = (ones_n == 3'd7);
    crc_n    = out_vld ? fcs_step(crc, out_bit) : crc;
    dly_out  = out_vld && (dly_n == 5'd16);
    frame_end = in_frame && (is_flag || is_abort) && (nbits != 0 || out_vld);
    if (is_abort)                              end_status = RX_ABORT;
    else if (32'(nbits) + 32'(out_vld) < 32)   end_status = RX_SHORT;
    else if (crc_n != FCS_GOOD)                end_status = RX_FCS_ERR;
    else                                       end_status = RX_OK;
  end

  logic col_end, ovr_end;
  assign col_end = (st == S_RUN) && ph_col && in_frame && nbits != 0;
  assign ovr_end = m_overrun && in_frame;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= S_IDLE;
      win <= '0; win_vld <= '0; ones <= '0; in_frame <= 1'b0;
      crc <= FCS_INIT; dly <= '0; dly_n <= '0; nbits <= '0;
      hdr <= '0; hdr_n <= '0; pcei <= '0; sap <= '0; ph_abo <= 1'b0;
      d_valid <= 1'b0; d_bit <= 1'b0; d_end <= 1'b0; d_status <= RX_OK;
      frames_ok <= '0; frames_bad <= '0;
    end else begin
      d_valid <= 1'b0;
      d_end   <= 1'b0;

      unique case (st)
        S_IDLE: if (ph_atn) begin
          pcei   <= ph_pcei;
          sap    <= ph_sap;
          ph_abo <= 1'b0;
          st     <= ph_lst ? S_ACK : S_RUN;
        end
        S_RUN: begin
          if (ph_col || (ph_clk && ph_lst)) st <= S_ACK;
          if (ovr_end) begin
            ph_abo <= 1'b1;
            st     <= S_ACK;
          end
        end
        S_ACK: st <= S_IDLE;
        default: st <= S_IDLE;
      endcase

      if (ovr_end || col_end) begin
        // the frame is cut off from outside: back to hunting for a flag
        d_end      <= 1'b1;
        d_status   <= ovr_end ? RX_OVERRUN : RX_COLL;
        frames_bad <= frames_bad + 1'b1;
        in_frame   <= 1'b0;
        win_vld    <= '0;
        nbits      <= '0;
        dly_n      <= '0;
        crc        <= FCS_INIT;
        hdr_n      <= '0;
      end else if (take) begin
        ones    <= ones_n;
        win     <= win_n;
        win_vld <= {new_vld, win_vld[7:1]};
        crc     <= crc_n;
        if (out_vld) begin
          dly   <= {out_bit, dly[15:1]};
          if (dly_n != 5'd16) dly_n <= dly_n + 1'b1;
          if (nbits != 16'hFFFF) nbits <= nbits + 1'b1;
        end
        if (dly_out) begin
          d_valid <= 1'b1;
          d_bit   <= dly[0];
          if (hdr_n != 6'd32) begin
            hdr[hdr_n[4:0]] <= dly[0];
            hdr_n <= hdr_n + 1'b1;
          end
        end
        if (is_flag || is_abort) begin
          win_vld <= '0;
          if (frame_end) begin
            d_end    <= 1'b1;
            d_status <= end_status;
            if (end_status == RX_OK) frames_ok <= frames_ok + 1'b1;
            else                     frames_bad <= frames_bad + 1'b1;
          end
          // a flag opens the next frame, an abort goes back to hunting
          in_frame <= is_flag;
          nbits    <= '0;
          dly_n    <= '0;
          crc      <= FCS_INIT;
          if (frame_end || !in_frame) hdr_n <= '0;
        end
      end
    end
  end

  assign ph_ack = (st == S_ACK);
endmodule

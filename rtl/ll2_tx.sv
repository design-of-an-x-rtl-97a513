// ll2_tx: low level 2 transmitter (HDLC bit protocol, transmit side).
//
// High level 2 hands over one frame per primitive. Short frames (supervisory
// and unnumbered frames, at most 8 bytes) and the header of an I-frame come
// in the interface itself, as up to 64 bits with a bit count; the rest of an
// I-frame comes as a linked list of buffers, read by the transmit memory
// interface (ll2_tx_mem). A bit count of zero sends buffers only. This block
// wraps the frame in the bit protocol: an opening flag 01111110, the frame
// bits, the 16-bit frame check sequence, a closing flag, and a 0 inserted
// after every five consecutive 1s between the flags. It hands the line bits
// to layer 1 through the PH-DATA-REQUEST port: it writes the first bit, the
// PCEI and PH-SAP, sets the primitive control block (ph_do), and then
// presents the next bit after every bit-clock strobe (ph_clk) from layer 1;
// lst marks the last bit of the closing flag. Layer 1 resets the primitive
// control block after the last bit.
//
// If the buffer data is not ready when layer 1 asks for a bit (underrun), or
// high level 2 raises reset, the frame is cut off with seven 1s (the HDLC
// abort pattern) and the abo bit is set with the last of them. If layer 1
// reports a collision (ph_col) the transmission stops at once. In every case
// the high level 2 primitive is then acknowledged with a status (tx_status).
//
// Following the design: the interface fields (a flag for buffers, the inline
// bits with their count, the first-buffer pointer, PCEI, SAP), the reset from
// high level 2, the PH-DATA-REQUEST fields bit, abo, lst, col, clk, pcei and
// ph-sap and their directions, layer 2 supplying bits on the layer 1 clock,
// and aborting on underrun. This design's own choices: bits leave least
// significant first, the FCS is the usual HDLC CRC-16 (x^16+x^12+x^5+1,
// preset to ones, sent inverted, low bit first), an abort sends seven 1s, the
// widths of PCEI and PH-SAP (4 bits each), and that the high level 2
// primitive is acknowledged only when the frame is completely sent.
//
// Timing: bits change the cycle after a ph_clk strobe; the memory interface
// must have the next buffer bit ready before the next strobe.
module ll2_tx
  import x25_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  // from high level 2 (through a primitive control block)
  input  logic        hl_atn,
  output logic        hl_ack,
  input  logic [63:0] hl_inl_bits,   // first bit in bit 0
  input  logic [6:0]  hl_inl_n,      // 0..64 bits in the interface
  input  logic        hl_use_buf,
  input  addr_t       hl_buf_ptr,
  input  logic [3:0]  hl_pcei,
  input  logic [3:0]  hl_sap,
  input  logic        hl_reset,
  output tx_status_e  tx_status,     // valid with hl_ack
  // to the transmit memory interface
  output logic        m_start,
  output addr_t       m_first,
  output logic        m_stop,
  input  logic        m_bit_valid,
  input  logic        m_bit,
  input  logic        m_eoc,
  output logic        m_take,
  // PH-DATA-REQUEST port to layer 1
  output logic        ph_do,
  input  logic        ph_busy,
  output logic        ph_bit,
  output logic        ph_abo,
  output logic        ph_lst,
  output logic [3:0]  ph_pcei,
  output logic [3:0]  ph_sap,
  input  logic        ph_clk,
  input  logic        ph_col,
  // statistics
  output logic [15:0] frames_sent,
  output logic [15:0] frames_aborted
);
  typedef enum logic [2:0] {T_IDLE, T_START, T_SEND, T_WAIT_FREE, T_ACK} tstate_e;
  typedef enum logic [2:0] {P_OPEN, P_INL, P_BUF, P_FCS, P_CLOSE, P_ABORT} phase_e;

  tstate_e     st;
  phase_e      phase;
  logic [6:0]  idx;
  logic [2:0]  ones;
  logic [15:0] crc;
  logic [63:0] inl;
  logic [6:0]  inl_n;
  logic        use_buf, reset_req;
  tx_status_e  status;

  // ---- next line bit, worked out when layer 1 takes the current one ----
  phase_e      n_phase;
  logic [6:0]  n_idx;
  logic        n_bit, n_lst, n_abo, n_take, n_crc_upd, n_underrun;
  always_comb begin
    phase_e ph;
    logic [6:0] ix;
    ph = phase; ix = idx;
    // skip finished or empty sections
    if (ph == P_OPEN && ix == 7'd8)                     begin ph = P_INL; ix = '0; end
    if (ph == P_INL && ix == inl_n)                     begin ph = use_buf ? P_BUF : P_FCS; ix = '0; end
    if (ph == P_BUF && !m_bit_valid && m_eoc)           begin ph = P_FCS; ix = '0; end
    if (ph == P_FCS && ix == 7'd16)                     begin ph = P_CLOSE; ix = '0; end
    if (reset_req && ph != P_ABORT && ph != P_CLOSE)    begin ph = P_ABORT; ix = '0; end

    n_phase = ph; n_idx = ix; n_bit = 1'b0; n_lst = 1'b0; n_abo = 1'b0;
    n_take = 1'b0; n_crc_upd = 1'b0; n_underrun = 1'b0;
    if (ones == 3'd5 && ph != P_OPEN && ph != P_ABORT && !(ph == P_CLOSE && ix != 0)) begin
      n_bit = 1'b0;                                   // inserted zero
    end else begin
      unique case (ph)
        P_OPEN, P_CLOSE: begin
          n_bit = HDLC_FLAG[ix[2:0]];
          n_idx = ix + 1'b1;
          n_lst = (ph == P_CLOSE) && (ix == 7'd7);
        end
        P_INL: begin
          n_bit = inl[ix[5:0]];
          n_idx = ix + 1'b1;
          n_crc_upd = 1'b1;
        end
        P_BUF: begin
          if (m_bit_valid) begin
            n_bit = m_bit;
            n_take = 1'b1;
            n_crc_upd = 1'b1;
          end else begin
            n_underrun = 1'b1;                          // start the abort pattern
            n_phase = P_ABORT;
            n_bit = 1'b1;
            n_idx = 7'd1;
          end
        end
        P_FCS: begin
          n_bit = ~crc[ix[3:0]];
          n_idx = ix + 1'b1;
        end
        default: begin                                  // P_ABORT: seven ones
          n_bit = 1'b1;
          n_idx = ix + 1'b1;
          n_lst = (ix == 7'd6);
          n_abo = (ix == 7'd6);
        end
      endcase
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= T_IDLE; phase <= P_OPEN; idx <= '0; ones <= '0; crc <= FCS_INIT;
      inl <= '0; inl_n <= '0; use_buf <= 1'b0; reset_req <= 1'b0; status <= TX_OK;
      ph_bit <= 1'b0; ph_abo <= 1'b0; ph_lst <= 1'b0; ph_pcei <= '0; ph_sap <= '0;
      frames_sent <= '0; frames_aborted <= '0;
    end else begin
      unique case (st)
        T_IDLE: if (hl_atn) begin
          // copy the parameters, write the first bit, PCEI and SAP
          inl       <= hl_inl_bits;
          inl_n     <= (hl_inl_n > 7'd64) ? 7'd64 : hl_inl_n;
          use_buf   <= hl_use_buf;
          ph_pcei   <= hl_pcei;
          ph_sap    <= hl_sap;
          ph_bit    <= HDLC_FLAG[0];
          ph_abo    <= 1'b0;
          ph_lst    <= 1'b0;
          phase     <= P_OPEN;
          idx       <= 7'd1;
          ones      <= '0;
          crc       <= FCS_INIT;
          reset_req <= 1'b0;
          status    <= TX_OK;
          st        <= T_START;
        end
        T_START: st <= T_SEND;           // ph_do is given in this cycle
        T_SEND: begin
          if (hl_reset) reset_req <= 1'b1;
          if (ph_col) begin
            status <= TX_COLLISION;
            st     <= T_WAIT_FREE;
          end else if (!ph_busy) begin
            st <= T_WAIT_FREE;           // layer 1 has ended the primitive
          end else if (ph_clk && !ph_lst) begin
            ph_bit <= n_bit;
            ph_lst <= n_lst;
            ph_abo <= n_abo;
            phase  <= n_phase;
            idx    <= n_idx;
            ones   <= n_bit ? ones + 1'b1 : 3'd0;
            if (n_crc_upd) crc <= fcs_step(crc, n_bit);
            if (n_underrun) status <= TX_UNDERRUN;
            else if (n_phase == P_ABORT && phase != P_ABORT) status <= TX_RESET;
          end
        end
        T_WAIT_FREE: if (!ph_busy) st <= T_ACK;
        T_ACK: begin
          if (status == TX_OK) frames_sent <= frames_sent + 1'b1;
          else                 frames_aborted <= frames_aborted + 1'b1;
          st <= T_IDLE;
        end
        default: st <= T_IDLE;
      endcase
    end
  end

  assign ph_do     = (st == T_START);
  assign hl_ack    = (st == T_ACK);
  assign tx_status = status;
  assign m_start   = (st == T_IDLE) && hl_atn && hl_use_buf;
  assign m_first   = hl_buf_ptr;
  assign m_stop    = (st == T_ACK);
  assign m_take    = (st == T_SEND) && ph_busy && !ph_col && ph_clk && !ph_lst && n_take;
endmodule

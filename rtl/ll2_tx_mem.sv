// ll2_tx_mem: transmit memory interface of low level 2.
//
// Hands the data of a linked list of buffers to the LL2 transmitter one bit
// at a time, so the transmitter never deals with buffers. On start it takes
// the pointer to the first buffer descriptor, reads the descriptor fields
// begin_data_pointer, data_length, data_remain and next_descriptor_pointer
// through its MIU port, then reads the data bytes one by one and offers their
// bits, least significant first; data_length whole bytes are followed by
// data_remain bits (the low bits) of one more byte. At the end of a buffer it
// follows the next pointer; a NULL next pointer ends the chain and raises
// eoc once the last bit has been taken. One byte is prefetched while the
// previous one is being shifted out, and the next descriptor is read while
// the last byte of a buffer is shifting, so the transmitter is served without
// a gap as long as a bit period is longer than the memory reads of a
// descriptor. stop abandons the chain at once.
//
// Following the design: the start command with the first-buffer pointer, the
// bit-by-bit interface, the buffer linking done here, the descriptor fields.
// This design's own choices: bit order within a byte (least significant
// first, the HDLC order on the line), which bits of the last byte data_remain
// counts (the low ones), and the valid/take/eoc handshake.
//
// Bit interface: bit_valid with bit_data is the next bit; bit_take (one cycle)
// consumes it. eoc is high when the chain is finished and nothing is left.
module ll2_tx_mem
  import x25_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  addr_t       first_desc,
  input  logic        stop,
  output logic        bit_valid,
  output logic        bit_data,
  input  logic        bit_take,
  output logic        eoc,
  // MIU port
  output logic        m_valid,
  output miu_req_t    m_req,
  input  logic        m_done,
  input  logic [15:0] m_rdata
);
  typedef enum logic [3:0] {
    D_IDLE, D_BEGIN_HI, D_BEGIN_LO, D_DLEN, D_REM, D_NEXT_HI, D_NEXT_LO, D_DATA, D_FETCH, D_END
  } state_e;

  state_e      state;
  addr_t       desc, data_ptr, next_ptr;
  logic [15:0] dlen, bcount;   // bytes in this buffer, bytes fetched
  logic [2:0]  remain;
  logic        rem_done;
  logic [3:0]  fetch_n;        // bits of the byte being fetched (8 or remain)

  // output shift register and the prefetched byte
  logic [7:0]  sh, hold;
  logic [3:0]  sh_n, hold_n;
  logic        hold_valid;

  assign bit_valid = (sh_n != 0);
  assign bit_data  = sh[0];
  assign eoc       = (state == D_END) && (sh_n == 0) && !hold_valid;

  logic [3:0] sh_n_after;
  assign sh_n_after = (bit_take && sh_n != 0) ? sh_n - 1'b1 : sh_n;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= D_IDLE;
      desc <= NULL_PTR; data_ptr <= NULL_PTR; next_ptr <= NULL_PTR;
      dlen <= '0; bcount <= '0; remain <= '0; rem_done <= 1'b0; fetch_n <= '0;
      sh <= '0; hold <= '0; sh_n <= '0; hold_n <= '0; hold_valid <= 1'b0;
    end else if (stop) begin
      state <= D_IDLE;
      sh_n <= '0; hold_valid <= 1'b0;
    end else begin
      // output side
      if (bit_take && sh_n != 0) sh <= {1'b0, sh[7:1]};
      sh_n <= sh_n_after;
      if (sh_n_after == 0 && hold_valid) begin
        sh         <= hold;
        sh_n       <= hold_n;
        hold_valid <= 1'b0;
      end

      unique case (state)
        D_IDLE: if (start) begin
          desc  <= first_desc;
          state <= (first_desc == NULL_PTR) ? D_END : D_BEGIN_HI;
          sh_n <= '0; hold_valid <= 1'b0;
        end
        D_BEGIN_HI: if (m_done) begin data_ptr[23:8] <= m_rdata; state <= D_BEGIN_LO; end
        D_BEGIN_LO: if (m_done) begin data_ptr[7:0] <= m_rdata[7:0]; state <= D_DLEN; end
        D_DLEN:     if (m_done) begin dlen <= m_rdata; state <= D_REM; end
        D_REM:      if (m_done) begin remain <= m_rdata[2:0]; state <= D_NEXT_HI; end
        D_NEXT_HI:  if (m_done) begin next_ptr[23:8] <= m_rdata; state <= D_NEXT_LO; end
        D_NEXT_LO:  if (m_done) begin
          next_ptr[7:0] <= m_rdata[7:0];
          bcount   <= '0;
          rem_done <= 1'b0;
          state    <= D_DATA;
        end
        D_DATA: begin
          if (bcount != dlen) begin
            fetch_n <= 4'd8;
            state   <= D_FETCH;
          end else if (remain != 0 && !rem_done) begin
            fetch_n <= {1'b0, remain};
            state   <= D_FETCH;
          end else if (next_ptr == NULL_PTR) begin
            state <= D_END;
          end else begin
            desc  <= next_ptr;
            state <= D_BEGIN_HI;
          end
        end
        // wait for room in the holding register, then read the byte
        D_FETCH: if (m_done) begin
          hold       <= m_rdata[7:0];
          hold_n     <= fetch_n;
          hold_valid <= 1'b1;
          if (bcount != dlen) bcount <= bcount + 1'b1;
          else                rem_done <= 1'b1;
          state <= D_DATA;
        end
        D_END: if (start) begin
          desc  <= first_desc;
          state <= (first_desc == NULL_PTR) ? D_END : D_BEGIN_HI;
        end
        default: state <= D_IDLE;
      endcase
    end
  end

  // MIU requests; a data byte is only fetched when the holding register is free
  always_comb begin
    m_valid = 1'b0;
    m_req   = '{cmd: MIU_RD_B, addr: desc, wdata: '0};
    unique case (state)
      D_BEGIN_HI: begin m_valid = 1'b1; m_req = '{cmd: MIU_RD_W, addr: desc + addr_t'(BD_BEGIN),      wdata: '0}; end
      D_BEGIN_LO: begin m_valid = 1'b1; m_req = '{cmd: MIU_RD_B, addr: desc + addr_t'(BD_BEGIN + 2),  wdata: '0}; end
      D_DLEN:     begin m_valid = 1'b1; m_req = '{cmd: MIU_RD_W, addr: desc + addr_t'(BD_DLEN),       wdata: '0}; end
      D_REM:      begin m_valid = 1'b1; m_req = '{cmd: MIU_RD_B, addr: desc + addr_t'(BD_REMAIN),     wdata: '0}; end
      D_NEXT_HI:  begin m_valid = 1'b1; m_req = '{cmd: MIU_RD_W, addr: desc + addr_t'(BD_NEXT),       wdata: '0}; end
      D_NEXT_LO:  begin m_valid = 1'b1; m_req = '{cmd: MIU_RD_B, addr: desc + addr_t'(BD_NEXT + 2),   wdata: '0}; end
      D_FETCH:    begin m_valid = !hold_valid || m_done;
                        m_req = '{cmd: MIU_RD_B, addr: data_ptr + addr_t'(bcount), wdata: '0}; end
      default: ;
    endcase
  end
endmodule

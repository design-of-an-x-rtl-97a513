// ll2_rx_mem: receive memory interface of low level 2.
//
// Stores the data bits of each received frame in a linked list of buffers
// and hands the list to high level 2 when the frame is over, so that high
// level 2 works in frame time instead of bit time.
//
// Input side: data bits from the LL2 receiver (d_valid/d_bit) are packed into
// bytes, least significant bit first, and each full byte is queued in a small
// FIFO of FIFO_D entries. The frame end (d_end) queues an end entry carrying
// the frame status, the bits of an unfinished last byte, the copied header and
// the PCEI/SAP. One FIFO place is kept for the end entry; a data byte that
// finds no other place is an overrun: m_overrun tells the receiver, which
// ends the frame, and the rest of its bytes are dropped.
//
// Memory side: a writer works through the FIFO. It takes a buffer from the
// buffer manager when it needs one (GET on list RX_LIST), reads its
// buffer_pointer and buffer_length, links it to the previous buffer of the
// frame through that buffer's next pointer, and writes bytes at
// buffer_pointer+n. When a buffer is full, or the frame ends, it fills in the
// descriptor: begin_data_pointer = buffer_pointer, data_length = bytes,
// data_remain = bits of a last partial byte. At the frame end it sets the
// primitive control block towards high level 2 (ind_do) with the first
// descriptor, the status, the total length, the header and PCEI/SAP, and waits
// until high level 2 has acknowledged it. If the buffer manager has no buffer
// left the rest of the frame is dropped and the status is RX_NOBUF.
//
// Following the design: storing bits in buffers, requesting and linking
// buffers, updating the descriptors, passing the first-buffer pointer, the
// header and, for a bad frame, an error code to high level 2. This design's
// own choices: the FIFO and its depth, the overrun rule, that buffers of a bad
// frame are passed on too (high level 2, their owner, returns them), the
// handshakes.
module ll2_rx_mem
  import x25_pkg::*;
#(
  parameter int unsigned FIFO_D  = 4,
  parameter int unsigned RX_LIST = 0
) (
  input  logic        clk,
  input  logic        rst_n,
  // from the LL2 receiver
  input  logic        d_valid,
  input  logic        d_bit,
  input  logic        d_end,
  input  rx_status_e  d_status,
  input  logic [31:0] d_hdr,
  input  logic [3:0]  d_pcei,
  input  logic [3:0]  d_sap,
  output logic        m_overrun,
  // buffer manager client port
  output logic        bm_valid,
  output logic [0:0]  bm_list,
  input  logic        bm_done,
  input  addr_t       bm_ptr,
  input  logic        bm_empty,
  // indication to high level 2 (through a primitive control block)
  output logic        ind_do,
  input  logic        ind_busy,
  output addr_t       ind_first,
  output rx_status_e  ind_status,
  output logic [15:0] ind_bytes,
  output logic [2:0]  ind_rbits,
  output logic [31:0] ind_hdr,
  output logic [3:0]  ind_pcei,
  output logic [3:0]  ind_sap,
  // MIU port
  output logic        m_valid,
  output miu_req_t    m_req,
  input  logic        m_done,
  input  logic [15:0] m_rdata
);
  typedef struct packed {
    logic        is_end;
    logic [7:0]  data;
    logic [2:0]  rbits;
    rx_status_e  status;
    logic [31:0] hdr;
    logic [3:0]  pcei;
    logic [3:0]  sap;
  } entry_t;

  localparam int unsigned FW = (FIFO_D > 1) ? $clog2(FIFO_D) : 1;

  entry_t          fifo [FIFO_D];
  logic [FW-1:0]   rd_p, wr_p;
  logic [FW:0]     fcount;

  // ---- input side: pack bits, queue bytes and frame ends ----
  logic [7:0] acc;
  logic [2:0] acc_n;
  logic       drop;          // overrun in this frame: drop its bytes

  logic [7:0] acc_b;         // accumulator with this cycle's bit added
  logic [3:0] acc_bn;
  always_comb begin
    acc_b  = acc;
    acc_bn = {1'b0, acc_n};
    if (d_valid) begin
      acc_b[acc_n] = d_bit;
      acc_bn       = acc_bn + 1'b1;
    end
  end

  logic push_byte, push_end, pop;
  entry_t push_e;
  assign push_byte = (acc_bn == 4'd8) && !drop && (32'(fcount) < FIFO_D - 1);
  assign m_overrun = (acc_bn == 4'd8) && !drop && !(32'(fcount) < FIFO_D - 1);
  assign push_end  = d_end && (32'(fcount) + 32'(push_byte) < FIFO_D);

  always_comb begin
    push_e = '{is_end: 1'b0, data: acc_b, rbits: '0, status: RX_OK, hdr: d_hdr, pcei: d_pcei, sap: d_sap};
    if (push_end) begin
      push_e.is_end = 1'b1;
      push_e.rbits  = (acc_bn == 4'd8) ? 3'd0 : acc_bn[2:0];
      push_e.status = (drop || m_overrun) ? RX_OVERRUN : d_status;
    end
  end

  // ---- writer ----
  typedef enum logic [3:0] {
    W_IDLE, W_GET, W_BPTR_HI, W_BPTR_LO, W_BLEN, W_LINK_HI, W_LINK_LO,
    W_BYTE, W_FIN_BEG_HI, W_FIN_BEG_LO, W_FIN_DLEN, W_FIN_REM, W_REPORT, W_WAIT_ACK
  } wstate_e;

  wstate_e     ws;
  entry_t      head;
  logic        have_buf, fin_for_end, part_done, nobuf;
  addr_t       first_desc, prev_desc, cur_desc, buf_ptr;
  logic [15:0] buf_len, n, total;
  logic [2:0]  fin_rem;

  assign head = fifo[rd_p];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_p <= '0; wr_p <= '0; fcount <= '0;
      acc <= '0; acc_n <= '0; drop <= 1'b0;
      for (int i = 0; i < FIFO_D; i++) fifo[i] <= '0;
    end else begin
      // input side
      if (push_byte || push_end) begin
        fifo[wr_p] <= push_byte ? '{is_end: 1'b0, data: acc_b, rbits: '0, status: RX_OK,
                                    hdr: '0, pcei: '0, sap: '0} : push_e;
      end
      if (push_byte && push_end) begin
        fifo[(wr_p == FW'(FIFO_D - 1)) ? '0 : wr_p + 1'b1] <= push_e;
      end
      wr_p   <= FW'((32'(wr_p) + 32'(push_byte) + 32'(push_end)) % FIFO_D);
      rd_p   <= pop ? ((rd_p == FW'(FIFO_D - 1)) ? '0 : rd_p + 1'b1) : rd_p;
      fcount <= fcount + (FW+1)'(push_byte) + (FW+1)'(push_end) - (FW+1)'(pop);
      if (d_end) begin
        acc   <= '0;
        acc_n <= '0;
        drop  <= 1'b0;
      end else begin
        acc   <= (acc_bn == 4'd8) ? 8'h00 : acc_b;
        acc_n <= acc_bn[2:0];
        if (m_overrun) drop <= 1'b1;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ws <= W_IDLE;
      have_buf <= 1'b0; fin_for_end <= 1'b0; part_done <= 1'b0; nobuf <= 1'b0;
      first_desc <= NULL_PTR; prev_desc <= NULL_PTR; cur_desc <= NULL_PTR; buf_ptr <= NULL_PTR;
      buf_len <= '0; n <= '0; total <= '0; fin_rem <= '0;
      ind_first <= NULL_PTR; ind_status <= RX_OK; ind_bytes <= '0; ind_rbits <= '0;
      ind_hdr <= '0; ind_pcei <= '0; ind_sap <= '0;
    end else begin
      unique case (ws)
        W_IDLE: if (fcount != 0) begin
          if (head.is_end) begin
            if (head.rbits != 0 && !part_done && !nobuf) begin
              // the unfinished last byte still has to be stored
              if (!have_buf) ws <= W_GET;
              else if (n == buf_len) begin fin_for_end <= 1'b0; fin_rem <= '0; ws <= W_FIN_BEG_HI; end
              else ws <= W_BYTE;
            end else if (have_buf) begin
              fin_for_end <= 1'b1;
              fin_rem     <= part_done ? head.rbits : 3'd0;
              ws          <= W_FIN_BEG_HI;
            end else begin
              ws <= W_REPORT;
            end
          end else if (!nobuf) begin
            if (!have_buf) ws <= W_GET;
            else if (n == buf_len) begin fin_for_end <= 1'b0; fin_rem <= '0; ws <= W_FIN_BEG_HI; end
            else ws <= W_BYTE;
          end
        end
        W_GET: if (bm_done) begin
          if (bm_empty) begin
            nobuf <= 1'b1;
            ws    <= W_IDLE;
          end else begin
            cur_desc <= bm_ptr;
            ws       <= W_BPTR_HI;
          end
        end
        W_BPTR_HI: if (m_done) begin buf_ptr[23:8] <= m_rdata; ws <= W_BPTR_LO; end
        W_BPTR_LO: if (m_done) begin buf_ptr[7:0] <= m_rdata[7:0]; ws <= W_BLEN; end
        W_BLEN: if (m_done) begin
          buf_len  <= m_rdata;
          n        <= '0;
          have_buf <= 1'b1;
          if (first_desc == NULL_PTR) begin
            first_desc <= cur_desc;
            ws         <= W_IDLE;
          end else ws <= W_LINK_HI;
        end
        W_LINK_HI: if (m_done) ws <= W_LINK_LO;
        W_LINK_LO: if (m_done) ws <= W_IDLE;
        W_BYTE: if (m_done) begin
          n     <= n + 1'b1;
          if (head.is_end) part_done <= 1'b1;
          else total <= total + 1'b1;
          ws    <= W_IDLE;
        end
        W_FIN_BEG_HI: if (m_done) ws <= W_FIN_BEG_LO;
        W_FIN_BEG_LO: if (m_done) ws <= W_FIN_DLEN;
        W_FIN_DLEN:   if (m_done) ws <= W_FIN_REM;
        W_FIN_REM: if (m_done) begin
          prev_desc <= cur_desc;
          have_buf  <= 1'b0;
          ws        <= fin_for_end ? W_REPORT : W_IDLE;
        end
        W_REPORT: begin
          ind_first  <= first_desc;
          ind_status <= nobuf ? RX_NOBUF : head.status;
          ind_bytes  <= total;
          ind_rbits  <= part_done ? head.rbits : 3'd0;
          ind_hdr    <= head.hdr;
          ind_pcei   <= head.pcei;
          ind_sap    <= head.sap;
          if (!ind_busy) ws <= W_WAIT_ACK;
        end
        W_WAIT_ACK: if (!ind_busy) begin
          // indication taken: ready for the next frame
          have_buf <= 1'b0; part_done <= 1'b0; nobuf <= 1'b0;
          first_desc <= NULL_PTR; prev_desc <= NULL_PTR; total <= '0; n <= '0;
          ws <= W_IDLE;
        end
        default: ws <= W_IDLE;
      endcase
    end
  end

  // the FIFO head is consumed after its byte is written, after a frame report
  // is taken, or at once when there is no buffer for it
  assign pop = ((ws == W_BYTE) && m_done && !head.is_end) ||
               ((ws == W_WAIT_ACK) && !ind_busy) ||
               ((ws == W_IDLE) && fcount != 0 && !head.is_end && nobuf);

  // ind_do is given for one cycle; the control block is set from the next
  // cycle on, and W_WAIT_ACK waits until high level 2 has reset it
  assign ind_do = (ws == W_REPORT) && !ind_busy;

  assign bm_valid = (ws == W_GET);
  assign bm_list  = 1'(RX_LIST);

  always_comb begin
    m_valid = 1'b0;
    m_req   = '{cmd: MIU_RD_B, addr: cur_desc, wdata: '0};
    unique case (ws)
      W_BPTR_HI:    begin m_valid = 1'b1; m_req = '{cmd: MIU_RD_W, addr: cur_desc + addr_t'(BD_BUFPTR),     wdata: '0}; end
      W_BPTR_LO:    begin m_valid = 1'b1; m_req = '{cmd: MIU_RD_B, addr: cur_desc + addr_t'(BD_BUFPTR + 2), wdata: '0}; end
      W_BLEN:       begin m_valid = 1'b1; m_req = '{cmd: MIU_RD_W, addr: cur_desc + addr_t'(BD_BUFLEN),     wdata: '0}; end
      W_LINK_HI:    begin m_valid = 1'b1; m_req = '{cmd: MIU_WR_W, addr: prev_desc + addr_t'(BD_NEXT),      wdata: cur_desc[23:8]}; end
      W_LINK_LO:    begin m_valid = 1'b1; m_req = '{cmd: MIU_WR_B, addr: prev_desc + addr_t'(BD_NEXT + 2),  wdata: {8'h00, cur_desc[7:0]}}; end
      W_BYTE:       begin m_valid = 1'b1; m_req = '{cmd: MIU_WR_B, addr: buf_ptr + addr_t'(n),              wdata: {8'h00, head.data}}; end
      W_FIN_BEG_HI: begin m_valid = 1'b1; m_req = '{cmd: MIU_WR_W, addr: cur_desc + addr_t'(BD_BEGIN),      wdata: buf_ptr[23:8]}; end
      W_FIN_BEG_LO: begin m_valid = 1'b1; m_req = '{cmd: MIU_WR_B, addr: cur_desc + addr_t'(BD_BEGIN + 2),  wdata: {8'h00, buf_ptr[7:0]}}; end
      W_FIN_DLEN:   begin m_valid = 1'b1; m_req = '{cmd: MIU_WR_W, addr: cur_desc + addr_t'(BD_DLEN),       wdata: fin_rem != 0 ? n - 1'b1 : n}; end
      W_FIN_REM:    begin m_valid = 1'b1; m_req = '{cmd: MIU_WR_B, addr: cur_desc + addr_t'(BD_REMAIN),     wdata: {13'h0, fin_rem}}; end
      default: ;
    endcase
  end
endmodule

// buf_link: buffer exchange between the on-chip buffer manager and the host's
// buffer manager, through the host interface unit.
//
// It sits between the host interface unit and the layer 3 side. Commands
// from the host arrive as a pointer to a linked list of command buffers, and
// the first byte of a command buffer's data is its code. Buffer commands
// are handled here. Any other command list is passed on unchanged to layer 3
// (l3_cmd_*). Responses from layer 3 (l3_rsp_*) are passed on to the host
// interface, taking turns with this block's own responses.
//
// Commands handled (code, then parameters in the data bytes):
//   0x01 buffer disposal   3-byte pointer to a block (a buffer chain), 2-byte
//                          block size in bytes. Every buffer of the chain is
//                          PUT on the free list whose requested block size
//                          matches (list 1 if it equals req_bytes[1], else
//                          list 0), and that list's request is marked answered.
//   0x02 release request   all lists give back their buffers above the
//                          request threshold.
// The commands of one list are handled one after another. The whole list
// goes to layer 3 if its first command is not a buffer command.
//
// Responses given (a message record at MSG_AREA, see below):
//   0x81 buffer request    when a list's count falls under the request
//                          threshold (need_buf) and no request of that list
//                          is outstanding: list number, req_blocks blocks of
//                          req_bytes[list] bytes.
//   0x82 buffer release    when a list's count rises over the release
//                          threshold (excess), or after a release request:
//                          buffers are taken from the list (GET) and linked
//                          into one chain, down to the threshold; the
//                          response carries the chain and the number of
//                          buffers. A release request with nothing to give
//                          gets a release response with a NULL chain.
// The message record is a buffer descriptor at MSG_AREA whose 6 data bytes,
// at MSG_AREA+16, are: code, a 3-byte field, a 2-byte field. For a request
// the 3-byte field is {list, 0, blocks} and the 2-byte field the block size.
// For a release they are the chain and the buffer count. Before the record
// is rewritten, the response area (RSP_AREA) is read until it no longer
// points at the record, so the host has taken the previous message.
//
// Following the design: the buffer request, release and disposal messages
// and their parameters, the two thresholds, one block per disposal command
// with the block size telling which request it answers, linked commands, and
// the release request answered with all buffers above the request threshold.
// This design's own choices: the codes, the record layout, the fixed record
// address, routing of non-buffer command lists to layer 3, releasing down to
// the release threshold on excess, and thresholds that count buffers. Header
// requests and disposals are not handled (there are no header lists).
//
// Handshakes: as the host interface unit (h_cmd_ready and l3_rsp_ready
// pulse for one cycle; l3_cmd_valid is held until l3_cmd_ready). The buffer
// manager client and MIU ports follow their units' request/done handshakes.
module buf_link
  import x25_pkg::*;
#(
  parameter int unsigned NLISTS   = 2,
  parameter addr_t       MSG_AREA = 24'h00F010,
  parameter addr_t       RSP_AREA = 24'h00F004,
  parameter int unsigned POLL_GAP = 16,
  localparam int unsigned LW      = (NLISTS > 1) ? $clog2(NLISTS) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  // from/to the host interface unit
  input  logic              h_cmd_valid,
  input  addr_t             h_cmd_ptr,
  output logic              h_cmd_ready,
  output logic              h_rsp_valid,
  output addr_t             h_rsp_ptr,
  input  logic              h_rsp_ready,
  // from/to layer 3
  output logic              l3_cmd_valid,
  output addr_t             l3_cmd_ptr,
  input  logic              l3_cmd_ready,
  input  logic              l3_rsp_valid,
  input  addr_t             l3_rsp_ptr,
  output logic              l3_rsp_ready,
  // buffer manager client port and status
  output logic              bm_valid,
  output logic              bm_put,
  output logic [LW-1:0]     bm_list,
  output addr_t             bm_ptr,
  input  logic              bm_done,
  input  addr_t             bm_ptr_out,
  input  logic              bm_empty,
  input  logic [15:0]       count [NLISTS],
  input  logic [NLISTS-1:0] need_buf,
  input  logic [NLISTS-1:0] excess,
  // start-up configuration
  input  logic [15:0]       req_thresh,
  input  logic [15:0]       rel_thresh,
  input  logic [7:0]        req_blocks,
  input  logic [15:0]       req_bytes [NLISTS],
  // MIU port
  output logic              m_valid,
  output miu_req_t          m_req,
  input  logic              m_done,
  input  logic [15:0]       m_rdata
);
  localparam logic [7:0] CMD_DISPOSAL = 8'h01, CMD_RELEASE_REQ = 8'h02;
  localparam logic [7:0] RSP_REQUEST  = 8'h81, RSP_RELEASE     = 8'h82;
  localparam addr_t      MSG_DATA     = MSG_AREA + 24'd16;

  typedef enum logic [4:0] {
    IDLE,
    C_BEG_HI, C_BEG_LO, C_CODE, C_FWD, C_P_HI, C_P_LO, C_NB,
    D_NEXT_HI, D_NEXT_LO, D_PUT, C_LINK_HI, C_LINK_LO, C_DONE,
    F_RSP,
    R_GET, R_LINK_HI, R_LINK_LO,
    M_POLL_HI, M_POLL_LO, M_WAIT, M_BEG_HI, M_BEG_LO, M_DLEN, M_REM, M_NEXT_HI, M_NEXT_LO,
    M_CODE, M_A_HI, M_A_LO, M_B, M_SEND
  } state_e;

  state_e          st;
  logic            first_cmd;
  addr_t           cptr, dptr, blk, nxt;
  logic [15:0]     nrel, poll_hi;
  logic [LW-1:0]   lst;
  logic [NLISTS-1:0] req_pend;
  logic            relreq, rel_any;
  addr_t           chain;
  logic [7:0]      m_code;
  logic [23:0]     m_a;
  logic [15:0]     m_b;
  logic [$clog2(POLL_GAP+1)-1:0] gap;

  // what to do next when idle: releases first, then requests
  logic            rel_go, req_go, rel_none;
  logic [LW-1:0]   rel_l, req_l;
  logic [15:0]     rel_n;
  always_comb begin
    rel_go = 1'b0; rel_l = '0; rel_n = '0;
    req_go = 1'b0; req_l = '0;
    for (int l = NLISTS - 1; l >= 0; l--) begin
      if (relreq && count[l] > req_thresh) begin
        rel_go = 1'b1; rel_l = LW'(l); rel_n = count[l] - req_thresh;
      end else if (!relreq && excess[l]) begin
        rel_go = 1'b1; rel_l = LW'(l); rel_n = count[l] - rel_thresh;
      end
      if (need_buf[l] && !req_pend[l]) begin
        req_go = 1'b1; req_l = LW'(l);
      end
    end
    rel_none = relreq && !rel_go;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= IDLE; first_cmd <= 1'b0;
      cptr <= NULL_PTR; dptr <= NULL_PTR; blk <= NULL_PTR; nxt <= NULL_PTR;
      nrel <= '0; poll_hi <= '0; lst <= '0; req_pend <= '0;
      relreq <= 1'b0; rel_any <= 1'b0;
      chain <= NULL_PTR; m_code <= '0; m_a <= '0; m_b <= '0; gap <= '0;
    end else begin
      unique case (st)
        IDLE: begin
          if (h_cmd_valid) begin
            cptr <= h_cmd_ptr; first_cmd <= 1'b1; st <= C_BEG_HI;
          end else if (l3_rsp_valid) begin
            st <= F_RSP;
          end else if (rel_go) begin
            lst <= rel_l; nrel <= rel_n; chain <= NULL_PTR; m_b <= '0; st <= R_GET;
          end else if (rel_none) begin
            // release request finished; answer it even when nothing was given
            relreq <= 1'b0;
            if (!rel_any) begin
              m_code <= RSP_RELEASE; m_a <= NULL_PTR; m_b <= '0; st <= M_POLL_HI;
            end
          end else if (req_go) begin
            req_pend[req_l] <= 1'b1;
            m_code <= RSP_REQUEST;
            m_a    <= {8'(req_l), 8'h00, req_blocks};
            m_b    <= req_bytes[req_l];
            st     <= M_POLL_HI;
          end
        end
        // ---- commands ----
        C_BEG_HI: if (m_done) begin dptr[23:8] <= m_rdata; st <= C_BEG_LO; end
        C_BEG_LO: if (m_done) begin dptr[7:0] <= m_rdata[7:0]; st <= C_CODE; end
        C_CODE: if (m_done) begin
          first_cmd <= 1'b0;
          if (m_rdata[7:0] == CMD_DISPOSAL)         st <= C_P_HI;
          else if (m_rdata[7:0] == CMD_RELEASE_REQ) begin
            relreq <= 1'b1; rel_any <= 1'b0; st <= C_LINK_HI;
          end
          else if (first_cmd)                       st <= C_FWD;
          else                                      st <= C_LINK_HI;   // unknown: skipped
        end
        C_FWD: if (l3_cmd_ready) st <= C_DONE;
        C_P_HI: if (m_done) begin blk[23:8] <= m_rdata; st <= C_P_LO; end
        C_P_LO: if (m_done) begin blk[7:0] <= m_rdata[7:0]; st <= C_NB; end
        C_NB: if (m_done) begin
          lst    <= (NLISTS > 1 && m_rdata == req_bytes[NLISTS-1]) ? LW'(NLISTS - 1) : '0;
          st     <= (blk == NULL_PTR) ? C_LINK_HI : D_NEXT_HI;
        end
        D_NEXT_HI: if (m_done) begin nxt[23:8] <= m_rdata; st <= D_NEXT_LO; end
        D_NEXT_LO: if (m_done) begin nxt[7:0] <= m_rdata[7:0]; st <= D_PUT; end
        D_PUT: if (bm_done) begin
          req_pend[lst] <= 1'b0;
          blk <= nxt;
          st  <= (nxt == NULL_PTR) ? C_LINK_HI : D_NEXT_HI;
        end
        C_LINK_HI: if (m_done) begin cptr[23:8] <= m_rdata; st <= C_LINK_LO; end
        C_LINK_LO: if (m_done) begin
          cptr[7:0] <= m_rdata[7:0];
          st <= ({cptr[23:8], m_rdata[7:0]} == NULL_PTR) ? C_DONE : C_BEG_HI;
        end
        C_DONE: st <= IDLE;
        // ---- layer 3 response passed on ----
        F_RSP: if (h_rsp_ready) st <= IDLE;
        // ---- release: take buffers and link them into one chain ----
        R_GET: if (bm_done) begin
          if (bm_empty) begin
            m_code <= RSP_RELEASE; m_a <= chain; st <= M_POLL_HI; rel_any <= 1'b1;
          end else begin
            blk <= bm_ptr_out; st <= R_LINK_HI;
          end
        end
        R_LINK_HI: if (m_done) st <= R_LINK_LO;
        R_LINK_LO: if (m_done) begin
          chain <= blk;
          m_b   <= m_b + 1'b1;
          nrel  <= nrel - 1'b1;
          if (nrel == 16'd1) begin
            m_code <= RSP_RELEASE; m_a <= blk; st <= M_POLL_HI; rel_any <= 1'b1;
          end else st <= R_GET;
        end
        // ---- message: wait until the host has taken the previous one ----
        M_POLL_HI: if (m_done) begin poll_hi <= m_rdata; st <= M_POLL_LO; end
        M_POLL_LO: if (m_done) begin
          if ({poll_hi, m_rdata[7:0]} == MSG_AREA) begin gap <= '0; st <= M_WAIT; end
          else st <= M_BEG_HI;
        end
        M_WAIT: begin
          gap <= gap + 1'b1;
          if (32'(gap) >= POLL_GAP - 1) st <= M_POLL_HI;
        end
        M_BEG_HI:  if (m_done) st <= M_BEG_LO;
        M_BEG_LO:  if (m_done) st <= M_DLEN;
        M_DLEN:    if (m_done) st <= M_REM;
        M_REM:     if (m_done) st <= M_NEXT_HI;
        M_NEXT_HI: if (m_done) st <= M_NEXT_LO;
        M_NEXT_LO: if (m_done) st <= M_CODE;
        M_CODE:    if (m_done) st <= M_A_HI;
        M_A_HI:    if (m_done) st <= M_A_LO;
        M_A_LO:    if (m_done) st <= M_B;
        M_B:       if (m_done) st <= M_SEND;
        M_SEND:    if (h_rsp_ready) st <= IDLE;
        default: st <= IDLE;
      endcase
    end
  end

  always_comb begin
    m_valid = 1'b1;
    m_req   = '{cmd: MIU_RD_B, addr: NULL_PTR, wdata: '0};
    unique case (st)
      C_BEG_HI:  m_req = '{cmd: MIU_RD_W, addr: cptr + addr_t'(BD_BEGIN),     wdata: '0};
      C_BEG_LO:  m_req = '{cmd: MIU_RD_B, addr: cptr + addr_t'(BD_BEGIN + 2), wdata: '0};
      C_CODE:    m_req = '{cmd: MIU_RD_B, addr: dptr,                          wdata: '0};
      C_P_HI:    m_req = '{cmd: MIU_RD_W, addr: dptr + 24'd1,                  wdata: '0};
      C_P_LO:    m_req = '{cmd: MIU_RD_B, addr: dptr + 24'd3,                  wdata: '0};
      C_NB:      m_req = '{cmd: MIU_RD_W, addr: dptr + 24'd4,                  wdata: '0};
      D_NEXT_HI: m_req = '{cmd: MIU_RD_W, addr: blk + addr_t'(BD_NEXT),        wdata: '0};
      D_NEXT_LO: m_req = '{cmd: MIU_RD_B, addr: blk + addr_t'(BD_NEXT + 2),    wdata: '0};
      C_LINK_HI: m_req = '{cmd: MIU_RD_W, addr: cptr + addr_t'(BD_NEXT),       wdata: '0};
      C_LINK_LO: m_req = '{cmd: MIU_RD_B, addr: cptr + addr_t'(BD_NEXT + 2),   wdata: '0};
      R_LINK_HI: m_req = '{cmd: MIU_WR_W, addr: blk + addr_t'(BD_NEXT),        wdata: chain[23:8]};
      R_LINK_LO: m_req = '{cmd: MIU_WR_B, addr: blk + addr_t'(BD_NEXT + 2),    wdata: {8'h00, chain[7:0]}};
      M_POLL_HI: m_req = '{cmd: MIU_RD_W, addr: RSP_AREA,                      wdata: '0};
      M_POLL_LO: m_req = '{cmd: MIU_RD_B, addr: RSP_AREA + 24'd2,              wdata: '0};
      M_BEG_HI:  m_req = '{cmd: MIU_WR_W, addr: MSG_AREA + addr_t'(BD_BEGIN),     wdata: MSG_DATA[23:8]};
      M_BEG_LO:  m_req = '{cmd: MIU_WR_B, addr: MSG_AREA + addr_t'(BD_BEGIN + 2), wdata: {8'h00, MSG_DATA[7:0]}};
      M_DLEN:    m_req = '{cmd: MIU_WR_W, addr: MSG_AREA + addr_t'(BD_DLEN),      wdata: 16'd6};
      M_REM:     m_req = '{cmd: MIU_WR_B, addr: MSG_AREA + addr_t'(BD_REMAIN),    wdata: '0};
      M_NEXT_HI: m_req = '{cmd: MIU_WR_W, addr: MSG_AREA + addr_t'(BD_NEXT),      wdata: '0};
      M_NEXT_LO: m_req = '{cmd: MIU_WR_B, addr: MSG_AREA + addr_t'(BD_NEXT + 2),  wdata: '0};
      M_CODE:    m_req = '{cmd: MIU_WR_B, addr: MSG_DATA,           wdata: {8'h00, m_code}};
      M_A_HI:    m_req = '{cmd: MIU_WR_W, addr: MSG_DATA + 24'd1,   wdata: m_a[23:8]};
      M_A_LO:    m_req = '{cmd: MIU_WR_B, addr: MSG_DATA + 24'd3,   wdata: {8'h00, m_a[7:0]}};
      M_B:       m_req = '{cmd: MIU_WR_W, addr: MSG_DATA + 24'd4,   wdata: m_b};
      default:   m_valid = 1'b0;
    endcase
  end

  assign bm_valid     = (st == D_PUT) || (st == R_GET);
  assign bm_put       = (st == D_PUT);
  assign bm_list      = lst;
  assign bm_ptr       = blk;
  assign h_cmd_ready  = (st == C_DONE);
  assign l3_cmd_valid = (st == C_FWD);
  assign l3_cmd_ptr   = cptr;
  assign h_rsp_valid  = (st == F_RSP) || (st == M_SEND);
  assign h_rsp_ptr    = (st == F_RSP) ? l3_rsp_ptr : MSG_AREA;
  assign l3_rsp_ready = (st == F_RSP) && h_rsp_ready;
endmodule

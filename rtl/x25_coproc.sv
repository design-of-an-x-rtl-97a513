// x25_coproc: the X.25 co-processor, top level.
//
// The co-processor takes the bit-level and bookkeeping work of X.25 levels 1
// to 3 off the host. Its units work in parallel and meet in one shared
// memory, where every packet lives in a linked list of buffers; units pass
// each other only buffer pointers, through OSI-style service primitives that
// are synchronised by primitive control blocks. This top level wires up the
// units that are built as hardware here:
//
//   miu         memory interface unit: the only path to the memory bus, seven
//               request ports (0 receive memory interface, 1 transmit memory
//               interface, 2 buffer manager, 3 host interface, 4 high level 2,
//               5 buffer exchange, 6 statistics dump)
//   buf_mgr     free-buffer lists; client 0 is the receive memory interface
//               (GET), client 1 is brought out for high level 2 and layer 3,
//               client 2 is the buffer exchange
//   buf_link    buffer requests, releases and disposals with the host's
//               buffer manager; it sits between the host interface and the
//               command/response ports, which lead to layer 3
//   timer_unit  timer records with start/stop commands and expiry messages,
//               all ports brought out for high level 2 and layer 3
//   hiu         command and response areas shared with the host
//   ll2_tx, ll2_tx_mem   low level 2 transmit side and its memory interface
//   ll2_rx, ll2_rx_mem   low level 2 receive side and its memory interface
//   pcb (x4)    primitive control blocks: high level 2 -> ll2_tx, ll2_tx ->
//               layer 1 (PH-DATA-REQUEST), layer 1 -> ll2_rx
//               (PH-DATA-INDICATION), ll2_rx_mem -> high level 2
//   ph_mgmt     PH-ACTIVATE and PH-DEACTIVATE request and indication between
//               layer 2 management and layer 1, and the connection state
//   stat_dump   statistics query: on its primitive, a snapshot of the status
//               words below is written to memory at the given address
//
// Statistics dump layout (16-bit words, high byte first, at st_ptr + 2*i):
//   0 frames sent, 1 frames aborted on transmit, 2 frames received good,
//   3 frames received bad, 4 free buffers on list 0, 5 free buffers on
//   list 1, 6 free timer records, 7 timer clock, 8 flags {ph_active_tot,
//   ph_active_moo, ph_active, excess[1:0], need_buf[1:0]} in bits 7..0
//
// High level 2 (the LAPB procedures), layer 3 (the packet level) and layer 1
// (the line drivers and bit clock) are outside this design; their signals are
// the ports of this module. For a PCB the issuing side sees busy and the
// accepting side sees attention; the names below say which side is outside.
//
// Following the design: the unit split, the shared memory with buffer lists,
// the MIU as the single memory master, PCB synchronisation between the units,
// the PH-DATA-REQUEST/INDICATION and PH-ACTIVATE/DEACTIVATE signals, and the
// buffer exchange with the host. This design's own choices: the MIU port
// order (fixed priority, receive first so that incoming line data is never
// held up), which units share the buffer manager, that host commands pass
// the buffer exchange on their way to layer 3, and that the whole
// co-processor runs on one clock.
module x25_coproc
  import x25_pkg::*;
#(
  parameter int unsigned TMR_PORTS = 4,
  parameter int unsigned TMR_NREC  = 16,
  parameter int unsigned TMR_ID_W  = 8,
  parameter int unsigned TMR_CLK_W = 12,
  parameter addr_t       CMD_AREA  = 24'h00F000,
  parameter addr_t       RSP_AREA  = 24'h00F004,
  parameter addr_t       MSG_AREA  = 24'h00F010
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // memory bus
  output logic                 mem_en,
  output logic                 mem_we,
  output logic                 mem_lock,
  output addr_t                mem_addr,
  output logic [7:0]           mem_wdata,
  input  logic                 mem_rdy,
  input  logic [7:0]           mem_rdata,
  // host
  input  logic                 host_attn,
  output logic                 host_irq,
  input  logic                 host_irq_ack,
  // host commands and responses, to and from layer 3
  output logic                 cmd_valid,
  output addr_t                cmd_ptr,
  input  logic                 cmd_ready,
  input  logic                 rsp_valid,
  input  addr_t                rsp_ptr,
  output logic                 rsp_ready,
  // frame transmit request from high level 2 (HL2 issues)
  input  logic                 hl_tx_do,
  output logic                 hl_tx_busy,
  input  logic [63:0]          hl_inl_bits,
  input  logic [6:0]           hl_inl_n,
  input  logic                 hl_use_buf,
  input  addr_t                hl_buf_ptr,
  input  logic [3:0]           hl_pcei,
  input  logic [3:0]           hl_sap,
  input  logic                 hl_reset,
  output tx_status_e           tx_status,
  // frame receive indication to high level 2 (HL2 accepts)
  output logic                 ind_atn,
  input  logic                 ind_ack,
  output addr_t                ind_first,
  output rx_status_e           ind_status,
  output logic [15:0]          ind_bytes,
  output logic [2:0]           ind_rbits,
  output logic [31:0]          ind_hdr,
  output logic [3:0]           ind_pcei,
  output logic [3:0]           ind_sap,
  // high level 2 / layer 3 memory port
  input  logic                 ext_m_valid,
  input  miu_req_t             ext_m_req,
  output logic                 ext_m_done,
  output logic [15:0]          ext_m_rdata,
  // buffer manager client for high level 2 / layer 3
  input  logic                 bm_valid,
  input  logic                 bm_put,
  input  logic                 bm_list,
  input  addr_t                bm_ptr,
  output logic                 bm_done,
  output addr_t                bm_ptr_out,
  output logic                 bm_empty,
  input  logic [15:0]          bm_req_thresh,
  input  logic [15:0]          bm_rel_thresh,
  output logic [15:0]          bm_count [2],
  output logic [1:0]           bm_need_buf,
  output logic [1:0]           bm_excess,
  input  logic [7:0]           bm_req_blocks,
  input  logic [15:0]          bm_req_bytes [2],
  // timer unit
  input  logic [15:0]          tmr_presc,
  input  logic [TMR_PORTS-1:0] tmr_cmd_valid,
  input  tmr_op_e              tmr_cmd_op   [TMR_PORTS],
  input  logic [TMR_ID_W-1:0]  tmr_cmd_id   [TMR_PORTS],
  input  logic [15:0]          tmr_cmd_time [TMR_PORTS],
  output logic [TMR_PORTS-1:0] tmr_cmd_done,
  output tmr_err_e             tmr_cmd_err,
  output logic [TMR_PORTS-1:0] tmr_exp_valid,
  output logic [TMR_ID_W-1:0]  tmr_exp_id   [TMR_PORTS],
  input  logic [TMR_PORTS-1:0] tmr_exp_ack,
  output logic [$clog2(TMR_NREC+1)-1:0] tmr_free,
  output logic [TMR_CLK_W-1:0] tmr_now,        // timer clock, for time stamps
  output logic                 tmr_tick,
  // PH-DATA-REQUEST to layer 1 (layer 1 accepts)
  output logic                 phr_atn,
  input  logic                 phr_ack,
  output logic                 phr_bit,
  output logic                 phr_abo,
  output logic                 phr_lst,
  output logic [3:0]           phr_pcei,
  output logic [3:0]           phr_sap,
  input  logic                 phr_clk,
  input  logic                 phr_col,
  // PH-DATA-INDICATION from layer 1 (layer 1 issues)
  input  logic                 phi_do,
  output logic                 phi_busy,
  input  logic                 phi_bit,
  input  logic                 phi_clk,
  input  logic                 phi_lst,
  input  logic                 phi_col,
  input  logic [3:0]           phi_pcei,
  input  logic [3:0]           phi_sap,
  output logic                 phi_abo,
  // physical-layer management primitives (layer 2 management and layer 1)
  input  logic                 ph_actr_do,
  input  logic                 ph_actr_tot_in,
  input  logic [1:0]           ph_actr_moo_in,
  output logic                 ph_actr_busy,
  output logic                 ph_actr_atn,
  input  logic                 ph_actr_ack,
  output logic                 ph_actr_tot,
  output logic [1:0]           ph_actr_moo,
  input  logic                 ph_acti_do,
  input  logic                 ph_acti_tot_in,
  input  logic [1:0]           ph_acti_moo_in,
  output logic                 ph_acti_busy,
  output logic                 ph_acti_atn,
  input  logic                 ph_acti_ack,
  output logic                 ph_acti_tot,
  output logic [1:0]           ph_acti_moo,
  input  logic                 ph_deactr_do,
  output logic                 ph_deactr_busy,
  output logic                 ph_deactr_atn,
  input  logic                 ph_deactr_ack,
  input  logic                 ph_deacti_do,
  input  logic                 ph_deacti_orig_in,
  output logic                 ph_deacti_busy,
  output logic                 ph_deacti_atn,
  input  logic                 ph_deacti_ack,
  output logic                 ph_deacti_orig,
  output logic                 ph_active,
  output logic                 ph_active_tot,
  output logic [1:0]           ph_active_moo,
  // statistics query primitive (host side / high level 2 issues)
  input  logic                 st_do,
  input  addr_t                st_ptr,
  output logic                 st_busy,
  // statistics
  output logic [15:0]          frames_sent,
  output logic [15:0]          frames_aborted,
  output logic [15:0]          frames_ok,
  output logic [15:0]          frames_bad
);
  localparam int unsigned NP = 7;
  localparam int unsigned P_RX = 0, P_TX = 1, P_BM = 2, P_HIU = 3, P_EXT = 4, P_BL = 5, P_ST = 6;

  // ---- memory interface unit ----
  logic [NP-1:0] mv, md;
  miu_req_t      mr  [NP];
  logic [15:0]   mrd [NP];

  miu #(.NPORTS(NP)) u_miu (
    .clk, .rst_n, .req_valid(mv), .req(mr), .done(md), .rdata(mrd),
    .mem_en, .mem_we, .mem_lock, .mem_addr, .mem_wdata, .mem_rdy, .mem_rdata);

  assign mv[P_EXT]   = ext_m_valid;
  assign mr[P_EXT]   = ext_m_req;
  assign ext_m_done  = md[P_EXT];
  assign ext_m_rdata = mrd[P_EXT];

  // ---- buffer manager ----
  logic [2:0]  cl_valid, cl_put, cl_done;
  logic [0:0]  cl_list [3];
  addr_t       cl_ptr  [3];
  logic        rxm_bm_valid;
  logic [0:0]  rxm_bm_list;
  logic        bl_bm_valid, bl_bm_put;
  logic [0:0]  bl_bm_list;
  addr_t       bl_bm_ptr;

  assign cl_valid   = {bl_bm_valid, bm_valid, rxm_bm_valid};
  assign cl_put     = {bl_bm_put, bm_put, 1'b0};
  assign cl_list[0] = rxm_bm_list;
  assign cl_list[1] = bm_list;
  assign cl_list[2] = bl_bm_list;
  assign cl_ptr[0]  = NULL_PTR;
  assign cl_ptr[1]  = bm_ptr;
  assign cl_ptr[2]  = bl_bm_ptr;
  assign bm_done    = cl_done[1];

  buf_mgr #(.NLISTS(2), .NCLI(3), .CNT_W(16)) u_bm (
    .clk, .rst_n, .cl_valid, .cl_put, .cl_list, .cl_ptr, .cl_done,
    .cl_ptr_out(bm_ptr_out), .cl_empty(bm_empty),
    .req_thresh(bm_req_thresh), .rel_thresh(bm_rel_thresh),
    .count(bm_count), .need_buf(bm_need_buf), .excess(bm_excess),
    .m_valid(mv[P_BM]), .m_req(mr[P_BM]), .m_done(md[P_BM]), .m_rdata(mrd[P_BM]));

  // ---- timer unit ----
  timer_unit #(.NPORTS(TMR_PORTS), .NREC(TMR_NREC), .ID_W(TMR_ID_W), .CLK_W(TMR_CLK_W),
               .TIME_W(16), .PRE_W(16)) u_tmr (
    .clk, .rst_n, .presc(tmr_presc), .now(tmr_now), .tick(tmr_tick),
    .cmd_valid(tmr_cmd_valid), .cmd_op(tmr_cmd_op), .cmd_id(tmr_cmd_id),
    .cmd_time(tmr_cmd_time), .cmd_done(tmr_cmd_done), .cmd_err(tmr_cmd_err),
    .exp_valid(tmr_exp_valid), .exp_id(tmr_exp_id), .exp_ack(tmr_exp_ack),
    .free_count(tmr_free));

  // ---- host interface unit ----
  logic  h_cmd_valid, h_cmd_ready, h_rsp_valid, h_rsp_ready;
  addr_t h_cmd_ptr, h_rsp_ptr;
  hiu #(.CMD_AREA(CMD_AREA), .RSP_AREA(RSP_AREA), .POLL_GAP(16)) u_hiu (
    .clk, .rst_n, .host_attn, .host_irq, .host_irq_ack,
    .cmd_valid(h_cmd_valid), .cmd_ptr(h_cmd_ptr), .cmd_ready(h_cmd_ready),
    .rsp_valid(h_rsp_valid), .rsp_ptr(h_rsp_ptr), .rsp_ready(h_rsp_ready),
    .m_valid(mv[P_HIU]), .m_req(mr[P_HIU]), .m_done(md[P_HIU]), .m_rdata(mrd[P_HIU]));

  // ---- buffer exchange with the host's buffer manager ----
  buf_link #(.NLISTS(2), .MSG_AREA(MSG_AREA), .RSP_AREA(RSP_AREA), .POLL_GAP(16)) u_bl (
    .clk, .rst_n,
    .h_cmd_valid, .h_cmd_ptr, .h_cmd_ready, .h_rsp_valid, .h_rsp_ptr, .h_rsp_ready,
    .l3_cmd_valid(cmd_valid), .l3_cmd_ptr(cmd_ptr), .l3_cmd_ready(cmd_ready),
    .l3_rsp_valid(rsp_valid), .l3_rsp_ptr(rsp_ptr), .l3_rsp_ready(rsp_ready),
    .bm_valid(bl_bm_valid), .bm_put(bl_bm_put), .bm_list(bl_bm_list), .bm_ptr(bl_bm_ptr),
    .bm_done(cl_done[2]), .bm_ptr_out, .bm_empty,
    .count(bm_count), .need_buf(bm_need_buf), .excess(bm_excess),
    .req_thresh(bm_req_thresh), .rel_thresh(bm_rel_thresh),
    .req_blocks(bm_req_blocks), .req_bytes(bm_req_bytes),
    .m_valid(mv[P_BL]), .m_req(mr[P_BL]), .m_done(md[P_BL]), .m_rdata(mrd[P_BL]));

  // ---- low level 2, transmit ----
  logic  tx_hl_atn, tx_hl_ack, tx_ph_do, tx_ph_busy;
  logic  tm_start, tm_stop, tm_bit_valid, tm_bit, tm_eoc, tm_take;
  addr_t tm_first;

  pcb u_pcb_hl_tx (.clk, .rst_n, .do_prim(hl_tx_do), .ack(tx_hl_ack),
                   .busy(hl_tx_busy), .atn(tx_hl_atn));

  ll2_tx u_tx (
    .clk, .rst_n,
    .hl_atn(tx_hl_atn), .hl_ack(tx_hl_ack), .hl_inl_bits, .hl_inl_n, .hl_use_buf,
    .hl_buf_ptr, .hl_pcei, .hl_sap, .hl_reset, .tx_status,
    .m_start(tm_start), .m_first(tm_first), .m_stop(tm_stop),
    .m_bit_valid(tm_bit_valid), .m_bit(tm_bit), .m_eoc(tm_eoc), .m_take(tm_take),
    .ph_do(tx_ph_do), .ph_busy(tx_ph_busy), .ph_bit(phr_bit), .ph_abo(phr_abo),
    .ph_lst(phr_lst), .ph_pcei(phr_pcei), .ph_sap(phr_sap), .ph_clk(phr_clk),
    .ph_col(phr_col), .frames_sent, .frames_aborted);

  ll2_tx_mem u_txm (
    .clk, .rst_n, .start(tm_start), .first_desc(tm_first), .stop(tm_stop),
    .bit_valid(tm_bit_valid), .bit_data(tm_bit), .bit_take(tm_take), .eoc(tm_eoc),
    .m_valid(mv[P_TX]), .m_req(mr[P_TX]), .m_done(md[P_TX]), .m_rdata(mrd[P_TX]));

  pcb u_pcb_ph_tx (.clk, .rst_n, .do_prim(tx_ph_do), .ack(phr_ack),
                   .busy(tx_ph_busy), .atn(phr_atn));

  // ---- low level 2, receive ----
  logic        rx_ph_atn, rx_ph_ack;
  logic        rd_valid, rd_bit, rd_end, rd_overrun;
  rx_status_e  rd_status;
  logic [31:0] rd_hdr;
  logic [3:0]  rd_pcei, rd_sap;
  logic        ind_do, ind_busy;

  pcb u_pcb_ph_rx (.clk, .rst_n, .do_prim(phi_do), .ack(rx_ph_ack),
                   .busy(phi_busy), .atn(rx_ph_atn));

  ll2_rx u_rx (
    .clk, .rst_n,
    .ph_atn(rx_ph_atn), .ph_ack(rx_ph_ack), .ph_bit(phi_bit), .ph_clk(phi_clk),
    .ph_lst(phi_lst), .ph_col(phi_col), .ph_pcei(phi_pcei), .ph_sap(phi_sap),
    .ph_abo(phi_abo),
    .d_valid(rd_valid), .d_bit(rd_bit), .d_end(rd_end), .d_status(rd_status),
    .hdr(rd_hdr), .pcei(rd_pcei), .sap(rd_sap), .m_overrun(rd_overrun),
    .frames_ok, .frames_bad);

  ll2_rx_mem #(.FIFO_D(4), .RX_LIST(0)) u_rxm (
    .clk, .rst_n,
    .d_valid(rd_valid), .d_bit(rd_bit), .d_end(rd_end), .d_status(rd_status),
    .d_hdr(rd_hdr), .d_pcei(rd_pcei), .d_sap(rd_sap), .m_overrun(rd_overrun),
    .bm_valid(rxm_bm_valid), .bm_list(rxm_bm_list), .bm_done(cl_done[0]),
    .bm_ptr(bm_ptr_out), .bm_empty(bm_empty),
    .ind_do, .ind_busy, .ind_first, .ind_status, .ind_bytes, .ind_rbits,
    .ind_hdr, .ind_pcei, .ind_sap,
    .m_valid(mv[P_RX]), .m_req(mr[P_RX]), .m_done(md[P_RX]), .m_rdata(mrd[P_RX]));

  pcb u_pcb_ind (.clk, .rst_n, .do_prim(ind_do), .ack(ind_ack),
                 .busy(ind_busy), .atn(ind_atn));

  // ---- physical-layer management primitives ----
  ph_mgmt u_phm (
    .clk, .rst_n,
    .actr_do(ph_actr_do), .actr_tot_in(ph_actr_tot_in), .actr_moo_in(ph_actr_moo_in),
    .actr_busy(ph_actr_busy), .actr_atn(ph_actr_atn), .actr_ack(ph_actr_ack),
    .actr_tot(ph_actr_tot), .actr_moo(ph_actr_moo),
    .acti_do(ph_acti_do), .acti_tot_in(ph_acti_tot_in), .acti_moo_in(ph_acti_moo_in),
    .acti_busy(ph_acti_busy), .acti_atn(ph_acti_atn), .acti_ack(ph_acti_ack),
    .acti_tot(ph_acti_tot), .acti_moo(ph_acti_moo),
    .deactr_do(ph_deactr_do), .deactr_busy(ph_deactr_busy), .deactr_atn(ph_deactr_atn),
    .deactr_ack(ph_deactr_ack),
    .deacti_do(ph_deacti_do), .deacti_orig_in(ph_deacti_orig_in), .deacti_busy(ph_deacti_busy),
    .deacti_atn(ph_deacti_atn), .deacti_ack(ph_deacti_ack), .deacti_orig(ph_deacti_orig),
    .active(ph_active), .active_tot(ph_active_tot), .active_moo(ph_active_moo));

  // ---- statistics query ----
  logic [15:0] st_words [9];
  assign st_words[0] = frames_sent;
  assign st_words[1] = frames_aborted;
  assign st_words[2] = frames_ok;
  assign st_words[3] = frames_bad;
  assign st_words[4] = bm_count[0];
  assign st_words[5] = bm_count[1];
  assign st_words[6] = 16'(tmr_free);
  assign st_words[7] = 16'(tmr_now);
  assign st_words[8] = {8'd0, ph_active_tot, ph_active_moo, ph_active, bm_excess, bm_need_buf};

  stat_dump #(.NW(9)) u_st (
    .clk, .rst_n, .st_do, .st_ptr, .st_busy, .stats(st_words),
    .m_valid(mv[P_ST]), .m_req(mr[P_ST]), .m_done(md[P_ST]), .m_rdata(mrd[P_ST]));
endmodule

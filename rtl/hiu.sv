// hiu: host interface unit.
//
// Host and co-processor exchange commands and responses through two 3-byte
// pointer fields in shared memory, the command area and the response area.
// A null pointer means the area is free. The host puts a (linked list of)
// command buffer(s) in memory, writes its pointer into the free command area
// and raises an attention pulse. On attention this unit reads the command
// area through the MIU; if it holds a pointer, the pointer is offered to the
// co-processor side (cmd_valid/cmd_ptr) and, once taken (cmd_ready), the
// command area is cleared to null so the host may write the next one.
// Responses go the other way: the co-processor side offers a response pointer
// (rsp_valid/rsp_ptr); the unit polls the response area until it is null,
// writes the pointer there and raises the host interrupt, which stays up
// until the host acknowledges it.
//
// Following the design: both areas, the null pointer as the free mark, only
// the co-processor clearing the command area and only the host clearing the
// response area, attention to the co-processor and interrupt to the host.
// This design's own choices: the area addresses (parameters; the design puts
// them in the communication region of the memory map without numbers), an
// attention that arrives while a command is being handled is remembered, a
// level interrupt with an acknowledge input, and a fixed wait of POLL_GAP
// cycles between polls of a full response area.
//
// Handshakes: cmd_valid stays up with cmd_ptr until cmd_ready is seen high;
// rsp_ready pulses for one cycle when the response pointer has been written.
module hiu
  import x25_pkg::*;
#(
  parameter addr_t       CMD_AREA = 24'h00F000,
  parameter addr_t       RSP_AREA = 24'h00F004,
  parameter int unsigned POLL_GAP = 16
) (
  input  logic     clk,
  input  logic     rst_n,
  // host side
  input  logic     host_attn,     // attention pulse from the host
  output logic     host_irq,      // interrupt to the host
  input  logic     host_irq_ack,
  // co-processor side
  output logic     cmd_valid,
  output addr_t    cmd_ptr,
  input  logic     cmd_ready,
  input  logic     rsp_valid,
  input  addr_t    rsp_ptr,
  output logic     rsp_ready,
  // MIU port
  output logic     m_valid,
  output miu_req_t m_req,
  input  logic     m_done,
  input  logic [15:0] m_rdata
);
  // command path
  typedef enum logic [2:0] {C_IDLE, C_RD_HI, C_RD_LO, C_OFFER, C_CLR_HI, C_CLR_LO} cstate_e;
  // response path
  typedef enum logic [2:0] {R_IDLE, R_POLL_HI, R_POLL_LO, R_WAIT, R_WR_HI, R_WR_LO, R_DONE} rstate_e;

  cstate_e cst;
  rstate_e rst;
  logic    attn_pend;
  addr_t   cptr;
  logic [15:0] poll_hi;
  logic [$clog2(POLL_GAP+1)-1:0] gap;

  // the two paths share the MIU port; the command path goes first
  logic c_mem, r_mem;
  assign c_mem = (cst == C_RD_HI) || (cst == C_RD_LO) || (cst == C_CLR_HI) || (cst == C_CLR_LO);
  assign r_mem = (rst == R_POLL_HI) || (rst == R_POLL_LO) || (rst == R_WR_HI) || (rst == R_WR_LO);
  logic owner_r;          // 1 while the response path owns the port
  logic r_go, c_go;
  assign r_go = r_mem && (owner_r || !c_mem);
  assign c_go = c_mem && !owner_r;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cst       <= C_IDLE;
      rst       <= R_IDLE;
      attn_pend <= 1'b0;
      cptr      <= NULL_PTR;
      poll_hi   <= '0;
      gap       <= '0;
      host_irq  <= 1'b0;
      owner_r   <= 1'b0;
    end else begin
      if (host_attn) attn_pend <= 1'b1;
      if (host_irq_ack) host_irq <= 1'b0;

      // a response transfer keeps the port until its MIU request completes
      if (r_go && !m_done) owner_r <= 1'b1;
      else if (r_go && m_done) owner_r <= 1'b0;

      unique case (cst)
        C_IDLE: if (attn_pend || host_attn) begin
          attn_pend <= 1'b0;
          cst       <= C_RD_HI;
        end
        C_RD_HI: if (c_go && m_done) begin
          cptr[23:8] <= m_rdata;
          cst        <= C_RD_LO;
        end
        C_RD_LO: if (c_go && m_done) begin
          cptr[7:0] <= m_rdata[7:0];
          cst       <= ({cptr[23:8], m_rdata[7:0]} == NULL_PTR) ? C_IDLE : C_OFFER;
        end
        C_OFFER: if (cmd_ready) cst <= C_CLR_HI;
        C_CLR_HI: if (c_go && m_done) cst <= C_CLR_LO;
        C_CLR_LO: if (c_go && m_done) cst <= C_IDLE;
        default: cst <= C_IDLE;
      endcase

      unique case (rst)
        R_IDLE: if (rsp_valid) rst <= R_POLL_HI;
        R_POLL_HI: if (r_go && m_done) begin
          poll_hi <= m_rdata;
          rst     <= R_POLL_LO;
        end
        R_POLL_LO: if (r_go && m_done) begin
          if ({poll_hi, m_rdata[7:0]} == 24'h0) rst <= R_WR_HI;
          else begin
            gap <= '0;
            rst <= R_WAIT;
          end
        end
        R_WAIT: begin
          gap <= gap + 1'b1;
          if (32'(gap) >= POLL_GAP - 1) rst <= R_POLL_HI;
        end
        R_WR_HI: if (r_go && m_done) rst <= R_WR_LO;
        R_WR_LO: if (r_go && m_done) begin
          host_irq <= 1'b1;
          rst      <= R_DONE;
        end
        R_DONE: rst <= R_IDLE;
        default: rst <= R_IDLE;
      endcase
    end
  end

  always_comb begin
    m_valid = c_go || r_go;
    m_req   = '{cmd: MIU_RD_B, addr: CMD_AREA, wdata: '0};
    if (r_go) begin
      unique case (rst)
        R_POLL_HI: m_req = '{cmd: MIU_RD_W, addr: RSP_AREA,     wdata: '0};
        R_POLL_LO: m_req = '{cmd: MIU_RD_B, addr: RSP_AREA + 2, wdata: '0};
        R_WR_HI:   m_req = '{cmd: MIU_WR_W, addr: RSP_AREA,     wdata: rsp_ptr[23:8]};
        default:   m_req = '{cmd: MIU_WR_B, addr: RSP_AREA + 2, wdata: {8'h00, rsp_ptr[7:0]}};
      endcase
    end else begin
      unique case (cst)
        C_RD_HI:  m_req = '{cmd: MIU_RD_W, addr: CMD_AREA,     wdata: '0};
        C_RD_LO:  m_req = '{cmd: MIU_RD_B, addr: CMD_AREA + 2, wdata: '0};
        C_CLR_HI: m_req = '{cmd: MIU_WR_W, addr: CMD_AREA,     wdata: '0};
        default:  m_req = '{cmd: MIU_WR_B, addr: CMD_AREA + 2, wdata: '0};
      endcase
    end
  end

  assign cmd_valid = (cst == C_OFFER);
  assign cmd_ptr   = cptr;
  assign rsp_ready = (rst == R_DONE);
endmodule

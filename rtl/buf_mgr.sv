// buf_mgr: on-chip buffer manager.
//
// The co-processor keeps a stock of free buffers so that its blocks never
// wait for the host. For each of NLISTS interface ports (each may use buffers
// of a different length) this block keeps one linked list of free buffer
// descriptors, chained in memory through their next_descriptor_pointer, with
// the head pointer and a count held here. Clients ask it to GET a buffer from
// a list or to PUT one back; a returned buffer becomes the new head. The
// counts are compared with two start-up thresholds: under the request
// threshold a list raises need_buf (the cue for a Buffer_request to the host
// buffer manager), over the release threshold it raises excess (the cue for a
// Buffer_release). All list memory traffic goes through one MIU port, using
// only loads and stores, as the design intends for this simple slave manager.
//
// Following the design: a free list per interface port, linking through the
// descriptors, the two thresholds, the host manager as the source of buffers.
// This design's own choices: the client ports and their fixed priority (port
// 0 first); a GET on an empty list completes at once with empty=1; a buffer
// handed out has its next pointer cleared to NULL so it is a one-buffer chain;
// a buffer is counted as a unit, not by its byte size.
//
// Client protocol: hold cl_valid[i] with cl_put/cl_list/cl_ptr stable until
// cl_done[i] pulses (one cycle); cl_ptr_out and cl_empty are valid then.
// A GET costs a word and a byte read plus a word and a byte write, a PUT a
// word and a byte write.
module buf_mgr
  import x25_pkg::*;
#(
  parameter int unsigned NLISTS = 2,
  parameter int unsigned NCLI   = 2,
  parameter int unsigned CNT_W  = 16,
  localparam int unsigned LW    = (NLISTS > 1) ? $clog2(NLISTS) : 1
) (
  input  logic                     clk,
  input  logic                     rst_n,
  // clients
  input  logic [NCLI-1:0]          cl_valid,
  input  logic [NCLI-1:0]          cl_put,      // 0: GET, 1: PUT
  input  logic [LW-1:0]            cl_list [NCLI],
  input  addr_t                    cl_ptr  [NCLI],
  output logic [NCLI-1:0]          cl_done,
  output addr_t                    cl_ptr_out,
  output logic                     cl_empty,
  // thresholds (start-up configuration) and status
  input  logic [CNT_W-1:0]         req_thresh,
  input  logic [CNT_W-1:0]         rel_thresh,
  output logic [CNT_W-1:0]         count [NLISTS],
  output logic [NLISTS-1:0]        need_buf,
  output logic [NLISTS-1:0]        excess,
  // MIU port
  output logic                     m_valid,
  output miu_req_t                 m_req,
  input  logic                     m_done,
  input  logic [15:0]              m_rdata
);
  localparam int unsigned CW = (NCLI > 1) ? $clog2(NCLI) : 1;

  typedef enum logic [2:0] {S_IDLE, S_RD_HI, S_RD_LO, S_WR_HI, S_WR_LO, S_DONE} state_e;

  state_e        state;
  logic [CW-1:0] cur;
  logic          cur_put;
  logic [LW-1:0] cur_list;
  addr_t         cur_ptr;     // descriptor being handed out or taken back
  addr_t         nxt;         // value read from / written to its next field
  addr_t         head [NLISTS];

  logic [CW-1:0] pick;
  logic          any;
  always_comb begin
    pick = '0;
    any  = 1'b0;
    for (int i = NCLI - 1; i >= 0; i--)
      if (cl_valid[i]) begin
        pick = CW'(i);
        any  = 1'b1;
      end
  end

  logic [LW-1:0] pick_list;
  assign pick_list = (32'(cl_list[pick]) < NLISTS) ? cl_list[pick] : '0;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= S_IDLE;
      cur      <= '0;
      cur_put  <= 1'b0;
      cur_list <= '0;
      cur_ptr  <= NULL_PTR;
      nxt      <= NULL_PTR;
      cl_empty <= 1'b0;
      for (int l = 0; l < NLISTS; l++) begin
        head[l]  <= NULL_PTR;
        count[l] <= '0;
      end
    end else begin
      unique case (state)
        S_IDLE: if (any) begin
          cur      <= pick;
          cur_put  <= cl_put[pick];
          cur_list <= pick_list;
          cl_empty <= 1'b0;
          if (cl_put[pick]) begin
            // new buffer's next field gets the old head
            cur_ptr <= cl_ptr[pick];
            nxt     <= head[pick_list];
            state   <= S_WR_HI;
          end else if (head[pick_list] == NULL_PTR) begin
            cur_ptr  <= NULL_PTR;
            cl_empty <= 1'b1;
            state    <= S_DONE;
          end else begin
            cur_ptr <= head[pick_list];
            state   <= S_RD_HI;
          end
        end
        S_RD_HI: if (m_done) begin
          nxt[23:8] <= m_rdata;
          state     <= S_RD_LO;
        end
        S_RD_LO: if (m_done) begin
          // unlink: the next descriptor becomes the head
          head[cur_list]  <= {nxt[23:8], m_rdata[7:0]};
          count[cur_list] <= count[cur_list] - 1'b1;
          nxt             <= NULL_PTR;
          state           <= S_WR_HI;
        end
        S_WR_HI: if (m_done) state <= S_WR_LO;
        S_WR_LO: if (m_done) begin
          if (cur_put) begin
            head[cur_list]  <= cur_ptr;
            count[cur_list] <= count[cur_list] + 1'b1;
          end
          state <= S_DONE;
        end
        S_DONE: state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  always_comb begin
    m_valid = (state == S_RD_HI) || (state == S_RD_LO) || (state == S_WR_HI) || (state == S_WR_LO);
    unique case (state)
      S_RD_HI: m_req = '{cmd: MIU_RD_W, addr: cur_ptr + addr_t'(BD_NEXT),     wdata: '0};
      S_RD_LO: m_req = '{cmd: MIU_RD_B, addr: cur_ptr + addr_t'(BD_NEXT + 2), wdata: '0};
      S_WR_HI: m_req = '{cmd: MIU_WR_W, addr: cur_ptr + addr_t'(BD_NEXT),     wdata: nxt[23:8]};
      S_WR_LO: m_req = '{cmd: MIU_WR_B, addr: cur_ptr + addr_t'(BD_NEXT + 2), wdata: {8'h00, nxt[7:0]}};
      default: m_req = '{cmd: MIU_RD_B, addr: cur_ptr, wdata: '0};
    endcase
  end

  always_comb begin
    for (int i = 0; i < NCLI; i++) cl_done[i] = (state == S_DONE) && (cur == CW'(i));
    cl_ptr_out = cur_ptr;
    for (int l = 0; l < NLISTS; l++) begin
      need_buf[l] = count[l] < req_thresh;
      excess[l]   = count[l] > rel_thresh;
    end
  end
endmodule

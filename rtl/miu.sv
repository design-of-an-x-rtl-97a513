// miu: memory interface unit.
//
// Several blocks of the co-processor need memory independently of each other.
// Each has a request port here on which it asks for one of nine operations:
// read, write or exchange, of a byte, a word or two bytes, at a 24-bit byte
// address. A word is stored high order byte first; the two-byte operation
// stores the low order byte first (byte 1) and the high order byte second
// (byte 2), the order some 16-bit processors use, so such a host's 16-bit
// values can be read and written in one request.
// The unit serves one request at a time, chosen by fixed priority (port 0
// highest), and turns it into byte transfers on the external memory bus, so
// that the blocks see a linear byte-oriented memory whatever the bus is.
//
// Following the design: the command set, the 24-bit address, a word carrying
// a high and a low order byte, the two-byte operation (proposed in the design
// for better bus use in 16-bit systems), and exchange as the primitive for
// semaphores.
// This design's own choices: fixed priority with the lowest port number first
// (the design asks for "some priority scheme" so that blocks that lose data
// when kept waiting go first); a word is stored high byte first, at addr and
// addr+1; the two-byte operation also exists as an exchange, and its command
// codes are 7 to 9; an exchange reads the old value and then writes the new
// one, with mem_lock held so that no other bus master can come in between;
// the memory bus is one byte wide with a ready handshake.
//
// Request port protocol: the client holds req_valid[i] with req[i] stable
// until done[i] is pulsed for one cycle, with rdata[i] (old data for an
// exchange) valid in that cycle; it then drops req_valid[i] or presents the
// next request. A byte operation takes 1 bus transfer, a word or two bytes
// 2, an exchange twice that; each transfer takes one cycle plus the cycles
// mem_rdy is low, and a request adds one cycle of arbitration and one of
// completion.
//
// Bus: a transfer happens in each cycle where mem_en and mem_rdy are both high;
// read data is taken from mem_rdata in that cycle.
module miu
  import x25_pkg::*;
#(
  parameter int unsigned NPORTS = 5
) (
  input  logic                   clk,
  input  logic                   rst_n,
  // request ports
  input  logic     [NPORTS-1:0]  req_valid,
  input  miu_req_t               req   [NPORTS],
  output logic     [NPORTS-1:0]  done,
  output logic     [15:0]        rdata [NPORTS],
  // memory bus
  output logic                   mem_en,
  output logic                   mem_we,
  output logic                   mem_lock,
  output addr_t                  mem_addr,
  output logic     [7:0]         mem_wdata,
  input  logic                   mem_rdy,
  input  logic     [7:0]         mem_rdata
);
  typedef enum logic [1:0] {S_IDLE, S_READ, S_WRITE, S_DONE} state_e;

  localparam int unsigned PW = (NPORTS > 1) ? $clog2(NPORTS) : 1;

  state_e       state;
  logic [PW-1:0] cur;
  miu_req_t     cur_req;
  logic         byte_idx;      // 0: first byte, 1: second byte of a word
  logic [15:0]  rbuf;

  logic is_two, is_word, is_write;
  assign is_two   = (cur_req.cmd == MIU_RD_2) || (cur_req.cmd == MIU_WR_2) || (cur_req.cmd == MIU_XCH_2);
  assign is_word  = (cur_req.cmd == MIU_RD_W) || (cur_req.cmd == MIU_WR_W) || (cur_req.cmd == MIU_XCH_W) || is_two;
  assign is_write = !((cur_req.cmd == MIU_RD_W) || (cur_req.cmd == MIU_RD_B) || (cur_req.cmd == MIU_RD_2));

  // fixed-priority choice among the waiting ports
  logic [PW-1:0] pick;
  logic          any;
  always_comb begin
    pick = '0;
    any  = 1'b0;
    for (int i = NPORTS - 1; i >= 0; i--) begin
      if (req_valid[i]) begin
        pick = PW'(i);
        any  = 1'b1;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= S_IDLE;
      cur      <= '0;
      cur_req  <= '{cmd: MIU_RD_B, addr: '0, wdata: '0};
      byte_idx <= 1'b0;
      rbuf     <= '0;
    end else begin
      unique case (state)
        S_IDLE: if (any) begin
          cur      <= pick;
          cur_req  <= req[pick];
          byte_idx <= 1'b0;
          rbuf     <= '0;
          state    <= ((req[pick].cmd == MIU_WR_W) || (req[pick].cmd == MIU_WR_B) ||
                       (req[pick].cmd == MIU_WR_2)) ? S_WRITE : S_READ;
        end
        S_READ: if (mem_rdy) begin
          if (is_word && !byte_idx) begin
            if (is_two) rbuf[7:0]  <= mem_rdata;
            else        rbuf[15:8] <= mem_rdata;
            byte_idx   <= 1'b1;
          end else begin
            if (is_two)       rbuf[15:8] <= mem_rdata;
            else if (is_word) rbuf[7:0]  <= mem_rdata;
            else              rbuf       <= {8'h00, mem_rdata};
            byte_idx <= 1'b0;
            state    <= is_write ? S_WRITE : S_DONE;
          end
        end
        S_WRITE: if (mem_rdy) begin
          if (is_word && !byte_idx) byte_idx <= 1'b1;
          else begin
            byte_idx <= 1'b0;
            state    <= S_DONE;
          end
        end
        S_DONE: state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  // bus drive
  always_comb begin
    mem_en    = (state == S_READ) || (state == S_WRITE);
    mem_we    = (state == S_WRITE);
    mem_lock  = (state != S_IDLE) && (state != S_DONE) &&
                ((cur_req.cmd == MIU_XCH_W) || (cur_req.cmd == MIU_XCH_B) || (cur_req.cmd == MIU_XCH_2));
    mem_addr  = cur_req.addr + addr_t'(byte_idx);
    if (is_word && (byte_idx == is_two)) mem_wdata = cur_req.wdata[15:8];
    else                                 mem_wdata = cur_req.wdata[7:0];
  end

  always_comb begin
    for (int i = 0; i < NPORTS; i++) begin
      done[i]  = (state == S_DONE) && (cur == PW'(i));
      rdata[i] = rbuf;
    end
  end
endmodule

// x25_pkg: types and constants shared by the blocks of the X.25 co-processor.
//
// The co-processor sees memory as a linear, byte-oriented space addressed with
// 24 bits (16 Mbyte), and every pointer is a 3-byte absolute address. Data is
// kept in buffers: a buffer descriptor in memory points at a separate data
// block. The descriptor fields, their order and their sizes (next pointer 3,
// buffer pointer 3, buffer length 2, begin-data pointer 3, data length 2) follow
// the buffer structure this design is built around; the size of the
// data_remain field (1 byte) and the byte order of multi-byte fields (most
// significant byte at the lowest address) are this design's own choices.
//
// The memory interface unit takes six commands (read, write and exchange, each
// as byte or word) with a 24-bit address and up to two data bytes.
package x25_pkg;

  localparam int unsigned ADDR_W = 24;         // byte address / pointer width
  typedef logic [ADDR_W-1:0] addr_t;
  localparam addr_t NULL_PTR = '0;             // end of a chain

  // Buffer descriptor layout (byte offsets from the descriptor address)
  localparam int unsigned BD_NEXT   = 0;       // next_descriptor_pointer, 3 bytes
  localparam int unsigned BD_BUFPTR = 3;       // buffer_pointer, 3 bytes
  localparam int unsigned BD_BUFLEN = 6;       // buffer_length, 2 bytes
  localparam int unsigned BD_BEGIN  = 8;       // begin_data_pointer, 3 bytes
  localparam int unsigned BD_DLEN   = 11;      // data_length, 2 bytes
  localparam int unsigned BD_REMAIN = 13;      // data_remain, 1 byte (0..7 bits)

  // Memory interface unit commands
  typedef enum logic [3:0] {
    MIU_RD_W  = 4'd1,
    MIU_RD_B  = 4'd2,
    MIU_WR_W  = 4'd3,
    MIU_WR_B  = 4'd4,
    MIU_XCH_W = 4'd5,
    MIU_XCH_B = 4'd6,
    MIU_RD_2  = 4'd7,    // two bytes: low order byte at addr, high at addr+1
    MIU_WR_2  = 4'd8,
    MIU_XCH_2 = 4'd9
  } miu_cmd_e;

  // One request to the memory interface unit
  typedef struct packed {
    miu_cmd_e    cmd;
    addr_t       addr;
    logic [15:0] wdata;   // word: {high byte, low byte}; byte: low byte only
  } miu_req_t;

  // Outcome of a transmitted frame, reported to high level 2
  typedef enum logic [1:0] {
    TX_OK        = 2'd0,
    TX_UNDERRUN  = 2'd1,
    TX_COLLISION = 2'd2,
    TX_RESET     = 2'd3
  } tx_status_e;

  // Outcome of a received frame, reported to high level 2
  typedef enum logic [2:0] {
    RX_OK       = 3'd0,
    RX_FCS_ERR  = 3'd1,
    RX_ABORT    = 3'd2,
    RX_SHORT    = 3'd3,
    RX_OVERRUN  = 3'd4,
    RX_NOBUF    = 3'd5,
    RX_COLL     = 3'd6
  } rx_status_e;

  // Timer unit commands and results
  typedef enum logic [1:0] {
    TMR_START = 2'd1,
    TMR_STOP  = 2'd2
  } tmr_op_e;

  typedef enum logic [1:0] {
    TMR_OK        = 2'd0,
    TMR_NO_RECORD = 2'd1,
    TMR_TOO_LONG  = 2'd2,
    TMR_NOT_FOUND = 2'd3
  } tmr_err_e;

  // HDLC constants
  localparam logic [7:0]  HDLC_FLAG    = 8'h7E;
  localparam logic [15:0] FCS_INIT     = 16'hFFFF;
  localparam logic [15:0] FCS_POLY_REV = 16'h8408;  // x^16+x^12+x^5+1, bit-reversed
  localparam logic [15:0] FCS_GOOD     = 16'hF0B8;  // residue after a correct FCS

  // One bit of the frame check sequence, bits taken least significant first
  function automatic logic [15:0] fcs_step(input logic [15:0] crc, input logic b);
    logic fb;
    fb = crc[0] ^ b;
    fcs_step = {1'b0, crc[15:1]} ^ (fb ? FCS_POLY_REV : 16'h0000);
  endfunction

endpackage

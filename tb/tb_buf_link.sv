// tb_buf_link: self-checking test of the buffer exchange unit with the buffer
// manager, a two-port memory interface unit and the memory model. The
// testbench plays the host interface unit and the host: it offers command
// list pointers, takes response pointers, and empties the response area when
// the host has read a message. It also plays layer 3 on the forwarded side.
// Checked: buffer requests at start-up for both lists with the right block
// size, no second message while the host still holds the first one, a
// disposal of a three-buffer block into the matching list, a linked disposal
// and release request (each list gives back its buffers above the request
// threshold), a release on excess down to the release threshold with the
// chain linked in memory, a release request with nothing to give, a command
// list forwarded to layer 3 and a layer 3 response passed to the host.
module tb_buf_link;
  import x25_pkg::*;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;   // a falling edge, so the asynchronous reset acts at once
  always #5 clk = ~clk;

  localparam addr_t MSG = 24'h00F010, RSPA = 24'h00F004;

  logic h_cmd_valid = 0, h_cmd_ready, h_rsp_valid, h_rsp_ready = 0;
  addr_t h_cmd_ptr = '0, h_rsp_ptr;
  logic l3_cmd_valid, l3_cmd_ready = 0, l3_rsp_valid = 0, l3_rsp_ready;
  addr_t l3_cmd_ptr, l3_rsp_ptr = '0;
  logic bl_valid, bl_put, bl_done;
  logic [0:0] bl_list;
  addr_t bl_ptr, cl_ptr_out;
  logic cl_empty;
  logic [15:0] count [2];
  logic [1:0] need_buf, excess;
  logic [15:0] req_bytes [2];
  assign req_bytes[0] = 16'd128;
  assign req_bytes[1] = 16'd1024;

  logic [1:0] cl_valid, cl_put, cl_done;
  logic [0:0] cl_list [2];
  addr_t cl_ptr [2];
  assign cl_valid = {1'b0, bl_valid};
  assign cl_put = {1'b0, bl_put};
  assign cl_list[0] = bl_list; assign cl_list[1] = 1'b0;
  assign cl_ptr[0] = bl_ptr;   assign cl_ptr[1] = NULL_PTR;
  assign bl_done = cl_done[0];

  logic [1:0] mv, md;
  miu_req_t mr [2];
  logic [15:0] mrd [2];
  logic mem_en, mem_we, mem_lock, mem_rdy;
  addr_t mem_addr;
  logic [7:0] mem_wdata, mem_rdata;

  buf_link #(.NLISTS(2), .MSG_AREA(MSG), .RSP_AREA(RSPA), .POLL_GAP(16)) dut (
    .clk, .rst_n, .h_cmd_valid, .h_cmd_ptr, .h_cmd_ready, .h_rsp_valid, .h_rsp_ptr, .h_rsp_ready,
    .l3_cmd_valid, .l3_cmd_ptr, .l3_cmd_ready, .l3_rsp_valid, .l3_rsp_ptr, .l3_rsp_ready,
    .bm_valid(bl_valid), .bm_put(bl_put), .bm_list(bl_list), .bm_ptr(bl_ptr), .bm_done(bl_done),
    .bm_ptr_out(cl_ptr_out), .bm_empty(cl_empty), .count, .need_buf, .excess,
    .req_thresh(16'd2), .rel_thresh(16'd6), .req_blocks(8'd4), .req_bytes,
    .m_valid(mv[0]), .m_req(mr[0]), .m_done(md[0]), .m_rdata(mrd[0]));
  buf_mgr #(.NLISTS(2), .NCLI(2)) u_bm (
    .clk, .rst_n, .cl_valid, .cl_put, .cl_list, .cl_ptr, .cl_done, .cl_ptr_out, .cl_empty,
    .req_thresh(16'd2), .rel_thresh(16'd6), .count, .need_buf, .excess,
    .m_valid(mv[1]), .m_req(mr[1]), .m_done(md[1]), .m_rdata(mrd[1]));
  miu #(.NPORTS(2)) u_miu (.clk, .rst_n, .req_valid(mv), .req(mr), .done(md), .rdata(mrd),
                           .mem_en, .mem_we, .mem_lock, .mem_addr, .mem_wdata, .mem_rdy, .mem_rdata);
  mem_model #(.AW(16)) mem (.clk, .mem_en, .mem_we, .mem_addr, .mem_wdata, .mem_rdy, .mem_rdata);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  initial begin
    #5000000 $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  function automatic int rd24(int a);
    return {mem.m[a], mem.m[a+1], mem.m[a+2]};
  endfunction
  task automatic wr24(int a, int v);
    mem.m[a] = 8'(v >> 16); mem.m[a+1] = 8'(v >> 8); mem.m[a+2] = 8'(v);
  endtask

  // a chain of n buffer descriptors starting at d, 16 bytes apart
  task automatic mk_chain(int d, int n);
    for (int i = 0; i < n; i++) wr24(d + 16*i, (i == n - 1) ? 0 : d + 16*(i+1));
  endtask

  // one command buffer: descriptor at c (next = nxt), data at c+16
  task automatic mk_cmd(int c, int nxt, int code, int p, int nb);
    wr24(c, nxt);
    wr24(c + 8, c + 16);
    mem.m[c+11] = 8'h00; mem.m[c+12] = 8'h06; mem.m[c+13] = 8'h00;
    mem.m[c+16] = 8'(code); wr24(c + 17, p);
    mem.m[c+20] = 8'(nb >> 8); mem.m[c+21] = 8'(nb);
  endtask

  // the host interface side: offer a command list, wait until it is taken
  task automatic send_cmd(int c);
    int g = 0;
    @(negedge clk) h_cmd_valid = 1; h_cmd_ptr = addr_t'(c);
    while (!h_cmd_ready && g < 20000) begin @(negedge clk); g++; end
    check(h_cmd_ready, "command taken");
    @(negedge clk) h_cmd_valid = 0;
  endtask

  // the host interface and the host: wait for a response, read the message,
  // put its pointer in the response area; the host empties it unless hold
  int m_code, m_a, m_b;
  addr_t m_ptr;
  bit got;
  task automatic take_rsp(int limit, bit hold);
    int g = 0;
    got = 0;
    while (!h_rsp_valid && g < limit) begin @(negedge clk); g++; end
    if (!h_rsp_valid) return;
    got = 1;
    m_ptr = h_rsp_ptr;
    m_code = mem.m[MSG+16]; m_a = rd24(MSG + 17); m_b = {mem.m[MSG+20], mem.m[MSG+21]};
    wr24(RSPA, int'(h_rsp_ptr));
    h_rsp_ready = 1;
    @(negedge clk) h_rsp_ready = 0;
    if (!hold) wr24(RSPA, 0);
  endtask

  int l3_acks = 0;
  always @(posedge clk) if (l3_rsp_ready) l3_acks++;

  // follow a released chain through memory
  function automatic int chain_len(int p);
    int n = 0;
    while (p != 0 && n < 100) begin p = rd24(p); n++; end
    return n;
  endfunction

  initial begin
    wr24(RSPA, 0);
    repeat (3) @(negedge clk);
    rst_n = 1;

    // start-up: both lists are under the request threshold
    take_rsp(2000, 1);
    check(got && m_ptr == MSG, "first message at the message record");
    check(m_code == 'h81 && m_a == 'h000004 && m_b == 128, "buffer request for list 0");
    check(rd24(MSG + 8) == MSG + 16 && {mem.m[MSG+11], mem.m[MSG+12]} == 6, "message descriptor");
    take_rsp(600, 0);
    check(!got, "no new message while the host holds the previous one");
    wr24(RSPA, 0);
    take_rsp(2000, 0);
    check(got && m_code == 'h81 && m_a == 'h010004 && m_b == 1024, "buffer request for list 1");
    take_rsp(600, 0);
    check(!got, "one request per list while it is outstanding");

    // disposal of a block of three buffers of 128 bytes
    mk_chain('h1000, 3);
    mk_cmd('h0100, 0, 'h01, 'h1000, 128);
    send_cmd('h0100);
    check(count[0] == 3 && count[1] == 0, "block put in list 0");

    // disposal of three 1024-byte buffers linked with a release request
    mk_chain('h2000, 3);
    mk_cmd('h0140, 'h0180, 'h01, 'h2000, 1024);
    mk_cmd('h0180, 0, 'h02, 0, 0);
    send_cmd('h0140);
    take_rsp(4000, 0);
    check(got && m_code == 'h82 && m_b == 1 && chain_len(m_a) == 1, "release from list 0");
    take_rsp(4000, 0);
    check(got && m_code == 'h82 && m_b == 1 && chain_len(m_a) == 1, "release from list 1");
    check(count[0] == 2 && count[1] == 2, "lists down to the request threshold");
    take_rsp(600, 0);
    check(!got, "nothing more after the release request");

    // excess: six more buffers in list 0 go over the release threshold
    mk_chain('h3000, 6);
    mk_cmd('h0100, 0, 'h01, 'h3000, 128);
    send_cmd('h0100);
    take_rsp(4000, 0);
    check(got && m_code == 'h82 && m_b == 2, "release of the excess");
    check(chain_len(m_a) == 2, "released chain linked in memory");
    check(count[0] == 6, "list 0 down to the release threshold");

    // a release request with nothing above the request threshold in list 1
    // gives the excess of list 0 down to the request threshold
    mk_cmd('h0180, 0, 'h02, 0, 0);
    send_cmd('h0180);
    take_rsp(4000, 0);
    check(got && m_code == 'h82 && m_b == 4 && chain_len(m_a) == 4, "release request on list 0");
    take_rsp(600, 0);
    check(!got, "no empty answer after a release was given");
    mk_cmd('h0180, 0, 'h02, 0, 0);
    send_cmd('h0180);
    take_rsp(4000, 0);
    check(got && m_code == 'h82 && m_b == 0 && m_a == 0, "empty release answer");

    // a command list for layer 3
    mk_cmd('h0200, 0, 'h10, 'h123456, 7);
    fork
      send_cmd('h0200);
      begin
        int g = 0;
        while (!l3_cmd_valid && g < 2000) begin @(negedge clk); g++; end
        check(l3_cmd_valid && l3_cmd_ptr == 'h0200, "command list forwarded to layer 3");
        l3_cmd_ready = 1;
        @(negedge clk) l3_cmd_ready = 0;
      end
    join

    // a layer 3 response
    @(negedge clk) l3_rsp_valid = 1; l3_rsp_ptr = 'h004400;
    take_rsp(2000, 0);
    check(got && m_ptr == 'h004400, "layer 3 response passed to the host");
    check(l3_acks == 1, "layer 3 response acknowledged");
    l3_rsp_valid = 0;
    check(count[0] == 2 && count[1] == 2, "final counts");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

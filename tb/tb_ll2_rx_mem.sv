// tb_ll2_rx_mem: self-checking test of the receive memory interface with the
// buffer manager, the memory interface unit, a memory model and the primitive
// control block towards high level 2. The testbench fills a free list with
// small buffers (8 bytes, to force linking), plays the LL2 receiver (data
// bits and frame ends) and plays high level 2: on each indication it walks
// the buffer chain in memory through the descriptors and compares the stored
// bits with the bits that were sent.
// Checked: a frame over three linked buffers with a partial last byte, the
// total length, header and PCEI/SAP in the indication, a bad-FCS frame is
// passed on with its status, overrun when high level 2 is slow (m_overrun,
// RX_OVERRUN), and RX_NOBUF when the free list runs dry.
module tb_ll2_rx_mem;
  import x25_pkg::*;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;   // a falling edge, so the asynchronous reset acts at once
  always #5 clk = ~clk;

  logic d_valid = 0, d_bit = 0, d_end = 0, m_overrun;
  rx_status_e d_status = RX_OK;
  logic [31:0] d_hdr = '0;
  logic [3:0] d_pcei = 4'h2, d_sap = 4'h6;
  logic bm_valid, bm_done, bm_empty;
  logic [0:0] bm_list;
  addr_t bm_ptr;
  logic ind_do, ind_busy, ind_atn, ind_ack = 0;
  addr_t ind_first;
  rx_status_e ind_status;
  logic [15:0] ind_bytes;
  logic [2:0] ind_rbits;
  logic [31:0] ind_hdr;
  logic [3:0] ind_pcei, ind_sap;
  logic rm_valid, rm_done;
  miu_req_t rm_req;
  logic [15:0] rm_rdata;

  // buffer manager: client 0 the unit under test, client 1 the testbench
  logic [1:0] cl_valid, cl_put, cl_done;
  logic [0:0] cl_list [2];
  addr_t cl_ptr [2];
  logic tb_put_valid = 0;
  addr_t tb_put_ptr = '0;
  logic cl_empty;
  logic [15:0] count [2];
  logic [1:0] need_buf, excess;
  assign cl_valid = {tb_put_valid, bm_valid};
  assign cl_put = 2'b10;
  assign cl_list[0] = bm_list; assign cl_list[1] = 1'b0;
  assign cl_ptr[0] = NULL_PTR; assign cl_ptr[1] = tb_put_ptr;
  assign bm_done = cl_done[0];
  assign bm_empty = cl_empty;

  logic [1:0] mv, md;
  miu_req_t mr [2];
  logic [15:0] mrd [2];
  logic mem_en, mem_we, mem_lock, mem_rdy;
  addr_t mem_addr;
  logic [7:0] mem_wdata, mem_rdata;

  ll2_rx_mem #(.FIFO_D(4), .RX_LIST(0)) dut (
    .clk, .rst_n, .d_valid, .d_bit, .d_end, .d_status, .d_hdr, .d_pcei, .d_sap, .m_overrun,
    .bm_valid, .bm_list, .bm_done, .bm_ptr, .bm_empty,
    .ind_do, .ind_busy, .ind_first, .ind_status, .ind_bytes, .ind_rbits, .ind_hdr, .ind_pcei, .ind_sap,
    .m_valid(rm_valid), .m_req(rm_req), .m_done(rm_done), .m_rdata(rm_rdata));
  pcb u_pcb (.clk, .rst_n, .do_prim(ind_do), .ack(ind_ack), .busy(ind_busy), .atn(ind_atn));
  buf_mgr #(.NLISTS(2), .NCLI(2)) u_bm (
    .clk, .rst_n, .cl_valid, .cl_put, .cl_list, .cl_ptr, .cl_done, .cl_ptr_out(bm_ptr), .cl_empty,
    .req_thresh(16'd2), .rel_thresh(16'd20), .count, .need_buf, .excess,
    .m_valid(mv[1]), .m_req(mr[1]), .m_done(md[1]), .m_rdata(mrd[1]));
  assign mv[0] = rm_valid; assign mr[0] = rm_req; assign rm_done = md[0]; assign rm_rdata = mrd[0];
  miu #(.NPORTS(2)) u_miu (.clk, .rst_n, .req_valid(mv), .req(mr), .done(md), .rdata(mrd),
                           .mem_en, .mem_we, .mem_lock, .mem_addr, .mem_wdata, .mem_rdy, .mem_rdata);
  mem_model #(.AW(12)) mem (.clk, .mem_en, .mem_we, .mem_addr, .mem_wdata, .mem_rdy, .mem_rdata);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  initial begin
    #20000000 $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  typedef bit bitq_t[$];
  int ovr_seen = 0;
  always @(negedge clk) if (m_overrun) ovr_seen++;

  // empty buffer: descriptor at d, 8 data bytes at b
  task automatic put_free(int d, int b);
    mem.m[d+3] = 8'(b >> 16); mem.m[d+4] = 8'(b >> 8); mem.m[d+5] = 8'(b);
    mem.m[d+6] = 8'h00; mem.m[d+7] = 8'h08;
    @(negedge clk) tb_put_valid = 1; tb_put_ptr = addr_t'(d);
    while (!cl_done[1]) @(negedge clk);
    tb_put_valid = 0;
  endtask

  // receiver: send the bits, one every gap cycles, then the frame end
  task automatic rx_frame(bitq_t q, rx_status_e st, int gap);
    d_hdr = '0;
    for (int i = 0; i < 32 && i < q.size(); i++) d_hdr[i] = q[i];
    foreach (q[i]) begin
      d_valid = 1; d_bit = q[i];
      @(negedge clk) d_valid = 0;
      repeat (gap - 1) @(negedge clk);
    end
    d_end = 1; d_status = st;
    @(negedge clk) d_end = 0;
  endtask

  // high level 2: wait for an indication, read the chain, acknowledge
  bitq_t got;
  rx_status_e got_st;
  int got_bytes, got_rbits, nbufs;
  task automatic hl2_take(int delay);
    addr_t d;
    int g = 0;
    while (!ind_atn && g < 200000) begin @(negedge clk); g++; end
    check(ind_atn, "indication given");
    repeat (delay) @(negedge clk);
    got.delete(); nbufs = 0;
    got_st = ind_status; got_bytes = ind_bytes; got_rbits = ind_rbits;
    d = ind_first;
    while (d != NULL_PTR && nbufs < 50) begin
      int b, dl, rm;
      b  = {mem.m[d+8], mem.m[d+9], mem.m[d+10]};
      dl = {mem.m[d+11], mem.m[d+12]};
      rm = mem.m[d+13];
      for (int i = 0; i < dl; i++) for (int k = 0; k < 8; k++) got.push_back(mem.m[b+i][k]);
      for (int k = 0; k < rm; k++) got.push_back(mem.m[b+dl][k]);
      d = {mem.m[d+0], mem.m[d+1], mem.m[d+2]};
      nbufs++;
    end
    check(ind_pcei == d_pcei && ind_sap == d_sap, "PCEI and SAP in the indication");
    ind_ack = ind_atn;
    @(negedge clk) ind_ack = 0;
  endtask

  function automatic bitq_t mkbits(int nb, int seed);
    bitq_t q;
    for (int i = 0; i < nb; i++) q.push_back(((i * 7 + seed) % 5) < 2);
    return q;
  endfunction

  function automatic bit same(bitq_t a, bitq_t b);
    if (a.size() != b.size()) return 0;
    foreach (a[i]) if (a[i] != b[i]) return 0;
    return 1;
  endfunction

  initial begin
    bitq_t q;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 7; i++) put_free(32'h100 + 32 * i, 32'h800 + 16 * i);
    check(count[0] == 16'd7, "seven free buffers");

    // 1: 21 bytes and 5 bits -> three linked buffers
    q = mkbits(21 * 8 + 5, 1);
    fork
      rx_frame(q, RX_OK, 5);
      hl2_take(0);
    join
    check(got_st == RX_OK, "frame 1 status");
    check(same(got, q), $sformatf("frame 1 bits in the buffers (%0d of %0d)", got.size(), q.size()));
    check(nbufs == 3, $sformatf("frame 1 in three buffers (%0d)", nbufs));
    check(got_bytes == 21 && got_rbits == 5, "frame 1 length");
    check(ind_hdr == {q[31], q[30], q[29], q[28], q[27], q[26], q[25], q[24], q[23], q[22], q[21],
                      q[20], q[19], q[18], q[17], q[16], q[15], q[14], q[13], q[12], q[11], q[10],
                      q[9], q[8], q[7], q[6], q[5], q[4], q[3], q[2], q[1], q[0]}, "frame 1 header");

    // 2: bad frame of 10 bytes is passed on with its status
    q = mkbits(80, 3);
    fork
      rx_frame(q, RX_FCS_ERR, 4);
      hl2_take(0);
    join
    check(got_st == RX_FCS_ERR, "frame 2 status");
    check(same(got, q), "frame 2 bits");
    check(nbufs == 2, "frame 2 in two buffers");

    // 3: high level 2 does not take frame A; frame B arrives and overruns
    fork
      begin
        rx_frame(mkbits(32, 5), RX_OK, 3);
        repeat (10) @(negedge clk);
        rx_frame(mkbits(64, 6), RX_OK, 1);
      end
      begin
        hl2_take(400);
        check(got_st == RX_OK && got.size() == 32, "frame A stored");
        hl2_take(0);
        check(got_st == RX_OVERRUN, $sformatf("frame B overrun (%0d)", got_st));
      end
    join
    check(ovr_seen > 0, "m_overrun raised");
    check(count[0] == 16'd0, $sformatf("free list used up (%0d)", count[0]));

    // 4: no buffer left
    q = mkbits(40, 7);
    fork
      rx_frame(q, RX_OK, 4);
      hl2_take(0);
    join
    check(got_st == RX_NOBUF, $sformatf("no buffer status (%0d)", got_st));

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

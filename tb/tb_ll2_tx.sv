// tb_ll2_tx: self-checking test of the low level 2 transmitter, together with
// its transmit memory interface, the memory interface unit, a memory model
// and the two primitive control blocks around it. The testbench plays high
// level 2 (issuing transmit primitives) and layer 1 (giving bit-clock strobes
// and collecting the line bits). The line bits of each primitive are decoded
// by an independent reference decoder (hdlc_ref_pkg) and compared with the
// frame that was asked for.
// Checked: inline-only frames with long runs of 1s (zero insertion), inline
// header plus a chain of buffers with remain bits, buffers only, the full 64
// inline bits, correct FCS on all of them, first and last bit framing (lst on
// the last bit of the closing flag); underrun with a fast bit clock (abort
// pattern, abo with lst, status); reset from high level 2; collision from
// layer 1; frame counters.
module tb_ll2_tx;
  import x25_pkg::*;
  import hdlc_ref_pkg::*;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;   // a falling edge, so the asynchronous reset acts at once
  always #5 clk = ~clk;

  // high level 2 side
  logic hl_do = 0, hl_busy, hl_atn, hl_ack, hl_use_buf = 0, hl_reset = 0;
  logic [63:0] hl_inl_bits = '0;
  logic [6:0]  hl_inl_n = '0;
  addr_t hl_buf_ptr = '0;
  logic [3:0] hl_pcei = 4'h5, hl_sap = 4'h9;
  tx_status_e tx_status;
  // memory interface
  logic m_start, m_stop, m_bit_valid, m_bit, m_eoc, m_take;
  addr_t m_first;
  logic tm_valid, tm_done;
  miu_req_t tm_req;
  logic [15:0] tm_rdata;
  logic [0:0] mv, md;
  miu_req_t mr [1];
  logic [15:0] mrd [1];
  logic mem_en, mem_we, mem_lock, mem_rdy;
  addr_t mem_addr;
  logic [7:0] mem_wdata, mem_rdata;
  // layer 1 side
  logic ph_do, ph_busy, ph_atn, ph_ack = 0, ph_bit, ph_abo, ph_lst, ph_clk = 0, ph_col = 0;
  logic [3:0] ph_pcei, ph_sap;
  logic [15:0] frames_sent, frames_aborted;

  pcb u_pcb_hl (.clk, .rst_n, .do_prim(hl_do), .ack(hl_ack), .busy(hl_busy), .atn(hl_atn));
  ll2_tx dut (.*);
  ll2_tx_mem u_txm (.clk, .rst_n, .start(m_start), .first_desc(m_first), .stop(m_stop),
                    .bit_valid(m_bit_valid), .bit_data(m_bit), .bit_take(m_take), .eoc(m_eoc),
                    .m_valid(tm_valid), .m_req(tm_req), .m_done(tm_done), .m_rdata(tm_rdata));
  pcb u_pcb_ph (.clk, .rst_n, .do_prim(ph_do), .ack(ph_ack), .busy(ph_busy), .atn(ph_atn));
  assign mv[0] = tm_valid; assign mr[0] = tm_req; assign tm_done = md[0]; assign tm_rdata = mrd[0];
  miu #(.NPORTS(1)) u_miu (.clk, .rst_n, .req_valid(mv), .req(mr), .done(md), .rdata(mrd),
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

  function automatic bit starts_with_flag(bitq_t q);
    if (q.size() < 8) return 0;
    for (int k = 0; k < 8; k++) if (q[k] != HDLC_FLAG[k]) return 0;
    return 1;
  endfunction
  function automatic bit ends_in_ones(bitq_t q);
    if (q.size() < 7) return 0;
    for (int k = 1; k <= 7; k++) if (q[q.size() - k] != 1'b1) return 0;
    return 1;
  endfunction
  function automatic bit same(bitq_t a, bitq_t b);
    if (a.size() != b.size()) return 0;
    foreach (a[i]) if (a[i] != b[i]) return 0;
    return 1;
  endfunction

  bitq_t bufq;   // bits held in the buffers of the current chain

  task automatic put_buf(int d, int nxt, int b, int dlen, int rem, int seed);
    mem.m[d+0] = 8'(nxt >> 16); mem.m[d+1] = 8'(nxt >> 8); mem.m[d+2] = 8'(nxt);
    mem.m[d+3] = 8'(b >> 16);   mem.m[d+4] = 8'(b >> 8);   mem.m[d+5] = 8'(b);
    mem.m[d+6] = 8'h01;         mem.m[d+7] = 8'h00;
    mem.m[d+8] = 8'(b >> 16);   mem.m[d+9] = 8'(b >> 8);   mem.m[d+10] = 8'(b);
    mem.m[d+11] = 8'(dlen >> 8); mem.m[d+12] = 8'(dlen);
    mem.m[d+13] = 8'(rem);
    for (int i = 0; i < dlen + (rem != 0 ? 1 : 0); i++) begin
      logic [7:0] v;
      v = (i % 3 == 0) ? 8'hFF : 8'((seed * 53 + i * 29) ^ 8'h5A);
      mem.m[b+i] = v;
      for (int k = 0; k < ((i < dlen) ? 8 : rem); k++) bufq.push_back(v[k]);
    end
  endtask

  // layer 1: collect the bits of one primitive; col_at >= 0 raises a collision
  bitq_t line;
  bit last_abo, last_lst;
  task automatic layer1(int bitp, int col_at);
    int n = 0;
    line.delete();
    while (!ph_atn) @(negedge clk);
    check(ph_pcei == hl_pcei && ph_sap == hl_sap, "PCEI and SAP passed to layer 1");
    line.push_back(ph_bit);
    last_lst = ph_lst; last_abo = ph_abo;
    while (!ph_lst) begin
      repeat (bitp - 1) @(negedge clk);
      if (n == col_at) begin
        ph_col = 1;
        @(negedge clk) ph_col = 0;
        break;
      end
      ph_clk = 1;
      @(negedge clk) ph_clk = 0;
      line.push_back(ph_bit);
      last_lst = ph_lst; last_abo = ph_abo;
      n++;
      if (n > 4000) break;
    end
    ph_ack = 1;
    @(negedge clk) ph_ack = 0;
  endtask

  task automatic hl2_send(bitq_t inl, bit use_buf, int desc);
    hl_inl_bits = '0;
    foreach (inl[i]) hl_inl_bits[i] = inl[i];
    hl_inl_n = 7'(inl.size());
    hl_use_buf = use_buf;
    hl_buf_ptr = addr_t'(desc);
    @(negedge clk) hl_do = 1;
    @(negedge clk) hl_do = 0;
  endtask

  task automatic wait_hl_done();
    int g = 0;
    while (hl_busy && g < 100000) begin @(negedge clk); g++; end
    check(!hl_busy, "high level 2 primitive acknowledged");
  endtask

  // send a frame and check the decoded line against the expected bits
  task automatic good_frame(bitq_t inl, bit use_buf, int desc, string name);
    frame_t fr[$];
    bitq_t want;
    int sent0 = frames_sent;
    want = inl;
    if (use_buf) foreach (bufq[i]) want.push_back(bufq[i]);
    fork
      hl2_send(inl, use_buf, desc);
      layer1(40, -1);
    join
    wait_hl_done();
    decode(line, fr);
    check(fr.size() == 1, {name, ": one frame on the line"});
    if (fr.size() == 1) begin
      check(fr[0].status == 0, $sformatf("%s: frame good (status %0d)", name, fr[0].status));
      check(same(fr[0].data, want), $sformatf("%s: frame bits (%0d, want %0d)", name, fr[0].data.size(), want.size()));
    end
    check(last_lst && !last_abo, {name, ": lst on the last bit, no abo"});
    check(starts_with_flag(line), {name, ": opening flag"});
    check(tx_status == TX_OK, {name, ": status ok"});
    check(frames_sent == 16'(sent0 + 1), {name, ": frames_sent counted"});
  endtask

  initial begin
    bitq_t inl;
    frame_t fr[$];
    int ab0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (2) @(negedge clk);

    // A: inline only, long runs of ones
    inl = bytes_to_bits('{8'hFF, 8'h3F, 8'hFF, 8'h7E});
    bufq.delete();
    good_frame(inl, 0, 0, "inline");
    // count inserted zeros: the line must be longer than flags + data + FCS
    check(line.size() > 16 + 32 + 16, "zero insertion lengthened the frame");

    // B: inline header and a chain of buffers with remain bits
    inl = bytes_to_bits('{8'h01, 8'h10}, 3, 8'h05);
    bufq.delete();
    put_buf(32'h100, 32'h120, 32'h400, 6, 0, 1);
    put_buf(32'h120, 32'h140, 32'h440, 3, 5, 2);
    put_buf(32'h140, 0,       32'h480, 7, 0, 3);
    good_frame(inl, 1, 32'h100, "header+buffers");

    // C: buffers only
    inl.delete();
    bufq.delete();
    put_buf(32'h160, 0, 32'h4C0, 10, 2, 4);
    good_frame(inl, 1, 32'h160, "buffers only");

    // D: all 64 inline bits
    inl = bytes_to_bits('{8'h03, 8'hFF, 8'hF8, 8'h1F, 8'hFF, 8'hFF, 8'h00, 8'hA5});
    bufq.delete();
    good_frame(inl, 0, 0, "64 inline bits");

    // E: underrun, bit clock too fast for the memory
    ab0 = frames_aborted;
    inl = bytes_to_bits('{8'h01, 8'h00});
    bufq.delete();
    put_buf(32'h180, 32'h1A0, 32'h500, 4, 0, 5);
    put_buf(32'h1A0, 0,       32'h540, 4, 0, 6);
    fork
      hl2_send(inl, 1, 32'h180);
      layer1(2, -1);
    join
    wait_hl_done();
    check(tx_status == TX_UNDERRUN, $sformatf("underrun status (%0d)", tx_status));
    check(last_lst && last_abo, "underrun: abo with the last bit");
    check(ends_in_ones(line), "underrun: ends in seven ones");
    fr.delete(); decode(line, fr);
    check(fr.size() == 1 && fr[0].status == 2, "underrun: decoder sees an abort");
    check(frames_aborted == 16'(ab0 + 1), "aborted frame counted");

    // F: reset from high level 2 in the middle of a frame
    inl = bytes_to_bits('{8'h01, 8'h00});
    bufq.delete();
    put_buf(32'h1C0, 0, 32'h580, 20, 0, 7);
    fork
      hl2_send(inl, 1, 32'h1C0);
      layer1(40, -1);
      begin
        repeat (40 * 60) @(negedge clk);
        hl_reset = 1;
        @(negedge clk) hl_reset = 0;
      end
    join
    wait_hl_done();
    check(tx_status == TX_RESET, $sformatf("reset status (%0d)", tx_status));
    check(last_abo && line.size() < 8 + 16 + 160, "reset: cut short with abo");
    fr.delete(); decode(line, fr);
    check(fr.size() == 1 && fr[0].status == 2, "reset: decoder sees an abort");

    // G: collision from layer 1
    inl = bytes_to_bits('{8'h01, 8'h3F, 8'h77});
    bufq.delete();
    fork
      hl2_send(inl, 0, 0);
      layer1(40, 12);
    join
    wait_hl_done();
    check(tx_status == TX_COLLISION, $sformatf("collision status (%0d)", tx_status));

    // H: a good frame after the errors
    inl = bytes_to_bits('{8'h03, 8'h00, 8'hC3});
    bufq.delete();
    put_buf(32'h1E0, 0, 32'h600, 3, 0, 8);
    good_frame(inl, 1, 32'h1E0, "after errors");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_ll2_rx: self-checking test of the low level 2 receiver with the primitive
// control block in front of it. The testbench plays layer 1: it builds line
// bit streams with the independent reference encoder (hdlc_ref_pkg: flags,
// zero insertion, FCS) and hands them over in PH-DATA-INDICATION primitives,
// one bit-clock strobe per bit. It collects the data bits and end reports.
// Checked: good frames (data bits, length not a multiple of 8, header copy,
// PCEI/SAP), runs of 1s needing zero deletion, two frames and idle flags in
// one primitive, a frame split over two primitives, FCS error, abort, short
// frame, collision, overrun from the memory side (abo to layer 1), counters.
module tb_ll2_rx;
  import x25_pkg::*;
  import hdlc_ref_pkg::*;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;   // a falling edge, so the asynchronous reset acts at once
  always #5 clk = ~clk;

  logic ph_do = 0, ph_busy, ph_atn, ph_ack, ph_bit = 0, ph_clk = 0, ph_lst = 0, ph_col = 0, ph_abo;
  logic [3:0] ph_pcei = 4'h3, ph_sap = 4'hC;
  logic d_valid, d_bit, d_end;
  rx_status_e d_status;
  logic [31:0] hdr;
  logic [3:0] pcei, sap;
  logic m_overrun = 0;
  logic [15:0] frames_ok, frames_bad;

  pcb u_pcb (.clk, .rst_n, .do_prim(ph_do), .ack(ph_ack), .busy(ph_busy), .atn(ph_atn));
  ll2_rx dut (.*);

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

  function automatic bit same(bitq_t a, bitq_t b);
    if (a.size() != b.size()) return 0;
    foreach (a[i]) if (a[i] != b[i]) return 0;
    return 1;
  endfunction

  // collector
  typedef struct { bitq_t bits; rx_status_e st; logic [31:0] hdr; logic [3:0] pcei, sap; } rec_t;
  rec_t recs[$];
  bitq_t cur;
  always @(negedge clk) begin
    if (d_valid) cur.push_back(d_bit);
    if (d_end) begin
      rec_t r;
      r.bits = cur; r.st = d_status; r.hdr = hdr; r.pcei = pcei; r.sap = sap;
      recs.push_back(r);
      cur.delete();
    end
  end

  // layer 1: one primitive carrying the given line bits
  task automatic l1_send(bitq_t line, int col_at = -1, int ovr_at = -1);
    ph_bit = line[0];
    ph_lst = (line.size() == 1);
    @(negedge clk) ph_do = 1;
    @(negedge clk) ph_do = 0;
    for (int i = 1; i < line.size(); i++) begin
      repeat (2 + $urandom % 3) @(negedge clk);
      if (!ph_busy) break;
      if (i == col_at) begin
        ph_col = 1;
        @(negedge clk) ph_col = 0;
        break;
      end
      if (i == ovr_at) begin
        m_overrun = 1;
        @(negedge clk) m_overrun = 0;
        break;
      end
      ph_bit = line[i];
      ph_lst = (i == line.size() - 1);
      ph_clk = 1;
      @(negedge clk) ph_clk = 0;
    end
    for (int g = 0; g < 20 && ph_busy; g++) @(negedge clk);
    check(!ph_busy, "primitive acknowledged by layer 2");
    ph_lst = 0;
  endtask

  function automatic bitq_t cat(bitq_t a, bitq_t b);
    bitq_t r = a;
    foreach (b[i]) r.push_back(b[i]);
    return r;
  endfunction

  function automatic bitq_t hdr_bits(bitq_t d);
    bitq_t r;
    for (int i = 0; i < 32 && i < d.size(); i++) r.push_back(d[i]);
    return r;
  endfunction

  task automatic expect_frame(bitq_t d, rx_status_e st, string name, bit check_data = 1);
    check(recs.size() > 0, {name, ": end reported"});
    if (recs.size() > 0) begin
      rec_t r = recs.pop_front();
      check(r.st == st, $sformatf("%s: status %0d, want %0d", name, r.st, st));
      if (check_data) begin
        check(same(r.bits, d), $sformatf("%s: data bits (%0d, want %0d)", name, r.bits.size(), d.size()));
        for (int i = 0; i < 32 && i < d.size(); i++)
          if (r.hdr[i] != d[i]) begin check(0, {name, ": header copy"}); break; end
      end
      check(r.pcei == ph_pcei && r.sap == ph_sap, {name, ": PCEI and SAP"});
    end
  endtask

  initial begin
    bitq_t a, b, c, l, flags, ab;
    int ok0, bad0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (2) @(negedge clk);
    flags = bytes_to_bits('{8'h7E, 8'h7E});
    ab = bytes_to_bits('{8'hFF});

    // 1: one good frame with runs of ones and a length that is not whole bytes
    a = bytes_to_bits('{8'h01, 8'hFF, 8'hFF, 8'h7E, 8'h3F}, 5, 8'h1F);
    l = encode(a);
    l_send_and_check(l, a);

    // 2: two frames with idle flags in between, in one primitive
    b = bytes_to_bits('{8'h03, 8'h10, 8'hAA, 8'h55, 8'hF0, 8'h0F});
    c = bytes_to_bits('{8'h01, 8'h21, 8'h00, 8'h00});
    l = cat(cat(flags, encode(b)), cat(flags, encode(c)));
    l1_send(l);
    repeat (5) @(negedge clk);
    expect_frame(b, RX_OK, "first of two");
    expect_frame(c, RX_OK, "second of two");

    // 3: a frame split over two primitives
    a = bytes_to_bits('{8'h41, 8'h42, 8'h43, 8'h44, 8'h45, 8'h46, 8'h47});
    l = encode(a);
    l1_send(l[0:40]);
    l1_send(l[41:$]);
    repeat (5) @(negedge clk);
    expect_frame(a, RX_OK, "split frame");

    // 4: bad FCS
    bad0 = int'(frames_bad);
    a = bytes_to_bits('{8'h01, 8'h3F, 8'h10, 8'h20});
    l1_send(encode(a, 1));
    repeat (5) @(negedge clk);
    expect_frame(a, RX_FCS_ERR, "bad FCS", 0);

    // 5: abort: opening flag, data, seven ones
    a = bytes_to_bits('{8'h01, 8'h10, 8'h22, 8'h33});
    l = encode(a);
    l = l[0:30];
    l = cat(cat(l, ab), flags);
    l1_send(l);
    repeat (5) @(negedge clk);
    expect_frame(a, RX_ABORT, "abort", 0);

    // 6: short frame (one byte and the FCS)
    a = bytes_to_bits('{8'h01});
    l1_send(encode(a));
    repeat (5) @(negedge clk);
    expect_frame(a, RX_SHORT, "short", 0);
    check(frames_bad == 16'(bad0 + 3), "bad frames counted");

    // 7: collision in the middle of a frame
    a = bytes_to_bits('{8'h01, 8'h10, 8'h22, 8'h33, 8'h44});
    l1_send(encode(a), 30);
    repeat (5) @(negedge clk);
    expect_frame(a, RX_COLL, "collision", 0);

    // 8: overrun from the memory interface
    a = bytes_to_bits('{8'h01, 8'h10, 8'h22, 8'h33, 8'h44});
    fork
      l1_send(encode(a), -1, 30);
      begin
        automatic bit seen_abo = 0;
        repeat (200) begin @(negedge clk); if (ph_abo && ph_ack) seen_abo = 1; end
        check(seen_abo, "overrun: abo given to layer 1");
      end
    join
    expect_frame(a, RX_OVERRUN, "overrun", 0);

    // 9: a good frame afterwards, PCEI/SAP changed
    ok0 = int'(frames_ok);
    ph_pcei = 4'h7; ph_sap = 4'h1;
    a = bytes_to_bits('{8'h03, 8'h7F, 8'hFE, 8'h00, 8'h11});
    l_send_and_check(encode(a), a);
    check(frames_ok == 16'(ok0 + 1), "good frame counted");
    check(recs.size() == 0, "no stray end reports");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic l_send_and_check(bitq_t l, bitq_t a);
    l1_send(l);
    repeat (5) @(negedge clk);
    expect_frame(a, RX_OK, "good frame");
  endtask
endmodule

// tb_x25_coproc: end-to-end test of the co-processor at its default size.
// The testbench plays everything outside the chip: the shared memory (memory
// model), the host, high level 2 / layer 3, and layer 1 as a loop-back line
// that takes the bits of each PH-DATA-REQUEST and hands them back as a
// PH-DATA-INDICATION, so every transmitted frame is received again.
// Each mechanism is counted when it is seen working, and each must be seen at
// least once: host command through the command area, response through the
// response area with interrupt, buffers put on and taken from free lists,
// memory access through the external MIU port, timer start and expiry, a
// frame sent from an inline header plus a buffer chain and received into
// linked receive buffers with equal contents (zero insertion and deletion,
// FCS), a corrupted frame reported as FCS error, an underrun abort reported
// as abort on the receive side, buffer requests sent to the host's buffer
// manager and a host buffer disposal filling the receive list, and line
// activation through the PH-ACTIVATE request and indication, and a
// statistics dump into memory.
module tb_x25_coproc;
  import x25_pkg::*;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;   // a falling edge, so the asynchronous reset acts at once
  always #5 clk = ~clk;

  logic mem_en, mem_we, mem_lock, mem_rdy;
  addr_t mem_addr;
  logic [7:0] mem_wdata, mem_rdata;
  logic host_attn = 0, host_irq, host_irq_ack, ack_main = 0, ack_bg = 0;
  assign host_irq_ack = ack_main | ack_bg;
  logic cmd_valid, cmd_ready = 0, rsp_valid = 0, rsp_ready;
  addr_t cmd_ptr, rsp_ptr = '0;
  logic hl_tx_do = 0, hl_tx_busy, hl_use_buf = 0, hl_reset = 0;
  logic [63:0] hl_inl_bits = '0;
  logic [6:0] hl_inl_n = '0;
  addr_t hl_buf_ptr = '0;
  logic [3:0] hl_pcei = 4'h1, hl_sap = 4'h2;
  tx_status_e tx_status;
  logic ind_atn, ind_ack = 0;
  addr_t ind_first;
  rx_status_e ind_status;
  logic [15:0] ind_bytes;
  logic [2:0] ind_rbits;
  logic [31:0] ind_hdr;
  logic [3:0] ind_pcei, ind_sap;
  logic ext_m_valid = 0, ext_m_done;
  miu_req_t ext_m_req = '{cmd: MIU_RD_B, addr: '0, wdata: '0};
  logic [15:0] ext_m_rdata;
  logic bm_valid = 0, bm_put = 0, bm_list = 0, bm_done, bm_empty;
  addr_t bm_ptr = '0, bm_ptr_out;
  logic [15:0] bm_req_thresh = 16'd2, bm_rel_thresh = 16'd30;
  logic [15:0] bm_count [2];
  logic [1:0] bm_need_buf, bm_excess;
  logic [7:0] bm_req_blocks = 8'd8;
  // physical-layer management primitives
  logic ph_actr_do = 0, ph_actr_tot_in = 0, ph_actr_ack = 0, ph_actr_busy, ph_actr_atn, ph_actr_tot;
  logic [1:0] ph_actr_moo_in = 0, ph_actr_moo;
  logic ph_acti_do = 0, ph_acti_tot_in = 0, ph_acti_ack = 0, ph_acti_busy, ph_acti_atn, ph_acti_tot;
  logic [1:0] ph_acti_moo_in = 0, ph_acti_moo;
  logic ph_deactr_do = 0, ph_deactr_ack = 0, ph_deactr_busy, ph_deactr_atn;
  logic ph_deacti_do = 0, ph_deacti_orig_in = 0, ph_deacti_ack = 0, ph_deacti_busy, ph_deacti_atn, ph_deacti_orig;
  logic ph_active, ph_active_tot;
  logic [1:0] ph_active_moo;
  logic st_do = 0, st_busy;
  addr_t st_ptr = '0;
  logic [15:0] bm_req_bytes [2];
  assign bm_req_bytes[0] = 16'd8;
  assign bm_req_bytes[1] = 16'd64;
  logic [15:0] tmr_presc = 16'd3;
  logic [3:0] tmr_cmd_valid = '0, tmr_cmd_done, tmr_exp_valid, tmr_exp_ack = '0;
  tmr_op_e tmr_cmd_op [4];
  logic [7:0] tmr_cmd_id [4];
  logic [15:0] tmr_cmd_time [4];
  tmr_err_e tmr_cmd_err;
  logic [7:0] tmr_exp_id [4];
  logic [4:0] tmr_free;
  logic [11:0] tmr_now;
  logic tmr_tick;
  logic phr_atn, phr_ack = 0, phr_bit, phr_abo, phr_lst, phr_clk = 0, phr_col = 0;
  logic [3:0] phr_pcei, phr_sap;
  logic phi_do = 0, phi_busy, phi_bit = 0, phi_clk = 0, phi_lst = 0, phi_col = 0, phi_abo;
  logic [3:0] phi_pcei = '0, phi_sap = '0;
  logic [15:0] frames_sent, frames_aborted, frames_ok, frames_bad;

  initial for (int i = 0; i < 4; i++) begin
    tmr_cmd_op[i] = TMR_START; tmr_cmd_id[i] = '0; tmr_cmd_time[i] = '0;
  end

  x25_coproc dut (.*);
  mem_model #(.AW(16)) mem (.clk, .mem_en, .mem_we, .mem_addr, .mem_wdata, .mem_rdy, .mem_rdata);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  initial begin
    #50000000 $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  // mechanism counters
  int n_cmd = 0, n_rsp = 0, n_put = 0, n_get = 0, n_ext = 0, n_tmr = 0;
  int n_frame = 0, n_link = 0, n_stuff = 0, n_fcserr = 0, n_abort = 0;
  int n_req = 0, n_disp = 0, n_act = 0, n_stat = 0;

  // the host's buffer manager: takes the messages of the buffer exchange
  // (response area pointing at the message record) and empties the area
  logic [7:0] req_code [$];
  logic [23:0] req_a [$];
  logic [15:0] req_b [$];
  initial forever begin
    @(negedge clk);
    if (host_irq && {mem.m[16'hF004], mem.m[16'hF005], mem.m[16'hF006]} == 24'h00F010) begin
      req_code.push_back(mem.m[16'hF020]);
      req_a.push_back({mem.m[16'hF021], mem.m[16'hF022], mem.m[16'hF023]});
      req_b.push_back({mem.m[16'hF024], mem.m[16'hF025]});
      if (mem.m[16'hF020] == 8'h81) n_req++;
      mem.m[16'hF004] = 8'h00; mem.m[16'hF005] = 8'h00; mem.m[16'hF006] = 8'h00;
      ack_bg = 1;
      @(negedge clk) ack_bg = 0;
    end
  end

  typedef bit bitq_t[$];
  function automatic bit same(bitq_t a, bitq_t b);
    if (a.size() != b.size()) return 0;
    foreach (a[i]) if (a[i] != b[i]) return 0;
    return 1;
  endfunction

  // ---- layer 1: loop-back line ----
  bitq_t line;
  task automatic l1_loop(int bitp, int flip_at);
    int g = 0;
    line.delete();
    while (!phr_atn && g < 100000) begin @(negedge clk); g++; end
    line.push_back(phr_bit);
    while (!phr_lst && line.size() < 5000) begin
      repeat (bitp - 1) @(negedge clk);
      phr_clk = 1;
      @(negedge clk) phr_clk = 0;
      line.push_back(phr_bit);
    end
    phr_ack = 1;
    @(negedge clk) phr_ack = 0;
    if (flip_at >= 0) line[flip_at] = !line[flip_at];
    // hand the same bits back in one indication primitive
    phi_pcei = phr_pcei; phi_sap = phr_sap;
    phi_bit = line[0]; phi_lst = 0;
    @(negedge clk) phi_do = 1;
    @(negedge clk) phi_do = 0;
    for (int i = 1; i < line.size(); i++) begin
      repeat (3) @(negedge clk);
      phi_bit = line[i];
      phi_lst = (i == line.size() - 1);
      phi_clk = 1;
      @(negedge clk) phi_clk = 0;
    end
    g = 0;
    while (phi_busy && g < 100) begin @(negedge clk); g++; end
    check(!phi_busy, "indication primitive acknowledged by the receiver");
    phi_lst = 0;
  endtask

  // count inserted zeros (a 0 after five 1s, not in a flag)
  function automatic int stuffed(bitq_t q);
    int ones = 0, n = 0;
    for (int i = 8; i + 8 < q.size(); i++) begin
      if (q[i]) ones++;
      else begin if (ones == 5) n++; ones = 0; end
    end
    return n;
  endfunction

  // ---- high level 2 ----
  task automatic hl2_send(bitq_t inl, bit use_buf, int desc);
    hl_inl_bits = '0;
    foreach (inl[i]) hl_inl_bits[i] = inl[i];
    hl_inl_n = 7'(inl.size());
    hl_use_buf = use_buf;
    hl_buf_ptr = addr_t'(desc);
    @(negedge clk) hl_tx_do = 1;
    @(negedge clk) hl_tx_do = 0;
  endtask

  bitq_t got;
  int nbufs;
  rx_status_e got_st;
  task automatic hl2_take();
    addr_t d;
    int g = 0;
    while (!ind_atn && g < 200000) begin @(negedge clk); g++; end
    check(ind_atn, "receive indication given");
    got.delete(); nbufs = 0; got_st = ind_status;
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
    ind_ack = ind_atn;
    @(negedge clk) ind_ack = 0;
  endtask

  task automatic bm_op(bit put, bit lst, addr_t p);
    @(negedge clk) bm_valid = 1; bm_put = put; bm_list = lst; bm_ptr = p;
    while (!bm_done) @(negedge clk);
    bm_valid = 0;
  endtask

  bitq_t txq;
  task automatic put_tx_buf(int d, int nxt, int b, int dlen, int seed);
    mem.m[d+0] = 8'(nxt >> 16); mem.m[d+1] = 8'(nxt >> 8); mem.m[d+2] = 8'(nxt);
    mem.m[d+8] = 8'(b >> 16); mem.m[d+9] = 8'(b >> 8); mem.m[d+10] = 8'(b);
    mem.m[d+11] = 8'(dlen >> 8); mem.m[d+12] = 8'(dlen); mem.m[d+13] = 8'h00;
    for (int i = 0; i < dlen; i++) begin
      logic [7:0] v;
      v = (i % 4 == 1) ? 8'hFF : 8'(seed * 13 + i * 7);
      mem.m[b+i] = v;
      for (int k = 0; k < 8; k++) txq.push_back(v[k]);
    end
  endtask

  initial begin
    bitq_t inl, want;
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (3) @(negedge clk);

    // layer 2 management asks layer 1 to activate the line (synchronous,
    // duplex); layer 1 answers with an activate indication
    @(negedge clk) ph_actr_do = 1;
    @(negedge clk) ph_actr_do = 0;
    check(ph_actr_atn && ph_actr_busy, "activate request reaches layer 1");
    ph_actr_ack = 1;
    @(negedge clk) ph_actr_ack = 0; ph_acti_do = 1;
    @(negedge clk) ph_acti_do = 0;
    check(ph_acti_atn && !ph_active, "activate indication reaches layer 2");
    ph_acti_ack = 1;
    @(negedge clk) ph_acti_ack = 0;
    check(ph_active && !ph_actr_busy && !ph_acti_busy, "physical connection active");
    if (ph_active) n_act++;

    // both lists start empty: the co-processor asks the host for buffers
    for (int g = 0; g < 5000 && req_code.size() < 2; g++) @(negedge clk);
    check(req_code.size() == 2 && req_code[0] == 8'h81 && req_a[0] == 24'h000008 &&
          req_b[0] == 16'd8, "buffer request for the receive list");
    check(req_code.size() == 2 && req_code[1] == 8'h81 && req_a[1] == 24'h010008 &&
          req_b[1] == 16'd64, "buffer request for list 1");

    // the host answers with a disposal of eight linked 8-byte buffers
    for (int i = 0; i < 8; i++) begin
      int d, b, nx;
      d = 32'h1000 + 32 * i; b = 32'h2000 + 16 * i; nx = (i == 7) ? 0 : d + 32;
      mem.m[d+0] = 8'(nx >> 16); mem.m[d+1] = 8'(nx >> 8); mem.m[d+2] = 8'(nx);
      mem.m[d+3] = 8'(b >> 16); mem.m[d+4] = 8'(b >> 8); mem.m[d+5] = 8'(b);
      mem.m[d+6] = 8'h00; mem.m[d+7] = 8'h08;
    end
    mem.m[16'h0400] = 8'h00; mem.m[16'h0401] = 8'h00; mem.m[16'h0402] = 8'h00;
    mem.m[16'h0408] = 8'h00; mem.m[16'h0409] = 8'h04; mem.m[16'h040A] = 8'h10;
    mem.m[16'h040B] = 8'h00; mem.m[16'h040C] = 8'h06; mem.m[16'h040D] = 8'h00;
    mem.m[16'h0410] = 8'h01;
    mem.m[16'h0411] = 8'h00; mem.m[16'h0412] = 8'h10; mem.m[16'h0413] = 8'h00;
    mem.m[16'h0414] = 8'h00; mem.m[16'h0415] = 8'h08;
    mem.m[16'hF000] = 8'h00; mem.m[16'hF001] = 8'h04; mem.m[16'hF002] = 8'h00;
    @(negedge clk) host_attn = 1;
    @(negedge clk) host_attn = 0;
    for (int g = 0; g < 5000 && bm_count[0] != 16'd8; g++) @(negedge clk);
    check(bm_count[0] == 16'd8, "eight receive buffers free after the disposal");
    if (bm_count[0] == 16'd8 && req_code.size() >= 2) n_disp++;
    repeat (100) @(negedge clk);
    check(req_code.size() == 2, "no further buffer request");
    bm_op(1, 1, 24'h001200);
    n_put++;
    bm_op(0, 1, '0);
    check(bm_ptr_out == 24'h001200 && !bm_empty, "GET returns the buffer put on list 1");
    if (bm_ptr_out == 24'h001200) n_get++;

    // host command for layer 3: the host writes a pointer to the command area
    // and attends; the command buffer's first data byte is not a buffer command
    mem.m[16'h345E] = 8'h00; mem.m[16'h345F] = 8'h35; mem.m[16'h3460] = 8'h00;
    mem.m[16'h3500] = 8'h20;
    mem.m[16'hF000] = 8'h00; mem.m[16'hF001] = 8'h34; mem.m[16'hF002] = 8'h56;
    @(negedge clk) host_attn = 1;
    @(negedge clk) host_attn = 0;
    for (int g = 0; g < 1000 && !cmd_valid; g++) @(negedge clk);
    check(cmd_valid && cmd_ptr == 24'h003456, "command pointer offered");
    if (cmd_valid && cmd_ptr == 24'h003456) n_cmd++;
    cmd_ready = 1;
    @(negedge clk) cmd_ready = 0;
    repeat (100) @(negedge clk);
    check({mem.m[16'hF000], mem.m[16'hF001], mem.m[16'hF002]} == 24'h0, "command area cleared");

    // external MIU port: high level 2 reads the command it was given
    mem.m[16'h3456] = 8'hC3; mem.m[16'h3457] = 8'h3C;
    @(negedge clk) ext_m_valid = 1; ext_m_req = '{cmd: MIU_RD_W, addr: 24'h003456, wdata: '0};
    while (!ext_m_done) @(negedge clk);
    check(ext_m_rdata == 16'hC33C, "word read through the external port");
    if (ext_m_rdata == 16'hC33C) n_ext++;
    ext_m_valid = 0;

    // timer: start id 9 for 5 ticks on port 2, wait for the expiry message
    @(negedge clk) tmr_cmd_valid[2] = 1; tmr_cmd_op[2] = TMR_START; tmr_cmd_id[2] = 8'd9; tmr_cmd_time[2] = 16'd5;
    while (!tmr_cmd_done[2]) @(negedge clk);
    tmr_cmd_valid[2] = 0;
    for (int g = 0; g < 2000 && !tmr_exp_valid[2]; g++) @(negedge clk);
    check(tmr_exp_valid[2] && tmr_exp_id[2] == 8'd9, "timer expired with its id");
    if (tmr_exp_valid[2] && tmr_exp_id[2] == 8'd9) n_tmr++;
    tmr_exp_ack[2] = 1;
    @(negedge clk) tmr_exp_ack[2] = 0;

    // frame: inline header and two transmit buffers, looped back
    txq.delete();
    put_tx_buf(32'h4000, 32'h4020, 32'h5000, 6, 1);
    put_tx_buf(32'h4020, 0,       32'h5100, 9, 2);
    inl.delete();
    for (int k = 0; k < 16; k++) inl.push_back((16'h3F01 >> k) & 1);
    want = inl;
    foreach (txq[i]) want.push_back(txq[i]);
    fork
      hl2_send(inl, 1, 32'h4000);
      l1_loop(40, -1);
      hl2_take();
    join
    check(tx_status == TX_OK, "frame sent");
    check(got_st == RX_OK, $sformatf("frame received good (%0d)", got_st));
    check(same(got, want), $sformatf("received bits equal sent bits (%0d, %0d)", got.size(), want.size()));
    check(nbufs == 3, $sformatf("received into three linked buffers (%0d)", nbufs));
    check(ind_hdr[15:0] == 16'h3F01, "header copied into the indication");
    if (got_st == RX_OK && same(got, want)) n_frame++;
    if (nbufs > 1) n_link++;
    if (stuffed(line) > 0 && same(got, want)) n_stuff++;

    // corrupted line: FCS error reported
    inl.delete();
    for (int k = 0; k < 40; k++) inl.push_back((40'h00_5A_C3_10_03 >> k) & 1);
    fork
      hl2_send(inl, 0, 0);
      l1_loop(40, 20);
      hl2_take();
    join
    check(got_st == RX_FCS_ERR, $sformatf("corrupted frame gives FCS error (%0d)", got_st));
    if (got_st == RX_FCS_ERR) n_fcserr++;

    // underrun: bit clock too fast for the transmit memory
    txq.delete();
    // short buffers: descriptor reads cannot keep up with a fast bit clock
    for (int i = 0; i < 4; i++)
      put_tx_buf(32'h4040 + 32 * i, (i == 3) ? 0 : 32'h4060 + 32 * i, 32'h5200 + 16 * i, 1, 3 + i);
    inl.delete();
    for (int k = 0; k < 16; k++) inl.push_back((16'h0001 >> k) & 1);
    fork
      hl2_send(inl, 1, 32'h4040);
      l1_loop(2, -1);
      hl2_take();
    join
    check(tx_status == TX_UNDERRUN, "transmit underrun");
    check(got_st == RX_ABORT, $sformatf("receiver sees the abort (%0d)", got_st));
    if (tx_status == TX_UNDERRUN && got_st == RX_ABORT) n_abort++;

    // response to the host
    @(negedge clk) rsp_valid = 1; rsp_ptr = 24'h00789A;
    while (!rsp_ready) @(negedge clk);
    rsp_valid = 0;
    @(negedge clk);
    check(host_irq, "host interrupt raised");
    check({mem.m[16'hF004], mem.m[16'hF005], mem.m[16'hF006]} == 24'h00789A, "response pointer in the response area");
    if (host_irq) n_rsp++;
    ack_main = 1;
    @(negedge clk) ack_main = 0;
    check(!host_irq, "interrupt acknowledged");

    // statistics query: dump the status words to 0x005000
    @(negedge clk) st_do = 1; st_ptr = 24'h005000;
    @(negedge clk) st_do = 0;
    for (int g = 0; g < 2000 && st_busy; g++) @(negedge clk);
    check(!st_busy, "statistics dump finished");
    check({mem.m[16'h5000], mem.m[16'h5001]} == frames_sent && {mem.m[16'h5002], mem.m[16'h5003]} == frames_aborted &&
          {mem.m[16'h5004], mem.m[16'h5005]} == frames_ok && {mem.m[16'h5006], mem.m[16'h5007]} == frames_bad,
          "frame counters in the dump");
    check({mem.m[16'h5008], mem.m[16'h5009]} == bm_count[0] && {mem.m[16'h500A], mem.m[16'h500B]} == bm_count[1] &&
          mem.m[16'h5011][4] == ph_active, "buffer counts and line state in the dump");
    if (!st_busy && {mem.m[16'h5000], mem.m[16'h5001]} == frames_sent && frames_sent != 0) n_stat++;

    $display("mechanisms: cmd=%0d rsp=%0d put=%0d get=%0d ext=%0d timer=%0d frame=%0d link=%0d zero_ins=%0d fcs_err=%0d abort=%0d buf_req=%0d buf_disposal=%0d activate=%0d stats=%0d",
             n_cmd, n_rsp, n_put, n_get, n_ext, n_tmr, n_frame, n_link, n_stuff, n_fcserr, n_abort, n_req, n_disp, n_act, n_stat);
    check(n_cmd > 0 && n_rsp > 0 && n_put > 0 && n_get > 0 && n_ext > 0 && n_tmr > 0 &&
          n_req > 0 && n_disp > 0 && n_act > 0 && n_stat > 0 &&
          n_frame > 0 && n_link > 0 && n_stuff > 0 && n_fcserr > 0 && n_abort > 0,
          "every mechanism seen at least once");
    check(frames_sent == 16'd2 && frames_aborted == 16'd1, "transmit counters");
    check(frames_ok == 16'd1 && frames_bad == 16'd2, "receive counters");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_miu: self-checking test of the memory interface unit.
// Three clients issue random reads, writes and exchanges of bytes and words
// on a small address range, so that they collide; a reference copy of memory
// kept here predicts every read and exchange result and the final contents.
// Also checked: two requests raised in the same cycle are served lowest port
// first, mem_lock covers both halves of an exchange, a byte operation costs
// 1 bus transfer and a word or two-byte operation 2 (an exchange twice that),
// and the two-byte operations put the low order byte first in memory.
module tb_miu;
  import x25_pkg::*;
  localparam int NP = 3;

  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;   // a falling edge, so the asynchronous reset acts at once
  always #5 clk = ~clk;

  logic [NP-1:0] req_valid;
  miu_req_t      req [NP];
  logic [NP-1:0] done;
  logic [15:0]   rdata [NP];
  logic mem_en, mem_we, mem_lock, mem_rdy;
  addr_t mem_addr;
  logic [7:0] mem_wdata, mem_rdata;

  miu #(.NPORTS(NP)) dut (.*);
  mem_model #(.AW(8), .MAX_WAIT(2)) mem (.clk, .mem_en, .mem_we, .mem_addr, .mem_wdata,
                                          .mem_rdy, .mem_rdata);

  int checks = 0, failures = 0;
  logic [7:0] ref_m [256];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // one client: random operations, reference updated when done
  task automatic client(input int p, input int n);
    for (int k = 0; k < n; k++) begin
      miu_cmd_e c;
      logic [7:0] a;
      logic [15:0] d, exp;
      c = miu_cmd_e'(1 + ($urandom % 9));
      a = 8'($urandom % 16);
      d = 16'($urandom);
      @(negedge clk);
      req[p] = '{cmd: c, addr: {16'h0, a}, wdata: d};
      req_valid[p] = 1'b1;
      do @(negedge clk); while (!done[p]);
      // effect happens at this edge: model it now
      unique case (c)
        MIU_RD_B, MIU_XCH_B: exp = {8'h00, ref_m[a]};
        MIU_RD_2, MIU_XCH_2: exp = {ref_m[8'(a + 1)], ref_m[a]};
        default:             exp = {ref_m[a], ref_m[8'(a + 1)]};
      endcase
      if (c != MIU_WR_B && c != MIU_WR_W && c != MIU_WR_2)
        check(rdata[p] == exp, $sformatf("port %0d cmd %s addr %0h rdata %h exp %h", p, c.name(), a, rdata[p], exp));
      if (c == MIU_WR_B || c == MIU_XCH_B) ref_m[a] = d[7:0];
      if (c == MIU_WR_W || c == MIU_XCH_W) begin
        ref_m[a] = d[15:8];
        ref_m[8'(a + 1)] = d[7:0];
      end
      if (c == MIU_WR_2 || c == MIU_XCH_2) begin
        ref_m[a] = d[7:0];
        ref_m[8'(a + 1)] = d[15:8];
      end
      req_valid[p] = 1'b0;
    end
  endtask

  // lock must be high for every transfer of an exchange
  int xch_transfers = 0, xch_locked = 0;
  always @(posedge clk) if (mem_en && mem_rdy &&
      (dut.cur_req.cmd == MIU_XCH_B || dut.cur_req.cmd == MIU_XCH_W)) begin
    xch_transfers++;
    if (mem_lock) xch_locked++;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int tcount;
    req_valid = '0;
    for (int i = 0; i < NP; i++) req[i] = '{cmd: MIU_RD_B, addr: '0, wdata: '0};
    for (int i = 0; i < 256; i++) ref_m[i] = 8'h00;
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (2) @(posedge clk);

    // priority: ports 2 and 1 request together, port 1 must finish first
    @(negedge clk);
    req[1] = '{cmd: MIU_WR_B, addr: 24'h20, wdata: 16'h0011};
    req[2] = '{cmd: MIU_WR_B, addr: 24'h20, wdata: 16'h0022};
    req_valid = 3'b110;
    do @(negedge clk); while (!(done[1] || done[2]));
    check(done[1] && !done[2], "lower port number served first");
    req_valid[1] = 1'b0;
    do @(negedge clk); while (!done[2]);
    req_valid[2] = 1'b0;
    check(mem.m[8'h20] == 8'h22, "second write lands last");
    ref_m[8'h20] = 8'h22;

    // transfer counts per command
    foreach (tcount_cmds[i]) begin
      tcount = mem.transfers;
      @(negedge clk);
      req[0] = '{cmd: tcount_cmds[i], addr: 24'h30, wdata: 16'h1234};
      req_valid[0] = 1'b1;
      do @(negedge clk); while (!done[0]);
      req_valid[0] = 1'b0;
      check(mem.transfers - tcount == tcount_exp[i],
            $sformatf("%s used %0d transfers", tcount_cmds[i].name(), mem.transfers - tcount));
      if (tcount_cmds[i] inside {MIU_WR_W, MIU_XCH_W}) begin
        ref_m[8'h30] = 8'h12; ref_m[8'h31] = 8'h34;
      end
      if (tcount_cmds[i] inside {MIU_WR_B, MIU_XCH_B}) ref_m[8'h30] = 8'h34;
      if (tcount_cmds[i] inside {MIU_WR_2, MIU_XCH_2}) begin
        check(mem.m[8'h30] == 8'h34 && mem.m[8'h31] == 8'h12, "two-byte write puts the low order byte first");
        ref_m[8'h30] = 8'h34; ref_m[8'h31] = 8'h12;
      end
      if (tcount_cmds[i] == MIU_RD_2)
        check(rdata[0] == {ref_m[8'h31], ref_m[8'h30]}, "two-byte read takes the low order byte first");
    end

    // random traffic from all three ports at once
    fork
      client(0, 300);
      client(1, 300);
      client(2, 300);
    join

    for (int i = 0; i < 32; i++)
      check(mem.m[i] == ref_m[i], $sformatf("final memory byte %0h = %h exp %h", i, mem.m[i], ref_m[i]));
    check(xch_transfers > 0 && xch_transfers == xch_locked, "mem_lock covers exchanges");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  miu_cmd_e tcount_cmds [9] = '{MIU_RD_B, MIU_RD_W, MIU_WR_B, MIU_WR_W, MIU_XCH_B, MIU_XCH_W,
                                MIU_WR_2, MIU_RD_2, MIU_XCH_2};
  int       tcount_exp  [9] = '{1, 2, 1, 2, 2, 4, 2, 2, 4};
endmodule

// tb_stat_dump: self-checking test of the statistics dump. The status words
// change every cycle (word i is a running counter plus i*0x1111), so a dump that is
// not taken as one snapshot shows words from different cycles. The testbench
// issues the statistics primitive with a destination address, waits until
// busy drops, and then checks: all words come from the same cycle, that
// cycle lies between the issue and the end, every word is high byte first at
// dst + 2*i (so the last word is in memory when busy drops), and nothing past
// the last word is written. A second dump to another address is checked too.
module tb_stat_dump;
  import x25_pkg::*;
  localparam int NW = 9;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;   // a falling edge, so the asynchronous reset acts at once
  always #5 clk = ~clk;

  logic st_do = 0, st_busy;
  addr_t st_ptr = '0;
  logic [15:0] stats [NW];
  logic [15:0] run_cnt = 16'h0100;
  always @(posedge clk) run_cnt <= run_cnt + 16'd3;
  always_comb for (int i = 0; i < NW; i++) stats[i] = run_cnt + 16'(i * 16'h1111);

  logic [0:0] mv, md;
  miu_req_t mr [1];
  logic [15:0] mrd [1];
  logic mem_en, mem_we, mem_lock, mem_rdy;
  addr_t mem_addr;
  logic [7:0] mem_wdata, mem_rdata;

  stat_dump #(.NW(NW)) dut (.clk, .rst_n, .st_do, .st_ptr, .st_busy, .stats,
                            .m_valid(mv[0]), .m_req(mr[0]), .m_done(md[0]), .m_rdata(mrd[0]));
  miu #(.NPORTS(1)) u_miu (.clk, .rst_n, .req_valid(mv), .req(mr), .done(md), .rdata(mrd),
                           .mem_en, .mem_we, .mem_lock, .mem_addr, .mem_wdata, .mem_rdy, .mem_rdata);
  mem_model #(.AW(12)) mem (.clk, .mem_en, .mem_we, .mem_addr, .mem_wdata, .mem_rdy, .mem_rdata);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  initial begin
    #200000 $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  task automatic dump(addr_t dst);
    logic [15:0] c0, c1, w0;
    int g = 0;
    bit same_cycle = 1;
    int d = int'(dst);
    for (int i = 0; i < 2*NW + 2; i++) mem.m[12'(d + i)] = 8'hFF;
    @(negedge clk) st_do = 1; st_ptr = dst; c0 = run_cnt;
    @(negedge clk) st_do = 0; st_ptr = '0;
    check(st_busy, "busy after issue");
    while (st_busy && g < 1000) begin @(negedge clk); g++; end
    c1 = run_cnt;
    check(!st_busy, "dump finished");
    w0 = {mem.m[12'(d)], mem.m[12'(d + 1)]};
    for (int i = 1; i < NW; i++)
      if ({mem.m[12'(d + 2*i)], mem.m[12'(d + 2*i + 1)]} != w0 + 16'(i * 16'h1111)) same_cycle = 0;
    check(same_cycle, "all words from one snapshot, high byte first");
    check(w0 >= c0 && w0 <= c1 && w0 != 16'hFFFF, $sformatf("snapshot taken during the primitive (%h in %h..%h)", w0, c0, c1));
    check(mem.m[12'(d + 2*NW)] == 8'hFF && mem.m[12'(d + 2*NW + 1)] == 8'hFF, "nothing written past the last word");
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (2) @(negedge clk);
    check(!st_busy && !mv[0], "idle after reset");
    dump(24'h000100);
    repeat (7) @(negedge clk);
    dump(24'h000345);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

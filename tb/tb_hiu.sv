// tb_hiu: self-checking test of the host interface unit with the memory
// interface unit and a memory model; the testbench plays the host.
// Checked: a command pointer written by the host and announced by attention
// is offered with the right value and the command area is cleared to null
// only after it is taken; attention on an empty command area offers nothing;
// a response waits while the response area is still full, is written once
// the host has emptied it, and raises the interrupt until acknowledged;
// commands and responses at the same time both complete.
module tb_hiu;
  import x25_pkg::*;
  localparam addr_t CA = 24'h000F00, RA = 24'h000F04;

  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;   // a falling edge, so the asynchronous reset acts at once
  always #5 clk = ~clk;

  logic host_attn, host_irq, host_irq_ack;
  logic cmd_valid, cmd_ready, rsp_valid, rsp_ready;
  addr_t cmd_ptr, rsp_ptr;
  logic m_valid, m_done;
  miu_req_t m_req;
  logic [15:0] m_rdata;
  logic [0:0] mv, md;
  miu_req_t mr [1];
  logic [15:0] mrd [1];
  logic mem_en, mem_we, mem_lock, mem_rdy;
  addr_t mem_addr;
  logic [7:0] mem_wdata, mem_rdata;

  hiu #(.CMD_AREA(CA), .RSP_AREA(RA), .POLL_GAP(8)) dut (.*);
  assign mv[0] = m_valid; assign mr[0] = m_req; assign m_done = md[0]; assign m_rdata = mrd[0];
  miu #(.NPORTS(1)) u_miu (.clk, .rst_n, .req_valid(mv), .req(mr), .done(md), .rdata(mrd),
                           .mem_en, .mem_we, .mem_lock, .mem_addr, .mem_wdata, .mem_rdy, .mem_rdata);
  mem_model #(.AW(12)) mem (.clk, .mem_en, .mem_we, .mem_addr, .mem_wdata, .mem_rdy, .mem_rdata);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  function automatic addr_t area(addr_t a);
    return {mem.m[a[11:0]], mem.m[a[11:0] + 1], mem.m[a[11:0] + 2]};
  endfunction
  task automatic set_area(addr_t a, addr_t v);
    mem.m[a[11:0]] = v[23:16]; mem.m[a[11:0] + 1] = v[15:8]; mem.m[a[11:0] + 2] = v[7:0];
  endtask

  task automatic host_command(addr_t p);
    // the host may only write a free command area
    while (area(CA) != NULL_PTR) @(negedge clk);
    set_area(CA, p);
    @(negedge clk) host_attn = 1'b1;
    @(negedge clk) host_attn = 1'b0;
  endtask

  task automatic take_command(addr_t exp);
    int n = 0;
    while (!cmd_valid && n < 200) begin @(negedge clk); n++; end
    check(cmd_valid && cmd_ptr == exp, $sformatf("command offered %h exp %h", cmd_ptr, exp));
    repeat (5) @(negedge clk);
    check(area(CA) == exp, "command area kept until taken");
    cmd_ready = 1'b1;
    @(negedge clk) cmd_ready = 1'b0;
    n = 0;
    while (area(CA) != NULL_PTR && n < 200) begin @(negedge clk); n++; end
    check(area(CA) == NULL_PTR, "command area cleared after take");
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    host_attn = 0; host_irq_ack = 0; cmd_ready = 0; rsp_valid = 0; rsp_ptr = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);

    // attention with an empty area: nothing offered
    @(negedge clk) host_attn = 1'b1;
    @(negedge clk) host_attn = 1'b0;
    repeat (40) begin
      @(negedge clk);
      if (cmd_valid) check(0, "command offered from empty area");
    end

    host_command(24'h000123);
    take_command(24'h000123);
    host_command(24'h00ABCD & 24'h000FFF);
    take_command(24'h000BCD);

    // response while the host still holds the previous one
    set_area(RA, 24'h000777);
    rsp_ptr = 24'h000456;
    rsp_valid = 1'b1;
    repeat (100) begin
      @(negedge clk);
      if (rsp_ready) check(0, "response written over a full area");
    end
    check(area(RA) == 24'h000777 && !host_irq, "full response area left alone");
    set_area(RA, NULL_PTR);     // host consumes the old response
    begin
      int n = 0;
      while (!rsp_ready && n < 200) begin @(negedge clk); n++; end
      check(rsp_ready, "response accepted");
    end
    rsp_valid = 1'b0;
    @(negedge clk);
    check(area(RA) == 24'h000456 && host_irq, "response pointer written, interrupt up");
    repeat (5) @(negedge clk);
    check(host_irq, "interrupt held");
    host_irq_ack = 1'b1;
    @(negedge clk) host_irq_ack = 1'b0;
    check(!host_irq, "interrupt cleared by ack");

    // both directions at once
    set_area(RA, NULL_PTR);
    rsp_ptr = 24'h000999; rsp_valid = 1'b1;
    fork
      begin host_command(24'h000321); take_command(24'h000321); end
      begin
        while (!rsp_ready) @(negedge clk);
        rsp_valid = 1'b0;
      end
    join
    @(negedge clk);
    check(area(RA) == 24'h000999, "concurrent response written");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

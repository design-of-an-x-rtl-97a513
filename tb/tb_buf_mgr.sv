// tb_buf_mgr: self-checking test of the on-chip buffer manager, connected to
// the memory interface unit and a memory model. Buffers are put on two free
// lists from two client ports, then taken out again. Checked against values
// worked out here: last-in-first-out order, the counts, the next pointers the
// lists leave in the descriptors in memory, a taken buffer's next pointer
// cleared to NULL, GET on an empty list reporting empty, and the request and
// release threshold flags.
module tb_buf_mgr;
  import x25_pkg::*;
  localparam int NL = 2, NC = 2;

  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;   // a falling edge, so the asynchronous reset acts at once
  always #5 clk = ~clk;

  logic [NC-1:0] cl_valid, cl_put, cl_done;
  logic [0:0]    cl_list [NC];
  addr_t         cl_ptr  [NC];
  addr_t         cl_ptr_out;
  logic          cl_empty;
  logic [15:0]   req_thresh, rel_thresh;
  logic [15:0]   count [NL];
  logic [NL-1:0] need_buf, excess;
  logic          m_valid, m_done;
  miu_req_t      m_req;
  logic [15:0]   m_rdata;

  logic [0:0] mv;
  miu_req_t mr [1];
  logic [0:0] md;
  logic [15:0] mrd [1];
  logic mem_en, mem_we, mem_lock, mem_rdy;
  addr_t mem_addr;
  logic [7:0] mem_wdata, mem_rdata;

  buf_mgr #(.NLISTS(NL), .NCLI(NC)) dut (.*);
  assign mv[0] = m_valid;
  assign mr[0] = m_req;
  assign m_done = md[0];
  assign m_rdata = mrd[0];
  miu #(.NPORTS(1)) u_miu (.clk, .rst_n, .req_valid(mv), .req(mr), .done(md), .rdata(mrd),
                           .mem_en, .mem_we, .mem_lock, .mem_addr, .mem_wdata, .mem_rdy, .mem_rdata);
  mem_model #(.AW(12)) mem (.clk, .mem_en, .mem_we, .mem_addr, .mem_wdata, .mem_rdy, .mem_rdata);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic op(input int c, input bit put, input int l, input addr_t p,
                    output addr_t got, output bit empty);
    @(negedge clk);
    cl_valid[c] = 1'b1; cl_put[c] = put; cl_list[c] = 1'(l); cl_ptr[c] = p;
    do @(negedge clk); while (!cl_done[c]);
    got = cl_ptr_out; empty = cl_empty;
    cl_valid[c] = 1'b0;
  endtask

  function automatic addr_t rd_next(addr_t d);
    return {mem.m[d[11:0]], mem.m[d[11:0] + 1], mem.m[d[11:0] + 2]};
  endfunction

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    addr_t got, dsc [2][6];
    bit empty;
    cl_valid = '0; cl_put = '0;
    foreach (cl_list[i]) begin cl_list[i] = '0; cl_ptr[i] = '0; end
    req_thresh = 16'd2; rel_thresh = 16'd4;
    // pre-fill descriptors' next fields with garbage
    for (int i = 0; i < 4096; i++) mem.m[i] = 8'hA5;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    check(need_buf == 2'b11 && excess == 2'b00, "empty lists need buffers");

    // empty GET
    op(0, 0, 1, '0, got, empty);
    check(empty && got == NULL_PTR, "GET on empty list reports empty");

    // fill: list 0 from client 1, list 1 from client 0
    for (int k = 0; k < 6; k++) begin
      dsc[0][k] = addr_t'(24'h000100 + 16 * k);
      dsc[1][k] = addr_t'(24'h000400 + 16 * k);
      op(1, 1, 0, dsc[0][k], got, empty);
      op(0, 1, 1, dsc[1][k], got, empty);
    end
    check(count[0] == 6 && count[1] == 6, "counts after 6 puts");
    check(excess == 2'b11 && need_buf == 2'b00, "over release threshold");
    // chain in memory: each descriptor points at the one put before it
    for (int k = 0; k < 6; k++) begin
      check(rd_next(dsc[0][k]) == (k == 0 ? NULL_PTR : dsc[0][k-1]), $sformatf("list0 link %0d", k));
      check(rd_next(dsc[1][k]) == (k == 0 ? NULL_PTR : dsc[1][k-1]), $sformatf("list1 link %0d", k));
    end

    // take all of list 0 back: LIFO
    for (int k = 5; k >= 0; k--) begin
      op(k % 2, 0, 0, '0, got, empty);
      check(!empty && got == dsc[0][k], $sformatf("GET order %0d got %h", k, got));
      check(rd_next(got) == NULL_PTR, "taken buffer unlinked");
      if (k == 3) check(count[0] == 3 && !excess[0] && !need_buf[0], "between thresholds");
    end
    check(count[0] == 0 && need_buf[0], "list 0 empty again");
    op(0, 0, 0, '0, got, empty);
    check(empty, "list 0 GET empty");
    check(count[1] == 6, "list 1 untouched");
    op(1, 0, 1, '0, got, empty);
    check(got == dsc[1][5] && count[1] == 5, "list 1 GET head");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

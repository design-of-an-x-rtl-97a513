// tb_ll2_tx_mem: self-checking test of the transmit memory interface with the
// memory interface unit and a memory model. The testbench builds buffer
// chains in memory (descriptors and data), starts the unit and takes the bits
// at random moments, comparing every bit with the expected data (whole bytes,
// least significant bit first, then data_remain low bits of one more byte).
// Checked: single buffer, a chain of three buffers with remain bits in the
// middle one, an empty buffer in a chain, eoc only after the last bit, stop
// in the middle of a chain followed by a fresh start.
module tb_ll2_tx_mem;
  import x25_pkg::*;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;   // a falling edge, so the asynchronous reset acts at once
  always #5 clk = ~clk;

  logic start = 0, stop = 0, bit_take = 0, bit_valid, bit_data, eoc;
  addr_t first_desc = '0;
  logic m_valid, m_done;
  miu_req_t m_req;
  logic [15:0] m_rdata;
  logic [0:0] mv, md;
  miu_req_t mr [1];
  logic [15:0] mrd [1];
  logic mem_en, mem_we, mem_lock, mem_rdy;
  addr_t mem_addr;
  logic [7:0] mem_wdata, mem_rdata;

  ll2_tx_mem dut (.*);
  assign mv[0] = m_valid; assign mr[0] = m_req; assign m_done = md[0]; assign m_rdata = mrd[0];
  miu #(.NPORTS(1)) u_miu (.clk, .rst_n, .req_valid(mv), .req(mr), .done(md), .rdata(mrd),
                           .mem_en, .mem_we, .mem_lock, .mem_addr, .mem_wdata, .mem_rdy, .mem_rdata);
  mem_model #(.AW(12)) mem (.clk, .mem_en, .mem_we, .mem_addr, .mem_wdata, .mem_rdy, .mem_rdata);

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

  bit expq[$];

  // descriptor at d; data bytes at b; next, dlen whole bytes, rem extra bits
  task automatic put_buf(int d, int nxt, int b, int dlen, int rem, int seed);
    mem.m[d+0] = 8'(nxt >> 16); mem.m[d+1] = 8'(nxt >> 8); mem.m[d+2] = 8'(nxt);
    mem.m[d+3] = 8'(b >> 16);   mem.m[d+4] = 8'(b >> 8);   mem.m[d+5] = 8'(b);
    mem.m[d+6] = 8'h01;         mem.m[d+7] = 8'h00;
    mem.m[d+8] = 8'(b >> 16);   mem.m[d+9] = 8'(b >> 8);   mem.m[d+10] = 8'(b);
    mem.m[d+11] = 8'(dlen >> 8); mem.m[d+12] = 8'(dlen);
    mem.m[d+13] = 8'(rem);
    for (int i = 0; i < dlen + (rem != 0 ? 1 : 0); i++) begin
      logic [7:0] v;
      v = 8'((seed * 37 + i * 11) ^ (i << 3));
      mem.m[b+i] = v;
      for (int k = 0; k < ((i < dlen) ? 8 : rem); k++) expq.push_back(v[k]);
    end
  endtask

  // take bits until the chain ends (or max bits when stopping early)
  task automatic drain(int max_bits, bit expect_eoc);
    int got = 0, guard = 0;
    while (got < max_bits && guard < 200000) begin
      @(negedge clk);
      guard++;
      if (bit_valid && ($urandom % 3 == 0)) begin
        bit e;
        check(expq.size() > 0, "bit beyond the expected data");
        e = (expq.size() > 0) ? expq.pop_front() : 1'b0;
        check(bit_data == e, $sformatf("bit %0d value", got));
        check(!eoc, "eoc while bits remain");
        bit_take = 1;
        @(negedge clk) bit_take = 0;
        got++;
      end else if (eoc) break;
    end
    if (expect_eoc) begin
      repeat (40) @(negedge clk);
      check(eoc, "eoc at the end of the chain");
      check(!bit_valid, "no bit after the end");
      check(expq.size() == 0, $sformatf("all bits delivered (%0d left)", expq.size()));
    end
  endtask

  task automatic go(int d);
    @(negedge clk) start = 1; first_desc = addr_t'(d);
    @(negedge clk) start = 0;
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    check(!bit_valid, "no bits after reset");
    // 1: one buffer of 5 bytes
    expq.delete();
    put_buf(32'h100, 0, 32'h400, 5, 0, 1);
    go(32'h100); drain(1000, 1);
    // 2: three buffers, remain bits in the middle one, empty middle-length one
    expq.delete();
    put_buf(32'h120, 32'h140, 32'h500, 3, 0, 2);
    put_buf(32'h140, 32'h160, 32'h540, 2, 5, 3);
    put_buf(32'h160, 32'h180, 32'h580, 0, 0, 4);
    put_buf(32'h180, 0,       32'h5C0, 4, 3, 5);
    go(32'h120); drain(1000, 1);
    // 3: stop in the middle, then a fresh chain
    expq.delete();
    put_buf(32'h200, 32'h220, 32'h600, 6, 0, 6);
    put_buf(32'h220, 0,       32'h640, 6, 0, 7);
    go(32'h200); drain(30, 0);
    @(negedge clk) stop = 1;
    @(negedge clk) stop = 0;
    check(!bit_valid, "stop empties the output");
    expq.delete();
    put_buf(32'h240, 0, 32'h680, 2, 1, 8);
    go(32'h240); drain(1000, 1);
    // 4: a null first pointer is an empty chain
    go(0);
    repeat (5) @(negedge clk);
    check(eoc && !bit_valid, "null chain ends at once");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

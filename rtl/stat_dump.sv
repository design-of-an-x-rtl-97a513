// stat_dump: statistics query. On a statistics primitive it copies the
// co-processor's status registers into shared memory, where the host can
// collect them.
//
// The primitive is a primitive control block with one parameter, the memory
// address to dump to. The issuer (the host side or high level 2) presents
// the address with do_prim and then sees busy until the dump is complete.
// On attention the unit takes a snapshot of all NW status words in one
// cycle, so the dump is consistent even though the other units keep running
// (the line cannot be stopped). It then writes word i to dst + 2*i (high
// byte first, as every word in memory) through its MIU port. It acknowledges
// the primitive after the last write, which drops busy.
//
// Following the design: a special primitive for the statistics query, and
// dumping the status registers into shared memory for the host to collect
// and sort. This design's own choices: the snapshot instead of suspending
// the units, the word layout in memory (set by the order of the stats input,
// see the top level), and that the issuer supplies the address.
//
// Interface: stats[i] are the live status words. The MIU port follows the
// MIU request/done handshake; a dump of NW words takes NW word writes.
module stat_dump
  import x25_pkg::*;
#(
  parameter int unsigned NW = 9
) (
  input  logic        clk,
  input  logic        rst_n,
  // statistics primitive (issued from outside)
  input  logic        st_do,
  input  addr_t       st_ptr,
  output logic        st_busy,
  // status words
  input  logic [15:0] stats [NW],
  // MIU port
  output logic        m_valid,
  output miu_req_t    m_req,
  input  logic        m_done,
  input  logic [15:0] m_rdata
);
  localparam int unsigned IW = (NW > 1) ? $clog2(NW) : 1;

  logic        atn, ack;
  addr_t       dst;
  logic [15:0] snap [NW];
  logic        run;
  logic [IW-1:0] idx;

  pcb u_pcb (.clk, .rst_n, .do_prim(st_do), .ack, .busy(st_busy), .atn);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dst <= NULL_PTR; run <= 1'b0; idx <= '0;
      for (int i = 0; i < NW; i++) snap[i] <= '0;
    end else begin
      if (st_do) dst <= st_ptr;
      if (atn && !run && !ack) begin
        run <= 1'b1;
        idx <= '0;
        for (int i = 0; i < NW; i++) snap[i] <= stats[i];
      end else if (run && m_done) begin
        if (32'(idx) == NW - 1) run <= 1'b0;
        else                    idx <= idx + 1'b1;
      end
    end
  end

  // the primitive is acknowledged in the cycle the last word is written
  assign ack     = run && m_done && (32'(idx) == NW - 1);
  assign m_valid = run;
  assign m_req   = '{cmd: MIU_WR_W, addr: dst + addr_t'({idx, 1'b0}), wdata: snap[idx]};

  // read data is not used: the unit only writes
  logic unused_rdata;
  assign unused_rdata = ^m_rdata;
endmodule

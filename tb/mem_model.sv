// mem_model: behavioural model of the shared memory on the co-processor's
// byte-wide memory bus. Not part of the design: the memory is an ordinary
// external RAM. It answers a transfer (mem_en high) by raising mem_rdy after
// a delay of 0..MAX_WAIT cycles, chosen at random when WAIT_RANDOM is set, and
// returns read data in that cycle. Only the low AW address bits are decoded.
// Testbenches reach the array 'm' directly to load and inspect memory.
module mem_model #(
  parameter int unsigned AW          = 16,
  parameter int unsigned MAX_WAIT    = 2,
  parameter bit          WAIT_RANDOM = 1'b1
) (
  input  logic        clk,
  input  logic        mem_en,
  input  logic        mem_we,
  input  logic [23:0] mem_addr,
  input  logic [7:0]  mem_wdata,
  output logic        mem_rdy,
  output logic [7:0]  mem_rdata
);
  logic [7:0] m [2**AW];
  int unsigned wait_cnt = 0;
  int unsigned target   = 0;
  int unsigned transfers = 0;

  initial for (int i = 0; i < 2**AW; i++) m[i] = 8'h00;

  assign mem_rdy   = mem_en && (wait_cnt >= target);
  assign mem_rdata = m[mem_addr[AW-1:0]];

  always_ff @(posedge clk) begin
    if (mem_en && mem_rdy) begin
      if (mem_we) m[mem_addr[AW-1:0]] <= mem_wdata;
      transfers <= transfers + 1;
      wait_cnt  <= 0;
      target    <= WAIT_RANDOM ? ($urandom % (MAX_WAIT + 1)) : MAX_WAIT;
    end else if (mem_en) begin
      wait_cnt <= wait_cnt + 1;
    end
  end
endmodule

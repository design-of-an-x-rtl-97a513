// timer_unit: timer management unit.
//
// One timer facility serves every block that needs protocol timers. A
// prescaler divides the system clock by a start-up value (presc+1) into a
// reference tick that advances a CLK_W-bit real-time clock. Each client port
// passes two commands in, START (timer id, value in ticks) and STOP (timer
// id), and gets one message out, TIMER EXPIRED (timer id). The unit tags
// each timer with the port it came from, so ids need only be unique per port.
// A started timer stores its expiry time, the current clock plus the value
// modulo 2**CLK_W; when the clock reaches it the timer moves from the running
// to the expired set, and expired timers are reported one at a time per port
// and then returned to the free set. START fails with NO_RECORD when all
// records are in use and with TOO_LONG when the value is not below the clock
// modulus; STOP fails with NOT_FOUND.
//
// Following the design: the three messages, the port tagging, the expiry
// arithmetic, the free/running/expired record sets and the error codes. The
// design keeps the records as linked lists, preferably in memory; this unit
// keeps NREC records on chip (the design allows that for a few timers) and
// compares every running record with the clock in parallel, so no sorted
// list is needed. Also this design's own choices: a START for an id that is
// running or expired on that port restarts it; a value of 0 is taken as 1
// tick; NREC, CLK_W and the widths are not given by the design.
//
// Command protocol: hold cmd_valid[p] with cmd_op/cmd_id/cmd_time stable
// until cmd_done[p] pulses; cmd_err is valid in that cycle. Commands are
// taken one every two cycles, port 0 first. Expired protocol: exp_valid[p]
// with exp_id[p] stay up until exp_ack[p]; a timer of value v started between
// ticks expires on the v-th tick after it was started.
module timer_unit
  import x25_pkg::*;
#(
  parameter int unsigned NPORTS = 4,
  parameter int unsigned NREC   = 16,
  parameter int unsigned ID_W   = 8,
  parameter int unsigned CLK_W  = 12,
  parameter int unsigned TIME_W = 16,
  parameter int unsigned PRE_W  = 16
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic [PRE_W-1:0]    presc,          // start-up: tick every presc+1 cycles
  output logic [CLK_W-1:0]    now,
  output logic                tick,
  // commands
  input  logic [NPORTS-1:0]   cmd_valid,
  input  tmr_op_e             cmd_op   [NPORTS],
  input  logic [ID_W-1:0]     cmd_id   [NPORTS],
  input  logic [TIME_W-1:0]   cmd_time [NPORTS],
  output logic [NPORTS-1:0]   cmd_done,
  output tmr_err_e            cmd_err,
  // expiry messages
  output logic [NPORTS-1:0]   exp_valid,
  output logic [ID_W-1:0]     exp_id   [NPORTS],
  input  logic [NPORTS-1:0]   exp_ack,
  output logic [$clog2(NREC+1)-1:0] free_count
);
  localparam int unsigned PW = (NPORTS > 1) ? $clog2(NPORTS) : 1;
  localparam int unsigned RW = (NREC > 1) ? $clog2(NREC) : 1;

  typedef enum logic [1:0] {R_FREE, R_RUN, R_EXP} rstate_e;

  rstate_e          r_st   [NREC];
  logic [PW-1:0]    r_port [NREC];
  logic [ID_W-1:0]  r_id   [NREC];
  logic [CLK_W-1:0] r_exp  [NREC];

  // prescaler and real-time clock
  logic [PRE_W-1:0] pre_cnt;
  assign tick = (pre_cnt == presc);

  // command arbitration (one every two cycles)
  logic          phase;     // 1: the cycle after a command, done is shown
  logic [PW-1:0] pick;
  logic          any;
  always_comb begin
    pick = '0;
    any  = 1'b0;
    for (int i = NPORTS - 1; i >= 0; i--)
      if (cmd_valid[i]) begin
        pick = PW'(i);
        any  = 1'b1;
      end
  end

  // record lookup for the picked command
  logic          hit, has_free;
  logic [RW-1:0] hit_idx, free_idx;
  always_comb begin
    hit = 1'b0; hit_idx = '0; has_free = 1'b0; free_idx = '0;
    for (int r = NREC - 1; r >= 0; r--) begin
      if (r_st[r] != R_FREE && r_port[r] == pick && r_id[r] == cmd_id[pick]) begin
        hit = 1'b1; hit_idx = RW'(r);
      end
      if (r_st[r] == R_FREE) begin
        has_free = 1'b1; free_idx = RW'(r);
      end
    end
  end

  logic [TIME_W-1:0] val;
  assign val = (cmd_time[pick] == '0) ? TIME_W'(1) : cmd_time[pick];
  logic too_long;
  assign too_long = (TIME_W > CLK_W) && ((val >> CLK_W) != '0);

  // expired record to report per port
  logic [RW-1:0] exp_idx [NPORTS];
  always_comb begin
    for (int p = 0; p < NPORTS; p++) begin
      exp_valid[p] = 1'b0;
      exp_idx[p]   = '0;
      for (int r = NREC - 1; r >= 0; r--)
        if (r_st[r] == R_EXP && r_port[r] == PW'(p)) begin
          exp_valid[p] = 1'b1;
          exp_idx[p]   = RW'(r);
        end
      exp_id[p] = r_id[exp_idx[p]];
    end
  end

  always_comb begin
    free_count = '0;
    for (int r = 0; r < NREC; r++) if (r_st[r] == R_FREE) free_count = free_count + 1'b1;
  end

  logic [PW-1:0] done_port;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pre_cnt   <= '0;
      now       <= '0;
      phase     <= 1'b0;
      done_port <= '0;
      cmd_err   <= TMR_OK;
      for (int r = 0; r < NREC; r++) begin
        r_st[r] <= R_FREE; r_port[r] <= '0; r_id[r] <= '0; r_exp[r] <= '0;
      end
    end else begin
      // clock tick: running records that reach their time expire
      if (tick) begin
        pre_cnt <= '0;
        now     <= now + 1'b1;
        for (int r = 0; r < NREC; r++)
          if (r_st[r] == R_RUN && r_exp[r] == now + 1'b1) r_st[r] <= R_EXP;
      end else begin
        pre_cnt <= pre_cnt + 1'b1;
      end

      // expiry messages taken: record back to the free set
      for (int p = 0; p < NPORTS; p++)
        if (exp_ack[p] && exp_valid[p]) r_st[exp_idx[p]] <= R_FREE;

      // commands
      if (phase) begin
        phase <= 1'b0;
      end else if (any) begin
        phase     <= 1'b1;
        done_port <= pick;
        if (cmd_op[pick] == TMR_START) begin
          if (too_long) cmd_err <= TMR_TOO_LONG;
          else if (!hit && !has_free) cmd_err <= TMR_NO_RECORD;
          else begin
            cmd_err <= TMR_OK;
            r_st  [hit ? hit_idx : free_idx] <= R_RUN;
            r_port[hit ? hit_idx : free_idx] <= pick;
            r_id  [hit ? hit_idx : free_idx] <= cmd_id[pick];
            r_exp [hit ? hit_idx : free_idx] <= now + CLK_W'(val) + CLK_W'(tick);
          end
        end else begin
          if (hit) begin
            cmd_err <= TMR_OK;
            r_st[hit_idx] <= R_FREE;
          end else cmd_err <= TMR_NOT_FOUND;
        end
      end
    end
  end

  always_comb
    for (int p = 0; p < NPORTS; p++) cmd_done[p] = phase && (done_port == PW'(p));
endmodule

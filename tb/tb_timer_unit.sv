// tb_timer_unit: self-checking test of the timer management unit.
// The prescaler is set to 3, so a tick comes every 4 cycles; the testbench
// counts ticks itself. Directed part: a timer started with value v reports
// expiry exactly v ticks later on the port that started it; STOP cancels a
// running timer (it never expires) and STOP of an unknown id gives NOT_FOUND;
// a value not below 2**CLK_W gives TOO_LONG; starting NREC+1 timers gives
// NO_RECORD; a restart moves the expiry. Random part: four ports start and
// stop timers at random while a monitor checks every expiry against the tick
// at which it is due and that no timer is lost.
module tb_timer_unit;
  import x25_pkg::*;
  localparam int NP = 4, NR = 8, CW = 8;

  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;   // a falling edge, so the asynchronous reset acts at once
  always #5 clk = ~clk;

  logic [15:0]   presc;
  logic [CW-1:0] now;
  logic          tick;
  logic [NP-1:0] cmd_valid, cmd_done, exp_valid, exp_ack;
  tmr_op_e       cmd_op [NP];
  logic [7:0]    cmd_id [NP];
  logic [15:0]   cmd_time [NP];
  tmr_err_e      cmd_err;
  logic [7:0]    exp_id [NP];
  logic [$clog2(NR+1)-1:0] free_count;

  timer_unit #(.NPORTS(NP), .NREC(NR), .CLK_W(CW)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  int ticks = 0;
  always @(posedge clk) if (rst_n && tick) ticks <= ticks + 1;

  int due [int];          // key port*256+id -> tick count at which it expires
  int expiries = 0;
  bit strict = 1'b1;

  // expiry monitor and acknowledger
  initial begin
    exp_ack = '0;
    forever begin
      @(negedge clk);
      for (int p = 0; p < NP; p++) begin
        if (exp_ack[p]) exp_ack[p] = 1'b0;
        else if (exp_valid[p]) begin
          automatic int key = p * 256 + int'(exp_id[p]);
          expiries++;
          if (!due.exists(key)) check(0, $sformatf("unexpected expiry port %0d id %0d", p, exp_id[p]));
          else begin
            if (strict) check(ticks == due[key], $sformatf("port %0d id %0d expired at tick %0d, due %0d", p, exp_id[p], ticks, due[key]));
            else        check(ticks >= due[key] && ticks <= due[key] + 1, $sformatf("port %0d id %0d expired at tick %0d, due %0d", p, exp_id[p], ticks, due[key]));
            due.delete(key);
          end
          exp_ack[p] = 1'b1;
        end
      end
    end
  end

  task automatic cmd(input int p, input tmr_op_e op, input int id, input int v, output tmr_err_e err);
    @(negedge clk);
    cmd_valid[p] = 1'b1; cmd_op[p] = op; cmd_id[p] = 8'(id); cmd_time[p] = 16'(v);
    do @(negedge clk); while (!cmd_done[p]);
    err = cmd_err;
    cmd_valid[p] = 1'b0;
    if (err == TMR_OK) begin
      if (op == TMR_START) due[p * 256 + id] = ticks + (v == 0 ? 1 : v);
      else due.delete(p * 256 + id);
    end
  endtask

  task automatic rand_port(input int pp);
    for (int k = 0; k < 60; k++) begin
      tmr_err_e ee;
      int id;
      id = $urandom % 4;
      if ($urandom % 4 == 0) cmd(pp, TMR_STOP, id, 0, ee);
      else cmd(pp, TMR_START, id, 1 + $urandom % 12, ee);
      repeat ($urandom % 20) @(posedge clk);
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    tmr_err_e e;
    cmd_valid = '0;
    foreach (cmd_op[i]) begin cmd_op[i] = TMR_START; cmd_id[i] = '0; cmd_time[i] = '0; end
    presc = 16'd3;
    repeat (3) @(posedge clk);
    rst_n = 1;
    check(free_count == NR, "all records free after reset");

    // prescaler: 4 cycles per tick
    begin
      automatic int t0 = ticks;
      repeat (40) @(posedge clk);
      @(negedge clk);
      check(ticks - t0 == 10, $sformatf("40 cycles gave %0d ticks", ticks - t0));
    end

    cmd(0, TMR_START, 5, 7, e);   check(e == TMR_OK, "start ok");
    cmd(2, TMR_START, 5, 3, e);   check(e == TMR_OK, "same id other port ok");
    cmd(1, TMR_START, 9, 20, e);  check(e == TMR_OK, "start ok 2");
    cmd(1, TMR_STOP,  9, 0, e);   check(e == TMR_OK, "stop running");
    cmd(1, TMR_STOP,  9, 0, e);   check(e == TMR_NOT_FOUND, "stop again: not found");
    cmd(3, TMR_START, 1, 256, e); check(e == TMR_TOO_LONG, "256 ticks too long for 8-bit clock");
    cmd(3, TMR_START, 1, 255, e); check(e == TMR_OK, "255 ticks fits");
    cmd(3, TMR_STOP,  1, 0, e);
    repeat (60) @(posedge clk);
    check(due.size() == 0, "both timers expired");

    // restart moves the expiry
    cmd(0, TMR_START, 4, 5, e);
    repeat (12) @(posedge clk);
    cmd(0, TMR_START, 4, 6, e);   check(e == TMR_OK, "restart ok");
    repeat (40) @(posedge clk);
    check(due.size() == 0, "restarted timer expired once");

    // run out of records
    for (int i = 0; i < NR; i++) begin
      cmd(i % NP, TMR_START, 100 + i, 50, e);
      check(e == TMR_OK, "fill record");
    end
    check(free_count == 0, "no free records");
    cmd(0, TMR_START, 200, 5, e); check(e == TMR_NO_RECORD, "no record left");
    repeat (260) @(posedge clk);
    check(due.size() == 0 && free_count == NR, "all filled timers expired and freed");

    // random traffic from all ports
    strict = 1'b0;
    fork
      rand_port(0);
      rand_port(1);
      rand_port(2);
      rand_port(3);
    join
    repeat (80) @(posedge clk);
    check(due.size() == 0, $sformatf("%0d timers never expired", due.size()));
    check(free_count == NR, "all records free at the end");
    check(expiries > 20, "expiries seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

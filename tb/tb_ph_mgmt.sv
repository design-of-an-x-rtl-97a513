// tb_ph_mgmt: self-checking test of the physical-layer management primitives.
// The testbench plays layer 2 management and layer 1. For every primitive it
// checks busy on the issuing side and attention on the accepting side, that
// the parameters are held from do_prim to the acknowledge even when the
// issuer's inputs change, and that the acknowledge ends the primitive. It
// also checks the connection state: set with mode and type by an accepted
// activate indication, kept while a deactivate indication is still pending,
// cleared by an accepted deactivate indication or deactivate request, and
// untouched by an activate request.
module tb_ph_mgmt;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;   // a falling edge, so the asynchronous reset acts at once
  always #5 clk = ~clk;

  logic actr_do = 0, actr_tot_in = 0, actr_ack = 0;
  logic [1:0] actr_moo_in = 0;
  logic acti_do = 0, acti_tot_in = 0, acti_ack = 0;
  logic [1:0] acti_moo_in = 0;
  logic deactr_do = 0, deactr_ack = 0;
  logic deacti_do = 0, deacti_orig_in = 0, deacti_ack = 0;
  logic actr_busy, actr_atn, actr_tot, acti_busy, acti_atn, acti_tot;
  logic [1:0] actr_moo, acti_moo, active_moo;
  logic deactr_busy, deactr_atn, deacti_busy, deacti_atn, deacti_orig;
  logic active, active_tot;

  ph_mgmt dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  initial begin
    #100000 $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    check(!active && !actr_busy && !acti_atn && !deactr_atn && !deacti_atn, "idle after reset");

    // PH-ACTIVATE-REQUEST: synchronous, half duplex
    actr_do = 1; actr_tot_in = 0; actr_moo_in = 2'd1;
    @(negedge clk) actr_do = 0; actr_tot_in = 1; actr_moo_in = 2'd3;
    check(actr_busy && actr_atn, "activate request pending");
    check(actr_tot == 0 && actr_moo == 2'd1, "activate request parameters held");
    repeat (5) @(negedge clk);
    check(actr_atn && actr_moo == 2'd1, "still pending until layer 1 accepts");
    actr_ack = 1;
    @(negedge clk) actr_ack = 0;
    check(!actr_busy && !actr_atn, "activate request accepted");
    check(!active, "an activate request alone does not activate");

    // PH-ACTIVATE-INDICATION: asynchronous, simplex
    acti_do = 1; acti_tot_in = 1; acti_moo_in = 2'd2;
    @(negedge clk) acti_do = 0; acti_tot_in = 0; acti_moo_in = 2'd0;
    check(acti_busy && acti_atn && acti_tot && acti_moo == 2'd2, "activate indication pending with parameters");
    check(!active, "not active before layer 2 accepts");
    acti_ack = 1;
    @(negedge clk) acti_ack = 0;
    check(!acti_busy && active && active_tot && active_moo == 2'd2, "active with mode and type");

    // PH-DEACTIVATE-INDICATION from the remote side
    deacti_do = 1; deacti_orig_in = 1;
    @(negedge clk) deacti_do = 0; deacti_orig_in = 0;
    check(deacti_atn && deacti_busy && deacti_orig, "deactivate indication pending with originator");
    repeat (4) @(negedge clk);
    check(active, "still active while the indication is pending");
    deacti_ack = 1;
    @(negedge clk) deacti_ack = 0;
    check(!deacti_busy && !active, "deactivated by the indication");

    // activate again, synchronous duplex, then PH-DEACTIVATE-REQUEST
    acti_do = 1; acti_tot_in = 0; acti_moo_in = 2'd0;
    @(negedge clk) acti_do = 0;
    acti_ack = 1;
    @(negedge clk) acti_ack = 0;
    check(active && !active_tot && active_moo == 2'd0, "active again, duplex");
    deactr_do = 1;
    @(negedge clk) deactr_do = 0;
    check(deactr_busy && deactr_atn && active, "deactivate request pending");
    deactr_ack = 1;
    @(negedge clk) deactr_ack = 0;
    check(!deactr_busy && !active, "deactivated by the request");

    // a local deactivate indication keeps its own originator value
    deacti_do = 1; deacti_orig_in = 0;
    @(negedge clk) deacti_do = 0; deacti_orig_in = 1;
    check(deacti_atn && !deacti_orig, "local originator");
    deacti_ack = 1;
    @(negedge clk) deacti_ack = 0;
    check(!deacti_atn && !active, "indication ended");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

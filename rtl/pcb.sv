// pcb: primitive control block.
//
// Every service primitive between two blocks (a request from layer N+1 to
// layer N, or an indication the other way) is synchronised by one request
// flip-flop. The issuing side writes the primitive's parameter registers and
// then pulses do_prim, which sets the flip-flop; both sides see its output,
// as busy on the issuing side and as atn (attention) on the accepting side.
// The accepting side copies the parameters and pulses ack, which resets the
// flip-flop; the primitive is considered to take place at that moment and the
// port is free for the next one. The set/reset flip-flop and the two signal
// names on each side follow the design; that do_prim is ignored while the
// flip-flop is set and ack while it is clear is this design's choice, and the
// assertions below flag either as a protocol error.
//
// Timing: busy/atn rise the cycle after do_prim and fall the cycle after ack.
module pcb (
  input  logic clk,
  input  logic rst_n,
  input  logic do_prim,   // from the issuing side: set the request
  input  logic ack,       // from the accepting side: reset the request
  output logic busy,      // to the issuing side: primitive pending
  output logic atn        // to the accepting side: primitive pending
);
  logic q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)              q <= 1'b0;
    else if (q && ack)       q <= 1'b0;
    else if (!q && do_prim)  q <= 1'b1;
  end

  assign busy = q;
  assign atn  = q;

  // A new primitive may only be started on a free port, and only a pending
  // primitive can be acknowledged.
  a_do_when_free: assert property (@(posedge clk) do_prim |-> !q);
  a_ack_when_set: assert property (@(posedge clk) ack |-> q);
endmodule

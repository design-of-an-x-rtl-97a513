// ph_mgmt: the physical-layer management primitives between layer 2 (its
// layer management) and layer 1: PH-ACTIVATE-REQUEST, PH-ACTIVATE-INDICATION,
// PH-DEACTIVATE-REQUEST and PH-DEACTIVATE-INDICATION.
//
// Each primitive is a primitive control block plus its parameter registers.
// The issuer presents the parameters with its do_prim pulse; they are loaded
// into the registers in that cycle and held for the acceptor, who sees atn
// and answers with ack, which clears the block. The issuer sees busy while
// the primitive is pending and may not issue it again until busy falls.
//   PH-ACTIVATE-REQUEST     layer 2 -> layer 1, type of transfer, mode of operation
//   PH-ACTIVATE-INDICATION  layer 1 -> layer 2, type of transfer, mode of operation
//   PH-DEACTIVATE-REQUEST   layer 2 -> layer 1, no parameters
//   PH-DEACTIVATE-INDICATION layer 1 -> layer 2, originator
// The unit also keeps the state of the physical connection as layer 2 knows
// it: 'active' is set when layer 2 accepts an activate indication, with the
// mode and type given there, and cleared when layer 2 accepts a deactivate
// indication or layer 1 accepts a deactivate request. The low level 2 units
// and high level 2 can read it; it does not block data primitives.
//
// Following the design: the four primitives, a primitive control block for
// each, the parameters type of transfer and mode of operation for the
// activate primitives and the originator for the deactivate indication.
// This design's own choices: the encodings (ToT 0 synchronous, 1
// asynchronous; MoO 0 duplex, 1 half duplex, 2 simplex; originator 0 local
// layer 1, 1 remote), loading the registers with do_prim, and the connection
// state output.
module ph_mgmt (
  input  logic       clk,
  input  logic       rst_n,
  // PH-ACTIVATE-REQUEST (layer 2 issues)
  input  logic       actr_do,
  input  logic       actr_tot_in,
  input  logic [1:0] actr_moo_in,
  output logic       actr_busy,
  output logic       actr_atn,
  input  logic       actr_ack,
  output logic       actr_tot,
  output logic [1:0] actr_moo,
  // PH-ACTIVATE-INDICATION (layer 1 issues)
  input  logic       acti_do,
  input  logic       acti_tot_in,
  input  logic [1:0] acti_moo_in,
  output logic       acti_busy,
  output logic       acti_atn,
  input  logic       acti_ack,
  output logic       acti_tot,
  output logic [1:0] acti_moo,
  // PH-DEACTIVATE-REQUEST (layer 2 issues)
  input  logic       deactr_do,
  output logic       deactr_busy,
  output logic       deactr_atn,
  input  logic       deactr_ack,
  // PH-DEACTIVATE-INDICATION (layer 1 issues)
  input  logic       deacti_do,
  input  logic       deacti_orig_in,
  output logic       deacti_busy,
  output logic       deacti_atn,
  input  logic       deacti_ack,
  output logic       deacti_orig,
  // physical connection state seen by layer 2
  output logic       active,
  output logic       active_tot,
  output logic [1:0] active_moo
);
  pcb u_actr   (.clk, .rst_n, .do_prim(actr_do),   .ack(actr_ack),   .busy(actr_busy),   .atn(actr_atn));
  pcb u_acti   (.clk, .rst_n, .do_prim(acti_do),   .ack(acti_ack),   .busy(acti_busy),   .atn(acti_atn));
  pcb u_deactr (.clk, .rst_n, .do_prim(deactr_do), .ack(deactr_ack), .busy(deactr_busy), .atn(deactr_atn));
  pcb u_deacti (.clk, .rst_n, .do_prim(deacti_do), .ack(deacti_ack), .busy(deacti_busy), .atn(deacti_atn));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      actr_tot <= 1'b0; actr_moo <= 2'd0;
      acti_tot <= 1'b0; acti_moo <= 2'd0;
      deacti_orig <= 1'b0;
      active <= 1'b0; active_tot <= 1'b0; active_moo <= 2'd0;
    end else begin
      if (actr_do)   begin actr_tot <= actr_tot_in; actr_moo <= actr_moo_in; end
      if (acti_do)   begin acti_tot <= acti_tot_in; acti_moo <= acti_moo_in; end
      if (deacti_do) deacti_orig <= deacti_orig_in;
      if (acti_ack && acti_atn) begin
        active     <= 1'b1;
        active_tot <= acti_tot;
        active_moo <= acti_moo;
      end
      if ((deacti_ack && deacti_atn) || (deactr_ack && deactr_atn)) active <= 1'b0;
    end
  end
endmodule

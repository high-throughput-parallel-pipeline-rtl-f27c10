// jr8_proc: 1-D J_R8 / J_R8^t processor (unnormalised 8-point DCT / IDCT).
//
// Forward (fwd=1) it computes J_R8 * x, with S_R8 = P_R8 * J_R8 being the
// 8-point DCT matrix whose rows are in the order 0,4,2,6,1,5,3,7:
//   Q_R8, then in parallel the even chain Q_R4 -> J_SE4 on elements 0..3
//   and the odd chain J_O4D -> J_O4C -> J_O4B on elements 4..7.
// Inverse (fwd=0) it computes J_R8^t * X: the even chain J_SE4^t -> Q_R4
// and the odd chain J_O4B^t -> J_O4C -> J_O4D, then Q_R8. Multiplexers in
// front of each basic processor choose the order; J_SE4 and J_O4B also get
// F/I. The even chain has one processor fewer than the odd one, so a 5-cycle
// delay line balances them.
// Interface: an 8-point vector enters as two serial streams of four words
// (in_e = elements 0..3, in_o = elements 4..7), one word each per Clk2 cycle
// (en2), and leaves the same way. Forward outputs are the reordered
// frequencies (out_e: 0,4,2,6; out_o: 1,5,3,7); inverse inputs use the same
// order and inverse outputs are spatial samples 0..3 / 4..7.
// Latency 20 Clk2 cycles in both directions; one vector per 4 Clk2 cycles.
//
// Follows the original design: the processor set and the even/odd parallel
// chains, reconfigured by multiplexers for F/I. Own choice: the tag-driven
// control in place of the fs/4 and fs/8 select signals, and the balancing
// delay.
module jr8_proc
  import dct_pkg::*;
#(
  parameter int W = 20
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         en2,
  input  logic         fwd,
  input  tag_t         in_tag,
  input  logic [W-1:0] in_e,
  input  logic [W-1:0] in_o,
  output tag_t         out_tag,
  output logic [W-1:0] out_e,
  output logic [W-1:0] out_o
);
  localparam int BAL = 5;  // even/odd chain balance, Clk2 cycles

  tag_t         q8_it, q8_ot, q4_it, q4_ot, se_it, se_ot;
  tag_t         od_it, od_ot, oc_it, oc_ot, ob_it, ob_ot;
  logic [W-1:0] q8_ie, q8_io, q8_oe, q8_oo, q4_i, q4_o, se_i, se_o;
  logic [W-1:0] od_i, od_o, oc_i, oc_o, ob_i, ob_o;
  tag_t         ev_t,  ev_dt;
  logic [W-1:0] ev_d,  ev_dd;
  tag_t         bal_t [BAL];
  logic [W-1:0] bal_d [BAL];

  // even chain routing
  assign q4_it = fwd ? q8_ot : se_ot;
  assign q4_i  = fwd ? q8_oe : se_o;
  assign se_it = fwd ? q4_ot : in_tag;
  assign se_i  = fwd ? q4_o  : in_e;
  assign ev_t  = fwd ? se_ot : q4_ot;
  assign ev_d  = fwd ? se_o  : q4_o;

  // odd chain routing
  assign od_it = fwd ? q8_ot : oc_ot;
  assign od_i  = fwd ? q8_oo : oc_o;
  assign oc_it = fwd ? od_ot : ob_ot;
  assign oc_i  = fwd ? od_o  : ob_o;
  assign ob_it = fwd ? oc_ot : in_tag;
  assign ob_i  = fwd ? oc_o  : in_o;

  // Q_R8 at the input (forward) or at the output (inverse)
  assign q8_it = fwd ? in_tag : ev_dt;
  assign q8_ie = fwd ? in_e   : ev_dd;
  assign q8_io = fwd ? in_o   : od_o;

  qr8_proc  #(.W(W)) u_qr8 (.clk, .rst_n, .en2, .in_tag(q8_it), .in_e(q8_ie), .in_o(q8_io),
                            .out_tag(q8_ot), .out_e(q8_oe), .out_o(q8_oo));
  qr4_proc  #(.W(W)) u_qr4 (.clk, .rst_n, .en2, .in_tag(q4_it), .in_d(q4_i), .out_tag(q4_ot), .out_d(q4_o));
  jse4_proc #(.W(W)) u_se4 (.clk, .rst_n, .en2, .fwd, .in_tag(se_it), .in_d(se_i), .out_tag(se_ot), .out_d(se_o));
  jo4d_proc #(.W(W)) u_o4d (.clk, .rst_n, .en2, .in_tag(od_it), .in_d(od_i), .out_tag(od_ot), .out_d(od_o));
  jo4c_proc #(.W(W)) u_o4c (.clk, .rst_n, .en2, .in_tag(oc_it), .in_d(oc_i), .out_tag(oc_ot), .out_d(oc_o));
  jo4b_proc #(.W(W)) u_o4b (.clk, .rst_n, .en2, .fwd, .in_tag(ob_it), .in_d(ob_i), .out_tag(ob_ot), .out_d(ob_o));

  // balancing delay line on the even chain
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < BAL; i++) bal_t[i] <= TAG_IDLE;
    end else if (en2) begin
      bal_t[0] <= ev_t;
      for (int i = 1; i < BAL; i++) bal_t[i] <= bal_t[i-1];
    end
  end
  always_ff @(posedge clk) begin
    if (en2) begin
      bal_d[0] <= ev_d;
      for (int i = 1; i < BAL; i++) bal_d[i] <= bal_d[i-1];
    end
  end
  assign ev_dt = bal_t[BAL-1];
  assign ev_dd = bal_d[BAL-1];

  assign out_tag = fwd ? ev_dt : q8_ot;
  assign out_e   = fwd ? ev_dd : q8_oe;
  assign out_o   = fwd ? ob_o  : q8_oo;
endmodule

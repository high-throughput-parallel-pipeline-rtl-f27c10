// up_sampler: U-S unit, two Clk2 streams back to one Clk1 serial stream.
//
// Stores the four pairs (x_j, x_{4+j}) of a vector as they arrive, one per
// Clk2 cycle (en2), and issues the vector's eight words one per Clk1 cycle,
// the first flagged by sov. With reorder=1 (forward transform) the
// processor's order 0,4,2,6 | 1,5,3,7 is put back into natural frequency
// order. The first word is issued on the Clk2 edge that stores pair 2, four
// Clk1 cycles after the edge that stored pair 0; each
// word's pair has been stored by the time the word is due, in both orders,
// and one vector store suffices because a word is never read after the next
// vector has overwritten it.
//
// Follows the original design: the role of the U-S unit. Own choice: the
// vector buffering and the reorder input.
module up_sampler
  import dct_pkg::*;
#(
  parameter int W = 20
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         en2,
  input  logic         reorder,
  input  tag_t         in_tag,
  input  logic [W-1:0] in_e,
  input  logic [W-1:0] in_o,
  output tag_t         out_tag,
  output logic [W-1:0] out_d
);
  logic [W-1:0] pbuf [8];         // x_j at j, x_{4+j} at 4+j
  logic [1:0]   ipos_q, ipos;
  tag_t         vtag_q, otag_q;
  logic [3:0]   ocnt_q;           // next word to issue, 8 idle
  logic         start;
  logic [2:0]   sel0, sel;

  assign ipos  = in_tag.sov ? 2'd0 : ipos_q + 2'd1;
  // Word k is issued 4+k Clk1 cycles after pair 0 was stored; the pair that
  // holds it has been stored by then, and it is overwritten by the next
  // vector no earlier than the cycle it is read.
  assign start = en2 && (ipos == 2'd2);
  assign sel0  = 3'd0;
  assign sel   = reorder ? bitrev3(ocnt_q[2:0]) : ocnt_q[2:0];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      ipos_q  <= 2'd3;
      vtag_q  <= TAG_IDLE;
      otag_q  <= TAG_IDLE;
      ocnt_q  <= 4'd8;
      out_tag <= TAG_IDLE;
    end else begin
      if (en2) begin
        ipos_q <= ipos;
        if (in_tag.sov) vtag_q <= in_tag;
      end
      if (start) begin
        otag_q      <= (vtag_q.v && in_tag.v) ? vtag_q : TAG_IDLE;
        out_tag.v   <= vtag_q.v && in_tag.v;
        out_tag.sov <= 1'b1;
        out_tag.sob <= vtag_q.v && in_tag.v && vtag_q.sob;
        ocnt_q      <= 4'd1;
      end else if (!ocnt_q[3]) begin
        out_tag.v   <= otag_q.v;
        out_tag.sov <= 1'b0;
        out_tag.sob <= 1'b0;
        ocnt_q      <= ocnt_q + 4'd1;
      end else begin
        out_tag <= TAG_IDLE;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (en2) begin
      pbuf[{1'b0, ipos}] <= in_e;
      pbuf[{1'b1, ipos}] <= in_o;
    end
    if (start)               out_d <= pbuf[sel0];
    else if (!ocnt_q[3])     out_d <= pbuf[sel];
  end
endmodule

// down_sampler: D-S unit, Clk1 serial stream to two Clk2 streams.
//
// Collects an 8-word vector arriving one word per Clk1 cycle (the first word
// flagged by the tag's sov) and re-issues it as four pairs, one per Clk2
// cycle (en2): pair j = (x_j, x_{4+j}), the format the J_R8 processor and
// the transpose buffer use. With reorder=1 (inverse transform) the input
// vector is taken in natural frequency order and issued in the processor's
// order 0,4,2,6 | 1,5,3,7. Words are written into one of two vector banks
// (they alternate from vector to vector) as they arrive. Pair 0 leaves on
// the first Clk2 edge after word 4 has been stored (input word 5 or 6,
// depending on the Clk2 phase) and pairs 1..3 on the next three Clk2 edges;
// each pair's words are stored by then in both orders. The first pair is
// visible 6 or 7 Clk1 cycles after the vector's first word.
//
// Follows the original design: the role of the D-S unit and the fs to fs/2
// conversion. Own choice: the vector buffering, the pair format and the
// reorder input.
module down_sampler
  import dct_pkg::*;
#(
  parameter int W = 20
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         en2,
  input  logic         reorder,
  input  tag_t         in_tag,
  input  logic [W-1:0] in_d,
  output tag_t         out_tag,
  output logic [W-1:0] out_e,
  output logic [W-1:0] out_o
);
  logic [W-1:0] vbuf [2][8];       // two vector banks, alternating
  logic [2:0]   ipos_q, ipos;
  logic         wbank_q, wbank, rbank_q;
  tag_t         vtag_q, otag_q;   // tag of the vector being collected / issued
  logic [1:0]   ocnt_q;           // next pair to issue
  logic         busy_q;           // pairs 1..3 still to issue
  logic         start;
  logic [2:0]   ie0, io0, ie, io;

  assign ipos  = in_tag.sov ? 3'd0 : ipos_q + 3'd1;
  assign wbank = (ipos == 3'd0) ? ~wbank_q : wbank_q;
  // Word 4 is stored once ipos reaches 5; the first Clk2 edge from then on
  // issues pair 0. Every later pair's words are stored before it is due.
  assign start = en2 && (ipos == 3'd5 || ipos == 3'd6);
  assign ie0   = 3'd0;
  assign io0   = reorder ? 3'd1 : 3'd4;
  assign ie    = reorder ? bitrev3({1'b0, ocnt_q}) : {1'b0, ocnt_q};
  assign io    = reorder ? bitrev3({1'b1, ocnt_q}) : {1'b1, ocnt_q};

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      ipos_q  <= 3'd7;
      wbank_q <= 1'b0;
      rbank_q <= 1'b0;
      vtag_q  <= TAG_IDLE;
      otag_q  <= TAG_IDLE;
      ocnt_q  <= 2'd0;
      busy_q  <= 1'b0;
      out_tag <= TAG_IDLE;
    end else begin
      ipos_q  <= ipos;
      wbank_q <= wbank;
      if (in_tag.sov) vtag_q <= in_tag;
      if (start) begin
        // the vector counts as valid if its first word and this word are
        otag_q      <= (vtag_q.v && in_tag.v) ? vtag_q : TAG_IDLE;
        out_tag.v   <= vtag_q.v && in_tag.v;
        out_tag.sov <= 1'b1;
        out_tag.sob <= vtag_q.v && in_tag.v && vtag_q.sob;
        rbank_q     <= wbank;
        ocnt_q      <= 2'd1;
        busy_q      <= 1'b1;
      end else if (en2) begin
        if (busy_q) begin
          out_tag.v   <= otag_q.v;
          out_tag.sov <= 1'b0;
          out_tag.sob <= 1'b0;
          ocnt_q      <= ocnt_q + 2'd1;
          busy_q      <= (ocnt_q != 2'd3);
        end else begin
          out_tag <= TAG_IDLE;
        end
      end
    end
  end

  always_ff @(posedge clk) begin
    vbuf[wbank][ipos] <= in_d;
    if (start) begin
      out_e <= vbuf[wbank][ie0];
      out_o <= vbuf[wbank][io0];
    end else if (en2 && busy_q) begin
      out_e <= vbuf[rbank_q][ie];
      out_o <= vbuf[rbank_q][io];
    end
  end
endmodule

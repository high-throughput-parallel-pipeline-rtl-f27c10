// transpose_buffer: 8x8 flip-flop transpose buffer (TB) between the two
// 1-D processors.
//
// Eight shift registers SR0..SR7 of eight words each. Vectors arrive as two
// serial streams (elements 0..3 and 4..7, one pair per Clk2 cycle), so a
// block of eight vectors takes 32 Clk2 cycles. The write direction
// alternates from block to block (R/C), and each block is read out
// transposed while the next one is written into the same registers:
//  * row mode (rc=0): vector j goes into SR_j, whose halves act as two
//    4-word shift registers fed by the two streams (W_j one-hot, j = 0..7,
//    four cycles each); the same SR_j is read at its two half ends (R = j).
//  * column mode (rc=1): in the i-th cycle of every vector, SR_i and SR_{i+4}
//    each shift in one word as 8-word chains (W_i and W_{i+4} together);
//    SR_i and SR_{i+4} are read at the chain end (R = i).
// Reading a register while shifting into it frees its words exactly as new
// ones arrive, so the output is the transposed block, continuously.
// Words are stored with TB_W bits. By default that is the full 20-bit
// datapath word; a narrower store (TB_W < W) keeps bits
// [TB_SHIFT+TB_W-1:TB_SHIFT] rounded half-up and sign-extends them again on
// the way out. A 16-bit store with TB_SHIFT=1 holds every forward-transform
// intermediate but costs too much IDCT precision for IEEE 1180.
// Timing: output vector k of a block appears 33 Clk2 cycles after input
// vector k of that block; the block-start tag (sob) sets the write phase.
//
// Follows the original design: eight shift registers, alternating row/column
// writes, and the W/R select pattern. Own choice: the default 20-bit word
// (the original lists 16-bit registers), the registered output, and tag
// synchronisation.
module transpose_buffer
  import dct_pkg::*;
#(
  parameter int W        = 20,
  parameter int TB_W     = 20,
  parameter int TB_SHIFT = 0
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         en2,
  input  tag_t         in_tag,
  input  logic [W-1:0] in_e,
  input  logic [W-1:0] in_o,
  output tag_t         out_tag,
  output logic [W-1:0] out_e,
  output logic [W-1:0] out_o
);
  logic [TB_W-1:0] m [8][8];
  logic [4:0]      cnt_q, cnt;
  logic            rc_q, rc;
  logic            cur_v_q, prev_v_q;
  logic [7:0]      wsel;        // W_1..W_8
  logic [2:0]      rsel;        // R_1..R_3
  logic [TB_W-1:0] we, wo, re, ro;

  function automatic logic [TB_W-1:0] pack(input logic [W-1:0] d);
    logic [W:0] r;
    r = {d[W-1], d} + ((W+1)'(1) << TB_SHIFT >> 1);
    return r[TB_SHIFT +: TB_W];
  endfunction

  function automatic logic [W-1:0] unpack(input logic [TB_W-1:0] s);
    return W'(signed'(s)) << TB_SHIFT;
  endfunction

  assign cnt = (in_tag.v && in_tag.sob) ? 5'd0 : cnt_q + 5'd1;
  assign rc  = (cnt == 5'd0) ? ~rc_q : rc_q;
  assign we  = pack(in_e);
  assign wo  = pack(in_o);

  // W / R decoding of Fig. 6d
  always_comb begin
    wsel = '0;
    if (!rc) begin
      wsel[cnt[4:2]] = 1'b1;
      rsel           = cnt[4:2];
    end else begin
      wsel[{1'b0, cnt[1:0]}] = 1'b1;
      wsel[{1'b1, cnt[1:0]}] = 1'b1;
      rsel                   = {1'b0, cnt[1:0]};
    end
  end

  always_comb begin
    if (!rc) begin
      re = m[rsel][3];
      ro = m[rsel][7];
    end else begin
      re = m[rsel][3];
      ro = m[rsel + 3'd4][3];
    end
  end

  always_ff @(posedge clk) begin
    if (en2) begin
      for (int j = 0; j < 8; j++) begin
        if (wsel[j]) begin
          if (!rc) begin
            m[j][3] <= m[j][2]; m[j][2] <= m[j][1]; m[j][1] <= m[j][0]; m[j][0] <= we;
            m[j][7] <= m[j][6]; m[j][6] <= m[j][5]; m[j][5] <= m[j][4]; m[j][4] <= wo;
          end else begin
            m[j][3] <= m[j][2]; m[j][2] <= m[j][1]; m[j][1] <= m[j][0]; m[j][0] <= m[j][7];
            m[j][7] <= m[j][6]; m[j][6] <= m[j][5]; m[j][5] <= m[j][4];
            m[j][4] <= (j < 4) ? we : wo;
          end
        end
      end
      out_e <= unpack(re);
      out_o <= unpack(ro);
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      cnt_q    <= 5'd31;
      rc_q     <= 1'b0;
      cur_v_q  <= 1'b0;
      prev_v_q <= 1'b0;
      out_tag  <= TAG_IDLE;
    end else if (en2) begin
      cnt_q <= cnt;
      rc_q  <= rc;
      if (cnt == 5'd0) begin
        cur_v_q  <= in_tag.v;
        prev_v_q <= cur_v_q;
      end
      out_tag.v   <= (cnt == 5'd0) ? cur_v_q : prev_v_q;
      out_tag.sov <= (cnt[1:0] == 2'd0);
      out_tag.sob <= (cnt == 5'd0);
    end
  end
endmodule

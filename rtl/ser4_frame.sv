// ser4_frame: serial-in / serial-out framing shared by the basic processors.
//
// Each basic processor receives a 4-point vector as four words in series,
// one per Clk2 cycle (en2), on NS parallel streams. The words are shifted
// into a 3-word shift register; when the fourth arrives the whole vector is
// copied into a hold register, so the next vector can stream in while the
// owning processor computes one output per Clk2 cycle from hold.
// oidx tells the processor which output row (0..3) to compute in the current
// Clk2 cycle and otag is the tag that output must carry; the processor
// registers both, so the processor latency is 5 Clk2 cycles from the first
// input word to the first output word. The vector start comes from the
// tag's sov bit.
//
// Helper. The serial-4 in/out format follows the original design. The
// shift/hold register framing and the tags are this design's own.
module ser4_frame
  import dct_pkg::*;
#(
  parameter int W  = 20,
  parameter int NS = 1
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         en2,
  input  tag_t         in_tag,
  input  logic [W-1:0] in_d [NS],
  output logic [W-1:0] hold [NS][4],
  output logic [1:0]   oidx,
  output tag_t         otag
);
  logic [1:0]   ipos_q, ipos;
  logic [1:0]   oidx_q;
  logic [W-1:0] sr [NS][3];
  tag_t         tdl [4];   // tag delay line

  assign ipos = in_tag.sov ? 2'd0 : ipos_q + 2'd1;
  assign otag = tdl[3];
  assign oidx = otag.sov ? 2'd0 : oidx_q + 2'd1;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      ipos_q <= 2'd3;
      oidx_q <= 2'd3;
      for (int i = 0; i < 4; i++) tdl[i] <= TAG_IDLE;
    end else if (en2) begin
      ipos_q <= ipos;
      oidx_q <= oidx;
      tdl[0] <= in_tag;
      for (int i = 1; i < 4; i++) tdl[i] <= tdl[i-1];
    end
  end

  // datapath registers need no reset: tags mark what is valid
  always_ff @(posedge clk) begin
    if (en2) begin
      for (int s = 0; s < NS; s++) begin
        if (ipos != 2'd3) sr[s][ipos] <= in_d[s];
        else begin
          hold[s][0] <= sr[s][0];
          hold[s][1] <= sr[s][1];
          hold[s][2] <= sr[s][2];
          hold[s][3] <= in_d[s];
        end
      end
    end
  end
endmodule

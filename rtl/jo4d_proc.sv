// jo4d_proc: J_O4D basic processor of the odd half of J_R8.
//
// Computes (v0, C4*(v2-v1), C4*(v1+v2), v3) on a 4-point vector received as
// four serial words, one per Clk2 cycle, and returns the results in series.
// J_O4D is symmetric, so forward and inverse use it unchanged. The middle
// rows share one carry incrementer adder/subtracter followed by the
// hardwired C4 multiplier; the outer rows pass through. Framing in
// ser4_frame; latency 5 Clk2 cycles.
//
// Follows the original design: the matrix and the serial-4 format. Own
// choice: the internal schedule and the latency.
module jo4d_proc
  import dct_pkg::*;
#(
  parameter int W = 20
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         en2,
  input  tag_t         in_tag,
  input  logic [W-1:0] in_d,
  output tag_t         out_tag,
  output logic [W-1:0] out_d
);
  logic [W-1:0] hold [1][4];
  logic [W-1:0] din  [1];
  logic [1:0]   oidx;
  tag_t         otag;
  logic [W-1:0] opb, sum, prod, res;
  logic         sub;

  assign din[0] = in_d;
  ser4_frame #(.W(W), .NS(1)) u_frame (
    .clk, .rst_n, .en2, .in_tag, .in_d(din), .hold, .oidx, .otag
  );

  assign sub = (oidx == 2'd1);
  assign opb = sub ? ~hold[0][1] : hold[0][1];

  cia #(.W(W)) u_add (.a(hold[0][2]), .b(opb), .cin(sub), .s(sum), .cout());
  hwmul_c4 #(.DATA_W(W)) u_mul (.di(sum), .p(prod));

  always_comb begin
    case (oidx)
      2'd0:    res = hold[0][0];
      2'd3:    res = hold[0][3];
      default: res = prod;
    endcase
  end

  always_ff @(posedge clk) begin
    if (!rst_n) out_tag <= TAG_IDLE;
    else if (en2) out_tag <= otag;
  end
  always_ff @(posedge clk) if (en2) out_d <= res;
endmodule

// jo4c_proc: J_O4C basic processor of the odd half of J_R8.
//
// Computes the butterfly (v0+v1, v0-v1, v3-v2, v2+v3) on a 4-point vector
// received as four serial words, one per Clk2 cycle, and returns the four
// results in series. J_O4C is symmetric, so forward and inverse use it
// unchanged. One carry incrementer adder/subtracter produces one result per
// Clk2 cycle. Framing in ser4_frame; latency 5 Clk2 cycles.
//
// Follows the original design: the matrix and the serial-4 format. Own
// choice: the internal schedule and the latency.
module jo4c_proc
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
  logic [W-1:0] opa, opb, res;
  logic         sub;

  assign din[0] = in_d;
  ser4_frame #(.W(W), .NS(1)) u_frame (
    .clk, .rst_n, .en2, .in_tag, .in_d(din), .hold, .oidx, .otag
  );

  always_comb begin
    case (oidx)
      2'd0:    begin opa = hold[0][0]; opb = hold[0][1]; sub = 1'b0; end
      2'd1:    begin opa = hold[0][0]; opb = hold[0][1]; sub = 1'b1; end
      2'd2:    begin opa = hold[0][3]; opb = hold[0][2]; sub = 1'b1; end
      default: begin opa = hold[0][2]; opb = hold[0][3]; sub = 1'b0; end
    endcase
  end

  cia #(.W(W)) u_add (.a(opa), .b(sub ? ~opb : opb), .cin(sub), .s(res), .cout());

  always_ff @(posedge clk) begin
    if (!rst_n) out_tag <= TAG_IDLE;
    else if (en2) out_tag <= otag;
  end
  always_ff @(posedge clk) if (en2) out_d <= res;
endmodule

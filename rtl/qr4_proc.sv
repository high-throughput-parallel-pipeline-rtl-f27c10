// qr4_proc: Q_R4 basic processor of the even half of J_R8.
//
// Computes (v0+v3, v1+v2, v1-v2, v0-v3) for a 4-point vector that arrives
// as four serial words, one per Clk2 cycle, and sends the four results out
// in series in that order. Q_R4 is symmetric, so the same unit serves the
// forward and the inverse transform. A single carry incrementer adder,
// used as adder or subtracter, computes one result per Clk2 cycle. The
// framing (shift register, hold register, tag) is in ser4_frame; latency
// is 5 Clk2 cycles, throughput one vector per 4 Clk2 cycles.
//
// Follows the original design: the matrix and the serial-4 in/out format at
// Clk2. Own choice: the internal schedule and the latency.
module qr4_proc
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
  logic [W-1:0] opa, opb, sum;
  logic         sub;

  assign din[0] = in_d;
  ser4_frame #(.W(W), .NS(1)) u_frame (
    .clk, .rst_n, .en2, .in_tag, .in_d(din), .hold, .oidx, .otag
  );

  always_comb begin
    case (oidx)
      2'd0:    begin opa = hold[0][0]; opb = hold[0][3]; sub = 1'b0; end
      2'd1:    begin opa = hold[0][1]; opb = hold[0][2]; sub = 1'b0; end
      2'd2:    begin opa = hold[0][1]; opb = hold[0][2]; sub = 1'b1; end
      default: begin opa = hold[0][0]; opb = hold[0][3]; sub = 1'b1; end
    endcase
  end

  cia #(.W(W)) u_add (.a(opa), .b(sub ? ~opb : opb), .cin(sub), .s(sum), .cout());

  always_ff @(posedge clk) begin
    if (!rst_n) out_tag <= TAG_IDLE;
    else if (en2) out_tag <= otag;
  end
  always_ff @(posedge clk) if (en2) out_d <= sum;
endmodule

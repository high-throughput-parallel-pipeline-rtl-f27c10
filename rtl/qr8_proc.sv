// qr8_proc: double-input Q_R8 basic processor of J_R8.
//
// An 8-point vector arrives as two serial streams of four words, one word
// of each per Clk2 cycle: a = elements 0..3 and b = elements 4..7. Q_R8 is
// the butterfly y_j = x_j + x_{7-j}, y_{4+j} = x_{3-j} - x_{4+j}, which in
// stream terms is out_e[j] = a[j] + b[3-j] and out_o[j] = a[3-j] - b[j],
// j = 0..3. Q_R8 is symmetric, so the same unit serves as the first stage of
// the forward transform and the last stage of the inverse. Two carry
// incrementer adders (one adding, one subtracting) produce one pair per
// Clk2 cycle. Framing in ser4_frame; latency 5 Clk2 cycles.
//
// Follows the original design: the double-input structure, the matrix and
// the Clk2 rate. Own choice: the internal schedule and the latency.
module qr8_proc
  import dct_pkg::*;
#(
  parameter int W = 20
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
  logic [W-1:0] hold [2][4];
  logic [W-1:0] din  [2];
  logic [1:0]   oidx;
  tag_t         otag;
  logic [W-1:0] se, so;

  assign din[0] = in_e;
  assign din[1] = in_o;
  ser4_frame #(.W(W), .NS(2)) u_frame (
    .clk, .rst_n, .en2, .in_tag, .in_d(din), .hold, .oidx, .otag
  );

  cia #(.W(W)) u_add (.a(hold[0][oidx]), .b(hold[1][2'd3 - oidx]), .cin(1'b0), .s(se), .cout());
  cia #(.W(W)) u_sub (.a(hold[0][2'd3 - oidx]), .b(~hold[1][oidx]), .cin(1'b1), .s(so), .cout());

  always_ff @(posedge clk) begin
    if (!rst_n) out_tag <= TAG_IDLE;
    else if (en2) out_tag <= otag;
  end
  always_ff @(posedge clk) begin
    if (en2) begin
      out_e <= se;
      out_o <= so;
    end
  end
endmodule

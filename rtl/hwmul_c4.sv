// hwmul_c4: hardwired multiplier P = di * C4.
//
// C4 = 2896/4096 ~ cos(pi/4) = 2^-1 + 2^-3 + 2^-4 + 2^-6 + 2^-8. The five
// shifted copies of di are reduced in a carry-save tree and the final adder
// rounds the product to the DATA_W-bit format. Combinational.
//
// Follows the original design: the coefficient and its signed-digit form.
// Own choice: the 3:2 tree and the combinational form.
module hwmul_c4
#(
  parameter int DATA_W = dct_pkg::DATA_W
) (
  input  logic [DATA_W-1:0] di,
  output logic [DATA_W-1:0] p
);
  localparam int MW = DATA_W + dct_pkg::COEF_FRAC + 2;

  logic [MW-1:0] x;
  logic [MW-1:0] t [5];
  logic [MW-1:0] cs_s, cs_c;

  assign x    = MW'(signed'(di));
  assign t[0] = x << 11;
  assign t[1] = x << 9;
  assign t[2] = x << 8;
  assign t[3] = x << 6;
  assign t[4] = x << 4;

  csa_tree #(.N(5), .W(MW)) u_csa (.t(t), .s(cs_s), .c(cs_c));

  round_adder #(.IN_W(MW), .DROP(dct_pkg::COEF_FRAC), .OUT_W(DATA_W)) u_fin (
    .a(cs_s), .b(cs_c), .p(p)
  );
endmodule

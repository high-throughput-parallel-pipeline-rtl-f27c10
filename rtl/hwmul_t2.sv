// hwmul_t2: hardwired multiplier P = di * {1 or T2} +/- dj.
//
// T2 = 1696/4096 ~ C6/C2 = 2^-2 + 2^-3 + 2^-5 + 2^-7. With sel_t2=0 the
// coefficient is 1 and the unit is a plain adder/subtracter. The shifted
// terms, the addend dj (one's complemented when sub=1, with a +1
// correction) are reduced in a carry-save tree and the final adder rounds
// back to the DATA_W-bit format. Combinational.
//
// Follows the original design: the coefficient and its signed-digit form,
// and the choice between the coefficients 1 and T2. Own choice: the
// add/subtract control, the 3:2 tree, and no internal pipeline register.
module hwmul_t2
#(
  parameter int DATA_W = dct_pkg::DATA_W
) (
  input  logic [DATA_W-1:0] di,
  input  logic [DATA_W-1:0] dj,
  input  logic              sel_t2,  // 0: coefficient 1, 1: T2
  input  logic              sub,     // 1: subtract dj
  output logic [DATA_W-1:0] p
);
  localparam int MW = DATA_W + dct_pkg::COEF_FRAC + 2;

  logic [MW-1:0] x, xj;
  logic [MW-1:0] t [6];
  logic [MW-1:0] cs_s, cs_c;

  assign x  = MW'(signed'(di));
  assign xj = MW'(signed'(dj)) << dct_pkg::COEF_FRAC;

  always_comb begin
    if (sel_t2) begin
      t[0] = x << 10;
      t[1] = x << 9;
      t[2] = x << 7;
      t[3] = x << 5;
    end else begin
      t[0] = x << dct_pkg::COEF_FRAC;
      t[1] = '0;
      t[2] = '0;
      t[3] = '0;
    end
    t[4] = sub ? ~xj : xj;
    t[5] = MW'(sub);
  end

  csa_tree #(.N(6), .W(MW)) u_csa (.t(t), .s(cs_s), .c(cs_c));

  round_adder #(.IN_W(MW), .DROP(dct_pkg::COEF_FRAC), .OUT_W(DATA_W)) u_fin (
    .a(cs_s), .b(cs_c), .p(p)
  );
endmodule

// hwmul_t1t5: hardwired multiplier P = di * {T1 or T5} +/- dj.
//
// T1 = 815/4096 ~ C7/C1 and T5 = 6130/4096 ~ C3/C5 are fixed 12-bit
// coefficients written in signed digits around the precomputed multiple 3x:
//   T1*x = 3x*2^-4 + 3x*2^-8 - x*2^-12
//   T5*x = 3x*2^-1 - x*2^-8  + x*2^-11
// 3x = 2x + x is formed in a carry incrementer adder. The shifted terms, the
// addend dj (or its one's complement when sub=1) and the +1 corrections of
// the complemented terms are reduced in a carry-save tree; the final adder
// rounds the 2^-12 result back to the DATA_W-bit data format.
// Combinational; the owning processor registers the result.
//
// Follows the original design: the coefficients, their signed-digit forms,
// the precomputed 3x and rounding instead of truncation. Own choice: the
// add/subtract control, the 3:2 tree, and no internal pipeline register.
module hwmul_t1t5
#(
  parameter int DATA_W = dct_pkg::DATA_W
) (
  input  logic [DATA_W-1:0] di,
  input  logic [DATA_W-1:0] dj,
  input  logic              sel_t5,  // 0: T1, 1: T5
  input  logic              sub,     // 1: subtract dj
  output logic [DATA_W-1:0] p
);
  localparam int MW = DATA_W + dct_pkg::COEF_FRAC + 2;

  logic [DATA_W+1:0] x3;
  logic [MW-1:0]     x, x3e, xj;
  logic [MW-1:0]     t [5];
  logic [MW-1:0]     cs_s, cs_c;

  cia #(.W(DATA_W + 2)) u_3x (
    .a   ({di[DATA_W-1], di, 1'b0}),
    .b   ({{2{di[DATA_W-1]}}, di}),
    .cin (1'b0),
    .s   (x3),
    .cout()
  );

  assign x   = MW'(signed'(di));
  assign x3e = MW'(signed'(x3));
  assign xj  = MW'(signed'(dj)) << dct_pkg::COEF_FRAC;

  always_comb begin
    if (!sel_t5) begin
      t[0] = x3e << 8;
      t[1] = x3e << 4;
      t[2] = ~x;
    end else begin
      t[0] = x3e << 11;
      t[1] = ~(x << 4);
      t[2] = x << 1;
    end
    t[3] = sub ? ~xj : xj;
    t[4] = MW'(1) + MW'(sub);   // +1 per complemented term
  end

  csa_tree #(.N(5), .W(MW)) u_csa (.t(t), .s(cs_s), .c(cs_c));

  round_adder #(.IN_W(MW), .DROP(dct_pkg::COEF_FRAC), .OUT_W(DATA_W)) u_fin (
    .a(cs_s), .b(cs_c), .p(p)
  );
endmodule

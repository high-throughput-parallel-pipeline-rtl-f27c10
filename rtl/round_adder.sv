// round_adder: final adder with rounding correction.
//
// Takes a product in carry-save form (two IN_W-bit words a and b) and returns
// round-half-up((a + b) / 2^DROP) as an OUT_W-bit word (higher bits wrap).
// A carry generator finds the carry c into bit DROP-1 from the discarded
// bits below it. With the first discarded bits A = a[DROP-1] and
// B = b[DROP-1], the kept part must be incremented by 0, 1 or 2:
// C1 = A | B | c and C2 = A & B & c select +1 / +2 in a double carry
// incrementer adder (dcia) over the kept bits. Purely combinational.
//
// Follows the original design: a carry generator plus a DCIA, with C1/C2
// from the first dropped bits. Own choice: the carry generator is written as
// a plain sum of the low bits, and the widths are parameters.
module round_adder #(
  parameter int IN_W  = 32,
  parameter int DROP  = 12,
  parameter int OUT_W = 20
) (
  input  logic [IN_W-1:0]  a,
  input  logic [IN_W-1:0]  b,
  output logic [OUT_W-1:0] p
);
  logic [DROP-1:0] low_sum;
  logic            cg;          // carry into bit DROP-1
  logic            c1, c2;

  // carry generator over the bits below the rounding position
  assign low_sum = {1'b0, a[DROP-2:0]} + {1'b0, b[DROP-2:0]};
  assign cg      = low_sum[DROP-1];
  assign c1      = a[DROP-1] | b[DROP-1] | cg;
  assign c2      = a[DROP-1] & b[DROP-1] & cg;

  dcia #(.W(OUT_W)) u_dcia (
    .a (a[DROP+OUT_W-1:DROP]),
    .b (b[DROP+OUT_W-1:DROP]),
    .c1(c1),
    .c2(c2),
    .s (p)
  );
endmodule

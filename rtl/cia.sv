// cia: carry incrementer adder (CIA).
//
// The W-bit sum is formed by ripple-carry blocks that each start with a
// carry-in of 0. Every block sum S0 is then incremented by the true carry C0
// arriving from the block below: bit i of the block becomes
// S0_i XOR (C0 AND S0_1 .. S0_{i-1}), and the block carry-out is
// C0_block OR (S0_1 .. S0_len AND C0). Only this incrementer chain links the
// blocks, giving O(n) area and a roughly O(sqrt n) critical path.
// Block lengths grow from the least significant end: 2,3,4,5,6 for W=20 as
// in the design; for other widths the lengths keep growing by one up to 6
// and the last block is cut to fit.
// Purely combinational. Interface: {cout, s} = a + b + cin.
//
// Follows the original design: the block lengths {2,3,4,5,6} and the
// incrementer equations. Own choice: the lengths are placed from the least
// significant end, and other widths are generalised.
module cia #(
  parameter int W = 20
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] s,
  output logic         cout
);
  function automatic int blk_len(input int k);
    return (k + 2 < 6) ? k + 2 : 6;
  endfunction

  function automatic int blk_pos(input int k);
    int pos;
    pos = 0;
    for (int i = 0; i < k; i++) pos += blk_len(i);
    return pos;
  endfunction

  function automatic int num_blk();
    int k;
    k = 0;
    while (blk_pos(k) < W) k++;
    return k;
  endfunction

  localparam int NB = num_blk();

  logic [NB:0] c;   // true carry into each block
  assign c[0] = cin;

  for (genvar k = 0; k < NB; k++) begin : g_blk
    localparam int P = blk_pos(k);
    localparam int L = (blk_pos(k) + blk_len(k) <= W) ? blk_len(k) : W - blk_pos(k);

    logic [L-1:0] s0;
    logic         c0, allp;

    // ripple-carry block with carry-in 0
    always_comb begin
      logic rc;
      rc = 1'b0;
      for (int i = 0; i < L; i++) begin
        s0[i] = a[P+i] ^ b[P+i] ^ rc;
        rc    = (a[P+i] & b[P+i]) | (rc & (a[P+i] ^ b[P+i]));
      end
      c0 = rc;
    end

    // incrementer, Eqs. (14)-(15)
    always_comb begin
      logic ap;
      ap = 1'b1;
      for (int i = 0; i < L; i++) begin
        s[P+i] = s0[i] ^ (c[k] & ap);
        ap     = ap & s0[i];
      end
      allp = ap;
    end

    assign c[k+1] = c0 | (allp & c[k]);
  end

  assign cout = c[NB];
endmodule

// dcia: double carry incrementer adder (DCIA).
//
// Adds two W-bit words plus an increment of 0, 1 or 2, requested by the
// carries c1 (+1) and c2 (+2; c2 takes precedence when both are set). It is
// the CIA idea extended to a two-valued carry: each block (lengths 2,3,4,5,6
// from the least significant end) is a ripple adder with carry-in 0, and
// its sum P0 is then incremented by the block's incoming double carry:
// bit 1 becomes P0_1 XOR C1, bit k > 1 becomes
// P0_k XOR (C2 AND P0_2..P0_{k-1} OR C1 AND P0_1..P0_{k-1}).
// The block passes on +1 when exactly one of its ripple carry and the carry
// out of the increment is set, +2 when both are.
// Purely combinational; s = (a + b + inc) mod 2^W.
//
// Follows the original design: the double-carry idea, the block lengths and
// the +0/+1/+2 increment. Own choice: the exact form of the carries passed
// between blocks, which is derived here from the required sum.
module dcia #(
  parameter int W = 20
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         c1,
  input  logic         c2,
  output logic [W-1:0] s
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

  logic [NB:0] k1, k2;   // incoming +1 / +2 carry of each block
  assign k2[0] = c2;
  assign k1[0] = c1 & ~c2;

  for (genvar k = 0; k < NB; k++) begin : g_blk
    localparam int P = blk_pos(k);
    localparam int L = (blk_pos(k) + blk_len(k) <= W) ? blk_len(k) : W - blk_pos(k);

    logic [L-1:0] p0;
    logic         c0, inc;

    always_comb begin
      logic rc;
      rc = 1'b0;
      for (int i = 0; i < L; i++) begin
        p0[i] = a[P+i] ^ b[P+i] ^ rc;
        rc    = (a[P+i] & b[P+i]) | (rc & (a[P+i] ^ b[P+i]));
      end
      c0 = rc;
    end

    // Eq. (18): increment by the double carry
    always_comb begin
      logic all1, all2;   // P0 all ones from bit 1 / from bit 2
      all1 = 1'b1;
      all2 = 1'b1;
      for (int i = 0; i < L; i++) begin
        if (i == 0) begin
          s[P+i] = p0[i] ^ k1[k];
          all1   = p0[i];
        end else begin
          s[P+i] = p0[i] ^ ((k2[k] & all2) | (k1[k] & all1));
          all1   = all1 & p0[i];
          all2   = all2 & p0[i];
        end
      end
      inc = (k2[k] & all2) | (k1[k] & all1);
    end

    // Eq. (19): outgoing double carry
    assign k2[k+1] = c0 & inc;
    assign k1[k+1] = c0 ^ inc;
  end
endmodule

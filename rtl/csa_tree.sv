// csa_tree: carry-save reduction of N W-bit words to two words.
//
// Layers of 3:2 compressors (full adders working bit-parallel) reduce the
// operand list until two words remain; their sum (mod 2^W) equals the sum of
// the inputs. Used inside the hardwired multipliers, whose partial products
// are fixed shifts of the multiplicand. Purely combinational.
//
// Helper. The original reduces partial products with 4:2 and 5:3
// compressors. This tree uses rows of 3:2 compressors, which is this
// design's simplification.
module csa_tree #(
  parameter int N = 5,
  parameter int W = 34
) (
  input  logic [W-1:0] t [N],
  output logic [W-1:0] s,
  output logic [W-1:0] c
);
  always_comb begin
    logic [W-1:0] v  [N];
    logic [W-1:0] nv [N];
    int           n, m;
    for (int i = 0; i < N; i++) v[i] = t[i];
    n = N;
    for (int layer = 0; layer < N; layer++) begin
      if (n > 2) begin
        m = 0;
        for (int i = 0; i < N; i++) nv[i] = '0;
        for (int g = 0; g < N / 3; g++) begin
          if (3 * g + 2 < n) begin
            nv[m]   = v[3*g] ^ v[3*g+1] ^ v[3*g+2];
            nv[m+1] = ((v[3*g] & v[3*g+1]) | (v[3*g] & v[3*g+2]) | (v[3*g+1] & v[3*g+2])) << 1;
            m       = m + 2;
          end
        end
        for (int i = 0; i < N; i++) begin
          if (i >= 3 * (n / 3) && i < n) begin
            nv[m] = v[i];
            m     = m + 1;
          end
        end
        for (int i = 0; i < N; i++) v[i] = nv[i];
        n = m;
      end
    end
    s = v[0];
    c = (N > 1) ? v[1] : '0;
  end
endmodule

// k8_multiplier: normalisation multiplier for the K8 matrix.
//
// The 2-D transform is computed unnormalised; each coefficient must be
// multiplied by K8(k,l) = p(k)*p(l)/4 with p the diagonal of P_R8, i.e. by
// one of ten constants CiCj (i,j in {1,2,4,5}, C0 = C4) held as 13-bit
// fractions x/8192. A 6-bit position counter, restarted by the block-start
// tag, selects the constant: word n of a block (vector t = n/8, element
// e = n%8) gets p(frequency e) * p(reordered position t), which is right
// both for the column-wise DCT output and the row-wise IDCT input.
// The result is round-half-up(in_d * constant / 2^shift), wrapped to W bits
// ('shift' is 2 + 13 plus the format change of the caller, at most 24; it
// may only change while the pipeline is empty).
// Pipeline, one word per Clk1 cycle:
//   1      constant selection from the position counter
//   2      Booth decoder: the constant becomes seven radix-4 digits in
//          {-2..2}; the input is pre-shifted left by 24 - shift so that the
//          final adder can always drop 24 bits
//   3..9   seven carry-save stages, each adding one partial product to the
//          running sum/carry pair with a 3:2 compressor row; negative
//          digits use the one's complement and their +1 corrections enter
//          as the initial carry-save word
//   10     final adder with rounding correction (carry generator + double
//          carry incrementer adder)
//   11..   output delay up to LAT cycles (17 in the design).
// The Booth decoder is a plain radix-4 recoder; sharing common terms between
// the ten constants is not attempted.
//
// Follows the original design: the ten 13-bit constants, the Booth decoder,
// the seven carry-save stages, the DCIA-based rounding adder and the
// 17-cycle latency. Own choice: the plain recoding, the pre-shift and the
// delay line.
module k8_multiplier
  import dct_pkg::*;
#(
  parameter int W   = 20,
  parameter int LAT = 17
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [4:0]   shift,
  input  tag_t         in_tag,
  input  logic [W-1:0] in_d,
  output tag_t         out_tag,
  output logic [W-1:0] out_d
);
  localparam int DROP  = 24;           // bits dropped by the final adder
  localparam int PW    = W + DROP;     // product width (wraps like out_d)
  localparam int NPP   = 7;            // radix-4 digits of a 14-bit constant
  localparam int STAGE = 3 + NPP;      // arithmetic stages before the delay

  typedef struct packed {
    logic neg;   // digit < 0
    logic two;   // |digit| = 2
    logic one;   // |digit| = 1
  } bdig_t;

  logic [5:0]    n_q, n;
  logic [12:0]   k_s1;
  logic [W-1:0]  d_s1;
  logic [PW-1:0] x_p [NPP];            // input travelling with the CSA
  bdig_t         dig_p [NPP][NPP];     // digits travelling with the CSA
  logic [PW-1:0] s_p [NPP+1], c_p [NPP+1];
  logic [W-1:0]  res, res_q;
  tag_t          tag_p [LAT];
  logic [W-1:0]  dly [LAT-STAGE];

  assign n = (in_tag.v && in_tag.sob) ? 6'd0 : n_q + 6'd1;

  // stage 1: constant selection
  always_ff @(posedge clk) begin
    if (!rst_n) n_q <= 6'd63;
    else        n_q <= n;
  end
  always_ff @(posedge clk) begin
    k_s1 <= k8_const(p_of_freq(n[2:0]), p_of_pos(n[5:3]));
    d_s1 <= in_d;
  end

  // stage 2: Booth decoder and input alignment; the +1 corrections of the
  // negative digits (bit 2i for digit i) form the initial carry-save word
  always_ff @(posedge clk) begin
    logic [14:0] kk;
    logic [2:0]  b;
    kk = {1'b0, k_s1, 1'b0};
    s_p[0] <= '0;
    c_p[0] <= '0;
    for (int i = 0; i < NPP; i++) begin
      b = kk[2*i +: 3];
      dig_p[0][i].neg <= b[2] & ~(b[1] & b[0]);
      dig_p[0][i].two <= (b == 3'b011) | (b == 3'b100);
      dig_p[0][i].one <= b[1] ^ b[0];
      s_p[0][2*i]     <= b[2] & ~(b[1] & b[0]);
    end
    x_p[0] <= PW'(signed'(d_s1)) << (DROP - int'(shift));
  end

  // stages 3..9: one partial product per carry-save stage
  for (genvar i = 0; i < NPP; i++) begin : g_csa
    logic [PW-1:0] m, pp;
    always_comb begin
      m  = dig_p[i][i].two ? (x_p[i] << 1) : dig_p[i][i].one ? x_p[i] : '0;
      pp = (dig_p[i][i].neg ? ~m : m) << (2 * i);
    end
    if (i < NPP - 1) begin : g_fwd
      always_ff @(posedge clk) begin
        x_p[i+1]   <= x_p[i];
        dig_p[i+1] <= dig_p[i];
      end
    end
    always_ff @(posedge clk) begin
      s_p[i+1] <= s_p[i] ^ c_p[i] ^ pp;
      c_p[i+1] <= ((s_p[i] & c_p[i]) | (s_p[i] & pp) | (c_p[i] & pp)) << 1;
    end
  end

  // stage 10: final adder with rounding correction
  round_adder #(.IN_W(PW), .DROP(DROP), .OUT_W(W)) u_fin (
    .a(s_p[NPP]), .b(c_p[NPP]), .p(res)
  );
  always_ff @(posedge clk) res_q <= res;

  // delay line to the specified latency
  always_ff @(posedge clk) begin
    dly[0] <= res_q;
    for (int i = 1; i < LAT - STAGE; i++) dly[i] <= dly[i-1];
  end
  assign out_d = dly[LAT-STAGE-1];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < LAT; i++) tag_p[i] <= TAG_IDLE;
    end else begin
      tag_p[0] <= in_tag;
      for (int i = 1; i < LAT; i++) tag_p[i] <= tag_p[i-1];
    end
  end
  assign out_tag = tag_p[LAT-1];

  always_ff @(posedge clk)
    if (rst_n) assert (int'(shift) <= DROP) else $error("k8_multiplier: shift above %0d", DROP);
endmodule

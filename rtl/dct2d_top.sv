// dct2d_top: 8x8 2-D DCT / IDCT processor, row-column decomposition.
//
// Forward (fwd=1):  X = K8 .* (J_R8 * x * J_R8^t)
// Inverse (fwd=0):  x = J_R8^t * (K8 .* X) * J_R8
// Data enter and leave at one word per Clk1 cycle. A down-sampler (D-S)
// turns the input into two streams at half rate (Clk2, an enable that is
// high every other Clk1 cycle), so both 1-D J_R8 processors and the
// transpose buffer (TB) run at fs/2; an up-sampler (U-S) restores the full
// rate. Only the K8 normalisation multiplier runs at the full rate: it sits
// at the output for the DCT and at the input for the IDCT.
//
// Block framing: a free-running 64-cycle counter defines block slots, and
// blk_sync is high in the cycle where the first word of a block must be
// presented (in_valid high for the 64 words of the block). Blocks may follow
// each other without gaps.
// DCT: din[PIX_W-1:0] carries signed 9-bit pixels, row by row (x(n,0..7)
// for n = 0..7). dout carries 12-bit coefficients column by column, the
// columns in the order l = 0,4,2,6,1,5,3,7 and each column in natural order
// k = 0..7 (saturated to 12 bits).
// IDCT: din carries 12-bit coefficients in the layout the DCT produces; dout
// carries 9-bit pixels row by row (rounded, saturated, sign-extended).
// Internal numbers are 20-bit two's complement with FRAC fractional bits in
// the forward direction and FRAC_I in the inverse, where values are smaller.
// Latency (first input word to first output word): 176 Clk1 cycles for the
// DCT and 177 for the IDCT; throughput one block per 64 Clk1 cycles. fwd may
// only change while the pipeline is empty.
//
// Follows the original design: the unit chain, the K8 placement per
// direction, the one-word-per-clock rate, and the 9/12-bit I/O widths. Own
// choice: the slot framing, the fixed-point formats, the output rounding and
// saturation, and the data order within the layout. The latency (176/177)
// differs from the original's 172/178.
module dct2d_top
  import dct_pkg::tag_t, dct_pkg::K_FRAC;
#(
  parameter int DATA_W  = dct_pkg::DATA_W,
  parameter int PIX_W   = 9,
  parameter int COEF_W  = 12,
  parameter int FRAC    = dct_pkg::FRAC,
  parameter int FRAC_I  = 7
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              fwd,
  input  logic              in_valid,
  input  logic [COEF_W-1:0] din,
  output logic              blk_sync,
  output logic              out_valid,
  output logic              out_sob,
  output logic [COEF_W-1:0] dout
);
  logic [5:0]        slot_q;
  logic              en2;
  tag_t              in_tag;
  logic [DATA_W-1:0] pix_q, coef_in;

  tag_t              k8_it, k8_ot, ds_it, ds_ot, p1_ot, tb_ot, p2_ot, us_ot;
  logic [DATA_W-1:0] k8_i, k8_o, ds_i;
  logic [DATA_W-1:0] ds_e, ds_o, p1_e, p1_o, tb_e, tb_o, p2_e, p2_o, us_o;
  logic [DATA_W-1:0] pix_r;

  // control: block slot counter, Clk2 enable, input tags
  always_ff @(posedge clk) begin
    if (!rst_n) slot_q <= 6'd0;
    else        slot_q <= slot_q + 6'd1;
  end
  assign en2      = slot_q[0];
  assign blk_sync = (slot_q == 6'd0);
  assign in_tag   = '{v: in_valid, sov: (slot_q[2:0] == 3'd0), sob: (slot_q == 6'd0)};

  assign pix_q   = DATA_W'(signed'(din[PIX_W-1:0])) << FRAC;
  assign coef_in = DATA_W'(signed'(din));

  // K8: input side for the IDCT, output side for the DCT
  assign k8_it = fwd ? us_ot : in_tag;
  assign k8_i  = fwd ? us_o  : coef_in;
  k8_multiplier #(.W(DATA_W), .LAT(17)) u_k8 (
    .clk, .rst_n,
    .shift  (fwd ? 5'(2 + K_FRAC + FRAC) : 5'(2 + K_FRAC - FRAC_I)),
    .in_tag (k8_it), .in_d(k8_i), .out_tag(k8_ot), .out_d(k8_o)
  );

  assign ds_it = fwd ? in_tag : k8_ot;
  assign ds_i  = fwd ? pix_q  : k8_o;
  down_sampler #(.W(DATA_W)) u_ds (
    .clk, .rst_n, .en2, .reorder(~fwd), .in_tag(ds_it), .in_d(ds_i),
    .out_tag(ds_ot), .out_e(ds_e), .out_o(ds_o)
  );

  jr8_proc #(.W(DATA_W)) u_p1 (
    .clk, .rst_n, .en2, .fwd, .in_tag(ds_ot), .in_e(ds_e), .in_o(ds_o),
    .out_tag(p1_ot), .out_e(p1_e), .out_o(p1_o)
  );

  transpose_buffer #(.W(DATA_W), .TB_W(DATA_W), .TB_SHIFT(0)) u_tb (
    .clk, .rst_n, .en2, .in_tag(p1_ot), .in_e(p1_e), .in_o(p1_o),
    .out_tag(tb_ot), .out_e(tb_e), .out_o(tb_o)
  );

  jr8_proc #(.W(DATA_W)) u_p2 (
    .clk, .rst_n, .en2, .fwd, .in_tag(tb_ot), .in_e(tb_e), .in_o(tb_o),
    .out_tag(p2_ot), .out_e(p2_e), .out_o(p2_o)
  );

  up_sampler #(.W(DATA_W)) u_us (
    .clk, .rst_n, .en2, .reorder(fwd), .in_tag(p2_ot), .in_e(p2_e), .in_o(p2_o),
    .out_tag(us_ot), .out_d(us_o)
  );

  // output formatting
  function automatic logic [COEF_W-1:0] sat(input logic [DATA_W-1:0] v, input int bits);
    logic signed [DATA_W-1:0] s, hi, lo;
    s  = signed'(v);
    hi = (DATA_W'(1) << (bits - 1)) - DATA_W'(1);
    lo = -(DATA_W'(1) << (bits - 1));
    if (s > hi)      return COEF_W'(hi);
    else if (s < lo) return COEF_W'(lo);
    else             return COEF_W'(s);
  endfunction

  // IDCT output: round half away from zero to an integer
  always_comb begin
    logic [DATA_W-1:0] mag;
    mag   = us_o[DATA_W-1] ? -us_o : us_o;
    mag   = (mag + DATA_W'(1 << (FRAC_I - 1))) >> FRAC_I;
    pix_r = us_o[DATA_W-1] ? -mag : mag;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_sob   <= 1'b0;
    end else begin
      out_valid <= fwd ? k8_ot.v : us_ot.v;
      out_sob   <= fwd ? (k8_ot.v & k8_ot.sob) : (us_ot.v & us_ot.sob);
    end
  end
  always_ff @(posedge clk) dout <= fwd ? sat(k8_o, COEF_W) : sat(pix_r, PIX_W);
endmodule

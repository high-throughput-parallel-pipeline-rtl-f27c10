// dct_pkg: types and constants shared by the 2-D DCT/IDCT processor.
//
// Data words are 20-bit two's-complement fixed-point numbers with FRAC
// fractional bits (20 bits is the datapath width of the design; the
// placement of the binary point is this implementation's choice). Every
// stream word travels with a tag: a valid bit, a start-of-vector bit (first
// of the four Clk2 words that carry one 8-point vector, or first of the
// eight Clk1 words) and a start-of-block bit (first word of an 8x8 block).
// The fixed coefficients are the 12-bit values T1, T5, T2 and C4 (x/4096)
// and the ten 13-bit normalisation constants CiCj (x/8192).
//
// The coefficients and the normalisation constants are the original design's
// values. The tag type and the binary-point placement are this design's own.
package dct_pkg;

  localparam int DATA_W = 20;
  localparam int FRAC   = 4;

  typedef struct packed {
    logic v;    // word valid
    logic sov;  // first word of a vector
    logic sob;  // first word of a block
  } tag_t;

  localparam tag_t TAG_IDLE = '{v: 1'b0, sov: 1'b0, sob: 1'b0};

  // Hardwired multiplier constants, scaled by 2^12.
  localparam int COEF_FRAC = 12;
  localparam int T1_Q = 815;    // C7/C1
  localparam int T5_Q = 6130;   // C3/C5
  localparam int T2_Q = 1696;   // C6/C2
  localparam int C4_Q = 2896;   // cos(pi/4)

  // Normalisation constants CiCj, scaled by 2^13 (C0 = C4).
  localparam int K_FRAC = 13;
  typedef enum logic [1:0] {CI_C4 = 2'd0, CI_C2 = 2'd1, CI_C1 = 2'd2, CI_C5 = 2'd3} cidx_e;

  // Reordered position r (0..7) of the J_R8 vector holds frequency
  // 0,4,2,6,1,5,3,7; this is the factor of P_R8 at that position.
  function automatic cidx_e p_of_pos(input logic [2:0] r);
    case (r)
      3'd0, 3'd1: return CI_C4;
      3'd2, 3'd3: return CI_C2;
      3'd4, 3'd7: return CI_C1;
      default:    return CI_C5;
    endcase
  endfunction

  // Factor of P_R8 belonging to natural frequency f.
  function automatic cidx_e p_of_freq(input logic [2:0] f);
    case (f)
      3'd0, 3'd4: return CI_C4;
      3'd2, 3'd6: return CI_C2;
      3'd1, 3'd7: return CI_C1;
      default:    return CI_C5;
    endcase
  endfunction

  function automatic logic [12:0] k8_const(input cidx_e a, input cidx_e b);
    cidx_e lo, hi;
    lo = (a < b) ? a : b;
    hi = (a < b) ? b : a;
    case ({lo, hi})
      {CI_C4, CI_C4}: return 13'd4096;
      {CI_C4, CI_C2}: return 13'd5352;
      {CI_C4, CI_C1}: return 13'd5681;
      {CI_C4, CI_C5}: return 13'd3218;
      {CI_C2, CI_C2}: return 13'd6992;
      {CI_C2, CI_C1}: return 13'd7423;
      {CI_C2, CI_C5}: return 13'd4205;
      {CI_C1, CI_C1}: return 13'd7880;
      {CI_C1, CI_C5}: return 13'd4464;
      default:        return 13'd2529;  // C5*C5
    endcase
  endfunction

  // Natural frequency carried at reordered position r: 0,4,2,6,1,5,3,7
  // (the bit reversal of r, which is its own inverse).
  function automatic logic [2:0] bitrev3(input logic [2:0] r);
    return {r[0], r[1], r[2]};
  endfunction

endpackage

// ieee1180_idct_tb: IDCT accuracy test in the style of IEEE Std 1180-1990.
//
// For each of six input sets (random pixels in [-256,255], [-300,300],
// [-5,5], and the same three with the sign of every input flipped) NBLK
// random 8x8 blocks are transformed with a double-precision forward DCT,
// rounded and clipped to [-2048,2047], and streamed back to back through
// the processor in IDCT mode. Each output pixel is compared with the
// double-precision IDCT of the same coefficients, rounded and clipped to
// [-256,255]. Per set the standard's statistics are formed and checked:
//   peak error              <= 1
//   peak mean square error   <= 0.06   (per pixel position)
//   overall mean square error <= 0.02
//   peak mean error          <= 0.015  (per pixel position)
//   overall mean error       <= 0.0015
// and an all-zero block must give an all-zero output. The random generator
// is $urandom, not the generator given in the standard.
module ieee1180_idct_tb;
  localparam int NBLK = 10000;

  logic        clk = 1'b0;
  logic        rst_n;
  logic        fwd;
  logic        in_valid;
  logic [11:0] din;
  logic        blk_sync, out_valid, out_sob;
  logic [11:0] dout;

  int  checks = 0, failures = 0;
  real cs [8][8];
  int  perm [8] = '{0, 4, 2, 6, 1, 5, 3, 7};
  int  exp_q [$];
  int  nout = 0;
  int  peak = 0;
  real sum_e [64];
  real sum_e2 [64];

  dct2d_top dut (.*);

  always #5 clk = ~clk;

  initial begin
    #200000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real cc(int k);
    return (k == 0) ? 1.0 / $sqrt(2.0) : 1.0;
  endfunction

  function automatic int rnd(real r);
    return (r >= 0.0) ? int'($floor(r + 0.5)) : -int'($floor(-r + 0.5));
  endfunction

  function automatic int clip(int v, int lo, int hi);
    return (v < lo) ? lo : (v > hi) ? hi : v;
  endfunction

  // separable double-precision transforms
  task automatic dct_ref(input int x [8][8], output real X [8][8]);
    real t [8][8];
    for (int n = 0; n < 8; n++)
      for (int l = 0; l < 8; l++) begin
        t[n][l] = 0.0;
        for (int m = 0; m < 8; m++) t[n][l] += x[n][m] * cs[m][l];
        t[n][l] *= cc(l) / 2.0;
      end
    for (int k = 0; k < 8; k++)
      for (int l = 0; l < 8; l++) begin
        X[k][l] = 0.0;
        for (int n = 0; n < 8; n++) X[k][l] += t[n][l] * cs[n][k];
        X[k][l] *= cc(k) / 2.0;
      end
  endtask

  task automatic idct_ref(input int X [8][8], output real x [8][8]);
    real t [8][8];
    for (int k = 0; k < 8; k++)
      for (int m = 0; m < 8; m++) begin
        t[k][m] = 0.0;
        for (int l = 0; l < 8; l++) t[k][m] += cc(l) / 2.0 * X[k][l] * cs[m][l];
      end
    for (int n = 0; n < 8; n++)
      for (int m = 0; m < 8; m++) begin
        x[n][m] = 0.0;
        for (int k = 0; k < 8; k++) x[n][m] += cc(k) / 2.0 * t[k][m] * cs[n][k];
      end
  endtask

  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      int got, e, pos;
      got = int'(signed'(dout[8:0]));
      pos = nout % 64;
      if (exp_q.size() == 0) failures++;
      else begin
        e = got - exp_q.pop_front();
        sum_e[pos]  += e;
        sum_e2[pos] += e * e;
        if (e > peak)  peak = e;
        if (-e > peak) peak = -e;
      end
      nout++;
    end
  end

  task automatic run_set(input int lo, input int hi, input bit neg, input int nb);
    int  x [8][8];
    int  X [8][8];
    real R [8][8];
    real pmse, pme, omse, ome;
    for (int i = 0; i < 64; i++) begin sum_e[i] = 0.0; sum_e2[i] = 0.0; end
    peak = 0;
    nout = 0;
    for (int b = 0; b < nb; b++) begin
      for (int n = 0; n < 8; n++)
        for (int m = 0; m < 8; m++) begin
          x[n][m] = lo + int'($urandom_range(hi - lo));
          if (neg) x[n][m] = -x[n][m];
        end
      dct_ref(x, R);
      for (int k = 0; k < 8; k++)
        for (int l = 0; l < 8; l++) X[k][l] = clip(rnd(R[k][l]), -2048, 2047);
      idct_ref(X, R);
      for (int n = 0; n < 8; n++)
        for (int m = 0; m < 8; m++) exp_q.push_back(clip(rnd(R[n][m]), -256, 255));
      while (!blk_sync) @(negedge clk);
      for (int t = 0; t < 8; t++)
        for (int e = 0; e < 8; e++) begin
          in_valid = 1'b1;
          din      = 12'(X[e][perm[t]]);
          @(negedge clk);
        end
      in_valid = 1'b0;
    end
    while (exp_q.size() > 0) @(negedge clk);
    pmse = 0.0; pme = 0.0; omse = 0.0; ome = 0.0;
    for (int i = 0; i < 64; i++) begin
      real me, mse;
      me  = sum_e[i] / nb;
      mse = sum_e2[i] / nb;
      if (mse > pmse) pmse = mse;
      if (me > pme) pme = me;
      if (-me > pme) pme = -me;
      omse += sum_e2[i];
      ome  += sum_e[i];
    end
    omse = omse / (64.0 * nb);
    ome  = ome / (64.0 * nb);
    $display("range [%0d,%0d]%s: peak=%0d PMSE=%f OMSE=%f PME=%f OME=%f",
             lo, hi, neg ? " negated" : "", peak, pmse, omse, pme, ome < 0 ? -ome : ome);
    checks += 6;
    if (nout != 64 * nb)                  failures++;
    if (peak > 1)                         failures++;
    if (pmse > 0.06)                      failures++;
    if (omse > 0.02)                      failures++;
    if (pme > 0.015)                      failures++;
    if (ome > 0.0015 || ome < -0.0015)    failures++;
  endtask

  initial begin
    for (int i = 0; i < 8; i++)
      for (int j = 0; j < 8; j++) cs[i][j] = $cos((2.0 * i + 1.0) * j * 3.14159265358979323846 / 16.0);
    rst_n = 1'b0; fwd = 1'b0; in_valid = 1'b0; din = '0;
    repeat (4) @(negedge clk);
    rst_n = 1'b1;
    run_set(-256, 255, 1'b0, NBLK);
    run_set(-256, 255, 1'b1, NBLK);
    run_set(-300, 300, 1'b0, NBLK);
    run_set(-300, 300, 1'b1, NBLK);
    run_set(-5, 5, 1'b0, NBLK);
    run_set(-5, 5, 1'b1, NBLK);
    run_set(0, 0, 1'b0, 4);   // all-zero input
    checks++;
    if (peak != 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

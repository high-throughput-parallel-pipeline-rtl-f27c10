// dct2d_top_tb: end-to-end test of the 2-D DCT/IDCT processor at its
// default parameters.
//
// Streams NDCT random 8x8 pixel blocks back to back through the forward
// transform, drains the pipeline, switches F/I and streams NIDCT coefficient
// blocks (the rounded, clipped exact DCT of random pixel blocks, in the
// column-wise layout the forward transform produces) through the inverse.
// Every output word is compared with a double-precision reference: the
// forward output must be within 1 of round(DCT) and the inverse output within
// 1 of the clipped round(IDCT). Also checked: the fixed latency from block
// start to first output word and the one-block-per-64-cycles throughput.
// Mechanisms counted (each must occur): forward blocks, inverse blocks,
// transpose-buffer blocks written row-wise and column-wise, back-to-back
// blocks, F/I switch, and output clipping in the inverse.
module dct2d_top_tb;
  localparam int NDCT    = 12;
  localparam int NIDCT   = 12;
  localparam int LAT_DCT  = 176;
  localparam int LAT_IDCT = 177;

  logic        clk = 1'b0;
  logic        rst_n;
  logic        fwd;
  logic        in_valid;
  logic [11:0] din;
  logic        blk_sync, out_valid, out_sob;
  logic [11:0] dout;

  int checks = 0, failures = 0;
  int cyc = 0;
  int maxerr_f = 0, maxerr_i = 0;
  int n_row = 0, n_col = 0, n_b2b = 0, n_clip = 0, n_fblk = 0, n_iblk = 0, n_switch = 0;

  real cs [8][8];             // cos((2i+1) j pi / 16)
  int  perm [8] = '{0, 4, 2, 6, 1, 5, 3, 7};

  // expected output streams, 64 words per block
  int  exp_q [$];
  int  in_start [$];          // cycle of each block's first input word
  int  out_words = 0;
  bit  last_out_sob_seen = 0;
  int  last_sob_cyc = 0;
  int  cur_lat = 0;

  dct2d_top dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    #2000000;
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

  task automatic dct_ref(input int x [8][8], output real X [8][8]);
    for (int k = 0; k < 8; k++)
      for (int l = 0; l < 8; l++) begin
        real s = 0.0;
        for (int n = 0; n < 8; n++)
          for (int m = 0; m < 8; m++) s += x[n][m] * cs[n][k] * cs[m][l];
        X[k][l] = cc(k) * cc(l) / 4.0 * s;
      end
  endtask

  task automatic idct_ref(input int X [8][8], output real x [8][8]);
    for (int n = 0; n < 8; n++)
      for (int m = 0; m < 8; m++) begin
        real s = 0.0;
        for (int k = 0; k < 8; k++)
          for (int l = 0; l < 8; l++) s += cc(k) * cc(l) / 4.0 * X[k][l] * cs[n][k] * cs[m][l];
        x[n][m] = s;
      end
  endtask

  task automatic feed_block(input int w [64]);
    while (!blk_sync) @(negedge clk);
    if (in_start.size() > 0 && cyc - in_start[$] == 64) n_b2b++;
    in_start.push_back(cyc);
    for (int i = 0; i < 64; i++) begin
      in_valid = 1'b1;
      din      = 12'(w[i]);
      @(negedge clk);
    end
    in_valid = 1'b0;
  endtask

  // output checker
  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      int got, exp, e;
      if (out_sob) begin
        if (in_start.size() == 0) begin
          failures++;
          $display("output block without input");
        end else begin
          cur_lat = cyc - in_start.pop_front();
          checks++;
          if (cur_lat != (fwd ? LAT_DCT : LAT_IDCT)) begin
            failures++;
            $display("latency %0d (fwd=%0d)", cur_lat, fwd);
          end
          if (last_out_sob_seen && (cyc - last_sob_cyc) != 64 && (cyc - last_sob_cyc) < 128) begin
            failures++;
            $display("output blocks %0d cycles apart", cyc - last_sob_cyc);
          end
          last_out_sob_seen = 1;
          last_sob_cyc      = cyc;
          if (fwd) n_fblk++; else n_iblk++;
        end
      end
      got = fwd ? int'(signed'(dout)) : int'(signed'(dout[8:0]));
      if (exp_q.size() == 0) begin
        failures++;
        $display("unexpected output word");
      end else begin
        exp = exp_q.pop_front();
        e   = (got > exp) ? got - exp : exp - got;
        checks++;
        if (fwd && e > maxerr_f) maxerr_f = e;
        if (!fwd && e > maxerr_i) maxerr_i = e;
        if (e > 1) begin
          failures++;
          if (failures < 10) $display("cyc %0d fwd=%0d got %0d exp %0d", cyc, fwd, got, exp);
        end
      end
    end
  end

  // transpose-buffer direction per block
  always @(posedge clk) begin
    if (rst_n && dut.en2 && dut.u_tb.in_tag.v && dut.u_tb.in_tag.sob) begin
      if (dut.u_tb.rc) n_col++; else n_row++;
    end
  end

  initial begin
    int  x [8][8];
    int  X [8][8];
    real R [8][8];
    int  w [64];
    for (int i = 0; i < 8; i++)
      for (int j = 0; j < 8; j++) cs[i][j] = $cos((2.0 * i + 1.0) * j * 3.14159265358979323846 / 16.0);
    rst_n = 1'b0; fwd = 1'b1; in_valid = 1'b0; din = '0;
    repeat (4) @(negedge clk);
    rst_n = 1'b1;

    // forward transforms
    for (int b = 0; b < NDCT; b++) begin
      for (int n = 0; n < 8; n++)
        for (int m = 0; m < 8; m++) begin
          case (b)
            0:       x[n][m] = 255;
            1:       x[n][m] = -256;
            2:       x[n][m] = ((n + m) % 2 == 0) ? 255 : -256;
            3:       x[n][m] = (m % 2 == 0) ? 255 : -256;
            default: x[n][m] = int'($urandom_range(511)) - 256;
          endcase
          w[n*8+m] = x[n][m];
        end
      dct_ref(x, R);
      for (int t = 0; t < 8; t++)
        for (int e = 0; e < 8; e++) exp_q.push_back(clip(rnd(R[e][perm[t]]), -2048, 2047));
      feed_block(w);
    end
    while (exp_q.size() > 0) @(negedge clk);
    repeat (300) @(negedge clk);

    // inverse transforms
    fwd = 1'b0;
    n_switch++;
    repeat (300) @(negedge clk);
    for (int b = 0; b < NIDCT; b++) begin
      int lim;
      lim = (b % 3 == 0) ? 300 : (b % 3 == 1) ? 256 : 5;
      for (int n = 0; n < 8; n++)
        for (int m = 0; m < 8; m++) x[n][m] = int'($urandom_range(2 * lim)) - lim;
      dct_ref(x, R);
      for (int k = 0; k < 8; k++)
        for (int l = 0; l < 8; l++) X[k][l] = clip(rnd(R[k][l]), -2048, 2047);
      for (int t = 0; t < 8; t++)
        for (int e = 0; e < 8; e++) w[t*8+e] = X[e][perm[t]];
      idct_ref(X, R);
      for (int n = 0; n < 8; n++)
        for (int m = 0; m < 8; m++) begin
          int v;
          v = rnd(R[n][m]);
          if (v > 255 || v < -256) n_clip++;
          exp_q.push_back(clip(v, -256, 255));
        end
      feed_block(w);
    end
    while (exp_q.size() > 0 && cyc < 100000) @(negedge clk);
    repeat (10) @(negedge clk);

    $display("max error: forward %0d, inverse %0d", maxerr_f, maxerr_i);
    $display("mechanisms: fwd_blocks=%0d idct_blocks=%0d tb_row=%0d tb_col=%0d back_to_back=%0d fi_switch=%0d clip=%0d",
             n_fblk, n_iblk, n_row, n_col, n_b2b, n_switch, n_clip);
    checks += 8;
    if (n_fblk != NDCT)  begin failures++; $display("forward blocks out: %0d", n_fblk); end
    if (n_iblk != NIDCT) begin failures++; $display("inverse blocks out: %0d", n_iblk); end
    if (n_row == 0)    failures++;
    if (n_col == 0)    failures++;
    if (n_b2b == 0)    failures++;
    if (n_switch == 0) failures++;
    if (n_clip == 0)   failures++;
    if (exp_q.size() != 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

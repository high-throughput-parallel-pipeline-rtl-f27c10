// jr8_proc_tb: self-checking test of the 1-D J_R8 / J_R8^t processor.
//
// Forward: random 8-point vectors x, two streams (x0..x3, x4..x7); the
// outputs must match J_R8 * x, where J_R8 = P_R8^-1 * S_R8 and S_R8 is the
// 8-point DCT matrix with rows in the order 0,4,2,6,1,5,3,7 (computed here
// from cosines). Inverse: random reordered coefficient vectors X; outputs
// must match J_R8^t * X. A tolerance of 4 LSB covers the rounding of the
// three chained hardwired multipliers. Also checks the 20-cycle Clk2
// latency in both modes.
module jr8_proc_tb;
  import dct_pkg::*;
  localparam int NV = 100;

  logic        clk = 1'b0;
  logic        rst_n, en2 = 1'b0, fwd;
  tag_t        in_tag, out_tag;
  logic [19:0] in_e, in_o, out_e, out_o;
  int checks = 0, failures = 0, maxerr = 0;
  real exp_q [$];
  int  t_in [$];
  int  cyc2 = 0;
  real J [8][8];
  int  perm [8] = '{0, 4, 2, 6, 1, 5, 3, 7};
  int  pidx [8] = '{4, 4, 2, 2, 1, 5, 5, 1};  // P_R8 = diag(C0,C4,C2,C2,C1,C5,C5,C1)/2, C0 = C4

  jr8_proc dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) begin
    en2 <= ~en2;
    if (en2) cyc2 <= cyc2 + 1;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic cmp(real e, logic [19:0] g);
    real d;
    d = real'(int'(signed'(g))) - e;
    if (d < 0) d = -d;
    checks++;
    if (d > maxerr) maxerr = int'(d);
    if (d > 4.0) begin
      failures++;
      if (failures < 10) $display("got %0d exp %f", int'(signed'(g)), e);
    end
  endtask

  always @(posedge clk) begin
    if (rst_n && en2 && out_tag.v) begin
      real a [8];
      for (int i = 0; i < 8; i++) a[i] = exp_q[i];
      // pair j carries elements j and 4+j of the output vector
      if (out_tag.sov) begin
        checks++;
        if (cyc2 - t_in.pop_front() != 20) begin
          failures++;
          $display("latency %0d", cyc2);
        end
      end
      cmp(exp_q.pop_front(), out_e);
      cmp(exp_q.pop_front(), out_o);
    end
  end

  initial begin
    int  x [8];
    real s;
    real pd [8];
    // J = diag(1/p) * S_R8 with p = diag(P_R8)
    for (int r = 0; r < 8; r++) begin
      int k;
      k = perm[r];
      for (int n = 0; n < 8; n++) begin
        s = ((k == 0) ? 1.0 / $sqrt(2.0) : 1.0) / 2.0 * $cos((2.0 * n + 1.0) * k * 3.14159265358979323846 / 16.0);
        J[r][n] = s;
      end
      pd[r] = 0.5 * $cos(real'(pidx[r]) * 3.14159265358979323846 / 16.0);
      for (int n = 0; n < 8; n++) J[r][n] = J[r][n] / pd[r];
    end
    rst_n = 1'b0; fwd = 1'b1; in_tag = TAG_IDLE; in_e = '0; in_o = '0;
    repeat (6) @(negedge clk);
    rst_n = 1'b1;
    for (int mode = 0; mode < 2; mode++) begin
      fwd = (mode == 0);
      while (en2) @(negedge clk);
      for (int v = 0; v < NV; v++) begin
        real y [8];
        for (int i = 0; i < 8; i++) x[i] = int'($urandom_range(8191)) - 4096;
        for (int r = 0; r < 8; r++) begin
          y[r] = 0.0;
          for (int n = 0; n < 8; n++) y[r] += fwd ? J[r][n] * x[n] : J[n][r] * x[n];
        end
        for (int j = 0; j < 4; j++) begin
          exp_q.push_back(y[j]);
          exp_q.push_back(y[4+j]);
        end
        for (int i = 0; i < 4; i++) begin
          while (!en2) @(negedge clk);
          in_tag = '{v: 1'b1, sov: (i == 0), sob: 1'b0};
          in_e   = 20'(x[i]);
          in_o   = 20'(x[4+i]);
          if (i == 0) t_in.push_back(cyc2);
          @(negedge clk);
        end
      end
      while (!en2) @(negedge clk);
      in_tag = TAG_IDLE;
      repeat (60) @(negedge clk);
    end
    checks++;
    if (exp_q.size() != 0) failures++;
    $display("max error %0d", maxerr);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

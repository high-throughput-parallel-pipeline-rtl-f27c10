// k8_multiplier_tb: self-checking test of the K8 normalisation multiplier.
//
// Streams blocks of 64 random words (block start flagged by sob) with the
// two output formats used by the processor (shift 19 for the DCT output,
// 11 for the IDCT input). Word n of a block (t = n/8, e = n%8) must be
// multiplied by the 13-bit constant for p(frequency e) * p(frequency
// 0,4,2,6,1,5,3,7 [t]) and rounded half-up; the constants are listed here
// independently of the RTL. Checks the 17-cycle latency and that all ten
// constants are used.
module k8_multiplier_tb;
  import dct_pkg::*;
  localparam int NB = 6;

  logic        clk = 1'b0;
  logic        rst_n;
  logic [4:0]  shift;
  tag_t        in_tag, out_tag;
  logic [19:0] in_d, out_d;
  int checks = 0, failures = 0;
  int exp_q [$];
  int t_in [$];
  int cyc = 0;
  int perm [8] = '{0, 4, 2, 6, 1, 5, 3, 7};
  // index of the factor of each natural frequency: 0:C4 1:C1 2:C2 3:C5
  int fi [8]  = '{0, 1, 2, 3, 0, 3, 2, 1};
  int kc [4][4] = '{'{4096, 5681, 5352, 3218},
                    '{5681, 7880, 7423, 4464},
                    '{5352, 7423, 6992, 4205},
                    '{3218, 4464, 4205, 2529}};
  bit used [4][4];

  k8_multiplier dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (rst_n && out_tag.v) begin
      int e;
      e = exp_q.pop_front();
      checks++;
      if (int'(signed'(out_d)) != e) begin
        failures++;
        if (failures < 10) $display("got %0d exp %0d", int'(signed'(out_d)), e);
      end
      if (out_tag.sob) begin
        checks++;
        if (cyc - t_in.pop_front() != 17) failures++;
      end
    end
  end

  initial begin
    int cnt;
    rst_n = 1'b0; in_tag = TAG_IDLE; in_d = '0; shift = 5'd19;
    repeat (6) @(negedge clk);
    rst_n = 1'b1;
    for (int b = 0; b < NB; b++) begin
      shift = (b % 2 == 0) ? 5'd19 : 5'd11;
      for (int n = 0; n < 64; n++) begin
        int d, a, c;
        longint p;
        d = (b % 2 == 0) ? int'($urandom_range(65535)) - 32768 : int'($urandom_range(4095)) - 2048;
        if (b < 2 && n == 0) d = (b == 0) ? -524288 : -2048;
        a = fi[n % 8];
        c = fi[perm[n / 8]];
        used[a][c] = 1'b1;
        p = longint'(d) * kc[a][c] + (longint'(1) << (shift - 1));
        exp_q.push_back(int'(p >>> shift));
        in_tag = '{v: 1'b1, sov: (n % 8 == 0), sob: (n == 0)};
        in_d   = 20'(d);
        if (n == 0) t_in.push_back(cyc);
        @(negedge clk);
      end
      in_tag = TAG_IDLE;
      repeat (30) @(negedge clk);
    end
    cnt = 0;
    foreach (used[i, j]) if (used[i][j]) cnt++;
    checks += 2;
    if (cnt != 16) failures++;
    if (exp_q.size() != 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// up_sampler_tb: self-checking test of the U-S unit.
//
// Sends random vectors back to back as four pairs (x_j, x_{4+j}), one per
// Clk2 cycle, in both orderings. Each must come out as eight consecutive
// Clk1 words: x_0..x_7, or with reorder=1 the natural-order vector whose
// element f is at position bitrev(f) of the input. Checks the sov tag and
// that the first word is registered on the Clk2 edge that stores pair 2
// (sampled 5 Clk1 cycles after pair 0 is presented).
module up_sampler_tb;
  import dct_pkg::*;
  localparam int NV = 60;

  logic        clk = 1'b0;
  logic        rst_n, en2 = 1'b0, reorder;
  tag_t        in_tag, out_tag;
  logic [19:0] in_e, in_o, out_d;
  int checks = 0, failures = 0;
  int exp_q [$];
  int tl [$];
  int cyc = 0;
  int perm [8] = '{0, 4, 2, 6, 1, 5, 3, 7};

  up_sampler dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) begin
    en2 <= ~en2;
    cyc <= cyc + 1;
  end

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
      if (int'(signed'(out_d)) != e) failures++;
      if (out_tag.sov) begin
        checks++;
        if (cyc - tl.pop_front() != 5) begin
          failures++;
          $display("latency wrong");
        end
      end
    end
  end

  initial begin
    int x [8];
    rst_n = 1'b0; in_tag = TAG_IDLE; in_e = '0; in_o = '0; reorder = 1'b0;
    repeat (6) @(negedge clk);
    rst_n = 1'b1;
    for (int mode = 0; mode < 2; mode++) begin
      reorder = mode[0];
      for (int v = 0; v < NV; v++) begin
        for (int i = 0; i < 8; i++) x[i] = int'($urandom_range(1048575)) - 524288;
        // x is the processor-order vector: position r holds frequency perm[r]
        for (int f = 0; f < 8; f++) begin
          int r;
          r = 0;
          for (int q = 0; q < 8; q++) if (perm[q] == f) r = q;
          exp_q.push_back(reorder ? x[r] : x[f]);
        end
        for (int i = 0; i < 4; i++) begin
          while (!en2) @(negedge clk);
          in_tag = '{v: 1'b1, sov: (i == 0), sob: (i == 0 && v == 0)};
          in_e   = 20'(x[i]);
          in_o   = 20'(x[4+i]);
          if (i == 0) tl.push_back(cyc);
          @(negedge clk);
        end
      end
      while (!en2) @(negedge clk);
      in_tag = TAG_IDLE;
      repeat (20) @(negedge clk);
    end
    checks++;
    if (exp_q.size() != 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// down_sampler_tb: self-checking test of the D-S unit.
//
// Sends random 8-word vectors back to back at one word per Clk1 cycle,
// first with the vector's odd words on Clk2 edges, then shifted by one Clk1 cycle
// (as after the 17-cycle normalisation multiplier), in both orderings.
// Each vector must come out as four pairs, one per Clk2 cycle:
// (x_j, x_{4+j}), or with reorder=1 (x_f(j), x_f(4+j)) with f = 0,4,2,6,1,5,3,7.
// Checks the pair count, the sov/sob tags and the latency from the vector's
// first word to the sampling of its first pair: 7 Clk1 cycles when words 5
// and 7 fall on Clk2 edges, 8 when words 6 and 8 do.
module down_sampler_tb;
  import dct_pkg::*;
  localparam int NV = 60;

  logic        clk = 1'b0;
  logic        rst_n, en2 = 1'b0, reorder;
  tag_t        in_tag, out_tag;
  logic [19:0] in_d, out_e, out_o;
  int checks = 0, failures = 0;
  int exp_q [$];
  int tl [$];
  int cyc = 0;
  int perm [8] = '{0, 4, 2, 6, 1, 5, 3, 7};
  bit mode_al = 1'b0;   // words 5 and 7 fall on en2 edges

  down_sampler dut (.*);

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
    if (rst_n && en2 && out_tag.v) begin
      int ee, eo, t;
      ee = exp_q.pop_front();
      eo = exp_q.pop_front();
      checks += 2;
      if (int'(signed'(out_e)) != ee) begin
        failures++;
        if (failures < 6) $display("cyc %0d e got %0d exp %0d sov %0d", cyc, int'(signed'(out_e)), ee, out_tag.sov);
      end
      if (int'(signed'(out_o)) != eo) failures++;
      if (out_tag.sov) begin
        t = tl.pop_front();
        checks++;
        if (cyc - t != (mode_al ? 7 : 8)) begin
          failures++;
          $display("latency %0d", cyc - t);
        end
      end
    end
  end

  initial begin
    int x [8];
    rst_n = 1'b0; in_tag = TAG_IDLE; in_d = '0; reorder = 1'b0;
    repeat (6) @(negedge clk);
    rst_n = 1'b1;
    for (int mode = 0; mode < 4; mode++) begin
      reorder = mode[0];
      mode_al = mode[1];
      // vector start: aligned so that word 7 falls on an en2 edge, or shifted
      while (mode[1] ? en2 : !en2) @(negedge clk);
      for (int v = 0; v < NV; v++) begin
        for (int i = 0; i < 8; i++) x[i] = int'($urandom_range(1048575)) - 524288;
        for (int j = 0; j < 4; j++) begin
          exp_q.push_back(reorder ? x[perm[j]]   : x[j]);
          exp_q.push_back(reorder ? x[perm[4+j]] : x[4+j]);
        end
        for (int i = 0; i < 8; i++) begin
          in_tag = '{v: 1'b1, sov: (i == 0), sob: (i == 0 && v == 0)};
          in_d   = 20'(x[i]);
          if (i == 0) tl.push_back(cyc);
          @(negedge clk);
        end
      end
      in_tag = TAG_IDLE;
      repeat (20) @(negedge clk);
    end
    checks++;
    if (exp_q.size() != 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

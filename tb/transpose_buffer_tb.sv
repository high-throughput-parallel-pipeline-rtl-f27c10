// transpose_buffer_tb: self-checking test of the flip-flop transpose buffer.
//
// Streams NB blocks back to back; block b is eight vectors of eight random
// words, sent as pairs (v[i], v[4+i]) one per Clk2 cycle. Output vector k
// of a block must be (v_0[k], ..., v_7[k]) in the same pair format, 33 Clk2
// cycles after input vector k. Both write directions (row-wise and
// column-wise) are used, every second block each; the last block is a
// ramp 8*v+e-32 whose transpose is easy to read in a waveform.
module transpose_buffer_tb;
  import dct_pkg::*;
  localparam int NB = 8;

  logic        clk = 1'b0;
  logic        rst_n, en2 = 1'b0;
  tag_t        in_tag, out_tag;
  logic [19:0] in_e, in_o, out_e, out_o;
  int checks = 0, failures = 0;
  int exp_q [$];
  int t_in [$];
  int cyc2 = 0;
  int nrow = 0, ncol = 0;

  transpose_buffer dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) begin
    en2 <= ~en2;
    if (en2) cyc2 <= cyc2 + 1;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (rst_n && en2 && in_tag.v && in_tag.sob) begin
      if (dut.rc) ncol++; else nrow++;
    end
    if (rst_n && en2 && out_tag.v) begin
      int ee, eo;
      ee = exp_q.pop_front();
      eo = exp_q.pop_front();
      checks += 2;
      if (int'(signed'(out_e)) != ee) begin
        failures++;
        if (failures < 10) $display("e got %0d exp %0d", int'(signed'(out_e)), ee);
      end
      if (int'(signed'(out_o)) != eo) failures++;
      if (out_tag.sov) begin
        checks++;
        if (cyc2 - t_in.pop_front() != 33) begin
          failures++;
          $display("latency wrong");
        end
      end
    end
  end

  initial begin
    int m [8][8];
    rst_n = 1'b0; in_tag = TAG_IDLE; in_e = '0; in_o = '0;
    repeat (6) @(negedge clk);
    rst_n = 1'b1;
    while (en2) @(negedge clk);
    for (int b = 0; b <= NB; b++) begin
      for (int v = 0; v < 8; v++)
        for (int e = 0; e < 8; e++)
          m[v][e] = (b < NB) ? int'($urandom_range(1048575)) - 524288 : 8 * v + e - 32;
      for (int k = 0; k < 8; k++)
        for (int i = 0; i < 4; i++) begin
          exp_q.push_back(m[i][k]);
          exp_q.push_back(m[4+i][k]);
        end
      for (int v = 0; v < 8; v++)
        for (int i = 0; i < 4; i++) begin
          while (!en2) @(negedge clk);
          in_tag = '{v: 1'b1, sov: (i == 0), sob: (v == 0 && i == 0)};
          in_e   = 20'(m[v][i]);
          in_o   = 20'(m[v][4+i]);
          if (i == 0) t_in.push_back(cyc2);
          @(negedge clk);
        end
    end
    // one more (invalid) block period flushes the last block out
    for (int c = 0; c < 32; c++) begin
      while (!en2) @(negedge clk);
      in_tag = '{v: 1'b0, sov: (c % 4 == 0), sob: (c == 0)};
      @(negedge clk);
    end
    in_tag = TAG_IDLE;
    repeat (10) @(negedge clk);
    checks += 2;
    if (exp_q.size() != 0) begin failures++; $display("%0d words missing", exp_q.size()); end
    if (nrow == 0 || ncol == 0) failures++;
    $display("blocks written row-wise %0d, column-wise %0d", nrow, ncol);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

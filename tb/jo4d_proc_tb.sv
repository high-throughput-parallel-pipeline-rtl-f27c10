// jo4d_proc_tb: self-checking test of jo4d_proc (J_O4D rows: v0, C4(v2-v1), C4(v1+v2), v3).
//
// Streams NV random 4-point vectors back to back (one word per Clk2 cycle,
// Clk2 being an enable that is high every other clock) and
// compares every output word with an integer reference; products are
// round-half-up of (di*coef +/- dj*4096) / 4096. Also checks the 5-cycle
// Clk2 latency from the first input word to the first output word.
module jo4d_proc_tb;
  import dct_pkg::*;
  localparam int NV = 200;

  logic        clk = 1'b0;
  logic        rst_n, en2 = 1'b0, fwd;
  tag_t        in_tag, out_tag;
  logic [19:0] in_d, out_d;
  int checks = 0, failures = 0;
  int exp_q [$];
  int t_in [$];
  int cyc2 = 0;

  jo4d_proc dut (
    .clk, .rst_n, .en2,
    .in_tag, .in_d, .out_tag, .out_d
  );

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

  function automatic int mulr(int di, int coef, int dj);
    longint p;
    p = longint'(di) * coef + longint'(dj) * 4096 + 2048;
    return int'(p >>> 12);
  endfunction

  function automatic int ref_out(int v [4], int j, bit f);
    int r;
    begin
      case (j)
        0: r = v[0];
        1: r = mulr(v[2] - v[1], 2896, 0);
        2: r = mulr(v[1] + v[2], 2896, 0);
        default: r = v[3];
      endcase
    end
    return r;
  endfunction

  always @(posedge clk) begin
    if (rst_n && en2 && out_tag.v) begin
      int e;
      e = exp_q.pop_front();
      checks++;
      if (int'(signed'(out_d)) != e) begin
        failures++;
        if (failures < 10) $display("got %0d exp %0d", int'(signed'(out_d)), e);
      end
      if (out_tag.sov) begin
        checks++;
        if (cyc2 - t_in.pop_front() != 5) begin
          failures++;
          $display("latency wrong");
        end
      end
    end
  end

  initial begin
    int v [4];
    rst_n = 1'b0; fwd = 1'b1; in_tag = TAG_IDLE; in_d = '0;
    repeat (6) @(negedge clk);
    rst_n = 1'b1;
    for (int mode = 0; mode < 1; mode++) begin
      fwd = (mode == 0);
      while (en2) @(negedge clk);
      for (int n = 0; n < NV; n++) begin
        for (int i = 0; i < 4; i++) v[i] = int'($urandom_range(32767)) - 16384;
        if (n == 0) for (int i = 0; i < 4; i++) v[i] = (i % 2 == 0) ? 16383 : -16384;
        for (int j = 0; j < 4; j++) exp_q.push_back(ref_out(v, j, fwd));
        for (int i = 0; i < 4; i++) begin
          while (!en2) @(negedge clk);
          in_tag = '{v: 1'b1, sov: (i == 0), sob: (i == 0)};
          in_d   = 20'(v[i]);
          if (i == 0) t_in.push_back(cyc2);
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

// qr8_proc_tb: self-checking test of the double-input Q_R8 processor.
//
// Streams NV random 8-point vectors back to back as two 4-word streams
// (elements 0..3 and 4..7, one pair per Clk2 cycle) and compares each output
// pair with y_j = x_j + x_{7-j} and y_{4+j} = x_{3-j} - x_{4+j}. Also checks
// the 5-cycle Clk2 latency.
module qr8_proc_tb;
  import dct_pkg::*;
  localparam int NV = 200;

  logic        clk = 1'b0;
  logic        rst_n, en2 = 1'b0;
  tag_t        in_tag, out_tag;
  logic [19:0] in_e, in_o, out_e, out_o;
  int checks = 0, failures = 0;
  int exp_q [$];
  int t_in [$];
  int cyc2 = 0;

  qr8_proc dut (.*);

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
    if (rst_n && en2 && out_tag.v) begin
      int ee, eo;
      ee = exp_q.pop_front();
      eo = exp_q.pop_front();
      checks += 2;
      if (int'(signed'(out_e)) != ee) failures++;
      if (int'(signed'(out_o)) != eo) failures++;
      if (out_tag.sov) begin
        checks++;
        if (cyc2 - t_in.pop_front() != 5) failures++;
      end
    end
  end

  initial begin
    int x [8];
    rst_n = 1'b0; in_tag = TAG_IDLE; in_e = '0; in_o = '0;
    repeat (6) @(negedge clk);
    rst_n = 1'b1;
    while (en2) @(negedge clk);
    for (int n = 0; n < NV; n++) begin
      for (int i = 0; i < 8; i++) x[i] = int'($urandom_range(65535)) - 32768;
      for (int j = 0; j < 4; j++) begin
        exp_q.push_back(x[j] + x[7-j]);
        exp_q.push_back(x[3-j] - x[4+j]);
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
    repeat (20) @(negedge clk);
    checks++;
    if (exp_q.size() != 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

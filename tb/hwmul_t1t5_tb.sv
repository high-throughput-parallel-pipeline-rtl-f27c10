// hwmul_t1t5_tb: P = di*{T1=815/4096 or T5=6130/4096} +/- dj must equal the
// round-half-up of the exact product sum, for random and extreme operands
// in all four configurations.
module hwmul_t1t5_tb;
  logic [19:0] di, dj, p;
  logic        sel_t5, sub;
  int checks = 0, failures = 0;

  hwmul_t1t5 dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check();
    longint e;
    #1;
    e = longint'(signed'(di)) * (sel_t5 ? 6130 : 815) +
        (sub ? -longint'(signed'(dj)) : longint'(signed'(dj))) * 4096 + 2048;
    e = e >>> 12;
    checks++;
    if (int'(signed'(p)) != int'(e)) begin
      failures++;
      if (failures < 10) $display("di=%0d dj=%0d t5=%b sub=%b got %0d exp %0d",
                                  signed'(di), signed'(dj), sel_t5, sub, signed'(p), e);
    end
  endtask

  initial begin
    for (int i = 0; i < 20000; i++) begin
      di = 20'(int'($urandom_range(131071)) - 65536);
      dj = 20'(int'($urandom_range(131071)) - 65536);
      if (i < 8) begin
        di = (i % 2) ? 20'h40000 : 20'h3FFFF;
        dj = 20'd0;
      end
      sel_t5 = 1'(i); sub = 1'(i >> 1);
      check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

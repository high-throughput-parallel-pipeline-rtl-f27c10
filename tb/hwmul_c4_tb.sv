// hwmul_c4_tb: P = di*C4 (C4 = 2896/4096) must equal the round-half-up of
// the exact product for random, boundary and extreme operands.
module hwmul_c4_tb;
  logic [19:0] di, p;
  int checks = 0, failures = 0;

  hwmul_c4 dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check();
    longint e;
    #1;
    e = (longint'(signed'(di)) * 2896 + 2048) >>> 12;
    checks++;
    if (int'(signed'(p)) != int'(e)) begin
      failures++;
      if (failures < 10) $display("di=%0d got %0d exp %0d", signed'(di), signed'(p), e);
    end
  endtask

  initial begin
    di = 20'h7FFFF; check();
    di = 20'h80000; check();
    di = 20'd0;     check();
    for (int i = 0; i < 20000; i++) begin
      di = 20'($urandom);
      check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

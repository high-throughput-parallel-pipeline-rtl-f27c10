// dcia_tb: test of the 20-bit double carry incrementer adder: s must equal
// a + b + {0, 1 or 2} (c2 has precedence) modulo 2^20, for corner cases
// where the increment ripples through every block and for random operands.
module dcia_tb;
  logic [19:0] a, b, s;
  logic        c1, c2;
  int checks = 0, failures = 0;

  dcia #(.W(20)) dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check();
    logic [19:0] r;
    #1;
    r = a + b + (c2 ? 20'd2 : c1 ? 20'd1 : 20'd0);
    checks++;
    if (s != r) begin
      failures++;
      if (failures < 10) $display("a=%h b=%h c1=%b c2=%b got %h exp %h", a, b, c1, c2, s, r);
    end
  endtask

  initial begin
    for (int k = 0; k < 20; k++) begin
      for (int c = 0; c < 4; c++) begin
        a = (20'd1 << k) - 20'd1; b = 20'd0; {c2, c1} = 2'(c); check();
        a = (20'd1 << k) - 20'd2; b = 20'd0; {c2, c1} = 2'(c); check();
        a = 20'hFFFFF; b = 20'(k);           {c2, c1} = 2'(c); check();
      end
    end
    for (int i = 0; i < 20000; i++) begin
      a = 20'($urandom); b = 20'($urandom); c1 = 1'($urandom); c2 = 1'($urandom); check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// round_adder_tb: the final adder must return round-half-up of (a+b)/2^12,
// wrapped to 20 bits, for carry-save inputs. Includes sums that sit exactly
// on the rounding boundary and low halves whose carries produce the +2 case.
module round_adder_tb;
  logic [31:0] a, b;
  logic [19:0] p;
  int checks = 0, failures = 0;

  round_adder #(.IN_W(32), .DROP(12), .OUT_W(20)) dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check();
    logic [32:0] r;
    #1;
    r = ({1'b0, a} + {1'b0, b} + 33'd2048) >> 12;
    checks++;
    if (p != r[19:0]) begin
      failures++;
      if (failures < 10) $display("a=%h b=%h got %h exp %h", a, b, p, r[19:0]);
    end
  endtask

  initial begin
    a = 32'h0000_0800; b = 32'h0; check();          // exactly one half
    a = 32'h0000_07FF; b = 32'h0; check();          // just below
    a = 32'h0000_0FFF; b = 32'h0000_0FFF; check();  // +2 case
    a = 32'h0000_0C00; b = 32'h0000_0C00; check();
    a = 32'hFFFF_FFFF; b = 32'h0000_0801; check();
    for (int i = 0; i < 20000; i++) begin
      a = $urandom; b = $urandom;
      if (i % 4 == 1) a[11:0] = 12'hFFF;
      if (i % 4 == 2) b[11:0] = 12'h800;
      check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

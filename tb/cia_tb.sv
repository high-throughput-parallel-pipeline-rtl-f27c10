// cia_tb: exhaustive-corner and random test of the 20-bit carry incrementer
// adder against the + operator, including the carry out and carry chains
// that run through every block.
module cia_tb;
  logic [19:0] a, b, s;
  logic        cin, cout;
  int checks = 0, failures = 0;

  cia #(.W(20)) dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check();
    logic [20:0] r;
    #1;
    r = {1'b0, a} + {1'b0, b} + {20'd0, cin};
    checks++;
    if ({cout, s} != r) begin
      failures++;
      if (failures < 10) $display("a=%h b=%h cin=%b got %h exp %h", a, b, cin, {cout, s}, r);
    end
  endtask

  initial begin
    // carry propagating through all blocks
    a = 20'hFFFFF; b = 20'h00000; cin = 1'b1; check();
    a = 20'hFFFFF; b = 20'hFFFFF; cin = 1'b1; check();
    a = 20'h7FFFF; b = 20'h00001; cin = 1'b0; check();
    for (int k = 0; k < 20; k++) begin
      a = (20'd1 << k) - 20'd1; b = 20'd1; cin = 1'b0; check();
      a = ~(20'd1 << k);        b = 20'd1; cin = 1'b1; check();
    end
    for (int i = 0; i < 20000; i++) begin
      a = 20'($urandom); b = 20'($urandom); cin = 1'($urandom); check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

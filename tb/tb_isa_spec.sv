// tb_isa_spec -- exhaustive check of the carry speculator. For every window
// value the expected carry is the carry-out of the window sum a + b + SPEC_CIN,
// computed with ordinary integer addition. Three instances: the default 2-bit
// window guessing 0, a 4-bit window guessing 0 and a 3-bit window guessing 1.
module tb_isa_spec;
  int checks = 0, failures = 0;

  logic [1:0] a2, b2;  logic c2;
  logic [3:0] a4, b4;  logic c4;
  logic [2:0] a3, b3;  logic c3;

  isa_spec                                     dut2 (.a(a2), .b(b2), .c_spec(c2));
  isa_spec #(.SPEC_W(4))                       dut4 (.a(a4), .b(b4), .c_spec(c4));
  isa_spec #(.SPEC_W(3), .SPEC_CIN(1'b1))      dut3 (.a(a3), .b(b3), .c_spec(c3));

  task automatic check(string what, logic got, logic exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0b expected %0b", what, got, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 16; i++) begin
      {a2, b2} = 4'(i); #1;
      check($sformatf("w2 a=%0d b=%0d", a2, b2), c2, ((32'(a2) + 32'(b2)) >> 2) != 0);
    end
    for (int i = 0; i < 256; i++) begin
      {a4, b4} = 8'(i); #1;
      check($sformatf("w4 a=%0d b=%0d", a4, b4), c4, ((32'(a4) + 32'(b4)) >> 4) != 0);
    end
    for (int i = 0; i < 64; i++) begin
      {a3, b3} = 6'(i); #1;
      check($sformatf("w3c1 a=%0d b=%0d", a3, b3), c3, ((32'(a3) + 32'(b3) + 1) >> 3) != 0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

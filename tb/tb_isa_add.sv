// tb_isa_add -- exhaustive check of the 8-bit sub-adder (all a, b, cin) and
// a random check of a 16-bit one against integer addition.
module tb_isa_add;
  int checks = 0, failures = 0;

  logic [7:0]  a8, b8, s8;    logic ci8, co8;
  logic [15:0] a16, b16, s16; logic ci16, co16;

  isa_add            dut8  (.a(a8),  .b(b8),  .cin(ci8),  .sum(s8),  .cout(co8));
  isa_add #(.W(16))  dut16 (.a(a16), .b(b16), .cin(ci16), .sum(s16), .cout(co16));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int unsigned exp;
    for (int i = 0; i < (1 << 17); i++) begin
      {ci8, a8, b8} = 17'(i); #1;
      exp = 32'(a8) + 32'(b8) + 32'(ci8);
      checks++;
      if ({co8, s8} !== 9'(exp)) begin
        failures++;
        if (failures < 10) $display("FAIL w8 %0d+%0d+%0d = %0d", a8, b8, ci8, {co8, s8});
      end
    end
    for (int i = 0; i < 20000; i++) begin
      a16 = 16'($urandom); b16 = 16'($urandom); ci16 = 1'($urandom); #1;
      exp = 32'(a16) + 32'(b16) + 32'(ci16);
      checks++;
      if ({co16, s16} !== 17'(exp)) begin
        failures++;
        if (failures < 10) $display("FAIL w16 %0d+%0d+%0d = %0d", a16, b16, ci16, {co16, s16});
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

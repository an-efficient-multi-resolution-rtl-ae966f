// tb_bw_mult: exhaustive check of the 8x8 Baugh-Wooley multiplier against
// the signed product of the two operands (all 65536 pairs), plus random
// pairs for a 6x10 instance to exercise unequal operand widths.
module tb_bw_mult;
  int checks = 0, failures = 0;

  logic [7:0]  a, b;
  logic [15:0] p;
  bw_mult u_dut (.a, .b, .p);

  logic [5:0]  a2;
  logic [9:0]  b2;
  logic [15:0] p2;
  bw_mult #(.WA(6), .WB(10)) u_dut2 (.a(a2), .b(b2), .p(p2));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 256; i++) begin
      for (int j = 0; j < 256; j++) begin
        int expect_v;
        a = 8'(i); b = 8'(j);
        #1;
        expect_v = int'($signed(a)) * int'($signed(b));
        checks++;
        if (p !== 16'(expect_v)) begin
          failures++;
          if (failures < 10) $display("8x8 mismatch %0d*%0d: got %0d", int'($signed(a)), int'($signed(b)), int'($signed(p)));
        end
      end
    end
    for (int n = 0; n < 2000; n++) begin
      int expect_v;
      a2 = 6'($urandom); b2 = 10'($urandom);
      #1;
      expect_v = int'($signed(a2)) * int'($signed(b2));
      checks++;
      if (p2 !== 16'(expect_v)) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_mbfa: multi-bit full adder, exhaustive at 4 bits and random at 16 bits,
// including the subtraction made with an inverted operand and carry-in 1.
module tb_mbfa;
  logic [3:0]  a4, b4, s4;
  logic [15:0] a16, b16, s16;
  logic        c4, c16;
  int checks = 0, failures = 0;

  mbfa #(.W(4))  dut4  (.a(a4),  .b(b4),  .cin(c4),  .s(s4));
  mbfa #(.W(16)) dut16 (.a(a16), .b(b16), .cin(c16), .s(s16));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a16 = '0; b16 = '0; c16 = 1'b0;
    for (int i = 0; i < 512; i++) begin
      {c4, a4, b4} = 9'(i);
      #1;
      checks++;
      if (s4 != 4'(int'(a4) + int'(b4) + int'(c4))) begin
        failures++;
        $display("FAIL W=4 %0d+%0d+%0d -> %0d", a4, b4, c4, s4);
      end
    end
    for (int i = 0; i < 3000; i++) begin
      a16 = 16'($urandom);
      b16 = 16'($urandom);
      c16 = 1'($urandom);
      if (i % 3 == 0) begin
        // a - x as a + ~x + 1
        logic [15:0] x;
        x   = b16;
        b16 = ~x;
        c16 = 1'b1;
        #1;
        checks++;
        if (s16 != a16 - x) begin
          failures++;
          $display("FAIL W=16 %0d-%0d -> %0d", a16, x, s16);
        end
      end else begin
        #1;
        checks++;
        if (s16 != 16'(int'(a16) + int'(b16) + int'(c16))) begin
          failures++;
          $display("FAIL W=16 %0d+%0d+%0d -> %0d", a16, b16, c16, s16);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

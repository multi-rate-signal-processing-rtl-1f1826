// tb_neg_block: exhaustive test of the conditional inverter at 8 bits.
module tb_neg_block;
  logic [7:0] x, y;
  logic       neg;
  int checks = 0, failures = 0;

  neg_block #(.W(8)) dut (.x(x), .neg(neg), .y(y));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 512; i++) begin
      {neg, x} = 9'(i);
      #1;
      checks++;
      // negating: y + x must be all ones; passing: y equals x
      if (neg ? (8'(y + x) != 8'hFF) : (y != x)) begin
        failures++;
        $display("FAIL neg=%0d x=%h y=%h", neg, x, y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

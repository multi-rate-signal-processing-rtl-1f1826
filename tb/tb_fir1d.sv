// tb_fir1d: the 1-D filter for every mask length with a computing scheme
// (2, 3, 4, 5, 7), low- and high-pass, against the coefficient-table
// reference. Inputs are random 9-bit signed samples, with extreme values
// (-256, 255) mixed in to exercise the full accumulator range.
module tb_fir1d;
  import tb_ref_pkg::*;

  localparam int DW = 9;
  localparam int LS[5] = '{2, 3, 4, 5, 7};

  logic signed [DW-1:0] x [MAXL];
  logic                 b;
  logic signed [DW-1:0] y [5];
  int checks = 0, failures = 0;

  for (genvar g = 0; g < 5; g++) begin : g_dut
    logic signed [DW-1:0] xin [LS[g]];
    for (genvar k = 0; k < LS[g]; k++) begin : g_in
      assign xin[k] = x[k];
    end
    fir1d #(.L(LS[g]), .DATA_W(DW)) dut (.in(xin), .b(b), .out(y[g]));
  end

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic signed [DW-1:0] rnd_sample();
    case ($urandom_range(0, 5))
      0: return -(1 <<< (DW - 1));
      1: return (1 <<< (DW - 1)) - 1;
      default: return DW'($urandom);
    endcase
  endfunction

  initial begin
    int xr[MAXL];
    int exp_v;
    for (int t = 0; t < 4000; t++) begin
      for (int k = 0; k < MAXL; k++) begin
        x[k]  = rnd_sample();
        xr[k] = int'(x[k]);
      end
      b = 1'(t);
      #1;
      for (int g = 0; g < 5; g++) begin
        int xl[MAXL];
        xl = xr;
        for (int k = LS[g]; k < MAXL; k++) xl[k] = 0;
        exp_v = ref1d(LS[g], xl, b);
        checks++;
        if (int'(y[g]) != exp_v) begin
          failures++;
          if (failures < 10)
            $display("FAIL L=%0d b=%0d got %0d expected %0d", LS[g], b, y[g], exp_v);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

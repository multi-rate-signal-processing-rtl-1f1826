// tb_filter2d: the separable 2-D filter.
//  1. For every mask length, random 9-bit windows in all four sign-bit
//     states against the separable reference.
//  2. The 2-D masks as written out in full (3x3 LL, HL, LH, HH; 4x4 LL and
//     HH; 5x5 HH; 7x7 LL), on 16-bit windows whose samples are multiples of
//     2^(2(L-1)) so that neither normalisation rounds: the output must then
//     equal sum(M .* K) for the mask M and the multipliers K.
module tb_filter2d;
  import tb_ref_pkg::*;

  localparam int DW = 9;
  localparam int LS[5] = '{2, 3, 4, 5, 7};

  logic signed [DW-1:0] w [MAXL][MAXL];
  logic                 bh, bv;
  logic signed [DW-1:0] y [5];

  for (genvar g = 0; g < 5; g++) begin : g_dut
    logic signed [DW-1:0] win [LS[g]][LS[g]];
    for (genvar r = 0; r < LS[g]; r++) begin : g_r
      for (genvar c = 0; c < LS[g]; c++) begin : g_c
        assign win[r][c] = w[r][c];
      end
    end
    filter2d #(.L(LS[g]), .DATA_W(DW)) dut (.win(win), .b_h(bh), .b_v(bv), .out(y[g]));
  end

  // exact-mask DUTs, 16-bit samples
  localparam int XW = 16;
  localparam int XL[4] = '{3, 4, 5, 7};
  logic signed [XW-1:0] wx [MAXL][MAXL];
  logic signed [XW-1:0] yx [4];

  for (genvar g = 0; g < 4; g++) begin : g_xdut
    logic signed [XW-1:0] win [XL[g]][XL[g]];
    for (genvar r = 0; r < XL[g]; r++) begin : g_r
      for (genvar c = 0; c < XL[g]; c++) begin : g_c
        assign win[r][c] = wx[r][c];
      end
    end
    filter2d #(.L(XL[g]), .DATA_W(XW)) dut (.win(win), .b_h(bh), .b_v(bv), .out(yx[g]));
  end

  // masks written out in full, rows top to bottom
  localparam int M3_LL[3][3] = '{'{1, 2, 1}, '{ 2,  4,  2}, '{1, 2, 1}};
  localparam int M3_LH[3][3] = '{'{1, 2, 1}, '{-2, -4, -2}, '{1, 2, 1}};
  localparam int M3_HL[3][3] = '{'{1,-2, 1}, '{ 2, -4,  2}, '{1,-2, 1}};
  localparam int M3_HH[3][3] = '{'{1,-2, 1}, '{-2,  4, -2}, '{1,-2, 1}};
  localparam int M4_LL[4][4] = '{'{1, 3, 3, 1}, '{3, 9, 9, 3}, '{3, 9, 9, 3}, '{1, 3, 3, 1}};
  localparam int M4_HH[4][4] = '{'{1,-3, 3,-1}, '{-3, 9,-9, 3}, '{3,-9, 9,-3}, '{-1, 3,-3, 1}};
  localparam int M5_HH[5][5] = '{'{ 1, -4,   6, -4,  1},
                                 '{-4, 16, -24, 16, -4},
                                 '{ 6,-24,  36,-24,  6},
                                 '{-4, 16, -24, 16, -4},
                                 '{ 1, -4,   6, -4,  1}};
  localparam int M7_LL[7][7] = '{'{ 1,  6,  15,  20,  15,  6,  1},
                                 '{ 6, 36,  90, 120,  90, 36,  6},
                                 '{15, 90, 225, 300, 225, 90, 15},
                                 '{20,120, 300, 400, 300,120, 20},
                                 '{15, 90, 225, 300, 225, 90, 15},
                                 '{ 6, 36,  90, 120,  90, 36,  6},
                                 '{ 1,  6,  15,  20,  15,  6,  1}};

  int checks = 0, failures = 0;
  int k [MAXL][MAXL];

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int mask_val(int l, int r, int c, bit h, bit v);
    case (l)
      3: case ({v, h})
           2'b00: return M3_LL[r][c];
           2'b01: return M3_HL[r][c];
           2'b10: return M3_LH[r][c];
           default: return M3_HH[r][c];
         endcase
      4: return ({v, h} == 2'b00) ? M4_LL[r][c] : M4_HH[r][c];
      5: return M5_HH[r][c];
      default: return M7_LL[r][c];
    endcase
  endfunction

  // run one exact-mask check on DUT g in state {v, h}
  task automatic exact_check(int g, bit h, bit v);
    int l, s, lim, exp_v;
    l   = XL[g];
    s   = 2 * (l - 1);
    lim = 1 << (XW - 1 - s);
    for (int r = 0; r < MAXL; r++)
      for (int c = 0; c < MAXL; c++) begin
        k[r][c]  = $urandom_range(0, 2 * lim - 1) - lim;
        wx[r][c] = XW'(k[r][c] <<< s);
      end
    bh = h;
    bv = v;
    #1;
    exp_v = 0;
    for (int r = 0; r < l; r++)
      for (int c = 0; c < l; c++)
        exp_v += mask_val(l, r, c, h, v) * k[r][c];
    checks++;
    if (int'(yx[g]) != exp_v) begin
      failures++;
      $display("FAIL exact L=%0d {bv,bh}=%0d%0d got %0d expected %0d", l, v, h, yx[g], exp_v);
    end
  endtask

  initial begin
    int wr[MAXL][MAXL];
    int exp_v;
    for (int r = 0; r < MAXL; r++)
      for (int c = 0; c < MAXL; c++) wx[r][c] = '0;
    // 1. random windows, all sign-bit states
    for (int t = 0; t < 2000; t++) begin
      for (int r = 0; r < MAXL; r++)
        for (int c = 0; c < MAXL; c++) begin
          case ($urandom_range(0, 7))
            0: w[r][c] = -(1 <<< (DW - 1));
            1: w[r][c] = (1 <<< (DW - 1)) - 1;
            default: w[r][c] = DW'($urandom);
          endcase
          wr[r][c] = int'(w[r][c]);
        end
      {bv, bh} = 2'(t);
      #1;
      for (int g = 0; g < 5; g++) begin
        int wl[MAXL][MAXL];
        wl = wr;
        for (int r = 0; r < MAXL; r++)
          for (int c = 0; c < MAXL; c++)
            if (r >= LS[g] || c >= LS[g]) wl[r][c] = 0;
        exp_v = ref2d(LS[g], wl, bh, bv);
        checks++;
        if (int'(y[g]) != exp_v) begin
          failures++;
          if (failures < 10)
            $display("FAIL L=%0d {bv,bh}=%0d%0d got %0d expected %0d", LS[g], bv, bh, y[g], exp_v);
        end
      end
    end
    // 2. masks written out in full
    for (int t = 0; t < 200; t++) begin
      exact_check(0, 1'b0, 1'b0);
      exact_check(0, 1'b1, 1'b0);
      exact_check(0, 1'b0, 1'b1);
      exact_check(0, 1'b1, 1'b1);
      exact_check(1, 1'b0, 1'b0);
      exact_check(1, 1'b1, 1'b1);
      exact_check(2, 1'b1, 1'b1);
      exact_check(3, 1'b0, 1'b0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

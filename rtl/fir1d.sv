// fir1d: parallel, shift-and-add 1-D FIR filter with a binomial mask.
//
// The low-pass mask of length L is the row of binomial coefficients
// C(L-1, k), e.g. [1 2 1], [1 3 3 1], [1 4 6 4 1], [1 6 15 20 15 6 1]; the
// high-pass mask is the same with every odd coefficient negated. The sign
// bit b selects between them (b = 0: low pass, b = 1: high pass), which is
// the factor beta = +1/-1 of the computing schemes. There are no
// multipliers: each coefficient is a sum of powers of two, made by wiring
// an operand into an MBFA shifted left, and every beta term goes through a
// negation block N with b fed to the MBFA's carry-in. The adder trees are
// those of the published computing schemes, with x1..xL the inputs:
//   L=2: x1 + beta*x2                                             1 MBFA
//   L=3: (x1 + x3) + beta*(2*x2)                                  2 MBFAs
//   L=4: (x1 + beta*x4) + (1+2)*(x3 + beta*x2)                    4 MBFAs
//   L=5: (x1 + x5) + ((1+2)*x3)*2 + beta*4*(x2 + x4)              5 MBFAs
//   L=7: (x1 + x7) + (16-1)*(x3 + x5)
//        + beta*2*[(2+1)*(x2 + x6) + 2*(4+1)*x4]                  9 MBFAs
// (the L=7 tree is 4 MBFAs deep). All sums are carried at
// DATA_W + L - 1 bits, which holds the largest possible result exactly;
// the output is that sum divided by 2^(L-1), the sum of the absolute values
// of the coefficients, by an arithmetic right shift (rounding towards minus
// infinity), and fits again in DATA_W bits. The rounding and widths are
// this design's choice; the trees, masks and normalisation follow the
// published filter.
//
// Interface: in[0..L-1] are signed (two's complement) samples x1..xL,
// out is signed. Purely combinational. Only L = 2, 3, 4, 5 and 7 have a
// computing scheme; any other L stops elaboration.
module fir1d
  import qmf_pkg::*;
#(
  parameter int unsigned L      = 7,
  parameter int unsigned DATA_W = 9
) (
  input  logic signed [DATA_W-1:0] in [L],
  input  logic                     b,
  output logic signed [DATA_W-1:0] out
);

  localparam int unsigned AW = acc_width(DATA_W, L);
  localparam int unsigned SH = norm_shift(L);

  // inputs sign-extended to the accumulator width
  logic [AW-1:0] x [L];
  for (genvar i = 0; i < L; i++) begin : g_ext
    assign x[i] = {{(AW-DATA_W){in[i][DATA_W-1]}}, in[i]};
  end

  logic [AW-1:0] sum;

  if (L == 2) begin : g_l2
    logic [AW-1:0] n2;
    neg_block #(.W(AW)) u_n2 (.x(x[1]), .neg(b), .y(n2));
    mbfa #(.W(AW)) u_s (.a(x[0]), .b(n2), .cin(b), .s(sum));

  end else if (L == 3) begin : g_l3
    logic [AW-1:0] s13, n2;
    mbfa      #(.W(AW)) u_s13 (.a(x[0]), .b(x[2]), .cin(1'b0), .s(s13));
    neg_block #(.W(AW)) u_n2  (.x(x[1] << 1), .neg(b), .y(n2));
    mbfa      #(.W(AW)) u_s   (.a(s13), .b(n2), .cin(b), .s(sum));

  end else if (L == 4) begin : g_l4
    logic [AW-1:0] n4, n2, s14, s32, t3;
    neg_block #(.W(AW)) u_n4  (.x(x[3]), .neg(b), .y(n4));
    mbfa      #(.W(AW)) u_s14 (.a(x[0]), .b(n4), .cin(b), .s(s14));
    neg_block #(.W(AW)) u_n2  (.x(x[1]), .neg(b), .y(n2));
    mbfa      #(.W(AW)) u_s32 (.a(x[2]), .b(n2), .cin(b), .s(s32));
    // (1+2) * s32
    mbfa      #(.W(AW)) u_t3  (.a(s32), .b(s32 << 1), .cin(1'b0), .s(t3));
    mbfa      #(.W(AW)) u_s   (.a(s14), .b(t3), .cin(1'b0), .s(sum));

  end else if (L == 5) begin : g_l5
    logic [AW-1:0] s15, t3, s24, s_even, n24;
    mbfa      #(.W(AW)) u_s15  (.a(x[0]), .b(x[4]), .cin(1'b0), .s(s15));
    // (1+2) * x3
    mbfa      #(.W(AW)) u_t3   (.a(x[2]), .b(x[2] << 1), .cin(1'b0), .s(t3));
    mbfa      #(.W(AW)) u_s24  (.a(x[1]), .b(x[3]), .cin(1'b0), .s(s24));
    // (x1 + x5) + 2 * (3 * x3)
    mbfa      #(.W(AW)) u_even (.a(s15), .b(t3 << 1), .cin(1'b0), .s(s_even));
    neg_block #(.W(AW)) u_n24  (.x(s24 << 2), .neg(b), .y(n24));
    mbfa      #(.W(AW)) u_s    (.a(s_even), .b(n24), .cin(b), .s(sum));

  end else if (L == 7) begin : g_l7
    logic [AW-1:0] s17, s35, n35, t15, s26, t3, t5, odd, s_even, n_odd;
    mbfa      #(.W(AW)) u_s17  (.a(x[0]), .b(x[6]), .cin(1'b0), .s(s17));
    mbfa      #(.W(AW)) u_s35  (.a(x[2]), .b(x[4]), .cin(1'b0), .s(s35));
    // (16 - 1) * s35: a fixed negation and carry-in 1
    neg_block #(.W(AW)) u_n35  (.x(s35), .neg(1'b1), .y(n35));
    mbfa      #(.W(AW)) u_t15  (.a(s35 << 4), .b(n35), .cin(1'b1), .s(t15));
    mbfa      #(.W(AW)) u_s26  (.a(x[1]), .b(x[5]), .cin(1'b0), .s(s26));
    // (2 + 1) * s26
    mbfa      #(.W(AW)) u_t3   (.a(s26), .b(s26 << 1), .cin(1'b0), .s(t3));
    // (4 + 1) * x4
    mbfa      #(.W(AW)) u_t5   (.a(x[3] << 2), .b(x[3]), .cin(1'b0), .s(t5));
    // 3 * s26 + 2 * (5 * x4)
    mbfa      #(.W(AW)) u_odd  (.a(t3), .b(t5 << 1), .cin(1'b0), .s(odd));
    mbfa      #(.W(AW)) u_even (.a(s17), .b(t15), .cin(1'b0), .s(s_even));
    neg_block #(.W(AW)) u_nodd (.x(odd << 1), .neg(b), .y(n_odd));
    mbfa      #(.W(AW)) u_s    (.a(s_even), .b(n_odd), .cin(b), .s(sum));

  end else begin : g_unsupported
    $error("fir1d: no computing scheme for mask length L=%0d (use 2, 3, 4, 5 or 7)", L);
    assign sum = '0;
  end

  // divide by 2^(L-1): arithmetic shift right, back to DATA_W bits
  logic signed [AW-1:0] sum_s;
  always_comb begin
    sum_s = signed'(sum) >>> SH;
    out   = sum_s[DATA_W-1:0];
  end

endmodule

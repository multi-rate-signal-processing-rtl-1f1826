// tb_dwt_stim: drives one filter bank through a two-stage 2-D DWT of the
// synthetic road image and checks every subband sample it returns.
//
// Stage 1 slides the L x L window over the IW x IH image in steps of two
// pixels in each direction (the decimation by two of a DWT stage, windows
// that fit entirely in the image, no border extension); stage 2 does the
// same on the LL subband of stage 1. Each window is offered on the
// valid/ready interface, followed at random by a gap of a few idle cycles
// or by the next window at once (so the bank both idles and stalls the
// source). The monitor compares the four outputs with the reference model,
// in order, and checks that every result appears exactly LAT cycles after
// its window was accepted and that back-to-back windows are taken every
// four cycles. It also counts how often each mechanism occurred.
module tb_dwt_stim
  import tb_ref_pkg::*;
#(
  parameter int L   = 7,
  parameter int DW  = 9,
  parameter int IW  = 64,
  parameter int IH  = 48,
  parameter int LAT = 5
) (
  input  logic                 clk,
  input  logic                 rst_n,
  output logic                 in_valid,
  input  logic                 in_ready,
  output logic signed [DW-1:0] in_win [L][L],
  input  logic                 out_valid,
  input  logic signed [DW-1:0] out_ll,
  input  logic signed [DW-1:0] out_hl,
  input  logic signed [DW-1:0] out_lh,
  input  logic signed [DW-1:0] out_hh,
  output int                   checks,
  output int                   failures,
  output bit                   finished
);

  localparam int W1 = (IW - L) / 2 + 1;
  localparam int H1 = (IH - L) / 2 + 1;
  localparam int W2 = (W1 - L) / 2 + 1;
  localparam int H2 = (H1 - L) / 2 + 1;

  typedef struct {
    int ll, hl, lh, hh;
  } result_t;

  result_t exp_q[$];
  int      acc_q[$];
  int      cyc = 0;
  int      img1 [IH][IW];
  int      img2 [H1][W1];

  // mechanism counters
  int n_windows = 0, n_b2b = 0, n_stall = 0, n_idle = 0;
  int n_neg_hl = 0, n_neg_lh = 0, n_neg_hh = 0, n_edge = 0;
  int last_acc = -100;

  always @(posedge clk) cyc <= cyc + 1;

  task automatic offer_window(int src_sel, int x0, int y0);
    int      w[MAXL][MAXL];
    result_t e;
    for (int r = 0; r < MAXL; r++)
      for (int c = 0; c < MAXL; c++) w[r][c] = 0;
    for (int r = 0; r < L; r++)
      for (int c = 0; c < L; c++) begin
        w[r][c] = (src_sel == 1) ? img1[y0 + r][x0 + c] : img2[y0 + r][x0 + c];
        in_win[r][c] = DW'(w[r][c]);
      end
    e.ll = ref2d(L, w, 1'b0, 1'b0);
    e.hl = ref2d(L, w, 1'b1, 1'b0);
    e.lh = ref2d(L, w, 1'b0, 1'b1);
    e.hh = ref2d(L, w, 1'b1, 1'b1);
    if (src_sel == 1) img2[y0 / 2][x0 / 2] = e.ll;
    in_valid = 1'b1;
    // wait, in the middle of a cycle, until the bank takes it
    while (!in_ready) begin
      n_stall++;
      @(negedge clk);
    end
    exp_q.push_back(e);
    acc_q.push_back(cyc);
    if (cyc - last_acc == 4) n_b2b++;
    checks++;
    if (cyc - last_acc < 4) begin
      failures++;
      $display("FAIL L=%0d windows accepted %0d cycles apart", L, cyc - last_acc);
    end
    last_acc = cyc;
    n_windows++;
    @(negedge clk);
    in_valid = 1'b0;
    // random gap: none (next window at once), or 1 to 6 idle cycles
    if ($urandom_range(0, 2) == 0) begin
      int gap = $urandom_range(1, 6);
      repeat (gap) begin
        if (in_ready) n_idle++;
        @(negedge clk);
      end
    end
  endtask

  // monitor
  always @(negedge clk) begin
    if (rst_n && out_valid) begin
      if (exp_q.size() == 0) begin
        failures++;
        $display("FAIL L=%0d result with no window outstanding", L);
      end else begin
        result_t e;
        int a;
        e = exp_q.pop_front();
        a = acc_q.pop_front();
        checks += 5;
        if (int'(out_ll) != e.ll || int'(out_hl) != e.hl ||
            int'(out_lh) != e.lh || int'(out_hh) != e.hh) begin
          failures++;
          if (failures < 10)
            $display("FAIL L=%0d got LL %0d HL %0d LH %0d HH %0d expected %0d %0d %0d %0d",
                     L, out_ll, out_hl, out_lh, out_hh, e.ll, e.hl, e.lh, e.hh);
        end
        if (cyc - a != LAT) begin
          failures++;
          if (failures < 10) $display("FAIL L=%0d latency %0d cycles", L, cyc - a);
        end
        if (out_hl < 0) n_neg_hl++;
        if (out_lh < 0) n_neg_lh++;
        if (out_hh < 0) n_neg_hh++;
        if (out_hh > 8 || out_hh < -8) n_edge++;
      end
    end
  end

  initial begin
    checks   = 0;
    failures = 0;
    finished = 0;
    in_valid = 1'b0;
    for (int r = 0; r < L; r++)
      for (int c = 0; c < L; c++) in_win[r][c] = '0;
    for (int y = 0; y < IH; y++)
      for (int x = 0; x < IW; x++) img1[y][x] = road_pixel(x, y, IW, IH);
    @(posedge rst_n);
    @(negedge clk);
    for (int y = 0; y + L <= IH; y += 2)
      for (int x = 0; x + L <= IW; x += 2) offer_window(1, x, y);
    for (int y = 0; y + L <= H1; y += 2)
      for (int x = 0; x + L <= W1; x += 2) offer_window(2, x, y);
    repeat (LAT + 2) @(negedge clk);
    checks++;
    if (exp_q.size() != 0) begin
      failures++;
      $display("FAIL L=%0d %0d results missing", L, exp_q.size());
    end
    // every mechanism must have occurred: the four sign-bit states (a
    // negative high-pass result needs the subtracting path), back-to-back
    // windows, stalls and idle cycles
    checks++;
    if (n_neg_hl == 0 || n_neg_lh == 0 || n_neg_hh == 0 || n_b2b == 0 ||
        n_stall == 0 || n_idle == 0) begin
      failures++;
      $display("FAIL L=%0d coverage", L);
    end
    $display("L=%0d image %0dx%0d: stage 1 %0dx%0d, stage 2 %0dx%0d subbands; %0d windows",
             L, IW, IH, W1, H1, W2, H2, n_windows);
    $display("L=%0d back-to-back %0d, stall cycles %0d, idle cycles %0d", L, n_b2b, n_stall, n_idle);
    $display("L=%0d negative HL %0d, LH %0d, HH %0d; HH edge samples (|HH|>8) %0d",
             L, n_neg_hl, n_neg_lh, n_neg_hh, n_edge);
    finished = 1;
  end

endmodule

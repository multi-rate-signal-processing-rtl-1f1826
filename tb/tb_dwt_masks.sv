// tb_dwt_masks: the two-stage DWT of the 160x120 synthetic road image with
// banks built for the smaller masks, 2x2 (Haar, L=[1 1], H=[1 -1]), 3x3,
// 4x4 and 5x5, side by side, each checked like the default 7x7 build.
module tb_dwt_masks;
  localparam int DW = 9;
  localparam int NB = 4;
  localparam int LS[NB] = '{2, 3, 4, 5};

  logic clk = 1'b0, rst_n = 1'b0;
  int   checks [NB], failures [NB];
  bit   finished [NB];

  for (genvar g = 0; g < NB; g++) begin : g_bank
    localparam int L = LS[g];
    logic                 in_valid, in_ready, out_valid;
    logic signed [DW-1:0] in_win [L][L];
    logic signed [DW-1:0] out_ll, out_hl, out_lh, out_hh;

    qmf_bank #(.L(L), .DATA_W(DW)) dut (
      .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_ready(in_ready), .in_win(in_win),
      .out_valid(out_valid), .out_ll(out_ll), .out_hl(out_hl), .out_lh(out_lh), .out_hh(out_hh)
    );

    tb_dwt_stim #(.L(L), .DW(DW), .IW(160), .IH(120)) stim (
      .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_ready(in_ready), .in_win(in_win),
      .out_valid(out_valid), .out_ll(out_ll), .out_hl(out_hl), .out_lh(out_lh), .out_hh(out_hh),
      .checks(checks[g]), .failures(failures[g]), .finished(finished[g])
    );
  end

  always #5 clk = ~clk;

  function automatic int total(int v[NB]);
    int s = 0;
    for (int g = 0; g < NB; g++) s += v[g];
    return s;
  endfunction

  initial begin
    repeat (400000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", total(checks), total(failures) + 1);
    $finish;
  end

  initial begin
    repeat (4) @(posedge clk);
    rst_n <= 1'b1;
    wait (finished[0] && finished[1] && finished[2] && finished[3]);
    $display("TB_RESULT checks=%0d failures=%0d", total(checks), total(failures));
    $finish;
  end
endmodule

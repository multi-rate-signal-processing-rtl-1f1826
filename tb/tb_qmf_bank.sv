// tb_qmf_bank: end-to-end test of the filter bank at its default build
// (7x7 masks, 9-bit samples): a two-stage DWT of a 160x120 synthetic road
// image, every LL/HL/LH/HH sample checked, with the four-cycle throughput
// and the five-cycle accept-to-result latency checked for every window.
module tb_qmf_bank;
  localparam int L  = 7;
  localparam int DW = 9;

  logic                 clk = 1'b0, rst_n = 1'b0;
  logic                 in_valid, in_ready, out_valid;
  logic signed [DW-1:0] in_win [L][L];
  logic signed [DW-1:0] out_ll, out_hl, out_lh, out_hh;
  int                   checks, failures;
  bit                   finished;

  qmf_bank dut (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_ready(in_ready), .in_win(in_win),
    .out_valid(out_valid), .out_ll(out_ll), .out_hl(out_hl), .out_lh(out_lh), .out_hh(out_hh)
  );

  tb_dwt_stim #(.L(L), .DW(DW), .IW(160), .IH(120)) stim (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_ready(in_ready), .in_win(in_win),
    .out_valid(out_valid), .out_ll(out_ll), .out_hl(out_hl), .out_lh(out_lh), .out_hh(out_hh),
    .checks(checks), .failures(failures), .finished(finished)
  );

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    repeat (4) @(posedge clk);
    rst_n <= 1'b1;
    wait (finished);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

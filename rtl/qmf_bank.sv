// qmf_bank: 2-D QMF filter bank for one step of a discrete wavelet transform.
//
// Given an L x L window of pixels it produces the four subband samples LL,
// HL, LH and HH of that window. Instead of four separate 2-D filters it
// has one: with symmetric (binomial) masks the high-pass filter is the
// low-pass one with its odd coefficients negated, so two sign bits, B_H for
// the rows and B_V for the columns, turn one parallel shift-and-add 2-D
// filter into any of the four. The controller steps the sign bits through
// LL, HL, LH, HH, one per clock, and the result of each pass is latched.
//
// Datapath: window register -> filter2d (L row fir1d + 1 column fir1d, all
// combinational) -> three holding registers (LL, HL, LH) -> output
// registers, loaded together with the HH result in the last pass cycle.
// The DWT decimation (windows stepped by two pixels in each direction, so
// one output per four input pixels) is up to whoever supplies the windows.
//
// Interface: valid/ready input; in_win[r][c] is held by the source from
// in_valid until it is accepted (in_valid && in_ready). out_valid pulses for
// one cycle when out_ll/out_hl/out_lh/out_hh hold a new result; the outputs
// then stay until the next result. There is no output back-pressure.
// Timing: a window accepted at clock edge t0 gives out_valid in the cycle
// after edge t0+4; windows offered back to back are taken one every four
// clocks. Synchronous, active-low reset.
//
// What follows the published design: the masks, the shift-and-add trees,
// the sign-bit switching and the four-cycle schedule. This design's own
// choices: the registers around the combinational filter, the handshake,
// the 9-bit default sample width (an 8-bit pixel as a signed number) and
// rounding towards minus infinity in the normalisation.
module qmf_bank
  import qmf_pkg::*;
#(
  parameter int unsigned L      = 7,
  parameter int unsigned DATA_W = 9
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     in_valid,
  output logic                     in_ready,
  input  logic signed [DATA_W-1:0] in_win [L][L],
  output logic                     out_valid,
  output logic signed [DATA_W-1:0] out_ll,
  output logic signed [DATA_W-1:0] out_hl,
  output logic signed [DATA_W-1:0] out_lh,
  output logic signed [DATA_W-1:0] out_hh
);

  logic     load, cap, done, b_h, b_v;
  subband_e sb;

  qmf_ctrl u_ctrl (
    .clk     (clk),
    .rst_n   (rst_n),
    .in_valid(in_valid),
    .in_ready(in_ready),
    .load    (load),
    .sb      (sb),
    .b_h     (b_h),
    .b_v     (b_v),
    .cap     (cap),
    .done    (done)
  );

  // window under the mask, held for the four passes
  logic signed [DATA_W-1:0] win_q [L][L];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int r = 0; r < L; r++)
        for (int c = 0; c < L; c++)
          win_q[r][c] <= '0;
    end else if (load) begin
      win_q <= in_win;
    end
  end

  logic signed [DATA_W-1:0] f_out;

  filter2d #(.L(L), .DATA_W(DATA_W)) u_filter (
    .win(win_q),
    .b_h(b_h),
    .b_v(b_v),
    .out(f_out)
  );

  // results of the first three passes
  logic signed [DATA_W-1:0] ll_q, hl_q, lh_q;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      ll_q <= '0;
      hl_q <= '0;
      lh_q <= '0;
    end else if (cap) begin
      unique case (sb)
        SB_LL:   ll_q <= f_out;
        SB_HL:   hl_q <= f_out;
        SB_LH:   lh_q <= f_out;
        default: ;
      endcase
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_ll    <= '0;
      out_hl    <= '0;
      out_lh    <= '0;
      out_hh    <= '0;
    end else begin
      out_valid <= done;
      if (done) begin
        out_ll <= ll_q;
        out_hl <= hl_q;
        out_lh <= lh_q;
        out_hh <= f_out;
      end
    end
  end

  // the source must keep offering a window until it is accepted
  a_hold : assert property (@(posedge clk) disable iff (!rst_n)
    in_valid && !in_ready |=> in_valid);

endmodule

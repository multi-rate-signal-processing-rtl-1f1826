// qmf_ctrl: sequencer of the four subband passes.
//
// The 2-D filter is combinational and produces one subband at a time; this
// controller makes it produce all four in four clock cycles. When a window
// is accepted (load) it starts a pass in the LL state, {B_V, B_H} = 00, and
// then steps the sign bits through 01 (HL), 10 (LH) and 11 (HH), one state
// per clock. In every busy cycle cap is high, telling the datapath to latch
// the filter output as the subband named by sb; done marks the HH cycle,
// the last of the pass. A new window is accepted in that same cycle, so
// back-to-back windows are processed at exactly one every four clocks.
// The order LL, HL, LH, HH follows the published test sequence of the sign
// bits; the valid/ready handshake and the overlap of the last pass cycle
// with the next load are this design's choices.
//
// Timing: load at clock edge t0; sb = LL in the cycle after t0, HL after
// t0+1, LH after t0+2, HH (done) after t0+3. Synchronous, active-low reset.
module qmf_ctrl
  import qmf_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,
  input  logic     in_valid,
  output logic     in_ready,
  output logic     load,
  output subband_e sb,
  output logic     b_h,
  output logic     b_v,
  output logic     cap,
  output logic     done
);

  logic busy;

  always_comb begin
    in_ready = !busy || (sb == SB_HH);
    load     = in_valid && in_ready;
    cap      = busy;
    done     = busy && (sb == SB_HH);
    b_h      = sb_bh(sb);
    b_v      = sb_bv(sb);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy <= 1'b0;
      sb   <= SB_LL;
    end else if (load) begin
      busy <= 1'b1;
      sb   <= SB_LL;
    end else if (done) begin
      busy <= 1'b0;
      sb   <= SB_LL;
    end else if (busy) begin
      sb   <= subband_e'(sb + 2'd1);
    end
  end

  // a pass never skips a state: each busy cycle follows the previous subband
  a_sequence : assert property (@(posedge clk) disable iff (!rst_n)
    busy && !done |=> busy && (sb == subband_e'($past(sb) + 2'd1)));
  // a pass that is not followed by a new window leaves the controller idle
  a_idle : assert property (@(posedge clk) disable iff (!rst_n)
    done && !load |=> !busy);

endmodule

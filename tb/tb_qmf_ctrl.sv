// tb_qmf_ctrl: the pass sequencer against a cycle-level model.
// Random in_valid; after every accepted window the controller must show
// LL, HL, LH, HH in the next four cycles with matching sign bits, cap high
// and done only on HH, accept the next window no earlier than the HH cycle,
// and stall a waiting source otherwise. Outputs are compared in the middle
// of every cycle.
module tb_qmf_ctrl;
  import qmf_pkg::*;

  logic     clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0;
  logic     in_ready, load, b_h, b_v, cap, done;
  subband_e sb;
  int checks = 0, failures = 0;
  int phase = -1;          // model: -1 idle, 0..3 pass cycle
  int n_b2b = 0, n_stall = 0, n_load = 0, n_idle = 0;
  int last_load = -100, cyc = 0;

  qmf_ctrl dut (.clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_ready(in_ready),
                .load(load), .sb(sb), .b_h(b_h), .b_v(b_v), .cap(cap), .done(done));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_eq(string what, int got, int exp_v);
    checks++;
    if (got != exp_v) begin
      failures++;
      if (failures < 10) $display("FAIL cycle %0d %s: got %0d expected %0d", cyc, what, got, exp_v);
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 3000; t++) begin
      // drive in the first half of the cycle: hold a waiting request
      if (!(in_valid && !in_ready)) in_valid = ($urandom_range(0, 3) != 0);
      #2;
      begin
        bit exp_ready, exp_busy;
        exp_busy  = (phase >= 0);
        exp_ready = !exp_busy || phase == 3;
        expect_eq("in_ready", int'(in_ready), int'(exp_ready));
        expect_eq("load", int'(load), int'(in_valid && exp_ready));
        expect_eq("cap", int'(cap), int'(exp_busy));
        expect_eq("done", int'(done), int'(phase == 3));
        if (exp_busy) begin
          expect_eq("sb", int'(sb), phase);
          expect_eq("b_h", int'(b_h), phase % 2);
          expect_eq("b_v", int'(b_v), phase / 2);
        end
        if (in_valid && !exp_ready) n_stall++;
        if (!in_valid && !exp_busy) n_idle++;
        if (in_valid && exp_ready) begin
          n_load++;
          if (phase == 3) n_b2b++;
          checks++;
          if (cyc - last_load < 4) begin
            failures++;
            $display("FAIL loads %0d cycles apart", cyc - last_load);
          end
          last_load = cyc;
          phase = 0;
        end else if (phase == 3) phase = -1;
        else if (phase >= 0) phase++;
      end
      @(negedge clk);
      cyc++;
    end
    checks++;
    if (n_b2b == 0 || n_stall == 0 || n_idle == 0) begin
      failures++;
      $display("FAIL coverage: back-to-back %0d stalls %0d idle %0d", n_b2b, n_stall, n_idle);
    end
    $display("loads %0d back-to-back %0d stalls %0d idle %0d", n_load, n_b2b, n_stall, n_idle);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

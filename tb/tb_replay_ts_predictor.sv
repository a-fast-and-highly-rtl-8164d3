// tb_replay_ts_predictor: checks the cycle-by-cycle timing-error predictor.
//
// Instance 1: first example net at its 32 ps boundary. Instance 2: second example net
// with two endpoints, X (net 5) and the output (net 8), at 25 ps. Random startpoints are
// applied every cycle; correct values, predictions, per-endpoint errors and the cycle
// error are compared with the reference models. Endpoint X has all its paths shorter
// than 25 ps, so it must never report an error. The predictor is also scored against the
// delay-annotated reference (transport delays sampled at the boundary), and the
// agreement counts are printed; they are not checked, since the method is a heuristic.
module tb_replay_ts_predictor;
  import replay_pkg::*;
  import tb_delay_ref_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  logic [1:0] sp5  = '0;
  logic [3:0] sp11 = '0;
  logic       c5, p5, e5, err5;
  logic [1:0] c11, p11, e11;
  logic       err11;

  replay_ts_predictor dut5 (
    .clk(clk), .sp(sp5), .correct(c5), .predicted(p5), .ep_err(e5), .err(err5));

  localparam net_idx_t [0:1] EP11 = '{16'd5, 16'd8};
  replay_ts_predictor #(
    .NS(FIG11_NS), .NG(FIG11_NG), .NE(2), .GATES(FIG11_GATES), .ENDPOINTS(EP11),
    .TS_BOUNDARY_PS(FIG11_TS_PS)
  ) dut11 (
    .clk(clk), .sp(sp11), .correct(c11), .predicted(p11), .ep_err(e11), .err(err11));

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int_list_t pd5, pd11, pd11x;
    logic [1:0] o5;
    logic [3:0] o11;
    int cnt[4];
    int errs5 = 0, errs11 = 0;
    bit [63:0] s5, s11;
    bit exp_p5, exp_p11, act;
    pd5   = fig5_pd();
    pd11  = fig11_pd();
    // delays to endpoint X (net 5): only gates 0 and 1 lie in its cone
    pd11x = '{20, 20,  10, 20,  -1, -1,  -1, -1,  -1, -1};
    cnt = '{0, 0, 0, 0};
    @(negedge clk);
    for (int cyc = 0; cyc < 4000; cyc++) begin
      o5 = sp5; o11 = sp11;
      @(posedge clk);
      #1;
      sp5  = 2'($urandom);
      sp11 = 4'($urandom);
      #1;
      s5  = settle(fig5_list(), FIG5_NS, 64'(sp5));
      s11 = settle(fig11_list(), FIG11_NS, 64'(sp11));
      exp_p5  = replay_pred(fig5_list(), FIG5_NS, pd5, 32, 64'(o5), 64'(sp5), 7);
      exp_p11 = replay_pred(fig11_list(), FIG11_NS, pd11, 25, 64'(o11), 64'(sp11), 8);
      check("fig5 correct", c5, s5[7]);
      check("fig5 predicted", p5, exp_p5);
      check("fig5 err", err5, exp_p5 != s5[7]);
      check("fig11 X correct", c11[0], s11[5]);
      check("fig11 X predicted", p11[0],
            replay_pred(fig11_list(), FIG11_NS, pd11x, 25, 64'(o11), 64'(sp11), 5));
      check("fig11 X never in error", e11[0], 0);
      check("fig11 out correct", c11[1], s11[8]);
      check("fig11 out predicted", p11[1], exp_p11);
      check("fig11 cycle err", err11, exp_p11 != s11[8]);
      errs5  += err5;
      errs11 += err11;
      act = actual_error(fig5_list(), FIG5_NS, 64'(o5), 64'(sp5), 7, 32);
      cnt[{act, err5}]++;
    end
    check("fig5 errors seen", int'(errs5 > 0), 1);
    check("fig11 errors seen", int'(errs11 > 0), 1);
    $display("fig5 at 32 ps against delay reference: A(tp)=%0d B(fn)=%0d C(fp)=%0d D(tn)=%0d accuracy=%0d%%",
             cnt[3], cnt[2], cnt[1], cnt[0], (cnt[3] + cnt[0]) * 100 / 4000);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

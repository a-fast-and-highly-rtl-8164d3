// tb_replay_tse_block: checks the TS emulation block for single endpoints.
//
// 1. The elaborated path delays of every input node are compared with the delays printed
//    for the two published example nets, and the set of met (replaced) nodes with the one
//    the method gives: at 32 ps the first example replaces the input nodes of P, Q and R.
// 2. Random startpoint sequences are applied to four instances (first example at 32 ps,
//    at 0 ps where nothing is replaced, at 100 ps where everything is, and the second
//    example at 25 ps); each prediction is compared with the hand-tabled Replay reference.
// 3. The published misprediction case: (A,B,C,D) going from 1111 to 0111 in the second
//    example gives a prediction of 1 while the settled value is 0.
module tb_replay_tse_block;
  import replay_pkg::*;
  import tb_delay_ref_pkg::*;

  localparam int NN5  = FIG5_NS + FIG5_NG;
  localparam int NN11 = FIG11_NS + FIG11_NG;

  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  logic [FIG5_NS-1:0]  sp5  = '0;
  logic [FIG11_NS-1:0] sp11 = '0;
  logic [NN5-1:0]      orig5;
  logic [NN11-1:0]     orig11;
  logic pred5, pred5_none, pred5_all, pred11;

  always_comb orig5  = NN5'(settle(fig5_list(), FIG5_NS, 64'(sp5)));
  always_comb orig11 = NN11'(settle(fig11_list(), FIG11_NS, 64'(sp11)));

  replay_tse_block dut5 (.clk(clk), .sp(sp5), .orig_net(orig5), .pred(pred5));
  replay_tse_block #(.TS_BOUNDARY_PS(0)) dut5_none (
    .clk(clk), .sp(sp5), .orig_net(orig5), .pred(pred5_none));
  replay_tse_block #(.TS_BOUNDARY_PS(100)) dut5_all (
    .clk(clk), .sp(sp5), .orig_net(orig5), .pred(pred5_all));
  replay_tse_block #(
    .NS(FIG11_NS), .NG(FIG11_NG), .GATES(FIG11_GATES),
    .ENDPOINT(FIG11_ENDPOINTS[0]), .TS_BOUNDARY_PS(FIG11_TS_PS)
  ) dut11 (.clk(clk), .sp(sp11), .orig_net(orig11), .pred(pred11));

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int_list_t p5, p11;
    logic [FIG5_NS-1:0]  old5;
    logic [FIG11_NS-1:0] old11;
    p5  = fig5_pd();
    p11 = fig11_pd();

    // 1. static timing analysis and replacement choice
    for (int g = 0; g < FIG5_NG; g++)
      for (int k = 0; k < 2; k++) begin
        check($sformatf("fig5 node delay g%0d.%0d", g, k), int'(dut5.NODE_PD[g][k]), p5[2*g+k]);
        check($sformatf("fig5 met g%0d.%0d", g, k), int'(dut5.MET[g][k]),
              int'(p5[2*g+k] >= 0 && p5[2*g+k] < 32));
        check("fig5 none met", int'(dut5_none.MET[g][k]), 0);
        check("fig5 all met", int'(dut5_all.MET[g][k]), int'(p5[2*g+k] >= 0));
      end
    for (int g = 0; g < FIG11_NG; g++)
      for (int k = 0; k < 2; k++) begin
        check($sformatf("fig11 node delay g%0d.%0d", g, k), int'(dut11.NODE_PD[g][k]),
              p11[2*g+k]);
        check("fig11 none met at 25 ps", int'(dut11.MET[g][k]), 0);
      end
    // replaced nodes at 32 ps: P input (gate 0), Q and R inputs from P (gates 3, 5)
    check("P replaced", int'(dut5.MET[0][0]), 1);
    check("Q replaced", int'(dut5.MET[3][0]), 1);
    check("R replaced", int'(dut5.MET[5][0]), 1);
    check("count replaced", $countones(dut5.MET), 3);

    // 2. random sequences
    @(negedge clk);
    for (int cyc = 0; cyc < 2000; cyc++) begin
      old5  = sp5;
      old11 = sp11;
      @(posedge clk);
      #1;
      sp5  = 2'($urandom);
      sp11 = 4'($urandom);
      #1;
      check("fig5 pred 32ps", pred5,
            replay_pred(fig5_list(), FIG5_NS, p5, 32, 64'(old5), 64'(sp5), 7));
      check("fig5 pred 0ps = last cycle", pred5_none, int'(settle(fig5_list(), FIG5_NS, 64'(old5)) >> 7) & 1);
      check("fig5 pred 100ps = correct", pred5_all, int'(orig5[7]));
      check("fig11 pred 25ps", pred11,
            replay_pred(fig11_list(), FIG11_NS, p11, 25, 64'(old11), 64'(sp11), 8));
    end

    // 3. misprediction case
    @(posedge clk); #1 sp11 = 4'b1111;
    @(posedge clk); #1 sp11 = 4'b1110;   // {D,C,B,A}: A falls
    #1;
    check("mispredict case prediction", pred11, 1);
    check("mispredict case settled", orig11[8], 0);
    check("mispredict case no actual error", actual_error(fig11_list(), FIG11_NS, 64'hF, 64'hE, 8, 25), 0);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

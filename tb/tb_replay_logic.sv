// tb_replay_logic: checks the original-logic evaluator on both example nets.
// Every input combination is applied; each net is compared with boolean expressions
// written out by hand for the two nets and with the reference model's settled values.
module tb_replay_logic;
  import replay_pkg::*;
  import tb_delay_ref_pkg::*;

  int checks = 0, failures = 0;

  logic [FIG5_NS-1:0]           sp5;
  logic [FIG5_NS+FIG5_NG-1:0]   net5;
  logic [FIG11_NS-1:0]          sp11;
  logic [FIG11_NS+FIG11_NG-1:0] net11;

  replay_logic dut5 (.sp(sp5), .net(net5));
  replay_logic #(.NS(FIG11_NS), .NG(FIG11_NG), .GATES(FIG11_GATES)) dut11 (
    .sp(sp11), .net(net11));

  task automatic check(string what, logic got, logic exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0b expected %0b", what, got, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 4; i++) begin
      bit a, b, p, q;
      bit [63:0] s;
      sp5 = 2'(i);
      a = sp5[0]; b = sp5[1];
      #1;
      p = !a;
      q = p & (a & !b);
      check("fig5 P", net5[2], p);
      check("fig5 Q", net5[5], q);
      check("fig5 endpoint", net5[7], p & !q);
      s = settle(fig5_list(), FIG5_NS, 64'(sp5));
      for (int n = 0; n < FIG5_NS + FIG5_NG; n++) check("fig5 net", net5[n], s[n]);
    end
    for (int i = 0; i < 16; i++) begin
      bit a, b, c, d, x;
      bit [63:0] s;
      sp11 = 4'(i);
      {d, c, b, a} = sp11;
      #1;
      x = a & (b | c);
      check("fig11 X", net11[5], x);
      check("fig11 endpoint", net11[8], x & (x ^ !d));
      s = settle(fig11_list(), FIG11_NS, 64'(sp11));
      for (int n = 0; n < FIG11_NS + FIG11_NG; n++) check("fig11 net", net11[n], s[n]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

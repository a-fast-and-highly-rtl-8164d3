// tb_voltage_drop_flag_gen: checks the drop/interval waveform cycle by cycle.
//
// For each setting (interval, drop) the generator is enabled and the flag is compared
// with the expected waveform: counting k = 0 from the first clock edge that samples
// enable high, the flag is high after that edge exactly when (k mod (I+D)) >= I.
// Settings cover the shortest periods (1,1), unequal ones, a drop length of 0 (never
// drops), and idle behaviour while enable is low. The number of drop periods seen is
// checked as well.
module tb_voltage_drop_flag_gen;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  logic        rst_n = 0, enable = 0;
  logic [31:0] drop_cycles = 0, interval_cycles = 0;
  logic        drop;

  voltage_drop_flag_gen dut (
    .clk(clk), .rst_n(rst_n), .enable(enable), .drop_cycles(drop_cycles),
    .interval_cycles(interval_cycles), .drop(drop));

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  task automatic run(int i_len, int d_len, int n);
    int periods = 0;
    logic last = 0;
    enable = 0;
    interval_cycles = 32'(i_len);
    drop_cycles     = 32'(d_len);
    @(posedge clk); #1;
    check("idle flag low", drop, 0);
    enable = 1;
    for (int k = 0; k < n; k++) begin
      @(posedge clk); #1;
      check($sformatf("flag I=%0d D=%0d k=%0d", i_len, d_len, k), drop,
            (d_len == 0) ? 0 : int'((k % (i_len + d_len)) >= i_len));
      if (drop && !last) periods++;
      last = drop;
    end
    begin
      int starts = 0;
      for (int k = 0; k < n; k++) if (d_len != 0 && (k % (i_len + d_len)) == i_len) starts++;
      check("number of drop periods", periods, starts);
    end
    enable = 0;
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    run(1, 1, 40);
    run(3, 2, 50);
    run(7, 1, 80);
    run(2, 5, 70);
    run(4, 0, 30);
    run(100, 30, 1300);
    // reset while running returns the flag low
    enable = 1; interval_cycles = 1; drop_cycles = 3;
    repeat (3) @(posedge clk);
    #1 check("dropping before reset", drop, 1);
    rst_n = 0;
    @(posedge clk); #1;
    check("reset clears flag", drop, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_ts_accuracy_counter: checks the four agreement counters.
// Random actual/emulated error pairs are applied with random valid gaps and a clear in
// the middle; the counters are compared with counts kept by the testbench after every
// cycle, and the derived rates are printed at the end.
module tb_ts_accuracy_counter;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  logic rst_n = 0, clear = 0, valid = 0, actual_err = 0, emu_err = 0;
  logic [31:0] cnt_a, cnt_b, cnt_c, cnt_d;

  ts_accuracy_counter dut (
    .clk(clk), .rst_n(rst_n), .clear(clear), .valid(valid), .actual_err(actual_err),
    .emu_err(emu_err), .cnt_a(cnt_a), .cnt_b(cnt_b), .cnt_c(cnt_c), .cnt_d(cnt_d));

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
    int a = 0, b = 0, c = 0, d = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    for (int cyc = 0; cyc < 3000; cyc++) begin
      valid      = ($urandom_range(0, 4) != 0);
      actual_err = 1'($urandom);
      emu_err    = 1'($urandom);
      clear      = (cyc == 1500);
      @(posedge clk);
      if (clear) begin
        a = 0; b = 0; c = 0; d = 0;
      end else if (valid) begin
        if (actual_err && emu_err) a++;
        else if (actual_err) b++;
        else if (emu_err) c++;
        else d++;
      end
      #1;
      check("A", int'(cnt_a), a);
      check("B", int'(cnt_b), b);
      check("C", int'(cnt_c), c);
      check("D", int'(cnt_d), d);
    end
    $display("error rate=%0d%% accuracy=%0d%% (of %0d cycles)", (a + b) * 100 / (a + b + c + d),
             (a + d) * 100 / (a + b + c + d), a + b + c + d);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_replay_emulator_top: end-to-end run of the emulator at its default parameters.
//
// The target (first example net, A an input port, B a state flip-flop, 32 ps boundary)
// is driven with random inputs. A delay-annotated reference of the same net runs in
// lock-step on the emulator's own startpoints and supplies the actual timing error to
// the agreement counters. Phase 1 (3000 cycles): fault injection off, the emulator only
// traces timing errors. The counters are then cleared. Phase 2 (6000 cycles): the
// periodic voltage-drop flag (interval 7, drop 3 cycles) injects predicted values into
// the state. A model checks every cycle: the flag waveform, the outputs and state, the
// error trace; at the end the four counters are compared with the model's counts.
// Each mechanism must occur at least once: a traced timing error, a drop period, an
// injected differing value, a counter clear, and true-positive and true-negative counts.
module tb_replay_emulator_top;
  import replay_pkg::*;
  import tb_delay_ref_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  logic        rst_n = 0, in_a = 0, drop_en = 0, actual_valid = 0, actual_err = 0;
  logic        cnt_clear = 0;
  logic [31:0] drop_cycles = 3, interval_cycles = 7;
  logic        out, state, ep_err, err, drop;
  logic [31:0] cnt_a, cnt_b, cnt_c, cnt_d;

  replay_emulator_top dut (
    .clk(clk), .rst_n(rst_n), .in_port(in_a), .out(out), .state(state), .ep_err(ep_err),
    .err(err), .drop_en(drop_en), .drop_cycles(drop_cycles),
    .interval_cycles(interval_cycles), .drop(drop), .actual_valid(actual_valid),
    .actual_err(actual_err), .cnt_clear(cnt_clear), .cnt_a(cnt_a), .cnt_b(cnt_b),
    .cnt_c(cnt_c), .cnt_d(cnt_d));

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int n_err = 0, n_drop_periods = 0, n_injected = 0, n_clear = 0;
  int m_cnt[4] = '{0, 0, 0, 0};

  task automatic run_phase(int cycles, bit with_drop);
    int_list_t pd;
    bit [63:0] old_sp, new_sp;
    bit corr, pred, exp_drop, act, m_state, last_drop;
    int k;
    pd = fig5_pd();
    m_state   = state;
    old_sp    = {62'd0, state, in_a};
    last_drop = 0;
    drop_en   = with_drop;
    k = -1;                                  // no edge has sampled drop_en yet
    for (int cyc = 0; cyc < cycles; cyc++) begin
      in_a = 1'($urandom);
      #1;
      new_sp   = {62'd0, m_state, in_a};
      corr     = settle(fig5_list(), FIG5_NS, new_sp) >> 7;
      pred     = replay_pred(fig5_list(), FIG5_NS, pd, int'(FIG5_TS_PS), old_sp, new_sp, 7);
      act      = actual_error(fig5_list(), FIG5_NS, old_sp, new_sp, 7, int'(FIG5_TS_PS));
      exp_drop = with_drop && k >= 0 && (k % 10) >= 7;
      actual_valid = 1;
      actual_err   = act;
      check("drop flag", drop, exp_drop);
      check("state", state, m_state);
      check("out", out, exp_drop ? pred : corr);
      check("err trace", err, pred != corr);
      m_cnt[{act, pred != corr}]++;
      n_err          += (pred != corr);
      n_drop_periods += (drop && !last_drop);
      n_injected     += (exp_drop && pred != corr);
      last_drop = drop;
      @(posedge clk);
      k++;
      old_sp  = new_sp;
      m_state = exp_drop ? pred : corr;
      #1;
    end
    actual_valid = 0;
    drop_en      = 0;
  endtask

  initial begin
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    run_phase(3000, 0);
    check("phase 1 A", int'(cnt_a), m_cnt[3]);
    check("phase 1 B", int'(cnt_b), m_cnt[2]);
    check("phase 1 C", int'(cnt_c), m_cnt[1]);
    check("phase 1 D", int'(cnt_d), m_cnt[0]);
    $display("trace only: tp=%0d fn=%0d fp=%0d tn=%0d", m_cnt[3], m_cnt[2], m_cnt[1], m_cnt[0]);
    cnt_clear = 1;
    @(posedge clk); #1;
    cnt_clear = 0;
    n_clear++;
    check("clear A", int'(cnt_a), 0);
    check("clear D", int'(cnt_d), 0);
    m_cnt = '{0, 0, 0, 0};
    run_phase(6000, 1);
    check("phase 2 A", int'(cnt_a), m_cnt[3]);
    check("phase 2 B", int'(cnt_b), m_cnt[2]);
    check("phase 2 C", int'(cnt_c), m_cnt[1]);
    check("phase 2 D", int'(cnt_d), m_cnt[0]);
    $display("with drops: tp=%0d fn=%0d fp=%0d tn=%0d", m_cnt[3], m_cnt[2], m_cnt[1], m_cnt[0]);
    $display("mechanisms: timing errors traced=%0d drop periods=%0d injected faults=%0d counter clears=%0d",
             n_err, n_drop_periods, n_injected, n_clear);
    check("timing error traced", int'(n_err > 0), 1);
    check("drop period entered", int'(n_drop_periods > 0), 1);
    check("fault injected", int'(n_injected > 0), 1);
    check("counter cleared", int'(n_clear > 0), 1);
    check("true positives counted", int'(cnt_a > 0), 1);
    check("true negatives counted", int'(cnt_d > 0), 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

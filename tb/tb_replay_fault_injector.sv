// tb_replay_fault_injector: checks voltage-drop fault injection into a sequential target.
//
// Target: the first example net with A an input port and B a flip-flop that captures the
// endpoint. A cycle-accurate model keeps its own copy of the state and of the previous
// cycle's startpoints, computes the correct and the predicted (hand-tabled Replay) values,
// selects by the drop flag and checks out, state and err every cycle. The drop flag is
// random. Counted and required: cycles in drop, drops that injected a differing value,
// and at least one divergence of the state from a fault-free copy of the circuit. A
// second instance at 30 ps (0.75 of the 40 ps worst-case arrival) must never report an
// error, since for this net only one node is replaced there and it does not change the
// endpoint.
module tb_replay_fault_injector;
  import replay_pkg::*;
  import tb_delay_ref_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  logic rst_n = 0, in_a = 0, drop = 0;
  logic out, state, ep_err, err;
  logic out30, state30, ep_err30, err30;

  replay_fault_injector dut (
    .clk(clk), .rst_n(rst_n), .in_port(in_a), .drop(drop),
    .out(out), .state(state), .ep_err(ep_err), .err(err));

  replay_fault_injector #(.TS_BOUNDARY_PS(30)) dut30 (
    .clk(clk), .rst_n(rst_n), .in_port(in_a), .drop(drop),
    .out(out30), .state(state30), .ep_err(ep_err30), .err(err30));

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
    int_list_t pd;
    bit m_state, m_clean, corr, pred, sel;
    bit [63:0] old_sp, new_sp;
    int drops = 0, injected = 0, diverged = 0;
    pd = fig5_pd();
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    m_state = 0;
    m_clean = 0;
    old_sp  = {62'd0, m_state, in_a};
    for (int cyc = 0; cyc < 5000; cyc++) begin
      in_a = 1'($urandom);
      drop = ($urandom_range(0, 3) == 0);
      #1;
      new_sp = {62'd0, m_state, in_a};
      corr = settle(fig5_list(), FIG5_NS, new_sp) >> 7;
      pred = replay_pred(fig5_list(), FIG5_NS, pd, 32, old_sp, new_sp, 7);
      sel  = drop ? pred : corr;
      check("state", state, m_state);
      check("out", out, sel);
      check("err", err, pred != corr);
      check("ep_err", ep_err, pred != corr);
      check("no error at 30 ps", err30, 0);
      drops    += drop;
      injected += (drop && pred != corr);
      @(posedge clk);
      old_sp  = new_sp;
      m_state = sel;
      m_clean = ~in_a;        // endpoint of the fault-free circuit is NOT A
      diverged += (m_state != m_clean);
      #1;
    end
    check("drop cycles seen", int'(drops > 0), 1);
    check("faults injected", int'(injected > 0), 1);
    check("state diverged from fault-free run", int'(diverged > 0), 1);
    $display("drop cycles=%0d injected faults=%0d diverged state cycles=%0d", drops, injected, diverged);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

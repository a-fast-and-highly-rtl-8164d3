// tb_replay_multiplier_workload: Replay on a W x W array multiplier with random operands.
//
// Workload in the style of the benchmark-circuit study: a combinational multiplier
// with random operands every cycle, TS
// boundaries of 0.8 and 0.9 of the worst-case arrival time, metrics per endpoint.
// The gate net is generated here at elaboration: W*W AND partial products, then W-1 rows
// of ripple-carry adders (half adder = XOR + AND, full adder = 2 XOR + 2 AND + OR).
// Delays: AND/OR 2 ps, XOR 3 ps. This net is a stand-in for the 16-bit multiplier
// benchmark, whose exact netlist is not used here; the structure and the delays are this
// testbench's choice. W defaults to 8 (320 gates, 16 endpoints): at W = 16 (1408 gates,
// 32 endpoints, two boundaries) Verilator's elaboration of the per-endpoint timing
// analysis took longer than 15 minutes, while W = 8 builds in under a minute.
//
// Checked every cycle, for both boundaries and all 2W endpoints: the correct endpoint
// values equal the product a*b; the predicted values equal an independent Replay
// reference computed from the testbench's own path-delay analysis; ep_err and err match.
// The node delays the hardware derives are compared with the testbench's.
// Reported (not checked): accuracy, false-positive and false-negative rates against the
// transport-delay reference, averaged over endpoints and per cycle. Multipliers have
// widely spread path delays through the same node, which is where the method's longest-
// path rule is least exact.
module tb_replay_multiplier_workload;
  import replay_pkg::*;
  import tb_delay_ref_pkg::*;

  localparam int W      = 8;
  localparam int NS     = 2 * W;
  localparam int NE     = 2 * W;
  localparam int NG     = W * W + (4 + 5 * (W - 2)) + (W - 2) * (7 + 5 * (W - 2));
  localparam int CYCLES = 2000;

  typedef struct packed {
    gate_t    [0:NG-1] g;
    net_idx_t [0:NE-1] e;
  } mul_net_t;

  // Startpoints: a = nets 0..W-1, b = nets W..2W-1.
  function automatic mul_net_t build_mul();
    mul_net_t m;
    gate_t    [0:NG-1] gg;
    net_idx_t [0:NE-1] ee;
    int nx, k;
    int pp [W*W];
    int sum [W];          // running partial sum bits of the previous row
    int cout_prev, carry, s0, c0, x0, a0, a1;
    k  = 0;
    nx = NS;
    gg = '0;
    ee = '0;
    for (int i = 0; i < W; i++)
      for (int j = 0; j < W; j++) begin
        gg[k] = '{fn: G_AND, in0: 16'(j), in1: 16'(W + i), delay_ps: 16'd2};
        pp[i*W+j] = nx; k++; nx++;
      end
    for (int j = 0; j < W; j++) sum[j] = pp[j];
    ee[0]    = 16'(pp[0]);
    cout_prev = -1;
    for (int i = 1; i < W; i++) begin
      int row_sum [W];
      carry = -1;
      for (int j = 0; j < W; j++) begin
        int a, b;
        a = (j < W - 1) ? sum[j+1] : cout_prev;
        b = pp[i*W+j];
        if (a < 0 || carry < 0) begin
          // half adder on the two inputs that exist
          int p, q;
          p = (a < 0) ? b : a;
          q = (a < 0) ? carry : b;
          gg[k] = '{fn: G_XOR, in0: 16'(p), in1: 16'(q), delay_ps: 16'd3}; s0 = nx; k++; nx++;
          gg[k] = '{fn: G_AND, in0: 16'(p), in1: 16'(q), delay_ps: 16'd2}; c0 = nx; k++; nx++;
        end else begin
          gg[k] = '{fn: G_XOR, in0: 16'(a), in1: 16'(b), delay_ps: 16'd3}; x0 = nx; k++; nx++;
          gg[k] = '{fn: G_XOR, in0: 16'(x0), in1: 16'(carry), delay_ps: 16'd3}; s0 = nx; k++; nx++;
          gg[k] = '{fn: G_AND, in0: 16'(a), in1: 16'(b), delay_ps: 16'd2}; a0 = nx; k++; nx++;
          gg[k] = '{fn: G_AND, in0: 16'(x0), in1: 16'(carry), delay_ps: 16'd2}; a1 = nx; k++; nx++;
          gg[k] = '{fn: G_OR, in0: 16'(a0), in1: 16'(a1), delay_ps: 16'd2}; c0 = nx; k++; nx++;
        end
        row_sum[j] = s0;
        carry = c0;
      end
      for (int j = 0; j < W; j++) sum[j] = row_sum[j];
      cout_prev = carry;
      ee[i] = 16'(sum[0]);
    end
    for (int j = 1; j < W; j++) ee[W - 1 + j] = 16'(sum[j]);
    ee[2*W-1] = 16'(cout_prev);
    m.g = gg;
    m.e = ee;
    return m;
  endfunction

  localparam mul_net_t MUL = build_mul();

  function automatic int worst_arrival();
    int at [NS+NG];
    int w;
    for (int n = 0; n < NS; n++) at[n] = 0;
    for (int g = 0; g < NG; g++) begin
      int m0, m1;
      m0 = at[MUL.g[g].in0];
      m1 = at[MUL.g[g].in1];
      at[NS+g] = (m0 > m1 ? m0 : m1) + int'(MUL.g[g].delay_ps);
    end
    w = 0;
    for (int e = 0; e < NE; e++) if (at[MUL.e[e]] > w) w = at[MUL.e[e]];
    return w;
  endfunction

  localparam int WORST = worst_arrival();
  localparam int TS08  = WORST * 8 / 10;
  localparam int TS09  = WORST * 9 / 10;

  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  logic [NS-1:0] sp = '0;
  logic [NE-1:0] c8, p8, e8, c9, p9, e9;
  logic          err8, err9;

  replay_ts_predictor #(.NS(NS), .NG(NG), .NE(NE), .GATES(MUL.g), .ENDPOINTS(MUL.e),
                        .TS_BOUNDARY_PS(TS08))
    dut8 (.clk(clk), .sp(sp), .correct(c8), .predicted(p8), .ep_err(e8), .err(err8));
  replay_ts_predictor #(.NS(NS), .NG(NG), .NE(NE), .GATES(MUL.g), .ENDPOINTS(MUL.e),
                        .TS_BOUNDARY_PS(TS09))
    dut9 (.clk(clk), .sp(sp), .correct(c9), .predicted(p9), .ep_err(e9), .err(err9));

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    repeat (CYCLES + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    gate_list_t gl;
    int_list_t  pd [NE];
    bit_list_t  old_sp, new_sp, orig;
    grid_t      grid;
    int ep_cnt [2][4];      // per-endpoint outcomes summed over endpoints: [boundary][{act,emu}]
    int cyc_cnt [2][4];     // cycle-level outcomes
    int ts [2];
    int violated [2];
    logic [NE-1:0] pr [2];
    ts = '{TS08, TS09};
    gl = new[NG];
    foreach (gl[g]) gl[g] = MUL.g[g];
    for (int e = 0; e < NE; e++) pd[e] = node_pd_d(gl, NS, int'(MUL.e[e]));
    for (int b = 0; b < 2; b++)
      for (int x = 0; x < 4; x++) begin
        ep_cnt[b][x] = 0;
        cyc_cnt[b][x] = 0;
      end
    $display("multiplier %0dx%0d: %0d gates, worst arrival %0d ps, boundaries %0d and %0d ps",
             W, W, NG, WORST, TS08, TS09);

    // hardware path delays against the testbench's analysis (first and last endpoint)
    for (int g = 0; g < NG; g++)
      for (int k = 0; k < 2; k++) begin
        check("node delay ep0", int'(dut8.g_ep[0].u_tse.NODE_PD[g][k]), pd[0][2*g+k]);
        check("node delay ep31", int'(dut9.g_ep[NE-1].u_tse.NODE_PD[g][k]), pd[NE-1][2*g+k]);
      end

    old_sp = new[NS];
    new_sp = new[NS];
    foreach (old_sp[n]) old_sp[n] = 0;
    @(negedge clk);
    for (int cyc = 0; cyc < CYCLES; cyc++) begin
      logic [W-1:0] a, b;
      logic [NE-1:0] prod;
      @(posedge clk);
      #1;
      a  = W'($urandom);
      b  = W'($urandom);
      sp = {b, a};
      for (int n = 0; n < NS; n++) new_sp[n] = sp[n];
      #1;
      prod = NE'(a) * NE'(b);
      check("product 0.8", longint'(c8), longint'(prod));
      check("product 0.9", longint'(c9), longint'(prod));
      orig  = settle_d(gl, NS, new_sp);
      grid  = grid_eval(gl, NS, old_sp, new_sp, TS09);
      pr[0] = p8;
      pr[1] = p9;
      for (int bi = 0; bi < 2; bi++) begin
        bit any_act, any_emu;
        any_act = 0;
        any_emu = 0;
        for (int e = 0; e < NE; e++) begin
          bit exp_p, act, emu;
          exp_p = replay_pred_d(gl, NS, pd[e], ts[bi], old_sp, orig, int'(MUL.e[e]));
          check("prediction", pr[bi][e], exp_p);
          act = grid[MUL.e[e]][ts[bi]] != orig[MUL.e[e]];
          emu = exp_p != orig[MUL.e[e]];
          ep_cnt[bi][{act, emu}]++;
          any_act |= act;
          any_emu |= emu;
        end
        cyc_cnt[bi][{any_act, any_emu}]++;
        check("cycle err", bi == 0 ? err8 : err9, any_emu);
      end
      check("ep_err 0.8", longint'(e8), longint'(p8 ^ c8));
      check("ep_err 0.9", longint'(e9), longint'(p9 ^ c9));
      for (int n = 0; n < NS; n++) old_sp[n] = new_sp[n];
    end
    for (int bi = 0; bi < 2; bi++) begin
      int n_ep, n_cy;
      n_ep = CYCLES * NE;
      n_cy = CYCLES;
      $display("0.%0dx (%0d ps) endpoints: error rate %0.2f%% accuracy %0.2f%% false-pos %0.2f%% false-neg %0.2f%%",
               8 + bi, ts[bi],
               100.0 * (ep_cnt[bi][3] + ep_cnt[bi][2]) / n_ep,
               100.0 * (ep_cnt[bi][3] + ep_cnt[bi][0]) / n_ep,
               100.0 * ep_cnt[bi][1] / n_ep, 100.0 * ep_cnt[bi][2] / n_ep);
      $display("0.%0dx (%0d ps) cycles:    error rate %0.2f%% accuracy %0.2f%% false-pos %0.2f%% false-neg %0.2f%%",
               8 + bi, ts[bi],
               100.0 * (cyc_cnt[bi][3] + cyc_cnt[bi][2]) / n_cy,
               100.0 * (cyc_cnt[bi][3] + cyc_cnt[bi][0]) / n_cy,
               100.0 * cyc_cnt[bi][1] / n_cy, 100.0 * cyc_cnt[bi][2] / n_cy);
      violated[bi] = ep_cnt[bi][3] + ep_cnt[bi][2];
    end
    check("timing errors occur at 0.8x", int'(violated[0] > 0), 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

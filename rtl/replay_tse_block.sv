// replay_tse_block: Replay timing-speculation emulation (TSE) block for one endpoint.
//
// Predicts the value the endpoint flip-flop would capture if the circuit were clocked at
// an aggressive period, the TS boundary, shorter than its worst-case arrival time.
//
// How it works. At elaboration the block runs a static timing analysis of the gate net
// (constant functions below): the latest arrival time AT(n) of every net from the
// startpoints, and the longest delay DN(n) from every net to this endpoint. The delay of
// the longest path through input node k of gate g to the endpoint is
//     PD(g,k) = AT(in_k) + delay(g) + DN(out_g).
// The combinational logic is then replicated. Its startpoints are the previous cycle's
// startpoint values (a register), so on its own the copy lags the original by one cycle.
// Every input node whose longest path is shorter than the TS boundary ("met") is tied to
// the corresponding net of the original logic, which holds this cycle's settled value;
// every other node keeps the lagging copy's value. The copy's endpoint is the prediction.
// A gate outside the endpoint's fan-in cone has no path to the endpoint and is left
// unconnected here; synthesis removes it.
//
// The analysis, the replication, the previous-cycle startpoints and the strict "shorter
// than the boundary" rule follow the published Replay algorithm. Doing the generation
// with SystemVerilog constant functions instead of a separate generator program, and the
// gate-net description format, are this design's own choices.
//
// Interface: sp = startpoint values of the current cycle; orig_net = all nets of the
// original logic evaluated from sp (see replay_logic); pred = predicted endpoint value.
// Timing: sp is registered on every rising clk edge; pred is combinational from the
// registered previous startpoints and from orig_net. There is no reset: the previous-
// startpoint register is valid one clock after sp has a defined value, so hold the
// startpoints steady for at least one clock (for instance during reset).
// NODE_PD and MET are exported as localparams for inspection.
module replay_tse_block
  import replay_pkg::*;
#(
  parameter int NS = FIG5_NS,
  parameter int NG = FIG5_NG,
  parameter gate_t [0:NG-1] GATES = FIG5_GATES,
  parameter net_idx_t ENDPOINT = FIG5_ENDPOINTS[0],
  parameter int unsigned TS_BOUNDARY_PS = FIG5_TS_PS
) (
  input  logic             clk,
  input  logic [NS-1:0]    sp,
  input  logic [NS+NG-1:0] orig_net,
  output logic             pred
);

  localparam int NN = NS + NG;

  // Longest path delay through each input node to the endpoint; all ones outside the
  // endpoint's cone. AT: latest arrival time of every net, startpoints at time 0.
  // DN: longest delay from every net to the endpoint, -1 where there is no path; the
  // gates are visited in reverse topological order.
  function automatic logic [NG-1:0][1:0][31:0] calc_node_pd();
    int at [NN];
    int dn [NN];
    logic [NG-1:0][1:0][31:0] pd;
    for (int n = 0; n < NN; n++) begin
      at[n] = 0;
      dn[n] = -1;
    end
    for (int g = 0; g < NG; g++) begin
      int a0, a1;
      a0 = at[GATES[g].in0];
      a1 = gate_is_unary(GATES[g].fn) ? a0 : at[GATES[g].in1];
      at[NS+g] = (a0 > a1 ? a0 : a1) + int'(GATES[g].delay_ps);
    end
    dn[ENDPOINT] = 0;
    for (int g = NG - 1; g >= 0; g--) begin
      if (dn[NS+g] >= 0) begin
        int d;
        d = dn[NS+g] + int'(GATES[g].delay_ps);
        if (dn[GATES[g].in0] < d) dn[GATES[g].in0] = d;
        if (!gate_is_unary(GATES[g].fn) && dn[GATES[g].in1] < d) dn[GATES[g].in1] = d;
      end
    end
    pd = '1;
    for (int g = 0; g < NG; g++) begin
      if (dn[NS+g] >= 0) begin
        pd[g][0] = 32'(at[GATES[g].in0] + int'(GATES[g].delay_ps) + dn[NS+g]);
        if (!gate_is_unary(GATES[g].fn))
          pd[g][1] = 32'(at[GATES[g].in1] + int'(GATES[g].delay_ps) + dn[NS+g]);
      end
    end
    return pd;
  endfunction

  localparam logic [NG-1:0][1:0][31:0] NODE_PD = calc_node_pd();

  // Met input nodes: every path through the node reaches the endpoint in time.
  function automatic logic [NG-1:0][1:0] calc_met();
    logic [NG-1:0][1:0] met;
    for (int g = 0; g < NG; g++)
      for (int k = 0; k < 2; k++)
        met[g][k] = (NODE_PD[g][k] != '1) && (NODE_PD[g][k] < TS_BOUNDARY_PS);
    return met;
  endfunction

  localparam logic [NG-1:0][1:0] MET = calc_met();

  // Previous cycle's startpoints.
  logic [NS-1:0] sp_prev;
  always_ff @(posedge clk) sp_prev <= sp;

  // Replicated logic with met-node replacement.
  logic [NN-1:0] tse_net;
  always_comb begin
    logic a, b;
    tse_net = '0;
    tse_net[NS-1:0] = sp_prev;
    for (int g = 0; g < NG; g++) begin
      a = MET[g][0] ? orig_net[GATES[g].in0] : tse_net[GATES[g].in0];
      b = MET[g][1] ? orig_net[GATES[g].in1] : tse_net[GATES[g].in1];
      tse_net[NS+g] = gate_eval(GATES[g].fn, a, b);
    end
  end

  assign pred = tse_net[ENDPOINT];

endmodule

// replay_fault_injector: emulated sequential circuit with voltage-drop timing faults.
//
// The target circuit is the gate net of replay_pkg plus its state flip-flops. Its
// startpoints are NI input ports followed by NF flip-flop outputs (nets 0..NI-1 and
// NI..NI+NF-1). A replay_ts_predictor computes, for every endpoint, the correct value
// and the value predicted at the TS boundary. A 2:1 multiplexer per endpoint, steered by
// the voltage-drop flag, passes the correct value (flag 0, interval period) or the
// predicted value (flag 1, drop period) to the output ports and to the flip-flops. Faults
// injected during a drop therefore propagate through the state into later cycles, which
// is what lets the effect of timing errors on a running program be observed. The
// per-endpoint timing-error comparison is kept as an output as well.
//
// The structure (startpoints from input ports and flip-flops, original logic and TSE
// block side by side, a flag-selected multiplexer feeding both the output ports and the
// flip-flops) follows the published fault-injection scheme. The split of endpoints into
// NF flip-flop inputs followed by output-only endpoints, the reset value of the state and
// the default example (first example net with input A a port and B held in a flip-flop
// that captures the endpoint) are this design's choices.
//
// Interface: in_port[NI] inputs; drop = voltage-drop flag of the current cycle; out[NE]
// selected endpoint values; state[NF] flip-flop contents (the NF state startpoints);
// ep_err/err timing-error comparison of the current cycle.
// Timing: out and err are combinational; state updates on the rising clk edge; rst_n is
// synchronous, active low, and loads STATE_RESET.
module replay_fault_injector
  import replay_pkg::*;
#(
  parameter int NI = 1,
  parameter int NF = 1,
  parameter int NG = FIG5_NG,
  parameter int NE = FIG5_NE,
  parameter gate_t    [0:NG-1] GATES     = FIG5_GATES,
  parameter net_idx_t [0:NE-1] ENDPOINTS = FIG5_ENDPOINTS,
  parameter int unsigned TS_BOUNDARY_PS  = FIG5_TS_PS,
  parameter logic [NF-1:0] STATE_RESET   = '0
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [NI-1:0] in_port,
  input  logic          drop,
  output logic [NE-1:0] out,
  output logic [NF-1:0] state,
  output logic [NE-1:0] ep_err,
  output logic          err
);

  localparam int NS = NI + NF;

  logic [NE-1:0] correct, predicted;

  replay_ts_predictor #(
    .NS             (NS),
    .NG             (NG),
    .NE             (NE),
    .GATES          (GATES),
    .ENDPOINTS      (ENDPOINTS),
    .TS_BOUNDARY_PS (TS_BOUNDARY_PS)
  ) u_pred (
    .clk       (clk),
    .sp        ({state, in_port}),
    .correct   (correct),
    .predicted (predicted),
    .ep_err    (ep_err),
    .err       (err)
  );

  assign out = drop ? predicted : correct;

  always_ff @(posedge clk) begin
    if (!rst_n) state <= STATE_RESET;
    else        state <= out[NF-1:0];
  end

  initial begin
    assert (NE >= NF) else $error("every flip-flop needs an endpoint");
  end

endmodule

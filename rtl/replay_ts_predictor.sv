// replay_ts_predictor: cycle-by-cycle timing-speculation error predictor for a gate net.
//
// One copy of the original logic computes the correct endpoint values from the current
// startpoints. Every endpoint has its own TS emulation block (replay_tse_block) that
// predicts the value the endpoint would capture at the TS boundary. A comparator per
// endpoint flags a timing error when prediction and correct value differ, and the cycle
// is in error when any endpoint is. This is the emulation circuit of the Replay method:
// original logic, emulation block and a != comparator per endpoint, with the cycle-level
// error being the OR over endpoints as the method defines it for a whole design.
//
// Interface: sp[NS] startpoints of the current cycle; correct[NE] and predicted[NE] the
// endpoint values; ep_err[NE] per-endpoint timing error; err = OR of ep_err.
// Timing: all outputs are combinational from sp and from the startpoints of the previous
// clock (registered inside each emulation block), so err belongs to the cycle whose
// startpoints are on sp. Sharing one original-logic copy among all endpoint blocks is
// this design's choice; the replicated logic is kept per endpoint as the method requires.
module replay_ts_predictor
  import replay_pkg::*;
#(
  parameter int NS = FIG5_NS,
  parameter int NG = FIG5_NG,
  parameter int NE = FIG5_NE,
  parameter gate_t    [0:NG-1] GATES     = FIG5_GATES,
  parameter net_idx_t [0:NE-1] ENDPOINTS = FIG5_ENDPOINTS,
  parameter int unsigned TS_BOUNDARY_PS  = FIG5_TS_PS
) (
  input  logic          clk,
  input  logic [NS-1:0] sp,
  output logic [NE-1:0] correct,
  output logic [NE-1:0] predicted,
  output logic [NE-1:0] ep_err,
  output logic          err
);

  logic [NS+NG-1:0] orig_net;

  replay_logic #(.NS(NS), .NG(NG), .GATES(GATES)) u_orig (
    .sp  (sp),
    .net (orig_net)
  );

  for (genvar e = 0; e < NE; e++) begin : g_ep
    replay_tse_block #(
      .NS             (NS),
      .NG             (NG),
      .GATES          (GATES),
      .ENDPOINT       (ENDPOINTS[e]),
      .TS_BOUNDARY_PS (TS_BOUNDARY_PS)
    ) u_tse (
      .clk      (clk),
      .sp       (sp),
      .orig_net (orig_net),
      .pred     (predicted[e])
    );
    assign correct[e] = orig_net[ENDPOINTS[e]];
  end

  assign ep_err = predicted ^ correct;
  assign err    = |ep_err;

endmodule

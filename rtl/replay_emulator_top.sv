// replay_emulator_top: timing-speculation emulator for one target circuit.
//
// Puts the Replay pieces together around one target (by default the first example net
// of replay_pkg, with input A a port and B a state flip-flop fed by the endpoint):
//   * replay_fault_injector holds the target's state flip-flops, its original logic and
//     one TS emulation block per endpoint. Its comparator output err is the cycle-by-cycle
//     timing-error trace of fine-grained timing speculation (the target runs with correct
//     values and err says whether the aggressive clock would have failed).
//   * voltage_drop_flag_gen produces the periodic voltage-drop flag. While it is high the
//     target's flip-flops and outputs take the predicted values instead, so timing faults
//     are injected and propagate. With drop_en low the emulator is a pure error predictor.
//   * ts_accuracy_counter compares err with an actual error signal supplied from outside
//     (a delay-annotated reference of the same circuit run in lock-step) and counts the
//     four agreement cases.
// Both uses of the emulation block (error trace and fault injection) are the published
// ones; combining them in one top with a run-time enable is this design's choice.
//
// Interface: in_port[NI] target inputs; out[NE] target outputs; state[NF] target state;
// err timing-error trace; drop the flag in use; actual_valid/actual_err the reference
// error for the current cycle; cnt_clear and cnt_a..cnt_d the agreement counters.
// Timing: out, err and drop refer to the current cycle; the counters count on the
// rising clk edge. rst_n is synchronous, active low; hold in_port steady during reset.
module replay_emulator_top
  import replay_pkg::*;
#(
  parameter int NI = 1,
  parameter int NF = 1,
  parameter int NG = FIG5_NG,
  parameter int NE = FIG5_NE,
  parameter gate_t    [0:NG-1] GATES     = FIG5_GATES,
  parameter net_idx_t [0:NE-1] ENDPOINTS = FIG5_ENDPOINTS,
  parameter int unsigned TS_BOUNDARY_PS  = FIG5_TS_PS,
  parameter int CNT_W = 32
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [NI-1:0]    in_port,
  output logic [NE-1:0]    out,
  output logic [NF-1:0]    state,
  output logic [NE-1:0]    ep_err,
  output logic             err,
  input  logic             drop_en,
  input  logic [CNT_W-1:0] drop_cycles,
  input  logic [CNT_W-1:0] interval_cycles,
  output logic             drop,
  input  logic             actual_valid,
  input  logic             actual_err,
  input  logic             cnt_clear,
  output logic [CNT_W-1:0] cnt_a,
  output logic [CNT_W-1:0] cnt_b,
  output logic [CNT_W-1:0] cnt_c,
  output logic [CNT_W-1:0] cnt_d
);

  voltage_drop_flag_gen #(.CNT_W(CNT_W)) u_drop (
    .clk             (clk),
    .rst_n           (rst_n),
    .enable          (drop_en),
    .drop_cycles     (drop_cycles),
    .interval_cycles (interval_cycles),
    .drop            (drop)
  );

  replay_fault_injector #(
    .NI             (NI),
    .NF             (NF),
    .NG             (NG),
    .NE             (NE),
    .GATES          (GATES),
    .ENDPOINTS      (ENDPOINTS),
    .TS_BOUNDARY_PS (TS_BOUNDARY_PS)
  ) u_target (
    .clk     (clk),
    .rst_n   (rst_n),
    .in_port (in_port),
    .drop    (drop),
    .out     (out),
    .state   (state),
    .ep_err  (ep_err),
    .err     (err)
  );

  ts_accuracy_counter #(.CNT_W(CNT_W)) u_count (
    .clk        (clk),
    .rst_n      (rst_n),
    .clear      (cnt_clear),
    .valid      (actual_valid),
    .actual_err (actual_err),
    .emu_err    (err),
    .cnt_a      (cnt_a),
    .cnt_b      (cnt_b),
    .cnt_c      (cnt_c),
    .cnt_d      (cnt_d)
  );

endmodule

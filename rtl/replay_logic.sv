// replay_logic: the original combinational logic of a target gate net.
//
// Evaluates every gate of the net from the current startpoint values, in the topological
// order in which the gates are listed, and returns the value of every net (startpoints
// first, then one net per gate). This is the zero-delay "correct" circuit: its endpoint
// nets are what the endpoint flip-flops capture when the clock is slow enough, and its
// internal nets are what a TS emulation block ties its met input nodes to.
//
// Interface: sp[NS] startpoint values in, net[NS+NG] all net values out.
// Timing: purely combinational.
// The gate-net description format (see replay_pkg) is this design's own choice.
module replay_logic
  import replay_pkg::*;
#(
  parameter int NS = FIG5_NS,
  parameter int NG = FIG5_NG,
  parameter gate_t [0:NG-1] GATES = FIG5_GATES
) (
  input  logic [NS-1:0]    sp,
  output logic [NS+NG-1:0] net
);

  always_comb begin
    net = '0;
    net[NS-1:0] = sp;
    for (int g = 0; g < NG; g++) begin
      net[NS+g] = gate_eval(GATES[g].fn, net[GATES[g].in0], net[GATES[g].in1]);
    end
  end

endmodule

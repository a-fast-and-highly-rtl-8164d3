// replay_pkg: types and example gate nets shared by the Replay timing-speculation
// emulation blocks.
//
// A target circuit is described as a gate net: NS startpoint nets (numbered 0..NS-1,
// the outputs of the launching flip-flops or input ports) followed by NG gates listed in
// topological order, gate g driving net NS+g. Each gate has a logic function, one or two
// input nets and a propagation delay in picoseconds. Endpoints are given as net numbers.
// This is the information a static timing analysis of a synthesized gate net provides
// and is what the Replay blocks need to build their timing-error predictors.
//
// Two example nets are provided. FIG5_* is the worked example used to explain Replay:
// gates of 5 ps and 10 ps between startpoints A and B and one endpoint, with a TS
// (timing-speculation) boundary of 32 ps. FIG11_* is the example that shows the limit of
// the heuristic, all gates 10 ps, boundary 25 ps. The delays and boundaries are the
// published ones; the gate functions are not given in the source and were chosen here
// (inverters for the 5 ps single-input gates of the first example, AND/OR/XOR/NOT for the
// second, picked so that the second example behaves as its description says).
package replay_pkg;

  typedef enum logic [2:0] {
    G_BUF  = 3'd0,
    G_INV  = 3'd1,
    G_AND  = 3'd2,
    G_OR   = 3'd3,
    G_NAND = 3'd4,
    G_NOR  = 3'd5,
    G_XOR  = 3'd6,
    G_XNOR = 3'd7
  } gate_fn_e;

  typedef logic [15:0] net_idx_t;   // net number
  typedef logic [15:0] delay_ps_t;  // gate delay in ps

  typedef struct packed {
    gate_fn_e  fn;
    net_idx_t  in0;
    net_idx_t  in1;       // ignored by single-input gates
    delay_ps_t delay_ps;
  } gate_t;

  // Single-input gates have one input node only.
  function automatic bit gate_is_unary(gate_fn_e fn);
    return (fn == G_BUF) || (fn == G_INV);
  endfunction

  function automatic logic gate_eval(gate_fn_e fn, logic a, logic b);
    unique case (fn)
      G_BUF:   return a;
      G_INV:   return ~a;
      G_AND:   return a & b;
      G_OR:    return a | b;
      G_NAND:  return ~(a & b);
      G_NOR:   return ~(a | b);
      G_XOR:   return a ^ b;
      G_XNOR:  return ~(a ^ b);
      default: return a;
    endcase
  endfunction

  // ---------------------------------------------------------------------------------
  // Example 1 (worked Replay example). Nets: 0 = A, 1 = B.
  //   net 2 : P  = NOT A            5 ps
  //   net 3 :      NOT B            5 ps
  //   net 4 :      A AND net3      10 ps
  //   net 5 : Q  = net2 AND net4   10 ps
  //   net 6 :      NOT net5         5 ps
  //   net 7 : R  = net2 AND net6   10 ps   (endpoint)
  // ---------------------------------------------------------------------------------
  localparam int FIG5_NS = 2;
  localparam int FIG5_NG = 6;
  localparam int FIG5_NE = 1;
  localparam gate_t [0:FIG5_NG-1] FIG5_GATES = '{
    '{fn: G_INV, in0: 16'd0, in1: 16'd0, delay_ps: 16'd5},
    '{fn: G_INV, in0: 16'd1, in1: 16'd1, delay_ps: 16'd5},
    '{fn: G_AND, in0: 16'd0, in1: 16'd3, delay_ps: 16'd10},
    '{fn: G_AND, in0: 16'd2, in1: 16'd4, delay_ps: 16'd10},
    '{fn: G_INV, in0: 16'd5, in1: 16'd5, delay_ps: 16'd5},
    '{fn: G_AND, in0: 16'd2, in1: 16'd6, delay_ps: 16'd10}
  };
  localparam net_idx_t [0:FIG5_NE-1] FIG5_ENDPOINTS = '{16'd7};
  localparam int unsigned FIG5_TS_PS = 32;

  // ---------------------------------------------------------------------------------
  // Example 2 (misprediction example). Nets: 0 = A, 1 = B, 2 = C, 3 = D.
  //   net 4 :      B OR C          10 ps
  //   net 5 : X  = A AND net4      10 ps
  //   net 6 :      NOT D           10 ps
  //   net 7 :      net5 XOR net6   10 ps
  //   net 8 :      net5 AND net7   10 ps   (endpoint)
  // ---------------------------------------------------------------------------------
  localparam int FIG11_NS = 4;
  localparam int FIG11_NG = 5;
  localparam int FIG11_NE = 1;
  localparam gate_t [0:FIG11_NG-1] FIG11_GATES = '{
    '{fn: G_OR,  in0: 16'd1, in1: 16'd2, delay_ps: 16'd10},
    '{fn: G_AND, in0: 16'd0, in1: 16'd4, delay_ps: 16'd10},
    '{fn: G_INV, in0: 16'd3, in1: 16'd3, delay_ps: 16'd10},
    '{fn: G_XOR, in0: 16'd5, in1: 16'd6, delay_ps: 16'd10},
    '{fn: G_AND, in0: 16'd5, in1: 16'd7, delay_ps: 16'd10}
  };
  localparam net_idx_t [0:FIG11_NE-1] FIG11_ENDPOINTS = '{16'd8};
  localparam int unsigned FIG11_TS_PS = 25;

endpackage

// tb_delay_ref_pkg: reference models used by the Replay testbenches.
//
// 1. A delay-annotated gate-net model. Every gate is a transport delay; the startpoints
//    switch from their old to their new values at time 0 and every net holds its settled
//    old value before that. The value of a net is computed on a 1 ps time grid, so the
//    value an endpoint flip-flop would capture with a clock edge at time t is exact for
//    this delay model, glitches included. A cycle has an actual timing error at an
//    endpoint when the value at the TS boundary differs from the settled new value.
// 2. An independent Replay reference: the same node-replacement rule, driven by a table of
//    longest path delays per input node typed in by hand, so the hardware's own static
//    timing analysis is not used to check itself.
// Gate functions are evaluated here with their own case statement. The first functions
// hold net values in 64-bit vectors (small example nets); the *_d versions and grid_eval
// use dynamic arrays for nets of any size, and node_pd_d is the testbench's own longest-
// path analysis per input node.
package tb_delay_ref_pkg;
  import replay_pkg::*;

  typedef gate_t gate_list_t[];
  typedef int    int_list_t[];

  function automatic bit ref_gate(gate_fn_e fn, bit a, bit b);
    case (fn)
      G_BUF:  return a;
      G_INV:  return !a;
      G_AND:  return a && b;
      G_OR:   return a || b;
      G_NAND: return !(a && b);
      G_NOR:  return !(a || b);
      G_XOR:  return a != b;
      default: return a == b;
    endcase
  endfunction

  // Zero-delay settled value of every net.
  function automatic bit [63:0] settle(gate_list_t gates, int ns, bit [63:0] sp);
    bit [63:0] v;
    v = sp;
    foreach (gates[g])
      v[ns+g] = ref_gate(gates[g].fn, v[gates[g].in0], v[gates[g].in1]);
    return v;
  endfunction

  // Value of net 'net' at time t_ps (t_ps >= 0) after the startpoints change.
  function automatic bit value_at(gate_list_t gates, int ns, bit [63:0] old_sp,
                                  bit [63:0] new_sp, int net, int t_ps);
    bit [63:0] old_v;
    bit        v[][];
    int        nn;
    nn    = ns + gates.size();
    old_v = settle(gates, ns, old_sp);
    v     = new[nn];
    for (int n = 0; n < nn; n++) v[n] = new[t_ps + 1];
    for (int n = 0; n < ns; n++)
      for (int t = 0; t <= t_ps; t++) v[n][t] = new_sp[n];
    foreach (gates[g]) begin
      for (int t = 0; t <= t_ps; t++) begin
        int  ts;
        bit  a, b;
        ts = t - int'(gates[g].delay_ps);
        a  = (ts < 0) ? old_v[gates[g].in0] : v[gates[g].in0][ts];
        b  = (ts < 0) ? old_v[gates[g].in1] : v[gates[g].in1][ts];
        v[ns+g][t] = ref_gate(gates[g].fn, a, b);
      end
    end
    return v[net][t_ps];
  endfunction

  // Actual timing error at an endpoint with the capture edge at ts_ps.
  function automatic bit actual_error(gate_list_t gates, int ns, bit [63:0] old_sp,
                                      bit [63:0] new_sp, int ep, int ts_ps);
    bit [63:0] fin;
    fin = settle(gates, ns, new_sp);
    return value_at(gates, ns, old_sp, new_sp, ep, ts_ps) != fin[ep];
  endfunction

  // Replay reference. pd[2*g+k] is the longest path delay through input node k of gate g
  // to the endpoint, or -1 where the node has no path to it.
  function automatic bit replay_pred(gate_list_t gates, int ns, int_list_t pd, int ts_ps,
                                     bit [63:0] old_sp, bit [63:0] new_sp, int ep);
    bit [63:0] orig, t;
    orig = settle(gates, ns, new_sp);
    t    = old_sp;
    foreach (gates[g]) begin
      bit a, b;
      a = (pd[2*g] >= 0 && pd[2*g] < ts_ps)     ? orig[gates[g].in0] : t[gates[g].in0];
      b = (pd[2*g+1] >= 0 && pd[2*g+1] < ts_ps) ? orig[gates[g].in1] : t[gates[g].in1];
      t[ns+g] = ref_gate(gates[g].fn, a, b);
    end
    return t[ep];
  endfunction

  function automatic gate_list_t fig5_list();
    gate_list_t l;
    l = new[FIG5_NG];
    foreach (l[g]) l[g] = FIG5_GATES[g];
    return l;
  endfunction

  function automatic gate_list_t fig11_list();
    gate_list_t l;
    l = new[FIG11_NG];
    foreach (l[g]) l[g] = FIG11_GATES[g];
    return l;
  endfunction

  // Longest path delays per input node as printed in the two published examples.
  // Single-input gates have -1 for their second node.
  function automatic int_list_t fig5_pd();
    int_list_t p;
    p = '{30, -1,  40, -1,  35, 40,  30, 40,  40, -1,  15, 40};
    return p;
  endfunction

  function automatic int_list_t fig11_pd();
    int_list_t p;
    p = '{40, 40,  30, 40,  30, -1,  40, 30,  30, 40};
    return p;
  endfunction

  // ---------------------------------------------------------------------------------
  // Versions for nets of any size, with values held in dynamic bit arrays.
  // ---------------------------------------------------------------------------------
  typedef bit bit_list_t[];
  typedef bit_list_t grid_t[];

  function automatic bit_list_t settle_d(gate_list_t gates, int ns, bit_list_t sp);
    bit_list_t v;
    v = new[ns + gates.size()];
    for (int n = 0; n < ns; n++) v[n] = sp[n];
    foreach (gates[g])
      v[ns+g] = ref_gate(gates[g].fn, v[gates[g].in0], v[gates[g].in1]);
    return v;
  endfunction

  // Values of every net at times 0..tmax ps after the startpoints change
  // (transport delays; before time 0 every net holds its settled old value).
  function automatic grid_t grid_eval(gate_list_t gates, int ns, bit_list_t old_sp,
                                      bit_list_t new_sp, int tmax);
    bit_list_t old_v;
    grid_t     v;
    old_v = settle_d(gates, ns, old_sp);
    v     = new[ns + gates.size()];
    for (int n = 0; n < ns; n++) begin
      v[n] = new[tmax + 1];
      for (int t = 0; t <= tmax; t++) v[n][t] = new_sp[n];
    end
    foreach (gates[g]) begin
      int d, i0, i1;
      d  = int'(gates[g].delay_ps);
      i0 = int'(gates[g].in0);
      i1 = int'(gates[g].in1);
      v[ns+g] = new[tmax + 1];
      for (int t = 0; t <= tmax; t++) begin
        bit a, b;
        a = (t < d) ? old_v[i0] : v[i0][t-d];
        b = (t < d) ? old_v[i1] : v[i1][t-d];
        v[ns+g][t] = ref_gate(gates[g].fn, a, b);
      end
    end
    return v;
  endfunction

  // Longest path delay through each input node to endpoint ep (-1: no path), computed
  // by forward arrival times and a backward sweep of the gate list.
  function automatic int_list_t node_pd_d(gate_list_t gates, int ns, int ep);
    int_list_t at, dn, pd;
    int nn;
    nn = ns + gates.size();
    at = new[nn];
    dn = new[nn];
    pd = new[2 * gates.size()];
    foreach (at[n]) begin
      at[n] = 0;
      dn[n] = -1;
    end
    foreach (gates[g]) begin
      int m;
      m = at[gates[g].in0];
      if (!gate_is_unary(gates[g].fn) && at[gates[g].in1] > m) m = at[gates[g].in1];
      at[ns+g] = m + int'(gates[g].delay_ps);
    end
    dn[ep] = 0;
    for (int g = gates.size() - 1; g >= 0; g--) begin
      if (dn[ns+g] >= 0) begin
        int d;
        d = dn[ns+g] + int'(gates[g].delay_ps);
        if (dn[gates[g].in0] < d) dn[gates[g].in0] = d;
        if (!gate_is_unary(gates[g].fn) && dn[gates[g].in1] < d) dn[gates[g].in1] = d;
      end
    end
    foreach (gates[g]) begin
      pd[2*g]   = (dn[ns+g] < 0) ? -1 : at[gates[g].in0] + int'(gates[g].delay_ps) + dn[ns+g];
      pd[2*g+1] = (dn[ns+g] < 0 || gate_is_unary(gates[g].fn)) ? -1 :
                  at[gates[g].in1] + int'(gates[g].delay_ps) + dn[ns+g];
    end
    return pd;
  endfunction

  function automatic bit replay_pred_d(gate_list_t gates, int ns, int_list_t pd, int ts_ps,
                                       bit_list_t old_sp, bit_list_t orig, int ep);
    bit_list_t t;
    t = new[ns + gates.size()];
    for (int n = 0; n < ns; n++) t[n] = old_sp[n];
    foreach (gates[g]) begin
      bit a, b;
      a = (pd[2*g] >= 0 && pd[2*g] < ts_ps)     ? orig[gates[g].in0] : t[gates[g].in0];
      b = (pd[2*g+1] >= 0 && pd[2*g+1] < ts_ps) ? orig[gates[g].in1] : t[gates[g].in1];
      t[ns+g] = ref_gate(gates[g].fn, a, b);
    end
    return t[ep];
  endfunction

endpackage

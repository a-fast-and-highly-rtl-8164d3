// voltage_drop_flag_gen: periodic voltage-drop flag for timing-fault injection.
//
// Models the supply waveform of the voltage-drop fault model: an interval period of
// normal supply followed by a drop period, repeated. The flag is high during the drop
// period, when the emulated circuit is to use the values predicted at the reduced
// (drop) TS boundary. Both lengths are given in clock cycles at run time, so one
// bitstream can sweep them (the published experiment spans drop periods of 1 to about
// 50K cycles and interval periods of 10K to 100M cycles, which the 32-bit counters hold).
//
// Behaviour: while enable is low the generator is idle, flag low. On the cycle after
// enable rises it starts an interval period; it then alternates interval_cycles cycles
// with flag low and drop_cycles cycles with flag high. A drop length of 0 never drops;
// an interval length of 0 is treated as 1. Lengths are sampled at the start of each
// period. The waveform is the published model; the counter implementation, the
// enable/idle behaviour and the start with an interval period are this design's choices.
//
// Interface: enable, drop_cycles, interval_cycles in; drop out (registered).
// rst_n is synchronous, active low.
module voltage_drop_flag_gen #(
  parameter int CNT_W = 32
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             enable,
  input  logic [CNT_W-1:0] drop_cycles,
  input  logic [CNT_W-1:0] interval_cycles,
  output logic             drop
);

  typedef enum logic [1:0] {ST_IDLE, ST_INTERVAL, ST_DROP} state_e;

  state_e           st;
  logic [CNT_W-1:0] remaining;   // cycles left in the current period, minus one

  function automatic logic [CNT_W-1:0] len_m1(logic [CNT_W-1:0] len);
    return (len == '0) ? '0 : len - 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (!rst_n || !enable) begin
      st        <= ST_IDLE;
      remaining <= '0;
    end else begin
      unique case (st)
        ST_IDLE: begin
          st        <= ST_INTERVAL;
          remaining <= len_m1(interval_cycles);
        end
        ST_INTERVAL: begin
          if (remaining != '0) begin
            remaining <= remaining - 1'b1;
          end else if (drop_cycles != '0) begin
            st        <= ST_DROP;
            remaining <= drop_cycles - 1'b1;
          end else begin
            remaining <= len_m1(interval_cycles);
          end
        end
        ST_DROP: begin
          if (remaining != '0) begin
            remaining <= remaining - 1'b1;
          end else begin
            st        <= ST_INTERVAL;
            remaining <= len_m1(interval_cycles);
          end
        end
        default: st <= ST_IDLE;
      endcase
    end
  end

  assign drop = (st == ST_DROP);

endmodule

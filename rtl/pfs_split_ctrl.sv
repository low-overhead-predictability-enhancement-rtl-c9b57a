// pfs_split_ctrl: priority-difference (PD) half of the selective packet splitting decision.
//
// For each input port that holds an output port (non-zero 'out port'), the controller finds
// the most urgent input still requesting that same output and raises split_ok for the holder
// when the holder's priority value exceeds the waiting one by at least PD, i.e. the waiting
// packet is PD or more levels more urgent. The input port combines split_ok with its own
// remaining-flits (RF) condition and performs the split. A PD setting of zero is treated as
// one, so packets never split for an equally urgent competitor. Purely combinational.
// The PD criterion is the reference design's; comparing against the holder's current
// (possibly forwarded) priority register is this design's reading.
module pfs_split_ctrl
  import pfs_pkg::*;
(
  input  port_vec_t req      [NPORT],  // per input: waiting request
  input  prio_t     prio     [NPORT],  // per input: 'priority' register
  input  port_vec_t out_port [NPORT],  // per input: held output
  input  prio_t     cfg_pd,
  output port_vec_t split_ok           // per input
);
  prio_t best [NPORT];  // per output: most urgent waiting priority
  logic  any  [NPORT];

  int pd;

  always_comb begin
    pd = (cfg_pd == '0) ? 1 : int'(cfg_pd);
    for (int o = 0; o < NPORT; o++) begin
      best[o] = '1;
      any[o]  = 1'b0;
      for (int i = 0; i < NPORT; i++)
        if (req[i][o] && (!any[o] || prio[i] < best[o])) begin
          any[o]  = 1'b1;
          best[o] = prio[i];
        end
    end
    split_ok = '0;
    for (int j = 0; j < NPORT; j++)
      for (int o = 0; o < NPORT; o++)
        if (out_port[j][o] && any[o] && (int'(prio[j]) - int'(best[o]) >= pd))
          split_ok[j] = 1'b1;
  end

endmodule

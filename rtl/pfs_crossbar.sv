// pfs_crossbar: switch between the five input ports and the five output links of a router.
//
// Each input port's one-hot 'out port' register selects the output it drives. An output
// link carries the flit and valid of the input that holds it (nothing when no input does),
// and that input sees the output link's ready. Inputs without a connection see ready low.
// The arbiter guarantees at most one holder per output. Purely combinational; an AND-OR
// multiplexer, which is this design's choice.
module pfs_crossbar
  import pfs_pkg::*;
(
  input  port_vec_t out_port [NPORT],  // per input
  input  logic      in_valid [NPORT],
  input  flit_t     in_flit  [NPORT],
  output logic      in_ready [NPORT],
  output logic      o_valid  [NPORT],  // per output
  output flit_t     o_flit   [NPORT],
  input  logic      o_ready  [NPORT]
);
  always_comb begin
    for (int o = 0; o < NPORT; o++) begin
      o_valid[o] = 1'b0;
      o_flit[o]  = '0;
      for (int i = 0; i < NPORT; i++)
        if (out_port[i][o]) begin
          o_valid[o] = o_valid[o] | in_valid[i];
          o_flit[o]  = o_flit[o]  | in_flit[i];
        end
    end
    for (int i = 0; i < NPORT; i++) begin
      in_ready[i] = 1'b0;
      for (int o = 0; o < NPORT; o++)
        if (out_port[i][o]) in_ready[i] = in_ready[i] | o_ready[o];
    end
  end
endmodule

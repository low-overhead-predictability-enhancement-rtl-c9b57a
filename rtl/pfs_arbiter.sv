// pfs_arbiter: priority arbitration unit of a PFS router.
//
// Every cycle, for each output port that no connection holds (busy low), the arbiter looks at
// the 'port request' and 'priority' registers of all five input ports and grants the
// requester with the most urgent priority (smallest value). Requesters of equal priority are
// served round robin: each output keeps a pointer to the input it granted last and the
// search for a winner starts just after it. An input requests at most one output, so at most
// one grant per input results. 'grant' is combinational from the request inputs; the
// pointers update at the clock edge of a grant.
// Priority-based arbitration over the input registers is the reference router's; the round
// robin tie-break (inherited from the Hermes arbiter the router is based on) is this
// design's choice.
module pfs_arbiter
  import pfs_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  port_vec_t req  [NPORT],   // per input: requested output, one-hot or zero
  input  prio_t     prio [NPORT],   // per input: 'priority' register
  input  port_vec_t busy,           // per output: held by a connection
  output port_vec_t grant           // per input
);
  logic [2:0] rr   [NPORT];         // per output: input granted last
  logic [2:0] win  [NPORT];
  logic       have [NPORT];

  prio_t best [NPORT];

  always_comb begin
    grant = '0;
    for (int o = 0; o < NPORT; o++) begin
      have[o] = 1'b0;
      win[o]  = '0;
      best[o] = '1;
      for (int k = 1; k <= NPORT; k++)
        if (req[(int'(rr[o]) + k) % NPORT][o] &&
            (!have[o] || prio[(int'(rr[o]) + k) % NPORT] < best[o])) begin
          have[o] = 1'b1;
          win[o]  = 3'((int'(rr[o]) + k) % NPORT);
          best[o] = prio[(int'(rr[o]) + k) % NPORT];
        end
      if (have[o] && !busy[o]) grant[win[o]] = 1'b1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int o = 0; o < NPORT; o++) rr[o] <= 3'(NPORT - 1);
    end else begin
      for (int o = 0; o < NPORT; o++)
        if (have[o] && !busy[o]) rr[o] <= win[o];
    end
  end

endmodule

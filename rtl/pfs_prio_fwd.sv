// pfs_prio_fwd: priority forwarding unit of a PFS router (head-of-line blocking relief).
//
// Local blocking: every input port has an alpha register (valid, priority, direction). It is
// loaded when that input waits in arbitration for an output that another input holds with a
// less urgent priority while the held output link is stalled (a flit is offered and not
// accepted), i.e. the waiting packet is blocked by a blocked packet. The alpha register
// keeps the more urgent of a stored and a newly detected priority.
// Remote blocking: each input port facing a neighbour (East, West, North, South) has a beta
// register, loaded from the side-band link of that neighbour; it too keeps the more urgent
// value when a second message arrives before it is serviced.
// Servicing: one register per cycle, chosen round robin over alpha[0..4] and beta[0..3].
//   alpha[i]  : its priority is sent on the side-band link of the blocked output, towards
//               the neighbour whose input buffer holds the blocking packet.
//   beta[k]   : if input k holds a header waiting for arbitration, the header has been found
//               and the priority goes to input k as a priority update (the input keeps the
//               more urgent value). If input k is transferring towards a neighbour, the header
//               is further down the line and the priority is sent on to that neighbour.
//               Otherwise the message is dropped.
// The side-band outputs are combinational from the serviced register and carry one message
// per cycle at most; a message reaches the neighbour's beta register at the next edge.
// Blocked outputs towards the Local port are not forwarded: no router lies beyond them.
// The alpha/beta registers, round robin service and the dedicated side-band links are the
// reference design's; the exact blocking test, keeping the more urgent value and dropping
// unmatched messages are this design's choices. The registers are kept together here rather
// than inside each input port.
module pfs_prio_fwd
  import pfs_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  // input-port view
  input  port_state_t state    [NPORT],
  input  port_vec_t   req      [NPORT],
  input  prio_t       prio     [NPORT],
  input  port_vec_t   out_port [NPORT],
  input  port_vec_t   out_stall,           // per output: flit offered and not accepted
  // side-band links, indexed by direction E, W, N, S
  input  logic        fwd_in_valid  [NDIR],
  input  prio_t       fwd_in_prio   [NDIR],
  output logic        fwd_out_valid [NDIR],
  output prio_t       fwd_out_prio  [NDIR],
  // priority updates to the input ports
  output logic        upd_valid [NPORT],
  output prio_t       upd_prio  [NPORT],
  // events, for observation
  output logic        ev_alpha,            // an alpha register was loaded
  output logic        ev_fwd,              // a message was sent to a neighbour
  output logic        ev_upd               // a waiting header received a priority
);
  localparam int NREG = NPORT + NDIR;

  logic       a_valid [NPORT];
  prio_t      a_prio  [NPORT];
  logic [1:0] a_dir   [NPORT];
  logic       b_valid [NDIR];
  prio_t      b_prio  [NDIR];

  logic       blk     [NPORT];
  logic [1:0] blk_dir [NPORT];
  logic [3:0] rr, sel;
  logic       sel_any;
  logic       reg_valid [NREG];
  logic [1:0] b_sel;      // beta register index when a beta register is serviced
  logic       sel_is_a;   // an alpha register is serviced

  // Blocking detection.
  always_comb begin
    for (int i = 0; i < NPORT; i++) begin
      blk[i]     = 1'b0;
      blk_dir[i] = '0;
      if (state[i] == ST_ARB && !req[i][P_L]) begin
        for (int o = 0; o < NDIR; o++)
          if (req[i][o] && out_stall[o])
            for (int j = 0; j < NPORT; j++)
              if (out_port[j][o] && prio[j] > prio[i]) begin
                blk[i]     = 1'b1;
                blk_dir[i] = 2'(o);
              end
      end
    end
  end

  // Round robin choice among the nine registers.
  always_comb begin
    for (int r = 0; r < NPORT; r++) reg_valid[r] = a_valid[r];
    for (int r = 0; r < NDIR; r++)  reg_valid[NPORT + r] = b_valid[r];
    sel     = '0;
    sel_any = 1'b0;
    for (int k = NREG; k >= 1; k--)
      if (reg_valid[(int'(rr) + k) % NREG]) begin
        sel_any = 1'b1;
        sel     = 4'((int'(rr) + k) % NREG);
      end
  end

  // Service of the chosen register.
  always_comb begin
    for (int d = 0; d < NDIR; d++) begin
      fwd_out_valid[d] = 1'b0;
      fwd_out_prio[d]  = '0;
    end
    for (int i = 0; i < NPORT; i++) begin
      upd_valid[i] = 1'b0;
      upd_prio[i]  = '0;
    end
    ev_upd   = 1'b0;
    sel_is_a = (int'(sel) < NPORT);
    b_sel    = 2'(int'(sel) - NPORT);
    if (sel_any) begin
      if (sel_is_a) begin
        fwd_out_valid[a_dir[sel[2:0]]] = 1'b1;
        fwd_out_prio[a_dir[sel[2:0]]]  = a_prio[sel[2:0]];
      end else begin
        if (state[{1'b0, b_sel}] == ST_ARB) begin
          upd_valid[{1'b0, b_sel}] = 1'b1;
          upd_prio[{1'b0, b_sel}]  = b_prio[b_sel];
          ev_upd           = 1'b1;
        end else if (state[{1'b0, b_sel}] == ST_XFER) begin
          for (int d = 0; d < NDIR; d++)
            if (out_port[{1'b0, b_sel}][d]) begin
              fwd_out_valid[d] = 1'b1;
              fwd_out_prio[d]  = b_prio[b_sel];
            end
        end
      end
    end
    ev_fwd = 1'b0;
    for (int d = 0; d < NDIR; d++) ev_fwd = ev_fwd | fwd_out_valid[d];
  end

  always_comb begin
    ev_alpha = 1'b0;
    for (int i = 0; i < NPORT; i++)
      if (blk[i] && (!a_valid[i] || prio[i] < a_prio[i])) ev_alpha = 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rr <= 4'(NREG - 1);
      for (int i = 0; i < NPORT; i++) begin
        a_valid[i] <= 1'b0;
        a_prio[i]  <= '0;
        a_dir[i]   <= '0;
      end
      for (int d = 0; d < NDIR; d++) begin
        b_valid[d] <= 1'b0;
        b_prio[d]  <= '0;
      end
    end else begin
      if (sel_any) begin
        rr <= sel;
        if (sel_is_a) a_valid[sel[2:0]] <= 1'b0;
        else          b_valid[b_sel] <= 1'b0;
      end
      for (int i = 0; i < NPORT; i++)
        if (blk[i] && (!a_valid[i] || (sel_any && int'(sel) == i) || prio[i] < a_prio[i])) begin
          a_valid[i] <= 1'b1;
          a_prio[i]  <= prio[i];
          a_dir[i]   <= blk_dir[i];
        end
      for (int d = 0; d < NDIR; d++)
        if (fwd_in_valid[d] &&
            (!b_valid[d] || (sel_any && int'(sel) == NPORT + d) || fwd_in_prio[d] < b_prio[d])) begin
          b_valid[d] <= 1'b1;
          b_prio[d]  <= fwd_in_prio[d];
        end
    end
  end

endmodule

// pfs_router: five-port wormhole router with priority forwarded packet splitting (PFS).
//
// The router at column X, row Y of a mesh has ports East, West, North, South and Local, each
// with a valid/ready link in and out. Five pfs_input_port instances buffer and route incoming
// packets; pfs_arbiter grants free outputs to the most urgent request; pfs_crossbar moves the
// flits of each connection to its output link. Two mechanisms improve the predictability of
// urgent packets without virtual channels:
//   - priority forwarding (pfs_prio_fwd): when an urgent packet waits behind a stalled, less
//     urgent one, its priority travels over a dedicated side-band link (fwd_*) down the
//     blocked path until it reaches the blocking packet's waiting header, whose arbitration
//     priority it raises (head-of-line blocking);
//   - selective packet splitting (pfs_split_ctrl plus the input-port state machine): a less
//     urgent packet holding an output that a sufficiently more urgent packet wants is cut
//     with a tail flit and re-requests the output under a fresh header (tail backing).
// cfg_pd is the priority-difference threshold, cfg_rf_mode/cfg_rf the remaining-flits
// threshold. The ev_* outputs pulse when a split, an alpha load, a side-band message or a
// priority update happens. Latency through an idle router: the header is taken from the
// buffer one cycle after it is written, granted the next cycle and sent the cycle after that.
// Structure and mechanisms follow the reference router; link protocol and timing are this
// design's.
module pfs_router
  import pfs_pkg::*;
#(
  parameter int X         = 0,
  parameter int Y         = 0,
  parameter int BUF_DEPTH = 2
) (
  input  logic     clk,
  input  logic     rst_n,
  input  prio_t    cfg_pd,
  input  rf_mode_t cfg_rf_mode,
  input  size_t    cfg_rf,
  // data links, indexed E, W, N, S, L
  input  logic     in_valid  [NPORT],
  input  flit_t    in_flit   [NPORT],
  output logic     in_ready  [NPORT],
  output logic     out_valid [NPORT],
  output flit_t    out_flit  [NPORT],
  input  logic     out_ready [NPORT],
  // priority-forwarding side-band links, indexed E, W, N, S
  input  logic     fwd_in_valid  [NDIR],
  input  prio_t    fwd_in_prio   [NDIR],
  output logic     fwd_out_valid [NDIR],
  output prio_t    fwd_out_prio  [NDIR],
  // events
  output logic     ev_split,
  output logic     ev_alpha,
  output logic     ev_fwd,
  output logic     ev_upd
);
  port_vec_t   req      [NPORT];
  prio_t       prio     [NPORT];
  port_state_t state    [NPORT];
  port_vec_t   out_port [NPORT];
  logic        ip_valid [NPORT];
  flit_t       ip_flit  [NPORT];
  logic        ip_ready [NPORT];
  logic        upd_valid [NPORT];
  prio_t       upd_prio  [NPORT];
  port_vec_t   grant, split_ok, busy, out_stall, split_evt;

  for (genvar i = 0; i < NPORT; i++) begin : g_in
    pfs_input_port #(.X(X), .Y(Y), .BUF_DEPTH(BUF_DEPTH)) u_port (
      .clk, .rst_n,
      .in_valid      (in_valid[i]),
      .in_flit       (in_flit[i]),
      .in_ready      (in_ready[i]),
      .req           (req[i]),
      .prio          (prio[i]),
      .state         (state[i]),
      .grant         (grant[i]),
      .out_port      (out_port[i]),
      .out_valid     (ip_valid[i]),
      .out_flit      (ip_flit[i]),
      .out_ready     (ip_ready[i]),
      .split_ok      (split_ok[i]),
      .cfg_rf_mode   (cfg_rf_mode),
      .cfg_rf        (cfg_rf),
      .split_evt     (split_evt[i]),
      .prio_upd_valid(upd_valid[i]),
      .prio_upd      (upd_prio[i])
    );
  end

  always_comb begin
    busy = '0;
    for (int i = 0; i < NPORT; i++) busy = busy | out_port[i];
    for (int o = 0; o < NPORT; o++) out_stall[o] = out_valid[o] && !out_ready[o];
  end

  pfs_arbiter u_arb (
    .clk, .rst_n,
    .req  (req),
    .prio (prio),
    .busy (busy),
    .grant(grant)
  );

  pfs_split_ctrl u_split (
    .req     (req),
    .prio    (prio),
    .out_port(out_port),
    .cfg_pd  (cfg_pd),
    .split_ok(split_ok)
  );

  pfs_crossbar u_xbar (
    .out_port(out_port),
    .in_valid(ip_valid),
    .in_flit (ip_flit),
    .in_ready(ip_ready),
    .o_valid (out_valid),
    .o_flit  (out_flit),
    .o_ready (out_ready)
  );

  pfs_prio_fwd u_fwd (
    .clk, .rst_n,
    .state        (state),
    .req          (req),
    .prio         (prio),
    .out_port     (out_port),
    .out_stall    (out_stall),
    .fwd_in_valid (fwd_in_valid),
    .fwd_in_prio  (fwd_in_prio),
    .fwd_out_valid(fwd_out_valid),
    .fwd_out_prio (fwd_out_prio),
    .upd_valid    (upd_valid),
    .upd_prio     (upd_prio),
    .ev_alpha     (ev_alpha),
    .ev_fwd       (ev_fwd),
    .ev_upd       (ev_upd)
  );

  assign ev_split = |split_evt;

  // Each output is held by at most one input.
  for (genvar o = 0; o < NPORT; o++) begin : g_chk
    logic [2:0] holders;
    always_comb begin
      holders = '0;
      for (int i = 0; i < NPORT; i++) holders = holders + 3'(out_port[i][o]);
    end
    assert property (@(posedge clk) disable iff (!rst_n) holders <= 3'd1);
  end

endmodule

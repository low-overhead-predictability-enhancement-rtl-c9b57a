// pfs_noc_top: a W x H PFS network-on-chip with a packet generator/receiver on every node.
//
// This is the complete evaluation system: pfs_mesh connects the routers, and each node's
// Local port is driven by a pfs_pkt_gen set up through gen_cfg[n] (node n = y*W + x). A free
// running cycle counter ('now') time-stamps releases and arrivals. For every packet whose
// final flit arrives, rx_valid[n] pulses at the destination node with the source, priority
// and latency in rx_info[n]. rel_evt/drop report releases and releases lost to a full
// release queue; frag_evt pulses for every header (whole packet or split fragment)
// delivered; the ev_* vectors carry the routers' split, alpha-load, side-band and priority
// update events. cfg_pd, cfg_rf_mode and cfg_rf set the packet splitting thresholds of all
// routers and may be changed at run time. The default size (4 x 4 nodes, 2-flit input
// buffers) is the configuration the reference design evaluates.
module pfs_noc_top
  import pfs_pkg::*;
#(
  parameter int W         = 4,
  parameter int H         = 4,
  parameter int BUF_DEPTH = 2
) (
  input  logic     clk,
  input  logic     rst_n,
  input  prio_t    cfg_pd,
  input  rf_mode_t cfg_rf_mode,
  input  size_t    cfg_rf,
  input  gen_cfg_t gen_cfg  [W*H],
  output logic     rx_valid [W*H],
  output rx_info_t rx_info  [W*H],
  output logic [W*H-1:0] rel_evt,
  output logic [W*H-1:0] drop,
  output logic [W*H-1:0] frag_evt,
  output logic [W*H-1:0] ev_split,
  output logic [W*H-1:0] ev_alpha,
  output logic [W*H-1:0] ev_fwd,
  output logic [W*H-1:0] ev_upd,
  output logic [31:0]    now
);
  localparam int N = W * H;

  logic  inj_valid [N];
  flit_t inj_flit  [N];
  logic  inj_ready [N];
  logic  ej_valid  [N];
  flit_t ej_flit   [N];
  logic  ej_ready  [N];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) now <= '0;
    else        now <= now + 1'b1;
  end

  pfs_mesh #(.W(W), .H(H), .BUF_DEPTH(BUF_DEPTH)) u_mesh (
    .clk, .rst_n,
    .cfg_pd, .cfg_rf_mode, .cfg_rf,
    .loc_in_valid (inj_valid),
    .loc_in_flit  (inj_flit),
    .loc_in_ready (inj_ready),
    .loc_out_valid(ej_valid),
    .loc_out_flit (ej_flit),
    .loc_out_ready(ej_ready),
    .ev_split, .ev_alpha, .ev_fwd, .ev_upd
  );

  for (genvar y = 0; y < H; y++) begin : g_row
    for (genvar x = 0; x < W; x++) begin : g_col
      localparam int n = y * W + x;
      pfs_pkt_gen #(.X(x), .Y(y)) u_gen (
        .clk, .rst_n,
        .cfg        (gen_cfg[n]),
        .now        (now),
        .tx_valid   (inj_valid[n]),
        .tx_flit    (inj_flit[n]),
        .tx_ready   (inj_ready[n]),
        .rx_valid   (ej_valid[n]),
        .rx_flit    (ej_flit[n]),
        .rx_ready   (ej_ready[n]),
        .release_evt(rel_evt[n]),
        .drop       (drop[n]),
        .rx_frag    (frag_evt[n]),
        .done_valid (rx_valid[n]),
        .done_info  (rx_info[n])
      );
    end
  end

endmodule

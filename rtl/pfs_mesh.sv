// pfs_mesh: W x H mesh of PFS routers.
//
// Router (x, y) sits at node index y*W + x; rows grow southwards. Neighbouring routers are
// joined by a data link in each direction (valid/ready flow control, one flit per cycle) and
// by a priority-forwarding side-band link in each direction (valid plus priority). A
// router's East output feeds the West input of the router to its east, its South output the
// North input of the router below, and so on. Links at the mesh edge are tied off: no flit
// or message enters there and the edge outputs are always ready (XY routing never sends a
// flit there for a destination inside the mesh). The Local port of every router is brought
// out as the node's injection (loc_in_*) and ejection (loc_out_*) link. The ev_* vectors
// carry each router's event pulses. The mesh topology follows the reference design; the
// edge tie-off is this design's choice.
module pfs_mesh
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
  input  logic     loc_in_valid  [W*H],
  input  flit_t    loc_in_flit   [W*H],
  output logic     loc_in_ready  [W*H],
  output logic     loc_out_valid [W*H],
  output flit_t    loc_out_flit  [W*H],
  input  logic     loc_out_ready [W*H],
  output logic [W*H-1:0] ev_split,
  output logic [W*H-1:0] ev_alpha,
  output logic [W*H-1:0] ev_fwd,
  output logic [W*H-1:0] ev_upd
);
  localparam int N = W * H;

  logic  r_in_valid  [N][NPORT];
  flit_t r_in_flit   [N][NPORT];
  logic  r_in_ready  [N][NPORT];
  logic  r_out_valid [N][NPORT];
  flit_t r_out_flit  [N][NPORT];
  logic  r_out_ready [N][NPORT];
  logic  f_in_valid  [N][NDIR];
  prio_t f_in_prio   [N][NDIR];
  logic  f_out_valid [N][NDIR];
  prio_t f_out_prio  [N][NDIR];

  for (genvar y = 0; y < H; y++) begin : g_row
    for (genvar x = 0; x < W; x++) begin : g_col
      localparam int n = y * W + x;
      // neighbour in each direction E, W, N, S (-1 at the edge)
      localparam int NB_E = (x < W - 1) ? n + 1 : -1;
      localparam int NB_W = (x > 0)     ? n - 1 : -1;
      localparam int NB_N = (y > 0)     ? n - W : -1;
      localparam int NB_S = (y < H - 1) ? n + W : -1;
      localparam int NB [NDIR] = '{NB_E, NB_W, NB_N, NB_S};
      // opposite direction: a flit leaving East enters the neighbour's West port
      localparam int OPP [NDIR] = '{P_W, P_E, P_S, P_N};

      pfs_router #(.X(x), .Y(y), .BUF_DEPTH(BUF_DEPTH)) u_router (
        .clk, .rst_n,
        .cfg_pd, .cfg_rf_mode, .cfg_rf,
        .in_valid     (r_in_valid[n]),
        .in_flit      (r_in_flit[n]),
        .in_ready     (r_in_ready[n]),
        .out_valid    (r_out_valid[n]),
        .out_flit     (r_out_flit[n]),
        .out_ready    (r_out_ready[n]),
        .fwd_in_valid (f_in_valid[n]),
        .fwd_in_prio  (f_in_prio[n]),
        .fwd_out_valid(f_out_valid[n]),
        .fwd_out_prio (f_out_prio[n]),
        .ev_split     (ev_split[n]),
        .ev_alpha     (ev_alpha[n]),
        .ev_fwd       (ev_fwd[n]),
        .ev_upd       (ev_upd[n])
      );

      for (genvar d = 0; d < NDIR; d++) begin : g_dir
        if (NB[d] >= 0) begin : g_link
          assign r_in_valid[n][d]  = r_out_valid[NB[d]][OPP[d]];
          assign r_in_flit[n][d]   = r_out_flit[NB[d]][OPP[d]];
          assign r_out_ready[n][d] = r_in_ready[NB[d]][OPP[d]];
          assign f_in_valid[n][d]  = f_out_valid[NB[d]][OPP[d]];
          assign f_in_prio[n][d]   = f_out_prio[NB[d]][OPP[d]];
        end else begin : g_edge
          assign r_in_valid[n][d]  = 1'b0;
          assign r_in_flit[n][d]   = '0;
          assign r_out_ready[n][d] = 1'b1;
          assign f_in_valid[n][d]  = 1'b0;
          assign f_in_prio[n][d]   = '0;
        end
      end

      assign r_in_valid[n][P_L]  = loc_in_valid[n];
      assign r_in_flit[n][P_L]   = loc_in_flit[n];
      assign loc_in_ready[n]     = r_in_ready[n][P_L];
      assign loc_out_valid[n]    = r_out_valid[n][P_L];
      assign loc_out_flit[n]     = r_out_flit[n][P_L];
      assign r_out_ready[n][P_L] = loc_out_ready[n];
    end
  end

endmodule

// pfs_pkt_gen: packet generator and receiver attached to the Local port of a mesh node.
//
// Transmit side: with cfg.enable set, a packet is released at cycle cfg.start and then every
// cfg.period cycles (period 0: only once). Each release time is queued in a small FIFO
// (REL_DEPTH entries; a release that finds it full is dropped and flagged on 'drop'). The
// oldest queued packet is sent as one header (priority, size, own and destination
// coordinates) followed by cfg.size payload flits (at least one), each carrying the release
// time; the final flit has both the tail and the 'last' bit set. One flit per accepted cycle
// on a valid/ready link.
// Receive side: always ready. A flit arriving outside a packet is a header (one per fragment
// when packets have been split on the way; each pulses rx_frag). When the flit with the
// 'last' bit arrives, done_valid pulses for one cycle, registered, with the source and
// priority taken from the fragment's header and the latency (cycle of arrival minus release
// time, modulo 2^30).
// Generators parameterised by start time, period, size, priority and destination, which also
// receive packets and log their latency, follow the reference evaluation set-up; the flit
// encoding, the release queue and the latency definition are this design's choices.
module pfs_pkt_gen
  import pfs_pkg::*;
#(
  parameter int X         = 0,
  parameter int Y         = 0,
  parameter int REL_DEPTH = 4
) (
  input  logic     clk,
  input  logic     rst_n,
  input  gen_cfg_t cfg,
  input  logic [31:0] now,
  // injection link
  output logic     tx_valid,
  output flit_t    tx_flit,
  input  logic     tx_ready,
  // ejection link
  input  logic     rx_valid,
  input  flit_t    rx_flit,
  output logic     rx_ready,
  // reports
  output logic     release_evt,
  output logic     drop,
  output logic     rx_frag,
  output logic     done_valid,
  output rx_info_t done_info
);
  typedef enum logic [1:0] {TX_IDLE, TX_HDR, TX_PAY} tx_state_t;

  logic [31:0]        next_rel;
  logic               finished;
  logic               rel_now, q_empty, q_full, q_pop;
  logic [STAMP_W-1:0] q_head, stamp;
  tx_state_t          tx_state;
  size_t              left, size_eff;
  header_t            hdr;
  payload_t           pay, rx_pay;
  header_t            rx_hdr;
  logic               in_pkt;
  coord_t             cur_src_x, cur_src_y;
  prio_t              cur_prio;

  assign size_eff    = (cfg.size == '0) ? size_t'(1) : cfg.size;
  assign rel_now     = cfg.enable && !finished && (now == next_rel);
  assign release_evt = rel_now && !q_full;
  assign drop        = rel_now && q_full;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      next_rel <= cfg.start;
      finished <= 1'b0;
    end else if (rel_now) begin
      if (cfg.period == '0) finished <= 1'b1;
      else                  next_rel <= next_rel + cfg.period;
    end
  end

  pfs_fifo #(.WIDTH(STAMP_W), .DEPTH(REL_DEPTH)) u_rel (
    .clk, .rst_n,
    .push (rel_now),
    .din  (now[STAMP_W-1:0]),
    .pop  (q_pop),
    .dout (q_head),
    .empty(q_empty),
    .full (q_full)
  );

  assign q_pop = (tx_state == TX_IDLE) && !q_empty;

  always_comb begin
    hdr       = '0;
    hdr.prio  = cfg.prio;
    hdr.size  = size_eff;
    hdr.src_x = coord_t'(X);
    hdr.src_y = coord_t'(Y);
    hdr.dst_x = cfg.dst_x;
    hdr.dst_y = cfg.dst_y;
    pay.tail  = (left == size_t'(1));
    pay.last  = (left == size_t'(1));
    pay.stamp = stamp;
  end

  assign tx_valid = (tx_state != TX_IDLE);
  assign tx_flit  = (tx_state == TX_HDR) ? flit_t'(hdr) : flit_t'(pay);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tx_state <= TX_IDLE;
      left     <= '0;
      stamp    <= '0;
    end else begin
      unique case (tx_state)
        TX_IDLE: if (!q_empty) begin
          stamp    <= q_head;
          left     <= size_eff;
          tx_state <= TX_HDR;
        end
        TX_HDR: if (tx_ready) tx_state <= TX_PAY;
        TX_PAY: if (tx_ready) begin
          left <= left - 1'b1;
          if (left == size_t'(1)) tx_state <= TX_IDLE;
        end
        default: tx_state <= TX_IDLE;
      endcase
    end
  end

  // Receive side.
  assign rx_ready = 1'b1;
  assign rx_hdr   = header_t'(rx_flit);
  assign rx_pay   = payload_t'(rx_flit);
  assign rx_frag  = rx_valid && !in_pkt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      in_pkt     <= 1'b0;
      cur_src_x  <= '0;
      cur_src_y  <= '0;
      cur_prio   <= '0;
      done_valid <= 1'b0;
      done_info  <= '0;
    end else begin
      done_valid <= 1'b0;
      if (rx_valid) begin
        if (!in_pkt) begin
          in_pkt    <= 1'b1;
          cur_src_x <= rx_hdr.src_x;
          cur_src_y <= rx_hdr.src_y;
          cur_prio  <= rx_hdr.prio;
        end else begin
          if (rx_pay.tail) in_pkt <= 1'b0;
          if (rx_pay.last) begin
            done_valid        <= 1'b1;
            done_info.src_x   <= cur_src_x;
            done_info.src_y   <= cur_src_y;
            done_info.prio    <= cur_prio;
            done_info.latency <= 32'(now[STAMP_W-1:0] - rx_pay.stamp);
          end
        end
      end
    end
  end

endmodule

// pfs_input_port: buffered input port of a PFS router, with its connection state machine.
//
// Flits arrive on a valid/ready link into a BUF_DEPTH-entry buffer. When a header reaches the
// head of the buffer (state 1, ST_REQ) it is moved into the header register, the XY routing
// function fills the 'port request' register and the header's priority fills the 'priority'
// register. In state 2 (ST_ARB) the request is shown to the arbiter; meanwhile the priority
// forwarding unit may raise the 'priority' register (prio_upd), which only ever lowers its
// value, i.e. raises urgency. A grant loads the 'out port' register with the requested port
// and 'flits left' with the header's size. In state 3 (ST_XFER) the header register is sent
// first and then payload flits straight from the buffer, one per accepted cycle, decrementing
// 'flits left'. A flit with the tail bit set ends the connection: state 4 (ST_CLOSE) clears
// 'out port' and the port returns to state 1.
//
// Selective packet splitting: while a payload flit is being sent, if the split controller
// reports a competing request that is at least PD priority levels more urgent (split_ok) and
// the flits that would remain after this one meet the RF condition, this flit leaves with its
// tail bit forced on. The header register then becomes the header of the remainder (same
// destination and original priority, size = flits still to send), and state 5 (ST_SPLIT)
// clears 'out port' and re-enters arbitration directly, since the new request is issued at
// the same time as the connection is torn down. The RF condition is either an absolute count
// (cfg_rf) or 3/4 or 1/2 of the size of the packet as it arrived at this port, and at least
// one flit must remain.
//
// Timing: a header at the buffer head is taken in one cycle, the earliest grant comes one
// cycle later and the header leaves in the cycle after the grant; afterwards one flit per
// cycle. Closing or splitting costs one cycle with no output.
// The five states, the registers and the tail-bit convention follow the reference router;
// the one-hot port encoding, the header layout, the jump from state 5 straight back to
// arbitration and the 'RF counts flits after the split flit' reading are this design's.
module pfs_input_port
  import pfs_pkg::*;
#(
  parameter int X         = 0,
  parameter int Y         = 0,
  parameter int BUF_DEPTH = 2
) (
  input  logic        clk,
  input  logic        rst_n,
  // upstream link
  input  logic        in_valid,
  input  flit_t       in_flit,
  output logic        in_ready,
  // towards the arbiter
  output port_vec_t   req,
  output prio_t       prio,
  output port_state_t state,
  input  logic        grant,
  // connection to the crossbar
  output port_vec_t   out_port,
  output logic        out_valid,
  output flit_t       out_flit,
  input  logic        out_ready,
  // splitting
  input  logic        split_ok,
  input  rf_mode_t    cfg_rf_mode,
  input  size_t       cfg_rf,
  output logic        split_evt,
  // priority forwarding
  input  logic        prio_upd_valid,
  input  prio_t       prio_upd
);
  flit_t     head;
  logic      empty, full, pop;
  header_t   head_hdr, hdr_q;
  port_vec_t route, req_q, out_port_q;
  prio_t     prio_q;
  size_t     flits_left, pkt_size, rf_thr, remain;
  logic      hdr_sent, fire, do_split, rf_ok;
  port_state_t state_q;

  pfs_fifo #(.WIDTH(FLIT_W), .DEPTH(BUF_DEPTH)) u_buf (
    .clk, .rst_n,
    .push (in_valid),
    .din  (in_flit),
    .pop  (pop),
    .dout (head),
    .empty(empty),
    .full (full)
  );
  assign in_ready = !full;

  assign head_hdr = header_t'(head);

  pfs_xy_route #(.X(X), .Y(Y)) u_route (
    .dst_x   (head_hdr.dst_x),
    .dst_y   (head_hdr.dst_y),
    .port_req(route)
  );

  // RF threshold from the current setting and the size of the packet as received here.
  always_comb begin
    unique case (cfg_rf_mode)
      RF_3Q:   rf_thr = size_t'(({1'b0, pkt_size, 1'b0} + {2'b0, pkt_size}) >> 2);
      RF_HALF: rf_thr = pkt_size >> 1;
      default: rf_thr = cfg_rf;
    endcase
  end

  assign remain   = (flits_left != '0) ? flits_left - 1'b1 : '0;
  assign rf_ok    = (remain != '0) && (remain >= rf_thr);
  assign do_split = (state_q == ST_XFER) && hdr_sent && !empty && !head[FLIT_W-1]
                    && split_ok && rf_ok;

  always_comb begin
    out_valid = 1'b0;
    out_flit  = head;
    if (state_q == ST_XFER) begin
      if (!hdr_sent) begin
        out_valid = 1'b1;
        out_flit  = flit_t'(hdr_q);
      end else begin
        out_valid = !empty;
        out_flit  = do_split ? {1'b1, head[FLIT_W-2:0]} : head;
      end
    end
  end

  assign fire      = out_valid && out_ready;
  assign pop       = ((state_q == ST_REQ) && !empty) || (fire && hdr_sent);
  assign split_evt = fire && do_split;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q    <= ST_REQ;
      hdr_q      <= '0;
      req_q      <= '0;
      prio_q     <= '0;
      out_port_q <= '0;
      flits_left <= '0;
      pkt_size   <= '0;
      hdr_sent   <= 1'b0;
    end else begin
      unique case (state_q)
        ST_REQ: if (!empty) begin
          hdr_q    <= head_hdr;
          req_q    <= route;
          prio_q   <= head_hdr.prio;
          pkt_size <= head_hdr.size;
          state_q  <= ST_ARB;
        end
        ST_ARB: begin
          if (grant) begin
            out_port_q <= req_q;
            flits_left <= hdr_q.size;
            hdr_sent   <= 1'b0;
            state_q    <= ST_XFER;
          end else if (prio_upd_valid && (prio_upd < prio_q)) begin
            prio_q <= prio_upd;
          end
        end
        ST_XFER: if (fire) begin
          if (!hdr_sent) begin
            hdr_sent <= 1'b1;
          end else begin
            flits_left <= remain;
            if (head[FLIT_W-1]) begin
              state_q <= ST_CLOSE;
            end else if (do_split) begin
              hdr_q.size <= remain;
              state_q    <= ST_SPLIT;
            end
          end
        end
        ST_CLOSE: begin
          out_port_q <= '0;
          state_q    <= ST_REQ;
        end
        ST_SPLIT: begin
          out_port_q <= '0;
          prio_q     <= hdr_q.prio;
          state_q    <= ST_ARB;
        end
        default: state_q <= ST_REQ;
      endcase
    end
  end

  assign req      = (state_q == ST_ARB) ? req_q : '0;
  assign prio     = prio_q;
  assign state    = state_q;
  assign out_port = out_port_q;

  // A grant is only meaningful for a pending request.
  assert property (@(posedge clk) disable iff (!rst_n) grant |-> state_q == ST_ARB);
  // The 'out port' register is one-hot or zero.
  assert property (@(posedge clk) disable iff (!rst_n) $onehot0(out_port_q));

endmodule

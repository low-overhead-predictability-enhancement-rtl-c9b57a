// tb_pfs_router: directed tests of one router at (1,1) with modelled neighbours.
//   1. West -> East and North -> Local packets pass intact; zero-load timing: a header
//      written into the input buffer leaves three cycles later.
//   2. Splitting: a long priority-10 packet Local -> East is cut when a priority-2 packet
//      from North wants East; the East stream holds the first fragment, the whole urgent
//      packet, then the remainder under a new header of the right size.
//   3. Priority forwarding out: with East stalled, the waiting priority-2 packet behind the
//      stalled priority-10 holder makes the router send priority 2 on the East side-band.
//   4. Priority forwarding in: West (priority 9) and North (priority 3) wait for East, held
//      by a stalled priority-12 packet; priority 0 arrives on the West side-band. When East
//      moves again the holder is split and West, now the most urgent, wins East before North.
// Priority values are given directly (0 most urgent).
module tb_pfs_router;
  import pfs_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  prio_t    cfg_pd;
  rf_mode_t cfg_rf_mode;
  size_t    cfg_rf;
  logic  in_valid [NPORT], in_ready [NPORT], out_valid [NPORT], out_ready [NPORT];
  flit_t in_flit [NPORT], out_flit [NPORT];
  logic  fwd_in_valid [NDIR], fwd_out_valid [NDIR];
  prio_t fwd_in_prio [NDIR], fwd_out_prio [NDIR];
  logic  ev_split, ev_alpha, ev_fwd, ev_upd;
  int checks = 0, failures = 0, cyc = 0;
  flit_t src_q [NPORT][$];
  flit_t got [NPORT][$];
  int    got_cyc [NPORT][$];
  int    push_cyc [NPORT][$];
  bit    stall [NPORT];
  int    n_split = 0, n_upd = 0;
  int    fwd_seen [NDIR];
  prio_t fwd_last [NDIR];

  pfs_router #(.X(1), .Y(1)) dut (.*);
  always #5 clk = ~clk;

  task automatic check(input bit c, input string s);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s (cycle %0d)", s, cyc); end
  endtask

  function automatic flit_t hdr(input int p, input int size, input int sx, input int sy,
                                input int dx, input int dy);
    header_t h = '0;
    h.prio = prio_t'(p); h.size = size_t'(size);
    h.src_x = coord_t'(sx); h.src_y = coord_t'(sy); h.dst_x = coord_t'(dx); h.dst_y = coord_t'(dy);
    return flit_t'(h);
  endfunction

  function automatic flit_t pay(input int tag, input int k, input bit last);
    return {last, last, 30'(tag * 1000 + k)};
  endfunction

  task automatic send(input int port, input int p, input int size, input int tag,
                      input int dx, input int dy);
    src_q[port].push_back(hdr(p, size, tag, 0, dx, dy));
    for (int k = 1; k <= size; k++) src_q[port].push_back(pay(tag, k, k == size));
  endtask

  always @(posedge clk) begin
    cyc++;
    if (rst_n) begin
      for (int i = 0; i < NPORT; i++) begin
        if (in_valid[i] && in_ready[i]) begin
          void'(src_q[i].pop_front());
          push_cyc[i].push_back(cyc);
        end
        if (out_valid[i] && out_ready[i]) begin
          got[i].push_back(out_flit[i]);
          got_cyc[i].push_back(cyc);
        end
      end
      for (int d = 0; d < NDIR; d++)
        if (fwd_out_valid[d]) begin fwd_seen[d]++; fwd_last[d] = fwd_out_prio[d]; end
      if (ev_split) n_split++;
      if (ev_upd) n_upd++;
    end
  end

  always @(clk) begin
    #1;
    for (int i = 0; i < NPORT; i++) begin
      in_valid[i]  = (src_q[i].size() > 0);
      in_flit[i]   = (src_q[i].size() > 0) ? src_q[i][0] : '0;
      out_ready[i] = !stall[i];
    end
  end

  task automatic clear();
    for (int i = 0; i < NPORT; i++) begin
      got[i].delete(); got_cyc[i].delete(); push_cyc[i].delete(); stall[i] = 0;
    end
    for (int d = 0; d < NDIR; d++) fwd_seen[d] = 0;
    n_split = 0; n_upd = 0;
  endtask

  task automatic drain(input int n);
    repeat (n) @(posedge clk);
  endtask

  initial begin
    cfg_pd = prio_t'(1); cfg_rf_mode = RF_ABS; cfg_rf = size_t'(1);
    for (int d = 0; d < NDIR; d++) begin fwd_in_valid[d] = 0; fwd_in_prio[d] = '0; end
    clear();
    repeat (2) @(posedge clk);
    #2 rst_n = 1'b1;

    // 1
    send(P_W, 5, 4, 1, 3, 1);
    send(P_N, 6, 3, 2, 1, 1);
    drain(30);
    check(got[P_E].size() == 5 && got[P_L].size() == 4, "both packets delivered");
    if (got[P_E].size() == 5) begin
      check(got[P_E][0] == hdr(5, 4, 1, 0, 3, 1), "East header intact");
      for (int k = 1; k <= 4; k++) check(got[P_E][k] == pay(1, k, k == 4), "East payload intact");
      check(got_cyc[P_E][0] - push_cyc[P_W][0] == 3, "header leaves 3 cycles after buffering");
      check(got_cyc[P_E][4] - got_cyc[P_E][0] == 4, "payload at one flit per cycle");
    end
    if (got[P_L].size() == 4)
      for (int k = 1; k <= 3; k++) check(got[P_L][k] == pay(2, k, k == 3), "Local payload intact");
    clear();

    // 2
    send(P_L, 10, 30, 3, 3, 1);
    drain(10);
    send(P_N, 2, 4, 4, 3, 1);
    drain(60);
    check(n_split == 1, "one split");
    begin
      int hdrs [$];
      int in_pkt = 0, pay3 = 0, last3 = -1, last4 = -1;
      for (int k = 0; k < got[P_E].size(); k++) begin
        if (!in_pkt) begin hdrs.push_back(k); in_pkt = 1; end
        else begin
          if (got[P_E][k][29:0] / 1000 == 3) begin
            pay3++;
            check(got[P_E][k][29:0] % 1000 == pay3, "low-priority payload in order");
            if (got[P_E][k][FLIT_W-2]) last3 = k;
          end
          if (got[P_E][k][29:0] / 1000 == 4 && got[P_E][k][FLIT_W-2]) last4 = k;
          if (got[P_E][k][FLIT_W-1]) in_pkt = 0;
        end
      end
      check(hdrs.size() == 3, "three headers on East");
      check(pay3 == 30, "all 30 low-priority flits delivered");
      check(last4 >= 0 && last4 < last3, "urgent packet completes before the low-priority one");
      if (hdrs.size() == 3) begin
        header_t h1, h2;
        h1 = header_t'(got[P_E][hdrs[1]]);
        h2 = header_t'(got[P_E][hdrs[2]]);
        check(h1.prio == 2 && h1.src_x == 4, "second header is the urgent packet");
        check(h2.prio == 10 && h2.src_x == 3 && int'(h2.size) == 30 - (hdrs[1] - 1),
              "remainder header: original priority, remaining size");
      end
    end
    clear();

    // 3
    stall[P_E] = 1;
    send(P_L, 10, 20, 5, 3, 1);
    drain(8);
    send(P_N, 2, 4, 6, 3, 1);
    drain(15);
    check(fwd_seen[P_E] > 0 && fwd_last[P_E] == prio_t'(2), "priority 2 sent on the East side-band");
    check(fwd_seen[P_W] == 0 && fwd_seen[P_N] == 0 && fwd_seen[P_S] == 0, "no other side-band used");
    stall[P_E] = 0;
    drain(60);
    clear();

    // 4
    stall[P_E] = 1;
    send(P_L, 12, 20, 7, 3, 1);
    drain(8);
    send(P_W, 9, 3, 8, 3, 1);
    send(P_N, 3, 3, 9, 3, 1);
    drain(10);
    @(negedge clk);
    fwd_in_valid[P_W] = 1; fwd_in_prio[P_W] = prio_t'(0);
    @(negedge clk);
    fwd_in_valid[P_W] = 0;
    drain(12);
    check(n_upd > 0, "West header priority updated");
    stall[P_E] = 0;
    drain(80);
    begin
      int order [$];
      int in_pkt = 0;
      for (int k = 0; k < got[P_E].size(); k++) begin
        if (!in_pkt) begin
          header_t hh;
          hh = header_t'(got[P_E][k]);
          order.push_back(int'(hh.src_x));
          in_pkt = 1;
        end
        else if (got[P_E][k][FLIT_W-1]) in_pkt = 0;
      end
      check(order.size() >= 4 && order[0] == 7 && order[1] == 8 && order[2] == 9,
            "holder fragment, then the forwarded West packet, then North");
      check(n_split >= 1, "holder was split");
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_pfs_noc_top: end-to-end test of the 4 x 4 PFS network with its packet generators, at the
// design's default size.
//   Phase A: one packet (0,0) -> (3,3), 4 payload flits, idle network. Its latency must be the
//            zero-load figure 2 + 3*R + S (R = 7 routers on the path, S = 4 flits) and the
//            report must carry the right source and priority.
//   Phase B: the head-of-line blocking scenario of a column of routers: a priority-4 packet
//            occupies the Local output of (1,3); priority-7 traffic from (1,2) is stuck behind
//            it; priorities 2 (from (0,2)), 3 (from (2,2)) and 5 (from (1,1)) compete for the
//            South output of (1,2); priority 1 comes down from (1,0). All go to (1,3).
//            Priority forwarding (alpha loads, side-band messages, priority updates) and
//            splitting must all happen, and the priority-1 packet must arrive before the
//            priority 2, 3, 5 and 7 packets.
//   Phase C: random periodic traffic from every node; after the generators stop and the
//            network drains, every released packet must have arrived, per source.
// Priority label p is carried as value p-1.
module tb_pfs_noc_top;
  import pfs_pkg::*;

  localparam int W = 4, H = 4, N = W * H;

  logic     clk = 1'b0;
  logic     rst_n;
  prio_t    cfg_pd;
  rf_mode_t cfg_rf_mode;
  size_t    cfg_rf;
  gen_cfg_t gen_cfg [N];
  logic     rx_valid [N];
  rx_info_t rx_info  [N];
  logic [N-1:0] rel_evt, drop, frag_evt, ev_split, ev_alpha, ev_fwd, ev_upd;
  logic [31:0]  now;

  int checks = 0, failures = 0;
  int n_split = 0, n_alpha = 0, n_fwd = 0, n_upd = 0, n_frag = 0;
  int rel_cnt [N], done_cnt [N];
  int done_time [16];   // per priority label (index = value)
  int phase = 0;

  pfs_noc_top dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  function automatic int nid(input int x, input int y);
    return y * W + x;
  endfunction

  function automatic gen_cfg_t mk(input int start, input int period, input int size,
                                  input int label, input int dx, input int dy);
    gen_cfg_t c;
    c.enable = 1'b1;
    c.start  = 32'(start);
    c.period = 32'(period);
    c.size   = size_t'(size);
    c.prio   = prio_t'(label - 1);
    c.dst_x  = coord_t'(dx);
    c.dst_y  = coord_t'(dy);
    return c;
  endfunction

  // Event bookkeeping.
  always @(posedge clk) if (rst_n) begin
    n_split += $countones(ev_split);
    n_alpha += $countones(ev_alpha);
    n_fwd   += $countones(ev_fwd);
    n_upd   += $countones(ev_upd);
    n_frag  += $countones(frag_evt);
    for (int n = 0; n < N; n++) begin
      if (rel_evt[n]) rel_cnt[n]++;
      if (rx_valid[n]) begin
        done_cnt[nid(int'(rx_info[n].src_x), int'(rx_info[n].src_y))]++;
        if (done_time[rx_info[n].prio] < 0) done_time[rx_info[n].prio] = int'(now);
        if (phase == 1) begin
          check(n == nid(3, 3), "phase A: packet delivered to (3,3)");
          check(rx_info[n].src_x == 0 && rx_info[n].src_y == 0, "phase A: source (0,0)");
          check(rx_info[n].prio == 4'd2, "phase A: priority label 3");
          check(rx_info[n].latency == 32'(2 + 3 * 7 + 4), "phase A: zero-load latency");
          $display("phase A latency %0d (expected %0d)", rx_info[n].latency, 2 + 3 * 7 + 4);
        end
      end
    end
  end

  task automatic restart();
    rst_n = 1'b0;
    for (int n = 0; n < N; n++) begin
      rel_cnt[n]  = 0;
      done_cnt[n] = 0;
    end
    for (int p = 0; p < 16; p++) done_time[p] = -1;
    n_split = 0; n_alpha = 0; n_fwd = 0; n_upd = 0; n_frag = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
  endtask

  function automatic int total(input int a [N]);
    int s = 0;
    foreach (a[i]) s += a[i];
    return s;
  endfunction

  initial begin
    cfg_pd      = prio_t'(1);
    cfg_rf_mode = RF_ABS;
    cfg_rf      = size_t'(1);
    for (int n = 0; n < N; n++) gen_cfg[n] = '0;

    // ---------------- Phase A
    phase = 1;
    gen_cfg[nid(0, 0)] = mk(10, 0, 4, 3, 3, 3);
    restart();
    repeat (100) @(posedge clk);
    check(total(done_cnt) == 1, "phase A: exactly one packet received");

    // ---------------- Phase B
    phase = 2;
    for (int n = 0; n < N; n++) gen_cfg[n] = '0;
    gen_cfg[nid(0, 3)] = mk(5,  0, 120, 4, 1, 3);  // occupies Local output of (1,3)
    gen_cfg[nid(1, 2)] = mk(20, 0, 60,  7, 1, 3);
    gen_cfg[nid(0, 2)] = mk(40, 0, 60,  2, 1, 3);
    gen_cfg[nid(2, 2)] = mk(40, 0, 60,  3, 1, 3);
    gen_cfg[nid(1, 1)] = mk(40, 0, 60,  5, 1, 3);
    gen_cfg[nid(1, 0)] = mk(60, 0, 60,  1, 1, 3);
    restart();
    repeat (1200) @(posedge clk);
    check(total(done_cnt) == 6, "phase B: all six packets received");
    check(n_frag > 6, "phase B: packets arrived split into fragments");
    $display("phase B: arrival cycle per label 1..7: %0d %0d %0d %0d %0d %0d %0d",
             done_time[0], done_time[1], done_time[2], done_time[3], done_time[4],
             done_time[5], done_time[6]);
    $display("phase B: splits %0d alpha %0d side-band %0d updates %0d fragments %0d",
             n_split, n_alpha, n_fwd, n_upd, n_frag);
    check(n_split > 0, "phase B: packet splitting happened");
    check(n_alpha > 0, "phase B: alpha register loaded");
    check(n_fwd > 0,   "phase B: priority sent on side-band");
    check(n_upd > 0,   "phase B: waiting header priority updated");
    check(done_time[0] >= 0 && done_time[0] < done_time[1], "phase B: label 1 before label 2");
    check(done_time[0] >= 0 && done_time[0] < done_time[2], "phase B: label 1 before label 3");
    check(done_time[0] >= 0 && done_time[0] < done_time[4], "phase B: label 1 before label 5");
    check(done_time[0] >= 0 && done_time[0] < done_time[6], "phase B: label 1 before label 7");

    // ---------------- Phase C
    phase = 3;
    for (int n = 0; n < N; n++) begin
      int d;
      do d = int'($urandom_range(N - 1)); while (d == n);
      gen_cfg[n] = mk(int'($urandom_range(60)), 150 + int'($urandom_range(250)),
                      2 + int'($urandom_range(30)), 1 + int'($urandom_range(15)), d % W, d / W);
    end
    restart();
    repeat (8000) @(posedge clk);
    for (int n = 0; n < N; n++) gen_cfg[n].enable = 1'b0;
    repeat (4000) @(posedge clk);
    $display("phase C: released %0d received %0d splits %0d alpha %0d side-band %0d updates %0d",
             total(rel_cnt), total(done_cnt), n_split, n_alpha, n_fwd, n_upd);
    check(total(rel_cnt) > 100, "phase C: traffic was generated");
    for (int n = 0; n < N; n++)
      check(rel_cnt[n] == done_cnt[n], $sformatf("phase C: node %0d all packets delivered", n));
    check(n_split > 0, "phase C: splitting under random load");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

// tb_pfs_workload: the evaluation workloads, run on the full 4 x 4 system for 100,000 cycles
// each.
// The same random traffic pattern is used throughout. Each of the 16 nodes sends periodic
// packets to one fixed random destination under its own priority label (a permutation of
// 1..16).
//   run 0       : random traffic, PD = 1, RF = 1
//   runs 1..4   : load raised by payload size (sizes scaled 0.7 : 0.9 : 1.3 : 1.5)
//   runs 5..8   : load raised by packet rate (periods scaled by the inverse ratios)
//   runs 9..10  : RF = 3/4 and 1/2 of the packet size
//   runs 11..12 : PD = 2 and 4
// The network then drains. For every run, every released packet must arrive, and no packet
// may beat its zero-load latency 2 + 3*R + S (R routers on the path, S payload flits).
// Splits and priority forwarding must occur in the PD = 1, RF = 1 run. Per-priority latency
// minimum, median and maximum are printed, which is the content of a box plot.
module tb_pfs_workload;
  import pfs_pkg::*;
  localparam int W = 4, H = 4, N = W * H, RUN_CYCLES = 100000, DRAIN = 6000, NRUNS = 13;

  logic     clk = 1'b0;
  logic     rst_n = 1'b0;
  prio_t    cfg_pd;
  rf_mode_t cfg_rf_mode;
  size_t    cfg_rf;
  gen_cfg_t gen_cfg [N];
  logic     rx_valid [N];
  rx_info_t rx_info  [N];
  logic [N-1:0] rel_evt, drop, frag_evt, ev_split, ev_alpha, ev_fwd, ev_upd;
  logic [31:0]  now;

  int checks = 0, failures = 0;
  int base_size [N], base_period [N], label [N], dst [N];
  int cur_size [N];
  int n_rel, n_done, n_drop, n_split, n_fwd, n_upd, n_below;
  int lat [16][$];

  pfs_noc_top dut (.*);
  always #5 clk = ~clk;

  task automatic check(input bit c, input string s);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", s); end
  endtask

  function automatic int iabs(input int v);
    return v < 0 ? -v : v;
  endfunction

  always @(posedge clk) if (rst_n) begin
    n_split += $countones(ev_split);
    n_fwd   += $countones(ev_fwd);
    n_upd   += $countones(ev_upd);
    n_drop  += $countones(drop);
    for (int n = 0; n < N; n++) begin
      if (rel_evt[n]) n_rel++;
      if (rx_valid[n]) begin
        int s, r, lb;
        s  = int'(rx_info[n].src_y) * W + int'(rx_info[n].src_x);
        r  = iabs(s % W - n % W) + iabs(s / W - n / W) + 1;
        lb = 2 + 3 * r + cur_size[s];
        if (int'(rx_info[n].latency) < lb || n != dst[s]) n_below++;
        n_done++;
        lat[rx_info[n].prio].push_back(int'(rx_info[n].latency));
      end
    end
  end

  task automatic run(input int idx, input string name, input int size_pct, input int period_pct,
                     input int pd, input rf_mode_t rfm);
    cfg_pd = prio_t'(pd);
    cfg_rf_mode = rfm;
    cfg_rf = size_t'(1);
    for (int n = 0; n < N; n++) begin
      cur_size[n] = (base_size[n] * size_pct + 50) / 100;
      gen_cfg[n] = '{enable: 1'b1, start: 32'(n * 7), period: 32'((base_period[n] * period_pct) / 100),
                     size: size_t'(cur_size[n]), prio: prio_t'(label[n] - 1),
                     dst_x: coord_t'(dst[n] % W), dst_y: coord_t'(dst[n] / W)};
    end
    n_rel = 0; n_done = 0; n_drop = 0; n_split = 0; n_fwd = 0; n_upd = 0; n_below = 0;
    for (int p = 0; p < 16; p++) lat[p].delete();
    rst_n = 1'b0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    repeat (RUN_CYCLES) @(posedge clk);
    for (int n = 0; n < N; n++) gen_cfg[n].enable = 1'b0;
    repeat (DRAIN) @(posedge clk);
    $display("run %0d %s: released %0d delivered %0d dropped %0d splits %0d side-band %0d updates %0d",
             idx, name, n_rel, n_done, n_drop, n_split, n_fwd, n_upd);
    $write("  latency min/median/max per priority label:");
    for (int p = 0; p < 16; p++) begin
      lat[p].sort();
      if (lat[p].size() > 0)
        $write(" %0d:%0d/%0d/%0d", p + 1, lat[p][0], lat[p][lat[p].size() / 2], lat[p][lat[p].size() - 1]);
    end
    $write("\n");
    check(n_rel > 0 && n_done == n_rel, $sformatf("run %0d: every released packet delivered", idx));
    check(n_below == 0, $sformatf("run %0d: no packet faster than zero load or misdelivered", idx));
  endtask

  initial begin
    int perm [16];
    for (int p = 0; p < 16; p++) perm[p] = p + 1;
    perm.shuffle();
    for (int n = 0; n < N; n++) begin
      label[n] = perm[n];
      do dst[n] = int'($urandom_range(N - 1)); while (dst[n] == n);
      base_size[n]   = 20 + int'($urandom_range(60));
      base_period[n] = 200 + int'($urandom_range(200));
      gen_cfg[n] = '0;
    end
    run(0, "random traffic", 100, 100, 1, RF_ABS);
    check(n_split > 0 && n_fwd > 0, "run 0: splitting and forwarding occurred");
    run(1,  "size x0.7",   70, 100, 1, RF_ABS);
    run(2,  "size x0.9",   90, 100, 1, RF_ABS);
    run(3,  "size x1.3",  130, 100, 1, RF_ABS);
    run(4,  "size x1.5",  150, 100, 1, RF_ABS);
    run(5,  "rate x0.7",  100, 143, 1, RF_ABS);
    run(6,  "rate x0.9",  100, 111, 1, RF_ABS);
    run(7,  "rate x1.3",  100,  77, 1, RF_ABS);
    run(8,  "rate x1.5",  100,  67, 1, RF_ABS);
    run(9,  "RF 3/4",     100, 100, 1, RF_3Q);
    run(10, "RF 1/2",     100, 100, 1, RF_HALF);
    run(11, "PD 2",       100, 100, 2, RF_ABS);
    run(12, "PD 4",       100, 100, 4, RF_ABS);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NRUNS * (RUN_CYCLES + DRAIN + 10) + 1000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

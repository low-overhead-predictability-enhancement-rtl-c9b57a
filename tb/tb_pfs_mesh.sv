// tb_pfs_mesh: the 4 x 4 mesh at its default size, driven directly on the Local ports.
// Every node sends 25 packets of 1..24 payload flits with random priorities to random other
// nodes, back to back. Payload flits carry the source node and a per-source sequence number.
// At every destination the headers must name that node, and for each source the payload
// numbers must arrive in order with none missing or duplicated, whether or not packets were
// split on the way (packets of one source to one destination share one path and cannot
// overtake each other). All packets must arrive; splits and priority forwarding must occur.
module tb_pfs_mesh;
  import pfs_pkg::*;
  localparam int W = 4, H = 4, N = W * H, PKTS = 25;
  logic clk = 1'b0, rst_n = 1'b0;
  prio_t    cfg_pd = prio_t'(1);
  rf_mode_t cfg_rf_mode = RF_ABS;
  size_t    cfg_rf = size_t'(1);
  logic  loc_in_valid [N], loc_in_ready [N], loc_out_valid [N], loc_out_ready [N];
  flit_t loc_in_flit [N], loc_out_flit [N];
  logic [N-1:0] ev_split, ev_alpha, ev_fwd, ev_upd;
  int checks = 0, failures = 0;
  flit_t src_q [N][$];
  int exp_seq [N][N];     // [dst][src] next expected payload number
  int sent_flits [N][N];  // [dst][src]
  int got_flits [N][N];
  int sent_pkts = 0, got_pkts = 0, n_split = 0, n_fwd = 0, n_upd = 0;
  bit in_pkt [N];

  pfs_mesh dut (.*);
  always #5 clk = ~clk;

  task automatic check(input bit c, input string s);
    checks++;
    if (!c) begin failures++; if (failures < 20) $display("FAIL: %s", s); end
  endtask

  always @(clk) begin
    #1;
    for (int n = 0; n < N; n++) begin
      loc_in_valid[n]  = (src_q[n].size() > 0);
      loc_in_flit[n]   = (src_q[n].size() > 0) ? src_q[n][0] : '0;
      loc_out_ready[n] = 1'b1;
    end
  end

  always @(posedge clk) if (rst_n) begin
    n_split += $countones(ev_split);
    n_fwd   += $countones(ev_fwd);
    n_upd   += $countones(ev_upd);
    for (int n = 0; n < N; n++) begin
      if (loc_in_valid[n] && loc_in_ready[n]) void'(src_q[n].pop_front());
      if (loc_out_valid[n]) begin
        if (!in_pkt[n]) begin
          header_t h;
          h = header_t'(loc_out_flit[n]);
          check(int'(h.dst_x) == n % W && int'(h.dst_y) == n / W, "header reaches its destination");
          in_pkt[n] = 1'b1;
        end else begin
          int s, q;
          s = int'(loc_out_flit[n][29:20]);
          q = int'(loc_out_flit[n][19:0]);
          check(s < N, "payload source field");
          if (s < N) begin
            check(q > exp_seq[n][s], $sformatf("in-order payload at %0d from %0d", n, s));
            exp_seq[n][s] = q;
            got_flits[n][s]++;
          end
          if (loc_out_flit[n][FLIT_W-2]) got_pkts++;
          if (loc_out_flit[n][FLIT_W-1]) in_pkt[n] = 1'b0;
        end
      end
    end
  end

  initial begin
    for (int d = 0; d < N; d++) begin
      in_pkt[d] = 1'b0;
      for (int s = 0; s < N; s++) begin exp_seq[d][s] = -1; sent_flits[d][s] = 0; got_flits[d][s] = 0; end
    end
    for (int s = 0; s < N; s++) begin
      int seq = 0;
      for (int p = 0; p < PKTS; p++) begin
        int d, size;
        header_t h;
        do d = int'($urandom_range(N - 1)); while (d == s);
        size = 1 + int'($urandom_range(23));
        h = '0;
        h.prio = prio_t'($urandom_range(15)); h.size = size_t'(size);
        h.src_x = coord_t'(s % W); h.src_y = coord_t'(s / W);
        h.dst_x = coord_t'(d % W); h.dst_y = coord_t'(d / W);
        src_q[s].push_back(flit_t'(h));
        for (int k = 1; k <= size; k++) begin
          src_q[s].push_back({k == size, k == size, 10'(s), 20'(seq)});
          seq++;
        end
        sent_flits[d][s] += size;
        sent_pkts++;
      end
    end
    repeat (2) @(posedge clk);
    #2 rst_n = 1'b1;
    repeat (6000) @(posedge clk);
    check(got_pkts == sent_pkts, $sformatf("all packets delivered (%0d of %0d)", got_pkts, sent_pkts));
    for (int d = 0; d < N; d++)
      for (int s = 0; s < N; s++)
        check(got_flits[d][s] == sent_flits[d][s], $sformatf("flit count %0d -> %0d", s, d));
    $display("splits %0d side-band messages %0d priority updates %0d", n_split, n_fwd, n_upd);
    check(n_split > 0, "packets were split");
    check(n_fwd > 0, "priorities were forwarded");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

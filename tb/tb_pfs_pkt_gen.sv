// tb_pfs_pkt_gen: packet generator at (2,1) with its transmit link looped back to its own
// receiver through a register stage that stalls at random.
//   - releases at start, start+period, ... (checked against the cycle counter);
//   - each packet is one header (priority, size, source, destination as set) followed by
//     'size' payload flits, the final one with tail and last bits set;
//   - each packet produces one report with the right source, priority and a latency equal
//     to the cycles from release to the arrival of the final flit, as seen by the testbench;
//   - a fragment (tail without last) does not produce a report, only a further header does;
//   - a burst of releases beyond the release queue is flagged as dropped.
module tb_pfs_pkt_gen;
  import pfs_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  gen_cfg_t cfg;
  logic [31:0] now;
  logic tx_valid, tx_ready, rx_valid, rx_ready, release_evt, drop, rx_frag, done_valid;
  flit_t tx_flit, rx_flit;
  rx_info_t done_info;
  int checks = 0, failures = 0;
  int rel_times [$];
  int n_rel = 0, n_done = 0, n_drop = 0, n_frag = 0, in_pkt = 0, cnt = 0;
  bit stall_en = 1'b1, inject = 1'b0;
  flit_t inj_q [$];

  pfs_pkt_gen #(.X(2), .Y(1)) dut (.*);
  always #5 clk = ~clk;

  task automatic check(input bit c, input string s);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s (now %0d)", s, now); end
  endtask

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) now <= '0; else now <= now + 1;

  // loop-back: transmit link straight into the receiver; ready stalls at random
  always @(negedge clk) tx_ready = stall_en ? 1'($urandom_range(3) != 0) : 1'b1;
  always_comb begin
    if (inject) begin
      rx_valid = (inj_q.size() > 0);
      rx_flit  = (inj_q.size() > 0) ? inj_q[0] : '0;
    end else begin
      rx_valid = tx_valid && tx_ready;
      rx_flit  = tx_flit;
    end
  end

  // monitor of the transmitted stream
  header_t h;
  always @(posedge clk) if (rst_n) begin
    if (release_evt) begin n_rel++; rel_times.push_back(int'(now)); end
    if (drop) n_drop++;
    if (rx_frag) n_frag++;
    if (!inject && tx_valid && tx_ready) begin
      if (in_pkt == 0) begin
        h = header_t'(tx_flit);
        check(h.prio == cfg.prio && h.size == cfg.size && h.src_x == 2 && h.src_y == 1 &&
              h.dst_x == cfg.dst_x && h.dst_y == cfg.dst_y && !h.tail, "header fields");
        in_pkt = 1; cnt = 0;
      end else begin
        cnt++;
        check(tx_flit[FLIT_W-1] == (cnt == int'(cfg.size)) && tx_flit[FLIT_W-2] == (cnt == int'(cfg.size)),
              "tail and last only on the final flit");
        check(rel_times.size() > 0 && tx_flit[29:0] == 30'(rel_times[0]), "payload carries release time");
        if (cnt == int'(cfg.size)) in_pkt = 0;
      end
    end
    if (done_valid) begin
      n_done++;
      if (inject)
        check(done_info.src_x == 1 && done_info.src_y == 0 && done_info.prio == 4'd3, "report fields of fragments");
      else
        check(done_info.src_x == 2 && done_info.src_y == 1 && done_info.prio == cfg.prio, "report fields");
      if (!inject && rel_times.size() > 0) begin
        // the final flit arrived in the previous cycle
        check(int'(done_info.latency) == int'(now) - 1 - rel_times[0], "latency");
        void'(rel_times.pop_front());
      end
    end
  end

  initial begin
    cfg = '{enable: 1'b1, start: 32'd7, period: 32'd30, size: size_t'(5),
            prio: prio_t'(9), dst_x: 4'd0, dst_y: 4'd3};
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    wait (now == 32'd7);
    #1 check(release_evt, "first release at start");
    wait (now == 32'd37);
    #1 check(release_evt, "second release one period later");
    wait (now == 32'd36 + 30 * 8);
    cfg.enable = 1'b0;
    repeat (50) @(posedge clk);
    check(n_rel == 9 && n_done == 9 && n_drop == 0, $sformatf("9 released, 9 reported (%0d, %0d)", n_rel, n_done));
    check(n_frag == 9, "one header per packet");

    // fragments: header, 2 flits with tail only, header, 1 flit with tail and last
    inject = 1'b1;
    @(negedge clk);
    begin
      header_t hh = '0;
      hh.prio = 4'd3; hh.size = size_t'(3); hh.src_x = 4'd1; hh.src_y = 4'd0;
      inj_q = '{flit_t'(hh), {2'b00, 30'(now)}, {2'b10, 30'(now)}, flit_t'(hh), {2'b11, 30'(now)}};
    end
    n_done = 0; n_frag = 0;
    for (int k = 0; k < 5; k++) begin
      @(posedge clk);
      #1 void'(inj_q.pop_front());
    end
    @(negedge clk);
    @(negedge clk);
    check(n_frag == 2 && n_done == 1, "two fragments, one report");
    inject = 1'b0;

    // overflow of the release queue: period 1 with the link stalled
    stall_en = 1'b0;
    cfg.period = 32'd1; cfg.start = 32'd10; cfg.enable = 1'b1;
    rst_n = 1'b0; @(negedge clk); rst_n = 1'b1;
    rel_times.delete(); in_pkt = 0;
    repeat (40) @(negedge clk);
    check(n_drop > 0, "releases beyond the queue are dropped");
    cfg.enable = 1'b0;

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

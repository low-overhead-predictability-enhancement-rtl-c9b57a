// tb_pfs_input_port: directed tests of one input port of the router at (1,1).
//   1. A 3-flit packet to (3,1): the port request must be East with the header's priority;
//      forwarded priorities raise it (only ever towards more urgent); after the grant the
//      header and payload leave unchanged, one per cycle, and the connection closes on the
//      tail flit. Zero-load timing: header taken one cycle after it is buffered, grant seen
//      the next cycle, header out in the cycle after the grant.
//   2. Splitting with an absolute RF of 2: split_ok raised after two payload flits makes the
//      third leave with the tail bit; the port re-requests East with its original priority
//      and a header whose size is the remaining 5 flits.
//   3. Splitting with RF = 1/2 of an 8-flit packet and split_ok held: the packet leaves as
//      fragments of 1, 1, 1, 1 and 4 flits, each under a header of the right size.
//   4. The same with RF = 3/4 (threshold 6): fragments of 1, 1 and 6 flits.
//   Random output back-pressure is applied in tests 2 to 4.
module tb_pfs_input_port;
  import pfs_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid, in_ready, grant, out_valid, out_ready, split_ok, split_evt, prio_upd_valid;
  flit_t in_flit, out_flit;
  port_vec_t req, out_port;
  prio_t prio, prio_upd;
  port_state_t state;
  rf_mode_t cfg_rf_mode;
  size_t cfg_rf;
  flit_t src_q [$], got [$];
  int checks = 0, failures = 0;
  int cyc = 0;
  bit auto_grant = 1'b0;
  bit rand_ready = 1'b0;

  pfs_input_port #(.X(1), .Y(1)) dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  task automatic check(input bit c, input string s);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s (cycle %0d)", s, cyc); end
  endtask

  function automatic flit_t mk_hdr(input int p, input int size, input int dx, input int dy);
    header_t h = '0;
    h.prio = prio_t'(p); h.size = size_t'(size); h.src_x = 4'd0; h.src_y = 4'd1;
    h.dst_x = coord_t'(dx); h.dst_y = coord_t'(dy);
    return flit_t'(h);
  endfunction

  function automatic flit_t mk_pay(input int k, input bit last);
    return {last, last, 30'(k)};
  endfunction

  // upstream driver
  always @(clk) begin
    #1;
    in_valid = (src_q.size() > 0);
    in_flit  = (src_q.size() > 0) ? src_q[0] : '0;
  end
  always @(posedge clk) if (rst_n && in_valid && in_ready) void'(src_q.pop_front());

  // output collector and ready generator
  always @(posedge clk) if (rst_n && out_valid && out_ready) got.push_back(out_flit);
  always @(negedge clk) out_ready = rand_ready ? 1'($urandom_range(1)) : 1'b1;

  // arbiter model: grant a pending request two cycles after it appears
  int req_age = 0;
  always @(negedge clk) if (auto_grant) begin
    grant = 1'b0;
    if (req != 0) begin
      req_age++;
      if (req_age >= 2) begin grant = 1'b1; req_age = 0; end
    end else req_age = 0;
  end

  task automatic wait_idle();
    int guard = 0;
    while (!(state == ST_REQ && src_q.size() == 0 && out_port == 0) && guard < 500) begin
      @(posedge clk); guard++;
    end
    repeat (3) @(posedge clk);
  endtask

  initial begin
    split_ok = 0; prio_upd_valid = 0; prio_upd = '0; grant = 0; out_ready = 1;
    cfg_rf_mode = RF_ABS; cfg_rf = size_t'(1);
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;

    // ---- test 1
    @(negedge clk);
    src_q.push_back(mk_hdr(6, 3, 3, 1));
    for (int k = 1; k <= 3; k++) src_q.push_back(mk_pay(k, k == 3));
    @(posedge clk);                     // header written into the buffer
    @(negedge clk); check(state == ST_REQ, "header at buffer head, state 1");
    @(negedge clk); check(state == ST_ARB && req == port_vec_t'(1 << P_E), "request East");
    check(prio == prio_t'(6), "priority from header");
    prio_upd_valid = 1; prio_upd = prio_t'(2);
    @(negedge clk); check(prio == prio_t'(2), "forwarded priority taken");
    prio_upd = prio_t'(4);
    @(negedge clk); check(prio == prio_t'(2), "less urgent forwarded priority ignored");
    prio_upd_valid = 0;
    grant = 1;
    @(negedge clk); grant = 0;
    check(state == ST_XFER && out_port == port_vec_t'(1 << P_E), "connection to East");
    check(out_valid && out_flit == mk_hdr(6, 3, 3, 1), "header out first, unchanged");
    repeat (4) @(negedge clk);
    check(state == ST_CLOSE && out_port == port_vec_t'(1 << P_E), "state 4 after the tail flit");
    @(negedge clk);
    check(state == ST_REQ && out_port == '0, "connection closed after tail");
    check(got.size() == 4, "four flits sent");
    if (got.size() == 4) begin
      check(got[0] == mk_hdr(6, 3, 3, 1), "flit 0 header");
      for (int k = 1; k <= 3; k++) check(got[k] == mk_pay(k, k == 3), "payload in order");
    end
    wait_idle();
    got.delete();

    // ---- test 2
    auto_grant = 1; rand_ready = 1;
    cfg_rf_mode = RF_ABS; cfg_rf = size_t'(2);
    src_q.push_back(mk_hdr(9, 8, 1, 3));
    for (int k = 1; k <= 8; k++) src_q.push_back(mk_pay(k, k == 8));
    while (got.size() < 3) @(negedge clk);
    split_ok = 1;
    while (!(out_valid && out_ready)) @(negedge clk);
    @(negedge clk);
    split_ok = 0;
    check(got.size() == 4 && got[3][FLIT_W-1] == 1'b1, "split flit carries the tail bit");
    check(got.size() == 4 && got[3][FLIT_W-2:0] == mk_pay(3, 0)[FLIT_W-2:0], "split flit is payload 3");
    check(state == ST_SPLIT && out_port == port_vec_t'(1 << P_S), "state 5 releases the port");
    @(negedge clk);
    check(state == ST_ARB && req == port_vec_t'(1 << P_S), "new request South");
    check(prio == prio_t'(9), "new request with original priority");
    wait_idle();
    check(got.size() == 10, "two fragments, ten flits");
    if (got.size() == 10) begin
      check(got[4] == mk_hdr(9, 5, 1, 3), "new header with remaining size 5");
      for (int k = 4; k <= 8; k++) check(got[k + 1] == mk_pay(k, k == 8), "rest of payload");
    end
    got.delete();

    // ---- test 3
    cfg_rf_mode = RF_HALF;
    split_ok = 1;
    src_q.push_back(mk_hdr(3, 8, 1, 0));
    for (int k = 1; k <= 8; k++) src_q.push_back(mk_pay(k, k == 8));
    wait_idle();
    split_ok = 0;
    begin
      int frag_len [5] = '{1, 1, 1, 1, 4};
      int pos = 0, rem = 8, p = 1;
      check(got.size() == 13, "five headers and eight payload flits");
      if (got.size() == 13)
        for (int f = 0; f < 5; f++) begin
          check(got[pos] == mk_hdr(3, rem, 1, 0), $sformatf("fragment %0d header", f));
          pos++;
          for (int k = 0; k < frag_len[f]; k++) begin
            check(got[pos][FLIT_W-2:0] == mk_pay(p, p == 8)[FLIT_W-2:0] && got[pos][FLIT_W-1] == (k == frag_len[f] - 1),
                  $sformatf("fragment %0d payload %0d", f, k));
            pos++; p++;
          end
          rem -= frag_len[f];
        end
    end

    got.delete();

    // ---- test 4: RF = 3/4 of an 8-flit packet (threshold 6), split_ok held
    cfg_rf_mode = RF_3Q;
    split_ok = 1;
    src_q.push_back(mk_hdr(4, 8, 2, 1));
    for (int k = 1; k <= 8; k++) src_q.push_back(mk_pay(k, k == 8));
    wait_idle();
    split_ok = 0;
    begin
      int frag_len [3] = '{1, 1, 6};
      int pos = 0, rem = 8, p = 1;
      check(got.size() == 11, "RF 3/4: three headers and eight payload flits");
      if (got.size() == 11)
        for (int f = 0; f < 3; f++) begin
          check(got[pos] == mk_hdr(4, rem, 2, 1), $sformatf("RF 3/4 fragment %0d header", f));
          pos++;
          for (int k = 0; k < frag_len[f]; k++) begin
            check(got[pos][FLIT_W-1] == (k == frag_len[f] - 1), $sformatf("RF 3/4 fragment %0d tail", f));
            pos++; p++;
          end
          rem -= frag_len[f];
        end
    end

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

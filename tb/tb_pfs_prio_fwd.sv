// tb_pfs_prio_fwd: directed tests of the priority forwarding unit.
//   1. Input North waits (priority 1) for East, held by Local (priority 6) with East stalled:
//      alpha loads and, serviced next cycle, priority 1 leaves on the East side-band.
//   2. No alpha when the holder is more urgent, or when the held output is not stalled.
//   3. A side-band message into West while the West input waits in arbitration: the header
//      is found and West receives a priority update.
//   4. A message into North while North is transferring to South: it is forwarded South.
//   5. A message into East while East is idle: dropped.
//   6. Two alpha registers and a beta register pending together: one service per cycle,
//      each register exactly once, in three consecutive cycles.
module tb_pfs_prio_fwd;
  import pfs_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  port_state_t state [NPORT];
  port_vec_t   req [NPORT], out_port [NPORT];
  prio_t       prio [NPORT];
  port_vec_t   out_stall;
  logic        fwd_in_valid [NDIR], fwd_out_valid [NDIR];
  prio_t       fwd_in_prio [NDIR], fwd_out_prio [NDIR];
  logic        upd_valid [NPORT];
  prio_t       upd_prio [NPORT];
  logic        ev_alpha, ev_fwd, ev_upd;
  int checks = 0, failures = 0;

  pfs_prio_fwd dut (.*);
  always #5 clk = ~clk;

  task automatic check(input bit c, input string s);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", s); end
  endtask

  task automatic idle_all();
    for (int i = 0; i < NPORT; i++) begin
      state[i] = ST_REQ; req[i] = '0; out_port[i] = '0; prio[i] = '0;
    end
    for (int d = 0; d < NDIR; d++) begin fwd_in_valid[d] = 0; fwd_in_prio[d] = '0; end
    out_stall = '0;
  endtask

  function automatic int n_fwd_out();
    int n = 0;
    for (int d = 0; d < NDIR; d++) n += int'(fwd_out_valid[d]);
    return n;
  endfunction

  function automatic int n_upd();
    int n = 0;
    for (int i = 0; i < NPORT; i++) n += int'(upd_valid[i]);
    return n;
  endfunction

  task automatic quiet(input int cycles, input string s);
    int seen = 0;
    repeat (cycles) begin @(negedge clk); seen += n_fwd_out() + n_upd(); end
    check(seen == 0, s);
  endtask

  initial begin
    idle_all();
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;

    // 1
    @(negedge clk);
    state[P_N] = ST_ARB;  req[P_N] = port_vec_t'(1 << P_E); prio[P_N] = prio_t'(1);
    state[P_L] = ST_XFER; out_port[P_L] = port_vec_t'(1 << P_E); prio[P_L] = prio_t'(6);
    out_stall[P_E] = 1'b1;
    #1 check(ev_alpha, "alpha load detected");
    check(n_fwd_out() == 0, "nothing forwarded before the alpha register is loaded");
    @(negedge clk);
    out_stall = '0;   // block resolved, alpha already stored
    #1 check(fwd_out_valid[P_E] && fwd_out_prio[P_E] == prio_t'(1) && n_fwd_out() == 1,
             "alpha serviced: priority 1 sent East");
    quiet(12, "alpha cleared after service");

    // 2
    idle_all();
    state[P_N] = ST_ARB;  req[P_N] = port_vec_t'(1 << P_S); prio[P_N] = prio_t'(5);
    state[P_W] = ST_XFER; out_port[P_W] = port_vec_t'(1 << P_S); prio[P_W] = prio_t'(2);
    out_stall[P_S] = 1'b1;
    quiet(12, "no forwarding when the holder is more urgent");
    prio[P_W] = prio_t'(9); out_stall = '0;
    quiet(12, "no forwarding when the held output is not stalled");

    // 3
    idle_all();
    state[P_W] = ST_ARB; req[P_W] = port_vec_t'(1 << P_E); prio[P_W] = prio_t'(8);
    fwd_in_valid[P_W] = 1; fwd_in_prio[P_W] = prio_t'(3);
    @(negedge clk);
    fwd_in_valid[P_W] = 0;
    #1 check(upd_valid[P_W] && upd_prio[P_W] == prio_t'(3) && n_upd() == 1 && ev_upd,
             "header found: West priority updated to 3");
    check(n_fwd_out() == 0, "found header not forwarded further");
    quiet(12, "beta cleared after service");

    // 4
    idle_all();
    state[P_N] = ST_XFER; out_port[P_N] = port_vec_t'(1 << P_S); prio[P_N] = prio_t'(7);
    fwd_in_valid[P_N] = 1; fwd_in_prio[P_N] = prio_t'(2);
    @(negedge clk);
    fwd_in_valid[P_N] = 0;
    #1 check(fwd_out_valid[P_S] && fwd_out_prio[P_S] == prio_t'(2) && n_fwd_out() == 1 && ev_fwd,
             "header further down: priority 2 forwarded South");
    check(n_upd() == 0, "no update for a transferring input");
    quiet(12, "beta cleared after forwarding");

    // 5
    idle_all();
    fwd_in_valid[P_E] = 1; fwd_in_prio[P_E] = prio_t'(4);
    @(negedge clk);
    fwd_in_valid[P_E] = 0;
    quiet(12, "message into an idle input dropped");

    // 6
    idle_all();
    state[P_E] = ST_ARB; req[P_E] = port_vec_t'(1 << P_N); prio[P_E] = prio_t'(1);
    state[P_W] = ST_ARB; req[P_W] = port_vec_t'(1 << P_N); prio[P_W] = prio_t'(2);
    state[P_L] = ST_XFER; out_port[P_L] = port_vec_t'(1 << P_N); prio[P_L] = prio_t'(12);
    state[P_S] = ST_ARB; req[P_S] = port_vec_t'(1 << P_W); prio[P_S] = prio_t'(14);
    out_stall[P_N] = 1'b1;
    fwd_in_valid[P_S] = 1; fwd_in_prio[P_S] = prio_t'(0);
    @(negedge clk);
    fwd_in_valid[P_S] = 0;
    out_stall = '0;
    begin
      int a_e = 0, a_w = 0, b_s = 0;
      for (int k = 0; k < 3; k++) begin
        #1;
        check(n_fwd_out() + n_upd() == 1, "one service per cycle");
        if (fwd_out_valid[P_N] && fwd_out_prio[P_N] == prio_t'(1)) a_e++;
        if (fwd_out_valid[P_N] && fwd_out_prio[P_N] == prio_t'(2)) a_w++;
        if (upd_valid[P_S] && upd_prio[P_S] == prio_t'(0)) b_s++;
        @(negedge clk);
      end
      check(a_e == 1 && a_w == 1 && b_s == 1, "each pending register serviced once");
    end
    quiet(12, "all registers cleared");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

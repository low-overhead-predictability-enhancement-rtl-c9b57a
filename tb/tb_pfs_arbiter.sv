// tb_pfs_arbiter: random requests, priorities and busy outputs against a reference model.
// For every free output the most urgent requester (smallest value) must be granted; among
// equals the one following the last input granted on that output. A second part holds three
// equal requests on one output and checks that grants rotate.
module tb_pfs_arbiter;
  import pfs_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  port_vec_t req [NPORT];
  prio_t     prio [NPORT];
  port_vec_t busy, grant, exp;
  int        last [NPORT];
  int checks = 0, failures = 0;

  pfs_arbiter dut (.*);
  always #5 clk = ~clk;

  function automatic port_vec_t model();
    port_vec_t g = '0;
    for (int o = 0; o < NPORT; o++) begin
      int w = -1;
      for (int k = 1; k <= NPORT; k++) begin
        int i = (last[o] + k) % NPORT;
        if (req[i][o] && (w < 0 || prio[i] < prio[w])) w = i;
      end
      if (w >= 0 && !busy[o]) g[w] = 1'b1;
    end
    return g;
  endfunction

  task automatic update();
    for (int o = 0; o < NPORT; o++)
      for (int i = 0; i < NPORT; i++)
        if (grant[i] && req[i][o]) last[o] = i;
  endtask

  initial begin
    for (int o = 0; o < NPORT; o++) last[o] = NPORT - 1;
    for (int i = 0; i < NPORT; i++) begin req[i] = '0; prio[i] = '0; end
    busy = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int cyc = 0; cyc < 2000; cyc++) begin
      @(negedge clk);
      for (int i = 0; i < NPORT; i++) begin
        req[i]  = ($urandom_range(3) == 0) ? '0 : port_vec_t'(1 << $urandom_range(NPORT - 1));
        prio[i] = prio_t'($urandom_range(3));
      end
      busy = port_vec_t'($urandom_range(31)) & port_vec_t'($urandom_range(31));
      #1;
      exp = model();
      checks++;
      if (grant !== exp) begin
        failures++;
        $display("FAIL: cycle %0d grant %b expected %b", cyc, grant, exp);
      end
      @(posedge clk);
      update();
    end
    // rotation among equal priorities on output 0
    @(negedge clk);
    busy = '0;
    for (int i = 0; i < NPORT; i++) begin
      req[i]  = (i < 3) ? port_vec_t'(1) : '0;
      prio[i] = prio_t'(5);
    end
    begin
      int seen [3] = '{0, 0, 0};
      for (int k = 0; k < 9; k++) begin
        #1;
        for (int i = 0; i < 3; i++) if (grant[i]) seen[i]++;
        @(posedge clk);
        @(negedge clk);
      end
      for (int i = 0; i < 3; i++) begin
        checks++;
        if (seen[i] != 3) begin failures++; $display("FAIL: rotation input %0d got %0d", i, seen[i]); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

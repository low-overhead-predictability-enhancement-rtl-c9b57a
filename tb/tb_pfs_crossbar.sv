// tb_pfs_crossbar: random partial permutations of connections; every connected output must
// carry its input's flit and valid, unconnected outputs nothing, and each input must see the
// ready of its own output (ready low when unconnected).
module tb_pfs_crossbar;
  import pfs_pkg::*;
  port_vec_t out_port [NPORT];
  logic      in_valid [NPORT], in_ready [NPORT], o_valid [NPORT], o_ready [NPORT];
  flit_t     in_flit [NPORT], o_flit [NPORT];
  int checks = 0, failures = 0;

  pfs_crossbar dut (.*);

  task automatic check(input bit c, input string s);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", s); end
  endtask

  initial begin
    for (int t = 0; t < 2000; t++) begin
      int perm [NPORT];
      int src [NPORT];
      for (int i = 0; i < NPORT; i++) begin perm[i] = i; src[i] = -1; end
      perm.shuffle();
      for (int i = 0; i < NPORT; i++) begin
        out_port[i] = $urandom_range(1) ? port_vec_t'(1 << perm[i]) : '0;
        if (out_port[i] != 0) src[perm[i]] = i;
        in_valid[i] = 1'($urandom_range(1));
        in_flit[i]  = $urandom;
        o_ready[i]  = 1'($urandom_range(1));
      end
      #1;
      for (int o = 0; o < NPORT; o++) begin
        if (src[o] >= 0) begin
          check(o_valid[o] == in_valid[src[o]], "output valid follows its input");
          check(o_flit[o] == in_flit[src[o]], "output flit follows its input");
          check(in_ready[src[o]] == o_ready[o], "input sees its output's ready");
        end else begin
          check(o_valid[o] == 1'b0, "unconnected output idle");
        end
      end
      for (int i = 0; i < NPORT; i++)
        if (out_port[i] == 0) check(in_ready[i] == 1'b0, "unconnected input not ready");
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

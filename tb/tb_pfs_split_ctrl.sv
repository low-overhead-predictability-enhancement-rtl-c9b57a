// tb_pfs_split_ctrl: random connections, requests and priorities against a reference model
// of the priority-difference split condition, for PD settings 0 (treated as 1), 1, 2 and 4.
module tb_pfs_split_ctrl;
  import pfs_pkg::*;
  port_vec_t req [NPORT], out_port [NPORT];
  prio_t     prio [NPORT];
  prio_t     cfg_pd;
  port_vec_t split_ok, exp;
  int checks = 0, failures = 0;
  int pds [4] = '{0, 1, 2, 4};

  pfs_split_ctrl dut (.*);

  initial begin
    for (int t = 0; t < 4000; t++) begin
      int perm [NPORT];
      cfg_pd = prio_t'(pds[t % 4]);
      for (int i = 0; i < NPORT; i++) perm[i] = i;
      perm.shuffle();
      for (int i = 0; i < NPORT; i++) begin
        prio[i] = prio_t'($urandom_range(15));
        if ($urandom_range(1)) begin
          out_port[i] = port_vec_t'(1 << perm[i]);  // distinct outputs
          req[i]      = '0;
        end else begin
          out_port[i] = '0;
          req[i]      = ($urandom_range(3) == 0) ? '0 : port_vec_t'(1 << $urandom_range(NPORT - 1));
        end
      end
      #1;
      exp = '0;
      for (int j = 0; j < NPORT; j++)
        for (int i = 0; i < NPORT; i++)
          if (out_port[j] != 0 && (req[i] & out_port[j]) != 0 &&
              int'(prio[j]) - int'(prio[i]) >= ((cfg_pd == 0) ? 1 : int'(cfg_pd)))
            exp[j] = 1'b1;
      checks++;
      if (split_ok !== exp) begin
        failures++;
        $display("FAIL: test %0d split_ok %b expected %b", t, split_ok, exp);
      end
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

// tb_pfs_fifo: random push/pop test of the input buffer against a queue model.
// Checks the head word, empty/full flags, that a push into a full buffer is dropped, and that
// a two-entry buffer passes one word per cycle when pushed and popped together.
module tb_pfs_fifo;
  localparam int WIDTH = 32, DEPTH = 2;
  logic clk = 1'b0, rst_n = 1'b0;
  logic push, pop, empty, full;
  logic [WIDTH-1:0] din, dout;
  logic [WIDTH-1:0] model [$];
  int checks = 0, failures = 0;

  pfs_fifo #(.WIDTH(WIDTH), .DEPTH(DEPTH)) dut (.*);
  always #5 clk = ~clk;

  task automatic check(input bit c, input string s);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", s); end
  endtask

  initial begin
    push = 0; pop = 0; din = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int cyc = 0; cyc < 3000; cyc++) begin
      @(negedge clk);
      push = ($urandom_range(3) != 0);
      pop  = ($urandom_range(2) != 0);
      din  = $urandom;
      check(empty == (model.size() == 0), "empty flag");
      check(full == (model.size() == DEPTH), "full flag");
      if (model.size() > 0) check(dout == model[0], "head word");
      @(posedge clk);
      begin
        bit accepted;
        accepted = push && (model.size() < DEPTH);
        if (pop && model.size() > 0) void'(model.pop_front());
        if (accepted) model.push_back(din);
      end
    end
    // streaming: one word per cycle with simultaneous push and pop
    @(negedge clk); push = 0; pop = 1;
    repeat (4) @(posedge clk);
    model.delete();
    @(negedge clk); push = 1; pop = 0; din = 32'h100;
    @(posedge clk); model.push_back(din);
    for (int k = 1; k <= 20; k++) begin
      @(negedge clk);
      push = 1; pop = 1; din = 32'h100 + k;
      check(!full && !empty && dout == model[0], "streaming head word");
      @(posedge clk);
      void'(model.pop_front());
      model.push_back(din);
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

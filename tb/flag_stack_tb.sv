// flag_stack_tb: drives random push/pop/clear sequences into the PE flag
// stack and compares top, empty and overflow with a queue model.
module flag_stack_tb;
  logic clk = 0, rst_n = 0, clear = 0, push = 0, pop = 0, din = 0;
  logic top, empty, overflow;
  int checks = 0, failures = 0, cycles = 0;
  bit q[$];
  bit movf;

  flag_stack #(.DEPTH(8)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) begin
    cycles++;
    if (cycles > 20000) begin
      failures++;
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end

  task automatic check();
    checks++;
    if (top !== (q.size() == 0 ? 1'b1 : q[0]) || empty !== (q.size() == 0) || overflow !== movf) begin
      failures++;
      if (failures < 10) $display("FAIL size=%0d top=%0d empty=%0d ovf=%0d", q.size(), top, empty, overflow);
    end
  endtask

  initial begin
    movf = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    check();
    for (int n = 0; n < 5000; n++) begin
      int r = $urandom_range(0, 99);
      clear = (r < 2);
      push  = (r >= 2 && r < 55);
      pop   = (r >= 55);
      din   = $urandom_range(0, 1);
      @(negedge clk);
      if (clear) begin q.delete(); movf = 0; end
      else if (push) begin
        if (q.size() == 8) movf = 1; else q.push_front(din);
      end else if (pop && q.size() > 0) void'(q.pop_front());
      clear = 0; push = 0; pop = 0;
      check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

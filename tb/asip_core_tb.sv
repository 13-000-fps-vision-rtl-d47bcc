// asip_core_tb: loads a short program into one stack ASIP and checks what it
// sends. The program runs a counted loop that emits computed commands
// (EXTS), stores and loads the scratchpad, reads the data input, emits a
// literal command (EXT), raises an event, waits for an answering event and
// idles with DELAY before a last command and HALT. The command port is
// throttled at random to exercise the stall; the expected command list and
// the minimum DELAY gap are written out here.
module asip_core_tb;
  import vsoc_pkg::*;
  logic clk = 0, rst_n = 0, start = 0, prog_we = 0;
  logic [11:0] prog_addr = 0;
  logic [15:0] prog_wdata = 0;
  logic cmd_valid, cmd_ready = 0, running, halted;
  logic [31:0] cmd;
  logic [15:0] ext_in = 16'h0F0F;
  logic [2:0] sig_out, evt_in = 0;
  int checks = 0, failures = 0, cycles = 0, stalls = 0, sigs = 0;
  logic [31:0] expq [$];
  int t_evt = 0;
  logic [15:0] prog [$];

  asip_core dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) begin
    cycles++;
    if (cycles > 20000) begin
      failures++;
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end

  function automatic logic [15:0] op(asip_op_e o, int a = 0); return {o, 12'(a)}; endfunction
  function automatic logic [15:0] mx(asip_misc_e m); return {I_MISC, 7'd0, m}; endfunction

  // monitor: commands, stalls, events
  always @(posedge clk) if (rst_n) begin
    if (cmd_valid && !cmd_ready) stalls++;
    if (cmd_valid && cmd_ready) begin
      checks++;
      if (expq.size() == 0 || cmd !== expq[0]) begin
        failures++;
        $display("FAIL command %h, expected %h", cmd, expq.size() ? expq[0] : 32'hx);
      end
      if (cmd == 32'h0000_0001 && cycles - t_evt < 10) begin
        failures++; $display("FAIL delay too short: %0d", cycles - t_evt);
      end
      if (expq.size()) void'(expq.pop_front());
    end
    if (sig_out[2]) sigs++;
  end

  initial begin
    prog = '{op(I_PUSH, 5),
             mx(X_DUP), op(I_PUSH, 12'h0AB), mx(X_SWAP), mx(X_EXTS), mx(X_DEC), mx(X_DUP), op(I_JNZ, 1),
             mx(X_DROP), op(I_PUSH, 12'h123), op(I_LUI, 4'hF), op(I_PUSH, 12'h010), mx(X_ST),
             op(I_PUSH, 12'h010), mx(X_LD), op(I_PUSH, 1), mx(X_ADD), mx(X_IN), mx(X_XOR),
             op(I_PUSH, 0), mx(X_SWAP), mx(X_EXTS),
             op(I_EXT), 16'hDEAD, 16'hBEEF,
             op(I_SIG, 3'b100), op(I_WAIT, 1), op(I_DELAY, 9),
             op(I_EXT), 16'h0000, 16'h0001,
             op(I_HALT)};
    for (int c = 5; c >= 1; c--) expq.push_back({16'h00AB, 16'(c)});
    expq.push_back({16'h0000, 16'hF124 ^ 16'h0F0F});
    expq.push_back(32'hDEADBEEF);
    expq.push_back(32'h00000001);
    repeat (2) @(posedge clk);
    rst_n = 1;
    foreach (prog[i]) begin
      @(negedge clk); prog_we = 1; prog_addr = 12'(i); prog_wdata = prog[i];
    end
    @(negedge clk); prog_we = 0; start = 1;
    @(negedge clk); start = 0;
    fork
      forever begin @(negedge clk); cmd_ready = ($urandom_range(0, 2) != 0); end
      begin
        wait (sigs > 0);
        repeat (5) @(negedge clk);
        evt_in = 3'b010; t_evt = cycles;
        @(negedge clk); evt_in = 0;
      end
    join_none
    wait (halted);
    @(negedge clk);
    checks++;
    if (expq.size() != 0) begin failures++; $display("FAIL %0d commands missing", expq.size()); end
    checks++;
    if (stalls == 0) begin failures++; $display("FAIL no stall seen"); end
    checks++;
    if (sigs != 1) begin failures++; $display("FAIL sig count %0d", sigs); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

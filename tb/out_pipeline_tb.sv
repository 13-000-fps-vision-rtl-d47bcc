// out_pipeline_tb: sparse pushes from random columns of a 32-column output
// pipeline in all four word modes, with random back-pressure on the output.
// Every word delivered must match one pushed (column, masked data, byte
// count), each column's words must arrive in push order, none may be lost,
// and pushing into a full FIFO must set the overflow flag. The latency of a
// lone word from column c into an empty chain is checked to be c+2 cycles.
module out_pipeline_tb;
  localparam int N = 32;
  logic clk = 0, rst_n = 0;
  logic [1:0] mode = 0;
  logic [N-1:0] push = '0;
  logic [N-1:0][31:0] push_data = '0;
  logic out_valid, out_ready = 1, busy, overflow;
  logic [9:0] out_col;
  logic [31:0] out_data;
  logic [2:0] out_bytes;
  int checks = 0, failures = 0, cycles = 0, received = 0, sent = 0;
  logic [34:0] expq [N][$];   // {bytes, data}

  out_pipeline #(.N(N), .FIFO_DEPTH(2)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) begin
    cycles++;
    if (cycles > 50000) begin
      failures++;
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end

  // scoreboard
  always @(posedge clk) if (rst_n && out_valid && out_ready) begin
    logic [34:0] e;
    checks++;
    received++;
    if (expq[out_col].size() == 0) begin
      failures++; $display("FAIL unexpected word from column %0d", out_col);
    end else begin
      e = expq[out_col].pop_front();
      if ({out_bytes, out_data} !== e) begin
        failures++; $display("FAIL col %0d got %0d/%h exp %0d/%h", out_col, out_bytes, out_data, e[34:32], e[31:0]);
      end
    end
  end

  function automatic logic [31:0] msk(logic [31:0] d, int m);
    return (m == 3) ? d : d & ((32'h1 << (8 * (m + 1))) - 1);
  endfunction

  initial begin
    int t0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // latency of a single word from column 20
    @(negedge clk);
    push[20] = 1; push_data[20] = 32'hCAFE_0020; mode = 3;
    expq[20].push_back({3'd4, 32'hCAFE_0020});
    t0 = cycles;
    @(negedge clk); push = '0;
    while (!out_valid) @(negedge clk);
    checks++;
    if (cycles - t0 != 22) begin failures++; $display("FAIL latency %0d", cycles - t0); end
    @(negedge clk);
    // random sparse traffic, FIFOs never overfilled (one push per column per 3 cycles at most)
    for (int n = 0; n < 600; n++) begin
      @(negedge clk);
      mode = 2'(n / 150);
      out_ready = ($urandom_range(0, 3) != 0);
      push = '0;
      if (n % 3 == 0) for (int i = 0; i < N; i++) begin
        if ($urandom_range(0, 7) == 0 && expq[i].size() < 1) begin
          push[i] = 1; push_data[i] = $urandom;
          expq[i].push_back({3'(mode + 1), msk(push_data[i], mode)});
          sent++;
        end
      end
    end
    @(negedge clk); push = '0; out_ready = 1;
    while (busy) @(negedge clk);
    repeat (3) @(negedge clk);
    checks++;
    if (received != sent + 1) begin failures++; $display("FAIL received %0d of %0d", received, sent + 1); end
    checks++;
    if (overflow) begin failures++; $display("FAIL overflow without cause"); end
    // overflow: three pushes into column 0 while output is blocked
    out_ready = 0;
    for (int k = 0; k < 4; k++) begin
      push[0] = 1; push_data[0] = 32'(k);
      @(negedge clk);
    end
    push = '0;
    checks++;
    if (!overflow) begin failures++; $display("FAIL overflow not flagged"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

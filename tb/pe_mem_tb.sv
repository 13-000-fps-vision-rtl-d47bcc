// pe_mem_tb: random writes and reads of the 128 x 8 PE memory against an
// array model; reads are combinational, writes land at the clock edge.
module pe_mem_tb;
  logic clk = 0, we = 0;
  logic [6:0] addr = 0;
  logic [7:0] wdata = 0, rdata;
  logic [7:0] model [128];
  int checks = 0, failures = 0, cycles = 0;

  pe_mem #(.DEPTH(128), .W(8)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) begin
    cycles++;
    if (cycles > 20000) begin
      failures++;
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end

  initial begin
    // fill every word first
    for (int i = 0; i < 128; i++) begin
      @(negedge clk); addr = 7'(i); wdata = 8'($urandom); we = 1; model[i] = wdata;
    end
    @(negedge clk); we = 0;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      addr = 7'($urandom); we = ($urandom_range(0, 2) == 0); wdata = 8'($urandom);
      #1;
      checks++;
      if (rdata !== model[addr]) begin
        failures++;
        if (failures < 10) $display("FAIL addr=%0d got %h exp %h", addr, rdata, model[addr]);
      end
      if (we) model[addr] = wdata;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

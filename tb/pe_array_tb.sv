// pe_array_tb: a 32-column SIMD array running broadcast instructions.
// Checks neighbour exchange across columns (with zero at the edges), macro
// PE groups of 4 and 8 on the scatter bus, per-column ADC counts under a
// column-dependent comparator pattern with the global adc_pulse, and a
// conditional output push (odd columns only) in 16-bit mode. Expected values
// are computed from the column index in the testbench.
module pe_array_tb;
  import vsoc_pkg::*;
  localparam int N = 32;
  logic clk = 0, rst_n = 0, valid = 0;
  pe_instr_t instr = '0;
  logic [N-1:0] comp_in = '0, push;
  col_analog_t [N-1:0] analog;
  logic adc_pulse;
  logic [N-1:0][31:0] push_data;
  logic [1:0] out_mode;
  logic [N-1:0][NFLAGS-1:0] flags;
  int checks = 0, failures = 0, cycles = 0, pulses = 0;

  pe_array #(.N(N)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) begin
    cycles++;
    if (adc_pulse) pulses++;
    if (cycles > 5000) begin
      failures++;
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end

  task automatic ex(pe_instr_t i);
    @(negedge clk); instr = i; valid = 1;
    @(negedge clk); valid = 0; instr = '0;
  endtask
  task automatic chk(string what, int col, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s col %0d: got %0h expected %0h", what, col, got, exp);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    ex(pe_i(C_ALU, A_MOV, 0, spc(SB_COLL)));
    ex(pe_i(C_ALU, A_ADD, 1, lft(0), rgt(0)));
    for (int i = 0; i < N; i++)
      chk("neighbours", i, dut.regs[i][1],
          (i > 0 ? i - 1 : 0) + (i < N - 1 ? i + 1 : 0));
    // selector = bit 2 of the column index
    ex(pe_i(C_ALU, A_SHR, 2, own(0), spc(SB_IMM), 0, 8'd2));
    ex(pe_i(C_SPW, W_SEL, 0, own(2)));
    ex(pe_i(C_SCAT, G_SRC, 0));
    ex(pe_i(C_SCAT, G_MODE, 0, '0, '0, 0, 8'd1));
    ex(pe_i(C_ALU, A_MOV, 4, spc(SB_SCAT)));
    for (int i = 0; i < N; i++) chk("scatter 4", i, dut.regs[i][4], ((i / 4) % 2) ? (i / 4) * 4 + 3 : 0);
    ex(pe_i(C_SCAT, G_MODE, 0, '0, '0, 0, 8'd2));
    ex(pe_i(C_ALU, A_MOV, 4, spc(SB_SCAT)));
    for (int i = 0; i < N; i++) chk("scatter 8", i, dut.regs[i][4], (i / 8) * 8 + 7);
    // ADC: comparator of column i trips after i%5 pulses
    ex(pe_i(C_ADC, D_CLR));
    for (int s = 0; s < 8; s++) begin
      for (int i = 0; i < N; i++) comp_in[i] = (s >= i % 5);
      ex(pe_i(C_ADC, D_STEP));
    end
    chk("adc pulses", 0, pulses, 8);
    ex(pe_i(C_ALU, A_MOV, 5, spc(SB_ADCL)));
    for (int i = 0; i < N; i++) chk("adc count", i, dut.regs[i][5], i % 5);
    // conditional push of {r1, r0} from odd columns, 16-bit mode
    ex(pe_i(C_OUT, O_MODE, 0, '0, '0, 0, 8'd1));
    ex(pe_i(C_FLAG, {1'b0, F_MOV}, 0, '{side: S_SPEC, idx: SF_ONE}));
    ex(pe_i(C_ALU, A_AND, 6, own(0), spc(SB_IMM), 0, 8'd1));
    ex(pe_i(C_FLAG, {1'b0, F_NOT}, 0, spc(SF_Z)));
    ex(pe_i(C_CTRL, K_IF, 0, own(0)));
    @(negedge clk); instr = pe_i(C_OUT, O_PUSH, 0); valid = 1;
    #1;
    for (int i = 0; i < N; i++) begin
      chk("push", i, push[i], i % 2);
      if (i % 2) chk("push data", i, push_data[i][15:0], {dut.regs[i][1], dut.regs[i][0]});
    end
    @(negedge clk); valid = 0;
    ex(pe_i(C_CTRL, K_ENDIF));
    chk("out mode", 0, out_mode, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

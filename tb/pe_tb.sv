// pe_tb: directed self-check of one column processing element.
//
// The testbench plays the neighbours (their registers and flags), the
// scatter bus and the column comparator, issues one instruction per cycle
// and compares registers, flags, analog settings and output pushes with
// values worked out here. Covered: three-address ALU with own, neighbour,
// immediate and special operands; complement selection; the flag ALU;
// direct and indirect memory access; IF/ELSE/ENDIF with nesting; the
// activity multiplexer; ADC counting, comparator latch and overflow; the
// neighbour LUT; special register writes; output push.
module pe_tb;
  import vsoc_pkg::*;
  logic clk = 0, rst_n = 0, valid = 0;
  pe_instr_t instr = '0;
  logic [NREGS-1:0][7:0] lr = '0, rr = '0, regs;
  logic [NFLAGS-1:0] lf = '0, rf = '0, flags;
  byte_t bus = '0;
  logic comp = 0, sel, active, push;
  col_analog_t analog;
  logic [31:0] push_data;
  int checks = 0, failures = 0, cycles = 0;
  int pushes = 0;
  logic [31:0] last_push;

  pe dut (.clk(clk), .rst_n(rst_n), .valid(valid), .instr(instr), .col(10'd517),
          .left_regs(lr), .right_regs(rr), .left_flags(lf), .right_flags(rf),
          .scat_bus(bus), .comp_in(comp), .regs(regs), .flags(flags), .sel(sel),
          .active(active), .analog(analog), .push(push), .push_data(push_data));

  always #5 clk = ~clk;
  always @(posedge clk) begin
    cycles++;
    if (push) begin pushes++; last_push = push_data; end
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
  task automatic chk(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0h expected %0h", what, got, exp);
    end
  endtask
  task automatic movi(int r, int v);
    ex(pe_i(C_ALU, A_MOV, 3'(r), spc(SB_IMM), spc(SB_IMM), 0, 8'(v)));
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    // ---- ALU, three-address
    movi(1, 8'h25); movi(2, 8'h13);
    ex(pe_i(C_ALU, A_ADD, 3, own(1), own(2)));
    chk("add", regs[3], 8'h38);
    lr[4] = 8'h10; rr[5] = 8'hF5;
    ex(pe_i(C_ALU, A_ADD, 4, lft(4), rgt(5)));
    chk("neighbour add", regs[4], 8'h05);
    ex(pe_i(C_FLAG, {1'b0, F_MOV}, 7, spc(SF_C)));
    chk("carry to flag", flags[7], 1);
    ex(pe_i(C_ALU, A_SUB, 5, own(2), own(1)));
    chk("sub", regs[5], 8'hEE);
    ex(pe_i(C_ALU, A_MOV, 6, spc(SB_COLL)));
    chk("column index low", regs[6], 517 % 256);
    ex(pe_i(C_ALU, A_SHL, 6, own(2), spc(SB_IMM), 0, 8'd2));
    chk("shl", regs[6], 8'h4C);
    // ---- complement selection: f0 = 1 turns ADD into SUB
    ex(pe_i(C_FLAG, {1'b0, F_MOV}, 0, spc(SF_ONE)));
    ex(pe_i(C_ALU_CS, A_ADD, 5, own(1), own(2), 3'd0));
    chk("complement add->sub", regs[5], 8'h12);
    ex(pe_i(C_FLAG, {1'b0, F_NOT}, 0, spc(SF_ONE)));
    ex(pe_i(C_ALU_CS, A_ADD, 5, own(1), own(2), 3'd0));
    chk("complement off", regs[5], 8'h38);
    // ---- flag ALU with neighbour flags
    lf = 8'b0000_0100; rf = 8'b0000_0000;
    ex(pe_i(C_FLAG, {1'b0, F_OR}, 1, lft(2), rgt(2)));
    chk("flag or", flags[1], 1);
    ex(pe_i(C_FLAG, {1'b0, F_NAND}, 2, own(1), lft(2)));
    chk("flag nand", flags[2], 0);
    // ---- memory, direct and indirect
    ex(pe_i(C_MEM, M_ST, 3, '0, '0, 0, 8'd5));
    movi(7, 2);
    ex(pe_i(C_MEM, M_ST, 4, spc(7), '0, 0, 8'd3));   // indirect: 3 + r7 = 5, overwrites the word just stored
    ex(pe_i(C_MEM, M_LD, 6, '0, '0, 0, 8'd5));
    chk("indirect store / direct load", regs[6], 8'h05);
    ex(pe_i(C_MEM, M_ST, 1, '0, '0, 0, 8'd127));
    ex(pe_i(C_MEM, M_LD, 6, '{side: S_LEFT, idx: 3'd7}, '0, 0, 8'd125)); // 125 + r7 = 127
    chk("indirect load", regs[6], 8'h25);
    // ---- IF / ELSE / ENDIF, f3 = 1
    ex(pe_i(C_FLAG, {1'b0, F_MOV}, 3, spc(SF_ONE)));
    ex(pe_i(C_CTRL, K_IF, 0, own(3)));
      movi(0, 1);
      ex(pe_i(C_CTRL, K_IF, 0, own(3), '0, 3'd1));     // inverted: false
        movi(0, 9);
      ex(pe_i(C_CTRL, K_ELSE));
        movi(2, 7);
      ex(pe_i(C_CTRL, K_ENDIF));
    ex(pe_i(C_CTRL, K_ELSE));
      movi(0, 2);
    ex(pe_i(C_CTRL, K_ENDIF));
    chk("if taken", regs[0], 1);
    chk("nested else", regs[2], 7);
    movi(4, 8'h44);
    chk("enabled after endif", regs[4], 8'h44);
    // ---- activity multiplexer: active when NOT f3 (f3 = 1 -> inactive)
    ex(pe_i(C_CTRL, K_SETACT, 0, own(3), '0, 3'd1));
    chk("inactive", active, 0);
    movi(4, 8'h99);
    chk("write blocked", regs[4], 8'h44);
    ex(pe_i(C_CTRL, K_RESET));
    chk("active after reset", active, 1);
    // ---- ADC: 6 steps with comparator low, then it trips
    ex(pe_i(C_ADC, D_CLR));
    for (int k = 0; k < 10; k++) begin
      comp = (k >= 6);
      ex(pe_i(C_ADC, D_STEP));
    end
    comp = 0;
    ex(pe_i(C_ADC, D_STEP));   // latched: no more counting
    ex(pe_i(C_ALU, A_MOV, 5, spc(SB_ADCL)));
    chk("adc count", regs[5], 6);
    ex(pe_i(C_FLAG, {1'b0, F_MOV}, 6, spc(SF_COMP)));
    chk("comp latched", flags[6], 1);
    // overflow: preset counter to 0xFFF
    ex(pe_i(C_ADC, D_CLR));
    ex(pe_i(C_SPW, W_ADCL, 0, spc(SB_IMM), '0, 0, 8'hFF));
    ex(pe_i(C_SPW, W_ADCH, 0, spc(SB_IMM), '0, 0, 8'h0F));
    ex(pe_i(C_ADC, D_STEP));
    ex(pe_i(C_FLAG, {1'b0, F_MOV}, 6, spc(SF_OVF)));
    ex(pe_i(C_ALU, A_MOV, 5, spc(SB_ADCH)));
    chk("adc ovf", flags[6], 1);
    chk("adc wrapped", regs[5], 0);
    // ---- LUT over {left f5, f5, right f5}: truth table 0b1000_0000 = AND of all three
    lf = 8'h20; rf = 8'h20;
    ex(pe_i(C_FLAG, {1'b0, F_MOV}, 5, spc(SF_ONE)));
    ex(pe_i(C_LUT, 0, 0, own(5), '0, 0, 8'h80));
    ex(pe_i(C_ALU, A_MOV, 5, spc(SB_LUT)));
    chk("lut 111", regs[5], 1);
    rf = 8'h00;
    ex(pe_i(C_LUT, 0, 0, own(5), '0, 0, 8'h80));
    ex(pe_i(C_FLAG, {1'b0, F_MOV}, 4, spc(SF_LUT)));
    chk("lut 110", flags[4], 0);
    // ---- special registers and scatter bus
    ex(pe_i(C_SPW, W_SRC0, 0, spc(SB_IMM), '0, 0, 8'h3C));
    ex(pe_i(C_SPW, W_AMPN, 0, own(1)));
    ex(pe_i(C_SPW, W_PIXM, 0, spc(SB_IMM), '0, 0, 8'd29));
    ex(pe_i(C_SPW, W_SEL, 0, spc(SB_IMM), '0, 0, 8'd1));
    chk("src0", analog.src0, 8'h3C);
    chk("ampn", analog.ampn, 8'h25);
    chk("pixm", analog.pixm, 29);
    chk("sel", sel, 1);
    bus = 8'hA7;
    ex(pe_i(C_ALU, A_XOR, 2, spc(SB_SCAT), spc(SB_IMM), 0, 8'hFF));
    chk("scatter bus", regs[2], 8'h58);
    // ---- output push of r0..r3
    ex(pe_i(C_OUT, O_PUSH, 0));
    chk("push count", pushes, 1);
    chk("push data", last_push, {regs[3], regs[2], regs[1], regs[0]});
    ex(pe_i(C_CTRL, K_SETACT, 0, spc(SF_ONE), '0, 3'd1));   // never active
    ex(pe_i(C_OUT, O_PUSH, 0));
    chk("no push when inactive", pushes, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

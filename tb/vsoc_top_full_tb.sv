// vsoc_top_full_tb: the end-to-end run of vsoc_top_tb with the SoC at its
// full size of 1024 columns (default parameters). Otherwise identical:
// vsoc_top_tb: end-to-end run of the vision SoC on a coarse sheet-of-light
// scan.
//
// A behavioural analog model holds an image with one bright laser line per
// column (two rows at a random height) on a dim random background; some
// columns have no line. The testbench loads three programs:
//   LCTRL: for every window position k = 0, C/2, ... it sums rows into the
//          column charge as a first-derivative box filter of size C, once
//          with + on the upper half (rising edge) and once with + on the
//          lower half (falling edge), signalling the SIMD ASIP after each
//          and waiting for it before the next.
//   SIMD:  for each of those conversions it clears the ADC counters, issues
//          NSTEPS ADC steps, and keeps in every column the largest count and
//          its window index (max of the derivative in r2/r3, of the negated
//          derivative in r5/r6) under an IF on the ALU borrow. At the end a
//          column whose peak exceeds a threshold sets f7; the neighbour LUT
//          keeps f7 only where a neighbouring column also sees the line; those
//          columns push {kmax, kmin} (16-bit mode) into the output pipeline.
//          It then waits for the pipeline to drain and signals GLB.
//   GLB:   reads gpio_in, reports it, waits for SIMD and reports completion.
// The output is consumed with random back-pressure. Expected outputs are
// computed here from the image with the same quantisation (count =
// min(NSTEPS, ceil(q / UNIT)) for q > 0). Counted mechanisms: ADC comparator
// trips, IF branches not taken, LUT suppressions, output stalls, sparse
// skips, ASIP events; each must occur at least once.
module vsoc_top_full_tb;
  import vsoc_pkg::*;
  localparam int N = 1024, ROWS = 64, C = 8, UNIT = 2, NSTEPS = 63, THRESH = 12;
  localparam int NWIN = (ROWS - C) / (C / 2) + 1;

  logic clk = 0, rst_n = 0, start = 0;
  logic [2:0] prog_we = 0, halted;
  logic [11:0] prog_addr = 0;
  logic [15:0] prog_wdata = 0;
  logic line_cmd_valid, adc_pulse, out_valid, out_ready = 1, out_overflow, glb_cmd_valid;
  logic [31:0] line_cmd, out_data, glb_cmd;
  logic [N-1:0] comp_in;
  col_analog_t [N-1:0] col_analog;
  logic [9:0] out_col;
  logic [2:0] out_bytes;
  logic [15:0] gpio_in = 16'h5A3C;

  int checks = 0, failures = 0, cycles = 0;
  int n_stall = 0, n_trip = 0, n_ifskip = 0, n_lutsup = 0, n_sparse = 0, n_evt = 0, n_out = 0;

  vsoc_top dut (.*);
  analog_column_model #(.N(N), .ROWS(ROWS), .UNIT(UNIT)) u_ana (
    .clk(clk), .line_cmd_valid(line_cmd_valid), .line_cmd(line_cmd), .adc_pulse(adc_pulse), .comp(comp_in));

  always #5 clk = ~clk;
  always @(posedge clk) begin
    cycles++;
    if (cycles > 200000) begin
      failures++;
      $display("FAIL watchdog expired halted=%b busy=%0d outs=%0d pc2=%0d", halted, dut.out_busy, n_out, dut.g_asip[2].u_asip.pc);
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end

  // ------------------------------------------------------------ assembler
  logic [15:0] prg [3][$];
  function automatic logic [15:0] op(asip_op_e o, int a = 0); return {o, 12'(a)}; endfunction
  function automatic logic [15:0] mx(asip_misc_e m); return {I_MISC, 7'd0, m}; endfunction
  function automatic void emit(int k, logic [15:0] w); prg[k].push_back(w); endfunction
  function automatic void ext(int k, logic [31:0] c);
    emit(k, op(I_EXT)); emit(k, c[31:16]); emit(k, c[15:0]);
  endfunction
  function automatic void pe(pe_instr_t i); ext(2, i); endfunction

  // ------------------------------------------------------------ reference
  int linepos [N];
  int expk [N][2];
  bit expush [N];
  int got [N];

  function automatic int cnt_of(int q);
    if (q <= 0) return 0;
    return ((q + UNIT - 1) / UNIT > NSTEPS) ? NSTEPS : (q + UNIT - 1) / UNIT;
  endfunction

  initial begin
    bit lit [N];
    int peak [N];
    // image
    for (int c = 0; c < N; c++) begin
      lit[c] = ($urandom_range(0, 4) != 0) && (c % 16 != 4) && (c % 16 != 6);
      if (c % 16 == 5) lit[c] = 1;   // an isolated line segment
      linepos[c] = $urandom_range(2, ROWS - 4);
      for (int r = 0; r < ROWS; r++) begin
        int v;
        v = $urandom_range(0, 3);
        if (lit[c] && (r == linepos[c] || r == linepos[c] + 1)) v += 40;
        u_ana.set_pixel(r, c, v);
      end
    end
    // reference: same algorithm on ideal sums
    for (int c = 0; c < N; c++) begin
      int best [2];
      best = '{0, 0};
      expk[c] = '{0, 0};
      for (int w = 0; w < NWIN; w++) begin
        int k, lo, hi;
        k = w * (C / 2); lo = 0; hi = 0;
        for (int r = 0; r < C / 2; r++) begin lo += u_ana.pix[k + r][c]; hi += u_ana.pix[k + C / 2 + r][c]; end
        if (cnt_of(hi - lo) > best[0]) begin best[0] = cnt_of(hi - lo); expk[c][0] = k; end
        if (cnt_of(lo - hi) > best[1]) begin best[1] = cnt_of(lo - hi); expk[c][1] = k; end
      end
      peak[c] = best[0];
    end
    for (int c = 0; c < N; c++) begin
      bit me, l, r;
      me = peak[c] > THRESH;
      l = (c > 0) ? peak[c - 1] > THRESH : 0;
      r = (c < N - 1) ? peak[c + 1] > THRESH : 0;
      expush[c] = me && (l || r);
      if (me && !(l || r)) n_lutsup++;
      if (!me) n_sparse++;
      got[c] = 0;
    end

    // ---------------------------------------------------------- programs
    // GLB (ASIP 0)
    emit(0, mx(X_IN)); emit(0, op(I_PUSH, 12'h0)); emit(0, op(I_LUI, 4'hA)); emit(0, mx(X_SWAP)); emit(0, mx(X_EXTS));
    emit(0, op(I_WAIT, 2)); ext(0, 32'hF000_0001); emit(0, op(I_HALT));
    // LCTRL (ASIP 1)
    for (int w = 0; w < NWIN; w++) begin
      int k;
      k = w * (C / 2);
      for (int pol = 0; pol < 2; pol++) begin
        ext(1, {L_RESET, 28'd0});
        for (int r = 0; r < C / 2; r++) begin
          ext(1, {(pol == 0) ? L_ADDN : L_ADDP, 18'd0, 10'(k + r)});
          ext(1, {(pol == 0) ? L_ADDP : L_ADDN, 18'd0, 10'(k + C / 2 + r)});
        end
        emit(1, op(I_SIG, 3'b100));
        emit(1, op(I_WAIT, 2));
      end
    end
    emit(1, op(I_HALT));
    // SIMD (ASIP 2)
    for (int w = 0; w < NWIN; w++) begin
      for (int pol = 0; pol < 2; pol++) begin
        int loop;
        emit(2, op(I_WAIT, 1));
        pe(pe_i(C_ADC, D_CLR));
        emit(2, op(I_PUSH, NSTEPS));
        loop = prg[2].size();
        pe(pe_i(C_ADC, D_STEP));
        emit(2, mx(X_DEC)); emit(2, mx(X_DUP)); emit(2, op(I_JNZ, loop)); emit(2, mx(X_DROP));
        emit(2, op(I_SIG, 3'b010));          // charge may be reset now
        pe(pe_i(C_ALU, A_MOV, 1, spc(SB_ADCL)));
        pe(pe_i(C_ALU, A_SUB, 7, own(pol ? 5 : 2), own(1)));
        pe(pe_i(C_FLAG, {1'b0, F_MOV}, 1, spc(SF_C)));
        pe(pe_i(C_CTRL, K_IF, 0, own(1)));
        pe(pe_i(C_ALU, A_MOV, pol ? 5 : 2, own(1)));
        pe(pe_i(C_ALU, A_MOV, pol ? 6 : 3, own(4)));
        pe(pe_i(C_CTRL, K_ENDIF));
      end
      pe(pe_i(C_ALU, A_ADD, 4, own(4), spc(SB_IMM), 0, 8'(C / 2)));
    end
    // keep the result in PE memory and read it back
    pe(pe_i(C_MEM, M_ST, 3, '0, '0, 0, 8'd0));
    pe(pe_i(C_MEM, M_ST, 6, '0, '0, 0, 8'd1));
    pe(pe_i(C_MEM, M_LD, 1, '0, '0, 0, 8'd0));
    pe(pe_i(C_MEM, M_LD, 0, '0, '0, 0, 8'd1));
    // f7 = peak > THRESH; lut = f7 & (left f7 | right f7)
    pe(pe_i(C_ALU, A_SUB, 7, spc(SB_IMM), own(2), 0, 8'(THRESH)));
    pe(pe_i(C_FLAG, {1'b0, F_MOV}, 7, spc(SF_C)));
    pe(pe_i(C_LUT, 0, 0, own(7), '0, 0, 8'hC8));
    pe(pe_i(C_OUT, O_MODE, 0, '0, '0, 0, 8'd1));
    pe(pe_i(C_CTRL, K_IF, 0, spc(SF_LUT)));
    pe(pe_i(C_OUT, O_PUSH, 0));
    pe(pe_i(C_CTRL, K_ENDIF));
    begin
      int wl;
      wl = prg[2].size();
      emit(2, mx(X_IN)); emit(2, op(I_PUSH, 1)); emit(2, mx(X_AND)); emit(2, op(I_JNZ, wl));
    end
    emit(2, op(I_SIG, 3'b001));
    emit(2, op(I_HALT));

    // ---------------------------------------------------------- load, run
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < 3; k++) begin
      foreach (prg[k][i]) begin
        @(negedge clk); prog_we = 3'b001 << k; prog_addr = 12'(i); prog_wdata = prg[k][i];
      end
    end
    @(negedge clk); prog_we = 0; start = 1;
    @(negedge clk); start = 0;
    wait (halted == 3'b111);
    repeat (4) @(negedge clk);
    for (int c = 0; c < N; c++) begin
      checks++;
      if (got[c] != int'(expush[c])) begin
        failures++; $display("FAIL column %0d reported %0d times, expected %0d", c, got[c], expush[c]);
      end
    end
    checks++;
    if (out_overflow) begin failures++; $display("FAIL output overflow"); end
    $display("mechanisms: adc_trip=%0d if_skip=%0d lut_suppress=%0d out_stall=%0d sparse_skip=%0d events=%0d outputs=%0d cycles=%0d",
             n_trip, n_ifskip, n_lutsup, n_stall, n_sparse, n_evt, n_out, cycles);
    if (n_trip == 0)   begin failures++; $display("FAIL no ADC trip"); end
    if (n_ifskip == 0) begin failures++; $display("FAIL no IF skipped"); end
    if (n_lutsup == 0) begin failures++; $display("FAIL no LUT suppression"); end
    if (n_stall == 0)  begin failures++; $display("FAIL no output stall"); end
    if (n_sparse == 0) begin failures++; $display("FAIL no sparse skip"); end
    if (n_evt == 0)    begin failures++; $display("FAIL no ASIP event"); end
    checks += 6;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------------ monitors
  int glb_seen = 0;
  always @(posedge clk) if (rst_n) begin
    out_ready <= !out_valid || ($urandom_range(0, 2) != 0);
    if (out_valid && !out_ready) n_stall++;
    if (adc_pulse) for (int c = 0; c < N; c++) if (comp_in[c]) n_trip++;
    if (|dut.g_asip[2].u_asip.sig_out || |dut.g_asip[1].u_asip.sig_out) n_evt++;
    if (dut.cmd_valid[2] && dut.cmd[2][31:28] == C_CTRL && dut.cmd[2][27:24] == K_IF)
      for (int c = 0; c < N; c++) if (dut.cmd[2][20:16] == 5'd1 && !dut.flags[c][1]) n_ifskip++;
    if (glb_cmd_valid) begin
      checks++;
      if (glb_seen == 0 && glb_cmd != {16'hA000, gpio_in}) begin failures++; $display("FAIL glb gpio report %h", glb_cmd); end
      if (glb_seen == 1 && glb_cmd != 32'hF000_0001)       begin failures++; $display("FAIL glb done %h", glb_cmd); end
      glb_seen++;
    end
    if (out_valid && out_ready) begin
      n_out++;
      checks++;
      if (out_col >= N || out_bytes != 3'd2 || out_data != {16'h0, 8'(expk[out_col][0]), 8'(expk[out_col][1])}) begin
        failures++;
        $display("FAIL output col %0d bytes %0d data %h expected kmax %0d kmin %0d", out_col, out_bytes, out_data,
                 expk[out_col % N][0], expk[out_col % N][1]);
      end
      if (out_col < N) got[out_col]++;
    end
  end
endmodule

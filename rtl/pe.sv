// pe: one column processing element (PE) of the SIMD array.
//
// Every column of the sensor has one PE. All PEs execute the same broadcast
// instruction (vsoc_pkg::pe_instr_t) in the same cycle, each on its own data.
// A PE holds 8 working registers r0..r7 and 8 working flags f0..f7, and
// reads its left and right neighbours' registers and flags as operands
// (three-address form: dst = a op b). Around the 8-bit ALU and the 1-bit
// flag ALU sit:
//   * a 128 x 8 bit memory (pe_mem), direct or register-indirect address;
//   * the ADC result counter adch:adcl (12 bit) with the latched comparator
//     bit comp and the overflow bit ovf: a STEP instruction counts while the
//     column comparator has not tripped, so the conversion algorithm is the
//     program's (single slope = a run of STEPs);
//   * a look-up table result `lut` = truth_table[{left f_i, f_i, right f_i}];
//   * the activity multiplexer: a PE is active when the flag stack enable is
//     set and the selected flag (or its inverse, or constant 1) is 1;
//     inactive PEs change no register, flag, memory word or output;
//   * the flag stack (flag_stack) for IF/ELSE/ENDIF;
//   * complement selection: class C_ALU_CS runs the inverse operation in the
//     PEs whose flag f[csf] is set;
//   * calibration and analog memory settings src0, src1, ampp, ampn, pixm, the
//     column selector bit `sel` (drives the scatter bus), and a push of up to
//     four registers {r[d+3], r[d+2], r[d+1], r[d]} to the output pipeline.
// The register set follows the chip's PE; encodings, the 12-bit counter
// scheme, reset values and widths of the calibration registers are this
// design's choices.
//
// Timing: one instruction per cycle while `valid`; results are written at
// the clock edge. `push` and `push_data` are combinational in the cycle of
// the OUT instruction. Neighbour inputs of edge columns are tied to 0 by the
// array.
module pe
  import vsoc_pkg::*;
(
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   valid,
  input  pe_instr_t              instr,
  input  logic [9:0]             col,
  input  logic [NREGS-1:0][7:0]  left_regs,
  input  logic [NREGS-1:0][7:0]  right_regs,
  input  logic [NFLAGS-1:0]      left_flags,
  input  logic [NFLAGS-1:0]      right_flags,
  input  byte_t                  scat_bus,
  input  logic                   comp_in,
  output logic [NREGS-1:0][7:0]  regs,
  output logic [NFLAGS-1:0]      flags,
  output logic                   sel,
  output logic                   active,
  output col_analog_t            analog,
  output logic                   push,
  output logic [31:0]            push_data
);
  // ---------------------------------------------------------------- state
  logic              st_c, st_z, st_n;     // ALU status of the last operation
  logic              lut;
  logic [ADC_BITS-1:0] cnt;
  logic              comp_l, ovf;
  opnd_t             act_sel;
  logic              act_inv;
  logic              en;

  // ------------------------------------------------------------- operands
  function automatic byte_t byte_opnd(opnd_t o);
    unique case (o.side)
      S_OWN:   return regs[o.idx];
      S_LEFT:  return left_regs[o.idx];
      S_RIGHT: return right_regs[o.idx];
      default: begin
        unique case (o.idx)
          SB_IMM:  return instr.imm;
          SB_ADCL: return cnt[7:0];
          SB_ADCH: return byte_t'(cnt[ADC_BITS-1:8]);
          SB_SCAT: return scat_bus;
          SB_LUT:  return byte_t'(lut);
          SB_COLL: return col[7:0];
          SB_COLH: return byte_t'(col[9:8]);
          default: return flags;
        endcase
      end
    endcase
  endfunction

  function automatic logic flag_opnd(opnd_t o);
    unique case (o.side)
      S_OWN:   return flags[o.idx];
      S_LEFT:  return left_flags[o.idx];
      S_RIGHT: return right_flags[o.idx];
      default: begin
        unique case (o.idx)
          SF_C:    return st_c;
          SF_Z:    return st_z;
          SF_N:    return st_n;
          SF_LUT:  return lut;
          SF_COMP: return comp_l;
          SF_OVF:  return ovf;
          SF_SEL:  return sel;
          default: return 1'b1;
        endcase
      end
    endcase
  endfunction

  byte_t opa, opb;
  logic  fa, fb;
  assign opa = byte_opnd(instr.a);
  assign opb = byte_opnd(instr.b);
  assign fa  = flag_opnd(instr.a);
  assign fb  = flag_opnd(instr.b);

  assign active = en & (act_inv ^ flag_opnd(act_sel));

  // ---------------------------------------------------------------- ALUs
  byte_t alu_y;
  logic  alu_c, alu_z, alu_n;
  logic  alu_inv;
  assign alu_inv = (instr.cls == C_ALU_CS) & flags[instr.csf];

  pe_alu u_alu (
    .op(instr.op), .inv(alu_inv), .a(opa), .b(opb), .cin(st_c),
    .y(alu_y), .cout(alu_c), .zero(alu_z), .neg(alu_n)
  );

  logic flag_y;
  always_comb begin
    unique case (flag_op_e'(instr.op[2:0]))
      F_AND:  flag_y = fa & fb;
      F_NAND: flag_y = ~(fa & fb);
      F_OR:   flag_y = fa | fb;
      F_NOR:  flag_y = ~(fa | fb);
      F_XOR:  flag_y = fa ^ fb;
      F_XNOR: flag_y = ~(fa ^ fb);
      F_MOV:  flag_y = fa;
      default: flag_y = ~fa;
    endcase
  end

  // -------------------------------------------------------------- memory
  logic [PMEM_AW-1:0] maddr;
  byte_t              mrdata;
  logic               mwe;
  assign maddr = instr.imm[PMEM_AW-1:0] + (instr.a.side[0] ? regs[instr.a.idx][PMEM_AW-1:0] : '0);
  assign mwe   = valid && active && instr.cls == C_MEM && instr.op == M_ST;

  pe_mem #(.DEPTH(1 << PMEM_AW), .W(8)) u_mem (
    .clk(clk), .addr(maddr), .we(mwe), .wdata(regs[instr.dst]), .rdata(mrdata)
  );

  // ---------------------------------------------------------- flag stack
  logic fs_push, fs_pop, fs_clear, fs_top, fs_empty, fs_ovf;
  logic if_cond;
  assign if_cond  = fa ^ instr.csf[0];
  assign fs_push  = valid && instr.cls == C_CTRL && instr.op == K_IF;
  assign fs_pop   = valid && instr.cls == C_CTRL && instr.op == K_ENDIF;
  assign fs_clear = valid && instr.cls == C_CTRL && instr.op == K_RESET;

  flag_stack #(.DEPTH(8)) u_fs (
    .clk(clk), .rst_n(rst_n), .clear(fs_clear), .push(fs_push), .pop(fs_pop),
    .din(en), .top(fs_top), .empty(fs_empty), .overflow(fs_ovf)
  );

  // -------------------------------------------------------------- output
  logic [2:0] d0, d1, d2, d3;
  assign d0 = instr.dst;
  assign d1 = instr.dst + 3'd1;
  assign d2 = instr.dst + 3'd2;
  assign d3 = instr.dst + 3'd3;
  assign push      = valid && active && instr.cls == C_OUT && instr.op == O_PUSH;
  assign push_data = {regs[d3], regs[d2], regs[d1], regs[d0]};

  // ------------------------------------------------------------ execute
  logic [3:0] lut_idx;
  assign lut_idx = {1'b0, left_flags[instr.a.idx], flags[instr.a.idx], right_flags[instr.a.idx]};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      regs    <= '0;
      flags   <= '0;
      {st_c, st_z, st_n} <= '0;
      lut     <= 1'b0;
      cnt     <= '0;
      comp_l  <= 1'b0;
      ovf     <= 1'b0;
      analog  <= '0;
      sel     <= 1'b0;
      act_sel <= '{side: S_SPEC, idx: SF_ONE};
      act_inv <= 1'b0;
      en      <= 1'b1;
    end else if (valid) begin
      unique case (instr.cls)
        C_ALU, C_ALU_CS: if (active) begin
          regs[instr.dst] <= alu_y;
          {st_c, st_z, st_n} <= {alu_c, alu_z, alu_n};
        end
        C_FLAG: if (active) flags[instr.dst] <= flag_y;
        C_MEM: if (active && instr.op == M_LD) regs[instr.dst] <= mrdata;
        C_CTRL: begin
          unique case (instr.op)
            K_IF:     en <= en & if_cond;
            K_ELSE:   en <= fs_top & ~en;
            K_ENDIF:  en <= fs_top;
            K_SETACT: begin act_sel <= instr.a; act_inv <= instr.csf[0]; end
            K_RESET:  begin en <= 1'b1; act_sel <= '{side: S_SPEC, idx: SF_ONE}; act_inv <= 1'b0; end
            default: ;
          endcase
        end
        C_ADC: if (active) begin
          if (instr.op == D_CLR) begin
            cnt <= '0; comp_l <= 1'b0; ovf <= 1'b0;
          end else if (instr.op == D_STEP && !comp_l) begin
            if (comp_in) comp_l <= 1'b1;
            else begin
              cnt <= cnt + 1'b1;
              if (&cnt) ovf <= 1'b1;
            end
          end
        end
        C_SPW: if (active) begin
          unique case (instr.op)
            W_SRC0: analog.src0 <= opa;
            W_SRC1: analog.src1 <= opa;
            W_AMPP: analog.ampp <= opa;
            W_AMPN: analog.ampn <= opa;
            W_PIXM: analog.pixm <= opa[4:0];
            W_SEL:  sel <= opa[0];
            W_ADCL: cnt[7:0] <= opa;
            W_ADCH: cnt[ADC_BITS-1:8] <= opa[ADC_BITS-9:0];
            default: ;
          endcase
        end
        C_LUT: if (active) lut <= instr.imm[lut_idx[2:0]];
        default: ;
      endcase
    end
  end

  // The flag stack overflow is a programming error; it is reported in
  // simulation and otherwise ignored.
  always_ff @(posedge clk) begin
    if (fs_ovf) assert (!fs_push) else $error("pe %0d: flag stack overflow", col);
  end
  logic unused;
  assign unused = fs_empty ^ lut_idx[3];
endmodule

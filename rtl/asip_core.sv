// asip_core: 16-bit stack-based control processor.
//
// The chip is controlled by three application-specific processors of this
// kind: the SIMD ASIP (drives the PE array, the ADC counters and the output
// pipeline), the LCTRL ASIP (drives the pixel matrix and analog memory) and
// the GLB ASIP (talks to the outside). Each has a program memory (4096 x 16,
// 8 kB), a 256-word stack and a 2048 x 16 (4 kB) scratchpad, a data input, a
// command output to the unit it controls and events to synchronise with the
// other two. The memory sizes are the chip's; the instruction set is this
// design's own small stack machine (vsoc_pkg::asip_op_e):
//   PUSH imm12, LUI imm4 (sets tos[15:12]), JMP/JZ/JNZ addr12 (JZ/JNZ pop),
//   EXT (the next two program words form a 32-bit command, hi word first),
//   SIG mask3 (event to ASIP k for each set bit), WAIT k (block until an
//   event from ASIP k is pending, then consume it), DELAY n (n+1 cycles),
//   HALT, and MISC: DUP DROP SWAP OVER ADD SUB AND OR XOR NOT SHL SHR INC DEC,
//   LD (tos = spad[tos]), ST (spad[tos] = nos, pops both), IN (push ext_in),
//   EXTS (command {nos, tos}, pops both). Binary operations compute nos op tos.
//
// Timing: one instruction per cycle. EXT and EXTS hold cmd_valid until
// cmd_ready; WAIT stalls until the event is pending. The top of stack is a
// register; the rest of the stack is the array `stk` with sp pointing at the
// next-on-stack word. Stack over/underflow wraps silently. `start` (pulse)
// begins execution at address 0 with an empty stack; `halted` is set by HALT.
// Programs are written through prog_we/prog_addr/prog_wdata while stopped.
module asip_core
  import vsoc_pkg::*;
#(
  parameter int unsigned PMEM_WORDS  = 4096,
  parameter int unsigned STACK_WORDS = 256,
  parameter int unsigned SPAD_WORDS  = 2048,
  parameter int unsigned ID          = 0
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  logic        prog_we,
  input  logic [11:0] prog_addr,
  input  logic [15:0] prog_wdata,
  output logic        cmd_valid,
  output logic [31:0] cmd,
  input  logic        cmd_ready,
  input  logic [15:0] ext_in,
  output logic [2:0]  sig_out,
  input  logic [2:0]  evt_in,
  output logic        running,
  output logic        halted
);
  localparam int unsigned PAW = $clog2(PMEM_WORDS);
  localparam int unsigned SAW = $clog2(STACK_WORDS);
  localparam int unsigned DAW = $clog2(SPAD_WORDS);

  logic [15:0] pmem [PMEM_WORDS];
  logic [15:0] stk  [STACK_WORDS];
  logic [15:0] spad [SPAD_WORDS];

  logic [PAW-1:0] pc;
  logic [SAW-1:0] sp;
  logic [15:0]    tos, nos, nnos;
  logic [11:0]    dcnt;
  logic [2:0]     pending;

  logic [15:0]    ir;
  asip_op_e       op;
  logic [11:0]    arg;
  asip_misc_e     mop;

  assign ir   = pmem[pc];
  assign op   = asip_op_e'(ir[15:12]);
  assign arg  = ir[11:0];
  assign mop  = asip_misc_e'(ir[4:0]);
  assign nos  = stk[sp];
  assign nnos = stk[sp - 1'b1];

  always_comb begin
    cmd_valid = 1'b0;
    cmd       = {nos, tos};
    sig_out   = 3'b000;
    if (running) begin
      if (op == I_EXT) begin
        cmd_valid = 1'b1;
        cmd       = {pmem[pc + PAW'(1)], pmem[pc + PAW'(2)]};
      end else if (op == I_MISC && mop == X_EXTS) begin
        cmd_valid = 1'b1;
      end
      if (op == I_SIG) sig_out = arg[2:0];
    end
  end

  always_ff @(posedge clk) begin
    if (prog_we) pmem[prog_addr[PAW-1:0]] <= prog_wdata;
  end

  logic wait_hit;
  assign wait_hit = running && op == I_WAIT && pending[arg[1:0]];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) pending <= '0;
    else        pending <= (pending | evt_in) & ~(wait_hit ? (3'b001 << arg[1:0]) : 3'b000);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      running <= 1'b0;
      halted  <= 1'b0;
      pc      <= '0;
      sp      <= '0;
      tos     <= '0;
      dcnt    <= '0;
    end else if (start) begin
      running <= 1'b1;
      halted  <= 1'b0;
      pc      <= '0;
      sp      <= '0;
      tos     <= '0;
      dcnt    <= '0;
    end else if (running) begin
      unique case (op)
        I_MISC: begin
          pc <= pc + 1'b1;
          unique case (mop)
            X_DUP:  begin stk[sp + 1'b1] <= tos; sp <= sp + 1'b1; end
            X_DROP: begin tos <= nos; sp <= sp - 1'b1; end
            X_SWAP: begin tos <= nos; stk[sp] <= tos; end
            X_OVER: begin stk[sp + 1'b1] <= tos; sp <= sp + 1'b1; tos <= nos; end
            X_ADD:  begin tos <= nos + tos; sp <= sp - 1'b1; end
            X_SUB:  begin tos <= nos - tos; sp <= sp - 1'b1; end
            X_AND:  begin tos <= nos & tos; sp <= sp - 1'b1; end
            X_OR:   begin tos <= nos | tos; sp <= sp - 1'b1; end
            X_XOR:  begin tos <= nos ^ tos; sp <= sp - 1'b1; end
            X_NOT:  tos <= ~tos;
            X_SHL:  tos <= tos << 1;
            X_SHR:  tos <= tos >> 1;
            X_INC:  tos <= tos + 16'd1;
            X_DEC:  tos <= tos - 16'd1;
            X_LD:   tos <= spad[tos[DAW-1:0]];
            X_ST:   begin spad[tos[DAW-1:0]] <= nos; tos <= nnos; sp <= sp - SAW'(2); end
            X_IN:   begin stk[sp + 1'b1] <= tos; sp <= sp + 1'b1; tos <= ext_in; end
            X_EXTS: begin
              if (cmd_ready) begin tos <= nnos; sp <= sp - SAW'(2); end
              else pc <= pc;
            end
            default: ;
          endcase
        end
        I_PUSH:  begin stk[sp + 1'b1] <= tos; sp <= sp + 1'b1; tos <= {4'h0, arg}; pc <= pc + 1'b1; end
        I_LUI:   begin tos[15:12] <= arg[3:0]; pc <= pc + 1'b1; end
        I_JMP:   pc <= arg[PAW-1:0];
        I_JZ:    begin tos <= nos; sp <= sp - 1'b1; pc <= (tos == 16'd0) ? arg[PAW-1:0] : pc + 1'b1; end
        I_JNZ:   begin tos <= nos; sp <= sp - 1'b1; pc <= (tos != 16'd0) ? arg[PAW-1:0] : pc + 1'b1; end
        I_EXT:   if (cmd_ready) pc <= pc + PAW'(3);
        I_SIG:   pc <= pc + 1'b1;
        I_WAIT:  if (wait_hit) pc <= pc + 1'b1;
        I_DELAY: begin
          if (dcnt == arg) begin dcnt <= '0; pc <= pc + 1'b1; end
          else dcnt <= dcnt + 1'b1;
        end
        I_HALT:  begin running <= 1'b0; halted <= 1'b1; end
        default: pc <= pc + 1'b1;
      endcase
    end
  end

  logic unused;
  assign unused = ^{ID, arg[11:PAW > 11 ? 11 : PAW]};
endmodule

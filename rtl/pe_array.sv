// pe_array: the column-parallel SIMD array, N processing elements (pe) that
// execute one broadcast instruction per cycle.
//
// Column i reads the registers and flags of columns i-1 (left) and i+1
// (right); the missing neighbours at both edges read as zero. The array also
// holds the state that is common to all columns:
//   * scatter mode (macro PE size 1/4/8/16) and the register each selected
//     PE drives onto its group bus (scatter_unit);
//   * the output word mode (8/16/24/32 bit) used by the output pipeline;
//   * adc_pulse, high in the cycle of an ADC STEP instruction, which fires
//     the column current sources of the analog converter.
// Interface: instr/valid from the SIMD ASIP; comp_in from the column
// comparators; per-column analog settings, pushes and pushed words out.
// The array never stalls. Array-global state resets to mode 0 and source
// register r0. These conventions are this design's; the array size (1024
// columns) is the chip's.
module pe_array
  import vsoc_pkg::*;
#(
  parameter int unsigned N = 1024
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    valid,
  input  pe_instr_t               instr,
  input  logic [N-1:0]            comp_in,
  output col_analog_t [N-1:0]     analog,
  output logic                    adc_pulse,
  output logic [N-1:0]            push,
  output logic [N-1:0][31:0]      push_data,
  output logic [1:0]              out_mode,
  output logic [N-1:0][NFLAGS-1:0] flags
);
  logic [N-1:0][NREGS-1:0][7:0] regs;
  logic [N-1:0]                 sel, active;
  logic [N-1:0][7:0]            drv_data, bus;
  logic [1:0]                   scat_mode;
  logic [2:0]                   scat_src;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      scat_mode <= 2'd0;
      scat_src  <= 3'd0;
      out_mode  <= 2'd0;
    end else if (valid) begin
      if (instr.cls == C_SCAT && instr.op == G_MODE) scat_mode <= instr.imm[1:0];
      if (instr.cls == C_SCAT && instr.op == G_SRC)  scat_src  <= instr.dst;
      if (instr.cls == C_OUT  && instr.op == O_MODE) out_mode  <= instr.imm[1:0];
    end
  end

  assign adc_pulse = valid && instr.cls == C_ADC && instr.op == D_STEP;

  for (genvar i = 0; i < N; i++) begin : g_col
    logic [NREGS-1:0][7:0] lr, rr;
    logic [NFLAGS-1:0]     lf, rf;
    if (i == 0) begin : g_l0
      assign lr = '0;
      assign lf = '0;
    end else begin : g_l
      assign lr = regs[i-1];
      assign lf = flags[i-1];
    end
    if (i == N-1) begin : g_rN
      assign rr = '0;
      assign rf = '0;
    end else begin : g_r
      assign rr = regs[i+1];
      assign rf = flags[i+1];
    end
    assign drv_data[i] = regs[i][scat_src];

    pe u_pe (
      .clk(clk), .rst_n(rst_n), .valid(valid), .instr(instr), .col(10'(i)),
      .left_regs(lr), .right_regs(rr), .left_flags(lf), .right_flags(rf),
      .scat_bus(bus[i]), .comp_in(comp_in[i]),
      .regs(regs[i]), .flags(flags[i]), .sel(sel[i]), .active(active[i]),
      .analog(analog[i]), .push(push[i]), .push_data(push_data[i])
    );
  end

  scatter_unit #(.N(N)) u_scat (
    .mode(scat_mode), .drv_en(sel), .drv_data(drv_data), .bus(bus)
  );

  logic unused;
  assign unused = ^active;
endmodule

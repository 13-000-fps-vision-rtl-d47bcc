// vsoc_top: digital core of the column-parallel vision system-on-chip.
//
// A 1024-column SIMD processor array sits under the pixel field. Column
// charges (sums of pixel charges, which gives analog convolution across
// rows) are converted by per-column single-slope style ADCs whose counters
// live in the PEs; the PEs then process the results and push the few values
// worth reporting into a sparse output pipeline. Three 16-bit stack ASIPs run
// the chip:
//   ASIP 0  GLB    commands to peripherals (glb_cmd), reads gpio_in;
//   ASIP 1  LCTRL  line-control commands to the pixel matrix (line_cmd);
//   ASIP 2  SIMD   broadcast instructions to the PE array (and through it
//                  the ADC pulses and the output pipeline); reads
//                  {any column with f0 set, output overflow, output busy}.
// Any ASIP can send an event to any other (SIG/WAIT), which is how the pixel
// readout and the column processing are interleaved.
//
// Everything analog (pixel cells, readout amplifiers, current sources and
// comparators, analog memory) and the LVDS/SPI/JTAG/GPIO/NoC blocks are
// outside this module: their digital signals are ports. Programs are loaded
// through a plain write port per ASIP (prog_we bit k selects ASIP k) and all
// three start on `start`. The line command format is [31:28] op (1 reset
// column charge, 2 add row with positive charge, 3 add row with negative
// charge), [9:0] row; it and the port grouping are this design's choices.
module vsoc_top
  import vsoc_pkg::*;
#(
  parameter int unsigned N = 1024
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                start,
  input  logic [2:0]          prog_we,
  input  logic [11:0]         prog_addr,
  input  logic [15:0]         prog_wdata,
  output logic [2:0]          halted,
  // line control (LCTRL ASIP -> pixel matrix / analog memory)
  output logic                line_cmd_valid,
  output logic [31:0]         line_cmd,
  // analog column interface
  input  logic [N-1:0]        comp_in,
  output logic                adc_pulse,
  output col_analog_t [N-1:0] col_analog,
  // sparse output stream (to the LVDS transmitter)
  output logic                out_valid,
  input  logic                out_ready,
  output logic [9:0]          out_col,
  output logic [31:0]         out_data,
  output logic [2:0]          out_bytes,
  output logic                out_overflow,
  // global control (GLB ASIP)
  output logic                glb_cmd_valid,
  output logic [31:0]         glb_cmd,
  input  logic [15:0]         gpio_in
);
  localparam int unsigned GLB = 0, LCTRL = 1, SIMD = 2;

  logic [2:0][2:0]  sig;       // sig[k][j]: ASIP k signals ASIP j
  logic [2:0][2:0]  evt;       // evt[j][k]: ASIP j receives from ASIP k
  logic [2:0]       cmd_valid, cmd_ready, running;
  logic [2:0][31:0] cmd;
  logic [2:0][15:0] ext_in;

  for (genvar j = 0; j < 3; j++) begin : g_evt
    for (genvar k = 0; k < 3; k++) begin : g_src
      assign evt[j][k] = sig[k][j];
    end
  end

  logic [N-1:0]              push;
  logic [N-1:0][31:0]        push_data;
  logic [1:0]                out_mode;
  logic [N-1:0][NFLAGS-1:0]  flags;
  logic [N-1:0]              f0;
  logic                      out_busy;

  for (genvar i = 0; i < N; i++) begin : g_f0
    assign f0[i] = flags[i][0];
  end

  assign ext_in[GLB]   = gpio_in;
  assign ext_in[LCTRL] = gpio_in;
  assign ext_in[SIMD]  = {13'd0, |f0, out_overflow, out_busy};
  assign cmd_ready     = 3'b111;

  for (genvar k = 0; k < 3; k++) begin : g_asip
    asip_core #(.ID(k)) u_asip (
      .clk(clk), .rst_n(rst_n), .start(start),
      .prog_we(prog_we[k]), .prog_addr(prog_addr), .prog_wdata(prog_wdata),
      .cmd_valid(cmd_valid[k]), .cmd(cmd[k]), .cmd_ready(cmd_ready[k]),
      .ext_in(ext_in[k]), .sig_out(sig[k]), .evt_in(evt[k]),
      .running(running[k]), .halted(halted[k])
    );
  end

  assign line_cmd_valid = cmd_valid[LCTRL];
  assign line_cmd       = cmd[LCTRL];
  assign glb_cmd_valid  = cmd_valid[GLB];
  assign glb_cmd        = cmd[GLB];

  pe_array #(.N(N)) u_array (
    .clk(clk), .rst_n(rst_n), .valid(cmd_valid[SIMD]), .instr(pe_instr_t'(cmd[SIMD])),
    .comp_in(comp_in), .analog(col_analog), .adc_pulse(adc_pulse),
    .push(push), .push_data(push_data), .out_mode(out_mode), .flags(flags)
  );

  out_pipeline #(.N(N), .FIFO_DEPTH(2)) u_out (
    .clk(clk), .rst_n(rst_n), .mode(out_mode), .push(push), .push_data(push_data),
    .out_valid(out_valid), .out_ready(out_ready), .out_col(out_col),
    .out_data(out_data), .out_bytes(out_bytes), .busy(out_busy), .overflow(out_overflow)
  );

  logic unused;
  assign unused = ^running;
endmodule

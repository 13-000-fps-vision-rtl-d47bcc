// analog_column_model: behavioural model of the pixel matrix, the column
// readout path and the charge-based ADC front end, for testbenches only.
//
// Each column holds a charge q. A line command adds the charge of one pixel
// row to every column, positively (op 2) or negatively (op 3), or clears the
// charge (op 1); this is how rows are weighted and summed in the charge
// domain. Each adc_pulse removes UNIT from every column, as the pulsed
// current sources do, and comp[c] is high once q[c] <= 0. Pixel values are
// set by the testbench through set_pixel(). Commands and pulses act at the
// rising clock edge.
module analog_column_model #(
  parameter int N    = 32,
  parameter int ROWS = 64,
  parameter int UNIT = 2
) (
  input  logic         clk,
  input  logic         line_cmd_valid,
  input  logic [31:0]  line_cmd,
  input  logic         adc_pulse,
  output logic [N-1:0] comp
);
  int pix [ROWS][N];
  int q [N];

  function automatic void set_pixel(int r, int c, int v);
    pix[r][c] = v;
  endfunction

  initial for (int c = 0; c < N; c++) q[c] = 0;

  always @(posedge clk) begin
    for (int c = 0; c < N; c++) begin
      int nq;
      nq = q[c];
      if (line_cmd_valid) begin
        case (line_cmd[31:28])
          4'd1: nq = 0;
          4'd2: nq = nq + pix[line_cmd[9:0] % ROWS][c];
          4'd3: nq = nq - pix[line_cmd[9:0] % ROWS][c];
          default: ;
        endcase
      end
      if (adc_pulse) nq = nq - UNIT;
      q[c] <= nq;
    end
  end

  always_comb for (int c = 0; c < N; c++) comp[c] = (q[c] <= 0);
endmodule

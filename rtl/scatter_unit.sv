// scatter_unit: joins neighbouring column PEs into macro PEs of 1, 4, 8 or 16
// columns so that data can be exchanged across up to 16 columns in one cycle.
//
// Each aligned group of columns shares one 8-bit bus. A PE whose `drv_en` is
// set (its selector bit) puts `drv_data` on its group's bus; the bus carries
// the OR of all drivers of the group, and every PE of the group reads it in
// the same cycle. With one selected PE per group this is a broadcast; with
// single-bit data it is an any-of test. Group sizes follow the chip; the
// wired-OR bus is this design's realisation of the exchange.
//
// Purely combinational: an OR tree of depth 2 (size 4), 3 (8) or 4 (16).
// mode: 0 = no grouping (each PE sees its own driven value), 1 = 4, 2 = 8,
// 3 = 16 columns. N must be a multiple of 16.
module scatter_unit #(
  parameter int unsigned N = 1024
) (
  input  logic [1:0]         mode,
  input  logic [N-1:0]       drv_en,
  input  logic [N-1:0][7:0]  drv_data,
  output logic [N-1:0][7:0]  bus
);
  logic [N-1:0][7:0]    or1;
  logic [N/4-1:0][7:0]  or4;
  logic [N/8-1:0][7:0]  or8;
  logic [N/16-1:0][7:0] or16;

  for (genvar i = 0; i < N; i++) begin : g_drv
    assign or1[i] = drv_en[i] ? drv_data[i] : 8'h00;
  end
  for (genvar k = 0; k < N/4; k++) begin : g_or4
    assign or4[k] = or1[4*k] | or1[4*k+1] | or1[4*k+2] | or1[4*k+3];
  end
  for (genvar k = 0; k < N/8; k++) begin : g_or8
    assign or8[k] = or4[2*k] | or4[2*k+1];
  end
  for (genvar k = 0; k < N/16; k++) begin : g_or16
    assign or16[k] = or8[2*k] | or8[2*k+1];
  end
  for (genvar i = 0; i < N; i++) begin : g_bus
    always_comb begin
      unique case (mode)
        2'd0:    bus[i] = or1[i];
        2'd1:    bus[i] = or4[i/4];
        2'd2:    bus[i] = or8[i/8];
        default: bus[i] = or16[i/16];
      endcase
    end
  end
endmodule

// flag_stack: one-bit stack of a column processing element for nested
// conditional execution in the SIMD array.
//
// IF pushes the current enable bit, ENDIF pops it, ELSE reads the top. An
// empty stack reads 1, so code outside any IF runs in every enabled column.
// Pushing onto a full stack drops the bit and sets the sticky `overflow`;
// popping an empty stack does nothing. The depth is this design's choice
// (default 8 nesting levels). Push and pop take effect at the next clock
// edge; `top` and `empty` are registered state.
module flag_stack #(
  parameter int unsigned DEPTH = 8
) (
  input  logic clk,
  input  logic rst_n,
  input  logic clear,
  input  logic push,
  input  logic pop,
  input  logic din,
  output logic top,
  output logic empty,
  output logic overflow
);
  localparam int unsigned CW = $clog2(DEPTH + 1);
  logic [DEPTH-1:0] bits;
  logic [CW-1:0]    cnt;

  assign empty = (cnt == '0);
  assign top   = empty ? 1'b1 : bits[0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bits     <= '0;
      cnt      <= '0;
      overflow <= 1'b0;
    end else if (clear) begin
      cnt      <= '0;
      overflow <= 1'b0;
    end else if (push && !pop) begin
      if (cnt == CW'(DEPTH)) overflow <= 1'b1;
      else begin
        bits <= {bits[DEPTH-2:0], din};
        cnt  <= cnt + 1'b1;
      end
    end else if (pop && !push && !empty) begin
      bits <= {1'b0, bits[DEPTH-1:1]};
      cnt  <= cnt - 1'b1;
    end
  end
endmodule

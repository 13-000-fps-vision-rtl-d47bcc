// pe_alu: 8-bit arithmetic/logic unit of one column processing element.
//
// Purely combinational. Operations come in pairs that differ in bit 0 of the
// opcode (ADD/SUB, AND/NAND, OR/NOR, XOR/XNOR, SHL/SHR, MOV/NOT, MIN/MAX,
// ADC/SBC). Complement selection is the chip's mechanism for running either
// an operation or its inverse depending on a local flag; here `inv` flips bit
// 0 of the opcode. The set of pairs beyond ADD/SUB, SHL/SHR and AND/NAND, the
// unsigned MIN/MAX, the shift amount taken from b[2:0] and the borrow
// convention of SUB (cout = 1 when a < b) are this design's choices.
//
// Outputs: y (result), cout (carry out of ADD/ADC, borrow out of SUB/SBC,
// last bit shifted out for shifts, 0 otherwise), zero, neg (y[7]).
module pe_alu
  import vsoc_pkg::*;
#(
  parameter int unsigned W = 8
) (
  input  logic [3:0]   op,
  input  logic         inv,
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] y,
  output logic         cout,
  output logic         zero,
  output logic         neg
);
  alu_op_e eop;
  logic [W:0] wide;

  always_comb begin
    eop  = alu_op_e'({op[3:1], op[0] ^ inv});
    y    = '0;
    cout = 1'b0;
    wide = '0;
    unique case (eop)
      A_ADD:  begin wide = {1'b0, a} + {1'b0, b};               y = wide[W-1:0]; cout = wide[W]; end
      A_SUB:  begin wide = {1'b0, a} - {1'b0, b};               y = wide[W-1:0]; cout = wide[W]; end
      A_ADC:  begin wide = {1'b0, a} + {1'b0, b} + (W+1)'(cin); y = wide[W-1:0]; cout = wide[W]; end
      A_SBC:  begin wide = {1'b0, a} - {1'b0, b} - (W+1)'(cin); y = wide[W-1:0]; cout = wide[W]; end
      A_AND:  y = a & b;
      A_NAND: y = ~(a & b);
      A_OR:   y = a | b;
      A_NOR:  y = ~(a | b);
      A_XOR:  y = a ^ b;
      A_XNOR: y = ~(a ^ b);
      A_SHL:  begin wide = {1'b0, a} << b[2:0]; y = wide[W-1:0]; cout = wide[W]; end
      A_SHR:  begin y = a >> b[2:0]; cout = (b[2:0] != 3'd0) ? a[b[2:0] - 3'd1] : 1'b0; end
      A_MOV:  y = a;
      A_NOT:  y = ~a;
      A_MIN:  y = (a < b) ? a : b;
      A_MAX:  y = (a > b) ? a : b;
      default: y = '0;
    endcase
    zero = (y == '0);
    neg  = y[W-1];
  end
endmodule

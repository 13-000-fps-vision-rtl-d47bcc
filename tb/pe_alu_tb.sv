// pe_alu_tb: random self-check of the 8-bit PE ALU against a reference
// model written independently in the testbench, for every opcode with and
// without complement selection.
module pe_alu_tb;
  logic [3:0] op;
  logic       inv, cin, cout, zero, neg;
  logic [7:0] a, b, y;
  int checks = 0, failures = 0;

  pe_alu dut (.op(op), .inv(inv), .a(a), .b(b), .cin(cin), .y(y), .cout(cout), .zero(zero), .neg(neg));

  task automatic ref_model(input logic [3:0] o, output logic [7:0] ry, output logic rc);
    int t;
    rc = 0;
    case (o)
      0:  begin t = a + b;       ry = t[7:0]; rc = t[8]; end
      1:  begin t = a - b;       ry = t[7:0]; rc = (a < b); end
      2:  ry = a & b;
      3:  ry = ~(a & b);
      4:  ry = a | b;
      5:  ry = ~(a | b);
      6:  ry = a ^ b;
      7:  ry = ~(a ^ b);
      8:  begin t = a << b[2:0]; ry = t[7:0]; rc = t[8]; end
      9:  begin ry = a >> b[2:0]; rc = (b[2:0] == 0) ? 1'b0 : a[b[2:0]-1]; end
      10: ry = a;
      11: ry = ~a;
      12: ry = (a < b) ? a : b;
      13: ry = (a > b) ? a : b;
      14: begin t = a + b + cin; ry = t[7:0]; rc = t[8]; end
      default: begin t = a - b - cin; ry = t[7:0]; rc = (int'(a) - int'(b) - int'(cin)) < 0; end
    endcase
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] ry; logic rc;
    for (int n = 0; n < 4000; n++) begin
      op = 4'(n % 16); inv = 1'(n / 16 % 2); cin = $urandom_range(0, 1);
      a = 8'($urandom); b = 8'($urandom);
      if (n % 97 == 0) b = a;
      #1;
      ref_model(op ^ {3'b0, inv}, ry, rc);
      checks++;
      if (y !== ry || cout !== rc || zero !== (ry == 0) || neg !== ry[7]) begin
        failures++;
        if (failures < 10) $display("FAIL op=%0d inv=%0d a=%h b=%h cin=%0d: y=%h c=%0d exp %h %0d", op, inv, a, b, cin, y, cout, ry, rc);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// scatter_unit_tb: random drivers and group modes on a 64-column scatter
// unit; each PE's bus value is compared with the OR of the drivers of its
// aligned group of 1, 4, 8 or 16 columns, computed here by loops.
module scatter_unit_tb;
  localparam int N = 64;
  logic [1:0] mode;
  logic [N-1:0] drv_en;
  logic [N-1:0][7:0] drv_data, bus;
  int checks = 0, failures = 0;

  scatter_unit #(.N(N)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 400; n++) begin
      int g;
      mode = 2'(n % 4);
      for (int i = 0; i < N; i++) begin
        drv_en[i] = ($urandom_range(0, 9) == 0);
        drv_data[i] = 8'($urandom);
      end
      #1;
      g = (mode == 0) ? 1 : (mode == 1) ? 4 : (mode == 2) ? 8 : 16;
      for (int i = 0; i < N; i++) begin
        logic [7:0] e;
        e = 0;
        for (int j = (i / g) * g; j < (i / g) * g + g; j++) if (drv_en[j]) e |= drv_data[j];
        checks++;
        if (bus[i] !== e) begin
          failures++;
          if (failures < 10) $display("FAIL mode=%0d col=%0d got %h exp %h", mode, i, bus[i], e);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

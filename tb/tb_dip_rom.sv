// Check of the switch ROM: random switch settings; each single enable must
// put exactly that byte on the bus, no enable gives zero, and two enables
// give the OR of both bytes (the shared output lines).
module tb_dip_rom;
  int checks = 0, failures = 0;
  logic [15:0]      sel;
  logic [15:0][7:0] dip;
  logic [7:0]       data;

  dip_rom dut (.sel(sel), .dip(dip), .data(data));

  task automatic expect_bus(logic [7:0] exp, string what);
    #1;
    checks++;
    if (data !== exp) begin
      failures++;
      $display("FAIL %s: data=%h expected %h", what, data, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int round = 0; round < 20; round++) begin
      for (int i = 0; i < 16; i++) dip[i] = 8'($urandom);
      sel = '0;
      expect_bus(8'h00, "no enable");
      for (int i = 0; i < 16; i++) begin
        sel = 16'(1 << i);
        expect_bus(dip[i], "single byte");
      end
      begin
        automatic int p = $urandom_range(0, 7), q = $urandom_range(8, 15);
        sel = 16'((1 << p) | (1 << q));
        expect_bus(dip[p] | dip[q], "two bytes");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

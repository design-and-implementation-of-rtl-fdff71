// Exhaustive check of the add/subtract ALU at its default width: every a, b
// and sub, against integer arithmetic modulo 16 (carry = bit 4 of a + b, or
// of a + ~b + 1 when subtracting).
module tb_alu;
  int checks = 0, failures = 0;
  logic [3:0] a, b, y;
  logic sub, cout;

  alu dut (.a(a), .b(b), .sub(sub), .y(y), .cout(cout));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int s = 0; s < 2; s++)
      for (int i = 0; i < 16; i++)
        for (int j = 0; j < 16; j++) begin
          int full;
          a = 4'(i); b = 4'(j); sub = 1'(s);
          #1;
          full = (s != 0) ? (i + (15 - j) + 1) : (i + j);
          checks++;
          if (y !== 4'(full) || cout !== 1'(full >> 4)) begin
            failures++;
            $display("FAIL a=%0d b=%0d sub=%0d: y=%0d cout=%0d, expected %0d %0d",
                     i, j, s, y, cout, full & 15, full >> 4);
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

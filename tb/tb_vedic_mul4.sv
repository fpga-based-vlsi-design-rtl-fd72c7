// tb_vedic_mul4: exhaustive check of the 4x4 Urdhva multiplier cell.
// All 256 operand pairs are applied and each product is compared with the
// simulator's own multiplication. A watchdog ends the run if it hangs.
module tb_vedic_mul4;
  logic [3:0] a, b;
  logic [7:0] p;
  int checks = 0, failures = 0;

  vedic_mul4 dut (.a, .b, .p);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 16; i++) begin
      for (int j = 0; j < 16; j++) begin
        a = 4'(i);
        b = 4'(j);
        #1;
        checks++;
        if (p != 8'(i * j)) begin
          failures++;
          $display("FAIL %0d * %0d = %0d, got %0d", i, j, i * j, p);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

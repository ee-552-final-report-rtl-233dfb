// key_nor_tb: exhaustive check of the all-keys-released NOR gate.
module key_nor_tb;
  logic [4:0] pressed;
  logic all_released;
  int checks = 0, failures = 0;

  key_nor dut (.*);

  initial begin
    for (int i = 0; i < 32; i++) begin
      pressed = 5'(i);
      #1;
      checks++;
      if (all_released !== (i == 0)) begin
        failures++;
        $display("FAIL: pressed=%b all_released=%b", pressed, all_released);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

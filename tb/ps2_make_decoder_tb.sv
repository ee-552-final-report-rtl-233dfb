// ps2_make_decoder_tb: every code against the standard set-2 make codes of
// the binary alphabet's keys.
module ps2_make_decoder_tb;
  logic [4:0] code;
  logic [7:0] make;
  logic valid;
  int checks = 0, failures = 0;
  //                       -     A     B     C     D     E     F     G
  byte unsigned exp [32] = '{8'h00,8'h1C,8'h32,8'h21,8'h23,8'h24,8'h2B,8'h34,
  //   H     I     J     K     L     M     N     O
    8'h33,8'h43,8'h3B,8'h42,8'h4B,8'h3A,8'h31,8'h44,
  //   P     Q     R     S     T     U     V     W
    8'h4D,8'h15,8'h2D,8'h1B,8'h2C,8'h3C,8'h2A,8'h1D,
  //   X     Y     Z   SPACE BKSP   .     ,    ENTER
    8'h22,8'h35,8'h1A,8'h29,8'h66,8'h49,8'h41,8'h5A};

  ps2_make_decoder dut (.*);

  initial begin
    for (int i = 0; i < 32; i++) begin
      code = 5'(i);
      #1;
      checks++;
      if (make !== exp[i] || valid !== (i != 0)) begin
        failures++;
        $display("FAIL: code %0d make=%h exp=%h valid=%b", i, make, exp[i], valid);
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

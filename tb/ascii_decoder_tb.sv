// ascii_decoder_tb: every code against the binary alphabet table, and the
// output holding its value while the enable is low.
module ascii_decoder_tb;
  logic clk = 0, rst_n = 0, en = 0, valid;
  logic [4:0] code = 0;
  logic [7:0] ascii;
  int checks = 0, failures = 0;
  // binary alphabet, code 0..31
  byte unsigned table_ascii [32] = '{8'h00,
    "A","B","C","D","E","F","G","H","I","J","K","L","M",
    "N","O","P","Q","R","S","T","U","V","W","X","Y","Z",
    8'h20, 8'h08, ".", ",", 8'h0D};

  ascii_decoder dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 32; i++) begin
      @(negedge clk) code = 5'(i); en = 1;
      @(negedge clk) en = 0;
      checks++;
      if (ascii !== table_ascii[i] || valid !== (i != 0)) begin
        failures++;
        $display("FAIL: code %0d ascii=%h exp=%h valid=%b", i, ascii, table_ascii[i], valid);
      end
      // change the input with enable low: output must hold
      code = 5'(i + 7);
      @(negedge clk);
      checks++;
      if (ascii !== table_ascii[i]) begin failures++; $display("FAIL: not held at code %0d", i); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

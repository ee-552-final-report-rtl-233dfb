// data_control_tb: plays chords on the five switch inputs, keys pressed
// and released one by one in random order with contact bounce, and checks
// the register code and ASCII byte of each chord, the power-up load of the
// empty code, one register load per chord of LOAD_CYCLES clocks, the SR
// flip-flop clear D2_CYCLES after the load starts (so after it ends), the
// decoder and VGA enables two clocks after the load, the PS/2 enable of
// PS2_EN_CYCLES clocks, and the delay from the last release to the load.
module data_control_tb;
  localparam int DB = 8, LD = 3, D2 = 6, PE = 20;
  logic clk = 0, rst_n = 0;
  logic [4:0] key_n = '1;
  logic [4:0] code;
  logic [7:0] ascii;
  logic ascii_valid, vga_en, ps2_en, reg_load, latch_clr;
  int checks = 0, failures = 0;
  byte unsigned table_ascii [32] = '{8'h00,
    "A","B","C","D","E","F","G","H","I","J","K","L","M",
    "N","O","P","Q","R","S","T","U","V","W","X","Y","Z",
    8'h20, 8'h08, ".", ",", 8'h0D};

  data_control #(.DEBOUNCE_CYCLES(DB), .LOAD_CYCLES(LD), .D2_CYCLES(D2),
                 .PS2_EN_CYCLES(PE)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // pulse timing monitor
  int cyc = 0, load_rise = -1, load_len = 0, ps2_len = 0, loads = 0, ps2_pulses = 0;
  int release_cyc = -1, vga_len = 0;
  logic load_q = 0, clr_q = 1, vga_q = 0, ps2_q = 0;
  always @(posedge clk) if (rst_n) begin
    cyc++;
    if (reg_load && !load_q) begin load_rise = cyc; loads++; end
    if (reg_load) load_len++;
    if (!reg_load && load_q) begin check(load_len == LD, $sformatf("load width %0d", load_len)); load_len = 0; end
    if (latch_clr && !clr_q) check(cyc - load_rise == D2, $sformatf("clear %0d after load", cyc - load_rise));
    if (latch_clr && !clr_q) check(!reg_load, "clear while loading");
    if (vga_en && !vga_q) check(cyc - load_rise == 2, $sformatf("vga_en %0d after load", cyc - load_rise));
    if (vga_en) vga_len++;
    if (!vga_en && vga_q) begin check(vga_len == LD, $sformatf("vga_en width %0d", vga_len)); vga_len = 0; end
    if (ps2_en && !ps2_q) begin
      if (loads > 1) check(cyc - load_rise == 2, $sformatf("ps2_en %0d after load", cyc - load_rise));
      ps2_pulses++;
    end
    if (ps2_en) ps2_len++;
    if (!ps2_en && ps2_q) begin check(ps2_len == PE, $sformatf("ps2_en width %0d", ps2_len)); ps2_len = 0; end
    load_q = reg_load; clr_q = latch_clr; vga_q = vga_en; ps2_q = ps2_en;
  end

  task automatic set_key(input int k, input bit pressed);
    // a few clocks of bounce, then the settled level
    repeat ($urandom_range(0, 4)) begin key_n[k] = 1'($urandom_range(0, 1)); @(negedge clk); end
    key_n[k] = !pressed;
  endtask

  task automatic chord(input logic [4:0] c);
    int order [5];
    int t0;
    for (int i = 0; i < 5; i++) order[i] = i;
    order.shuffle();
    foreach (order[i]) if (c[order[i]]) begin
      set_key(order[i], 1);
      repeat ($urandom_range(1, 2 * DB)) @(negedge clk);
    end
    repeat (4 * DB + D2) @(negedge clk);
    order.shuffle();
    foreach (order[i]) if (c[order[i]]) begin
      set_key(order[i], 0);
      t0 = cyc;
      repeat ($urandom_range(1, 2 * DB)) @(negedge clk);
    end
    release_cyc = cyc;
    while (load_rise < t0 && cyc - t0 < 10 * DB) @(negedge clk);
    check(load_rise >= t0 && load_rise - t0 <= 2 * (DB + 2) + 1,
          $sformatf("load %0d clocks after release", load_rise - t0));
    repeat (PE + 5) @(negedge clk);
    check(code == c, $sformatf("code %b exp %b", code, c));
    check(ascii == table_ascii[c] && ascii_valid, $sformatf("ascii %h exp %h", ascii, table_ascii[c]));
    repeat (DB) @(negedge clk);
  endtask

  initial begin
    int n0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (4 * DB) @(negedge clk);
    check(loads == 1 && code == 0 && !ascii_valid, "power-up load of the empty code");
    n0 = loads;
    for (int i = 1; i < 32; i++) chord(5'(i));
    for (int i = 0; i < 20; i++) chord(5'($urandom_range(1, 31)));
    check(loads == n0 + 51, $sformatf("%0d loads for 51 chords", loads - n0));
    check(ps2_pulses == 52, $sformatf("%0d PS/2 enables", ps2_pulses));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

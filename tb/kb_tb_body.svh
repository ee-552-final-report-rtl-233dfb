// kb_tb_body.svh: body shared by the two end-to-end testbenches of the
// binary keyboard. The including module declares the localparams DB (the
// debounce period) and HALF (the PS/2 half period), the ports-less DUT
// "dut" and the clock/reset/switch signals.
//
// It types a text as chords on the five switches (keys pressed and
// released one by one in random order, with contact bounce), receives the
// PS/2 stream with a host model and rebuilds the VGA picture, and checks:
// the bytes on PS/2 (make, F0, make per character, set-2 make codes), the
// typed text on screen (with backspace and carriage return applied), the
// title, and that every mechanism happened at least once.

  int checks = 0, failures = 0;
  string title = "DATAD BINARY KEYBOARD";
  logic [7:0] font [1024];
  byte unsigned screen [80*4];
  int cur = 0;
  byte unsigned exp_bytes [$];

  // binary alphabet and PS/2 set-2 make codes, indexed by chord code
  byte unsigned alpha [32] = '{8'h00,
    "A","B","C","D","E","F","G","H","I","J","K","L","M",
    "N","O","P","Q","R","S","T","U","V","W","X","Y","Z",
    8'h20, 8'h08, ".", ",", 8'h0D};
  byte unsigned make_code [32] = '{8'h00,8'h1C,8'h32,8'h21,8'h23,8'h24,8'h2B,8'h34,
    8'h33,8'h43,8'h3B,8'h42,8'h4B,8'h3A,8'h31,8'h44,
    8'h4D,8'h15,8'h2D,8'h1B,8'h2C,8'h3C,8'h2A,8'h1D,
    8'h22,8'h35,8'h1A,8'h29,8'h66,8'h49,8'h41,8'h5A};

  ps2_host_model host (.ps2_clk, .ps2_data);
  vga_capture cap (.clk, .hsync_n(vga_h_sync), .vsync_n(vga_v_sync),
                   .red(vga_red), .green(vga_green), .blue(vga_blue));

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // mechanism counters
  int n_loads = 0, n_clears = 0, n_vga_writes = 0, n_frames = 0, n_bounces = 0;
  int n_staggered = 0, n_bksp = 0, n_cr = 0;
  logic load_q = 0, clr_q = 0;
  always @(posedge clk) begin
    if (dut.u_data.reg_load && !load_q) n_loads++;
    if (dut.u_data.latch_clr && !clr_q) n_clears++;
    if (dut.u_vga.wr_event) n_vga_writes++;
    if (dut.u_ps2.frame_done) n_frames++;
    load_q = dut.u_data.reg_load;
    clr_q = dut.u_data.latch_clr;
  end

  function automatic logic [4:0] code_of(input byte unsigned c);
    for (int i = 1; i < 32; i++) if (alpha[i] == c) return 5'(i);
    return 5'd0;
  endfunction

  task automatic set_switch(input int k, input bit pressed);
    int b;
    b = $urandom_range(0, 3);
    if (b > 0) n_bounces++;
    repeat (b) begin
      {thumb_n, index_n, middle_n, ring_n, little_n} ^= 5'(1 << k);
      repeat ($urandom_range(1, DB / 4 + 1)) @(negedge clk);
    end
    case (k)
      4: thumb_n = !pressed;
      3: index_n = !pressed;
      2: middle_n = !pressed;
      1: ring_n = !pressed;
      default: little_n = !pressed;
    endcase
  endtask

  task automatic type_char(input byte unsigned c);
    logic [4:0] code;
    int order [5];
    int nk;
    code = code_of(c);
    nk = $countones(code);
    if (nk > 1) n_staggered++;
    for (int i = 0; i < 5; i++) order[i] = i;
    order.shuffle();
    foreach (order[i]) if (code[order[i]]) begin
      set_switch(order[i], 1);
      repeat ($urandom_range(1, DB)) @(negedge clk);
    end
    repeat (3 * DB) @(negedge clk);
    order.shuffle();
    foreach (order[i]) if (code[order[i]]) begin
      set_switch(order[i], 0);
      repeat ($urandom_range(1, DB)) @(negedge clk);
    end
    // model: PS/2 bytes and screen
    exp_bytes.push_back(make_code[code]);
    exp_bytes.push_back(8'hF0);
    exp_bytes.push_back(make_code[code]);
    if (c == 8'h08) begin
      n_bksp++;
      if (cur > 0) begin cur--; screen[cur] = " "; end
    end else if (c == 8'h0D) begin
      n_cr++;
      cur = ((cur / 80) + 1) * 80;
      if (cur >= 320) cur = 0;
    end else begin
      screen[cur] = c;
      cur = (cur == 319) ? 0 : cur + 1;
    end
    // wait for the character to be taken and sent before the next one
    repeat (3 * DB) @(negedge clk);
    while (dut.u_ps2.busy) @(negedge clk);
  endtask

  task automatic check_cell(input int col, input int row, input byte unsigned c,
                            input logic [2:0] colour);
    for (int l = 0; l < 8; l++) begin
      logic [7:0] exp, got, other;
      exp = font[{c[6:0], 3'(l)}];
      got = cap.cell_row(col, row, l, colour);
      other = cap.cell_row(col, row, l, ~colour);
      checks++;
      if (got !== exp || other !== 8'h00) begin
        failures++;
        if (failures < 10)
          $display("FAIL: cell (%0d,%0d) '%c' line %0d got %h exp %h", col, row, c, l, got, exp);
      end
    end
  endtask

  task automatic check_all(input int ncols);
    int f;
    f = cap.frames;
    wait (cap.frames >= f + 2);
    for (int c = 0; c < 25; c++)
      check_cell(c, 2, (c >= 2 && c < 2 + title.len()) ? title[c - 2] : " ", 3'b110);
    for (int r = 0; r < 4; r++)
      for (int c = 0; c < ncols; c++)
        check_cell(c, 5 + r, screen[r * 80 + c], 3'b111);
    check(host.frame_errors == 0, "PS/2 framing or parity errors");
    check(host.rx.size() == exp_bytes.size(),
          $sformatf("%0d PS/2 bytes, expected %0d", host.rx.size(), exp_bytes.size()));
    for (int i = 0; i < exp_bytes.size() && i < host.rx.size(); i++)
      check(host.rx[i] == exp_bytes[i], $sformatf("PS/2 byte %0d = %h exp %h", i, host.rx[i], exp_bytes[i]));
  endtask

  task automatic run_text(input string text, input int ncols);
    int t0, nchars;
    $readmemh("tb/font8x8.hex", font);
    for (int i = 0; i < 320; i++) screen[i] = " ";
    {thumb_n, index_n, middle_n, ring_n, little_n} = '1;
    reset_n = 0;
    repeat (3) @(negedge clk);
    reset_n = 1;
    repeat (3 * DB) @(negedge clk);
    check(n_loads == 1 && dut.code == 0, "power-up load of the empty code");
    check(host.rx.size() == 0, "nothing sent at power-up");
    nchars = text.len();
    for (int i = 0; i < nchars; i++) begin
      t0 = n_vga_writes;
      type_char(text[i]);
      check(n_vga_writes == t0 + 1, $sformatf("char %0d: %0d VGA writes", i, n_vga_writes - t0));
    end
    check_all(ncols);
    check(n_loads == 1 + nchars, $sformatf("%0d register loads for %0d chars", n_loads - 1, nchars));
    check(n_frames == 3 * nchars, $sformatf("%0d PS/2 frames", n_frames));
    // every mechanism must have happened
    check(n_bounces > 0, "no switch bounce was filtered");
    check(n_staggered > 0, "no multi-key chord collected");
    check(n_clears >= nchars, "SR latch clear (delay D2) did not happen");
    check(n_vga_writes == nchars, "VGA writes");
    check(n_frames > 0, "no PS/2 frame sent");
    check(n_bksp > 0, "no backspace");
    check(n_cr > 0, "no carriage return");
    $display("loads=%0d clears=%0d vga_writes=%0d ps2_frames=%0d bounces=%0d chords=%0d bksp=%0d cr=%0d",
             n_loads, n_clears, n_vga_writes, n_frames, n_bounces, n_staggered, n_bksp, n_cr);
  endtask

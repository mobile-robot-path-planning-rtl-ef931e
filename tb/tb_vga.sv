// tb_vga: self-checking test of the display controller at its default timing.
//
// The testbench plays the memory: it registers a code derived from the pixel
// address ((x + y) mod 8) and returns it on DATA one clock later, as the
// system does. Over two full frames it checks: that ADDR sweeps {y, x} in
// order over 1344 x 806 positions; that HSYNC is low for exactly 136 clocks
// per line, starting 1048 clocks into the line, and VSYNC low for 6 lines
// starting at line 771 (both seen one clock late, aligned with DATA); that the
// frame period is 1344 * 806 clocks, i.e. 60.00 Hz at 65 MHz; and that RGB is
// the palette colour of DATA inside the 800 x 600 picture and black outside.
module tb_vga;
  localparam int H_TOTAL = 1344;
  localparam int V_TOTAL = 806;

  logic        RESET = 1, CLOCK = 0;
  logic [2:0]  DATA = '0;
  logic [21:0] ADDR;
  logic        HSYNC, VSYNC;
  logic [2:0]  RGB;
  int          checks = 0, failures = 0;

  // expected colour of each code, written out independently
  localparam logic [2:0] PALETTE [8] = '{3'b111, 3'b001, 3'b010, 3'b100,
                                         3'b110, 3'b011, 3'b101, 3'b000};

  vga dut (.*);

  always #5 CLOCK = ~CLOCK;

  always_ff @(posedge CLOCK) DATA <= 3'(ADDR[10:0] + ADDR[21:11]);

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    repeat (3_000_000) @(posedge CLOCK);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int x, y, px, py, hs_low, vs_low_lines, vs_falls, frame_start, hs_fall_x;
    logic vs_prev, hs_prev;
    repeat (3) @(posedge CLOCK);
    #1 RESET = 0;
    x = 0; y = 0;
    hs_low = 0; vs_falls = 0; vs_low_lines = 0; frame_start = -1;
    vs_prev = 1; hs_prev = 1; hs_fall_x = -1;
    for (int cyc = 0; cyc < 2 * H_TOTAL * V_TOTAL; cyc++) begin
      // outputs of this cycle belong to the previous pixel (px, py)
      check(ADDR == {11'(y), 11'(x)}, "pixel address");
      if (cyc > 0) begin
        check(RGB == ((px < 800 && py < 600) ? PALETTE[3'(px + py)] : 3'b000), "colour");
        check(HSYNC == !(px >= 1048 && px < 1048 + 136), "hsync position");
        check(VSYNC == !(py >= 771 && py < 771 + 6), "vsync position");
        if (!HSYNC) hs_low++;
        if (hs_prev && !HSYNC) hs_fall_x = px;
        if (vs_prev && !VSYNC) begin
          vs_falls++;
          if (frame_start >= 0) check(cyc - frame_start == H_TOTAL * V_TOTAL, "frame period");
          frame_start = cyc;
        end
        if (!VSYNC && px == 0) vs_low_lines++;
        vs_prev = VSYNC;
        hs_prev = HSYNC;
      end
      px = x; py = y;
      @(posedge CLOCK);
      #1;
      x++;
      if (x == H_TOTAL) begin
        x = 0;
        y = (y == V_TOTAL - 1) ? 0 : y + 1;
      end
    end
    check(hs_low == 2 * V_TOTAL * 136, $sformatf("hsync low clocks %0d", hs_low));
    check(hs_fall_x == 1048, "hsync falls at 1048");
    check(vs_falls == 2, $sformatf("vsync pulses %0d", vs_falls));
    check(vs_low_lines == 12, $sformatf("vsync low lines %0d", vs_low_lines));
    $display("refresh at 65 MHz: %0d mHz", 65_000_000_000 / (H_TOTAL * V_TOTAL));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

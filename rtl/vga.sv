// vga: display controller that shows the working map and the direction map.
//
// Two counters sweep the frame: `hcnt` over H_TOTAL pixel clocks per line and
// `vcnt` over V_TOTAL lines per frame. HSYNC and VSYNC are active low during
// their sync intervals. The pixel being swept is published on ADDR as
// {vcnt, hcnt} (11 bits each); the surrounding logic turns it into a map cell,
// reads the memories and returns a 3-bit code on DATA exactly DATA_LAT clocks
// later. The controller delays its own timing by DATA_LAT clocks to match,
// and converts the code into a 3-bit RGB colour inside the IMG_W x IMG_H image
// area (black elsewhere and during blanking):
//   DATA 0 free -> white    1 obstacle -> blue   2 visited -> green
//        3 path -> red      4 north    -> yellow 5 south   -> cyan
//        6 west -> magenta  7 east     -> black
// Codes 0-3 are working-map cells, 4-7 the direction stored for a reached
// cell.
//
// Default timing: a 65 MHz pixel clock with 1344 x 806 clocks per frame gives
// a 60.004 Hz refresh; the sync pulses follow the usual 1024x768 60 Hz mode,
// and the picture occupies the 800 x 600 pixel area at its top left. The
// 800x600 image, the 65 MHz clock, the 60 Hz refresh and the ports follow the
// design; the frame totals, sync positions, colours and the DATA code are
// this implementation's own.
module vga #(
  parameter int unsigned H_ACTIVE = 1024,
  parameter int unsigned H_FP     = 24,
  parameter int unsigned H_SYNC   = 136,
  parameter int unsigned H_BP     = 160,
  parameter int unsigned V_ACTIVE = 768,
  parameter int unsigned V_FP     = 3,
  parameter int unsigned V_SYNC   = 6,
  parameter int unsigned V_BP     = 29,
  parameter int unsigned IMG_W    = 800,
  parameter int unsigned IMG_H    = 600,
  parameter int unsigned DATA_LAT = 1
) (
  input  logic        RESET,
  input  logic        CLOCK,
  input  logic [2:0]  DATA,
  output logic [21:0] ADDR,
  output logic        HSYNC,
  output logic        VSYNC,
  output logic [2:0]  RGB
);
  localparam int unsigned H_TOTAL = H_ACTIVE + H_FP + H_SYNC + H_BP;
  localparam int unsigned V_TOTAL = V_ACTIVE + V_FP + V_SYNC + V_BP;

  logic [10:0] hcnt, vcnt;
  logic        hs_now, vs_now, img_now;
  // delay lines, index 0 is one clock after the counters
  logic [DATA_LAT-1:0] hs_d, vs_d, img_d;

  assign ADDR    = {vcnt, hcnt};
  assign hs_now  = !(hcnt >= 11'(H_ACTIVE + H_FP) && hcnt < 11'(H_ACTIVE + H_FP + H_SYNC));
  assign vs_now  = !(vcnt >= 11'(V_ACTIVE + V_FP) && vcnt < 11'(V_ACTIVE + V_FP + V_SYNC));
  assign img_now = (hcnt < 11'(IMG_W)) && (vcnt < 11'(IMG_H));

  always_ff @(posedge CLOCK) begin
    if (RESET) begin
      hcnt  <= '0;
      vcnt  <= '0;
      hs_d  <= '1;
      vs_d  <= '1;
      img_d <= '0;
    end else begin
      if (hcnt == 11'(H_TOTAL - 1)) begin
        hcnt <= '0;
        vcnt <= (vcnt == 11'(V_TOTAL - 1)) ? '0 : vcnt + 1'b1;
      end else begin
        hcnt <= hcnt + 1'b1;
      end
      hs_d  <= DATA_LAT'({hs_d, hs_now});
      vs_d  <= DATA_LAT'({vs_d, vs_now});
      img_d <= DATA_LAT'({img_d, img_now});
    end
  end

  assign HSYNC = hs_d[DATA_LAT-1];
  assign VSYNC = vs_d[DATA_LAT-1];

  always_comb begin
    RGB = 3'b000;
    if (img_d[DATA_LAT-1]) begin
      case (DATA)
        3'd0: RGB = 3'b111;
        3'd1: RGB = 3'b001;
        3'd2: RGB = 3'b010;
        3'd3: RGB = 3'b100;
        3'd4: RGB = 3'b110;
        3'd5: RGB = 3'b011;
        3'd6: RGB = 3'b101;
        default: RGB = 3'b000;
      endcase
    end
  end
endmodule

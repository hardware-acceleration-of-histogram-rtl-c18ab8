// display_controller: scans the frame buffer out to the VGA DAC.
//
// Generates the VGA raster (horizontal and vertical counters, HSYNC, VSYNC
// and the visible-area flag) and reads the final grey image from the frame
// buffer SRAM, one pixel per clock, without interruption. The IMG_W x IMG_H
// image sits at the top-left corner of the screen; the rest of the visible
// area is black. The grey level drives R, G and B alike.
//
// Interface: fb_addr is the frame-buffer word address y*IMG_W + x of the
// pixel under the raster (0 outside the image); the frame buffer returns
// fb_rdata one clock later. vga_* go to the DAC; syncs are active low and
// vga_blank_n is high in the visible area.
// Timing: one pixel per clock (clk is the pixel clock). All vga_* outputs
// are registered and lag the raster counters by two clocks, the pixel read
// included, so syncs and pixels stay aligned.
//
// From the source design: a display controller that continuously reads the
// frame buffer and produces pixels and HSYNC/VSYNC. Own choices: 640x480 at
// 60 Hz timing (25 MHz pixel clock), 8-bit grey pixels, a direct read port in
// place of the shared system bus, and the top-left placement of the image.
module display_controller #(
  parameter int unsigned H_ACTIVE = 640,
  parameter int unsigned H_FP     = 16,
  parameter int unsigned H_SYNC   = 96,
  parameter int unsigned H_BP     = 48,
  parameter int unsigned V_ACTIVE = 480,
  parameter int unsigned V_FP     = 10,
  parameter int unsigned V_SYNC   = 2,
  parameter int unsigned V_BP     = 33,
  parameter int unsigned IMG_W    = 176,
  parameter int unsigned IMG_H    = 144,
  localparam int unsigned FB_AW   = $clog2(IMG_W * IMG_H)
) (
  input  logic             clk,
  input  logic             reset,
  output logic [FB_AW-1:0] fb_addr,
  input  logic [7:0]       fb_rdata,
  output logic             vga_hsync,
  output logic             vga_vsync,
  output logic             vga_blank_n,
  output logic [7:0]       vga_r,
  output logic [7:0]       vga_g,
  output logic [7:0]       vga_b
);

  localparam int unsigned H_TOTAL = H_ACTIVE + H_FP + H_SYNC + H_BP;
  localparam int unsigned V_TOTAL = V_ACTIVE + V_FP + V_SYNC + V_BP;
  localparam int unsigned HW = $clog2(H_TOTAL);
  localparam int unsigned VW = $clog2(V_TOTAL);

  if (IMG_W > H_ACTIVE || IMG_H > V_ACTIVE) begin : g_size_check
    $error("display_controller: image larger than the visible area");
  end

  logic [HW-1:0] h;
  logic [VW-1:0] v;
  logic          hs0, vs0, de0, img0;
  logic          hs1, vs1, de1, img1;

  // Raster counters.
  always_ff @(posedge clk) begin
    if (reset) begin
      h <= '0;
      v <= '0;
    end else if (h == HW'(H_TOTAL - 1)) begin
      h <= '0;
      v <= (v == VW'(V_TOTAL - 1)) ? '0 : v + 1'b1;
    end else begin
      h <= h + 1'b1;
    end
  end

  // Decode of the current raster position and the frame-buffer address.
  always_comb begin
    hs0  = !(h >= HW'(H_ACTIVE + H_FP) && h < HW'(H_ACTIVE + H_FP + H_SYNC));
    vs0  = !(v >= VW'(V_ACTIVE + V_FP) && v < VW'(V_ACTIVE + V_FP + V_SYNC));
    de0  = h < HW'(H_ACTIVE) && v < VW'(V_ACTIVE);
    img0 = h < HW'(IMG_W) && v < VW'(IMG_H);
    fb_addr = img0 ? FB_AW'(32'(v) * IMG_W + 32'(h)) : '0;
  end

  // Stage 1 waits for the frame buffer; stage 2 drives the DAC.
  always_ff @(posedge clk) begin
    if (reset) begin
      {hs1, vs1, de1, img1} <= 4'b1100;
      vga_hsync   <= 1'b1;
      vga_vsync   <= 1'b1;
      vga_blank_n <= 1'b0;
      vga_r       <= '0;
      vga_g       <= '0;
      vga_b       <= '0;
    end else begin
      {hs1, vs1, de1, img1} <= {hs0, vs0, de0, img0};
      vga_hsync   <= hs1;
      vga_vsync   <= vs1;
      vga_blank_n <= de1;
      vga_r       <= img1 ? fb_rdata : 8'd0;
      vga_g       <= img1 ? fb_rdata : 8'd0;
      vga_b       <= img1 ? fb_rdata : 8'd0;
    end
  end

endmodule

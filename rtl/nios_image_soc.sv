// nios_image_soc: custom hardware of the Nios II image-processing system.
//
// The system runs histogram equalization and a Laplacian sharpening filter
// in software on a Nios II soft processor and speeds them up with two custom
// instructions: SAT (clamp a filtered pixel to 0..255) and the histogram
// unit (CLR_HIST, INC_HIST, GET_HIST on a 256-bin table kept in block RAM).
// The processed frame is written to an SRAM frame buffer, which a display
// controller scans out to a VGA DAC with its own HSYNC and VSYNC.
//
// This module holds the logic that is designed here: the two custom
// instruction units and the display controller. The processor, system bus,
// SDRAM, SRAM, on-chip memory, JTAG UART and VGA DAC are vendor or board
// parts; their connections are ports:
//   sat_*  : the processor's custom-instruction port to the SAT unit.
//   hist_* : the processor's custom-instruction port to the histogram unit.
//   fb_*   : the display controller's read port to the frame-buffer SRAM
//            (data one clock after the address).
//   vga_*  : to the VGA DAC.
// reset is synchronous and active high (it comes from a board switch).
// Timing is that of the units: SAT is combinational; CLR/GET take two
// cycles and INC four; the display runs one pixel per clock.
module nios_image_soc #(
  parameter int unsigned IMG_W   = 176,
  parameter int unsigned IMG_H   = 144,
  parameter int unsigned COUNT_W = 19,
  localparam int unsigned FB_AW  = $clog2(IMG_W * IMG_H)
) (
  input  logic             clk,
  input  logic             reset,
  // SAT custom instruction
  input  logic [31:0]      sat_dataa,
  output logic [31:0]      sat_result,
  // histogram custom instruction
  input  logic             hist_clk_en,
  input  logic             hist_start,
  input  logic [2:0]       hist_n,
  input  logic [31:0]      hist_dataa,
  output logic [31:0]      hist_result,
  output logic             hist_done,
  // frame buffer read port
  output logic [FB_AW-1:0] fb_addr,
  input  logic [7:0]       fb_rdata,
  // VGA DAC
  output logic             vga_hsync,
  output logic             vga_vsync,
  output logic             vga_blank_n,
  output logic [7:0]       vga_r,
  output logic [7:0]       vga_g,
  output logic [7:0]       vga_b
);

  sat_ci u_sat (
    .dataa  (sat_dataa),
    .result (sat_result)
  );

  hist_ci #(.BINS(256), .COUNT_W(COUNT_W)) u_hist (
    .clk    (clk),
    .clk_en (hist_clk_en),
    .reset  (reset),
    .start  (hist_start),
    .n      (hist_n),
    .dataa  (hist_dataa),
    .result (hist_result),
    .done   (hist_done)
  );

  display_controller #(.IMG_W(IMG_W), .IMG_H(IMG_H)) u_disp (
    .clk         (clk),
    .reset       (reset),
    .fb_addr     (fb_addr),
    .fb_rdata    (fb_rdata),
    .vga_hsync   (vga_hsync),
    .vga_vsync   (vga_vsync),
    .vga_blank_n (vga_blank_n),
    .vga_r       (vga_r),
    .vga_g       (vga_g),
    .vga_b       (vga_b)
  );

endmodule

// tb_display_controller: self-checking test of the VGA display controller.
//
// Runs the controller at its default 640x480 timing with a 176x144 image for
// two full frames against a frame-buffer model that answers one clock after
// the address. The expected raster position of every output sample is
// worked out here from the clock count since reset (outputs lag the raster
// by two clocks), and syncs, blanking and the pixel value are compared each
// clock. It also checks one HSYNC pulse per line and one VSYNC pulse per
// frame, and that image pixels and black border pixels both occurred.
module tb_display_controller;
  localparam int HA = 640, HF = 16, HS = 96, HB = 48;
  localparam int VA = 480, VF = 10, VS = 2,  VB = 33;
  localparam int W = 176, H = 144;
  localparam int HT = HA + HF + HS + HB, VT = VA + VF + VS + VB;

  logic clk = 0, reset;
  logic [14:0] fb_addr;
  logic [7:0]  fb_rdata;
  logic vga_hsync, vga_vsync, vga_blank_n;
  logic [7:0] vga_r, vga_g, vga_b;
  logic [7:0] fb [W*H];
  int checks = 0, failures = 0;
  int n_hs = 0, n_vs = 0, n_img = 0, n_border = 0;

  display_controller dut (.*);

  always #5 clk = ~clk;
  always_ff @(posedge clk) fb_rdata <= fb[fb_addr];

  initial begin : watchdog
    repeat (3 * HT * VT) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int h, v, p;
    logic exp_hs, exp_vs, exp_de;
    logic [7:0] exp_pix;
    logic prev_hs, prev_vs;
    for (int i = 0; i < W*H; i++) fb[i] = 8'($urandom);
    prev_hs = 1; prev_vs = 1;
    reset = 1;
    repeat (3) @(posedge clk);
    @(negedge clk) reset = 0;
    for (int j = 1; j <= 2 * HT * VT + 2; j++) begin
      @(negedge clk);
      if (j < 2) continue;
      p = j - 2;
      h = p % HT;
      v = (p / HT) % VT;
      exp_hs = !(h >= HA + HF && h < HA + HF + HS);
      exp_vs = !(v >= VA + VF && v < VA + VF + VS);
      exp_de = h < HA && v < VA;
      exp_pix = (h < W && v < H) ? fb[v*W + h] : 8'd0;
      if (h < W && v < H) n_img++; else if (exp_de) n_border++;
      checks++;
      if (vga_hsync !== exp_hs || vga_vsync !== exp_vs || vga_blank_n !== exp_de ||
          vga_r !== exp_pix || vga_g !== exp_pix || vga_b !== exp_pix) begin
        failures++;
        if (failures < 10)
          $display("FAIL at h=%0d v=%0d: hs=%b vs=%b de=%b r=%0d g=%0d b=%0d, expected hs=%b vs=%b de=%b pix=%0d",
                   h, v, vga_hsync, vga_vsync, vga_blank_n, vga_r, vga_g, vga_b,
                   exp_hs, exp_vs, exp_de, exp_pix);
      end
      if (prev_hs && !vga_hsync) n_hs++;
      if (prev_vs && !vga_vsync) n_vs++;
      prev_hs = vga_hsync;
      prev_vs = vga_vsync;
    end
    checks++;
    if (n_hs != 2 * VT || n_vs != 2) begin
      failures++;
      $display("FAIL sync count: %0d HSYNC pulses (expected %0d), %0d VSYNC pulses (expected 2)", n_hs, 2*VT, n_vs);
    end
    checks++;
    if (n_img == 0 || n_border == 0) failures++;
    $display("image pixels=%0d border pixels=%0d hsync=%0d vsync=%0d", n_img, n_border, n_hs, n_vs);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

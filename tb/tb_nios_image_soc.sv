// tb_nios_image_soc: end-to-end test of the image-processing hardware.
//
// Plays the processor's part for one full QCIF frame (176x144), at the
// default parameters of the top:
//   1. clears the 256 histogram bins with CLR_HIST,
//   2. counts every pixel of a generated dark, two-hump image with INC_HIST,
//   3. reads the histogram back with GET_HIST and checks it against a
//      histogram counted here,
//   4. equalizes the image with the cumulative histogram (software step),
//   5. sharpens it with g = 5f - (four neighbours), zero outside the image,
//      and clamps every g through the SAT instruction, checked against a
//      clamp computed here, writing the result to a frame-buffer SRAM model,
//   6. checks a complete displayed frame on the VGA outputs against the
//      frame buffer, position by position.
// Instruction lengths are checked (CLR/GET 2 cycles, INC 4). Counted
// mechanisms: each histogram opcode, clk_en stalls during an instruction,
// SAT clamping high, low and passing through, HSYNC and VSYNC pulses,
// image and border pixels on screen.
module tb_nios_image_soc;
  import ci_pkg::*;
  localparam int W = 176, H = 144, N = W * H;
  localparam int HT = 800, VT = 525;      // default display raster
  localparam int HA = 640, HF = 16, HS = 96, VA = 480, VF = 10, VS = 2;

  logic clk = 0, reset;
  logic [31:0] sat_dataa, sat_result;
  logic        hist_clk_en, hist_start, hist_done;
  logic [2:0]  hist_n;
  logic [31:0] hist_dataa, hist_result;
  logic [14:0] fb_addr;
  logic [7:0]  fb_rdata;
  logic vga_hsync, vga_vsync, vga_blank_n;
  logic [7:0] vga_r, vga_g, vga_b;

  logic [7:0] img [N];
  logic [7:0] eq  [N];
  logic [7:0] fb  [N];
  int unsigned hist_ref [256];
  int checks = 0, failures = 0;
  int n_stall = 0, n_clr = 0, n_inc = 0, n_get = 0, n_sat_hi = 0, n_sat_lo = 0, n_sat_mid = 0;
  int n_hs = 0, n_vs = 0, n_img = 0, n_border = 0;
  longint ci_cycles = 0;
  longint cyc = 0;          // clocks since reset was released

  nios_image_soc dut (.*);

  always #5 clk = ~clk;
  always_ff @(posedge clk) fb_rdata <= fb[fb_addr];
  always @(posedge clk) if (!reset) cyc <= cyc + 1;

  initial begin : watchdog
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  // One custom instruction; stall holds clk_en low in the 2nd and 3rd cycles.
  task automatic hist(input hist_op_e op, input logic [7:0] addr, input bit stall,
                      output logic [31:0] res);
    int cycles;
    @(negedge clk);
    hist_start = 1; hist_n = op; hist_dataa = {24'd0, addr}; hist_clk_en = 1;
    cycles = 1;
    do begin
      @(negedge clk);
      hist_start = 0;
      cycles++;
      hist_clk_en = !(stall && cycles <= 3);
      #1;
    end while (!(hist_done && hist_clk_en) && cycles < 20);
    res = hist_result;
    ci_cycles += longint'(cycles);
    if (stall) n_stall++;
    check(cycles == ((op == HIST_INC) ? 4 : 2) + (stall ? 2 : 0),
          $sformatf("%s took %0d cycles", op.name(), cycles));
    case (op)
      HIST_CLR: n_clr++;
      HIST_INC: n_inc++;
      default:  n_get++;
    endcase
  endtask

  function automatic int pix(input int x, input int y);
    if (x < 0 || x >= W || y < 0 || y >= H) return 0;
    return int'(eq[y*W + x]);
  endfunction

  initial begin
    logic [31:0] r;
    longint unsigned cdf;
    int g, exp_sat;
    longint t0, frame_start;
    logic prev_hs, prev_vs;

    prev_hs = 1; prev_vs = 1;
    reset = 1; sat_dataa = 0; hist_clk_en = 1; hist_start = 0; hist_n = 0; hist_dataa = 0;
    for (int i = 0; i < N; i++) fb[i] = 0;
    // Dark image with a second, brighter hump and some flat areas.
    for (int y = 0; y < H; y++)
      for (int x = 0; x < W; x++) begin
        int v;
        if ((x / 16 + y / 16) % 5 == 0) v = 200 + $urandom % 30;
        else if (x > 150 && y < 20) v = 3;
        else v = 25 + ($urandom % 50) + ($urandom % 50);
        img[y*W + x] = 8'(v);
      end
    repeat (3) @(posedge clk);
    @(negedge clk) reset = 0;

    // 1-3: histogram through the custom instruction.
    t0 = cyc;
    for (int b = 0; b < 256; b++) hist(HIST_CLR, 8'(b), b == 7, r);
    $display("histogram clear: %0d cycles", cyc - t0);
    t0 = cyc;
    for (int i = 0; i < N; i++) begin
      hist(HIST_INC, img[i], i % 1000 == 17, r);
      hist_ref[img[i]]++;
    end
    $display("histogram computation: %0d cycles for %0d pixels", cyc - t0, N);
    cdf = 0;
    for (int b = 0; b < 256; b++) begin
      hist(HIST_GET, 8'(b), b == 100, r);
      check(r == hist_ref[b], $sformatf("bin %0d = %0d, expected %0d", b, r, hist_ref[b]));
      // 4: equalization map s_k = (L-1) * sum_{j<=k} n_j / N.
      cdf += 64'(r);
      hist_ref[b] = int'((cdf * 255) / 64'(N));   // reuse as the mapping table
    end
    for (int i = 0; i < N; i++) eq[i] = 8'(hist_ref[img[i]]);

    // 5: sharpening and saturation.
    for (int y = 0; y < H; y++)
      for (int x = 0; x < W; x++) begin
        g = 5 * pix(x, y) - pix(x+1, y) - pix(x-1, y) - pix(x, y+1) - pix(x, y-1);
        sat_dataa = 32'(g);
        #1;
        exp_sat = (g > 255) ? 255 : (g < 0) ? 0 : g;
        if (g > 255) n_sat_hi++; else if (g < 0) n_sat_lo++; else n_sat_mid++;
        check(sat_result == 32'(exp_sat), $sformatf("SAT(%0d) = %0d", g, sat_result));
        fb[y*W + x] = sat_result[7:0];
      end

    // 6: check the next complete frame on the display.
    frame_start = ((cyc - 2) / (HT * VT) + 1) * (HT * VT) + 2;
    while (cyc < frame_start) @(negedge clk);
    repeat (HT * VT) begin
      int p, h, v;
      logic exp_de, exp_hs, exp_vs;
      logic [7:0] exp_pix;
      @(negedge clk);
      p = int'((cyc - 2) % (HT * VT));
      h = p % HT; v = p / HT;
      exp_hs = !(h >= HA + HF && h < HA + HF + HS);
      exp_vs = !(v >= VA + VF && v < VA + VF + VS);
      exp_de = h < HA && v < VA;
      exp_pix = (h < W && v < H) ? fb[v*W + h] : 8'd0;
      if (h < W && v < H) n_img++; else if (exp_de) n_border++;
      check(vga_hsync == exp_hs && vga_vsync == exp_vs && vga_blank_n == exp_de &&
            vga_r == exp_pix && vga_g == exp_pix && vga_b == exp_pix,
            $sformatf("display at (%0d,%0d): r=%0d expected %0d", h, v, vga_r, exp_pix));
      if (prev_hs && !vga_hsync) n_hs++;
      if (prev_vs && !vga_vsync) n_vs++;
      prev_hs = vga_hsync; prev_vs = vga_vsync;
    end

    check(n_clr == 256 && n_inc == N && n_get == 256, "instruction counts");
    check(n_stall > 0, "no clk_en stall happened");
    check(n_sat_hi > 0 && n_sat_lo > 0 && n_sat_mid > 0, "a SAT case never occurred");
    check(n_hs == VT && n_vs == 1 && n_img == N && n_border > 0, "display frame counts");
    $display("clk_en stalls=%0d, custom-instruction clocks=%0d", n_stall, ci_cycles);
    $display("CLR=%0d INC=%0d GET=%0d; SAT high=%0d low=%0d pass=%0d; HSYNC=%0d VSYNC=%0d image=%0d border=%0d",
             n_clr, n_inc, n_get, n_sat_hi, n_sat_lo, n_sat_mid, n_hs, n_vs, n_img, n_border);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

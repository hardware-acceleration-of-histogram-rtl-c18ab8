// tb_hist_ci: self-checking test of the histogram custom instruction.
//
// Drives the unit as the processor does: start for one cycle with the
// opcode n and the operand, operand held until done, n random afterwards.
// It clears all 256 bins, builds the histogram of a random, skewed stream
// of pixels with INC_HIST, reads every bin back with GET_HIST and compares
// with a reference histogram kept here, then clears a few bins again.
// Every instruction's length is checked: two cycles for CLR/GET, four for
// INC, plus any cycles in which clk_en was held low. Counted mechanisms:
// each opcode, INC of the same bin back to back, and clk_en stalls.
module tb_hist_ci;
  import ci_pkg::*;
  logic        clk = 0, clk_en, reset, start, done;
  logic [2:0]  n;
  logic [31:0] dataa, result;
  int checks = 0, failures = 0;
  int n_clr = 0, n_inc = 0, n_get = 0, n_b2b = 0, n_stall = 0;
  int unsigned model [256];
  int last_inc_addr = -1;

  hist_ci dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
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

  // One custom instruction. stall_at > 0 drops clk_en for two cycles
  // starting that many cycles after start.
  task automatic ci(input hist_op_e op, input logic [7:0] addr, input int stall_at,
                    output logic [31:0] res);
    int cycles, exp_cycles, stalled;
    @(negedge clk);
    start = 1; n = op; dataa = {24'($urandom), addr}; clk_en = 1;
    cycles = 1; stalled = 0;
    forever begin
      @(negedge clk);
      start = 0; n = 3'($urandom);
      cycles++;
      clk_en = !(stall_at > 0 && cycles > stall_at && cycles <= stall_at + 2);
      if (!clk_en) stalled++;
      #1;
      if (done && clk_en) break;
      if (cycles > 20) break;
    end
    res = result;
    exp_cycles = ((op == HIST_INC) ? 4 : 2) + stalled;
    if (stalled > 0) n_stall++;
    check(cycles == exp_cycles,
          $sformatf("%s addr=%0d took %0d cycles, expected %0d", op.name(), addr, cycles, exp_cycles));
    case (op)
      HIST_CLR: begin n_clr++; model[addr] = 0; last_inc_addr = -1; end
      HIST_INC: begin
        n_inc++;
        if (int'(addr) == last_inc_addr) n_b2b++;
        last_inc_addr = int'(addr);
        model[addr] = (model[addr] + 1) % (1 << 19);
      end
      default: begin n_get++; last_inc_addr = -1; end
    endcase
  endtask

  task automatic get_check(input logic [7:0] addr);
    logic [31:0] r;
    ci(HIST_GET, addr, 0, r);
    check(r == model[addr], $sformatf("GET bin %0d = %0d, expected %0d", addr, r, model[addr]));
  endtask

  initial begin
    logic [31:0] r;
    logic [7:0]  pix;
    reset = 1; start = 0; n = 0; dataa = 0; clk_en = 1;
    repeat (3) @(posedge clk);
    @(negedge clk) reset = 0;

    for (int b = 0; b < 256; b++) ci(HIST_CLR, 8'(b), (b % 37 == 5) ? 1 : 0, r);
    for (int b = 0; b < 256; b++) get_check(8'(b));

    // Skewed pixel stream: two humps plus runs of equal pixels.
    for (int i = 0; i < 3000; i++) begin
      if (i % 50 < 4) pix = 8'd200;
      else if ($urandom % 3 == 0) pix = 8'(40 + $urandom % 40);
      else pix = 8'($urandom);
      ci(HIST_INC, pix, (i % 97 == 3) ? 1 + i % 3 : 0, r);
    end
    for (int b = 0; b < 256; b++) get_check(8'(b));

    // Clear a few bins, increment one of them, read them back.
    for (int b = 60; b < 64; b++) ci(HIST_CLR, 8'(b), 0, r);
    ci(HIST_INC, 8'd61, 0, r);
    ci(HIST_INC, 8'd61, 0, r);
    for (int b = 58; b < 66; b++) get_check(8'(b));

    check(n_clr > 0 && n_inc > 0 && n_get > 0 && n_b2b > 0 && n_stall > 0, "a mechanism never occurred");
    $display("CLR=%0d INC=%0d GET=%0d back-to-back INC=%0d stalls=%0d", n_clr, n_inc, n_get, n_b2b, n_stall);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

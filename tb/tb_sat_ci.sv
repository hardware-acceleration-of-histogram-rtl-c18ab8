// tb_sat_ci: self-checking test of the saturation custom instruction.
//
// Applies every 16-bit operand value (with random upper operand bits, which
// must be ignored) plus the example values 300, 58 and -134, and compares
// the result with a clamp to 0..255 of the signed value computed here.
// Counts how often each case (above range, below range, in range) occurred.
module tb_sat_ci;
  logic [31:0] dataa, result;
  int checks = 0, failures = 0;
  int n_hi = 0, n_lo = 0, n_mid = 0;
  logic clk = 0;

  sat_ci dut (.dataa(dataa), .result(result));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [31:0] ref_sat(input logic [15:0] x);
    int v = int'($signed(x));
    if (v > 255) return 32'd255;
    if (v < 0) return 32'd0;
    return 32'(v);
  endfunction

  task automatic apply(input logic [15:0] x, input logic [15:0] upper);
    logic [31:0] exp;
    dataa = {upper, x};
    #1;
    exp = ref_sat(x);
    checks++;
    if ($signed(x) > 16'sd255) n_hi++;
    else if ($signed(x) < 16'sd0) n_lo++;
    else n_mid++;
    if (result !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL x=%0d result=%0d expected=%0d", $signed(x), result, exp);
    end
  endtask

  initial begin
    apply(16'd300, 16'h0);
    apply(16'd58, 16'h0);
    apply(-16'sd134, 16'h0);
    for (int i = 0; i < 65536; i++) apply(16'(i), 16'($urandom));
    if (n_hi == 0 || n_lo == 0 || n_mid == 0) failures++;
    $display("cases: above=%0d below=%0d inside=%0d", n_hi, n_lo, n_mid);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

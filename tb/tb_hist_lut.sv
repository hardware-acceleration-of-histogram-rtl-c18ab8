// tb_hist_lut: self-checking test of the histogram table RAM.
//
// Fills every entry with a random value, then mixes random reads and writes
// and compares q, one clock after each address, with a reference array kept
// here. A read of the address being written must return the old value.
module tb_hist_lut;
  localparam int DEPTH = 256, W = 19;
  logic clk = 0;
  logic [7:0]   addr;
  logic [W-1:0] data_in, q;
  logic         write_en;
  logic [W-1:0] model [DEPTH];
  int checks = 0, failures = 0;

  hist_lut dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [W-1:0] exp;
    write_en = 0; addr = 0; data_in = 0;
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge clk);
      addr = 8'(i); data_in = W'($urandom); write_en = 1;
      model[i] = data_in;
    end
    for (int k = 0; k < 4000; k++) begin
      @(negedge clk);
      addr = 8'($urandom);
      write_en = ($urandom % 3) == 0;
      data_in = W'($urandom);
      exp = model[addr];
      if (write_en) model[addr] = data_in;
      @(posedge clk); #1;
      checks++;
      if (q !== exp) begin
        failures++;
        if (failures < 10) $display("FAIL addr=%0d q=%0h expected=%0h", addr, q, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

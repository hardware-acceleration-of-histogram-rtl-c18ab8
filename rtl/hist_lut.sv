// hist_lut: the histogram table RAM.
//
// A single-port table of DEPTH counters of DATA_W bits. One address serves
// both the write and the read. A write happens at the clock edge when
// write_en is high. The read is registered: q shows the entry that addr
// selected at the previous clock edge, as an FPGA block RAM does. A read of
// the entry being written returns the old value.
//
// DEPTH = 256 follows from the 8-bit pixel used as the bin address; the
// counter width 19 matches 4864 bits of memory for 256 bins in the reported
// implementation. The registered read is a design choice matching block RAM.
// The table contents are not reset; software clears it bin by bin.
module hist_lut #(
  parameter int unsigned DEPTH  = 256,
  parameter int unsigned DATA_W = 19,
  localparam int unsigned AW    = $clog2(DEPTH)
) (
  input  logic              clk,
  input  logic [AW-1:0]     addr,
  input  logic [DATA_W-1:0] data_in,
  input  logic              write_en,
  output logic [DATA_W-1:0] q
);

  logic [DATA_W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (write_en) mem[addr] <= data_in;
    q <= mem[addr];
  end

endmodule

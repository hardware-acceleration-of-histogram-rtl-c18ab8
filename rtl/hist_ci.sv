// hist_ci: histogram custom instruction (CLR_HIST, INC_HIST, GET_HIST).
//
// Keeps the histogram table in a block RAM (hist_lut) next to the processor
// so that the three steps of histogram computation take one instruction
// each instead of a load/modify/store sequence through SDRAM:
//   n = 000 CLR_HIST(addr): write 0 to bin addr.
//   n = 001 INC_HIST(addr): read bin addr, add one, write it back.
//   n = 010 GET_HIST(addr): return bin addr in result.
// addr is dataa[7:0], the pixel value.
//
// How it works: start and n pass through a chain of registers (start_1d,
// start_2d, ...). CLR writes 0 in its start cycle. INC saves its address in
// its start cycle, the RAM reads the bin at the next edge, and two cycles
// after start (start_2d with n_2d = INC) the RAM address is switched to the
// saved address and Q + 1 is written back. result is the RAM output Q.
//
// Interface: Nios II multi-cycle custom-instruction style (clk, clk_en,
// reset, start, n, dataa, result, done). The operand dataa must stay stable
// until done, as the processor holds it while the instruction executes.
// Timing, counting the start cycle as the first:
//   CLR_HIST, GET_HIST: done in the 2nd cycle; for GET, result is valid there.
//   INC_HIST:           done in the 4th cycle (read, write back, done).
// A new instruction may start in the cycle after done. Codes other than the
// three above complete like GET.
//
// From the source design: the register chains, the write-enable and data
// muxes, the saved-address mux, the adder, the opcodes 000 and 001, and the
// cycle counts. Own choices: GET's code 010, the done output and the third
// delay stage it needs, and qualifying state and writes with clk_en.
// Bins wrap at 2**COUNT_W; reset clears the control registers, not the table.
module hist_ci
  import ci_pkg::*;
#(
  parameter int unsigned BINS    = HIST_BINS,
  parameter int unsigned COUNT_W = 19,
  localparam int unsigned AW     = $clog2(BINS)
) (
  input  logic        clk,
  input  logic        clk_en,
  input  logic        reset,
  input  logic        start,
  input  logic [2:0]  n,
  input  logic [31:0] dataa,
  output logic [31:0] result,
  output logic        done
);

  logic           start_1d, start_2d, start_3d;
  hist_op_e       n_1d, n_2d, n_3d;
  logic [AW-1:0]  addr_r;

  logic               clr, inc_wb;
  logic [AW-1:0]      lut_addr;
  logic [COUNT_W-1:0] lut_data, lut_q;
  logic               lut_wren;

  always_ff @(posedge clk) begin
    if (reset) begin
      start_1d <= 1'b0;
      start_2d <= 1'b0;
      start_3d <= 1'b0;
      n_1d     <= HIST_CLR;
      n_2d     <= HIST_CLR;
      n_3d     <= HIST_CLR;
      addr_r   <= '0;
    end else if (clk_en) begin
      start_1d <= start;
      start_2d <= start_1d;
      start_3d <= start_2d;
      n_1d     <= hist_op_e'(n);
      n_2d     <= n_1d;
      n_3d     <= n_2d;
      if (start && n == HIST_INC) addr_r <= dataa[AW-1:0];
    end
  end

  always_comb begin
    clr      = start && n == HIST_CLR;
    inc_wb   = start_2d && n_2d == HIST_INC;
    lut_addr = inc_wb ? addr_r : dataa[AW-1:0];
    lut_data = clr ? '0 : lut_q + 1'b1;
    lut_wren = (clr || inc_wb) && clk_en;
    result   = 32'(lut_q);
    done     = (start_1d && n_1d != HIST_INC) || (start_3d && n_3d == HIST_INC);
  end

  hist_lut #(.DEPTH(BINS), .DATA_W(COUNT_W)) u_lut (
    .clk      (clk),
    .addr     (lut_addr),
    .data_in  (lut_data),
    .write_en (lut_wren),
    .q        (lut_q)
  );

endmodule

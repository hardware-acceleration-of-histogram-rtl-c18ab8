// sat_ci: saturation custom instruction SAT(P).
//
// Clamps a signed filtered pixel P, taken from the low DATA_W bits of the
// operand, into the range 0..SAT_MAX and returns it zero-extended. This
// replaces a compare-and-branch sequence of about nine processor
// instructions with one combinational custom instruction.
//
// Structure: a signed comparator flags P > SAT_MAX; the sign bit flags
// P < 0. The first mux picks SAT_MAX when the comparator fires, otherwise 0.
// The second mux passes that clamp value when either flag is set, otherwise P.
//
// Interface: Nios II combinational custom-instruction style, operand dataa,
// result. The second operand of that interface is not used and not present.
// Timing: purely combinational, result valid in the same cycle.
//
// From the source design: the 16-bit datapath, the comparator with 255, the
// two muxes and the signed reading of P. Own choice: zero extension to 32 bits.
module sat_ci
  import ci_pkg::*;
#(
  parameter int unsigned DATA_W  = 16,
  parameter int unsigned SAT_MAX = PIXEL_MAX
) (
  input  logic [31:0] dataa,
  output logic [31:0] result
);

  logic signed [DATA_W-1:0] sat_in;
  logic                     comp_out;   // P > SAT_MAX
  logic                     neg;        // P < 0 (sign bit)
  logic        [DATA_W-1:0] mux1_out;   // clamp value
  logic                     mux2_sel;
  logic        [DATA_W-1:0] mux2_out;

  always_comb begin
    sat_in   = dataa[DATA_W-1:0];
    comp_out = sat_in > $signed(DATA_W'(SAT_MAX));
    neg      = sat_in[DATA_W-1];
    mux1_out = comp_out ? DATA_W'(SAT_MAX) : '0;
    mux2_sel = comp_out | neg;
    mux2_out = mux2_sel ? mux1_out : sat_in;
    result   = 32'(mux2_out);
  end

endmodule

// ci_pkg: constants shared by the custom-instruction units and their users.
//
// The histogram custom instruction is one hardware unit that the processor
// addresses with a 3-bit selector n. CLR and INC carry the codes 000 and 001;
// GET is given the next free code, 010, as a design choice.
// The pixel range limits of the saturation unit are the 8-bit grey scale.
package ci_pkg;

  typedef enum logic [2:0] {
    HIST_CLR = 3'b000,  // clear the addressed bin
    HIST_INC = 3'b001,  // read, add one, write back
    HIST_GET = 3'b010   // read the addressed bin
  } hist_op_e;

  localparam int unsigned PIXEL_MAX = 255;
  localparam int unsigned HIST_BINS = 256;

endpackage

// pp_pkg: constants and types shared by the image compression preprocessor.
//
// A frame of FRAME_PIX pixels arrives as a repeating four-pixel pattern
// B1 E2 E3 E1 (one base and three enhanced layers).  Down sampling sorts the
// frame into those four layers of FRAME_PIX/4 pixels each and extracts a fifth
// layer, B2, from every fourth E1 pixel.  Each layer is identified by a 3-bit
// current-layer code (CL), which also selects the layer's section in the
// ping-pong frame memory: section = CL, so a frame occupies 5 sections of
// FRAME_PIX/4 words.  The CL codes follow the frame layout of the design's
// layer table: B1=000, E2=001, E1=010, B2=011, E3=100.
package pp_pkg;

  // Pixel width (16-bit pixels) and pixels per frame (64) are the design's
  // own figures.
  localparam int DEF_PIX_W     = 16;
  localparam int DEF_FRAME_PIX = 64;

  // Layers stored per frame (B1, E2, E1, B2, E3) and frames held (ping-pong).
  localparam int N_LAYERS  = 5;
  localparam int N_BANKS   = 2;

  // Current-layer code; the value is also the memory section of the layer.
  typedef enum logic [2:0] {
    CL_B1 = 3'b000,
    CL_E2 = 3'b001,
    CL_E1 = 3'b010,
    CL_B2 = 3'b011,
    CL_E3 = 3'b100
  } cl_e;

  // Layer of input pixel i is selected by i mod 4 (pattern B1 E2 E3 E1).
  function automatic cl_e layer_of_phase(input logic [1:0] phase);
    case (phase)
      2'd0:    return CL_B1;
      2'd1:    return CL_E2;
      2'd2:    return CL_E3;
      default: return CL_E1;
    endcase
  endfunction

endpackage

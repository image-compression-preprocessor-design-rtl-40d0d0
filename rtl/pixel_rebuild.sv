// pixel_rebuild: rebuilds the base-layer output route, expanding B2 to a full
// layer.
//
// B2 holds only FRAME_PIX/16 pixels (4 of a 64-pixel frame), one for every
// four E1 pixels.  The base-layer route (B's) sends a full layer of B1 and
// then B2 rebuilt to the size of a layer (16 pixels), so that every layer on
// the outputs has the same number of pixels.  The missing B2 pixels are
// generated by repeating each stored B2 pixel four times (nearest neighbour),
// which is the simplest rebuild: it is this implementation's choice, the
// design only states that B2 is rebuilt and that new pixels are generated.
//
// Interface: combinational.  idx is the position (0 .. 2*LAYER_PIX-1) in the
// base-layer output sequence; cl/addr give the layer and the frame-memory
// word to read for it, rebuilt is high for generated (repeated) pixels.
module pixel_rebuild
  import pp_pkg::*;
#(
  parameter int FRAME_PIX = pp_pkg::DEF_FRAME_PIX,
  localparam int LAYER_PIX = FRAME_PIX / 4,
  localparam int SEQ_W     = $clog2(2 * LAYER_PIX),
  localparam int POS_W     = $clog2(LAYER_PIX),
  localparam int ADDR_W    = $clog2(N_LAYERS * LAYER_PIX)
) (
  input  logic [SEQ_W-1:0]  idx,
  output cl_e               cl,
  output logic [POS_W-1:0]  pos,      // position inside the stored layer
  output logic [ADDR_W-1:0] addr,
  output logic              rebuilt
);

  logic [POS_W-1:0] k;   // position in the output layer

  assign k = POS_W'(idx);

  always_comb begin
    if (idx < SEQ_W'(LAYER_PIX)) begin
      cl      = CL_B1;
      pos     = k;
      rebuilt = 1'b0;
    end else begin
      cl      = CL_B2;
      pos     = k >> 2;
      rebuilt = (k[1:0] != 2'b00);
    end
    addr = ADDR_W'(cl) * ADDR_W'(LAYER_PIX) + ADDR_W'(pos);
  end

endmodule

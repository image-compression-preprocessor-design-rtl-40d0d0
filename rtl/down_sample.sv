// down_sample: sorts the pixels of a frame into layers (first task of the
// preprocessor).
//
// Pixels of a frame arrive one per clock on a valid/ready stream.  Pixel i of
// the frame belongs to layer B1, E2, E3 or E1 for i mod 4 = 0, 1, 2, 3, and
// takes position i/4 inside its layer, so each of the four layers receives
// FRAME_PIX/4 pixels.  Every fourth E1 pixel (E1 positions 0, 4, 8, ...) is
// also the base-layer pixel B2 at position (E1 position)/4; it is offered on
// a second lane in the same cycle so that both can be stored at once.  The
// last pixel of the frame is flagged so that the buffer control can close the
// frame.
//
// Interface: in_valid/in_ready/in_data from the image source; out_* is one
// registered stage (one cycle latency, full throughput), out_b2 qualifies the
// B2 lane.  The layer pattern and the 4-of-16 B2 extraction follow the design's
// sorting diagram; which E1 pixels form B2 (every fourth one) and the
// handshake are this implementation's choices.
module down_sample
  import pp_pkg::*;
#(
  parameter int PIX_W     = pp_pkg::DEF_PIX_W,
  parameter int FRAME_PIX = pp_pkg::DEF_FRAME_PIX,
  localparam int LAYER_PIX = FRAME_PIX / 4,
  localparam int POS_W     = $clog2(LAYER_PIX),
  localparam int IDX_W     = $clog2(FRAME_PIX)
) (
  input  logic             clk,
  input  logic             rst_n,
  // pixel stream from the image source
  input  logic             in_valid,
  output logic             in_ready,
  input  logic [PIX_W-1:0] in_data,
  // sorted pixel stream to buffer control
  output logic             out_valid,
  input  logic             out_ready,
  output logic [PIX_W-1:0] out_data,
  output cl_e              out_cl,     // current layer of the pixel
  output logic [POS_W-1:0] out_pos,    // position inside its layer
  output logic             out_last,   // last pixel of the frame
  output logic             out_b2,     // pixel is also B2 pixel out_b2_pos
  output logic [POS_W-1:0] out_b2_pos
);

  logic [IDX_W-1:0] idx;    // index of the next input pixel in its frame
  logic [POS_W-1:0] pos;
  cl_e              cl;
  logic             take;

  assign in_ready = !out_valid || out_ready;
  assign take     = in_valid && in_ready;
  assign pos      = POS_W'(idx >> 2);
  assign cl       = layer_of_phase(idx[1:0]);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      idx        <= '0;
      out_valid  <= 1'b0;
      out_data   <= '0;
      out_cl     <= CL_B1;
      out_pos    <= '0;
      out_last   <= 1'b0;
      out_b2     <= 1'b0;
      out_b2_pos <= '0;
    end else begin
      if (take) begin
        out_valid  <= 1'b1;
        out_data   <= in_data;
        out_cl     <= cl;
        out_pos    <= pos;
        out_last   <= (idx == IDX_W'(FRAME_PIX - 1));
        out_b2     <= (cl == CL_E1) && (pos[1:0] == 2'b00);
        out_b2_pos <= pos >> 2;
        idx        <= (idx == IDX_W'(FRAME_PIX - 1)) ? '0 : idx + 1'b1;
      end else if (out_ready) begin
        out_valid  <= 1'b0;
      end
    end
  end

endmodule

// buffer_control: places sorted pixels in the ping-pong frame memory and
// hands complete frames to the spatial redundancy (SR) unit.
//
// The address of a pixel inside a frame is CL * LAYER_PIX + position, so the
// current-layer code picks the layer's section of the frame.  A B2 pixel
// offered together with an E1 pixel is written through the second write port
// in the same cycle.  Two frame banks are filled alternately.  When the last
// pixel of a frame is written the bank is marked full and given to SR
// (frame_full); BC then fills the other bank.  It accepts no pixel for a bank
// that is still full, which stalls the down sampler and the image source until
// SR releases that bank (rel_valid/rel_bank): this is the BC-SR handshake
// that grants permission for the next frame transmission.
//
// Timing: a pixel is written in the cycle it is accepted (in_valid && in_ready).
// The frame_full bit rises on the clock edge that writes the last pixel and
// falls on the edge after the release.  The layer-based address, the two
// banks and the handshake with SR follow the design; the flag-per-bank
// handshake itself is this implementation's choice.
module buffer_control
  import pp_pkg::*;
#(
  parameter int PIX_W     = pp_pkg::DEF_PIX_W,
  parameter int FRAME_PIX = pp_pkg::DEF_FRAME_PIX,
  localparam int LAYER_PIX = FRAME_PIX / 4,
  localparam int POS_W     = $clog2(LAYER_PIX),
  localparam int ADDR_W    = $clog2(N_LAYERS * LAYER_PIX)
) (
  input  logic              clk,
  input  logic              rst_n,
  // sorted pixels from down sample
  input  logic              in_valid,
  output logic              in_ready,
  input  logic [PIX_W-1:0]  in_data,
  input  cl_e               in_cl,
  input  logic [POS_W-1:0]  in_pos,
  input  logic              in_last,
  input  logic              in_b2,
  input  logic [POS_W-1:0]  in_b2_pos,
  // write port A (all layers) and write port B (B2) of the frame memory
  output logic              wa_en,
  output logic              wa_bank,
  output logic [ADDR_W-1:0] wa_addr,
  output logic [PIX_W-1:0]  wa_data,
  output logic              wb_en,
  output logic              wb_bank,
  output logic [ADDR_W-1:0] wb_addr,
  output logic [PIX_W-1:0]  wb_data,
  // handshake with SR
  output logic [1:0]        frame_full,  // bank holds a complete frame
  input  logic              rel_valid,   // SR has finished reading rel_bank
  input  logic              rel_bank,
  output logic              wr_bank      // bank being filled
);

  logic take;

  assign in_ready = !frame_full[wr_bank];
  assign take     = in_valid && in_ready;

  assign wa_en   = take;
  assign wa_bank = wr_bank;
  assign wa_addr = ADDR_W'(in_cl) * ADDR_W'(LAYER_PIX) + ADDR_W'(in_pos);
  assign wa_data = in_data;

  assign wb_en   = take && in_b2;
  assign wb_bank = wr_bank;
  assign wb_addr = ADDR_W'(CL_B2) * ADDR_W'(LAYER_PIX) + ADDR_W'(in_b2_pos);
  assign wb_data = in_data;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_bank    <= 1'b0;
      frame_full <= 2'b00;
    end else begin
      for (int b = 0; b < 2; b++) begin
        if (take && in_last && wr_bank == 1'(b))
          frame_full[b] <= 1'b1;
        else if (rel_valid && rel_bank == 1'(b))
          frame_full[b] <= 1'b0;
      end
      if (take && in_last)
        wr_bank <= !wr_bank;
    end
  end

  // SR may only release a bank it was given.
  assert property (@(posedge clk) disable iff (!rst_n)
                   rel_valid |-> frame_full[rel_bank])
    else $error("buffer_control: release of a bank that is not full");

endmodule

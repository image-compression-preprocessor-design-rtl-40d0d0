// preprocessor_top: concurrent image compression preprocessor.
//
// The preprocessor takes a frame of FRAME_PIX pixels (64 pixels of 16 bits by
// default) at one pixel per clock, sorts it into five layers (base layers B1,
// B2 and enhanced layers E1, E2, E3), stores it in a two-frame ping-pong
// memory and delivers it on two independent routes, one for the enhanced
// layers (E's) and one for the base layers (B's), each feeding its own coder.
// The chain is the design's task partitioning:
//   down_sample        sorts pixels into layers, tags each with its layer code
//   buffer_control     computes the frame-memory address, alternates banks,
//                      handshakes with SR for permission to fill a bank
//   pingpong_ram       two frames, concurrent write and concurrent read
//   spatial_redundancy reads a full frame over both read ports at once and
//                      bifurcates it into E's and B's; B2 is rebuilt to a
//                      full layer (pixel_rebuild) on the B route
// The coders are outside this design; their streams and ready inputs are the
// data_out* ports, and their feedback to SR (rebuilt data returned, after
// which SR may start the next frame) is the coder_done input.  The port names stat, pix_data_in, data_out and data_out_e
// are those of the design's simulation; ready/valid signals are additions.
//
// Timing: input pixels are accepted whenever pix_ready is high; pix_ready
// falls only when both banks hold frames that SR has not finished, i.e. when
// the coders fall behind.  At full rate the first output pixel of a frame is
// valid FRAME_PIX + 2 cycles after the clock edge that accepted the frame's
// first pixel (66 cycles, 1.32 us at the 50 MHz pixel clock); the routes then
// run at one pixel per clock each: 3*FRAME_PIX/4 cycles on the E route,
// FRAME_PIX/2 on the B route.
module preprocessor_top
  import pp_pkg::*;
#(
  parameter int PIX_W     = pp_pkg::DEF_PIX_W,
  parameter int FRAME_PIX = pp_pkg::DEF_FRAME_PIX
) (
  input  logic             clk,
  input  logic             rst_n,
  // image input
  input  logic             stat,          // pixel valid
  input  logic [PIX_W-1:0] pix_data_in,
  output logic             pix_ready,
  // base-layer output (B's) to coder 1
  output logic [PIX_W-1:0] data_out,
  output logic             data_out_valid,
  output logic [2:0]       data_out_layer,
  output logic             data_out_last,
  output logic             data_out_rebuilt, // pixel generated by B2 rebuild
  input  logic             data_out_ready,
  // enhanced-layer output (E's) to coder 2
  output logic [PIX_W-1:0] data_out_e,
  output logic             data_out_e_valid,
  output logic [2:0]       data_out_e_layer,
  output logic             data_out_e_last,
  input  logic             data_out_e_ready,
  // coder feedback: rebuilt data of the last started frame is back in SR
  input  logic             coder_done,
  output logic             coder_wait
);

  localparam int LAYER_PIX = FRAME_PIX / 4;
  localparam int POS_W     = $clog2(LAYER_PIX);
  localparam int ADDR_W    = $clog2(N_LAYERS * LAYER_PIX);

  // down sample -> buffer control
  logic             ds_valid, ds_ready, ds_last, ds_b2;
  logic [PIX_W-1:0] ds_data;
  cl_e              ds_cl;
  logic [POS_W-1:0] ds_pos, ds_b2_pos;

  // buffer control -> memory
  logic              wa_en, wa_bank, wb_en, wb_bank;
  logic [ADDR_W-1:0] wa_addr, wb_addr;
  logic [PIX_W-1:0]  wa_data, wb_data;

  // SR <-> memory
  logic              ra_en, ra_bank, rb_en, rb_bank;
  logic [ADDR_W-1:0] ra_addr, rb_addr;
  logic [PIX_W-1:0]  ra_data, rb_data;

  // BC <-> SR handshake
  logic [1:0] frame_full;
  logic       rel_valid, rel_bank;

  cl_e  e_cl, b_cl;

  down_sample #(.PIX_W(PIX_W), .FRAME_PIX(FRAME_PIX)) u_ds (
    .clk, .rst_n,
    .in_valid(stat), .in_ready(pix_ready), .in_data(pix_data_in),
    .out_valid(ds_valid), .out_ready(ds_ready), .out_data(ds_data),
    .out_cl(ds_cl), .out_pos(ds_pos), .out_last(ds_last),
    .out_b2(ds_b2), .out_b2_pos(ds_b2_pos)
  );

  buffer_control #(.PIX_W(PIX_W), .FRAME_PIX(FRAME_PIX)) u_bc (
    .clk, .rst_n,
    .in_valid(ds_valid), .in_ready(ds_ready), .in_data(ds_data),
    .in_cl(ds_cl), .in_pos(ds_pos), .in_last(ds_last),
    .in_b2(ds_b2), .in_b2_pos(ds_b2_pos),
    .wa_en, .wa_bank, .wa_addr, .wa_data,
    .wb_en, .wb_bank, .wb_addr, .wb_data,
    .frame_full, .rel_valid, .rel_bank, .wr_bank()
  );

  pingpong_ram #(.PIX_W(PIX_W), .FRAME_PIX(FRAME_PIX)) u_ram (
    .clk,
    .wa_en, .wa_bank, .wa_addr, .wa_data,
    .wb_en, .wb_bank, .wb_addr, .wb_data,
    .ra_en, .ra_bank, .ra_addr, .ra_data,
    .rb_en, .rb_bank, .rb_addr, .rb_data
  );

  spatial_redundancy #(.PIX_W(PIX_W), .FRAME_PIX(FRAME_PIX)) u_sr (
    .clk, .rst_n,
    .frame_full, .rel_valid, .rel_bank,
    .coder_done, .coder_wait,
    .ra_en, .ra_bank, .ra_addr, .ra_data,
    .rb_en, .rb_bank, .rb_addr, .rb_data,
    .e_valid(data_out_e_valid), .e_ready(data_out_e_ready), .e_data(data_out_e),
    .e_cl, .e_last(data_out_e_last),
    .b_valid(data_out_valid), .b_ready(data_out_ready), .b_data(data_out),
    .b_cl, .b_last(data_out_last), .b_rebuilt(data_out_rebuilt)
  );

  assign data_out_layer   = b_cl;
  assign data_out_e_layer = e_cl;

endmodule

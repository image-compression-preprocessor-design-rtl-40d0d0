// spatial_redundancy (SR): reads complete frames from the ping-pong memory
// and bifurcates them into the enhanced-layer and base-layer output routes.
//
// When buffer control reports the next bank full, SR starts two read routes
// at once, one on each read port of the memory:
//   E route (enhanced layers, to one coder): E2, E1, E3, in the order of
//           their sections in the frame, 3 * LAYER_PIX pixels;
//   B route (base layers, to the other coder): B1, then B2 rebuilt to a full
//           layer by pixel_rebuild, 2 * LAYER_PIX pixels.
// Each output pixel carries its layer code.  Each route has its own ready
// input, so one coder can stall without stopping the other.  When both
// routes have delivered their last pixel, SR releases the bank to buffer
// control (rel_valid pulse with rel_bank) and moves to the other bank, so
// banks are read in the order they were filled.  SR also depends on the
// coders: after it has started a frame it starts no further frame until the
// coders report, with a pulse on coder_done, that the rebuilt data of that
// frame has come back.  Coders without this feedback tie coder_done high.
//
// Timing: the first pixels appear two cycles after frame_full rises for the
// bank (start, first read, data); then one pixel per cycle per route while
// the coder is ready.  The split into E's and B's, the layers of each and the
// bank handshake and the wait for the coders follow the design; the route
// orders, the two-port concurrent read schedule and the single-pulse form of
// the coder feedback are this implementation's choices.
module spatial_redundancy
  import pp_pkg::*;
#(
  parameter int PIX_W     = pp_pkg::DEF_PIX_W,
  parameter int FRAME_PIX = pp_pkg::DEF_FRAME_PIX,
  localparam int LAYER_PIX = FRAME_PIX / 4,
  localparam int E_LEN     = 3 * LAYER_PIX,
  localparam int B_LEN     = 2 * LAYER_PIX,
  localparam int E_IDX_W   = $clog2(E_LEN),
  localparam int B_IDX_W   = $clog2(B_LEN),
  localparam int POS_W     = $clog2(LAYER_PIX),
  localparam int ADDR_W    = $clog2(N_LAYERS * LAYER_PIX)
) (
  input  logic              clk,
  input  logic              rst_n,
  // handshake with buffer control
  input  logic [1:0]        frame_full,
  output logic              rel_valid,
  output logic              rel_bank,
  // read port A (E route) and read port B (B route) of the frame memory
  output logic              ra_en,
  output logic              ra_bank,
  output logic [ADDR_W-1:0] ra_addr,
  input  logic [PIX_W-1:0]  ra_data,
  output logic              rb_en,
  output logic              rb_bank,
  output logic [ADDR_W-1:0] rb_addr,
  input  logic [PIX_W-1:0]  rb_data,
  // coder feedback: rebuilt data of the last started frame is back
  input  logic              coder_done,
  output logic              coder_wait,  // frame ready but waiting for coders
  // enhanced-layer output (E's)
  output logic              e_valid,
  input  logic              e_ready,
  output logic [PIX_W-1:0]  e_data,
  output cl_e               e_cl,
  output logic              e_last,
  // base-layer output (B's)
  output logic              b_valid,
  input  logic              b_ready,
  output logic [PIX_W-1:0]  b_data,
  output cl_e               b_cl,
  output logic              b_last,
  output logic              b_rebuilt   // pixel generated by the rebuild
);

  logic               rd_bank;   // bank read by the current / next frame
  logic               running;
  logic               coder_busy;  // coders still working on a started frame
  logic               start;
  logic               e_busy, b_busy;
  logic [E_IDX_W-1:0] e_idx;
  logic [B_IDX_W-1:0] b_idx;
  cl_e                e_cl_rd, b_cl_rd;
  logic [POS_W-1:0]   e_pos;
  logic [ADDR_W-1:0]  b_addr_rd;
  logic               b_rebuilt_rd;

  assign start      = !running && !coder_busy && frame_full[rd_bank];
  assign coder_wait = !running && coder_busy && frame_full[rd_bank];

  route_reader #(.LEN(E_LEN)) u_e_route (
    .clk, .rst_n, .start, .out_ready(e_ready),
    .rd_en(ra_en), .idx(e_idx), .out_valid(e_valid), .out_last(e_last),
    .busy(e_busy)
  );

  route_reader #(.LEN(B_LEN)) u_b_route (
    .clk, .rst_n, .start, .out_ready(b_ready),
    .rd_en(rb_en), .idx(b_idx), .out_valid(b_valid), .out_last(b_last),
    .busy(b_busy)
  );

  // E route: E2, E1, E3 layers of LAYER_PIX pixels each.
  always_comb begin
    if (e_idx < E_IDX_W'(LAYER_PIX))
      e_cl_rd = CL_E2;
    else if (e_idx < E_IDX_W'(2 * LAYER_PIX))
      e_cl_rd = CL_E1;
    else
      e_cl_rd = CL_E3;
    e_pos = POS_W'(e_idx);
  end
  assign ra_bank = rd_bank;
  assign ra_addr = ADDR_W'(e_cl_rd) * ADDR_W'(LAYER_PIX) + ADDR_W'(e_pos);

  // B route: B1, then B2 rebuilt to a full layer.
  pixel_rebuild #(.FRAME_PIX(FRAME_PIX)) u_rebuild (
    .idx(b_idx), .cl(b_cl_rd), .pos(), .addr(b_addr_rd),
    .rebuilt(b_rebuilt_rd)
  );
  assign rb_bank = rd_bank;
  assign rb_addr = b_addr_rd;

  assign e_data = ra_data;
  assign b_data = rb_data;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_bank   <= 1'b0;
      running    <= 1'b0;
      coder_busy <= 1'b0;
      rel_valid  <= 1'b0;
      rel_bank  <= 1'b0;
      e_cl      <= CL_E2;
      b_cl      <= CL_B1;
      b_rebuilt <= 1'b0;
    end else begin
      rel_valid <= 1'b0;
      if (start) begin
        running <= 1'b1;
      end else if (running && !e_busy && !b_busy) begin
        running   <= 1'b0;
        rel_valid <= 1'b1;
        rel_bank  <= rd_bank;
        rd_bank   <= !rd_bank;
      end
      if (start)
        coder_busy <= 1'b1;
      else if (coder_done)
        coder_busy <= 1'b0;
      if (ra_en) e_cl <= e_cl_rd;
      if (rb_en) begin
        b_cl      <= b_cl_rd;
        b_rebuilt <= b_rebuilt_rd;
      end
    end
  end

endmodule

// pingpong_ram: dual-frame pixel memory with concurrent write and concurrent
// read.
//
// The memory holds two frames (banks) of N_LAYERS * FRAME_PIX/4 pixels; while
// one bank is written with a new frame the other is read, and the roles swap
// frame by frame.  It has two write ports and two read ports, all usable in
// the same cycle: port A writes every sorted pixel, port B writes the B2 copy
// of an E1 pixel, and the two read ports serve the enhanced-layer and the
// base-layer output routes concurrently (concurrent write, concurrent read).
// Writes to the same word from both ports in one cycle do not occur in this
// design; port B would win.
//
// Timing: writes take effect at the clock edge; reads are synchronous, the
// word addressed in a cycle with r*_en high appears on r*_data after the next
// edge and is held while r*_en is low.  Two frames and concurrent read/write
// follow the design; the port structure and read latency are this
// implementation's choices.
module pingpong_ram
  import pp_pkg::*;
#(
  parameter int PIX_W     = pp_pkg::DEF_PIX_W,
  parameter int FRAME_PIX = pp_pkg::DEF_FRAME_PIX,
  localparam int WORDS    = N_LAYERS * (FRAME_PIX / 4),
  localparam int ADDR_W   = $clog2(WORDS)
) (
  input  logic              clk,
  // write ports
  input  logic              wa_en,
  input  logic              wa_bank,
  input  logic [ADDR_W-1:0] wa_addr,
  input  logic [PIX_W-1:0]  wa_data,
  input  logic              wb_en,
  input  logic              wb_bank,
  input  logic [ADDR_W-1:0] wb_addr,
  input  logic [PIX_W-1:0]  wb_data,
  // read ports
  input  logic              ra_en,
  input  logic              ra_bank,
  input  logic [ADDR_W-1:0] ra_addr,
  output logic [PIX_W-1:0]  ra_data,
  input  logic              rb_en,
  input  logic              rb_bank,
  input  logic [ADDR_W-1:0] rb_addr,
  output logic [PIX_W-1:0]  rb_data
);

  logic [PIX_W-1:0] mem [N_BANKS][WORDS];

  always_ff @(posedge clk) begin
    if (wa_en) mem[wa_bank][wa_addr] <= wa_data;
    if (wb_en) mem[wb_bank][wb_addr] <= wb_data;
  end

  always_ff @(posedge clk) begin
    if (ra_en) ra_data <= mem[ra_bank][ra_addr];
    if (rb_en) rb_data <= mem[rb_bank][rb_addr];
  end

  assert property (@(posedge clk) wa_en |-> wa_addr < ADDR_W'(WORDS))
    else $error("pingpong_ram: write address A out of range");
  assert property (@(posedge clk) wb_en |-> wb_addr < ADDR_W'(WORDS))
    else $error("pingpong_ram: write address B out of range");

endmodule

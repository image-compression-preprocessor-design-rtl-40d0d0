// route_reader: read sequencer for one output route of the spatial
// redundancy unit.
//
// After start it issues LEN reads, one per cycle, numbered idx = 0 .. LEN-1,
// to a memory with one cycle of read latency.  The word read appears as the
// route's output in the next cycle (out_valid).  A read is issued only when
// the output register is free or is being taken (!out_valid || out_ready), so
// a coder that is not ready stalls the route without losing a pixel; the
// memory holds its read data while no read is issued.  busy stays high until
// the last pixel has been taken.
module route_reader #(
  parameter int LEN = 48,
  localparam int IDX_W = $clog2(LEN)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,     // begin a new sequence (when !busy)
  input  logic             out_ready,
  output logic             rd_en,     // issue read for idx
  output logic [IDX_W-1:0] idx,
  output logic             out_valid,
  output logic             out_last,  // out_valid belongs to idx LEN-1
  output logic             busy
);

  logic active;

  assign rd_en = active && (!out_valid || out_ready);
  assign busy  = active || out_valid;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      active    <= 1'b0;
      idx       <= '0;
      out_valid <= 1'b0;
      out_last  <= 1'b0;
    end else begin
      if (start && !busy) begin
        active <= 1'b1;
        idx    <= '0;
      end else if (rd_en) begin
        idx <= idx + 1'b1;
        if (idx == IDX_W'(LEN - 1))
          active <= 1'b0;
      end
      if (rd_en) begin
        out_valid <= 1'b1;
        out_last  <= (idx == IDX_W'(LEN - 1));
      end else if (out_ready) begin
        out_valid <= 1'b0;
      end
    end
  end

endmodule

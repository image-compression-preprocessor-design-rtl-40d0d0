// tb_buffer_control: self-checking test of buffer_control.
//
// Feeds sorted pixels (layer code and position computed here) for four
// frames.  Checks the write address CL*16 + position on port A, the B2 write
// on port B (section 3, positions 0..3), the bank of every write, that a
// bank is marked full after its 64th pixel, that a third frame is refused
// while both banks are full (stall), and that it is accepted into bank 0 after
// that bank is released.
module tb_buffer_control;
  import pp_pkg::*;

  logic clk = 0, rst_n = 0;
  logic in_valid, in_ready, in_last, in_b2;
  logic [15:0] in_data;
  cl_e in_cl;
  logic [3:0] in_pos, in_b2_pos;
  logic wa_en, wa_bank, wb_en, wb_bank;
  logic [6:0] wa_addr, wb_addr;
  logic [15:0] wa_data, wb_data;
  logic [1:0] frame_full;
  logic rel_valid, rel_bank, wr_bank;
  int checks = 0, failures = 0, stall_cycles = 0;

  buffer_control dut (.*);

  always #5 clk = !clk;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // Offer pixel i of a frame; wait until it is taken, checking the writes.
  task automatic send(input int i, input bit bank);
    int ph;
    ph = i % 4;
    in_valid  = 1;
    in_data   = 16'($urandom);
    in_cl     = layer_of_phase(2'(ph));
    in_pos    = 4'(i / 4);
    in_last   = (i == 63);
    in_b2     = (i % 16 == 3);
    in_b2_pos = 4'(i / 16);
    #1;
    while (!in_ready) begin
      stall_cycles++;
      chk(!wa_en && !wb_en, "no write while stalled");
      @(posedge clk); #1;
    end
    chk(wa_en && wa_bank == bank, $sformatf("port A enable/bank pixel %0d", i));
    chk(wa_addr == 7'(int'(in_cl) * 16 + i / 4), $sformatf("port A address pixel %0d: %0d", i, wa_addr));
    chk(wa_data == in_data, "port A data");
    chk(wb_en == in_b2, $sformatf("port B enable pixel %0d", i));
    if (in_b2) begin
      chk(wb_addr == 7'(48 + i / 16) && wb_bank == bank, $sformatf("port B address pixel %0d: %0d", i, wb_addr));
      chk(wb_data == in_data, "port B data");
    end
    @(posedge clk); #1;
    in_valid = 0;
  endtask

  task automatic release_bank(input bit b);
    rel_valid = 1; rel_bank = b;
    @(posedge clk); #1;
    rel_valid = 0;
  endtask

  initial begin
    in_valid = 0; rel_valid = 0; rel_bank = 0;
    in_data = 0; in_cl = CL_B1; in_pos = 0; in_last = 0; in_b2 = 0; in_b2_pos = 0;
    repeat (3) @(posedge clk); #1;
    rst_n = 1;
    chk(frame_full == 2'b00 && in_ready, "idle after reset");
    for (int i = 0; i < 64; i++) send(i, 0);
    chk(frame_full == 2'b01 && wr_bank == 1, "bank 0 full after frame 0");
    for (int i = 0; i < 64; i++) send(i, 1);
    chk(frame_full == 2'b11 && wr_bank == 0, "both banks full after frame 1");
    // third frame must stall until bank 0 is released
    fork
      send(0, 0);
      begin
        repeat (5) @(posedge clk); #1;
        chk(!in_ready, "stalled while both banks full");
        release_bank(0);
      end
    join
    chk(stall_cycles >= 5, $sformatf("stall lasted %0d cycles", stall_cycles));
    for (int i = 1; i < 64; i++) send(i, 0);
    chk(frame_full == 2'b11, "bank 0 full again");
    release_bank(1);
    chk(frame_full == 2'b01 && in_ready && wr_bank == 1, "bank 1 free after release");
    for (int i = 0; i < 64; i++) send(i, 1);
    chk(frame_full == 2'b11, "bank 1 full again");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

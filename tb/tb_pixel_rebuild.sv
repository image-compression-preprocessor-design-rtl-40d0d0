// tb_pixel_rebuild: self-checking test of pixel_rebuild.
//
// Walks the whole base-layer output sequence (32 entries for a 64-pixel
// frame) and checks, against values worked out here, that entries 0..15 read
// B1 positions 0..15 (memory words 0..15) and entries 16..31 read B2 position
// (entry-16)/4 (memory words 48..51), each B2 pixel four times, the three
// repeats flagged as rebuilt.
module tb_pixel_rebuild;
  import pp_pkg::*;
  logic [4:0] idx;
  cl_e cl;
  logic [3:0] pos;
  logic [6:0] addr;
  logic rebuilt;
  int checks = 0, failures = 0;
  int b2_reads [4];

  pixel_rebuild dut (.*);

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    for (int k = 0; k < 4; k++) b2_reads[k] = 0;
    for (int i = 0; i < 32; i++) begin
      idx = 5'(i);
      #1;
      if (i < 16) begin
        chk(cl == CL_B1 && pos == 4'(i) && addr == 7'(i) && !rebuilt,
            $sformatf("B1 entry %0d: cl %0d addr %0d", i, cl, addr));
      end else begin
        chk(cl == CL_B2 && pos == 4'((i - 16) / 4) && addr == 7'(48 + (i - 16) / 4),
            $sformatf("B2 entry %0d: cl %0d addr %0d", i, cl, addr));
        chk(rebuilt == ((i - 16) % 4 != 0), $sformatf("rebuilt flag entry %0d", i));
        if (addr >= 48 && addr < 52) b2_reads[addr - 48]++;
      end
    end
    for (int k = 0; k < 4; k++) chk(b2_reads[k] == 4, $sformatf("B2 pixel %0d used %0d times", k, b2_reads[k]));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

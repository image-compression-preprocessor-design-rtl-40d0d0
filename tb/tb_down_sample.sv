// tb_down_sample: self-checking test of down_sample.
//
// Sends three frames of random 16-bit pixels, the first at full rate and the
// rest with random gaps on the input and random back-pressure on the output.
// Every output pixel is compared with a reference computed here from its index
// in the frame: layer B1/E2/E3/E1 for index mod 4 = 0..3, position index/4,
// last flag on index 63, and the B2 copy on E1 positions 0, 4, 8, 12 at B2
// position 0..3.  Also checks that a full-rate frame passes in 64 cycles.
module tb_down_sample;
  import pp_pkg::*;

  localparam int FP = 64;
  logic clk = 0, rst_n = 0;
  logic in_valid, in_ready, out_valid, out_ready, out_last, out_b2;
  logic [15:0] in_data, out_data;
  cl_e out_cl;
  logic [3:0] out_pos, out_b2_pos;
  int checks = 0, failures = 0;
  int sent = 0, got = 0, cyc = 0, first_out = -1, last_out = -1;
  logic [15:0] pix [$];
  bit random_mode = 0;

  down_sample dut (.*);

  always #5 clk = !clk;
  always @(posedge clk) cyc++;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // source
  always @(posedge clk) begin
    if (rst_n) begin
      if (in_valid && in_ready) sent++;
      if (sent < 3 * FP) begin
        in_valid <= random_mode ? ($urandom_range(0, 3) != 0) : 1'b1;
        in_data  <= 16'($urandom);
      end else in_valid <= 1'b0;
      out_ready <= random_mode ? ($urandom_range(0, 3) != 0) : 1'b1;
    end
  end
  always @(posedge clk) if (rst_n && in_valid && in_ready) pix.push_back(in_data);

  // checker
  always @(posedge clk) begin
    if (rst_n && out_valid && out_ready) begin
      int i;
      cl_e exp_cl;
      i = got % FP;
      exp_cl = (i % 4 == 0) ? CL_B1 : (i % 4 == 1) ? CL_E2 : (i % 4 == 2) ? CL_E3 : CL_E1;
      chk(out_data == pix[got], $sformatf("data pixel %0d", got));
      chk(out_cl == exp_cl, $sformatf("layer pixel %0d: %0d", got, out_cl));
      chk(out_pos == 4'(i / 4), $sformatf("pos pixel %0d", got));
      chk(out_last == (i == FP - 1), $sformatf("last pixel %0d", got));
      chk(out_b2 == (i % 16 == 3), $sformatf("b2 flag pixel %0d", got));
      if (i % 16 == 3) chk(out_b2_pos == 4'(i / 16), $sformatf("b2 pos pixel %0d", got));
      if (got == 0) first_out = cyc;
      if (got == FP - 1) last_out = cyc;
      got++;
      if (got == FP) random_mode = 1;
    end
  end

  initial begin
    in_valid = 0; out_ready = 0; in_data = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (got == 3 * FP);
    chk(last_out - first_out == FP - 1, $sformatf("full-rate frame took %0d cycles", last_out - first_out + 1));
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

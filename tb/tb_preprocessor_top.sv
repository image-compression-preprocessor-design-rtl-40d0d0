// tb_preprocessor_top: end-to-end test of the preprocessor at its default
// size (64-pixel frames of 16-bit pixels).
//
// Streams eight frames of random pixels and checks every pixel on both output
// routes against a reference model written here from the layer rules:
//   pixel i of a frame is B1/E2/E3/E1 for i mod 4 = 0/1/2/3 at position i/4;
//   B2 position j is E1 position 4j (input pixel 16j + 3);
//   E route per frame: E2[0..15], E1[0..15], E3[0..15];
//   B route per frame: B1[0..15], then B2[k/4] for k = 0..15.
// Frame 0 runs at full rate with both coders ready, and must give its first
// output pixel FRAME_PIX+2 cycles after the first input pixel was accepted
// and its 48 E pixels in 48 consecutive cycles.  Later frames run with gaps in
// the input and with slow coders, so that both frame banks fill and the input
// is stalled.  Each mechanism is counted and must occur at least once: input
// stall (pix_ready low), coder stall on each route, both frame banks full,
// B2 pixels on the output, rebuilt (repeated) B2 pixels, and SR waiting for
// the coders' feedback (coder_done, returned here a random time after a
// frame is complete; no frame may start before the previous one's).
module tb_preprocessor_top;
  import pp_pkg::*;

  localparam int FP = 64;
  localparam int NF = 8;

  logic clk = 0, rst_n = 0;
  logic stat, pix_ready;
  logic [15:0] pix_data_in, data_out, data_out_e;
  logic data_out_valid, data_out_last, data_out_rebuilt, data_out_ready;
  logic data_out_e_valid, data_out_e_last, data_out_e_ready;
  logic [2:0] data_out_layer, data_out_e_layer;
  logic coder_done, coder_wait;
  int acked = 0, done_cnt = 0, n_wait = 0;

  logic [15:0] pix [NF][FP];
  int checks = 0, failures = 0, cyc = 0;
  int sent = 0, ne = 0, nb = 0;
  int first_in = -1, first_out = -1, first_e = -1, last_e = -1;
  int n_in_stall = 0, n_e_stall = 0, n_b_stall = 0, n_b2 = 0, n_rebuilt = 0;
  int max_held = 0;
  int phase = 0;   // 0: full rate, 1: slow coders, 2: random gaps everywhere

  preprocessor_top dut (.*);

  always #10 clk = !clk;   // 20 ns per pixel
  always @(posedge clk) cyc++;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  function automatic logic [15:0] e_ref(int f, int k);
    int l, p;
    l = k / 16; p = k % 16;
    // E2 is phase 1, E1 phase 3, E3 phase 2
    return pix[f][4 * p + ((l == 0) ? 1 : (l == 1) ? 3 : 2)];
  endfunction
  function automatic logic [2:0] e_layer(int k);
    return (k < 16) ? 3'(CL_E2) : (k < 32) ? 3'(CL_E1) : 3'(CL_E3);
  endfunction
  function automatic logic [15:0] b_ref(int f, int k);
    if (k < 16) return pix[f][4 * k];
    return pix[f][16 * ((k - 16) / 4) + 3];
  endfunction

  initial begin
    for (int f = 0; f < NF; f++)
      for (int i = 0; i < FP; i++) pix[f][i] = 16'($urandom);
  end

  // image source and coders
  always @(posedge clk) begin
    if (rst_n) begin
      if (stat && pix_ready) begin
        if (first_in < 0) first_in = cyc;
        sent++;
      end
      if (stat && !pix_ready) n_in_stall++;
      if (sent < NF * FP) begin
        stat        <= (phase == 2) ? ($urandom_range(0, 3) != 0) : 1'b1;
        pix_data_in <= pix[sent / FP][sent % FP];
      end else stat <= 1'b0;
      data_out_e_ready <= (phase == 0) ? 1'b1 : ($urandom_range(0, 3) == 0);
      data_out_ready   <= (phase == 0) ? 1'b1 : ($urandom_range(0, 3) == 0);
    end
  end

  // coder feedback model
  always @(posedge clk) if (rst_n) begin
    int complete;
    complete = (ne / 48 < nb / 32) ? ne / 48 : nb / 32;
    coder_done <= 1'b0;
    if (coder_wait) n_wait++;
    if (acked < complete) begin
      if (done_cnt == 0) begin
        coder_done <= 1'b1;
        acked++;
        done_cnt = (phase == 0) ? 0 : $urandom_range(5, 150);
      end else done_cnt--;
    end
  end

  // output checkers
  always @(posedge clk) if (rst_n) begin
    if (data_out_e_valid && !data_out_e_ready) n_e_stall++;
    if (data_out_valid && !data_out_ready) n_b_stall++;
    if (data_out_e_valid && data_out_e_ready) begin
      chk(data_out_e == e_ref(ne / 48, ne % 48), $sformatf("E frame %0d pixel %0d", ne / 48, ne % 48));
      chk(data_out_e_layer == e_layer(ne % 48), $sformatf("E layer frame %0d pixel %0d", ne / 48, ne % 48));
      chk(data_out_e_last == (ne % 48 == 47), "E last");
      if (ne % 48 == 0) chk(acked >= ne / 48, $sformatf("frame %0d started before coder_done", ne / 48));
      if (ne == 0) begin first_e = cyc; if (first_out < 0) first_out = cyc; end
      if (ne == 47) last_e = cyc;
      ne++;
      if (ne == 48) phase = 1;
      if (ne == 4 * 48) phase = 2;
    end
    if (data_out_valid && data_out_ready) begin
      chk(data_out == b_ref(nb / 32, nb % 32), $sformatf("B frame %0d pixel %0d", nb / 32, nb % 32));
      chk(data_out_layer == ((nb % 32 < 16) ? 3'(CL_B1) : 3'(CL_B2)), "B layer");
      chk(data_out_last == (nb % 32 == 31), "B last");
      if (data_out_layer == 3'(CL_B2)) n_b2++;
      if (data_out_rebuilt) n_rebuilt++;
      if (nb == 0 && first_out < 0) first_out = cyc;
      nb++;
    end
  end

  // frames held inside the preprocessor (fully received, not yet fully sent
  // on both routes); two means both frame banks are occupied at once
  always @(posedge clk) if (rst_n) begin
    int held;
    held = sent / FP - ((ne / 48 < nb / 32) ? ne / 48 : nb / 32);
    if (held > max_held) max_held = held;
  end

  initial begin
    stat = 0; pix_data_in = 0; coder_done = 0; data_out_ready = 1; data_out_e_ready = 1;
    repeat (3) @(posedge clk); #1;
    rst_n = 1;
    wait (ne == NF * 48 && nb == NF * 32);
    repeat (5) @(posedge clk);
    chk(first_out - first_in == FP + 3,
        $sformatf("first output taken %0d edges after first input", first_out - first_in));
    chk(last_e - first_e == 47, $sformatf("frame 0 E route took %0d cycles", last_e - first_e + 1));
    chk(!data_out_valid && !data_out_e_valid, "no output beyond the frames sent");
    $display("mechanisms: input stall %0d, E coder stall %0d, B coder stall %0d, frames held at once %0d, B2 out %0d, rebuilt %0d, coder wait %0d",
             n_in_stall, n_e_stall, n_b_stall, max_held, n_b2, n_rebuilt, n_wait);
    chk(n_in_stall > 0, "input stall occurred");
    chk(n_e_stall > 0, "E coder stall occurred");
    chk(n_b_stall > 0, "B coder stall occurred");
    chk(max_held == 2, "both frame banks held frames at once");
    chk(n_b2 == NF * 16, "B2 pixels delivered");
    chk(n_rebuilt == NF * 12, "rebuilt pixels delivered");
    chk(n_wait > 0, "SR waited for coder feedback");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

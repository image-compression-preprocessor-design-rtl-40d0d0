// tb_spatial_redundancy: self-checking test of spatial_redundancy with the
// ping-pong frame memory.
//
// The testbench plays the buffer control: it fills a bank with random words,
// raises that bank's frame_full bit, and refills the bank after SR releases
// it.  For four frames it checks both output routes against the word layout
// of a frame worked out here: E route = words 16..31 (E2), 32..47 (E1),
// 64..79 (E3); B route = words 0..15 (B1), then word 48 + k/4 for k = 0..15
// (B2 rebuilt), with the layer code of every pixel.  It checks that banks are
// released alternately, once per frame, and only after both routes are done.
// Frame 0 runs with both coders always ready and must deliver the 48 E pixels
// in 48 consecutive cycles, valid two cycles after frame_full rises (taken
// on the third clock edge); the other
// frames run with random stalls on each route and a coder model that
// returns coder_done a random time after a frame is complete; SR must not
// start a frame before the coder_done of the previous one, and must be seen
// waiting for it (coder_wait) at least once.
module tb_spatial_redundancy;
  import pp_pkg::*;

  logic clk = 0, rst_n = 0;
  logic [1:0] frame_full;
  logic rel_valid, rel_bank;
  logic ra_en, ra_bank, rb_en, rb_bank;
  logic [6:0] ra_addr, rb_addr;
  logic [15:0] ra_data, rb_data;
  logic coder_done, coder_wait;
  logic e_valid, e_ready, e_last, b_valid, b_ready, b_last, b_rebuilt;
  logic [15:0] e_data, b_data;
  cl_e e_cl, b_cl;
  logic wa_en, wa_bank;
  logic [6:0] wa_addr;
  logic [15:0] wa_data;
  logic [15:0] img [2][80];
  int checks = 0, failures = 0, cyc = 0;
  int frame_e = 0, frame_b = 0, ne = 0, nb = 0, nrel = 0, stalls = 0;
  int full_cyc = -1, first_e = -1, last_e = -1;
  bit random_ready = 0;
  int acked = 0, done_cnt = 0, n_wait = 0;

  spatial_redundancy dut (.*);

  pingpong_ram u_ram (
    .clk, .wa_en, .wa_bank, .wa_addr, .wa_data,
    .wb_en(1'b0), .wb_bank(1'b0), .wb_addr(7'd0), .wb_data(16'd0),
    .ra_en, .ra_bank, .ra_addr, .ra_data, .rb_en, .rb_bank, .rb_addr, .rb_data
  );

  always #5 clk = !clk;
  always @(posedge clk) cyc++;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  function automatic int e_word(int k);
    return (k < 16) ? 16 + k : (k < 32) ? 32 + (k - 16) : 64 + (k - 32);
  endfunction
  function automatic cl_e e_layer(int k);
    return (k < 16) ? CL_E2 : (k < 32) ? CL_E1 : CL_E3;
  endfunction
  function automatic int b_word(int k);
    return (k < 16) ? k : 48 + (k - 16) / 4;
  endfunction

  task automatic fill(input bit b);
    for (int a = 0; a < 80; a++) begin
      img[b][a] = 16'($urandom);
      wa_en = 1; wa_bank = b; wa_addr = 7'(a); wa_data = img[b][a];
      @(posedge clk); #1;
    end
    wa_en = 0;
    frame_full[b] = 1;
    if (b == 0 && full_cyc < 0) full_cyc = cyc;
  endtask

  // coder readiness
  always @(posedge clk) begin
    e_ready <= random_ready ? ($urandom_range(0, 2) != 0) : 1'b1;
    b_ready <= random_ready ? ($urandom_range(0, 2) != 0) : 1'b1;
    if (e_valid && !e_ready) stalls++;
  end

  // coder feedback model
  always @(posedge clk) if (rst_n) begin
    int complete;
    complete = (frame_e < frame_b) ? frame_e : frame_b;
    coder_done <= 1'b0;
    if (coder_wait) n_wait++;
    if (acked < complete) begin
      if (done_cnt == 0) begin
        coder_done <= 1'b1;
        acked++;
        done_cnt = random_ready ? $urandom_range(5, 60) : 0;
      end else done_cnt--;
    end
  end

  // output checkers
  always @(posedge clk) if (rst_n) begin
    if (e_valid && e_ready) begin
      chk(e_data == img[frame_e % 2][e_word(ne)], $sformatf("E frame %0d pixel %0d", frame_e, ne));
      chk(e_cl == e_layer(ne), $sformatf("E layer frame %0d pixel %0d", frame_e, ne));
      chk(e_last == (ne == 47), "E last");
      if (frame_e == 0 && ne == 0) first_e = cyc;
      if (ne == 0) chk(acked >= frame_e, $sformatf("frame %0d started before coder_done", frame_e));
      if (frame_e == 0 && ne == 47) last_e = cyc;
      ne++;
      if (ne == 48) begin ne = 0; frame_e++; end
    end
    if (b_valid && b_ready) begin
      chk(b_data == img[frame_b % 2][b_word(nb)], $sformatf("B frame %0d pixel %0d", frame_b, nb));
      chk(b_cl == ((nb < 16) ? CL_B1 : CL_B2), $sformatf("B layer frame %0d pixel %0d", frame_b, nb));
      chk(b_rebuilt == (nb >= 16 && (nb - 16) % 4 != 0), "B rebuilt flag");
      chk(b_last == (nb == 31), "B last");
      nb++;
      if (nb == 32) begin nb = 0; frame_b++; end
    end
    if (rel_valid) begin
      chk(rel_bank == 1'(nrel % 2), $sformatf("release %0d of bank %0d", nrel, rel_bank));
      chk(frame_e == nrel + 1 && frame_b == nrel + 1 && ne == 0 && nb == 0,
          "release only after both routes finished the frame");
      nrel++;
    end
  end

  initial begin
    frame_full = 0; wa_en = 0; wa_bank = 0; wa_addr = 0; wa_data = 0;
    e_ready = 1; b_ready = 1; coder_done = 0;
    repeat (3) @(posedge clk); #1;
    rst_n = 1;
    fill(0);
    wait (nrel == 1);
    chk(first_e - full_cyc == 3, $sformatf("first E pixel %0d cycles after frame_full", first_e - full_cyc));
    chk(last_e - first_e == 47, $sformatf("48 E pixels took %0d cycles", last_e - first_e + 1));
    random_ready = 1;
    @(posedge clk); #1;
    frame_full[0] = 0;
    fill(1);
    fill(0);
    for (int f = 2; f < 5; f++) begin
      wait (nrel == f);
      @(posedge clk); #1;
      frame_full[(f - 1) % 2] = 0;
      if (f < 4) fill(1'((f - 1) % 2));
    end
    chk(frame_e == 4 && frame_b == 4 && nrel == 4, "four frames delivered");
    chk(stalls > 0, "coder stall exercised");
    chk(n_wait > 0, $sformatf("waited for coder_done %0d cycles", n_wait));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

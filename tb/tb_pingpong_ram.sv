// tb_pingpong_ram: self-checking test of pingpong_ram.
//
// Runs random traffic on all four ports at once (two writes, two reads per
// cycle, the two writes never to the same word) against a reference array
// kept here, checking each read one cycle after it is issued and that read
// data holds while no read is issued.  A directed part fills bank 0 while
// reading bank 1, then the reverse, to check that the banks are independent.
module tb_pingpong_ram;
  localparam int W = 80;
  logic clk = 0;
  logic wa_en, wa_bank, wb_en, wb_bank, ra_en, ra_bank, rb_en, rb_bank;
  logic [6:0] wa_addr, wb_addr, ra_addr, rb_addr;
  logic [15:0] wa_data, wb_data, ra_data, rb_data;
  logic [15:0] ref_mem [2][W];
  logic [15:0] exp_a, exp_b;
  bit have_a = 0, have_b = 0;  // a read has been issued on the port
  int checks = 0, failures = 0;

  pingpong_ram dut (.*);

  always #5 clk = !clk;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic cycle();
    // expected read data uses the memory before this edge's writes
    if (ra_en) begin exp_a = ref_mem[ra_bank][ra_addr]; have_a = 1; end
    if (rb_en) begin exp_b = ref_mem[rb_bank][rb_addr]; have_b = 1; end
    if (wa_en) ref_mem[wa_bank][wa_addr] = wa_data;
    if (wb_en) ref_mem[wb_bank][wb_addr] = wb_data;
    @(posedge clk); #1;
    if (have_a) chk(ra_data == exp_a, $sformatf("read A %h exp %h", ra_data, exp_a));
    if (have_b) chk(rb_data == exp_b, $sformatf("read B %h exp %h", rb_data, exp_b));
  endtask

  initial begin
    {wa_en, wb_en, ra_en, rb_en} = '0;
    {wa_bank, wb_bank, ra_bank, rb_bank} = '0;
    {wa_addr, wb_addr, ra_addr, rb_addr} = '0;
    wa_data = 0; wb_data = 0;
    // initialise every word
    for (int b = 0; b < 2; b++)
      for (int a = 0; a < W; a += 2) begin
        wa_en = 1; wa_bank = 1'(b); wa_addr = 7'(a);     wa_data = 16'($urandom);
        wb_en = 1; wb_bank = 1'(b); wb_addr = 7'(a + 1); wb_data = 16'($urandom);
        cycle();
      end
    // read everything back on both ports
    wa_en = 0; wb_en = 0;
    for (int a = 0; a < W; a++) begin
      ra_en = 1; ra_bank = 0; ra_addr = 7'(a);
      rb_en = 1; rb_bank = 1; rb_addr = 7'(W - 1 - a);
      cycle();
    end
    // ping-pong: write one bank while reading the other
    for (int r = 0; r < 4; r++)
      for (int a = 0; a < W; a++) begin
        wa_en = 1; wa_bank = 1'(r); wa_addr = 7'(a); wa_data = 16'($urandom);
        wb_en = 0;
        ra_en = 1; ra_bank = !1'(r); ra_addr = 7'(a);
        rb_en = 1; rb_bank = !1'(r); rb_addr = 7'($urandom_range(0, W - 1));
        cycle();
      end
    // random traffic, reads sometimes idle (data must hold)
    for (int n = 0; n < 2000; n++) begin
      wa_en = 1'($urandom); wa_bank = 1'($urandom); wa_addr = 7'($urandom_range(0, W - 1));
      wa_data = 16'($urandom);
      wb_en = 1'($urandom); wb_bank = 1'($urandom); wb_addr = 7'($urandom_range(0, W - 1));
      wb_data = 16'($urandom);
      if (wa_bank == wb_bank && wa_addr == wb_addr) wb_en = 0;
      ra_en = 1'($urandom); ra_bank = 1'($urandom); ra_addr = 7'($urandom_range(0, W - 1));
      rb_en = 1'($urandom); rb_bank = 1'($urandom); rb_addr = 7'($urandom_range(0, W - 1));
      cycle();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

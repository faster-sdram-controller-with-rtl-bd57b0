// tb_read_fifo: self-checking test of one read buffer.
//
// Loads a burst beat by beat in wrapped order and checks that a word hits
// only once its valid bit is set and only inside the tag's address range,
// that byte writes update only a held word's selected bytes, that a write to
// a word outside the buffer changes nothing, and that a new fill clears the
// valid vector.
module tb_read_fifo;
  localparam int BURST = 4, AW = 22, DW = 32;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic fill_start = 0, fill_we = 0, lk_hit, upd_en = 0, upd_hit;
  logic [AW-1:0] fill_addr = '0, lk_addr = '0, upd_addr = '0;
  logic [1:0]    fill_idx = '0;
  logic [DW-1:0] fill_data = '0, lk_data, upd_data = '0;
  logic [3:0]    upd_strb = '0;
  logic [AW-3:0] tag;
  logic [BURST-1:0] valid;
  logic [BURST-1:0][DW-1:0] words;
  int checks = 0, failures = 0;

  read_fifo #(.BURST(BURST), .AW(AW), .DW(DW)) dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [DW-1:0] pat(input int a);
    return 32'h1357_0000 ^ (a * 32'h0101_0101);
  endfunction

  task automatic look(input int a, input bit exp_hit, input logic [DW-1:0] exp_d);
    lk_addr = AW'(a);
    #1;
    check(lk_hit == exp_hit, $sformatf("hit for %0d", a));
    if (exp_hit && lk_data != exp_d) $display("  got %h exp %h", lk_data, exp_d);
    if (exp_hit) check(lk_data == exp_d, $sformatf("data for %0d", a));
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    look(0, 0, 0);
    // burst of words 40..43 starting at word 42 (wraps)
    fill_start = 1; fill_addr = AW'(42);
    @(negedge clk);
    fill_start = 0;
    for (int b = 0; b < BURST; b++) begin
      int w;
      w = 40 + ((2 + b) % BURST);
      fill_we = 1; fill_idx = 2'(w); fill_data = pat(w);
      @(negedge clk);
      fill_we = 0;
      look(w, 1, pat(w));
      if (b < BURST - 1) look(40 + ((3 + b) % BURST), 0, 0);
    end
    for (int w = 40; w < 44; w++) look(w, 1, pat(w));
    look(39, 0, 0);
    look(44, 0, 0);
    look(40 + 4096, 0, 0);
    // byte update of a held word
    @(negedge clk);
    upd_en = 1; upd_addr = AW'(41); upd_data = 32'hAABB_CCDD; upd_strb = 4'b0100;
    #1 check(upd_hit, "update hits a held word");
    @(negedge clk);
    upd_en = 0;
    look(41, 1, (pat(41) & 32'hFF00_FFFF) | 32'h00BB_0000);
    // update outside the buffer
    @(negedge clk);
    upd_en = 1; upd_addr = AW'(45); upd_strb = 4'b1111;
    #1 check(!upd_hit, "update misses outside the range");
    @(negedge clk);
    upd_en = 0;
    for (int w = 40; w < 44; w++) check(words[w % 4] == ((w == 41) ? ((pat(41) & 32'hFF00_FFFF) | 32'h00BB_0000) : pat(w)), "words untouched");
    // new fill clears the vector
    @(negedge clk);
    fill_start = 1; fill_addr = AW'(1000);
    @(negedge clk);
    fill_start = 0;
    check(valid == '0, "new fill clears the valid vector");
    look(41, 0, 0);
    look(1000, 0, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

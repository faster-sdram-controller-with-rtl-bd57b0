// tb_sdram_ctrl_top_full: the controller at its default parameters (full
// 100 us power-up wait, refresh every 1700 clocks, 16 MB geometry) taken
// through one complete operation: power-up, a 64-word write burst spread over
// two banks, a read-back of every word, byte writes, a pause long enough for
// a refresh, and a second read-back. Read data is checked against the
// master's shadow memory and the SDRAM contents word by word at the end.
module tb_sdram_ctrl_top_full;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;  // asynchronous reset before the first clock edge
  always #5 clk = ~clk;

  logic        HSELx, HWRITE, HREADYOUT, sd_cke, sd_cs_n, sd_ras_n, sd_cas_n, sd_we_n;
  logic        sd_dq_oe, init_done;
  logic [31:0] HADDR, HWDATA, HRDATA, sd_dq_o, sd_dq_i;
  logic [1:0]  HTRANS, HRESP, sd_ba;
  logic [2:0]  HSIZE, HBURST;
  logic [11:0] sd_addr;
  logic [3:0]  sd_dqm;
  int          m_err, n_act, n_read, n_write, n_pre, n_ref, n_mrs;
  int          checks = 0, failures = 0;

  sdram_ctrl_top dut (
    .HCLK(clk), .HRESETn(rst_n), .HSELx, .HADDR, .HWRITE, .HTRANS, .HSIZE, .HBURST,
    .HWDATA, .HREADY(HREADYOUT), .HREADYOUT, .HRESP, .HRDATA,
    .sd_cke, .sd_cs_n, .sd_ras_n, .sd_cas_n, .sd_we_n, .sd_ba, .sd_addr,
    .sd_dqm, .sd_dq_o, .sd_dq_oe, .sd_dq_i, .init_done
  );

  sdram_model mem (
    .clk, .cke(sd_cke), .cs_n(sd_cs_n), .ras_n(sd_ras_n), .cas_n(sd_cas_n),
    .we_n(sd_we_n), .ba(sd_ba), .addr(sd_addr), .dqm(sd_dqm), .dq_i(sd_dq_o),
    .dq_o(sd_dq_i), .errors(m_err), .n_act, .n_read, .n_write, .n_pre, .n_ref, .n_mrs
  );

  ahb_master_bfm bfm (
    .clk, .HSELx, .HADDR, .HWRITE, .HTRANS, .HSIZE, .HBURST, .HWDATA,
    .HREADY(HREADYOUT), .HRDATA
  );

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks + bfm.checks, failures + bfm.failures);
    $finish;
  end

  initial begin
    int refs;
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (init_done);
    for (int i = 0; i < 64; i++) bfm.push_write(32'h0012_3000 + 32'(4 * i) + ((i >= 32) ? 32'h400 : 0), 32'h5EED_0000 + i);
    bfm.run();
    for (int i = 0; i < 64; i++) bfm.push_read(32'h0012_3000 + 32'(4 * i) + ((i >= 32) ? 32'h400 : 0));
    bfm.run();
    bfm.push_write(32'h0012_3005, 32'h0000_AB00, 3'd0);
    bfm.push_write(32'h0012_300A, 32'hCDEF_0000, 3'd1);
    bfm.run();
    refs = mem.n_ref;
    repeat (1800) @(posedge clk);
    checks++;
    if (mem.n_ref <= refs) begin failures++; $display("FAIL: no refresh in 1800 clocks"); end
    for (int i = 0; i < 64; i++) bfm.push_read(32'h0012_3000 + 32'(4 * i) + ((i >= 32) ? 32'h400 : 0));
    bfm.run();
    repeat (50) @(posedge clk);
    foreach (bfm.shadow[k]) begin
      checks++;
      if (mem.backdoor_read(k[21:0]) !== bfm.shadow[k]) begin
        failures++;
        $display("SDRAM word %h: %h, expected %h", k, mem.backdoor_read(k[21:0]), bfm.shadow[k]);
      end
    end
    checks++;
    if (m_err != 0) begin failures++; $display("FAIL: SDRAM protocol errors"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks + bfm.checks, failures + bfm.failures);
    $finish;
  end
endmodule

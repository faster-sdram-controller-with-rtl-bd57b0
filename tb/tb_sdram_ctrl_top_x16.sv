// tb_sdram_ctrl_top_x16: the end-to-end test of tb_sdram_ctrl_top with a
// 16-bit SDRAM (SD_DW = 16, 512 columns): every 32-bit word is packed into
// two SDRAM columns on writes and reassembled from an 8-beat burst on reads.
// The rest is as in tb_sdram_ctrl_top:
//
// A pipelined AHB master drives the controller, which drives a behavioural
// SDRAM that checks the command protocol and timing. Read data is compared
// with a shadow memory kept by the master; at the end the SDRAM contents are
// compared word by word with the shadow, and the SDRAM must report no
// protocol error. The phases make every mechanism of the controller happen,
// and each is counted: write-buffer hold, ping-pong overlap, closing a full
// buffer, flushing a part-filled one, read-buffer hit, write-buffer
// forwarding, read miss with burst prefetch, draining writes before a miss,
// read-buffer update by a write, row hits, row conflicts (PRECHARGE),
// refresh with PRECHARGE ALL, byte and half-word writes.
// It also measures the mean read latency of buffer hits against SDRAM
// misses. Initialisation and refresh intervals are shortened.
module tb_sdram_ctrl_top_x16;

  localparam int unsigned INIT_WAIT    = 20;
  localparam int unsigned REF_INTERVAL = 250;

  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;  // asynchronous reset before the first clock edge
  always #5 clk = ~clk;

  logic        HSELx, HWRITE, HREADYOUT, sd_cke, sd_cs_n, sd_ras_n, sd_cas_n, sd_we_n;
  logic        sd_dq_oe, init_done;
  logic [31:0] HADDR, HWDATA, HRDATA;
  logic [15:0] sd_dq_o, sd_dq_i;
  logic [1:0]  HTRANS, HRESP, sd_ba;
  logic [2:0]  HSIZE, HBURST;
  logic [11:0] sd_addr;
  logic [1:0]  sd_dqm;
  int          m_err, n_act, n_read, n_write, n_pre, n_ref, n_mrs;

  sdram_ctrl_top #(.SD_DW(16), .COL_W(9), .INIT_WAIT(INIT_WAIT), .REF_INTERVAL(REF_INTERVAL)) dut (
    .HCLK(clk), .HRESETn(rst_n), .HSELx, .HADDR, .HWRITE, .HTRANS, .HSIZE, .HBURST,
    .HWDATA, .HREADY(HREADYOUT), .HREADYOUT, .HRESP, .HRDATA,
    .sd_cke, .sd_cs_n, .sd_ras_n, .sd_cas_n, .sd_we_n, .sd_ba, .sd_addr,
    .sd_dqm, .sd_dq_o, .sd_dq_oe, .sd_dq_i, .init_done
  );

  sdram_model #(.DW(16), .COL_W(9)) mem (
    .clk, .cke(sd_cke), .cs_n(sd_cs_n), .ras_n(sd_ras_n), .cas_n(sd_cas_n),
    .we_n(sd_we_n), .ba(sd_ba), .addr(sd_addr), .dqm(sd_dqm), .dq_i(sd_dq_o),
    .dq_o(sd_dq_i), .errors(m_err), .n_act, .n_read, .n_write, .n_pre, .n_ref, .n_mrs
  );

  ahb_master_bfm bfm (
    .clk, .HSELx, .HADDR, .HWRITE, .HTRANS, .HSIZE, .HBURST, .HWDATA,
    .HREADY(HREADYOUT), .HRDATA
  );

  // ---- mechanism counters ----
  int c_hold, c_overlap, c_close_full, c_flush, c_rf_hit, c_wf_fwd, c_miss, c_drain;
  int c_upd, c_row_hit, c_conflict, c_pre_all, c_ref, c_partial, c_wait;
  int c_ahb_rd, c_ahb_wr;  // AHB transfers accepted
  int checks, failures;
  bit prev_drain = 0, prev_act = 0;

  always @(posedge clk) if (rst_n) begin
    if (dut.ahb_wr_req && !dut.wr_ready)                      c_hold++;
    if (dut.overlap)                                          c_overlap++;
    for (int g = 0; g < 2; g++) if (dut.wf_close[g]) begin
      if (dut.wf_full[g]) c_close_full++; else c_flush++;
    end
    if (dut.u_ac.ev_hit && dut.rf_hit)                        c_rf_hit++;
    if (dut.u_ac.ev_hit && dut.wf_fwd)                        c_wf_fwd++;
    if (dut.u_ac.ev_miss)                                     c_miss++;
    if (dut.u_ac.ev_drain && !prev_drain)                     c_drain++;
    prev_drain <= dut.u_ac.ev_drain;
    prev_act   <= (dut.iss_cmd == sdram_ctrl_pkg::CMD_ACTIVE);
    if (dut.upd_en && |dut.rf_upd_hit)                        c_upd++;
    if (dut.sch_ack && dut.row_hit && !prev_act) c_row_hit++;
    if (dut.iss_cmd == sdram_ctrl_pkg::CMD_PRECHARGE && !dut.iss_addr[10]) c_conflict++;
    if (dut.init_done && dut.iss_cmd == sdram_ctrl_pkg::CMD_PRECHARGE && dut.iss_addr[10]) c_pre_all++;
    if (dut.init_done && dut.iss_cmd == sdram_ctrl_pkg::CMD_REFRESH) c_ref++;
    if (dut.req_valid && dut.req_write && dut.req_strb != 4'hF && dut.req_done) c_partial++;
    if (dut.req_valid && !dut.req_done)                       c_wait++;
    if (HSELx && HTRANS[1] && HREADYOUT) begin
      if (HWRITE) c_ahb_wr++; else c_ahb_rd++;
    end
  end

  // ---- watchdog ----
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks + bfm.checks, failures + bfm.failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  function automatic logic [31:0] mkaddr(int row, int bank, int col);
    return 32'({row[11:0], bank[1:0], col[7:0], 2'b00});
  endfunction

  int hit_cyc, hit_n, miss_cyc, miss_n;

  initial begin
    logic [31:0] a;
    int rd0;
    checks = 0; failures = 0;
    hit_cyc = 0; hit_n = 0; miss_cyc = 0; miss_n = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (init_done);
    repeat (5) @(posedge clk);
    check(mem.n_mrs == 1 && mem.n_ref == 2, "power-up: 2 refreshes and 1 mode load");

    // A: 32 back-to-back word writes (ping-pong, full buffers, hold)
    for (int i = 0; i < 32; i++) bfm.push_write(mkaddr(5, 0, i), 32'hA000_0000 + i);
    bfm.run();

    // B: sequential reads: one miss per burst, then buffer hits, so 32 bus
    // reads cost 8 SDRAM READ commands
    rd0 = n_read;
    for (int i = 0; i < 32; i++) bfm.push_read(mkaddr(5, 0, i));
    bfm.run();
    check(n_read - rd0 == 32 / 4, "one SDRAM READ per 4 sequential bus reads");
    // latency of a hit and a miss, measured one at a time
    bfm.rd_cycles = 0;
    for (int k = 0; k < 4; k++) begin
      bfm.push_read(mkaddr(9, 1, 8 * k));   // miss
      bfm.run();
      $display("miss %0d: %0d clocks", k, bfm.rd_cycles);
      miss_cyc += bfm.rd_cycles; miss_n++;
      repeat (8) bfm.push_idle();
      bfm.run();
      bfm.rd_cycles = 0;
      bfm.push_read(mkaddr(9, 1, 8 * k + 1)); // hit in the burst just loaded
      bfm.run();
      hit_cyc += bfm.rd_cycles; hit_n++;
      bfm.rd_cycles = 0;
    end

    // C: byte / half-word writes into words held by a read buffer, read back
    bfm.push_write(mkaddr(9, 1, 25) + 1, 32'h0000_5A00, 3'd0);
    bfm.push_write(mkaddr(9, 1, 25) + 2, 32'h1234_0000, 3'd1);
    bfm.push_read(mkaddr(9, 1, 25));
    bfm.push_idle();
    // D: write then read a word in no read buffer: forwarded from a write buffer
    bfm.push_write(mkaddr(100, 2, 40), 32'hF00D_CAFE);
    bfm.push_read(mkaddr(100, 2, 40));
    // E: partial write then read of a word in no read buffer: drain, then SDRAM
    bfm.push_write(mkaddr(101, 3, 60) + 3, 32'h7700_0000, 3'd0);
    bfm.push_read(mkaddr(101, 3, 60));
    bfm.run();

    // F: random traffic over a few rows of every bank (row conflicts, refresh)
    for (int i = 0; i < 600; i++) begin
      int r, b, c, kind;
      r = $urandom_range(0, 2) * 37; b = $urandom_range(0, 3); c = $urandom_range(0, 15);
      a = mkaddr(r, b, c);
      kind = $urandom_range(0, 9);
      if (kind < 4)       bfm.push_write(a, $urandom());
      else if (kind == 4) bfm.push_write(a + 32'($urandom_range(0, 3)), $urandom(), 3'd0);
      else if (kind == 5) bfm.push_write(a + 32'(2 * $urandom_range(0, 1)), $urandom(), 3'd1);
      else if (kind == 6) bfm.push_idle();
      else                bfm.push_read(a);
    end
    bfm.run();

    // let the write buffers empty, then compare SDRAM with the shadow
    repeat (200) @(posedge clk);
    check(dut.wf_empty == 2'b11, "write buffers empty at the end");
    foreach (bfm.shadow[k]) begin
      checks++;
      if ({mem.backdoor_read({k[21:0], 1'b1}), mem.backdoor_read({k[21:0], 1'b0})} !== bfm.shadow[k]) begin
        failures++;
        $display("SDRAM word %h: expected %h", k, bfm.shadow[k]);
      end
    end
    check(m_err == 0, "SDRAM protocol and timing respected");

    // every mechanism must have happened
    check(c_hold > 0,       "write hold (both buffers busy)");
    check(c_overlap > 0,    "ping-pong overlap");
    check(c_close_full > 0, "full buffer closed");
    check(c_flush > 0,      "part-filled buffer flushed");
    check(c_rf_hit > 0,     "read-buffer hit");
    check(c_wf_fwd > 0,     "write-buffer forwarding");
    check(c_miss > 0,       "read miss with burst prefetch");
    check(c_drain > 0,      "writes drained before a miss");
    check(c_upd > 0,        "read buffer updated by a write");
    check(c_row_hit > 0,    "access to an open row without ACTIVE");
    check(c_conflict > 0,   "row conflict precharge");
    check(c_pre_all > 0,    "precharge all before refresh");
    check(c_ref > 0,        "periodic refresh");
    check(c_partial > 0,    "byte / half-word writes");
    // a hit completes in one clock; a miss needs the SDRAM round trip
    check(hit_n > 0 && hit_cyc == hit_n, "buffer hit has no wait state");
    check(miss_n > 0 && miss_cyc / miss_n >= 2 + 3, "miss waits at least CL+3 clocks");

    $display("mechanisms: hold=%0d overlap=%0d close_full=%0d flush=%0d rf_hit=%0d wf_fwd=%0d miss=%0d drain=%0d upd=%0d row_hit=%0d conflict=%0d pre_all=%0d refresh=%0d partial=%0d waits=%0d",
             c_hold, c_overlap, c_close_full, c_flush, c_rf_hit, c_wf_fwd, c_miss, c_drain,
             c_upd, c_row_hit, c_conflict, c_pre_all, c_ref, c_partial, c_wait);
    $display("SDRAM commands: ACT=%0d READ=%0d WRITE=%0d PRE=%0d REF=%0d", n_act, n_read, n_write, n_pre, n_ref);
    $display("bus reads %0d -> SDRAM READs %0d, bus writes %0d -> SDRAM WRITEs %0d",
             c_ahb_rd, n_read, c_ahb_wr, n_write);
    check(n_read < c_ahb_rd, "fewer SDRAM READ commands than bus reads");
    $display("read latency: hit %0d.%0d clk, miss %0d.%0d clk, reduction %0d%%",
             hit_cyc / hit_n, (10 * hit_cyc / hit_n) % 10, miss_cyc / miss_n, (10 * miss_cyc / miss_n) % 10,
             100 - (100 * hit_cyc * miss_n) / (miss_cyc * hit_n));
    $display("TB_RESULT checks=%0d failures=%0d", checks + bfm.checks, failures + bfm.failures);
    $finish;
  end

endmodule

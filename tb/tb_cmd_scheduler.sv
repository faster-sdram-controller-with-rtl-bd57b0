// tb_cmd_scheduler: self-checking test of the SDRAM command scheduler, with
// the command generator choosing commands and a behavioural SDRAM that
// checks protocol and timing.
//
// Checks: the power-up sequence (two refreshes and one mode-register load
// before init_done, burst length 4, CAS latency 2, single-location writes in
// the mode word); random single writes and burst reads across banks and rows
// with no protocol or timing error in the SDRAM; read data equal to what was
// written, returned in wrapped burst order; beat 0 exactly CL+2 clocks after
// the READ is issued and the beats on consecutive clocks; the refresh rate
// (one AUTO REFRESH per REF_INTERVAL clocks) with PRECHARGE ALL first when a
// row is open.
module tb_cmd_scheduler;
  import sdram_ctrl_pkg::*;
  localparam int ROW_W = 12, BANK_W = 2, COL_W = 8, AW = 22, CL = 2, BURST = 4;
  localparam int INIT_WAIT = 30, REF_INTERVAL = 150;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;  // asynchronous reset before the first clock edge
  always #5 clk = ~clk;

  logic req_valid = 0, req_write = 0, req_ack, any_open, row_hit;
  logic [AW-1:0] req_addr = '0;
  logic [31:0] req_wdata = '0;
  logic [3:0]  req_strb = 4'hF;
  sdram_cmd_e gen_cmd, iss_cmd;
  logic [1:0] gen_bank, iss_bank;
  logic [11:0] gen_row, iss_addr;
  logic [7:0] gen_col;
  logic [3:0] bank_open;
  logic [3:0][11:0] opened_row;
  logic rbeat_valid, init_done, idle, ref_pending;
  logic [1:0] rbeat_idx;
  logic [31:0] rbeat_data;
  logic sd_cke, sd_cs_n, sd_ras_n, sd_cas_n, sd_we_n, sd_dq_oe;
  logic [1:0] sd_ba;
  logic [11:0] sd_addr;
  logic [3:0] sd_dqm;
  logic [31:0] sd_dq_o, sd_dq_i;
  int m_err, n_act, n_read, n_write, n_pre, n_ref, n_mrs;

  cmd_generator #(.ROW_W(ROW_W), .BANK_W(BANK_W), .COL_W(COL_W)) u_gen (
    .clk, .rst_n, .req_valid, .req_write, .req_addr, .next_cmd(gen_cmd), .cmd_bank(gen_bank),
    .cmd_row(gen_row), .cmd_col(gen_col), .row_hit, .iss_cmd, .iss_bank, .iss_addr,
    .any_open, .bank_open, .opened_row);

  cmd_scheduler #(.INIT_WAIT(INIT_WAIT), .REF_INTERVAL(REF_INTERVAL)) dut (
    .clk, .rst_n, .req_valid, .req_write, .req_wdata, .req_strb, .req_ack,
    .gen_cmd, .gen_bank, .gen_row, .gen_col, .any_open, .iss_cmd, .iss_bank, .iss_addr,
    .rbeat_valid, .rbeat_idx, .rbeat_data, .init_done, .idle, .ref_pending,
    .sd_cke, .sd_cs_n, .sd_ras_n, .sd_cas_n, .sd_we_n, .sd_ba, .sd_addr, .sd_dqm,
    .sd_dq_o, .sd_dq_oe, .sd_dq_i);

  sdram_model mem (
    .clk, .cke(sd_cke), .cs_n(sd_cs_n), .ras_n(sd_ras_n), .cas_n(sd_cas_n), .we_n(sd_we_n),
    .ba(sd_ba), .addr(sd_addr), .dqm(sd_dqm), .dq_i(sd_dq_o), .dq_o(sd_dq_i), .errors(m_err),
    .n_act, .n_read, .n_write, .n_pre, .n_ref, .n_mrs);

  int checks = 0, failures = 0;
  logic [31:0] shadow [int];
  longint cyc = 0;
  int ref_after_init = 0, pre_all = 0;

  always @(posedge clk) begin
    cyc++;
    if (init_done && iss_cmd == CMD_REFRESH) ref_after_init++;
    if (init_done && iss_cmd == CMD_PRECHARGE && iss_addr[10]) pre_all++;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [AW-1:0] rnd_addr();
    int r, b, c;
    r = $urandom_range(0, 2) * 5; b = $urandom_range(0, 3); c = $urandom_range(0, 31);
    return AW'({r[11:0], b[1:0], c[7:0]});
  endfunction

  task automatic do_write(input logic [AW-1:0] a, input logic [31:0] d);
    @(negedge clk);
    req_valid = 1; req_write = 1; req_addr = a; req_wdata = d; req_strb = 4'hF;
    #1;
    while (!req_ack) begin @(negedge clk); #1; end
    @(negedge clk);
    req_valid = 0;
    shadow[int'(a)] = d;
  endtask

  task automatic do_read(input logic [AW-1:0] a);
    longint t_iss;
    int beat;
    logic [AW-1:0] w;
    @(negedge clk);
    req_valid = 1; req_write = 0; req_addr = a;
    #1;
    while (!req_ack) begin @(negedge clk); #1; end
    t_iss = cyc;
    @(negedge clk);
    req_valid = 0;
    beat = 0;
    while (beat < BURST) begin
      #1;
      if (rbeat_valid) begin
        if (beat == 0) check(cyc - t_iss == CL + 2, $sformatf("beat 0 after CL+2 clocks (%0d)", cyc - t_iss));
        else check(cyc - t_iss == CL + 2 + beat, "beats on consecutive clocks");
        check(rbeat_idx == 2'(beat), "beat index");
        w = {a[AW-1:2], 2'(a[1:0] + beat)};
        check(rbeat_data == (shadow.exists(int'(w)) ? shadow[int'(w)] : 32'h0),
              $sformatf("read data of word %h", w));
        beat++;
      end
      @(negedge clk);
    end
  endtask

  initial begin
    longint t0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    t0 = cyc;
    wait (init_done);
    repeat (2) @(posedge clk);
    check(n_mrs == 1 && n_ref == 2, "power-up: two refreshes, one mode load");
    check(cyc - t0 >= INIT_WAIT, "power-up wait respected");
    check(mem.bl == BURST && mem.cl == CL && mem.single_wr, "mode word");
    for (int i = 0; i < 400; i++) begin
      if ($urandom_range(0, 1)) do_write(rnd_addr(), $urandom());
      else do_read(rnd_addr());
    end
    repeat (20) @(negedge clk);
    check(m_err == 0, "no SDRAM protocol or timing error");
    check(ref_after_init >= int'((cyc - t0 - INIT_WAIT) / REF_INTERVAL) - 1 &&
          ref_after_init <= int'((cyc - t0) / REF_INTERVAL) + 1, $sformatf("refresh rate (%0d)", ref_after_init));
    check(pre_all > 0, "PRECHARGE ALL before refresh");
    $display("refreshes %0d, precharge-all %0d, ACT %0d READ %0d WRITE %0d PRE %0d", ref_after_init, pre_all,
             n_act, n_read, n_write, n_pre);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

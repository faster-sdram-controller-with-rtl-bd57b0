// tb_wfifo_pingpong: self-checking test of the ping-pong write buffering.
//
// Two write buffers and the ping-pong control are driven with random AHB
// write bursts and a move side that takes entries at a random rate. Every
// accepted write must come out on the move side exactly once and in the
// order it was accepted. It also checks that both buffers are used, that
// filling overlaps moving, that the AHB side is held when neither buffer can
// take data, that a pause flushes a part-filled buffer, and that drain_req
// empties both buffers.
module tb_wfifo_pingpong;
  localparam int D = 4, AW = 22, DW = 32;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic ahb_wr_req = 0, wr_ready, drain_req = 0, mv_valid, mv_ack = 0, fill_sel, move_sel, overlap;
  logic [AW-1:0] wr_addr = '0, mv_addr;
  logic [DW-1:0] wr_data = '0, mv_data;
  logic [3:0]    wr_strb = 4'hF, mv_strb;
  logic [1:0] wf_wr_req, wf_wr_ack, wf_accept_rdy, wf_close, wf_closed, wf_empty, wf_full;
  logic [1:0] wf_settled, wf_head_valid, wf_pop, wf_drained;
  logic [1:0][AW-1:0] wf_head_addr;
  logic [1:0][DW-1:0] wf_head_data;
  logic [1:0][3:0]    wf_head_strb;
  logic [1:0][D-1:0][AW-1:0] ent_addr;
  logic [1:0][D-1:0][DW-1:0] ent_data;
  logic [1:0][D-1:0][3:0]    ent_strb;
  logic [1:0][D-1:0]         ent_pend;
  logic [1:0][1:0]           fsm;

  for (genvar g = 0; g < 2; g++) begin : g_wf
    write_fifo #(.DEPTH(D), .AW(AW), .DW(DW)) u_wf (
      .clk, .rst_n, .wr_req(wf_wr_req[g]), .wr_addr, .wr_data, .wr_strb,
      .wr_ack(wf_wr_ack[g]), .accept_rdy(wf_accept_rdy[g]), .close(wf_close[g]),
      .closed(wf_closed[g]), .empty(wf_empty[g]), .full(wf_full[g]), .settled(wf_settled[g]),
      .head_valid(wf_head_valid[g]), .head_addr(wf_head_addr[g]), .head_data(wf_head_data[g]),
      .head_strb(wf_head_strb[g]), .pop(wf_pop[g]), .drained(wf_drained[g]),
      .ent_addr(ent_addr[g]), .ent_data(ent_data[g]), .ent_strb(ent_strb[g]),
      .ent_pend(ent_pend[g]), .fsm_state(fsm[g]));
  end

  wfifo_pingpong #(.AW(AW), .DW(DW)) dut (.*);

  int checks = 0, failures = 0;
  int n_in = 0, n_out = 0, c_overlap = 0, c_hold = 0, c_flush = 0, c_full = 0;
  int used [2] = '{0, 0};
  logic [AW+DW-1:0] ref_q [$];

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // scoreboard
  always @(posedge clk) if (rst_n) begin
    if (ahb_wr_req && wr_ready) begin
      ref_q.push_back({wr_addr, wr_data});
      n_in++;
      used[fill_sel]++;
    end
    if (mv_valid && mv_ack) begin
      checks++;
      n_out++;
      if (ref_q.size() == 0 || ref_q[0] != {mv_addr, mv_data}) begin
        failures++;
        $display("FAIL: moved %h/%h out of order", mv_addr, mv_data);
      end
      if (ref_q.size() != 0) void'(ref_q.pop_front());
    end
    if (overlap) c_overlap++;
    if (ahb_wr_req && !wr_ready && !wf_accept_rdy[0] && !wf_accept_rdy[1] &&
        wf_settled == 2'b11) c_hold++;
    for (int g = 0; g < 2; g++) if (wf_close[g]) begin
      if (wf_full[g]) c_full++; else c_flush++;
    end
  end

  // move side: random rate
  bit slow = 1;
  always @(negedge clk) mv_ack = slow ? ($urandom_range(0, 9) == 0) : ($urandom_range(0, 3) != 0);

  task automatic write_burst(input int n);
    for (int i = 0; i < n; i++) begin
      @(negedge clk);
      ahb_wr_req = 1; wr_addr = AW'($urandom()); wr_data = $urandom();
      #1;
      while (!wr_ready) begin @(negedge clk); #1; end
      @(negedge clk);
      ahb_wr_req = 0;
      #1;
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int b = 0; b < 60; b++) begin
      if (b == 30) slow = 0;
      // hold requests between beats so the buffer keeps filling
      for (int i = 0; i < $urandom_range(1, 10); i++) begin
        @(negedge clk);
        ahb_wr_req = 1; wr_addr = AW'($urandom()); wr_data = $urandom();
        #1;
        while (!wr_ready) begin @(negedge clk); #1; end
        @(posedge clk);
        #1;
        // keep requesting (next beat) without a pause
      end
      @(negedge clk);
      ahb_wr_req = 0;
      repeat ($urandom_range(0, 6)) @(negedge clk);
    end
    // drain request empties everything
    @(negedge clk);
    ahb_wr_req = 1; wr_addr = AW'(5); wr_data = 32'h5;
    #1;
    while (!wr_ready) begin @(negedge clk); #1; end
    @(negedge clk);
    drain_req = 1;
    ahb_wr_req = 1;
    wr_data = 32'h6;
    // hold the request invalid: model a read waiting
    ahb_wr_req = 0;
    repeat (40) @(negedge clk);
    drain_req = 0;
    checks++;
    if (!(wf_empty == 2'b11)) begin failures++; $display("FAIL: drain_req left data"); end
    checks++;
    if (n_in != n_out) begin failures++; $display("FAIL: %0d in, %0d out", n_in, n_out); end
    checks++;
    if (!(used[0] > 0 && used[1] > 0)) begin failures++; $display("FAIL: one buffer unused"); end
    checks++;
    if (c_overlap == 0) begin failures++; $display("FAIL: no overlap of fill and move"); end
    checks++;
    if (c_hold == 0) begin failures++; $display("FAIL: never held the AHB side"); end
    checks++;
    if (c_flush == 0 || c_full == 0) begin failures++; $display("FAIL: flush %0d full %0d", c_flush, c_full); end
    $display("in=%0d out=%0d overlap=%0d hold=%0d flush=%0d full=%0d", n_in, n_out, c_overlap, c_hold, c_flush, c_full);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

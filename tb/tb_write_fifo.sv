// tb_write_fifo: self-checking test of one write buffer.
//
// Checks the IDLE -> STORE -> INCREMENT -> IDLE sequence of a stored word
// (three clocks per word), the FULL state after DEPTH words, that no write is
// accepted while full or closed, the in-order hand-out of address/data/strobe
// pairs after close, the clearing of each entry's pending flag on pop, and
// that a drained buffer empties and reopens. Also a part-filled buffer.
module tb_write_fifo;
  localparam int DEPTH = 4, AW = 22, DW = 32;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic wr_req = 0, wr_ack, accept_rdy, close = 0, closed, empty, full, settled;
  logic head_valid, pop = 0, drained;
  logic [AW-1:0] wr_addr = '0, head_addr;
  logic [DW-1:0] wr_data = '0, head_data;
  logic [3:0]    wr_strb = '0, head_strb;
  logic [DEPTH-1:0][AW-1:0] ent_addr;
  logic [DEPTH-1:0][DW-1:0] ent_data;
  logic [DEPTH-1:0][3:0]    ent_strb;
  logic [DEPTH-1:0]         ent_pend;
  logic [1:0] fsm_state;
  int checks = 0, failures = 0;

  write_fifo #(.DEPTH(DEPTH), .AW(AW), .DW(DW)) dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // store one word; returns after the buffer is back in IDLE
  task automatic store(input int n);
    @(negedge clk);
    wr_req = 1; wr_addr = AW'(100 + 7 * n); wr_data = 32'hC0DE_0000 + n; wr_strb = 4'(n + 1);
    #1 check(wr_ack, "write accepted in IDLE");
    @(negedge clk);
    wr_req = 0;
    check(fsm_state == 2'd1, "STORE after accept");
    check(!accept_rdy, "no accept during STORE");
    @(negedge clk);
    check(fsm_state == 2'd2, "INCREMENT after STORE");
    check(ent_pend[n % DEPTH] && ent_addr[n % DEPTH] == AW'(100 + 7 * n), "entry stored and pending");
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    check(empty && accept_rdy && !full && fsm_state == 0, "empty after reset");
    for (int i = 0; i < DEPTH; i++) store(i);
    @(negedge clk);
    check(full, "full after DEPTH words");
    @(negedge clk);
    check(fsm_state == 2'd3, "FULL state");
    wr_req = 1;
    #1 check(!wr_ack, "no write accepted when full");
    wr_req = 0;
    close = 1;
    @(negedge clk);
    close = 0;
    check(closed && head_valid, "closed buffer offers its head");
    for (int i = 0; i < DEPTH; i++) begin
      check(head_valid && head_addr == AW'(100 + 7 * i) && head_data == 32'hC0DE_0000 + i &&
            head_strb == 4'(i + 1), $sformatf("head %0d in order", i));
      pop = 1;
      @(negedge clk);
      pop = 0;
      check(!ent_pend[i], "popped entry no longer pending");
    end
    check(drained, "drained after the last pop");
    @(negedge clk);
    check(empty && !closed && !full, "emptied and reopened");
    @(negedge clk);
    check(accept_rdy && fsm_state == 0, "back to IDLE and accepting");
    // part-filled buffer
    store(0);
    store(1);
    @(negedge clk);
    close = 1;
    @(negedge clk);
    close = 0;
    wr_req = 1;
    #1 check(!wr_ack, "no write accepted when closed");
    wr_req = 0;
    check(head_addr == AW'(100), "part-filled head");
    pop = 1; @(negedge clk);
    check(head_addr == AW'(107), "second entry next");
    @(negedge clk); pop = 0;
    @(negedge clk);
    check(empty && !closed, "part-filled buffer emptied");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

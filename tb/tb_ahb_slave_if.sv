// tb_ahb_slave_if: self-checking test of the AHB slave front end.
//
// A pipelined AHB master issues random byte, half-word and word reads and
// writes, with idle cycles in between. Behind the slave a small memory model
// answers each request after 0 to 3 wait clocks. Checked: read data (against
// the master's shadow memory, which shows the address, direction, byte
// strobes and HWDATA timing are right), HREADYOUT low exactly while the
// request waits, the byte strobes of every size and offset, and HRESP = OKAY.
module tb_ahb_slave_if;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic HSELx, HWRITE, HREADYOUT;
  logic [31:0] HADDR, HWDATA, HRDATA;
  logic [1:0] HTRANS, HRESP;
  logic [2:0] HSIZE, HBURST;
  logic req_valid, req_write, req_done;
  logic [31:0] req_addr, req_wdata, req_rdata;
  logic [3:0] req_strb;

  ahb_slave_if dut (.HCLK(clk), .HRESETn(rst_n), .HSELx, .HADDR, .HWRITE, .HTRANS, .HSIZE,
    .HBURST, .HWDATA, .HREADY(HREADYOUT), .HREADYOUT, .HRESP, .HRDATA,
    .req_valid, .req_write, .req_addr, .req_strb, .req_wdata, .req_done, .req_rdata);

  ahb_master_bfm bfm (.clk, .HSELx, .HADDR, .HWRITE, .HTRANS, .HSIZE, .HBURST, .HWDATA,
    .HREADY(HREADYOUT), .HRDATA);

  // memory behind the slave
  logic [31:0] mem [int];
  int wait_left = 0;
  bit  busy = 0;
  int checks = 0, failures = 0, n_wait = 0;
  logic [2:0] size_q;

  always @(posedge clk) if (HSELx && HTRANS[1] && HREADYOUT) size_q <= HSIZE;

  always_comb begin
    req_done  = req_valid && busy && wait_left == 0;
    req_rdata = mem.exists(int'(req_addr[31:2])) ? mem[int'(req_addr[31:2])] : 32'h0;
  end

  always @(posedge clk) begin
    if (req_valid && !busy) begin
      busy <= 1;
      wait_left <= $urandom_range(0, 3);
    end
    if (req_valid && busy && wait_left != 0) begin
      wait_left <= wait_left - 1;
      n_wait++;
      checks++;
      if (HREADYOUT) begin failures++; $display("FAIL: HREADYOUT high while waiting"); end
    end
    if (req_done) begin
      logic [31:0] w;
      logic [3:0] m;
      busy <= 0;
      m = (size_q == 0) ? 4'b0001 << req_addr[1:0] : (size_q == 1) ? 4'b0011 << {req_addr[1], 1'b0} : 4'b1111;
      checks++;
      if (req_strb != m) begin failures++; $display("FAIL: strobe %b expected %b", req_strb, m); end
      checks++;
      if (HRESP != 2'b00) begin failures++; $display("FAIL: HRESP not OKAY"); end
      if (req_write) begin
        w = mem.exists(int'(req_addr[31:2])) ? mem[int'(req_addr[31:2])] : 32'h0;
        for (int b = 0; b < 4; b++) if (req_strb[b]) w[8*b +: 8] = req_wdata[8*b +: 8];
        mem[int'(req_addr[31:2])] = w;
      end
    end
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks + bfm.checks, failures + bfm.failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 400; i++) begin
      logic [31:0] a;
      int s;
      a = 32'h100 + 32'($urandom_range(0, 31));
      s = $urandom_range(0, 2);
      if (s == 1) a[0] = 0;
      if (s == 2) a[1:0] = 0;
      case ($urandom_range(0, 4))
        0, 1: bfm.push_write(a, $urandom(), 3'(s));
        2, 3: bfm.push_read(a, 3'(s));
        default: bfm.push_idle();
      endcase
    end
    bfm.run();
    checks++;
    if (n_wait == 0) begin failures++; $display("FAIL: no wait state seen"); end
    $display("wait clocks %0d", n_wait);
    $display("TB_RESULT checks=%0d failures=%0d", checks + bfm.checks, failures + bfm.failures);
    $finish;
  end
endmodule

// ahb_master_bfm: simulation-only AHB master for the testbenches.
//
// Transfers are queued with push_* and run back to back with run(): the
// address phase of one transfer overlaps the data phase of the previous, as
// on a real pipelined AHB bus, and the master holds the address while
// HREADY is low. An entry can also be an idle cycle (HTRANS = IDLE). The
// expected read data is worked out from a shadow copy of memory when the
// read is queued, so the checks do not depend on the design. For each
// transfer the number of data-phase clocks is recorded.
// Signals are driven on the falling clock edge and sampled just before the
// rising one.
module ahb_master_bfm #(
  parameter int unsigned AW = 32
) (
  input  logic          clk,
  output logic          HSELx,
  output logic [AW-1:0] HADDR,
  output logic          HWRITE,
  output logic [1:0]    HTRANS,
  output logic [2:0]    HSIZE,
  output logic [2:0]    HBURST,
  output logic [31:0]   HWDATA,
  input  logic          HREADY,
  input  logic [31:0]   HRDATA
);

  typedef struct {
    bit          idle;
    bit          write;
    logic [AW-1:0] addr;
    logic [2:0]  size;
    logic [31:0] wdata;
    logic [31:0] expect_d;
    logic [3:0]  mask;
    logic [31:0] rdata;
    int          cycles;
  } xfer_t;

  xfer_t         q[$];
  logic [31:0]   shadow [logic [AW-3:0]];
  int            checks, failures;
  int            rd_count, rd_cycles;

  initial begin
    HSELx = 0; HADDR = '0; HWRITE = 0; HTRANS = 2'b00; HSIZE = 3'd2; HBURST = 3'd0;
    HWDATA = '0; checks = 0; failures = 0; rd_count = 0; rd_cycles = 0;
  end

  function automatic logic [3:0] lane_mask(input logic [AW-1:0] a, input logic [2:0] s);
    case (s)
      3'd0:    return 4'b0001 << a[1:0];
      3'd1:    return 4'b0011 << {a[1], 1'b0};
      default: return 4'b1111;
    endcase
  endfunction

  function automatic logic [31:0] sh_get(input logic [AW-1:0] a);
    if (shadow.exists(a[AW-1:2])) return shadow[a[AW-1:2]];
    return '0;
  endfunction

  function automatic void push_write(input logic [AW-1:0] a, input logic [31:0] d,
                                     input logic [2:0] s = 3'd2);
    xfer_t x;
    logic [31:0] w;
    logic [3:0] m;
    x = '{default: '0};
    x.write = 1; x.addr = a; x.size = s; x.wdata = d;
    m = lane_mask(a, s);
    w = sh_get(a);
    for (int b = 0; b < 4; b++) if (m[b]) w[8*b +: 8] = d[8*b +: 8];
    shadow[a[AW-1:2]] = w;
    q.push_back(x);
  endfunction

  function automatic void push_read(input logic [AW-1:0] a, input logic [2:0] s = 3'd2);
    xfer_t x;
    x = '{default: '0};
    x.write = 0; x.addr = a; x.size = s;
    x.mask = lane_mask(a, s);
    x.expect_d = sh_get(a);
    q.push_back(x);
  endfunction

  function automatic void push_idle();
    xfer_t x;
    x = '{default: '0};
    x.idle = 1;
    q.push_back(x);
  endfunction

  task automatic drive_addr(input int i);
    if (i < q.size() && !q[i].idle) begin
      HSELx = 1; HTRANS = 2'b10; HADDR = q[i].addr; HWRITE = q[i].write; HSIZE = q[i].size;
    end else begin
      HSELx = 0; HTRANS = 2'b00; HWRITE = 0;
    end
  endtask

  // run every queued transfer; the queue is emptied afterwards
  task automatic run();
    int ai, di, n;
    bit rdy;
    n  = q.size();
    ai = 0;
    di = -1;
    @(negedge clk);
    drive_addr(ai);
    forever begin
      #4;
      rdy = HREADY;
      if (di >= 0) q[di].cycles++;
      if (rdy) begin
        if (di >= 0 && !q[di].write) begin
          q[di].rdata = HRDATA;
          checks++;
          rd_count++;
          rd_cycles += q[di].cycles;
          for (int b = 0; b < 4; b++)
            if (q[di].mask[b] && HRDATA[8*b +: 8] !== q[di].expect_d[8*b +: 8]) begin
              failures++;
              $display("read %h: got %h expected %h", q[di].addr, HRDATA, q[di].expect_d);
              break;
            end
        end
        di = (ai < n && !q[ai].idle) ? ai : -1;
        ai++;
      end
      @(negedge clk);
      if (rdy) begin
        drive_addr(ai);
        HWDATA = (di >= 0 && q[di].write) ? q[di].wdata : 32'h0;
      end
      if (di < 0 && ai >= n) break;
    end
    drive_addr(n);
    q.delete();
  endtask

endmodule

// tb_read_update_logic: self-checking test of the parallel buffer search.
//
// Random buffer contents with deliberately colliding addresses. The
// reference walks the write-buffer entries from oldest to newest (the buffer
// not being filled first, then the fill buffer, each by index) and keeps the
// last pending match; a read-buffer hit takes priority. Directed cases cover
// an executed entry (pending flag clear) being ignored, a newer partial write
// hiding an older full one, and the fill-buffer order.
module tb_read_update_logic;
  localparam int BURST = 4, AW = 22, DW = 32, IW = 2;

  logic [AW-1:0] addr;
  logic [1:0][AW-IW-1:0] rf_tag;
  logic [1:0][BURST-1:0] rf_valid;
  logic [1:0][BURST-1:0][DW-1:0] rf_words;
  logic [1:0][BURST-1:0][AW-1:0] wf_addr;
  logic [1:0][BURST-1:0][DW-1:0] wf_data;
  logic [1:0][BURST-1:0][3:0]    wf_strb;
  logic [1:0][BURST-1:0]         wf_pend;
  logic fill_sel, rf_hit, wf_fwd, wf_match;
  logic [DW-1:0] hit_data;
  int checks = 0, failures = 0;

  read_update_logic #(.BURST(BURST), .AW(AW), .DW(DW)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic compare();
    bit e_rf, found, full;
    logic [DW-1:0] e_d, w_d;
    int order [2];
    e_rf = 0; e_d = '0; found = 0; full = 0; w_d = '0;
    for (int r = 0; r < 2; r++)
      if (rf_tag[r] == addr[AW-1:IW] && rf_valid[r][addr[IW-1:0]]) begin
        e_rf = 1; e_d = rf_words[r][addr[IW-1:0]];
      end
    order[0] = int'(!fill_sel); order[1] = int'(fill_sel);
    foreach (order[o])
      for (int e = 0; e < BURST; e++)
        if (wf_pend[order[o]][e] && wf_addr[order[o]][e] == addr) begin
          found = 1; full = (wf_strb[order[o]][e] == 4'hF); w_d = wf_data[order[o]][e];
        end
    #1;
    checks++;
    if (rf_hit != e_rf || wf_fwd != (!e_rf && found && full) || wf_match != (!e_rf && found && !full) ||
        ((e_rf || (found && full)) && hit_data != (e_rf ? e_d : w_d))) begin
      failures++;
      $display("FAIL addr %0d: rf_hit %b/%b fwd %b match %b data %h/%h", addr, rf_hit, e_rf,
               wf_fwd, wf_match, hit_data, e_rf ? e_d : w_d);
    end
  endtask

  initial begin
    for (int t = 0; t < 3000; t++) begin
      for (int r = 0; r < 2; r++) begin
        rf_tag[r] = (AW-IW)'($urandom_range(0, 3));
        rf_valid[r] = 4'($urandom());
        for (int e = 0; e < BURST; e++) rf_words[r][e] = $urandom();
      end
      for (int f = 0; f < 2; f++)
        for (int e = 0; e < BURST; e++) begin
          wf_addr[f][e] = AW'($urandom_range(0, 15));
          wf_data[f][e] = $urandom();
          wf_strb[f][e] = ($urandom_range(0, 2) == 0) ? 4'($urandom()) : 4'hF;
          wf_pend[f][e] = 1'($urandom());
        end
      fill_sel = 1'($urandom());
      addr = AW'($urandom_range(0, 15));
      compare();
    end
    // directed: newest entry in the fill buffer wins over the other buffer
    rf_valid = '0;
    wf_pend = '0;
    addr = AW'(7);
    fill_sel = 1;
    wf_addr[0][3] = AW'(7); wf_data[0][3] = 32'h0000_0003; wf_strb[0][3] = 4'hF; wf_pend[0][3] = 1;
    wf_addr[1][0] = AW'(7); wf_data[1][0] = 32'h0000_0010; wf_strb[1][0] = 4'hF; wf_pend[1][0] = 1;
    #1; checks++;
    if (!(wf_fwd && hit_data == 32'h10)) begin failures++; $display("FAIL fill buffer newest"); end
    // executed entry ignored
    wf_pend[1][0] = 0;
    #1; checks++;
    if (!(wf_fwd && hit_data == 32'h3)) begin failures++; $display("FAIL executed entry ignored"); end
    // newer partial write hides the older full one
    wf_addr[1][2] = AW'(7); wf_strb[1][2] = 4'b0010; wf_pend[1][2] = 1;
    #1; checks++;
    if (!(wf_match && !wf_fwd)) begin failures++; $display("FAIL partial newest"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_cmd_generator: self-checking test of the open-row (bank closing) logic.
//
// Random requests and random issued commands (ACTIVE, PRECHARGE of one bank,
// PRECHARGE ALL through A10, others) are applied; a reference table of open
// rows kept in the testbench predicts the command for every request: READ or
// WRITE on a row hit, PRECHARGE on a row conflict, ACTIVE on an idle bank,
// and the address split into row, bank and column.
module tb_cmd_generator;
  import sdram_ctrl_pkg::*;
  localparam int ROW_W = 12, BANK_W = 2, COL_W = 8, AW = 22;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic req_valid = 0, req_write = 0, row_hit, any_open;
  logic [AW-1:0] req_addr = '0;
  sdram_cmd_e next_cmd, iss_cmd;
  logic [BANK_W-1:0] cmd_bank, iss_bank = '0;
  logic [ROW_W-1:0] cmd_row, iss_addr = '0;
  logic [COL_W-1:0] cmd_col;
  logic [3:0] bank_open;
  logic [3:0][ROW_W-1:0] opened_row;
  int checks = 0, failures = 0;
  bit ref_open [4];
  int ref_row [4];
  int n_hit = 0, n_pre = 0, n_act = 0;

  initial iss_cmd = CMD_NOP;

  cmd_generator #(.ROW_W(ROW_W), .BANK_W(BANK_W), .COL_W(COL_W)) dut (.*);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int r, b, c;
    sdram_cmd_e exp_cmd;
    foreach (ref_open[i]) begin ref_open[i] = 0; ref_row[i] = 0; end
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 5000; t++) begin
      @(negedge clk);
      // request
      r = $urandom_range(0, 3); b = $urandom_range(0, 3); c = $urandom_range(0, 255);
      req_valid = 1; req_write = 1'($urandom()); req_addr = AW'({r[ROW_W-1:0], b[1:0], c[7:0]});
      #1;
      if (ref_open[b] && ref_row[b] == r) exp_cmd = req_write ? CMD_WRITE : CMD_READ;
      else if (ref_open[b])              exp_cmd = CMD_PRECHARGE;
      else                               exp_cmd = CMD_ACTIVE;
      checks++;
      if (next_cmd != exp_cmd || cmd_bank != b[1:0] || cmd_row != r[ROW_W-1:0] || cmd_col != c[7:0] ||
          row_hit != (exp_cmd == CMD_READ || exp_cmd == CMD_WRITE)) begin
        failures++;
        $display("FAIL t=%0d: cmd %s expected %s", t, next_cmd.name(), exp_cmd.name());
      end
      if (row_hit) n_hit++;
      if (exp_cmd == CMD_PRECHARGE) n_pre++;
      if (exp_cmd == CMD_ACTIVE) n_act++;
      // issue: usually what was asked, sometimes something else
      case ($urandom_range(0, 5))
        0:       begin iss_cmd = CMD_PRECHARGE; iss_addr = 12'h400; iss_bank = 2'($urandom()); end
        1:       begin iss_cmd = CMD_NOP; end
        default: begin
          iss_cmd = next_cmd; iss_bank = cmd_bank;
          iss_addr = (next_cmd == CMD_ACTIVE) ? cmd_row : 12'h0;
        end
      endcase
      if (iss_cmd == CMD_ACTIVE) begin ref_open[iss_bank] = 1; ref_row[iss_bank] = int'(iss_addr); end
      if (iss_cmd == CMD_PRECHARGE) begin
        if (iss_addr[10]) foreach (ref_open[i]) ref_open[i] = 0;
        else ref_open[iss_bank] = 0;
      end
      @(posedge clk);
      #1;
      iss_cmd = CMD_NOP;
      checks++;
      if (any_open != (ref_open[0] | ref_open[1] | ref_open[2] | ref_open[3])) begin
        failures++; $display("FAIL any_open");
      end
    end
    checks++;
    if (n_hit == 0 || n_pre == 0 || n_act == 0) begin failures++; $display("FAIL coverage"); end
    $display("row hits %0d, conflicts %0d, activates %0d", n_hit, n_pre, n_act);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

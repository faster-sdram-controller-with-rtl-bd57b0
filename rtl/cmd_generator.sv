// cmd_generator: turns a memory request into the next SDRAM command it needs.
//
// The controller keeps rows open after an access instead of closing them with
// auto-precharge (bank closing control), because successive accesses tend to
// fall in the same row. This block tracks, per bank, whether a row is open and
// which one (opened_row). For the request at its input it splits the word
// address into {row, bank, column} and returns:
//   * READ/WRITE   if the bank has the requested row open (row hit),
//   * PRECHARGE    if the bank has another row open (row conflict),
//   * ACTIVE       if the bank is idle.
// The table is updated from the commands the scheduler actually issues
// (ACTIVE opens a row, PRECHARGE closes one bank, or all banks when A10 is
// set, which is how refresh closes every bank).
//
// Timing: next_cmd is combinational; the table changes at the clock edge
// after an issued command. Open-row policy and precharge-all before refresh
// follow the controller's description; the address split is this design's.
module cmd_generator
  import sdram_ctrl_pkg::*;
#(
  parameter int unsigned ROW_W  = DEF_ROW_W,
  parameter int unsigned BANK_W = DEF_BANK_W,
  parameter int unsigned COL_W  = DEF_COL_W,
  localparam int unsigned AW    = ROW_W + BANK_W + COL_W
) (
  input  logic               clk,
  input  logic               rst_n,
  // request
  input  logic               req_valid,
  input  logic               req_write,
  input  logic [AW-1:0]      req_addr,     // word address {row, bank, col}
  output sdram_cmd_e         next_cmd,
  output logic [BANK_W-1:0]  cmd_bank,
  output logic [ROW_W-1:0]   cmd_row,
  output logic [COL_W-1:0]   cmd_col,
  output logic               row_hit,
  // commands actually issued, from the scheduler
  input  sdram_cmd_e         iss_cmd,
  input  logic [BANK_W-1:0]  iss_bank,
  input  logic [ROW_W-1:0]   iss_addr,     // address pins (A10 = all banks)
  // state
  output logic               any_open,
  output logic [(1<<BANK_W)-1:0]              bank_open,
  output logic [(1<<BANK_W)-1:0][ROW_W-1:0]   opened_row
);

  localparam int unsigned NB = 1 << BANK_W;

  assign cmd_col  = req_addr[COL_W-1:0];
  assign cmd_bank = req_addr[COL_W +: BANK_W];
  assign cmd_row  = req_addr[COL_W+BANK_W +: ROW_W];
  assign any_open = |bank_open;

  always_comb begin
    row_hit  = bank_open[cmd_bank] && (opened_row[cmd_bank] == cmd_row);
    next_cmd = CMD_NOP;
    if (req_valid) begin
      if (row_hit)                 next_cmd = req_write ? CMD_WRITE : CMD_READ;
      else if (bank_open[cmd_bank]) next_cmd = CMD_PRECHARGE;
      else                         next_cmd = CMD_ACTIVE;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bank_open  <= '0;
      opened_row <= '0;
    end else begin
      unique case (iss_cmd)
        CMD_ACTIVE: begin
          bank_open[iss_bank]  <= 1'b1;
          opened_row[iss_bank] <= iss_addr;
        end
        CMD_PRECHARGE: begin
          if (iss_addr[10]) bank_open <= '0;
          else              bank_open[iss_bank] <= 1'b0;
        end
        default: ;
      endcase
    end
  end

endmodule

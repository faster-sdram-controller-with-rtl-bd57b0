// cmd_scheduler: drives the SDRAM pins and keeps every command legal in time.
//
// After reset it runs the SDRAM power-up sequence: INIT_WAIT clocks of NOP
// with CKE high, PRECHARGE ALL, two AUTO REFRESH, LOAD MODE REGISTER (burst
// length BURST, sequential, CAS latency CL, single-location writes). Then it
// serves, one command per clock at most:
//   * a refresh, every REF_INTERVAL clocks: open banks are closed first with
//     PRECHARGE ALL, because AUTO REFRESH needs every bank idle;
//   * otherwise the command the generator asks for the current request
//     (PRECHARGE, ACTIVE, READ or WRITE). req_ack marks the clock where the
//     READ or WRITE itself is issued.
// Timing rules enforced: tRP after PRECHARGE, tRCD after ACTIVE, tRFC after
// REFRESH, tMRD after LOAD MODE, tRAS before PRECHARGE, tWR from a WRITE to a
// PRECHARGE; a READ holds the command bus until its burst is in.
// The SDRAM data bus is SD_DW bits wide, 32 or 16; a bus word is DW = 32
// bits, so with a 16-bit SDRAM every word is two SDRAM columns (RATIO = 2,
// low half at the even column). Reads are bursts of BURST words (BURST*RATIO
// SDRAM beats), wrapping inside the burst-aligned block from the requested
// word. Read data is registered at the pins and reassembled into words; word
// i of the burst is presented at rbeat_* CL+1+RATIO*(i+1) clocks after the
// clock edge that issued READ (CL+2+i for a 32-bit SDRAM). A write is one
// WRITE command per SDRAM column of the word (single-location write mode),
// with the matching data half and byte mask (DQM); req_ack comes with the
// last one.
//
// Pins are registered. The command set, the precharge-all before refresh, the
// power-up requirement, burst reads and CL = 2 follow the controller's
// description. Timing values, the mode word and single-location writes are
// this design's choices for a 128 Mbit single-data-rate part at about
// 114 MHz (8.75 ns).
module cmd_scheduler
  import sdram_ctrl_pkg::*;
#(
  parameter int unsigned ROW_W        = DEF_ROW_W,
  parameter int unsigned BANK_W       = DEF_BANK_W,
  parameter int unsigned COL_W        = DEF_COL_W,
  parameter int unsigned DW           = DEF_DATA_W,
  parameter int unsigned SD_DW        = DEF_DATA_W,   // SDRAM data bus, 32 or 16
  parameter int unsigned BURST        = DEF_BURST,
  parameter int unsigned CL           = DEF_CL,
  parameter int unsigned T_RP         = 3,
  parameter int unsigned T_RCD        = 3,
  parameter int unsigned T_RFC        = 8,
  parameter int unsigned T_RAS        = 5,
  parameter int unsigned T_WR         = 2,
  parameter int unsigned T_MRD        = 2,
  parameter int unsigned INIT_WAIT    = 11400,  // 100 us
  parameter int unsigned REF_INTERVAL = 1700    // < 15.6 us
) (
  input  logic               clk,
  input  logic               rst_n,
  // current request
  input  logic               req_valid,
  input  logic               req_write,
  input  logic [DW-1:0]      req_wdata,
  input  logic [DW/8-1:0]    req_strb,
  output logic               req_ack,
  // from the command generator
  input  sdram_cmd_e         gen_cmd,
  input  logic [BANK_W-1:0]  gen_bank,
  input  logic [ROW_W-1:0]   gen_row,
  input  logic [COL_W-$clog2(DW/SD_DW)-1:0] gen_col,   // word column
  input  logic               any_open,
  // issued command, back to the generator (same clock as the pins change)
  output sdram_cmd_e         iss_cmd,
  output logic [BANK_W-1:0]  iss_bank,
  output logic [ROW_W-1:0]   iss_addr,
  // read data
  output logic               rbeat_valid,
  output logic [$clog2(BURST)-1:0] rbeat_idx,
  output logic [DW-1:0]      rbeat_data,
  // status
  output logic               init_done,
  output logic               idle,
  output logic               ref_pending,
  // SDRAM pins
  output logic               sd_cke,
  output logic               sd_cs_n,
  output logic               sd_ras_n,
  output logic               sd_cas_n,
  output logic               sd_we_n,
  output logic [BANK_W-1:0]  sd_ba,
  output logic [ROW_W-1:0]   sd_addr,
  output logic [SD_DW/8-1:0] sd_dqm,
  output logic [SD_DW-1:0]   sd_dq_o,
  output logic               sd_dq_oe,
  input  logic [SD_DW-1:0]   sd_dq_i
);

  localparam int unsigned RATIO = DW / SD_DW;          // SDRAM columns per word
  localparam int unsigned RW    = $clog2(RATIO);
  localparam int unsigned SBL   = BURST * RATIO;          // SDRAM burst length
  localparam int unsigned SRW   = CL + SBL + 1;
  localparam int unsigned CW  = 16;

  typedef enum logic [2:0] {
    S_INIT_WAIT, S_INIT_PRE, S_INIT_REF, S_INIT_MRS, S_READY
  } sch_state_e;

  function automatic logic [2:0] bl_code(int unsigned bl);
    case (bl)
      1:       return 3'b000;
      2:       return 3'b001;
      4:       return 3'b010;
      8:       return 3'b011;
      default: return 3'b111;
    endcase
  endfunction

  // mode word: A9 = 1 single-location writes, A6:4 = CL, A3 = 0 sequential
  localparam logic [ROW_W-1:0] MODE_WORD =
    ROW_W'({2'b00, 1'b1, 2'b00, 3'(CL), 1'b0, bl_code(SBL)});

  sch_state_e       state;
  logic [CW-1:0]    init_cnt, ref_cnt;
  logic [7:0]       t_cmd, t_ras, t_wr;
  logic [1:0]       init_refs;
  logic [SRW-1:0]   rd_sr;
  logic [SD_DW-1:0] dq_q;
  logic [DW-1:0]    word_q;     // halves of the word being reassembled
  logic [RW:0]      wr_half;    // SDRAM column of the word being written
  logic             last_half;

  // command chosen this clock
  sdram_cmd_e        cmd;
  logic [BANK_W-1:0] c_ba;
  logic [ROW_W-1:0]  c_addr;
  logic              can_pre;

  assign can_pre   = (t_ras == 0) && (t_wr == 0);
  assign last_half = (wr_half == (RW+1)'(RATIO - 1));

  always_comb begin
    cmd     = CMD_NOP;
    c_ba    = gen_bank;
    c_addr  = '0;
    req_ack = 1'b0;
    unique case (state)
      S_INIT_WAIT: ;
      S_INIT_PRE: begin
        cmd = CMD_PRECHARGE;
        c_addr[10] = 1'b1;
      end
      S_INIT_REF:  if (t_cmd == 0) cmd = CMD_REFRESH;
      S_INIT_MRS: if (t_cmd == 0) begin
        cmd    = CMD_LOAD_MODE;
        c_ba   = '0;
        c_addr = MODE_WORD;
      end
      S_READY: if (t_cmd == 0) begin
        if (ref_pending) begin
          if (any_open) begin
            if (can_pre) begin
              cmd = CMD_PRECHARGE;
              c_addr[10] = 1'b1;
            end
          end else
            cmd = CMD_REFRESH;
        end else if (req_valid) begin
          unique case (gen_cmd)
            CMD_PRECHARGE: if (can_pre) cmd = CMD_PRECHARGE;
            CMD_ACTIVE: begin
              cmd    = CMD_ACTIVE;
              c_addr = gen_row;
            end
            CMD_READ: begin
              cmd     = CMD_READ;
              c_addr  = ROW_W'(gen_col) << RW;
              req_ack = 1'b1;
            end
            CMD_WRITE: begin
              cmd     = CMD_WRITE;
              c_addr  = (ROW_W'(gen_col) << RW) | ROW_W'(wr_half);
              req_ack = last_half;
            end
            default: ;
          endcase
        end
      end
      default: ;
    endcase
  end

  assign iss_cmd  = cmd;
  assign iss_bank = c_ba;
  assign iss_addr = c_addr;
  assign idle     = (state == S_READY) && (t_cmd == 0) && !ref_pending && (rd_sr == '0);

  // read beats: word i is complete when its last SDRAM beat is registered
  always_comb begin
    rbeat_valid = 1'b0;
    rbeat_idx   = '0;
    for (int i = 0; i < BURST; i++)
      if (rd_sr[CL + RATIO * (i + 1)]) begin
        rbeat_valid = 1'b1;
        rbeat_idx   = i[$clog2(BURST)-1:0];
      end
  end
  if (RATIO == 1) begin : g_x32
    assign rbeat_data = DW'(dq_q);
  end else begin : g_x16
    assign rbeat_data = {dq_q, word_q[DW-1:SD_DW]};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state       <= S_INIT_WAIT;
      init_cnt    <= '0;
      ref_cnt     <= '0;
      init_refs   <= '0;
      t_cmd       <= '0;
      t_ras       <= '0;
      t_wr        <= '0;
      ref_pending <= 1'b0;
      init_done   <= 1'b0;
      rd_sr       <= '0;
      dq_q        <= '0;
      word_q      <= '0;
      wr_half     <= '0;
      sd_cke      <= 1'b0;
      {sd_cs_n, sd_ras_n, sd_cas_n, sd_we_n} <= CMD_INHIBIT;
      sd_ba       <= '0;
      sd_addr     <= '0;
      sd_dqm      <= '1;
      sd_dq_o     <= '0;
      sd_dq_oe    <= 1'b0;
    end else begin
      dq_q   <= sd_dq_i;
      word_q <= DW'({dq_q, word_q} >> SD_DW);
      rd_sr <= {rd_sr[SRW-2:0], cmd == CMD_READ};

      // timers
      if (t_cmd != 0) t_cmd <= t_cmd - 1'b1;
      if (t_ras != 0) t_ras <= t_ras - 1'b1;
      if (t_wr  != 0) t_wr  <= t_wr  - 1'b1;

      // refresh interval
      if (init_done) begin
        if (ref_cnt == CW'(REF_INTERVAL - 1)) begin
          ref_cnt     <= '0;
          ref_pending <= 1'b1;
        end else
          ref_cnt <= ref_cnt + 1'b1;
      end

      unique case (state)
        S_INIT_WAIT: begin
          sd_cke <= 1'b1;
          if (init_cnt == CW'(INIT_WAIT - 1)) state <= S_INIT_PRE;
          else init_cnt <= init_cnt + 1'b1;
        end
        S_INIT_PRE: state <= S_INIT_REF;
        S_INIT_REF: if (cmd == CMD_REFRESH) begin
          init_refs <= init_refs + 1'b1;
          if (init_refs == 2'd1) state <= S_INIT_MRS;
        end
        S_INIT_MRS: if (cmd == CMD_LOAD_MODE) begin
          state     <= S_READY;
          init_done <= 1'b1;
        end
        default: ;
      endcase

      unique case (cmd)
        CMD_PRECHARGE: t_cmd <= 8'(T_RP - 1);
        CMD_ACTIVE: begin
          t_cmd <= 8'(T_RCD - 1);
          t_ras <= 8'(T_RAS - 1);
        end
        CMD_REFRESH: begin
          t_cmd       <= 8'(T_RFC - 1);
          ref_pending <= 1'b0;
        end
        CMD_LOAD_MODE: t_cmd <= 8'(T_MRD - 1);
        CMD_READ:      t_cmd <= 8'(CL + SBL);
        CMD_WRITE: begin
          t_wr    <= 8'(T_WR);
          wr_half <= last_half ? '0 : wr_half + 1'b1;
        end
        default: ;
      endcase

      // pins
      {sd_cs_n, sd_ras_n, sd_cas_n, sd_we_n} <= cmd;
      sd_ba    <= c_ba;
      sd_addr  <= c_addr;
      sd_dq_oe <= (cmd == CMD_WRITE);
      sd_dq_o  <= (cmd == CMD_WRITE) ? SD_DW'(req_wdata >> (SD_DW * wr_half)) : '0;
      sd_dqm   <= (cmd == CMD_WRITE) ? ~(SD_DW/8)'(req_strb >> (SD_DW / 8 * wr_half)) : '0;
    end
  end

  // a READ or WRITE is only issued to a bank the generator found open
  always_ff @(posedge clk) begin
    if (rst_n && req_ack) begin
      assert (gen_cmd == (req_write ? CMD_WRITE : CMD_READ))
        else $error("cmd_scheduler: request kind and command differ");
    end
  end

endmodule

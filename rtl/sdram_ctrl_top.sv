// sdram_ctrl_top: AHB SDRAM controller with buffered ("inbuilt") memory.
//
// A processor on AHB sees SDRAM through small on-chip buffers that hide most
// of the SDRAM latency:
//   * two write buffers used ping-pong: AHB writes fill one while the other
//     is written to SDRAM, and a write normally completes without waiting
//     for the SDRAM;
//   * two read buffers, each holding one whole SDRAM burst with a valid
//     vector; a read miss brings in the full burst, so the following
//     sequential reads are answered from the buffer in zero wait states;
//   * a search engine that checks every buffer location in one clock before a
//     read goes to SDRAM;
//   * a command generator that keeps rows open (a READ or WRITE to an open
//     row needs no ACTIVE) and a command scheduler that runs power-up,
//     refresh (PRECHARGE ALL, then AUTO REFRESH) and the SDRAM timing.
//
// Interface: an AHB slave port (HSELx, HADDR ... HRDATA; HREADY is the
// bus-wide ready, HREADYOUT this slave's) and a single-data-rate SDRAM port
// whose data bus (SD_DW = 32 or 16 bits) is split into sd_dq_o / sd_dq_oe /
// sd_dq_i for the pad tristate. The byte address maps to the SDRAM as
// HADDR = {row, bank, column, byte}; with the defaults: row = HADDR[23:12],
// bank = HADDR[11:10], column = HADDR[9:2]. With a 16-bit SDRAM each 32-bit
// word takes two SDRAM columns; COL_W then counts SDRAM columns (e.g. 9 for
// 512 columns) and the word column is HADDR[COL_W:2].
// Timing: everything runs on HCLK; SDRAM pins and read data are registered.
// init_done rises after the power-up sequence (about INIT_WAIT clocks);
// transfers issued before that wait.
//
// The block structure, the buffer organisation and the choice of a 16- or
// 32-bit SDRAM data path follow the controller's description; the default of
// 32 bits, the geometry and the timings are this design's choices.
module sdram_ctrl_top
  import sdram_ctrl_pkg::*;
#(
  parameter int unsigned HAW          = 32,
  parameter int unsigned DW           = DEF_DATA_W,   // bus word
  parameter int unsigned SD_DW        = DEF_DATA_W,   // SDRAM data bus: 32 or 16
  parameter int unsigned ROW_W        = DEF_ROW_W,
  parameter int unsigned BANK_W       = DEF_BANK_W,
  parameter int unsigned COL_W        = DEF_COL_W,
  parameter int unsigned BURST        = DEF_BURST,
  parameter int unsigned CL           = DEF_CL,
  parameter int unsigned T_RP         = 3,
  parameter int unsigned T_RCD        = 3,
  parameter int unsigned T_RFC        = 8,
  parameter int unsigned T_RAS        = 5,
  parameter int unsigned T_WR         = 2,
  parameter int unsigned T_MRD        = 2,
  parameter int unsigned INIT_WAIT    = 11400,
  parameter int unsigned REF_INTERVAL = 1700
) (
  input  logic              HCLK,
  input  logic              HRESETn,
  // AHB slave
  input  logic              HSELx,
  input  logic [HAW-1:0]    HADDR,
  input  logic              HWRITE,
  input  logic [1:0]        HTRANS,
  input  logic [2:0]        HSIZE,
  input  logic [2:0]        HBURST,
  input  logic [DW-1:0]     HWDATA,
  input  logic              HREADY,
  output logic              HREADYOUT,
  output logic [1:0]        HRESP,
  output logic [DW-1:0]     HRDATA,
  // SDRAM
  output logic              sd_cke,
  output logic              sd_cs_n,
  output logic              sd_ras_n,
  output logic              sd_cas_n,
  output logic              sd_we_n,
  output logic [BANK_W-1:0] sd_ba,
  output logic [ROW_W-1:0]  sd_addr,
  output logic [SD_DW/8-1:0] sd_dqm,
  output logic [SD_DW-1:0]  sd_dq_o,
  output logic              sd_dq_oe,
  input  logic [SD_DW-1:0]  sd_dq_i,
  // status
  output logic              init_done
);

  localparam int unsigned RW = $clog2(DW / SD_DW);      // SDRAM columns per word, log2
  localparam int unsigned WCOL_W = COL_W - RW;            // word column bits
  localparam int unsigned AW = ROW_W + BANK_W + WCOL_W;
  localparam int unsigned IW = $clog2(BURST);
  localparam int unsigned SW = DW / 8;

  // ---------------- AHB slave ----------------
  logic            req_valid, req_write, req_done;
  logic [HAW-1:0]  req_addr;
  logic [SW-1:0]   req_strb;
  logic [DW-1:0]   req_wdata, req_rdata;
  logic [AW-1:0]   req_waddr;

  ahb_slave_if #(.HAW(HAW), .DW(DW)) u_ahb (
    .HCLK, .HRESETn, .HSELx, .HADDR, .HWRITE, .HTRANS, .HSIZE, .HBURST,
    .HWDATA, .HREADY, .HREADYOUT, .HRESP, .HRDATA,
    .req_valid, .req_write, .req_addr, .req_strb, .req_wdata,
    .req_done, .req_rdata
  );

  assign req_waddr = req_addr[AW+1:2];

  // ---------------- write buffers ----------------
  logic [1:0]                     wf_wr_req, wf_wr_ack, wf_accept_rdy, wf_close;
  logic [1:0]                     wf_closed, wf_empty, wf_full, wf_settled;
  logic [1:0]                     wf_head_valid, wf_pop, wf_drained;
  logic [1:0][AW-1:0]             wf_head_addr;
  logic [1:0][DW-1:0]             wf_head_data;
  logic [1:0][SW-1:0]             wf_head_strb;
  logic [1:0][BURST-1:0][AW-1:0]  wf_ent_addr;
  logic [1:0][BURST-1:0][DW-1:0]  wf_ent_data;
  logic [1:0][BURST-1:0][SW-1:0]  wf_ent_strb;
  logic [1:0][BURST-1:0]          wf_ent_pend;
  logic [1:0][1:0]                wf_fsm;

  for (genvar g = 0; g < 2; g++) begin : g_wf
    write_fifo #(.DEPTH(BURST), .AW(AW), .DW(DW)) u_wf (
      .clk(HCLK), .rst_n(HRESETn),
      .wr_req(wf_wr_req[g]), .wr_addr(req_waddr), .wr_data(req_wdata),
      .wr_strb(req_strb), .wr_ack(wf_wr_ack[g]), .accept_rdy(wf_accept_rdy[g]),
      .close(wf_close[g]), .closed(wf_closed[g]), .empty(wf_empty[g]),
      .full(wf_full[g]), .settled(wf_settled[g]),
      .head_valid(wf_head_valid[g]), .head_addr(wf_head_addr[g]),
      .head_data(wf_head_data[g]), .head_strb(wf_head_strb[g]),
      .pop(wf_pop[g]), .drained(wf_drained[g]),
      .ent_addr(wf_ent_addr[g]), .ent_data(wf_ent_data[g]),
      .ent_strb(wf_ent_strb[g]), .ent_pend(wf_ent_pend[g]),
      .fsm_state(wf_fsm[g])
    );
  end

  logic            ahb_wr_req, wr_ready, drain_req;
  logic            mv_valid, mv_ack, fill_sel, move_sel, overlap;
  logic [AW-1:0]   mv_addr;
  logic [DW-1:0]   mv_data;
  logic [SW-1:0]   mv_strb;

  wfifo_pingpong #(.AW(AW), .DW(DW)) u_pp (
    .clk(HCLK), .rst_n(HRESETn),
    .ahb_wr_req, .wr_ready, .drain_req,
    .wf_accept_rdy, .wf_closed, .wf_empty, .wf_full, .wf_settled,
    .wf_head_valid, .wf_drained, .wf_head_addr, .wf_head_data, .wf_head_strb,
    .wf_wr_req, .wf_close, .wf_pop,
    .mv_valid, .mv_addr, .mv_data, .mv_strb, .mv_ack,
    .fill_sel, .move_sel, .overlap
  );

  // ---------------- read buffers ----------------
  logic [1:0]                     rf_fill_start, rf_fill_we, rf_lk_hit, rf_upd_hit;
  logic [IW-1:0]                  rf_fill_idx;
  logic [1:0][AW-IW-1:0]          rf_tag;
  logic [1:0][BURST-1:0]          rf_valid;
  logic [1:0][BURST-1:0][DW-1:0]  rf_words;
  logic [1:0][DW-1:0]             rf_lk_data;
  logic                           upd_en, rf_sel;
  logic                           rbeat_valid;
  logic [IW-1:0]                  rbeat_idx;
  logic [DW-1:0]                  rbeat_data;

  for (genvar g = 0; g < 2; g++) begin : g_rf
    read_fifo #(.BURST(BURST), .AW(AW), .DW(DW)) u_rf (
      .clk(HCLK), .rst_n(HRESETn),
      .fill_start(rf_fill_start[g]), .fill_addr(req_waddr),
      .fill_we(rf_fill_we[g]), .fill_idx(rf_fill_idx), .fill_data(rbeat_data),
      .lk_addr(req_waddr), .lk_hit(rf_lk_hit[g]), .lk_data(rf_lk_data[g]),
      .upd_en(upd_en), .upd_addr(req_waddr), .upd_data(req_wdata),
      .upd_strb(req_strb), .upd_hit(rf_upd_hit[g]),
      .tag(rf_tag[g]), .valid(rf_valid[g]), .words(rf_words[g])
    );
  end

  // ---------------- search engine ----------------
  logic            rf_hit, wf_fwd, wf_match;
  logic [DW-1:0]   hit_data;

  read_update_logic #(.BURST(BURST), .AW(AW), .DW(DW)) u_search (
    .addr(req_waddr),
    .rf_tag, .rf_valid, .rf_words,
    .wf_addr(wf_ent_addr), .wf_data(wf_ent_data), .wf_strb(wf_ent_strb),
    .wf_pend(wf_ent_pend), .fill_sel,
    .rf_hit, .wf_fwd, .wf_match, .hit_data
  );

  // ---------------- access control ----------------
  logic            rd_req, rd_ack;
  logic [AW-1:0]   rd_addr;
  logic            ev_hit, ev_miss, ev_drain;

  access_ctrl #(.BURST(BURST), .AW(AW), .DW(DW)) u_ac (
    .clk(HCLK), .rst_n(HRESETn),
    .req_valid, .req_write, .req_waddr, .req_done, .req_rdata,
    .rf_hit, .wf_fwd, .hit_data,
    .ahb_wr_req, .wr_ready, .upd_en, .drain_req,
    .wf_settled(&wf_settled), .wf_all_empty(&wf_empty),
    .rd_req, .rd_addr, .rd_ack,
    .rbeat_valid, .rbeat_idx, .rbeat_data,
    .rf_fill_start, .rf_fill_we, .rf_fill_idx, .rf_sel,
    .ev_hit, .ev_miss, .ev_drain
  );

  // ---------------- command generator and scheduler ----------------
  logic              sch_req_valid, sch_req_write, sch_ack;
  logic [AW-1:0]     sch_addr;
  sdram_cmd_e        gen_cmd, iss_cmd;
  logic [BANK_W-1:0] gen_bank, iss_bank;
  logic [ROW_W-1:0]  gen_row, iss_addr;
  logic [WCOL_W-1:0] gen_col;
  logic              row_hit, any_open, sch_idle, ref_pending;
  logic [(1<<BANK_W)-1:0]            bank_open;
  logic [(1<<BANK_W)-1:0][ROW_W-1:0] opened_row;

  // a read miss only asks once the write buffers are empty, so the two
  // request sources never compete
  assign sch_req_valid = rd_req || mv_valid;
  assign sch_req_write = !rd_req;
  assign sch_addr      = rd_req ? rd_addr : mv_addr;
  assign rd_ack        = sch_ack && rd_req;
  assign mv_ack        = sch_ack && !rd_req;

  cmd_generator #(.ROW_W(ROW_W), .BANK_W(BANK_W), .COL_W(WCOL_W)) u_gen (
    .clk(HCLK), .rst_n(HRESETn),
    .req_valid(sch_req_valid), .req_write(sch_req_write), .req_addr(sch_addr),
    .next_cmd(gen_cmd), .cmd_bank(gen_bank), .cmd_row(gen_row), .cmd_col(gen_col),
    .row_hit, .iss_cmd, .iss_bank, .iss_addr,
    .any_open, .bank_open, .opened_row
  );

  cmd_scheduler #(
    .ROW_W(ROW_W), .BANK_W(BANK_W), .COL_W(COL_W), .DW(DW), .SD_DW(SD_DW), .BURST(BURST),
    .CL(CL), .T_RP(T_RP), .T_RCD(T_RCD), .T_RFC(T_RFC), .T_RAS(T_RAS),
    .T_WR(T_WR), .T_MRD(T_MRD), .INIT_WAIT(INIT_WAIT), .REF_INTERVAL(REF_INTERVAL)
  ) u_sch (
    .clk(HCLK), .rst_n(HRESETn),
    .req_valid(sch_req_valid), .req_write(sch_req_write),
    .req_wdata(mv_data), .req_strb(mv_strb), .req_ack(sch_ack),
    .gen_cmd, .gen_bank, .gen_row, .gen_col, .any_open,
    .iss_cmd, .iss_bank, .iss_addr,
    .rbeat_valid, .rbeat_idx, .rbeat_data,
    .init_done, .idle(sch_idle), .ref_pending,
    .sd_cke, .sd_cs_n, .sd_ras_n, .sd_cas_n, .sd_we_n, .sd_ba, .sd_addr,
    .sd_dqm, .sd_dq_o, .sd_dq_oe, .sd_dq_i
  );

endmodule

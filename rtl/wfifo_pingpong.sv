// wfifo_pingpong: ping-pong control of the two write buffers.
//
// AHB writes go into the "fill" buffer while the other one, if it holds
// closed data, is moved to SDRAM, so filling one buffer overlaps with
// emptying the other. Rules:
//   * a write goes to the fill buffer if it accepts; if neither buffer can
//     take it the AHB side is held (wr_ready low) until one is empty;
//   * the fill buffer is closed when it is full, when a read needs the writes
//     in SDRAM (drain_req), or when the AHB side pauses writing while the
//     other buffer has nothing to move (flush);
//   * once the fill buffer is closed, filling switches to the other buffer as
//     soon as that one is empty and open;
//   * the "move" buffer hands its entries to the command path one by one
//     (mv_*); buffers are moved in the order they were closed.
//
// Timing: wr_ready, wf_wr_req, mv_valid and wf_pop are combinational; the
// selections change at the clock edge.
//
// Ping-ponging and the hold-until-empty rule follow the controller's
// description; the flush rule and drain request are this design's choices,
// needed so that no data stays in a half-filled buffer.
module wfifo_pingpong
  import sdram_ctrl_pkg::*;
#(
  parameter int unsigned AW = DEF_WA_W,
  parameter int unsigned DW = DEF_DATA_W
) (
  input  logic               clk,
  input  logic               rst_n,
  // AHB side
  input  logic               ahb_wr_req,
  output logic               wr_ready,
  input  logic               drain_req,
  // write buffer status
  input  logic [1:0]         wf_accept_rdy,
  input  logic [1:0]         wf_closed,
  input  logic [1:0]         wf_empty,
  input  logic [1:0]         wf_full,
  input  logic [1:0]         wf_settled,
  input  logic [1:0]         wf_head_valid,
  input  logic [1:0]         wf_drained,
  input  logic [1:0][AW-1:0]   wf_head_addr,
  input  logic [1:0][DW-1:0]   wf_head_data,
  input  logic [1:0][DW/8-1:0] wf_head_strb,
  // write buffer controls
  output logic [1:0]         wf_wr_req,
  output logic [1:0]         wf_close,
  output logic [1:0]         wf_pop,
  // move side (to the command path)
  output logic               mv_valid,
  output logic [AW-1:0]      mv_addr,
  output logic [DW-1:0]      mv_data,
  output logic [DW/8-1:0]    mv_strb,
  input  logic               mv_ack,
  output logic               fill_sel,
  output logic               move_sel,
  output logic               overlap     // one buffer fills while the other moves
);

  logic oth;
  assign oth = !fill_sel;

  always_comb begin
    wf_wr_req = '0;
    wf_wr_req[fill_sel] = ahb_wr_req;
    wr_ready = wf_accept_rdy[fill_sel];

    wf_close = '0;
    wf_close[fill_sel] = !wf_closed[fill_sel] && !wf_empty[fill_sel] &&
                         wf_settled[fill_sel] &&
                         (wf_full[fill_sel] || drain_req ||
                          (!ahb_wr_req && !wf_closed[oth]));

    overlap = ahb_wr_req && wr_ready && wf_head_valid[oth];
  end

  // move side, kept apart from the fill logic: mv_ack depends on mv_valid
  assign mv_valid = wf_head_valid[move_sel];
  assign mv_addr  = wf_head_addr[move_sel];
  assign mv_data  = wf_head_data[move_sel];
  assign mv_strb  = wf_head_strb[move_sel];
  assign wf_pop   = {move_sel, !move_sel} & {2{mv_ack && mv_valid}};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      fill_sel <= 1'b0;
      move_sel <= 1'b0;
    end else begin
      // switch filling once the fill buffer is closed and the other is free
      if ((wf_closed[fill_sel] || wf_close[fill_sel]) &&
          wf_empty[oth] && !wf_closed[oth])
        fill_sel <= oth;
      // next buffer to move once this one is done
      if (wf_drained[move_sel])
        move_sel <= !move_sel;
    end
  end

endmodule

// access_ctrl: decides how each AHB data phase is served.
//
//   write : handed to the write buffers through the ping-pong control; done
//           in the clock it is accepted. The same clock it updates any read
//           buffer that holds the word.
//   read  : the search result decides. A read-buffer hit or a forwardable
//           write-buffer entry is answered in the same clock (no wait
//           state). Otherwise the read goes to SDRAM: first any buffered
//           writes are drained (drain_req) so SDRAM is current, then a burst
//           READ is requested at the word's own column. The SDRAM returns the
//           requested word first (the burst wraps inside its aligned block);
//           it is given to the AHB bus and written into a read buffer in the
//           same clock, and the rest of the burst fills the buffer (the two
//           read buffers are filled in turn). The next request waits until
//           the fill is complete.
// A read also waits while a write buffer is in the middle of storing a word,
// so the search always sees every accepted write.
//
// Timing: req_done is combinational. A miss costs the drain, the row opening
// and CL+2 clocks from the READ command to the data.
// The policy of serving hits from the buffers, of prefetching the whole burst
// and of alternating the read buffers follows the controller's description;
// draining writes before a miss and critical-word-first are this design's.
module access_ctrl
  import sdram_ctrl_pkg::*;
#(
  parameter int unsigned BURST = DEF_BURST,
  parameter int unsigned AW    = DEF_WA_W,
  parameter int unsigned DW    = DEF_DATA_W
) (
  input  logic               clk,
  input  logic               rst_n,
  // from the AHB slave
  input  logic               req_valid,
  input  logic               req_write,
  input  logic [AW-1:0]      req_waddr,
  output logic               req_done,
  output logic [DW-1:0]      req_rdata,
  // search result
  input  logic               rf_hit,
  input  logic               wf_fwd,
  input  logic [DW-1:0]      hit_data,
  // write buffers
  output logic               ahb_wr_req,
  input  logic               wr_ready,
  output logic               upd_en,
  output logic               drain_req,
  input  logic               wf_settled,
  input  logic               wf_all_empty,
  // read to SDRAM
  output logic               rd_req,
  output logic [AW-1:0]      rd_addr,
  input  logic               rd_ack,
  input  logic               rbeat_valid,
  input  logic [$clog2(BURST)-1:0] rbeat_idx,
  input  logic [DW-1:0]      rbeat_data,
  // read buffer fill
  output logic [1:0]         rf_fill_start,
  output logic [1:0]         rf_fill_we,
  output logic [$clog2(BURST)-1:0] rf_fill_idx,
  output logic               rf_sel,
  // events
  output logic               ev_hit,
  output logic               ev_miss,
  output logic               ev_drain
);

  localparam int unsigned IW = $clog2(BURST);

  typedef enum logic [1:0] {C_IDLE, C_MISS, C_FILL} ac_state_e;

  ac_state_e     state;
  logic [IW-1:0] start_idx;

  assign rd_addr = req_waddr;

  always_comb begin
    req_done      = 1'b0;
    req_rdata     = hit_data;
    ahb_wr_req    = 1'b0;
    upd_en        = 1'b0;
    drain_req     = 1'b0;
    rd_req        = 1'b0;
    rf_fill_start = '0;
    rf_fill_we    = '0;
    rf_fill_idx   = start_idx + rbeat_idx;
    ev_hit        = 1'b0;
    ev_miss       = 1'b0;
    ev_drain      = 1'b0;
    unique case (state)
      C_IDLE: if (req_valid) begin
        if (req_write) begin
          ahb_wr_req = 1'b1;
          req_done   = wr_ready;
          upd_en     = wr_ready;
        end else if (wf_settled && (rf_hit || wf_fwd)) begin
          req_done = 1'b1;
          ev_hit   = 1'b1;
        end
      end
      C_MISS: begin
        drain_req = !wf_all_empty;
        ev_drain  = !wf_all_empty;
        rd_req    = wf_all_empty;
        rf_fill_start[rf_sel] = rd_ack;
        ev_miss   = rd_ack;
      end
      C_FILL: begin
        rf_fill_we[rf_sel] = rbeat_valid;
        if (rbeat_valid && rbeat_idx == '0) begin
          req_done  = 1'b1;
          req_rdata = rbeat_data;
        end
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= C_IDLE;
      start_idx <= '0;
      rf_sel    <= 1'b0;
    end else begin
      unique case (state)
        C_IDLE:
          if (req_valid && !req_write && wf_settled && !rf_hit && !wf_fwd) begin
            state   <= C_MISS;
          end
        C_MISS:
          if (rd_ack) begin
            start_idx <= req_waddr[IW-1:0];
            state     <= C_FILL;
          end
        C_FILL:
          if (rbeat_valid && rbeat_idx == IW'(BURST - 1)) begin
            rf_sel <= !rf_sel;
            state  <= C_IDLE;
          end
        default: ;
      endcase
    end
  end

endmodule

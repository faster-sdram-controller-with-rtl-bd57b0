// write_fifo: one of the two write buffers of the controller.
//
// It holds up to DEPTH (one SDRAM burst) address/data pairs written by the AHB
// side, each with a byte strobe and a "pending" flag (set when stored, cleared
// when the entry has been written to SDRAM). Its fill side follows a four-state
// machine: IDLE, STORE (the accepted word is written into the array), INCREMENT
// (the write pointer is advanced) and FULL; a write is accepted only in IDLE,
// so a stored word takes three clocks. Once the ping-pong control closes the
// buffer (when full, or to flush it) the buffer stops accepting writes and
// hands its entries out in order at head_*; each pop marks one entry executed.
// When the last entry has been popped the buffer empties itself and is open
// for writes again. All entries are visible at ent_* for the parallel search.
//
// Timing: wr_ack is combinational (wr_req && IDLE && !full && !closed); the
// entry is visible at ent_* two clocks later. pop advances the head at the
// next edge.
//
// The state machine, the address/data pairing and the burst-sized depth follow
// the controller's description; the pending flag, the close/flush handshake
// and the self-emptying after the move are this design's choices.
module write_fifo
  import sdram_ctrl_pkg::*;
#(
  parameter int unsigned DEPTH  = DEF_BURST,
  parameter int unsigned AW     = DEF_WA_W,
  parameter int unsigned DW     = DEF_DATA_W
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // fill side (AHB)
  input  logic                 wr_req,
  input  logic [AW-1:0]        wr_addr,
  input  logic [DW-1:0]        wr_data,
  input  logic [DW/8-1:0]      wr_strb,
  output logic                 wr_ack,
  output logic                 accept_rdy,   // would accept a write now
  // control
  input  logic                 close,        // stop filling, start moving
  output logic                 closed,
  output logic                 empty,        // no entries at all
  output logic                 full,
  output logic                 settled,      // no store in progress
  // move side (SDRAM)
  output logic                 head_valid,
  output logic [AW-1:0]        head_addr,
  output logic [DW-1:0]        head_data,
  output logic [DW/8-1:0]      head_strb,
  input  logic                 pop,
  output logic                 drained,      // closed and every entry moved
  // search view
  output logic [DEPTH-1:0][AW-1:0]   ent_addr,
  output logic [DEPTH-1:0][DW-1:0]   ent_data,
  output logic [DEPTH-1:0][DW/8-1:0] ent_strb,
  output logic [DEPTH-1:0]           ent_pend,
  output logic [1:0]                 fsm_state
);

  localparam int unsigned PW = $clog2(DEPTH) + 1;

  typedef enum logic [1:0] {
    WF_IDLE  = 2'd0,
    WF_STORE = 2'd1,
    WF_INCR  = 2'd2,
    WF_FULL  = 2'd3
  } wf_state_e;

  wf_state_e           state;
  logic [PW-1:0]       wptr, rptr;
  logic [AW-1:0]       stg_addr;
  logic [DW-1:0]       stg_data;
  logic [DW/8-1:0]     stg_strb;

  assign full       = (wptr == PW'(DEPTH));
  assign empty      = (wptr == '0);
  assign accept_rdy = (state == WF_IDLE) && !full && !closed;
  assign wr_ack     = wr_req && accept_rdy;
  assign settled    = (state == WF_IDLE) || (state == WF_FULL);
  assign head_valid = closed && (rptr != wptr);
  assign head_addr  = ent_addr[rptr[PW-2:0]];
  assign head_data  = ent_data[rptr[PW-2:0]];
  assign head_strb  = ent_strb[rptr[PW-2:0]];
  assign drained    = closed && (rptr == wptr) && settled;
  assign fsm_state  = state;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= WF_IDLE;
      wptr     <= '0;
      rptr     <= '0;
      closed   <= 1'b0;
      ent_pend <= '0;
      stg_addr <= '0;
      stg_data <= '0;
      stg_strb <= '0;
      ent_addr <= '0;
      ent_data <= '0;
      ent_strb <= '0;
    end else begin
      unique case (state)
        WF_IDLE: begin
          if (full)
            state <= WF_FULL;
          else if (wr_ack) begin
            stg_addr <= wr_addr;
            stg_data <= wr_data;
            stg_strb <= wr_strb;
            state    <= WF_STORE;
          end
        end
        WF_STORE: begin
          ent_addr[wptr[PW-2:0]] <= stg_addr;
          ent_data[wptr[PW-2:0]] <= stg_data;
          ent_strb[wptr[PW-2:0]] <= stg_strb;
          ent_pend[wptr[PW-2:0]] <= 1'b1;
          state <= WF_INCR;
        end
        WF_INCR: begin
          wptr  <= wptr + 1'b1;
          state <= WF_IDLE;
        end
        WF_FULL: begin
          if (!full) state <= WF_IDLE;
        end
      endcase

      if (close && settled && !empty) closed <= 1'b1;

      if (pop && head_valid) begin
        ent_pend[rptr[PW-2:0]] <= 1'b0;
        rptr <= rptr + 1'b1;
      end

      // all entries moved: empty the buffer and reopen it
      if (drained) begin
        wptr   <= '0;
        rptr   <= '0;
        closed <= 1'b0;
      end
    end
  end

  // a buffer is only drained while closed
  always_ff @(posedge clk) begin
    if (rst_n) begin
      assert (!(pop && !head_valid)) else $error("write_fifo: pop while no head entry");
    end
  end

endmodule

// read_fifo: one of the two read buffers of the controller.
//
// A read buffer holds exactly one SDRAM burst (BURST words) that starts at a
// burst-aligned word address, its tag. A valid vector with one bit per word
// works like the tags of a small cache: a read hits when the address falls in
// the tag's range and the bit of that word is set. A burst is loaded beat by
// beat after fill_start (which sets the tag and clears the vector); each beat
// sets its word's valid bit. An AHB write to a word held here updates the
// stored copy byte by byte (upd_*), so the buffer never goes stale.
//
// Timing: lk_hit/lk_data are combinational from lk_addr; fill and update
// writes take effect at the next clock edge.
//
// Burst-sized depth, address range check and valid vector follow the
// controller's description; the write update is this design's way of keeping
// the buffer consistent with writes.
module read_fifo
  import sdram_ctrl_pkg::*;
#(
  parameter int unsigned BURST = DEF_BURST,
  parameter int unsigned AW    = DEF_WA_W,
  parameter int unsigned DW    = DEF_DATA_W
) (
  input  logic                    clk,
  input  logic                    rst_n,
  // burst load from SDRAM
  input  logic                    fill_start,
  input  logic [AW-1:0]           fill_addr,    // any word of the burst
  input  logic                    fill_we,
  input  logic [$clog2(BURST)-1:0] fill_idx,
  input  logic [DW-1:0]           fill_data,
  // lookup
  input  logic [AW-1:0]           lk_addr,
  output logic                    lk_hit,
  output logic [DW-1:0]           lk_data,
  // write update from the AHB side
  input  logic                    upd_en,
  input  logic [AW-1:0]           upd_addr,
  input  logic [DW-1:0]           upd_data,
  input  logic [DW/8-1:0]         upd_strb,
  output logic                    upd_hit,
  // state, for the search logic and for test
  output logic [AW-$clog2(BURST)-1:0] tag,
  output logic [BURST-1:0]        valid,
  output logic [BURST-1:0][DW-1:0] words
);

  localparam int unsigned IW = $clog2(BURST);

  logic [IW-1:0] lk_idx, upd_idx;
  logic [DW-1:0] upd_word;

  // held word with the written bytes replaced
  always_comb begin
    upd_word = words[upd_idx];
    for (int b = 0; b < DW/8; b++)
      if (upd_strb[b]) upd_word[8*b +: 8] = upd_data[8*b +: 8];
  end

  assign lk_idx  = lk_addr[IW-1:0];
  assign upd_idx = upd_addr[IW-1:0];
  assign lk_hit  = (lk_addr[AW-1:IW] == tag) && valid[lk_idx];
  assign lk_data = words[lk_idx];
  assign upd_hit = (upd_addr[AW-1:IW] == tag) && valid[upd_idx];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tag   <= '0;
      valid <= '0;
      words <= '0;
    end else begin
      if (fill_start) begin
        tag   <= fill_addr[AW-1:IW];
        valid <= '0;
      end
      if (fill_we) begin
        words[fill_idx] <= fill_data;
        valid[fill_idx] <= 1'b1;
      end
      if (upd_en && upd_hit && !fill_start)
        words[upd_idx] <= upd_word;
    end
  end

endmodule

// read_update_logic: the controller's internal search engine.
//
// Before a read is sent to SDRAM, its word address is compared in parallel,
// in one clock, against every location of both read buffers and both write
// buffers, so the search time does not depend on the buffer depth. Priority:
//   1. a read buffer that holds the word (range check + valid bit): its copy
//      is always current, because writes update it;
//   2. otherwise the newest write-buffer entry for that word that has not yet
//      been executed (pending flag set). The newest is the highest-index
//      pending entry of the buffer being filled (fill_sel), then that of the
//      other buffer. It can be forwarded if it wrote the whole word.
// wf_match reports a pending write to the word that cannot be forwarded (a
// byte or half-word write); the caller then lets the writes reach SDRAM first.
//
// Purely combinational. The parallel search and the executed flag follow the
// controller's description; the priority and the full-word forwarding rule
// are this design's.
module read_update_logic
  import sdram_ctrl_pkg::*;
#(
  parameter int unsigned BURST = DEF_BURST,   // read-buffer words = write-buffer depth
  parameter int unsigned AW    = DEF_WA_W,
  parameter int unsigned DW    = DEF_DATA_W
) (
  input  logic [AW-1:0]                         addr,
  // read buffers
  input  logic [1:0][AW-$clog2(BURST)-1:0]      rf_tag,
  input  logic [1:0][BURST-1:0]                 rf_valid,
  input  logic [1:0][BURST-1:0][DW-1:0]         rf_words,
  // write buffers
  input  logic [1:0][BURST-1:0][AW-1:0]         wf_addr,
  input  logic [1:0][BURST-1:0][DW-1:0]         wf_data,
  input  logic [1:0][BURST-1:0][DW/8-1:0]       wf_strb,
  input  logic [1:0][BURST-1:0]                 wf_pend,
  input  logic                                  fill_sel,  // newer write buffer
  // result
  output logic                                  rf_hit,
  output logic                                  wf_fwd,
  output logic                                  wf_match,
  output logic [DW-1:0]                         hit_data
);

  localparam int unsigned IW = $clog2(BURST);

  logic [1:0]          rf_m;
  logic [1:0][BURST-1:0] wf_m;
  logic [DW-1:0]       rf_d, wf_d;
  logic                wf_found, wf_full;

  always_comb begin
    // read buffers, both at once
    rf_d = '0;
    for (int r = 0; r < 2; r++) begin
      rf_m[r] = (addr[AW-1:IW] == rf_tag[r]) && rf_valid[r][addr[IW-1:0]];
      if (rf_m[r]) rf_d = rf_words[r][addr[IW-1:0]];
    end

    // write buffers: every location compared in parallel
    for (int f = 0; f < 2; f++)
      for (int e = 0; e < BURST; e++)
        wf_m[f][e] = wf_pend[f][e] && (wf_addr[f][e] == addr);

    // newest match: older buffer first, newer one overrides; within a
    // buffer a higher index is newer
    wf_found = 1'b0;
    wf_full  = 1'b0;
    wf_d     = '0;
    for (int e = 0; e < BURST; e++)
      if (wf_m[!fill_sel][e]) begin
        wf_found = 1'b1;
        wf_full  = &wf_strb[!fill_sel][e];
        wf_d     = wf_data[!fill_sel][e];
      end
    for (int e = 0; e < BURST; e++)
      if (wf_m[fill_sel][e]) begin
        wf_found = 1'b1;
        wf_full  = &wf_strb[fill_sel][e];
        wf_d     = wf_data[fill_sel][e];
      end

    rf_hit   = |rf_m;
    wf_fwd   = !rf_hit && wf_found && wf_full;
    wf_match = !rf_hit && wf_found && !wf_full;
    hit_data = rf_hit ? rf_d : wf_d;
  end

endmodule

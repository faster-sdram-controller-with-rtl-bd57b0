// sdram_model: behavioural model of a single-data-rate SDRAM, for simulation
// only (not synthesizable).
//
// It decodes {CS#, RAS#, CAS#, WE#} at each rising clock edge while CKE is
// high, keeps the open row of every bank and stores data sparsely in an
// associative array, so the full 16 MB address space costs nothing until it
// is written. It honours the mode register (burst length, CAS latency,
// single-location write mode, sequential wrap inside the burst block) and
// byte masks (DQM). A READ seen at edge e drives burst word i on dq_o at edge
// e+CL-1+i, so it can be sampled at edge e+CL+i (CL >= 2).
// It also checks the protocol the controller must keep and counts each
// violation in `errors`: commands before the mode register is loaded,
// READ/WRITE to an idle bank, ACTIVE to an open bank, REFRESH with a bank
// open, and the tRCD, tRP, tRAS, tRFC and tMRD spacings. Counters of every
// command are exported for the testbenches.
module sdram_model #(
  parameter int unsigned ROW_W  = 12,
  parameter int unsigned BANK_W = 2,
  parameter int unsigned COL_W  = 8,
  parameter int unsigned DW     = 32,
  parameter int unsigned T_RP   = 3,
  parameter int unsigned T_RCD  = 3,
  parameter int unsigned T_RFC  = 8,
  parameter int unsigned T_RAS  = 5,
  parameter int unsigned T_MRD  = 2
) (
  input  logic              clk,
  input  logic              cke,
  input  logic              cs_n,
  input  logic              ras_n,
  input  logic              cas_n,
  input  logic              we_n,
  input  logic [BANK_W-1:0] ba,
  input  logic [ROW_W-1:0]  addr,
  input  logic [DW/8-1:0]   dqm,
  input  logic [DW-1:0]     dq_i,
  output logic [DW-1:0]     dq_o,
  output int                errors,
  output int                n_act,
  output int                n_read,
  output int                n_write,
  output int                n_pre,
  output int                n_ref,
  output int                n_mrs
);

  localparam int unsigned NB = 1 << BANK_W;
  localparam int unsigned AW = ROW_W + BANK_W + COL_W;

  logic [DW-1:0] mem [logic [AW-1:0]];

  bit                 open_b [NB];
  logic [ROW_W-1:0]   row_b  [NB];
  longint             t_act  [NB];
  longint             t_pre  [NB];
  longint             t_ref, t_mrs, cyc;
  bit                 mode_set;
  int unsigned        bl, cl;
  bit                 single_wr;
  bit                 pv [16];
  logic [DW-1:0]      pd [16];

  function automatic logic [AW-1:0] waddr(input logic [BANK_W-1:0] b,
                                          input logic [ROW_W-1:0] r,
                                          input logic [COL_W-1:0] c);
    return {r, b, c};
  endfunction

  function automatic logic [DW-1:0] peek(input logic [AW-1:0] a);
    if (mem.exists(a)) return mem[a];
    return '0;
  endfunction

  task automatic err(input string s);
    errors++;
    $display("sdram_model: %s at cycle %0d", s, cyc);
  endtask

  initial begin
    errors = 0; n_act = 0; n_read = 0; n_write = 0; n_pre = 0; n_ref = 0; n_mrs = 0;
    cyc = 0; t_ref = -100; t_mrs = -100; mode_set = 0; bl = 1; cl = 2; single_wr = 0;
    dq_o = '0;
    for (int b = 0; b < NB; b++) begin
      open_b[b] = 0; row_b[b] = '0; t_act[b] = -100; t_pre[b] = -100;
    end
    for (int s = 0; s < 16; s++) begin pv[s] = 0; pd[s] = '0; end
  end

  always @(posedge clk) begin
    int unsigned slot;
    logic [COL_W-1:0] c;
    logic [DW-1:0] w;
    cyc++;
    slot = int'(cyc % 16);
    if (pv[slot]) begin
      dq_o     <= pd[slot];
      pv[slot] = 0;
    end else
      dq_o <= '0;

    if (cke && !cs_n) begin
      if ({ras_n, cas_n, we_n} != 3'b111 && (cyc - t_ref) < T_RFC) err("command inside tRFC");
      if ({ras_n, cas_n, we_n} != 3'b111 && {ras_n, cas_n, we_n} != 3'b000 &&
          {ras_n, cas_n, we_n} != 3'b010 && {ras_n, cas_n, we_n} != 3'b001 &&
          !mode_set) err("access before the mode register is loaded");
      if ((cyc - t_mrs) < T_MRD && {ras_n, cas_n, we_n} != 3'b111) err("command inside tMRD");
      unique case ({ras_n, cas_n, we_n})
        3'b011: begin // ACTIVE
          n_act++;
          if (open_b[ba]) err("ACTIVE to an open bank");
          if ((cyc - t_pre[ba]) < T_RP) err("tRP violated");
          open_b[ba] = 1; row_b[ba] = addr; t_act[ba] = cyc;
        end
        3'b101: begin // READ
          n_read++;
          if (!open_b[ba]) err("READ to an idle bank");
          if ((cyc - t_act[ba]) < T_RCD) err("tRCD violated on READ");
          for (int i = 0; i < int'(bl); i++) begin
            c = addr[COL_W-1:0];
            if (bl > 1) c = (c & ~COL_W'(bl - 1)) | ((c + COL_W'(i)) & COL_W'(bl - 1));
            pd[(cyc + cl - 1 + i) % 16] = peek(waddr(ba, row_b[ba], c));
            pv[(cyc + cl - 1 + i) % 16] = 1;
          end
        end
        3'b100: begin // WRITE
          n_write++;
          if (!open_b[ba]) err("WRITE to an idle bank");
          if ((cyc - t_act[ba]) < T_RCD) err("tRCD violated on WRITE");
          if (!single_wr) err("burst writes are not modelled");
          w = peek(waddr(ba, row_b[ba], addr[COL_W-1:0]));
          for (int b = 0; b < DW / 8; b++)
            if (!dqm[b]) w[8*b +: 8] = dq_i[8*b +: 8];
          mem[waddr(ba, row_b[ba], addr[COL_W-1:0])] = w;
        end
        3'b010: begin // PRECHARGE
          n_pre++;
          for (int b = 0; b < NB; b++)
            if (addr[10] || b == int'(ba)) begin
              if (open_b[b] && (cyc - t_act[b]) < T_RAS) err("tRAS violated");
              open_b[b] = 0; t_pre[b] = cyc;
            end
        end
        3'b001: begin // AUTO REFRESH
          n_ref++;
          for (int b = 0; b < NB; b++) begin
            if (open_b[b]) err("REFRESH with a bank open");
            if ((cyc - t_pre[b]) < T_RP) err("tRP violated before REFRESH");
          end
          t_ref = cyc;
        end
        3'b000: begin // LOAD MODE REGISTER
          n_mrs++;
          for (int b = 0; b < NB; b++) if (open_b[b]) err("LOAD MODE with a bank open");
          bl        = 1 << addr[2:0];
          cl        = addr[6:4];
          single_wr = addr[9];
          mode_set  = 1;
          t_mrs     = cyc;
        end
        default: ;
      endcase
    end
  end

  // direct access for testbenches
  function automatic logic [DW-1:0] backdoor_read(input logic [AW-1:0] a);
    return peek(a);
  endfunction

endmodule

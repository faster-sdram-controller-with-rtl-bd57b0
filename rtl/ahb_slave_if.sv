// ahb_slave_if: AMBA AHB slave front end of the SDRAM controller.
//
// An AHB transfer has a one-clock address phase and a data phase. When the
// slave is selected (HSELx), the transfer is NONSEQ or SEQ and HREADY is
// high, the address, direction and size are registered; the next clock is
// the data phase, presented to the controller core as a request (req_*).
// HWDATA is valid in the data phase and is passed straight through. The core
// answers with req_done, in the same clock if it can (a buffer hit or an
// accepted write): HREADYOUT is then high and the transfer ends with no wait
// state. Until req_done, HREADYOUT is low and the master holds the next
// address and control signals. HRESP is always OKAY.
// Byte lanes are little-endian: req_strb marks the bytes of a byte, half-word
// or word transfer (HSIZE 0, 1, 2) at HADDR[1:0].
//
// The address/data phase split and the HREADY hold follow the controller's
// description and the AHB protocol; the strobe generation is this design's.
module ahb_slave_if
  import sdram_ctrl_pkg::*;
#(
  parameter int unsigned HAW = 32,
  parameter int unsigned DW  = DEF_DATA_W
) (
  input  logic            HCLK,
  input  logic            HRESETn,
  input  logic            HSELx,
  input  logic [HAW-1:0]  HADDR,
  input  logic            HWRITE,
  input  logic [1:0]      HTRANS,
  input  logic [2:0]      HSIZE,
  input  logic [2:0]      HBURST,
  input  logic [DW-1:0]   HWDATA,
  input  logic            HREADY,
  output logic            HREADYOUT,
  output logic [1:0]      HRESP,
  output logic [DW-1:0]   HRDATA,
  // request to the core (data phase)
  output logic            req_valid,
  output logic            req_write,
  output logic [HAW-1:0]  req_addr,
  output logic [DW/8-1:0] req_strb,
  output logic [DW-1:0]   req_wdata,
  input  logic            req_done,
  input  logic [DW-1:0]   req_rdata
);

  logic       dp_valid;
  logic [2:0] dp_size;
  logic       addr_phase;

  assign addr_phase = HSELx && HTRANS[1] && HREADY;

  always_ff @(posedge HCLK or negedge HRESETn) begin
    if (!HRESETn) begin
      dp_valid  <= 1'b0;
      req_write <= 1'b0;
      req_addr  <= '0;
      dp_size   <= '0;
    end else if (HREADY) begin
      dp_valid <= addr_phase;
      if (addr_phase) begin
        req_write <= HWRITE;
        req_addr  <= HADDR;
        dp_size   <= HSIZE;
      end
    end
  end

  always_comb begin
    unique case (dp_size)
      3'd0:    req_strb = (DW/8)'(1) << req_addr[1:0];
      3'd1:    req_strb = (DW/8)'(3) << {req_addr[1], 1'b0};
      default: req_strb = '1;
    endcase
  end

  assign req_valid = dp_valid;
  assign req_wdata = HWDATA;
  assign HREADYOUT = !dp_valid || req_done;
  assign HRESP     = HRESP_OKAY;
  assign HRDATA    = req_rdata;

  // protocol rules checked in simulation
  always_ff @(posedge HCLK) begin
    if (HRESETn && addr_phase) begin
      assert (HSIZE <= 3'd2) else $error("ahb_slave_if: transfer wider than 32 bits");
      assert ((HSIZE == 3'd0) || (HSIZE == 3'd1 && !HADDR[0]) || (HADDR[1:0] == 2'b00))
        else $error("ahb_slave_if: unaligned transfer");
    end
    if (HRESETn && dp_valid && !HREADYOUT) begin
      assert (!HREADY) else $error("ahb_slave_if: HREADY high while this slave waits");
    end
  end

  logic unused_hburst;
  assign unused_hburst = ^HBURST;

endmodule

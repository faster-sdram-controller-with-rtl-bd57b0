// sdram_ctrl_pkg: types and constants shared by the AHB SDRAM controller.
//
// The SDRAM command encoding is the JEDEC single-data-rate one, driven on
// {CS#, RAS#, CAS#, WE#}. The AHB transfer-type and response codes are the
// AMBA AHB ones. The default geometry (4 banks x 4096 rows x 256 columns of
// 32-bit words, 16 MB) is this design's choice of a common 128 Mbit x32 part;
// the burst of 4 and CAS latency of 2 follow the controller's description.
package sdram_ctrl_pkg;

  // SDRAM commands, encoded as {cs_n, ras_n, cas_n, we_n}
  typedef enum logic [3:0] {
    CMD_LOAD_MODE = 4'b0000,
    CMD_REFRESH   = 4'b0001,
    CMD_PRECHARGE = 4'b0010,
    CMD_ACTIVE    = 4'b0011,
    CMD_WRITE     = 4'b0100,
    CMD_READ      = 4'b0101,
    CMD_BST       = 4'b0110,
    CMD_NOP       = 4'b0111,
    CMD_INHIBIT   = 4'b1111
  } sdram_cmd_e;

  // AHB HTRANS
  typedef enum logic [1:0] {
    HTRANS_IDLE   = 2'b00,
    HTRANS_BUSY   = 2'b01,
    HTRANS_NONSEQ = 2'b10,
    HTRANS_SEQ    = 2'b11
  } htrans_e;

  // AHB HRESP (two-bit AHB2 encoding)
  typedef enum logic [1:0] {
    HRESP_OKAY  = 2'b00,
    HRESP_ERROR = 2'b01,
    HRESP_RETRY = 2'b10,
    HRESP_SPLIT = 2'b11
  } hresp_e;

  // Default geometry (word = 32 bits)
  localparam int unsigned DEF_DATA_W = 32;
  localparam int unsigned DEF_COL_W  = 8;
  localparam int unsigned DEF_BANK_W = 2;
  localparam int unsigned DEF_ROW_W  = 12;
  localparam int unsigned DEF_BURST  = 4;   // words per SDRAM burst = FIFO depth
  localparam int unsigned DEF_CL     = 2;   // CAS latency in clocks

  // Word address = {row, bank, col}
  localparam int unsigned DEF_WA_W = DEF_ROW_W + DEF_BANK_W + DEF_COL_W;

endpackage

// icai_pkg: constants and types shared by the image combiner and acquisition
// interface (ICAI).
//
// The line geometry (704 pixels per sensor, four sensors per ICAI, 8-bit
// pixels), the 1000-cycle line period and the 247-cycle sensor store time
// are the values of the published design. The host command decode follows
// its command table (HSELx, HTRANS, HWRITE). The packing of the
// configuration word (rows in the top 25 bits, PGA gain in the next 3,
// sample delay in the low 4) follows the left-to-right field order of its
// configuration timing figure. The End-of-Line and End-of-File code words
// are this design's own choice: the source gives the symbols but not their
// encoding.
package icai_pkg;

  localparam int unsigned NPIX      = 704;   // pixels per sensor line
  localparam int unsigned NSENS     = 4;     // sensors per ICAI
  localparam int unsigned NBLK      = 16;    // SRAM blocks (4 banks x 4 blocks)
  localparam int unsigned PERIOD    = 1000;  // clock cycles per line (one stage)
  localparam int unsigned T_STORE   = 247;   // sensor store cycles before pixel output
  localparam int unsigned PKT_EXTRA = 2;     // line index + EOL/EOF after the pixels

  // Host bus state, decoded from HSELx / HTRANS / HWRITE.
  typedef enum logic [2:0] {
    MODE_DISABLE  = 3'd0,
    MODE_CONFIG   = 3'd1,
    MODE_READ     = 3'd2,
    MODE_IDLE     = 3'd3,
    MODE_RESERVED = 3'd4
  } mode_e;

  // Programmable registers as carried on HRWDATA[31:0] during configuration.
  typedef struct packed {
    logic [24:0] rows_x704;     // requested image height in units of 704 lines
    logic [2:0]  pga;           // sensor programmable-gain setting
    logic [3:0]  sample_delay;  // PGA + ADC latency (DL), in clock cycles
  } cfg_t;

  localparam logic [31:0] EOL_WORD = 32'h454F_4C0A;  // "EOL\n"
  localparam logic [31:0] EOF_WORD = 32'h454F_460A;  // "EOF\n"

  function automatic mode_e decode_mode(logic hsel, logic htrans, logic hwrite);
    if (!hsel)                 return MODE_DISABLE;
    else if (htrans && hwrite) return MODE_CONFIG;
    else if (htrans)           return MODE_READ;
    else if (hwrite)           return MODE_IDLE;
    else                       return MODE_RESERVED;
  endfunction

endpackage

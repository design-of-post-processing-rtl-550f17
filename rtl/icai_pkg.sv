// icai_pkg: types and constants shared by the ICAI chip, its FPGA-side
// controller and the sensor emulator.
//
// The ICAI (image combiner and acquisition interface) reads four 704-pixel
// strip sensors every 1000 HCLK cycles and returns one 2816-pixel line to the
// host as a 706-word packet: 704 pixel words, one line-index word and one
// end-of-line or end-of-file word. A pixel word carries one 8-bit pixel of
// each sensor, sensor A in bits [7:0], B in [15:8], C in [23:16], D in [31:24]
// (this packing, and the codes of the EOL/EOF symbols, are this design's
// choice; the packet layout, the 32-bit configuration word with its 25/3/4-bit
// fields, the 1000-cycle period and the 247-cycle start offset follow the
// ICAI protocol).
package icai_pkg;

  localparam int unsigned N_SENSORS = 4;
  localparam int unsigned PIX_W     = 8;

  // End-of-line / end-of-file symbols that close each packet ("EOL", "EOF").
  localparam logic [31:0] SYM_EOL = 32'h454F_4C00;
  localparam logic [31:0] SYM_EOF = 32'h454F_4600;

  // State of the ICAI as decoded from HSELx, HTRANS and HWRITE.
  typedef enum logic [2:0] {
    ICAI_DISABLE  = 3'd0,
    ICAI_IDLE     = 3'd1,
    ICAI_CONFIG   = 3'd2,
    ICAI_READ     = 3'd3,
    ICAI_RESERVED = 3'd4
  } icai_state_e;

  // Configuration word written in the configuration state. The most
  // significant 25 bits hold the number of requested 704-line blocks.
  typedef struct packed {
    logic [24:0] rows_x704;      // reg_requestedrowx704
    logic [2:0]  pga;            // reg_pga
    logic [3:0]  sample_delays;  // reg_sample_delays (DL)
  } icai_cfg_t;

  function automatic icai_state_e icai_decode(input logic hsel,
                                              input logic htrans,
                                              input logic hwrite);
    if (!hsel)                 return ICAI_DISABLE;
    else if (htrans && hwrite) return ICAI_CONFIG;
    else if (htrans)           return ICAI_READ;
    else if (hwrite)           return ICAI_IDLE;
    else                       return ICAI_RESERVED;
  endfunction

endpackage

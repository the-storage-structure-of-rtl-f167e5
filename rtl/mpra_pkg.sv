// Shared types and constants of the multi-precision reconfigurable CNN
// accelerator (MPRA).
//
// The accelerator has 24 processing engines (PEs), each with nine 16x16
// multipliers that can also work as eighteen 16x8 or thirty-six 8x8
// multipliers. A PE produces four 32-bit "lanes"; which lanes are used
// depends on the precision mode:
//   PREC_16X16 : lane0 = 16-bit data x 16-bit weight
//   PREC_16X8  : lane0 = data x weight[15:8], lane1 = data x weight[7:0]
//                (one 16-bit image, two 8-bit filters H and L)
//   PREC_8X8   : lane0 = dH x wH, lane1 = dH x wL, lane2 = dL x wH,
//                lane3 = dL x wL (two 8-bit images x two 8-bit filters)
// Data Buffer words hold one column of an eight-line set: seven lines of the
// image plus a redundant copy of the first line of the next set.
package mpra_pkg;

  localparam int unsigned NUM_PE      = 24;   // PEs in the array
  localparam int unsigned TAPS        = 9;    // multipliers per PE (3x3)
  localparam int unsigned DW          = 16;   // data / weight word width
  localparam int unsigned LANES       = 4;    // result lanes per PE
  localparam int unsigned ACCW        = 32;   // width of a PE lane sum
  localparam int unsigned SET_ROWS    = 8;    // lines per Data Buffer word
  localparam int unsigned SET_LINES   = 7;    // independent lines per set
  localparam int unsigned KMAX        = 7;    // largest kernel
  localparam int unsigned KTAPS       = KMAX * KMAX;
  localparam int unsigned TSLOTS      = 3;    // T_SRAM lines read per column

  // Memory sizes in bytes, as built
  localparam int unsigned DBUF_BYTES  = 128 * 1024;
  localparam int unsigned PBUF_BYTES  = 1024;
  localparam int unsigned PSRAM_BYTES = 48 * 1024;
  localparam int unsigned TSRAM_BYTES = 112;

  // Derived depths
  localparam int unsigned DB_WORD_W   = SET_ROWS * DW;                 // 128
  localparam int unsigned DB_DEPTH    = DBUF_BYTES / (DB_WORD_W / 8);  // 8192
  localparam int unsigned DB_AW       = $clog2(DB_DEPTH);
  localparam int unsigned PB_DEPTH    = PBUF_BYTES / (DW / 8);         // 512
  localparam int unsigned PB_AW       = $clog2(PB_DEPTH);
  localparam int unsigned PS_DEPTH    = PSRAM_BYTES / NUM_PE / 4;      // 512 x 32 bit per bank
  localparam int unsigned PS_AW       = $clog2(PS_DEPTH);
  localparam int unsigned TS_DEPTH    = TSRAM_BYTES / (DW / 8);        // 56
  localparam int unsigned TS_AW       = $clog2(TS_DEPTH);

  // Parameter Buffer layout of one channel's weights: PE p, tap t at
  // base + p*9 + t; offset (bias) of PE p at base + 216 + p.
  localparam int unsigned WREG_WORDS  = NUM_PE * TAPS + NUM_PE;        // 240

  typedef enum logic [1:0] {
    PREC_16X16 = 2'd0,
    PREC_16X8  = 2'd1,
    PREC_8X8   = 2'd2
  } prec_e;

  typedef enum logic [1:0] {
    KER_3 = 2'd0,
    KER_5 = 2'd1,
    KER_7 = 2'd2
  } ker_e;

  typedef logic [DW-1:0]                 word_t;
  typedef logic [LANES-1:0][ACCW-1:0]    lanes_t;
  typedef logic [SET_ROWS-1:0][DW-1:0]   dbword_t;   // [row] of one column

  // One run: one input channel, one set (seven output lines), one strip of
  // output columns.
  typedef struct packed {
    ker_e              ker;
    prec_e             prec;
    logic [8:0]        width;    // image width W (columns)
    logic [5:0]        nsets;    // sets in the image (height / 7)
    logic [5:0]        set_idx;  // set processed by this run
    logic [8:0]        col0;     // first output column of the strip
    logic [8:0]        ncols;    // strip width S
    logic [DB_AW-1:0]  db_base;  // Data Buffer address of set 0, column 0
    logic [PB_AW-1:0]  wbase;    // Parameter Buffer address of the weights
    logic              first;    // first input channel: start from the offset
    logic [4:0]        shift;    // arithmetic right shift of the PE sum
  } run_cfg_t;

  // Kernel size and half-size of a kernel code
  function automatic int unsigned ker_size(ker_e k);
    case (k)
      KER_5:   return 5;
      KER_7:   return 7;
      default: return 3;
    endcase
  endfunction

  // PEs combined for one kernel: 1, 3 or 6
  function automatic int unsigned ker_group(ker_e k);
    case (k)
      KER_5:   return 3;
      KER_7:   return 6;
      default: return 1;
    endcase
  endfunction

  // Bits per P_SRAM lane for a precision mode: 32, 16 or 8
  function automatic int unsigned lane_bits(prec_e p);
    case (p)
      PREC_16X8: return 16;
      PREC_8X8:  return 8;
      default:   return 32;
    endcase
  endfunction

endpackage

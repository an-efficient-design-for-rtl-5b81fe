// rrg_pkg: constants and types shared by the reconfigurable reversible gate
// (RRG) cipher.
//
// An RRG works on 12 reversible lines. Line numbering follows the gate
// description of the RRG: lines 0..4 carry the configuration bits K0..K4,
// lines 5..7 are ancillary lines that enter and leave at constant 1, and
// lines 8..11 carry the data bits X0..X3. In every line vector of this design
// bit i is line i. A cipher is a cascade of 16 RRGs configured by an 80-bit
// main key, 5 bits per gate; those sizes are the ones the cipher is defined
// with. The cipher has no clock: it is a purely combinational cascade.
package rrg_pkg;

  localparam int unsigned RRG_LINES   = 12;  // lines of one RRG
  localparam int unsigned CFG_BITS    = 5;   // configuration lines K0..K4
  localparam int unsigned ANC_LINES   = 3;   // constant-1 ancillary lines
  localparam int unsigned DATA_BITS   = 4;   // data lines X0..X3
  localparam int unsigned N_STAGES    = 16;  // RRGs in one cipher cascade
  localparam int unsigned KEY_BITS    = N_STAGES * CFG_BITS;  // 80

  // Line indices inside one RRG.
  localparam int unsigned L_K0 = 0;
  localparam int unsigned L_K1 = 1;
  localparam int unsigned L_K2 = 2;
  localparam int unsigned L_K3 = 3;
  localparam int unsigned L_K4 = 4;
  localparam int unsigned L_A0 = 5;
  localparam int unsigned L_A1 = 6;
  localparam int unsigned L_A2 = 7;
  localparam int unsigned L_X0 = 8;
  localparam int unsigned L_X1 = 9;
  localparam int unsigned L_X2 = 10;
  localparam int unsigned L_X3 = 11;

  // Value the ancillary lines enter with (and must leave with).
  localparam logic [ANC_LINES-1:0] ANC_INIT = '1;

  typedef logic [RRG_LINES-1:0] rrg_lines_t;
  typedef logic [CFG_BITS-1:0]  rrg_cfg_t;
  typedef logic [DATA_BITS-1:0] data_t;
  typedef logic [KEY_BITS-1:0]  main_key_t;

endpackage

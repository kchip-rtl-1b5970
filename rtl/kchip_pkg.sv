// Kchip shared constants and types.
// Sizes follow the Kchip description: up to four PACE chips, each read out as
// 3 columns of 32 twelve-bit samples per trigger, a 1024x18 Data FIFO per PACE,
// and 128x27 Column Address and Trigger FIFOs. Codes for the trigger command
// line, the link symbols and the field layouts of FIFO words and packet headers
// are choices of this design.
package kchip_pkg;

  localparam int unsigned N_PACE_MAX = 4;
  localparam int unsigned N_COL      = 3;    // columns read per trigger
  localparam int unsigned N_SAMP     = 32;   // samples per column
  localparam int unsigned ADC_W      = 12;   // ADC sample width
  localparam int unsigned DATA_W     = 18;   // Data FIFO word width
  localparam int unsigned DATA_DEPTH = 1024; // Data FIFO depth
  localparam int unsigned CTRL_W     = 27;   // Column Address / Trigger FIFO width
  localparam int unsigned CTRL_DEPTH = 128;  // Column Address / Trigger FIFO depth
  localparam int unsigned BC_W       = 12;   // bunch counter width
  localparam int unsigned EC_W       = 24;   // event counter width
  localparam int unsigned CADDR_W    = 8;    // PACE column (pipeline cell) address width

  // Serial trigger command codes, three bits, first bit always 1.
  localparam logic [2:0] CMD_TRIGGER = 3'b100;
  localparam logic [2:0] CMD_RESYNC  = 3'b101;
  localparam logic [2:0] CMD_CALIB   = 3'b110;

  // Link symbol sent to the GOL each cycle.
  typedef enum logic [1:0] {
    SYM_IDLE = 2'b00,   // tx_en=0, tx_er=0: fill
    SYM_SOF  = 2'b01,   // tx_en=0, tx_er=1: start of frame
    SYM_DATA = 2'b10    // tx_en=1, tx_er=0: data word
  } link_sym_e;

  // Trigger FIFO: two words per trigger, word 0 then word 1.
  typedef struct packed {
    logic [12:0]     pad;
    logic            calib;   // calibration event
    logic            null_ev; // trigger was inhibited: NULL event
    logic [BC_W-1:0] bc;
  } trig_w0_t;

  typedef struct packed {
    logic [2:0]      pad;
    logic [EC_W-1:0] ec;
  } trig_w1_t;

  // Column Address FIFO: one word per PACE per column.
  typedef struct packed {
    logic [10:0]        pad;
    logic [1:0]         pace;  // PACE index
    logic [1:0]         col;   // column index within the event
    logic [3:0]         zero;
    logic [CADDR_W-1:0] addr;  // PACE column address
  } col_word_t;                // low 16 bits are sent as-is in the packet

  // Data FIFO word.
  typedef struct packed {
    logic [3:0]       pad;
    logic [1:0]       col;
    logic [ADC_W-1:0] sample;
  } data_word_t;

endpackage

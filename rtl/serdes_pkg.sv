// serdes_pkg -- types and constants shared by the SerDes test module.
//
// The test module runs the chip in one of fifteen operating modes. Each mode
// is decoded into the selector pairs of five routing multiplexers (A..E).
// Characters on the parallel side are 9 bits wide: bit 8 is the 8b/10b
// control flag (K) and bits 7:0 are the byte HGFEDCBA. Encoded characters are
// 10 bits, held with bit 0 = 'a' (the first bit on the line) up to
// bit 9 = 'j' (the last bit on the line).
//
// Constants that follow the source design: the two LFSR seeds, the K28.7
// comma that opens every LFSR burst, the 16-entry comparator memories and
// the 10-bit marker (D1.0, negative running disparity) the serial comparator
// synchronises on. The enum names are this design's own. Not every module
// uses every constant, so lint lists some as unused where a file imports the
// package.
package serdes_pkg;

  typedef enum logic [3:0] {
    MODE_NORMAL          = 4'd0,   // receiver and transmitter work independently
    MODE_RXD             = 4'd1,   // test pin drives the digital receiver
    MODE_TXA             = 4'd2,   // test pin drives the analog transmitter
    MODE_RXA_FREQDIV     = 4'd3,   // analog receiver output, divided, on test pin
    MODE_TXD             = 4'd4,   // digital transmitter output on test pin
    MODE_RXD_LOOP        = 4'd5,   // test pin -> RXD -> TXD -> test pin
    MODE_TXD_LOOP        = 4'd6,   // TXD -> RXD
    MODE_RXA_LOOP        = 4'd7,   // analog receiver -> analog transmitter
    MODE_RXA_FULL_BIST   = 4'd8,   // RXA -> RXD -> TXD -> TXA, serial BIST
    MODE_LFSR_TXA        = 4'd9,   // serial LFSR pattern -> analog transmitter
    MODE_LFSR_TXD_FULL   = 4'd10,  // LFSR -> TXD -> TXA -(ext)-> RXA -> RXD, parallel BIST
    MODE_LFSR_TXD_DIG    = 4'd11,  // LFSR -> TXD -> RXD, parallel BIST
    MODE_TXD_FULL_BIST   = 4'd12,  // tx_data -> TXD -> TXA -(ext)-> RXA -> RXD, parallel BIST
    MODE_LFSR_RXA_FULL   = 4'd13,  // LFSR TX -(ext)-> RXA -> RXD -> TXD -> TXA, serial BIST
    MODE_LFSR_RXD_DIG    = 4'd14   // LFSR TX -> RXD -> TXD -> test pin, serial BIST
  } mode_e;

  // Selector pairs of the five routing multiplexers, packed so that the
  // 10-bit vector reads A B C D E from the most significant end.
  typedef struct packed {
    logic [1:0] a;  // digital receiver input:      tx_pcie, testIn, analog RX, LFSR TX
    logic [1:0] b;  // digital transmitter input:   tx_data, rx_data, LFSR word
    logic [1:0] c;  // analog transmitter input:    tx_pcie, testIn, analog RX, LFSR bit
    logic [1:0] d;  // test output pin:             tx_pcie, divided analog RX, LFSR TX
    logic [1:0] e;  // comparator output-side word: serial TXD bit, rx_data
  } mux_sel_t;

  localparam int unsigned CHAR_W = 9;    // parallel character width (K flag + byte)
  localparam int unsigned CODE_W = 10;   // encoded character width
  localparam int unsigned LFSR_W = 10;   // LFSR register count

  localparam logic [LFSR_W-1:0] SEED_A = 10'b0011111000;  // seed for the serial LFSR mode
  localparam logic [LFSR_W-1:0] SEED_B = 10'b0000000001;  // seed for the parallel LFSR modes

  localparam logic [CHAR_W-1:0] COMMA_CHAR = 9'h1FC;      // K28.7, starts each LFSR burst

  // D1.0 encoded at negative running disparity, a..j = 011101 0100.
  localparam logic [CODE_W-1:0] SYNC_MARKER = 10'b0010101110;

  localparam int unsigned BIST_DEPTH   = 16;  // comparator memory depth
  localparam int unsigned BURST_WORDS  = 16;  // characters per LFSR burst (comma included)
  localparam int unsigned PHASES       = 8;   // clock phases per serial bit

endpackage

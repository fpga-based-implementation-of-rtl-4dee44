// tts_pkg: widths and types shared by the concatenative speech synthesis
// datapath and controller.
//
// A target word is six 8-bit characters (48 bits). Its segments are two
// characters (16 bits), the same width as a library phone. A library entry
// is 35 bits: the 16-bit phone and the 19-bit start address of that phone's
// recording in the board's audio memory. Those widths are the thesis's.
// The entry layout (phone in the upper 16 bits, address in the lower 19) is
// this design's choice.
//
// The controller state type uses the thesis's binary state assignment ABC
// (S0 = 000 ... S7 = 111).
package tts_pkg;

  localparam int unsigned CHAR_W    = 8;
  localparam int unsigned WORD_CHARS = 6;
  localparam int unsigned SEG_W     = 2 * CHAR_W;  // one phone / segment: 16
  localparam int unsigned SADDR_W   = 19;          // audio start address
  localparam int unsigned WORD_W    = WORD_CHARS * CHAR_W;  // target word: 48
  localparam int unsigned NUM_SEG   = WORD_W / SEG_W;   // 3

  typedef logic [SEG_W-1:0]   phone_t;
  typedef logic [SADDR_W-1:0] saddr_t;
  typedef logic [WORD_W-1:0]  word_t;

  typedef struct packed {
    phone_t phone;  // [34:19]
    saddr_t saddr;  // [18:0]
  } lib_entry_t;

  // Controller states with the thesis's flip-flop encoding A,B,C.
  typedef enum logic [2:0] {
    S0_IDLE   = 3'b000,  // wait for ready
    S1_LOAD   = 3'b001,  // word and library being loaded
    S2_ASSIGN = 3'b010,  // X = R(i)
    S3_KCHECK = 3'b011,  // K = end of library ?
    S4_CMP    = 3'b100,  // Y(K) = X ?
    S5_INCK   = 3'b101,  // increment K
    S6_PLAY   = 3'b110,  // wait for the player
    S7_INCI   = 3'b111   // increment I
  } state_t;

endpackage

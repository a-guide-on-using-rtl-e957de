// fx_pkg: types and constants shared by the audio-effects design.
//
// The audio path carries 18-bit two's-complement samples end to end (the
// codec link delivers up to 18 bits per sample). The AC'97 link constants
// describe the 256-bit frame: a 16-bit tag slot followed by twelve 20-bit
// slots, framed by a SYNC pulse 16 bit-clocks long. Gains are unsigned Q1.15.
package fx_pkg;
  localparam int unsigned SAMPLE_W = 18;
  typedef logic signed [SAMPLE_W-1:0] sample_t;

  localparam int unsigned GAIN_W    = 16;
  localparam int unsigned GAIN_FRAC = 15;
  typedef logic [GAIN_W-1:0] gain_t;

  // AC'97 link framing
  localparam int unsigned AC97_TAG_BITS   = 16;
  localparam int unsigned AC97_SLOT_BITS  = 20;
  typedef logic [7:0] ac97_bitpos_t;


  // A codec register write: slot 1 carries {read/write, index[6:0]}, slot 2 the data.
  typedef struct packed {
    logic [7:0]  addr;
    logic [15:0] data;
  } ac97_cmd_t;

  // Register indices of the AC'97 mixer used by the set-up state machine
  localparam logic [6:0] REG_MASTER_VOL = 7'h02;
  localparam logic [6:0] REG_HPHONE_VOL = 7'h04;
  localparam logic [6:0] REG_PCM_OUT    = 7'h18;
  localparam logic [6:0] REG_REC_SELECT = 7'h1A;
  localparam logic [6:0] REG_REC_GAIN   = 7'h1C;
endpackage

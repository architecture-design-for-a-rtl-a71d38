// nsd_pkg: types and constants shared by the spike-based data reduction platform.
//
// The numbers follow the platform description: 16-bit samples, 128 channels per
// reduction unit, a 16-sample history per channel in the input BRAM, 20 units
// for 2560 channels, a 16-bit time stamp, a 12-bit channel ID, 48-word output
// blocks (time stamp, channel ID, 46 AP samples) and 128 blocks per output FIFO,
// which gives a 13-bit FIFO address. The NEO offset is 4 (the history holds
// x[n+4]) and the threshold multiplier is 16. The window length used for the
// mean-deviation estimate is not fixed by the description; 2^7 = 128 samples is
// this design's choice.
package nsd_pkg;

  localparam int unsigned SAMPLE_W      = 16;   // bits per neural sample
  localparam int unsigned CH_PER_UNIT   = 128;  // channels per reduction unit
  localparam int unsigned SLOTS         = 16;   // input BRAM samples per channel
  localparam int unsigned SLOT_W        = 4;    // log2(SLOTS)
  localparam int unsigned NUM_UNITS     = 20;   // reduction units in the platform
  localparam int unsigned TS_W          = 16;   // time stamp width
  localparam int unsigned CHID_W        = 12;   // global channel ID width
  localparam int unsigned NEO_DELTA     = 4;    // delta of the NEO
  localparam int unsigned PRE_SAMPLES   = 10;   // samples kept before the spike sample
  localparam int unsigned AP_SAMPLES    = 46;   // 10 pre + 1 spike + 35 refractory
  localparam int unsigned BLOCK_WORDS   = 48;   // time stamp + channel ID + 46 samples
  localparam int unsigned FIFO_BLOCKS   = 128;  // AP waveforms held by one output FIFO
  localparam int unsigned THR_MULT_LOG2 = 4;    // threshold = 16 x mean deviation
  localparam int unsigned MD_WIN_LOG2   = 7;    // mean-deviation window N = 2^7 (design choice)
  localparam int unsigned NEO_W         = 2*SAMPLE_W + 1; // signed NEO output width
  localparam int unsigned FIFO_AW       = 13;   // output FIFO address (6144 words used)

  // Channel status, Table "channel-status bits": two state bits plus the
  // output FIFO address of the next word to write for that channel.
  typedef enum logic [1:0] {
    CH_IDLE   = 2'b00,  // no detected spike: sample goes to NEO + comparator
    CH_COPY16 = 2'b01,  // header written: copy the first 16 AP samples
    CH_REFR_A = 2'b10,  // AP samples 17..30 copied one by one on arrival
    CH_REFR_B = 2'b11   // AP samples 31..46 copied one by one on arrival
  } ch_state_e;

  typedef struct packed {
    ch_state_e            state;
    logic [FIFO_AW-1:0]   addr;   // next output FIFO word for this channel
  } ch_status_t;                  // 15 bits

  // Operating phase of a unit after reset.
  typedef enum logic [1:0] {
    PH_WARMUP = 2'b00,  // history filling, nothing computed
    PH_TRAIN  = 2'b01,  // mean deviation of the NEO accumulated per channel
    PH_DETECT = 2'b10   // normal operation: NEO compared with the threshold
  } phase_e;

endpackage

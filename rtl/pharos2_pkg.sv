// pharos2_pkg: sizes and types shared by the PHAROS2 digital beamformer.
//
// The beamformer works in the frequency domain. Every signal processing
// block after the channelizers passes a "channel stream": on each clock with
// valid high it carries one frequency channel of one spectrum (frame) for all
// signals of one FPGA in parallel, channels in ascending order, frames one after
// the other ("chans, time" order). A tag with the channel number and a
// start-of-frame flag travels with every sample.
//
// The numbers that follow the document: 700 MS/s 8-bit samples, 512 channels,
// 404 channels kept for the 275 MHz band, 24 signals split as 12 per FPGA, four
// beams, 8+8 bit complex channel and beam samples, 32-bit integrated power,
// 36 LVDS lanes between the FPGAs, up to 15 pairs of raw channels.
// The coefficient width (16+16 bit, unity = 2^14), the 16+16 bit partial beam
// and the 4:1 lane serialisation are this design's own choices.
package pharos2_pkg;

  localparam int unsigned N_SIG_TOTAL = 24;   // single-polarisation elements in use
  localparam int unsigned N_SIG_FPGA  = 12;   // signals used per FPGA
  localparam int unsigned N_BEAMS     = 4;    // beamformer engines
  localparam int unsigned N_CHAN      = 512;  // channelizer output channels
  localparam int unsigned N_SEL       = 404;  // contiguous channels kept (275 MHz)
  localparam int unsigned CHAN_W      = 9;    // bits of a channel number
  localparam int unsigned ADC_W       = 8;    // ADC bits reaching the FPGA
  localparam int unsigned SMP_W       = 8;    // real / imaginary bits of a channel sample
  localparam int unsigned COEF_W      = 16;   // real / imaginary bits of a coefficient
  localparam int unsigned COEF_FRAC   = 14;   // coefficient 1.0 = 2**COEF_FRAC
  localparam int unsigned PB_W        = 16;   // real / imaginary bits of a partial beam
  localparam int unsigned POW_W       = 32;   // integrated power word
  localparam int unsigned F2F_LANES   = 36;   // FPGA-to-FPGA LVDS lanes
  localparam int unsigned F2F_SER     = 4;    // lane bits per clock (4:1 serialisers)
  localparam int unsigned MAX_PAIRS   = 15;   // raw-capture channel pairs

  // Complex channel sample, 8 bit real + 8 bit imaginary.
  typedef struct packed {
    logic signed [SMP_W-1:0] re;
    logic signed [SMP_W-1:0] im;
  } cplx8_t;

  // Complex beamforming coefficient.
  typedef struct packed {
    logic signed [COEF_W-1:0] re;
    logic signed [COEF_W-1:0] im;
  } coef_t;

  // Complex partial (or full) beam sample before requantisation.
  typedef struct packed {
    logic signed [PB_W-1:0] re;
    logic signed [PB_W-1:0] im;
  } cplx16_t;

  // Tag carried with every channel-stream sample.
  typedef struct packed {
    logic              sof;   // first channel of a frame
    logic [CHAN_W-1:0] chan;  // channel number
  } chan_tag_t;

  // All four partial beams of one channel, as they cross between the FPGAs.
  typedef struct packed {
    chan_tag_t                  tag;
    cplx16_t [N_BEAMS-1:0]      beam;
  } pbeam_word_t;

  // Output selection of the beam data path (FPGA0).
  typedef enum logic {
    OUT_INTEGRATED = 1'b0,    // four integrated power spectra
    OUT_RAW_BEAM   = 1'b1     // voltages of one selected beam
  } out_mode_e;

endpackage

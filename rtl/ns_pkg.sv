// ns_pkg: types and constants shared by the neurostimulator modules.
//
// Sizes that follow the chip: 64 channels split into two banks of 32, a
// 64-tap symmetric FIR (32 distinct coefficient magnitudes), 8-bit current
// DACs, 8-bit phase words, oversampling ratio 1000.  Word widths of samples,
// counters and registers are this design's own choices.
package ns_pkg;

  localparam int N_CH        = 64;   // recording / stimulation channels
  localparam int BANK        = 32;   // channels per multiplier bank
  localparam int TAPS        = 64;   // FIR taps (symmetric, 32 magnitudes)
  localparam int OSR         = 1000; // oversampling ratio of the monitor mode
  localparam int SW          = 16;   // electrode sample / I-Q word width
  localparam int PW          = 10;   // FIR product width (10-bit filter)
  localparam int AW          = 18;   // add-and-delay accumulator width
  localparam int WAVE_DEPTH  = 16;   // stimulation waveform samples per channel
  localparam int N_BIAS      = 8;    // outputs of the bias voltage DAC

  typedef logic signed [SW-1:0] sample_t;
  typedef logic signed [PW-1:0] prod_t;
  typedef logic signed [AW-1:0] acc_t;

  // One stimulation waveform sample: push/pull direction and 8-bit magnitude.
  typedef struct packed {
    logic       dir;   // 1 = source (anodic), 0 = sink (cathodic)
    logic [7:0] mag;
  } wave_t;

  // Stimulation episode timing, all in system clock cycles.
  typedef struct packed {
    logic [15:0] samp_period;  // cycles per waveform sample
    logic [3:0]  wave_len;     // waveform samples per pulse minus one
    logic [23:0] pulse_period; // cycles from one pulse start to the next
    logic [15:0] n_pulses;     // pulses per episode
    logic [15:0] short_len;    // cycles of electrode shorting after an episode
  } stim_cfg_t;

  // Global configuration held in config_regs.
  typedef struct packed {
    logic              mode_fir;     // 1 = monitoring + detection (FIR) mode
    logic              closed_loop;  // detection triggers stimulation
    logic              radio_sel;    // 0 = short-range, 1 = long-range radio
    logic              tx_en;        // transmit data frames
    logic [5:0]        ch_a;         // first channel of the synchrony pair
    logic [5:0]        ch_b;         // second channel of the synchrony pair
    logic [15:0]       plv_thr;      // threshold on the windowed coherence sum
    logic [8:0]        plv_win;      // coherence window in FIR frames
    logic [7:0]        stim_ilsb;    // stimulation LSB current
    stim_cfg_t         stim;
    logic [N_CH-1:0]   stim_mask;    // channels that stimulate in an episode
    logic [TAPS-1:0]   fir_neg;      // per-tap sign of the FIR coefficients
    logic [N_BIAS*8-1:0] bias_code;  // codes of the bias voltage DAC
  } cfg_t;

  // Register addresses of config_regs.
  localparam logic [15:0] A_MODE   = 16'h0000;
  localparam logic [15:0] A_PAIR   = 16'h0001;
  localparam logic [15:0] A_THR    = 16'h0002;
  localparam logic [15:0] A_WIN    = 16'h0003;
  localparam logic [15:0] A_ILSB   = 16'h0004;
  localparam logic [15:0] A_SPER   = 16'h0005;
  localparam logic [15:0] A_WLEN   = 16'h0006;
  localparam logic [15:0] A_PPER_L = 16'h0007;
  localparam logic [15:0] A_PPER_H = 16'h0008;
  localparam logic [15:0] A_NPUL   = 16'h0009;
  localparam logic [15:0] A_SHORT  = 16'h000A;
  localparam logic [15:0] A_TRIG   = 16'h000B;  // write: manual stimulation trigger
  localparam logic [15:0] A_MASK0  = 16'h0010;  // 0x10..0x13: stimulation mask
  localparam logic [15:0] A_NEG0   = 16'h0014;  // 0x14..0x17: FIR tap signs
  localparam logic [15:0] A_BIAS0  = 16'h0020;  // 0x20..0x27: bias DAC codes
  // Channel memory: 0x1000 | channel << 5 | word.
  localparam logic [3:0]  A_CHMEM_TOP = 4'h1;

endpackage

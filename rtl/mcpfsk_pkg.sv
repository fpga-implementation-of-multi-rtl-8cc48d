// mcpfsk_pkg: constants and helper functions shared by the MCPFSK modem.
//
// The modem sends 4 data bits per symbol on one of 16 tones. Tone k
// (k = 0..15, ascending frequency) sits at FC + (2k-15)*FDEV, i.e. the carrier
// FC = 1900 Hz plus or minus an odd multiple phi_dev = 1,3,..,15 of the
// deviation FDEV = 100 Hz. With FS = 8000 Hz and a 10 ms symbol that gives
// 80 samples per symbol and tones from 400 Hz to 3400 Hz, 200 Hz apart.
// Data nibbles are Gray coded onto tones, so neighbouring tones differ in one
// bit: nibble = bin2gray(k), k = gray2bin(nibble).
//
// The frame layout (PRE_NIBBLES start symbols, data nibbles high nibble
// first, then the four nibbles of the CRC16) is this design's own choice.
package mcpfsk_pkg;

  localparam int N_TONES  = 16;   // tones, M = 2^n with n = 4 bits per symbol
  localparam int SYM_BITS = 4;
  localparam int N_DEV    = 8;    // distinct phi_dev values (1,3,..,15)
  localparam int PRE_SYMS = 2;    // start symbols per frame
  localparam int CRC_SYMS = 4;    // 16-bit CRC sent as four nibbles

  typedef logic [SYM_BITS-1:0] nibble_t;

  // Start symbols as data nibbles: 8 -> tone 15 (top), 0 -> tone 0 (bottom).
  localparam nibble_t PRE_NIBBLES [PRE_SYMS] = '{4'h8, 4'h0};

  function automatic nibble_t bin2gray(input nibble_t b);
    return b ^ (b >> 1);
  endfunction

  function automatic nibble_t gray2bin(input nibble_t g);
    nibble_t b;
    b[SYM_BITS-1] = g[SYM_BITS-1];
    for (int i = SYM_BITS-2; i >= 0; i--) b[i] = b[i+1] ^ g[i];
    return b;
  endfunction

  // Frequency of tone k in Hz.
  function automatic int tone_hz(input int fc_hz, input int fdev_hz, input int k);
    return fc_hz + (2*k - (N_TONES-1)) * fdev_hz;
  endfunction

  // round(scale * cos(2*pi*hz/fs)) and round(scale * sin(2*pi*hz/fs)),
  // evaluated at elaboration time for the oscillator coefficients.
  function automatic longint q_cos(input real hz, input real fs, input real scale);
    real v;
    v = scale * $cos(2.0 * 3.14159265358979323846 * hz / fs);
    return longint'(v);
  endfunction

  function automatic longint q_sin(input real hz, input real fs, input real scale);
    real v;
    v = scale * $sin(2.0 * 3.14159265358979323846 * hz / fs);
    return longint'(v);
  endfunction

endpackage

// sync_pkg: constants and types shared by the 802.16e OFDMA downlink
// synchronisation blocks (symbol boundary detection, integer and fractional
// carrier frequency offset estimation, NCO and derotator).
//
// The numbers below are those of the 10 MHz, 1024-point profile with a 1/8
// cyclic prefix: a 300-tap quantised preamble correlator that tries seven
// integer CFO hypotheses (-3..+3 subcarrier spacings) over 200 candidate
// positions, and 10-bit samples.  The 2-bit sample code and the binary angle
// format are this design's own choices.
package sync_pkg;

  localparam int unsigned N_FFT      = 1024; // useful symbol length in samples
  localparam int unsigned CP_LEN     = 128;  // cyclic prefix length (G = 1/8)
  localparam int unsigned CORR_LEN   = 300;  // taps of each correlation part
  localparam int unsigned N_HYP      = 7;    // integer CFO hypotheses -3..+3
  localparam int unsigned SEARCH_LEN = 200;  // candidate positions searched
  localparam int unsigned SAMPLE_W   = 10;   // bits per I or Q component
  localparam int unsigned ANGLE_W    = 16;   // binary angle: 2^16 = one turn

  // Quantised sample component: 00 = 0, pos = +1, neg = -1 (11 never occurs).
  typedef struct packed {
    logic neg;
    logic pos;
  } qsym_t;

  // Controller states.
  typedef enum logic [2:0] {
    ST_IDLE   = 3'd0,  // waiting for start; estimation blocks asleep
    ST_SEARCH = 3'd1,  // filling the correlator and searching the boundary
    ST_ACC2   = 3'd2,  // second-half ICFO correlation
    ST_FCFO   = 3'd3,  // cyclic prefix cross correlation
    ST_ANGLE  = 3'd4,  // CORDIC vectoring of the CP correlation
    ST_DECIDE = 3'd5,  // ping-pong ICFO decision, NCO word update
    ST_TRACK  = 3'd6   // compensation running
  } sync_state_e;

  // atan(2^-i) as a fraction of a full turn, scaled by 2^32:
  //   ATAN_TURN32[i] = round(atan(2^-i) / (2*pi) * 2^32)
  localparam logic [31:0] ATAN_TURN32 [24] = '{
    32'd536870912, 32'd316933406, 32'd167458907, 32'd85004756,
    32'd42667331,  32'd21354465,  32'd10679838,  32'd5340245,
    32'd2670163,   32'd1335087,   32'd667544,    32'd333772,
    32'd166886,    32'd83443,     32'd41722,     32'd20861,
    32'd10430,     32'd5215,      32'd2608,      32'd1304,
    32'd652,       32'd326,       32'd163,       32'd81
  };

  // CORDIC gain compensation 1/K = 0.607252935 scaled by 2^16.
  localparam int unsigned CORDIC_INV_GAIN_Q16 = 39797;

  function automatic qsym_t qzero();
    return '{neg: 1'b0, pos: 1'b0};
  endfunction

endpackage

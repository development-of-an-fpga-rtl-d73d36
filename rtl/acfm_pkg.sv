// acfm_pkg: widths, fixed-point formats and frame layout shared by the
// eight-path ACFM (Alternating Current Field Measurement) processing chain.
//
// The chain computes, for every probe path and every frame ("clip") of N
// samples a[n],
//     A = sum_{n=1..N} a[n] * ( P*sin(R[n-1]) + Q*cos(R[n-1]) )
//     P = 4*cos(beta)/(N*pi),  Q = 4*sin(beta)/(N*pi),  R[n-1] = (n-1)*2*pi*Fc/Fs
// Word widths follow the document where it prints them: 16-bit SPI words,
// PQ_phase as signed 3.32 (35 bits), the per-sample ACFM value as signed
// 21.32 (53 bits), a signed 16-bit result per frame. Angles are this design's
// own choice: a 32-bit fraction of a full turn (2^32 = 2*pi).
package acfm_pkg;
  localparam int unsigned WORD_W    = 16;   // SPI word / ADC sample container
  localparam int unsigned HDR_LEN   = 6;    // header words: N, beta, Fc LSB/MSB, Fs LSB/MSB
  localparam int unsigned N_PATHS   = 8;    // one master path, seven slave paths
  localparam int unsigned PHASE_W   = 32;   // angle: turns x 2^32
  localparam int unsigned TRIG_W    = 32;   // sine/cosine: signed 2.30
  localparam int unsigned TRIG_FRAC = 30;
  localparam int unsigned PQ_W      = 35;   // P, Q, PQ_phase: signed 3.32
  localparam int unsigned PQ_FRAC   = 32;
  localparam int unsigned ACFM_W    = 53;   // per-sample ACFM value: signed 21.32
  localparam int unsigned INVNPI_W  = 32;   // 1/(N*pi): unsigned 0.32

  typedef logic [WORD_W-1:0]         word_t;
  typedef logic [PHASE_W-1:0]        phase_t;
  typedef logic signed [TRIG_W-1:0]  trig_t;
  typedef logic signed [PQ_W-1:0]    pq_t;
  typedef logic signed [ACFM_W-1:0]  acfm_t;
  typedef logic signed [WORD_W-1:0]  result_t;

  // Position of a word inside a frame (Fig. 21 layout).
  typedef enum logic [2:0] {
    EL_N      = 3'd0,
    EL_BETA   = 3'd1,
    EL_FC_LSB = 3'd2,
    EL_FC_MSB = 3'd3,
    EL_FS_LSB = 3'd4,
    EL_FS_MSB = 3'd5
  } hdr_el_e;
endpackage

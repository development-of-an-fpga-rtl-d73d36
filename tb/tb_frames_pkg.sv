// tb_frames_pkg: test frames and a floating-point reference model of the
// ACFM sum for the testbenches. The four sample sets are the probe frames
// used to evaluate the design (frames 1-2: cracked-rail clips, frames 3-4:
// healthy-rail clips), each 40 samples at Fs = 2 MHz of a 50 kHz carrier,
// beta = 260 degrees. frame_word() builds the 46-word SPI frame: N, beta,
// Fc low/high, Fs low/high, then the samples.
package tb_frames_pkg;
  localparam int NS = 40;
  typedef logic [15:0] sample_arr_t [NS];
  localparam sample_arr_t FRAME1 = '{
    16'd834, 16'd770, 16'd736, 16'd758, 16'd788, 16'd888, 16'd998, 16'd1162, 16'd1361, 16'd1540,
    16'd1765, 16'd1988, 16'd2234, 16'd2495, 16'd2692, 16'd2939, 16'd3163, 16'd3343, 16'd3522, 16'd3612,
    16'd3745, 16'd3777, 16'd3832, 16'd3824, 16'd3750, 16'd3697, 16'd3547, 16'd3415, 16'd3235, 16'd3021,
    16'd2813, 16'd2556, 16'd2332, 16'd2092, 16'd1824, 16'd1628, 16'd1430, 16'd1208, 16'd1071, 16'd942};
  localparam sample_arr_t FRAME2 = '{
    16'd832, 16'd763, 16'd714, 16'd761, 16'd754, 16'd867, 16'd974, 16'd1129, 16'd1325, 16'd1510,
    16'd1726, 16'd1969, 16'd2167, 16'd2457, 16'd2659, 16'd2935, 16'd3132, 16'd3294, 16'd3492, 16'd3598,
    16'd3741, 16'd3794, 16'd3801, 16'd3864, 16'd3760, 16'd3704, 16'd3578, 16'd3417, 16'd3290, 16'd3036,
    16'd2841, 16'd2601, 16'd2346, 16'd2092, 16'd1916, 16'd1632, 16'd1443, 16'd1245, 16'd1104, 16'd920};
  localparam sample_arr_t FRAME3 = '{
    16'd841, 16'd766, 16'd725, 16'd738, 16'd807, 16'd891, 16'd998, 16'd1141, 16'd1333, 16'd1544,
    16'd1773, 16'd1995, 16'd2213, 16'd2462, 16'd2726, 16'd2950, 16'd3141, 16'd3317, 16'd3494, 16'd3638,
    16'd3739, 16'd3782, 16'd3816, 16'd3818, 16'd3761, 16'd3693, 16'd3558, 16'd3384, 16'd3218, 16'd3039,
    16'd2816, 16'd2568, 16'd2329, 16'd2072, 16'd1865, 16'd1630, 16'd1407, 16'd1214, 16'd1061, 16'd939};
  localparam sample_arr_t FRAME4 = '{
    16'd857, 16'd773, 16'd769, 16'd783, 16'd771, 16'd893, 16'd986, 16'd1162, 16'd1339, 16'd1478,
    16'd1746, 16'd1952, 16'd2212, 16'd2473, 16'd2640, 16'd2872, 16'd3119, 16'd3277, 16'd3501, 16'd3592,
    16'd3687, 16'd3760, 16'd3807, 16'd3829, 16'd3794, 16'd3680, 16'd3559, 16'd3418, 16'd3290, 16'd3071,
    16'd2821, 16'd2581, 16'd2377, 16'd2143, 16'd1911, 16'd1632, 16'd1448, 16'd1258, 16'd1119, 16'd988};

  function automatic sample_arr_t frame_by_id(input int id);
    case (id)
      1: return FRAME1;
      2: return FRAME2;
      3: return FRAME3;
      default: return FRAME4;
    endcase
  endfunction

  // Word w (0..45) of the SPI frame for sample set id.
  function automatic logic [15:0] frame_word(input int id, input int w,
                                             input int n = 40, input int beta = 260,
                                             input int fc = 50000, input int fs = 2000000);
    sample_arr_t s;
    s = frame_by_id(id);
    case (w)
      0: return 16'(n);
      1: return 16'(beta);
      2: return fc[15:0];
      3: return fc[31:16];
      4: return fs[15:0];
      5: return fs[31:16];
      default: return s[(w-6) % NS];
    endcase
  endfunction

  localparam real PI = 3.14159265358979323846;

  function automatic real p_const(input int n = 40, input int beta = 260);
    return 4.0 * $cos(PI * beta / 180.0) / (PI * n);
  endfunction
  function automatic real q_const(input int n = 40, input int beta = 260);
    return 4.0 * $sin(PI * beta / 180.0) / (PI * n);
  endfunction
  // PQ_phase for sample index i (0-based): P*sin(R*i) + Q*cos(R*i)
  function automatic real pq_ref(input int i, input int n = 40, input int beta = 260,
                                 input real fc = 50000.0, input real fs = 2000000.0);
    real r;
    r = 2.0 * PI * fc / fs;
    return p_const(n, beta) * $sin(r * i) + q_const(n, beta) * $cos(r * i);
  endfunction
  // The ACFM sum of sample set id.
  function automatic real acfm_ref(input int id);
    sample_arr_t s;
    real a;
    s = frame_by_id(id);
    a = 0.0;
    for (int i = 0; i < NS; i++) a += real'(s[i]) * pq_ref(i);
    return a;
  endfunction
endpackage

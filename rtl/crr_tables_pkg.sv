// crr_tables_pkg: constant tables of the PWE target recognition design.
//
// H_RE_TAB/H_IM_TAB hold the four stored complex target responses h0..h3, 31
// samples each. h0 is a measured 1.090 GHz, 14 MHz-wide band-pass filter
// brought to baseband and down-sampled to 31 samples; h1..h3 are synthetic
// responses. SE_RE_TAB/SE_IM_TAB hold the matching eigenwaveforms se0..se3
// (the dominant eigenvector of H^H H for each target, computed offline); the
// quadrature part of se1..se3 is zero. All values are the document's, written
// as reals and converted to Q15.16 (rounded) at elaboration by the *_q
// functions below, so the tables stay readable.
//
// SQRT_EX_TAB is the transmit amplitude sqrt(Ex) for the 15 energy levels of
// the Monte Carlo run, ks = 0..14, Ex = -30 dB + ks * 40/14 dB, i.e.
// round(65536 * 10^((-30 + ks*40/14)/20)). A table replaces a square-root
// unit here, as in the document.
package crr_tables_pkg;
  import crr_pkg::*;

  localparam real H_RE_TAB [N_HYP][N_TAPS] = '{
    '{
       0.0020,  0.0006,  0.0027,  0.1098,  0.2859, -0.0721, -0.4617, -0.5567,
      -0.3389, -0.0558,  0.2417,  0.5255,  0.6672,  0.6049,  0.4191,  0.1749,
      -0.1114, -0.3892, -0.5729, -0.6031, -0.4607, -0.1833,  0.1508,  0.3671,
       0.3037,  0.1125,  0.0146, -0.0085, -0.0099, -0.0069, -0.0043
    },
    '{
       0.0000,  0.0371,  0.0741,  0.1112,  0.1482,  0.1112,  0.0741,  0.0371,
       0.0000,  0.0000,  0.0000, -0.2965,  0.0000,  0.0000,  0.0000,  0.2224,
       0.4447,  0.2224,  0.0000,  0.0000,  0.0000, -0.0741, -0.1482, -0.0741,
       0.0000,  0.0000,  0.0000,  0.0000,  0.0000,  0.1482,  0.0000
    },
    '{
       0.0000,  0.0000, -0.0203, -0.1135, -0.2725, -0.3585, -0.2725, -0.1135,
      -0.0203,  0.0000,  0.0087,  0.0539,  0.1492,  0.2390,  0.2390,  0.1492,
       0.0539,  0.0087,  0.0000,  0.0000,  0.0000,  0.0000,  0.0000,  0.0000,
       0.0000,  0.0000,  0.0000, -0.0399, -0.1195, -0.1195, -0.0399
    },
    '{
       0.0000,  0.0000,  0.0000,  0.0000,  0.0000, -0.1379, -0.1444, -0.1466,
      -0.1444, -0.1379,  0.0000,  0.0000,  0.0000,  0.0000,  0.0000,  0.1379,
       0.1466,  0.1379,  0.0000,  0.0000,  0.0000, -0.1379, -0.1444, -0.1466,
      -0.1444, -0.1379,  0.0000,  0.0000,  0.2757,  0.2932,  0.2757
    }
  };

  localparam real H_IM_TAB [N_HYP][N_TAPS] = '{
    '{
       0.0115,  0.0142,  0.0502,  0.0744, -0.1496, -0.4514, -0.2633,  0.1626,
       0.4667,  0.5810,  0.5690,  0.3984,  0.0769, -0.2468, -0.4728, -0.6004,
      -0.6198, -0.4989, -0.2440,  0.0715,  0.3572,  0.5212,  0.4876,  0.2286,
      -0.0641, -0.1411, -0.0922, -0.0467, -0.0224, -0.0111, -0.0056
    },
    '{
       0.0000,  0.0371,  0.0741,  0.1112,  0.1482,  0.1112,  0.0741,  0.0371,
       0.0000,  0.0000,  0.0000, -0.2965,  0.0000,  0.0000,  0.0000,  0.2224,
       0.4447,  0.2224,  0.0000,  0.0000,  0.0000, -0.0741, -0.1482, -0.0741,
       0.0000,  0.0000,  0.0000,  0.0000,  0.0000,  0.1482,  0.0000
    },
    '{
       0.0000,  0.0000,  0.0203,  0.1135,  0.2725,  0.3585,  0.2725,  0.1135,
       0.0203,  0.0000, -0.0087, -0.0539, -0.1492, -0.2390, -0.2390, -0.1492,
      -0.0539, -0.0087,  0.0000,  0.0000,  0.0000,  0.0000,  0.0000,  0.0000,
       0.0000,  0.0000,  0.0000,  0.0399,  0.1195,  0.1195,  0.0399
    },
    '{
       0.0000,  0.0000,  0.0000,  0.0000,  0.0000, -0.1379, -0.1444, -0.1466,
      -0.1444, -0.1379,  0.0000,  0.0000,  0.0000,  0.0000,  0.0000,  0.1379,
       0.1466,  0.1379,  0.0000,  0.0000,  0.0000, -0.1379, -0.1444, -0.1466,
      -0.1444, -0.1379,  0.0000,  0.0000,  0.2757,  0.2932,  0.2757
    }
  };

  localparam real SE_RE_TAB [N_HYP][N_TAPS] = '{
    '{
       0.0495,  0.1011,  0.1292,  0.1191,  0.0679, -0.0130, -0.1005, -0.1667,
      -0.1877, -0.1528, -0.0685,  0.0420,  0.1456,  0.2095,  0.2124,  0.1522,
       0.0472, -0.0704, -0.1646, -0.2075, -0.1887, -0.1172, -0.0176,  0.0789,
       0.1441,  0.1618,  0.1318,  0.0686, -0.0048, -0.0651, -0.0962
    },
    '{
       0.1723,  0.1579,  0.0899, -0.0100, -0.1184, -0.2089, -0.2476, -0.2177,
      -0.1242,  0.0085,  0.1455,  0.2504,  0.2917,  0.2538,  0.1482,  0.0000,
      -0.1482, -0.2538, -0.2917, -0.2504, -0.1455, -0.0085,  0.1242,  0.2177,
       0.2476,  0.2089,  0.1184,  0.0100, -0.0899, -0.1579, -0.1723
    },
    '{
       0.0795,  0.1297,  0.1746,  0.2081,  0.2255,  0.2238,  0.2015,  0.1592,
       0.0998,  0.0284, -0.0482, -0.1229, -0.1888, -0.2402, -0.2727, -0.2839,
      -0.2727, -0.2402, -0.1888, -0.1229, -0.0482,  0.0284,  0.0998,  0.1592,
       0.2015,  0.2238,  0.2255,  0.2081,  0.1746,  0.1297,  0.0795
    },
    '{
       0.1872,  0.1978,  0.1673,  0.0971,  0.0016, -0.1024, -0.1915, -0.2480,
      -0.2595, -0.2230, -0.1444, -0.0387,  0.0761,  0.1802,  0.2521,  0.2776,
       0.2521,  0.1802,  0.0761, -0.0387, -0.1444, -0.2230, -0.2595, -0.2480,
      -0.1915, -0.1024,  0.0016,  0.0971,  0.1673,  0.1978,  0.1872
    }
  };

  localparam real SE_IM_TAB [N_HYP][N_TAPS] = '{
    '{
       0.0939,  0.0603, -0.0015, -0.0745, -0.1353, -0.1614, -0.1393, -0.0708,
       0.0268,  0.1249,  0.1923,  0.2057,  0.1576,  0.0603, -0.0576, -0.1598,
      -0.2149, -0.2063, -0.1378, -0.0319,  0.0778,  0.1587,  0.1888,  0.1630,
       0.0936,  0.0051, -0.0744, -0.1226, -0.1291, -0.0981, -0.0448
    },
    '{
       0.0000,  0.0000,  0.0000,  0.0000,  0.0000,  0.0000,  0.0000,  0.0000,
       0.0000,  0.0000,  0.0000,  0.0000,  0.0000,  0.0000,  0.0000,  0.0000,
       0.0000,  0.0000,  0.0000,  0.0000,  0.0000,  0.0000,  0.0000,  0.0000,
       0.0000,  0.0000,  0.0000,  0.0000,  0.0000,  0.0000,  0.0000
    },
    '{
       0.0000,  0.0000,  0.0000,  0.0000,  0.0000,  0.0000,  0.0000,  0.0000,
       0.0000,  0.0000,  0.0000,  0.0000,  0.0000,  0.0000,  0.0000,  0.0000,
       0.0000,  0.0000,  0.0000,  0.0000,  0.0000,  0.0000,  0.0000,  0.0000,
       0.0000,  0.0000,  0.0000,  0.0000,  0.0000,  0.0000,  0.0000
    },
    '{
       0.0000,  0.0000,  0.0000,  0.0000,  0.0000,  0.0000,  0.0000,  0.0000,
       0.0000,  0.0000,  0.0000,  0.0000,  0.0000,  0.0000,  0.0000,  0.0000,
       0.0000,  0.0000,  0.0000,  0.0000,  0.0000,  0.0000,  0.0000,  0.0000,
       0.0000,  0.0000,  0.0000,  0.0000,  0.0000,  0.0000,  0.0000
    }
  };

  localparam q16_t SQRT_EX_TAB [15] = '{
       2072,   2880,   4001,   5560,   7725,  10734,  14915,  20724,
      28796,  40012,  55597,  77252, 107341, 149150, 207243
  };

  function automatic q16_t h_re_q(input int hyp, input int n);
    return to_q(H_RE_TAB[hyp][n]);
  endfunction

  function automatic q16_t h_im_q(input int hyp, input int n);
    return to_q(H_IM_TAB[hyp][n]);
  endfunction

  function automatic q16_t se_re_q(input int hyp, input int n);
    return to_q(SE_RE_TAB[hyp][n]);
  endfunction

  function automatic q16_t se_im_q(input int hyp, input int n);
    return to_q(SE_IM_TAB[hyp][n]);
  endfunction

endpackage

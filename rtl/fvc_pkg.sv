// Shared types and constants of the FVC 2D forward transform (DCT-II, DCT-V,
// DCT-VIII, DST-I, DST-VII; 4x4 and 8x8 transform units).
//
// The 4-point matrices are the integer matrices of the FVC/JEM transform. The
// 8-point matrices are derived from the same basis functions with the same
// scaling rule, so that a 4-point row and an 8-point row share one scale:
//
//   C_N[i][j] = round( 256 * sqrt(N) * T_N(i, j) )     (round half away from 0)
//
//   DCT-II : T = w0 * sqrt(2/N) * cos(pi*i*(2j+1)/(2N)),          w0 = sqrt(1/2) for i=0
//   DCT-V  : T = w0 * w1 * sqrt(4/(2N-1)) * cos(2*pi*i*j/(2N-1)), w0 (i=0), w1 (j=0) = sqrt(1/2)
//   DCT-VIII: T = sqrt(4/(2N+1)) * cos(pi*(2i+1)*(2j+1)/(4N+2))
//   DST-I  : T = sqrt(2/(N+1)) * sin(pi*(i+1)*(j+1)/(N+1))
//   DST-VII: T = sqrt(4/(2N+1)) * sin(pi*(2i+1)*(j+1)/(2N+1))
//
// With N=4 this rule reproduces the published 4x4 integer matrices exactly.
// Row index i is the output frequency, column index j the input sample.
// Every coefficient fits in 10 bits signed (largest magnitude 374).
package fvc_pkg;

  // 1D transform type, the TR_Type_Vertical / TR_Type_Horizontal selects.
  typedef enum logic [2:0] {
    TR_DCT2 = 3'd0,
    TR_DCT5 = 3'd1,
    TR_DCT8 = 3'd2,
    TR_DST1 = 3'd3,
    TR_DST7 = 3'd4
  } tr_type_e;

  // TU size: two 4x4 TUs side by side, or one 8x8 TU.
  typedef enum logic {
    TU_4X4 = 1'b0,
    TU_8X8 = 1'b1
  } tu_size_e;

  // 2D datapath architecture.
  typedef enum logic [1:0] {
    ARCH_BASELINE = 2'd0,
    ARCH_RECONFIG = 2'd1,
    ARCH_DSP      = 2'd2
  } arch_e;

  localparam int COEF_W = 10;   // signed coefficient width

  typedef logic signed [COEF_W-1:0] coef_t;

  localparam int signed C8 [5][8][8] = '{
    // DCT2
    '{
      '{ 256,  256,  256,  256,  256,  256,  256,  256},
      '{ 355,  301,  201,   71,  -71, -201, -301, -355},
      '{ 334,  139, -139, -334, -334, -139,  139,  334},
      '{ 301,  -71, -355, -201,  201,  355,   71, -301},
      '{ 256, -256, -256,  256,  256, -256, -256,  256},
      '{ 201, -355,   71,  301, -301,  -71,  355, -201},
      '{ 139, -334,  334, -139, -139,  334, -334,  139},
      '{  71, -201,  301, -355,  355, -301,  201,  -71}
    },
    // DCT5
    '{
      '{ 187,  264,  264,  264,  264,  264,  264,  264},
      '{ 264,  342,  250,  116,  -39, -187, -303, -366},
      '{ 264,  250,  -39, -303, -366, -187,  116,  342},
      '{ 264,  116, -303, -303,  116,  374,  116, -303},
      '{ 264,  -39, -366,  116,  342, -187, -303,  250},
      '{ 264, -187, -187,  374, -187, -187,  374, -187},
      '{ 264, -303,  116,  116, -303,  374, -303,  116},
      '{ 264, -366,  342, -303,  250, -187,  116,  -39}
    },
    // DCT8
    '{
      '{ 350,  338,  314,  280,  237,  185,  127,   65},
      '{ 338,  237,   65, -127, -280, -350, -314, -185},
      '{ 314,   65, -237, -350, -185,  127,  338,  280},
      '{ 280, -127, -350,  -65,  314,  237, -185, -338},
      '{ 237, -280, -185,  314,  127, -338,  -65,  350},
      '{ 185, -350,  127,  237, -338,   65,  280, -314},
      '{ 127, -314,  338, -185,  -65,  280, -350,  237},
      '{  65, -185,  280, -338,  350, -314,  237, -127}
    },
    // DST1
    '{
      '{ 117,  219,  296,  336,  336,  296,  219,  117},
      '{ 219,  336,  296,  117, -117, -296, -336, -219},
      '{ 296,  296,    0, -296, -296,    0,  296,  296},
      '{ 336,  117, -296, -219,  219,  296, -117, -336},
      '{ 336, -117, -296,  219,  219, -296, -117,  336},
      '{ 296, -296,    0,  296, -296,    0,  296, -296},
      '{ 219, -336,  296, -117, -117,  296, -336,  219},
      '{ 117, -219,  296, -336,  336, -296,  219, -117}
    },
    // DST7
    '{
      '{  65,  127,  185,  237,  280,  314,  338,  350},
      '{ 185,  314,  350,  280,  127,  -65, -237, -338},
      '{ 280,  338,  127, -185, -350, -237,   65,  314},
      '{ 338,  185, -237, -314,   65,  350,  127, -280},
      '{ 350,  -65, -338,  127,  314, -185, -280,  237},
      '{ 314, -280,  -65,  338, -237, -127,  350, -185},
      '{ 237, -350,  280,  -65, -185,  338, -314,  127},
      '{ 127, -237,  314, -350,  338, -280,  185,  -65}
    }
  };

  localparam int signed C4 [5][4][4] = '{
    // DCT2
    '{
      '{ 256,  256,  256,  256},
      '{ 334,  139, -139, -334},
      '{ 256, -256, -256,  256},
      '{ 139, -334,  334, -139}
    },
    // DCT5
    '{
      '{ 194,  274,  274,  274},
      '{ 274,  241,  -86, -349},
      '{ 274,  -86, -349,  241},
      '{ 274, -349,  241,  -86}
    },
    // DCT8
    '{
      '{ 336,  296,  219,  117},
      '{ 296,    0, -296, -296},
      '{ 219, -296, -117,  336},
      '{ 117, -296,  336, -219}
    },
    // DST1
    '{
      '{ 190,  308,  308,  190},
      '{ 308,  190, -190, -308},
      '{ 308, -190, -190,  308},
      '{ 190, -308,  308, -190}
    },
    // DST7
    '{
      '{ 117,  219,  296,  336},
      '{ 296,  296,    0, -296},
      '{ 336, -117, -296,  219},
      '{ 219, -336,  296, -117}
    }
  };

  // Coefficient of row i, column j of the selected 1D matrix.
  function automatic coef_t coef(input tr_type_e t, input tu_size_e s, input int i, input int j);
    if (s == TU_8X8) return coef_t'(C8[int'(t)][i][j]);
    return coef_t'(C4[int'(t)][i%4][j%4]);
  endfunction

endpackage

// mms_pkg: types and constants shared by the modified min-sum (MMS) LDPC
// decoder. Extrinsic messages between variable and check nodes are 2 bits:
// bit 1 is the sign (1 = negative, i.e. the bit leans to 1) and bit 0 the
// magnitude (1 = strong, 0 = weak). This encoding is the one of the mapping
// g() and expansion f() that define the algorithm: 01 = strong +, 00 = weak +,
// 10 = weak -, 11 = strong -.
// The default parity-check matrix is the 6 x 12 regular example code with
// row weight 4 and column weight 2; row r lists columns 0..11 left to right.
package mms_pkg;

  typedef logic [1:0] msg_t;

  localparam int unsigned MSG_SIGN = 1;
  localparam int unsigned MSG_MAG  = 0;

  // Example code: 6 check nodes f0..f5, 12 variable nodes v0..v11.
  localparam int unsigned H_M  = 6;
  localparam int unsigned H_N  = 12;
  localparam int unsigned H_DC = 4;
  localparam int unsigned H_DV = 2;
  localparam logic [0:H_M-1][0:H_N-1] H_EXAMPLE = '{
    12'b1111_0000_0000,
    12'b0000_1011_1000,
    12'b1000_1100_0100,
    12'b0100_0110_0010,
    12'b0010_0001_0101,
    12'b0001_0000_1011
  };

  // Decoder phases driven by the controller.
  typedef enum logic [2:0] {
    ST_IDLE,
    ST_LOAD,
    ST_VN,
    ST_CN,
    ST_DONE
  } dec_state_t;

endpackage

// mumor_pkg: types, constants and small pure functions shared by the
// multi-mode (FDD / TDD / HSDPA) receiver hardware blocks.
//
// - mode_e selects the air-interface mode of the shared blocks.
// - ssc_z() returns the sign of the 256-chip sequence z that is common to
//   all secondary synchronisation codes, and hadamard16() the sign of the
//   16-point Hadamard row that distinguishes the codes. These follow the
//   UMTS synchronisation code construction; the reference study itself only states
//   that the S-SCH correlation runs in three stages with 16 codes.
// - A "sign bit" everywhere in this design means 0 -> +1 and 1 -> -1.
package mumor_pkg;

  typedef enum logic [1:0] {
    MODE_FDD   = 2'd0,
    MODE_TDD   = 2'd1,
    MODE_HSDPA = 2'd2
  } mode_e;

  // chips per slot and slots per frame of the 3.84 Mcps chip rate
  localparam int unsigned CHIPS_PER_SLOT  = 2560;
  localparam int unsigned SLOTS_PER_FRAME = 15;
  // length of the primary and secondary synchronisation codes in chips

  // x = <1,1,1,1,1,1,-1,-1,1,-1,1,-1,1,-1,-1,1> as sign bits, element 0 first
  localparam logic [15:0] SSC_X = 16'b0110_1010_1100_0000;
  // b-pattern of z = <b,b,b,-b,b,b,-b,-b,b,-b,b,-b,-b,-b,-b,-b>
  localparam logic [15:0] SSC_ZB = 16'b1111_1010_1100_1000;

  // sign bit of b(i) = <x1..x8, -x9..-x16>
  function automatic logic ssc_b(input logic [3:0] i);
    return SSC_X[i] ^ i[3];
  endfunction

  // sign bit of z(n), n = 0..255
  function automatic logic ssc_z(input logic [7:0] n);
    return ssc_b(n[3:0]) ^ SSC_ZB[n[7:4]];
  endfunction

  // sign bit of element m of Hadamard row k (Sylvester order, 16 x 16)
  function automatic logic hadamard16(input logic [3:0] k, input logic [3:0] m);
    return ^(k & m);
  endfunction

endpackage

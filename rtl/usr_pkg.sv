// usr_pkg -- mode encoding of the universal shift register.
//
// The two select lines {S1,S0} choose one of four modes, numbered as in the
// source's mode table: 00 locked (hold), 01 shift right, 10 shift left,
// 11 parallel load.
`timescale 1ps / 1ps
package usr_pkg;
  typedef enum logic [1:0] {
    USR_LOCKED      = 2'b00,
    USR_SHIFT_RIGHT = 2'b01,
    USR_SHIFT_LEFT  = 2'b10,
    USR_LOAD        = 2'b11
  } usr_mode_e;
endpackage

// svpwm_pkg: types shared by the space vector PWM controller.
//
// sector_e numbers the six 60-degree sectors of the voltage hexagon with the
// binary codes 1..6 (sector 1 spans 0..60 degrees, counting counter-clockwise
// from the phase-A axis). The codes follow the 3-bit sector encoding of the
// described controller; the value 0 is never produced.
package svpwm_pkg;

  typedef enum logic [2:0] {
    SECTOR_1 = 3'd1,
    SECTOR_2 = 3'd2,
    SECTOR_3 = 3'd3,
    SECTOR_4 = 3'd4,
    SECTOR_5 = 3'd5,
    SECTOR_6 = 3'd6
  } sector_e;

endpackage

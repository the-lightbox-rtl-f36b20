// lightbox_pkg: types and constants shared by the LightBox blocks.
//
// Key codes follow the 4x4 keypad of the user interface: the ten digits
// keep their value, the six control keys take 10..15. The cue type names the
// audio event that advances a light sequence: the lights either follow the
// band bits directly, or step on an edge of one band, on either edge of a
// band, on the slow clock, or on a hit followed by slow-clock steps.
package lightbox_pkg;

  typedef enum logic [3:0] {
    KEY_0 = 4'd0, KEY_1 = 4'd1, KEY_2 = 4'd2, KEY_3 = 4'd3, KEY_4 = 4'd4,
    KEY_5 = 4'd5, KEY_6 = 4'd6, KEY_7 = 4'd7, KEY_8 = 4'd8, KEY_9 = 4'd9,
    KEY_UP      = 4'd10,
    KEY_DOWN    = 4'd11,
    KEY_CANCEL  = 4'd12,
    KEY_CONFIRM = 4'd13,
    KEY_LEFT    = 4'd14,
    KEY_RIGHT   = 4'd15
  } key_e;

  typedef enum logic [2:0] {
    CUE_DIRECT  = 3'd0,  // lights are a function of the bands, no state
    CUE_RISE5   = 3'd1,  // step on a rising edge of band 5
    CUE_RISE2   = 3'd2,  // step on a rising edge of band 2
    CUE_RISE321 = 3'd3,  // step on a rising edge of any of bands 3..1
    CUE_BOTH5   = 3'd4,  // odd steps on a rise of band 5, even steps on its fall
    CUE_SLOW    = 3'd5,  // step on every slow-clock tick
    CUE_TIMED   = 3'd6   // leave rest (step 0) on a band-5 rise, then step on slow ticks
  } cue_e;

  localparam int unsigned STEP_W = 5;   // longest sequence has 32 steps

endpackage

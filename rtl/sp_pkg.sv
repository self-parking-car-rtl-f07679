// sp_pkg: types and constants shared by the self-parking car controller.
//
// Sensor channels are numbered in the order the four ADCs are read:
// 0 = front, 1 = right side front, 2 = right side back, 3 = back.
// A Sharp IR sensor's output voltage falls as distance grows, so a LARGE
// 8-bit reading means a NEAR obstacle. The two zone thresholds (0xA0 and
// 0x54) and the state numbering shown on the LEDs follow the original
// design; the enum for the zones and the struct for the four wheel duty
// cycles are this implementation's packaging.
package sp_pkg;

  localparam int NUM_SENSORS = 4;
  localparam int SENS_FRONT  = 0;
  localparam int SENS_SIDE1  = 1;   // side sensor near the front of the car
  localparam int SENS_SIDE2  = 2;   // side sensor near the back of the car
  localparam int SENS_BACK   = 3;

  typedef logic [7:0]                   reading_t;
  typedef reading_t [NUM_SENSORS-1:0]   sensor_bus_t;

  // Distance zones. Readings at or above T_CLOSE are close, readings at or
  // above T_MEDIUM are medium, anything lower is far.
  localparam reading_t T_CLOSE  = 8'hA0;
  localparam reading_t T_MEDIUM = 8'h54;

  typedef enum logic [1:0] {
    ZONE_CLOSE  = 2'd0,
    ZONE_MEDIUM = 2'd1,
    ZONE_FAR    = 2'd2
  } zone_e;

  function automatic zone_e classify(reading_t r);
    if (r >= T_CLOSE)       return ZONE_CLOSE;
    else if (r >= T_MEDIUM) return ZONE_MEDIUM;
    else                    return ZONE_FAR;
  endfunction

  // Duty cycle in tenths: 0 = off, 10 = always on.
  localparam int DUTY_MAX = 10;
  typedef logic [3:0] duty_t;

  // The back wheels are wired to drive the car forward, the front wheels to
  // drive it in reverse; each wheel has its own PWM channel.
  typedef struct packed {
    duty_t bl;   // back left,  forward
    duty_t br;   // back right, forward
    duty_t fl;   // front left, reverse
    duty_t fr;   // front right, reverse
  } wheel_duty_t;

  localparam wheel_duty_t DUTY_STOP = '{bl: 4'd0, br: 4'd0, fl: 4'd0, fr: 4'd0};

  // Parking steps. The values are what the LEDs show.
  typedef enum logic [3:0] {
    ST_START     = 4'd0,
    ST_MIDDLE    = 4'd1,
    ST_BACKUP    = 4'd2,
    ST_TURNIN    = 4'd3,
    ST_BACKIN    = 4'd4,
    ST_STRAIGHT  = 4'd6,
    ST_END       = 4'd8,
    ST_PRESTART1 = 4'd9,
    ST_PRESTART2 = 4'd10,
    ST_WAIT      = 4'd15
  } park_state_e;

endpackage

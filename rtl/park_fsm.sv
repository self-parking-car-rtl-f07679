// park_fsm: the parallel-parking controller.
//
// Ten states, each one step of how a driver parallel parks (values are
// what the LEDs show):
//   WAIT      after reset, wait STARTUP_CYCLES (1 s) and at least one
//             sensor round so the filters have settled.
//   PRESTART1 drive forward, angled toward the row of parked cars, until
//             the front side sensor reads at least PRESTART_NEAR.
//   PRESTART2 turn left until the two side readings agree (within
//             PRESTART_TOL): the car is parallel to the row.
//   START     drive forward until both side sensors read far: a gap as long
//             as the car. One side far alone is a gap too short to use.
//   MIDDLE    drive forward until both sides are no longer far: the car is
//             beside the car in front of the gap.
//   BACKUP    reverse straight until the back sensor has read far for
//             BACKUP_CYCLES (0.1 s); then remember the front side reading
//             less TURNIN_OFFSET as the turn-in target.
//   TURNIN    reverse with the left side faster, swinging the tail in,
//             until the front side reading has fallen to the target.
//   BACKIN    reverse with the right side faster, straightening out, until
//             the back reading reaches BACK_CLOSE.
//   STRAIGHT  wiggle forward, turning toward whichever side reads farther,
//             until the side readings agree within STRAIGHT_TOL.
//   END       creep forward until the front sensor reads close, then stop.
// The steps and thresholds follow the original design, as do the duty
// cycles. This implementation's choices: the "close" of MIDDLE means "not
// far" (medium or close zone), the turn-in target saturates at zero, and
// the duty cycles in END are the plain forward values.
//
// Interface: `clean` are the filtered readings, `reading_ready` their
// update strobe. `duty` and `state` are registered and change on the clock
// edge after the input that caused them.
module park_fsm
  import sp_pkg::*;
#(
  parameter int unsigned STARTUP_CYCLES = 50_000_000,  // 1 s at 50 MHz
  parameter int unsigned BACKUP_CYCLES  = 5_000_000,   // 0.1 s at 50 MHz
  parameter reading_t    PRESTART_NEAR  = 8'h50,
  parameter reading_t    PRESTART_TOL   = 8'h00,
  parameter reading_t    TURNIN_OFFSET  = 8'd28,
  parameter reading_t    BACK_CLOSE     = 8'h60,
  parameter reading_t    STRAIGHT_TOL   = 8'h04
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        reading_ready,
  input  sensor_bus_t clean,
  output wheel_duty_t duty,
  output park_state_e state
);

  localparam int unsigned TMAX = (STARTUP_CYCLES > BACKUP_CYCLES) ? STARTUP_CYCLES : BACKUP_CYCLES;
  localparam int unsigned TW   = $clog2(TMAX + 1);

  // Forward on the back wheels, reverse on the front wheels.
  localparam wheel_duty_t D_FORWARD   = '{bl: 4'd7,  br: 4'd7,  fl: 4'd0,  fr: 4'd0};
  localparam wheel_duty_t D_LEFT      = '{bl: 4'd1,  br: 4'd10, fl: 4'd0,  fr: 4'd0};
  localparam wheel_duty_t D_REVERSE   = '{bl: 4'd0,  br: 4'd0,  fl: 4'd10, fr: 4'd10};
  localparam wheel_duty_t D_TURNIN    = '{bl: 4'd0,  br: 4'd1,  fl: 4'd10, fr: 4'd2};
  localparam wheel_duty_t D_BACKIN    = '{bl: 4'd0,  br: 4'd0,  fl: 4'd2,  fr: 4'd10};
  localparam wheel_duty_t D_WIGGLE_L  = '{bl: 4'd1,  br: 4'd10, fl: 4'd1,  fr: 4'd0};
  localparam wheel_duty_t D_WIGGLE_R  = '{bl: 4'd10, br: 4'd1,  fl: 4'd0,  fr: 4'd1};

  logic [TW-1:0] timer;
  logic          seen_reading;
  reading_t      target;        // front side reading at which turn-in ends

  reading_t f, s1, s2, b;
  zone_e    zf, zs1, zs2, zb;
  reading_t side_diff;

  assign f   = clean[SENS_FRONT];
  assign s1  = clean[SENS_SIDE1];
  assign s2  = clean[SENS_SIDE2];
  assign b   = clean[SENS_BACK];
  assign zf  = classify(f);
  assign zs1 = classify(s1);
  assign zs2 = classify(s2);
  assign zb  = classify(b);
  assign side_diff = (s1 > s2) ? s1 - s2 : s2 - s1;

  always_ff @(posedge clk) begin
    if (rst) begin
      state        <= ST_WAIT;
      duty         <= DUTY_STOP;
      timer        <= '0;
      seen_reading <= 1'b0;
      target       <= '0;
    end else begin
      unique case (state)
        ST_WAIT: begin
          duty <= DUTY_STOP;
          if (reading_ready) seen_reading <= 1'b1;
          if (timer >= TW'(STARTUP_CYCLES - 1)) begin
            if (seen_reading) begin
              state <= ST_PRESTART1;
              timer <= '0;
            end
          end else begin
            timer <= timer + 1'b1;
          end
        end

        ST_PRESTART1: begin
          duty <= D_FORWARD;
          if (s1 >= PRESTART_NEAR) state <= ST_PRESTART2;
        end

        ST_PRESTART2: begin
          duty <= D_LEFT;
          if (side_diff <= PRESTART_TOL) state <= ST_START;
        end

        ST_START: begin
          duty <= D_FORWARD;
          if (zs1 == ZONE_FAR && zs2 == ZONE_FAR) state <= ST_MIDDLE;
        end

        ST_MIDDLE: begin
          duty <= D_FORWARD;
          if (zs1 != ZONE_FAR && zs2 != ZONE_FAR) begin
            state <= ST_BACKUP;
            timer <= '0;
          end
        end

        ST_BACKUP: begin
          duty <= D_REVERSE;
          if (zb != ZONE_FAR) begin
            timer <= '0;
          end else if (timer >= TW'(BACKUP_CYCLES - 1)) begin
            timer  <= '0;
            target <= (s1 > TURNIN_OFFSET) ? s1 - TURNIN_OFFSET : '0;
            state  <= ST_TURNIN;
          end else begin
            timer <= timer + 1'b1;
          end
        end

        ST_TURNIN: begin
          if (s1 > target) begin
            duty <= D_TURNIN;
          end else begin
            duty  <= DUTY_STOP;
            state <= ST_BACKIN;
          end
        end

        ST_BACKIN: begin
          if (b < BACK_CLOSE) begin
            duty <= D_BACKIN;
          end else begin
            duty  <= DUTY_STOP;
            state <= ST_STRAIGHT;
          end
        end

        ST_STRAIGHT: begin
          if (side_diff <= STRAIGHT_TOL) begin
            duty  <= DUTY_STOP;
            state <= ST_END;
          end else if (s1 > s2) begin
            duty <= D_WIGGLE_L;   // nose nearer the curb: turn away from it
          end else begin
            duty <= D_WIGGLE_R;
          end
        end

        ST_END: begin
          duty <= (zf == ZONE_CLOSE) ? DUTY_STOP : D_FORWARD;
        end

        default: begin
          duty  <= DUTY_STOP;
          state <= ST_WAIT;
          timer <= '0;
        end
      endcase
    end
  end

  // Every wheel command is a valid duty cycle.
  assert property (@(posedge clk) disable iff (rst)
    duty.bl <= duty_t'(DUTY_MAX) && duty.br <= duty_t'(DUTY_MAX) &&
    duty.fl <= duty_t'(DUTY_MAX) && duty.fr <= duty_t'(DUTY_MAX));

endmodule

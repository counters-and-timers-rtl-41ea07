// alarm_logic: drives the alarm LED of the kitchen timer.
//
// Purely combinational: the alarm is on while the timer is running and no
// time is left. Pressing run/stop then stops the timer and turns the alarm
// off. This follows the lab description.
module alarm_logic #(
  parameter int unsigned SW = kt_pkg::SECONDS_W
) (
  input  logic          run,
  input  logic [SW-1:0] seconds,
  output logic          alarm
);

  assign alarm = run && (seconds == '0);

endmodule

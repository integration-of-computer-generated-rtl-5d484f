// Behavioural model of the RGB input interface (analog comparators).
//
// This is not synthesizable logic: it models the four fast voltage comparators
// that sit between the PRO-350 RGB outputs and the TTL logic. Each colour
// input (volts, 75 ohm terminated outside this model) is compared with a
// 0.4 V reference: above it the colour bit is 1, otherwise 0, which limits the
// picture to eight colours. The green line also carries composite sync;
// an inverting comparator with a 0.0 V reference outputs csync = 1 whenever
// green is at or below 0.0 V (blanking is 0.0 V, sync tip -0.3 V).
// Thresholds and polarities follow the design description. The comparators'
// propagation delay (about 15 ns) is not modelled: outputs follow at once.
//
// Interface: real-valued voltages in, rgb bits and csync out, continuously.
module input_interface #(
  parameter real COLOR_VREF = 0.4,
  parameter real SYNC_VREF  = 0.0
) (
  input  real  red_v,
  input  real  green_v,
  input  real  blue_v,
  output logic red,
  output logic green,
  output logic blue,
  output logic csync
);
  assign red   = (red_v   > COLOR_VREF);
  assign green = (green_v > COLOR_VREF);
  assign blue  = (blue_v  > COLOR_VREF);
  assign csync = (green_v <= SYNC_VREF);
endmodule

// deadlock_detect: marks a header flit as deadlocked once the global time
// has reached the time-to-live stamp carried in the header.
//
// The timers are TW bits wide and wrap around. The top bit of each timer is
// treated as an epoch bit and compared separately from the remaining TW-1
// bits: the flit is deadlocked when it is a header, both epoch bits are equal
// and the lower bits of the global timer are at or above those of the stamp.
// A stamp set past a rollover of the global timer therefore does not fire
// until the global timer has rolled over too, provided the time-to-live
// window is shorter than half the timer range. The split into one epoch bit
// and a magnitude compare of the other bits follows the published logic; the
// bit order (epoch bit as the most significant bit) is this design's choice.
// Purely combinational.
module deadlock_detect #(
  parameter int unsigned TW = noc_pkg::TW
) (
  input  logic          header_flit,
  input  logic [TW-1:0] global_timer,
  input  logic [TW-1:0] flit_timer,
  output logic          deadlocked
);
  logic same_epoch, reached;

  always_comb begin
    same_epoch = (global_timer[TW-1] == flit_timer[TW-1]);
    reached    = (global_timer[TW-2:0] >= flit_timer[TW-2:0]);
    deadlocked = header_flit && same_epoch && reached;
  end
endmodule

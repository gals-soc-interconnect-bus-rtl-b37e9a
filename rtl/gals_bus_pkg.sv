// gals_bus_pkg: types and constants shared by every block of the GALS SoC bus.
//
// The bus carries 8-bit resource identifiers and data on one shared byte
// line. Identifier 00h is reserved: the arbiter sends it to close a burst of
// transmissions and stop the bus clock, so at most 255 resources can be
// addressed. bus_t bundles the shared lines other than the bus clock, after
// they have been resolved (see gals_bus_lines):
//   arbiter_ctrl : high while the arbiter owns the bus (grant or idle byte)
//   data         : the byte on the line
//   last_byte    : the sender marks its last byte with it (active high)
//   ready        : receivers pull it low to accept a frame; it reads high
//                  when the receiver is busy, asleep or absent
// The widths and 00h follow the bus description; the struct, the active-low
// acceptance and the two-state resolution are this implementation's choices.
package gals_bus_pkg;

  localparam int unsigned ID_W          = 8;
  localparam int unsigned MAX_RESOURCES = 255;
  localparam logic [7:0]  IDLE_ID       = 8'h00;

  typedef struct packed {
    logic       arbiter_ctrl;
    logic [7:0] data;
    logic       last_byte;
    logic       ready;
  } bus_t;

  // Position of a receiver / the scheduler inside a frame, counted in rising
  // bus_clk edges after the arbiter's grant byte:
  //   F_IDLE  no frame, or the frame is not of interest
  //   F_GAP   grant sampled; the sender starts driving on the next edge
  //   F_DEST  the next edge samples the destination byte
  //   F_BODY  the next edges sample the remaining bytes
  typedef enum logic [1:0] {F_IDLE, F_GAP, F_DEST, F_BODY} frame_pos_e;

endpackage

// pcs_pkg: types and constants shared by the three controller layers.
//
// The fiber links carry 11-bit frames (start 0, 8 data bits sent MSB first,
// odd parity, stop 1), grouped in packets of N data frames and one CRC check
// frame. The frame format and packet shape follow the published protocol; the
// bit order, odd parity, CRC-8 polynomial 0x07 and the byte layouts of the
// command and status frames are this design's own choices.
//
// Timing reference: a 120 MHz clock, 8 clocks per bit (15 Mbit/s), so a
// 15-frame packet lasts 11 us and the 1596-clock packet cycle is 13.3 us.
package pcs_pkg;

  localparam int unsigned FRAME_BITS = 11;
  localparam logic [7:0]  CRC_POLY   = 8'h07;
  localparam logic [7:0]  CRC_INIT   = 8'h00;

  // Command byte: one per sub controller, master -> valve -> sub.
  typedef struct packed {
    logic [3:0] reserved;
    logic       fault_reset;  // clear latched faults
    logic       run;          // gates allowed
    logic       leg_b;        // right leg upper switch S11 (S12 complementary)
    logic       leg_a;        // left leg upper switch S9 (S10 complementary)
  } cmd_t;

  // Status byte: one per sub controller, sub -> valve -> master.
  typedef struct packed {
    logic [2:0] reserved;
    logic       running;
    logic       link_lost;
    logic       over_voltage;
    logic       over_current;
    logic       fault;
  } status_t;

  // Odd parity bit for a data byte: ones(data) + parity is odd.
  function automatic logic odd_parity(input logic [7:0] d);
    return ~(^d);
  endfunction

  // One byte step of CRC-8 (poly CRC_POLY, MSB first, no reflection).
  function automatic logic [7:0] crc8_step(input logic [7:0] crc, input logic [7:0] d);
    logic [7:0] c;
    c = crc ^ d;
    for (int i = 0; i < 8; i++) c = c[7] ? ((c << 1) ^ CRC_POLY) : (c << 1);
    return c;
  endfunction

endpackage

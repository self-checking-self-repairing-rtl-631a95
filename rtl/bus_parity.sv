// Parity generation and check for the external bus (parOUT and parIN).
//
// The external bus is 33 bits wide: every address or data word the chip
// drives carries a parity bit produced by an XOR tree over busOUT, and every
// word read from memory must carry a parity bit, checked by a second tree on
// busIN. Even parity is used (the 33 bits XOR to zero); the parity sense is
// this design's choice. inv_in inverts the received parity bit before the
// check: it lets the load-with-bad-parity diagnostic instructions force a
// busIN parity error. Purely combinational.
module bus_parity #(
  parameter int W = 32
) (
  input  logic [W-1:0] out_data,
  output logic [W:0]   out_bus,
  input  logic [W:0]   in_bus,
  input  logic         in_check,
  input  logic         inv_in,
  output logic         in_err
);

  assign out_bus = {^out_data, out_data};
  assign in_err  = in_check && ((^in_bus) ^ inv_in);

endmodule

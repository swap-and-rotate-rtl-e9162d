// present_sbox: the single 4-bit S-box of the PRESENT core, forward or inverse.
//
// Purely combinational. `dec` = 0 gives the PRESENT S-box, `dec` = 1 its inverse.
// The core shares this one instance between the state pipeline (one nibble every
// four cycles) and the key pipeline (one nibble per round), at cycles that never
// coincide, so no second S-box is needed.
// The tables are those of the PRESENT cipher; sharing one instance between state
// and key is this design's own choice.
module present_sbox
  import present_pkg::*;
(
  input  logic       dec,
  input  logic [3:0] din,
  output logic [3:0] dout
);
  always_comb dout = dec ? inv_sbox(din) : sbox(din);
endmodule

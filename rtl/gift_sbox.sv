// gift_sbox: the 4-bit GIFT S-box (dec = 0) or its inverse (dec = 1),
// combinational. The core uses it once every four cycles: in encryption on the
// nibble that has just entered the state ring, in decryption on the nibble that
// is about to leave it. One shared table pair, selected by mode, is this design's
// choice; the tables are those of the GIFT cipher.
module gift_sbox
  import gift_pkg::*;
(
  input  logic       dec,
  input  logic [3:0] din,
  output logic [3:0] dout
);
  always_comb dout = dec ? gift_inv_sbox(din) : gift_sbox(din);
endmodule

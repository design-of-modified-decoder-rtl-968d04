// modified_decoder: w-to-2^w decoder with an enable, driving the word lines of
// the logic module's cells.
//
// The low-order w bits of the monitored vector select one word line; the
// comparator output enables the decoder, so a word line rises only for a
// vector that lies in the current window. With the enable low all word lines
// are low. The document names the decoder and says the comparator enables it;
// the one-hot encoding is this design's choice. Purely combinational.
module modified_decoder #(
  parameter int unsigned W_BITS = cbist_pkg::W_BITS
) (
  input  logic                 en,    // comparator match
  input  logic [W_BITS-1:0]    addr,  // low-order w bits of the vector
  output logic [2**W_BITS-1:0] wl     // one-hot word lines
);

  always_comb begin
    wl = '0;
    if (en) wl[addr] = 1'b1;
  end

  // At most one word line, and none without the enable.
  always_comb begin
    assert ($onehot0(wl)) else $error("modified_decoder: more than one word line");
    assert (en || wl == '0) else $error("modified_decoder: word line while disabled");
  end

endmodule

// decoder_3x8: IN_W-to-2**IN_W line decoder (3-to-8 by default).
//
// Combinational. Output bit n is 1 exactly when sel == n, so 000 gives
// 00000001 and 111 gives 10000000. In the generator it turns each Gray
// counter state into a one-hot word that Register B captures.
//
// Interface: sel (IN_W bits), onehot (2**IN_W bits). No enable and no clock.
module decoder_3x8 #(
  parameter int unsigned IN_W = 3
) (
  input  logic [IN_W-1:0]      sel,
  output logic [(1<<IN_W)-1:0] onehot
);
  always_comb begin
    for (int unsigned n = 0; n < (1 << IN_W); n++)
      onehot[n] = (sel == IN_W'(n));
  end
endmodule

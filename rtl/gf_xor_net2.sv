// gf_xor_net2: "XOR network 2" of the k x m multiplier.
//
// For every bit position n of the result, a binary XOR tree adds the k
// partial-product bits pp[0][n] .. pp[k-1][n]: m trees of k inputs each,
// (k-1)*m two-input XOR gates. The tree is built as a balanced reduction
// (depth ceil(log2 k)) by recursive halving of the input list.
//
// Ports: pp (k x m), y (m bits). Combinational.
module gf_xor_net2 #(
  parameter int unsigned M = gf_pkg::M_DEFAULT,
  parameter int unsigned K = gf_pkg::K_DEFAULT
) (
  input  logic [K-1:0][M-1:0] pp,
  output logic [M-1:0]        y
);

  // Level 0 holds the k inputs; each level XORs neighbouring pairs and passes
  // an odd one through, until one word is left.
  localparam int unsigned LEVELS = (K > 1) ? $clog2(K) : 0;

  // width (in words) of each level
  function automatic int unsigned level_words(int unsigned lvl);
    int unsigned w = K;
    for (int unsigned l = 0; l < lvl; l++) w = (w + 1) / 2;
    return w;
  endfunction

  logic [LEVELS:0][K-1:0][M-1:0] lv;

  always_comb begin
    lv = '0;
    lv[0] = pp;
    for (int unsigned l = 1; l <= LEVELS; l++) begin
      for (int unsigned w = 0; w < level_words(l); w++) begin
        if (2*w + 1 < level_words(l-1)) lv[l][w] = lv[l-1][2*w] ^ lv[l-1][2*w+1];
        else                            lv[l][w] = lv[l-1][2*w];
      end
    end
    y = lv[LEVELS][0];
  end

endmodule

// polybinn_model_pkg: the trained decision-tree model of POLYBiNN and
// POLYCiNN, as constant functions read at elaboration.
//
// A trained model gives, for every tree (window w, class m, tree n): the
// six binary features the tree tests, its 64-entry truth table (the sum of
// products of its active leaves, one LUT), and its AdaBoost confidence
// c_nm in [0,1) as an 8-bit fraction. The trained values are not part of
// this RTL: the functions below return a fixed pseudo-random placeholder
// model (a 32-bit integer hash of the indices) so that the hardware can be
// built and tested. To deploy a trained model, replace the bodies of these
// functions (or generate them from the training output).
package polybinn_model_pkg;
  localparam int K = 6;   // inputs per tree: one 6-input LUT

  function automatic int unsigned mix(int unsigned a, int unsigned b);
    int unsigned h;
    h = a * 32'h9E37_79B1 ^ (b + 32'h7F4A_7C15 + (a << 6) + (a >> 2));
    h = h ^ (h >> 15);
    h = h * 32'h2C1B_3C6D;
    h = h ^ (h >> 12);
    h = h * 32'h297A_2D39;
    h = h ^ (h >> 15);
    return h;
  endfunction

  function automatic int unsigned tree_id(int w, int m, int n);
    return mix(mix(mix(32'd1, 32'(w)), 32'(m)), 32'(n));
  endfunction

  // Index of the k-th binary feature tested by tree (w, m, n).
  function automatic int tree_feature(int w, int m, int n, int k, int n_feat);
    return int'(mix(tree_id(w, m, n), 32'(k) + 32'd100) % 32'(n_feat));
  endfunction

  // Truth table: bit j is the tree output when {f5..f0} = j.
  function automatic logic [63:0] tree_lut(int w, int m, int n);
    return {mix(tree_id(w, m, n), 32'd7), mix(tree_id(w, m, n), 32'd8)};
  endfunction

  // Confidence c_nm as an 8-bit fraction, kept in 16..255 so no tree is
  // without a vote.
  function automatic logic [7:0] tree_conf(int w, int m, int n);
    return 8'(16 + mix(tree_id(w, m, n), 32'd9) % 240);
  endfunction

  // Learned binarization threshold of feature i of window w (POLYCiNN),
  // in 1..max_val.
  function automatic int feature_threshold(int w, int i, int max_val);
    return 1 + int'(mix(mix(32'd2, 32'(w)), 32'(i)) % 32'(max_val));
  endfunction
endpackage

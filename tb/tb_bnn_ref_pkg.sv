// tb_bnn_ref_pkg: reference model of the three-input Boolean neural network
// for the testbenches, written independently of the RTL tables.
//
// The hidden truth table and the weight matrix are kept as tables, one row
// per input combination and one row per hidden neuron, and evaluated
// directly: k_i(x) is looked up by row, y_j is the OR of the k_i whose weight
// in column j is 1.
package tb_bnn_ref_pkg;

  // Row r = (x1 x2 x3) as a 3-digit binary number; string "k1k2k3k4".
  localparam string K_ROW [8] = '{"0010", "1010", "0001", "1000",
                                  "0100", "1001", "1000", "0001"};

  // Weight rows k1..k4, columns y0..y9.
  localparam string W_ROW [4] = '{"1101011000",
                                  "0100101110",
                                  "0011001110",
                                  "0010110011"};

  // k_i (i = 1..4) for inputs x1, x2, x3.
  function automatic bit ref_k(int i, bit x1, bit x2, bit x3);
    int r = 4 * x1 + 2 * x2 + x3;
    return K_ROW[r][i-1] == "1";
  endfunction

  // y_j (j = 0..9) for hidden values k1..k4 (k[0] = k1).
  function automatic bit ref_y_of_k(int j, bit [3:0] k);
    bit y = 0;
    for (int i = 0; i < 4; i++) begin
      if (W_ROW[i][j] == "1" && k[i]) y = 1;
    end
    return y;
  endfunction

  // Hidden vector for the x vector x[0] = x1, x[1] = x2, x[2] = x3.
  function automatic bit [3:0] ref_kvec(bit [2:0] x);
    bit [3:0] k;
    for (int i = 1; i <= 4; i++) k[i-1] = ref_k(i, x[0], x[1], x[2]);
    return k;
  endfunction

  function automatic bit [9:0] ref_yvec(bit [2:0] x);
    bit [9:0] y;
    bit [3:0] k = ref_kvec(x);
    for (int j = 0; j < 10; j++) y[j] = ref_y_of_k(j, k);
    return y;
  endfunction

endpackage

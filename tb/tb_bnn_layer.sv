// tb_bnn_layer: exhaustive check of the hidden layer (default parameters) for
// all eight input combinations and of the output layer (four inputs, ten
// disjunction neurons) for all sixteen hidden vectors, against the reference
// tables of tb_bnn_ref_pkg.
module tb_bnn_layer;
  import bnn_pkg::*;
  import tb_bnn_ref_pkg::*;

  int checks = 0, failures = 0;

  logic [2:0] x;
  logic [3:0] k;
  logic [3:0] k_in;
  logic [9:0] y;

  bnn_layer u_hidden (.x(x), .y(k));
  bnn_layer #(.NIN(4), .NOUT(10), .INIT(Y_INIT)) u_output (.x(k_in), .y(y));

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 8; n++) begin
      x = 3'(n);
      #1;
      checks++;
      if (k !== ref_kvec(x)) begin
        failures++;
        $display("FAIL hidden x=%b: k=%b expected %b", x, k, ref_kvec(x));
      end
    end
    for (int n = 0; n < 16; n++) begin
      bit [9:0] exp;
      k_in = 4'(n);
      for (int j = 0; j < 10; j++) exp[j] = ref_y_of_k(j, k_in);
      #1;
      checks++;
      if (y !== exp) begin
        failures++;
        $display("FAIL output k=%b: y=%b expected %b", k_in, y, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

// tb_bnn_neuron: exhaustive check of the lookup-table neuron.
//
// Three instances: the default four-input disjunction, a three-input neuron
// loaded with INIT 0x98 whose outputs are compared with the Karnaugh map of
// that table (ones at I0 I1 I2 = 001, 111, 110, with x = {I2, I1, I0}), and a
// six-input neuron with a pseudo-random table.
module tb_bnn_neuron;

  int checks = 0, failures = 0;

  logic [3:0] x4;
  logic       y_or;
  logic [2:0] x3;
  logic       y_98;
  logic [5:0] x6;
  logic       y_6;

  localparam logic [63:0] INIT6 = 64'hC3A5_1F0E_9B27_6D48;

  bnn_neuron u_or (.x(x4), .y(y_or));
  bnn_neuron #(.NIN(3), .INIT(8'h98)) u_98 (.x(x3), .y(y_98));
  bnn_neuron #(.NIN(6), .INIT(INIT6)) u_6 (.x(x6), .y(y_6));

  task automatic check(string what, bit got, bit exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0b expected %0b", what, got, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 16; n++) begin
      x4 = 4'(n);
      #1;
      check($sformatf("or x=%0d", n), y_or, x4[0] | x4[1] | x4[2] | x4[3]);
    end
    for (int n = 0; n < 8; n++) begin
      bit i0, i1, i2, kmap;
      x3 = 3'(n);
      i0 = x3[0]; i1 = x3[1]; i2 = x3[2];
      // Karnaugh map: row I0, columns I1 I2 = 00 01 11 10
      kmap = (!i0 && !i1 &&  i2) || (i0 && i1 && i2) || (i0 && i1 && !i2);
      #1;
      check($sformatf("lut3_98 x=%0d", n), y_98, kmap);
    end
    for (int n = 0; n < 64; n++) begin
      x6 = 6'(n);
      #1;
      check($sformatf("nin6 x=%0d", n), y_6, INIT6[n]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

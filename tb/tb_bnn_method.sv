// tb_bnn_method: calls the k4() method (default parameters) for every input
// combination and the y6() method for every hidden vector. Each call pulses go
// for one cycle; the testbench checks that done comes exactly two cycles after
// go was sampled, lasts one cycle, that busy covers the call, that the return
// value matches the reference, that it holds after the call, and that a go
// during a call is ignored.
module tb_bnn_method;
  import bnn_pkg::*;
  import tb_bnn_ref_pkg::*;

  int checks = 0, failures = 0;
  int ignored_go = 0;

  logic       clk = 0, rst_n = 0;
  logic       go_k, go_y;
  logic [2:0] x;
  logic [3:0] k;
  logic       busy_k, done_k, ret_k;
  logic       busy_y, done_y, ret_y;

  always #5 clk = ~clk;

  bnn_method u_k4 (.clk(clk), .rst_n(rst_n), .go(go_k), .operands(x),
                   .busy(busy_k), .done(done_k), .return_value(ret_k));
  bnn_method #(.NIN(4), .INIT(Y_INIT[6])) u_y6 (
    .clk(clk), .rst_n(rst_n), .go(go_y), .operands(k),
    .busy(busy_y), .done(done_y), .return_value(ret_y));

  task automatic check(string what, bit ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  // Calls the method selected by sel (0: k4, 1: y6) and returns latency.
  task automatic call(bit sel, bit extra_go, output int lat, output bit ret);
    lat = 0;
    @(negedge clk);
    if (sel) go_y = 1; else go_k = 1;
    @(negedge clk);
    go_k = 0; go_y = 0;
    lat = 1;
    check("busy after go", sel ? busy_y : busy_k);
    if (extra_go) begin
      if (sel) go_y = 1; else go_k = 1;
    end
    while (!(sel ? done_y : done_k) && lat < 20) begin
      @(negedge clk);
      go_k = 0; go_y = 0;
      lat++;
    end
    ret = sel ? ret_y : ret_k;
    @(negedge clk);
    check("done lasts one cycle", !(sel ? done_y : done_k));
    check("idle after done", !(sel ? busy_y : busy_k));
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int lat;
    bit ret;
    go_k = 0; go_y = 0; x = '0; k = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    check("reset return value", ret_k == 0 && ret_y == 0 && !busy_k && !busy_y);
    for (int n = 0; n < 8; n++) begin
      x = 3'(n);
      call(0, n == 3, lat, ret);
      check($sformatf("k4 x=%b latency %0d", x, lat), lat == 2);
      check($sformatf("k4 x=%b ret %0b", x, ret), ret == ref_k(4, x[0], x[1], x[2]));
      if (n == 3) ignored_go++;
      // The result stays while the operands change.
      x = ~x;
      repeat (2) @(negedge clk);
      check("k4 return value held", ret_k == ret);
    end
    for (int n = 0; n < 16; n++) begin
      k = 4'(n);
      call(1, n == 5, lat, ret);
      check($sformatf("y6 k=%b latency %0d", k, lat), lat == 2);
      check($sformatf("y6 k=%b ret %0b", k, ret), ret == ref_y_of_k(6, k));
      if (n == 5) ignored_go++;
    end
    check("go during a call seen", ignored_go == 2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

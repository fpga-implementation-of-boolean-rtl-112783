// tb_bnn_calculate: runs calculate() for every input combination. The
// testbench plays the register file: it keeps y from the y_we strobes, checks
// that each y0j is written exactly once, that the hidden attributes and the
// outputs match the reference, that done comes exactly 15 cycles after go was
// sampled (and so within 20 cycles, 0.2 us at 100 MHz), that busy covers the
// run, that return_value is true, and that a go while busy is ignored.
module tb_bnn_calculate;
  import bnn_pkg::*;
  import tb_bnn_ref_pkg::*;

  int checks = 0, failures = 0;

  logic       clk = 0, rst_n = 0;
  logic       go;
  x_vec_t     x;
  logic       busy, done, ret;
  k_vec_t     k_q;
  y_vec_t     y_we, y_d;

  logic [9:0] y_seen;
  int         writes [10];

  always #5 clk = ~clk;

  bnn_calculate dut (.clk(clk), .rst_n(rst_n), .go(go), .x(x), .busy(busy),
                     .done(done), .return_value(ret), .k_q(k_q),
                     .y_we(y_we), .y_d(y_d));

  always @(posedge clk) begin
    for (int j = 0; j < 10; j++) begin
      if (y_we[j]) begin
        y_seen[j] <= y_d[j];
        writes[j]++;
      end
    end
  end

  task automatic check(string what, bit ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int lat;
    go = 0; x = '0;
    y_seen = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    check("idle after reset", !busy && !done);
    for (int n = 0; n < 8; n++) begin
      foreach (writes[j]) writes[j] = 0;
      x = 3'(n);
      go = 1;
      @(negedge clk);
      go = 0;
      lat = 1;
      check("busy after go", busy);
      while (!done && lat < 40) begin
        if (lat == 3) go = 1;   // ignored: already running
        @(negedge clk);
        go = 0;
        check("busy while running", busy || done);
        lat++;
      end
      check($sformatf("x=%b latency %0d == 15", x, lat), lat == 15);
      check("within 0.2 us at 100 MHz", lat <= 20);
      check("return value true", ret == 1'b1);
      check($sformatf("x=%b k=%b expected %b", x, k_q, ref_kvec(x)), k_q == ref_kvec(x));
      @(negedge clk);
      check($sformatf("x=%b y=%b expected %b", x, y_seen, ref_yvec(x)), y_seen == ref_yvec(x));
      foreach (writes[j]) check($sformatf("y%0d written once", j), writes[j] == 1);
      check("idle after done", !busy && !done);
      repeat (3) @(negedge clk);
      check("a go while busy starts nothing", !busy);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

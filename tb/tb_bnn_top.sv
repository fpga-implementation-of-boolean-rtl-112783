// tb_bnn_top: end-to-end test of the Bnn object at its only size, with the
// testbench in the role of the host program: for every input combination it
// writes X (init_x), starts calculate(), polls the status until done, reads Y
// (get_y) and K and compares them with the reference network; then it calls
// each of the fourteen methods k1()..k4() and y0()..y9() one by one and checks
// their return values. It also writes X and issues starts while calculate()
// or a method runs and checks that they are refused and flagged. It counts how
// often each mechanism happened (calculate runs, method calls, status polls
// that saw busy, refused writes, refused starts) and fails any that never did.
// calculate() must finish within 0.2 us of its start at a 10 ns clock.
module tb_bnn_top;
  import bnn_pkg::*;
  import tb_bnn_ref_pkg::*;

  int checks = 0, failures = 0;
  int n_calc = 0, n_meth = 0, n_busy_poll = 0, n_refused_x = 0, n_refused_start = 0;

  logic     clk = 0, rst_n = 0;
  bus_req_t bus_i;
  bus_rsp_t bus_o;

  always #5 clk = ~clk;   // 100 MHz

  bnn_top dut (.clk(clk), .rst_n(rst_n), .bus_i(bus_i), .bus_o(bus_o));

  task automatic check(string what, bit ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  task automatic wr(logic [2:0] a, logic [31:0] d);
    bus_i = '{req: 1'b1, we: 1'b1, addr: a, wdata: d};
    @(negedge clk);
    bus_i = '0;
  endtask

  task automatic rd(logic [2:0] a, output logic [31:0] d);
    bus_i = '{req: 1'b1, we: 1'b0, addr: a, wdata: '0};
    @(negedge clk);
    bus_i = '0;
    d = bus_o.rdata;
    checks++;
    if (!bus_o.rvalid) begin
      failures++;
      $display("FAIL no rvalid");
    end
  endtask

  // Polls CTRL until the done bit 'bit_done' is set; returns polls made.
  task automatic wait_done(int bit_done, int bit_busy, output logic [31:0] st,
                           output int polls, output bit refused);
    polls = 0;
    refused = 0;
    do begin
      rd(REG_CTRL, st);
      polls++;
      if (st[bit_busy]) n_busy_poll++;
      if (st[ST_REFUSED]) refused = 1;
    end while (!st[bit_done] && polls < 100);
    check("finished", st[bit_done] && !st[bit_busy]);
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] d, st;
    int polls;
    bit refused;
    realtime t0;
    bus_i = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);

    for (int n = 0; n < 8; n++) begin
      automatic bit [2:0] x = 3'(n);
      wr(REG_X, 32'(x));
      rd(REG_X, d);
      check("X written", d[2:0] == x);

      // calculate()
      t0 = $realtime;
      wr(REG_CTRL, 32'h1);
      if (n % 2 == 0) begin
        wr(REG_X, 32'(~x));
        n_refused_x++;
        wr(REG_CTRL, 32'h1);
        n_refused_start++;
      end
      refused = 0;
      do begin
        rd(REG_CTRL, st);
        if (st[ST_CALC_BUSY]) n_busy_poll++;
        if (st[ST_REFUSED]) refused = 1;
      end while (!st[ST_CALC_DONE] && ($realtime - t0) < 1000.0);
      n_calc++;
      check("calculate done", st[ST_CALC_DONE] && !st[ST_CALC_BUSY]);
      check("calculate returned true", st[ST_CALC_RET]);
      check($sformatf("refused flag %0b", refused), refused == (n % 2 == 0));
      rd(REG_X, d);
      check("X unchanged by refused write", d[2:0] == x);
      rd(REG_Y, d);
      check($sformatf("x=%b y=%b expected %b", x, d[9:0], ref_yvec(x)),
            d[9:0] == ref_yvec(x) && d[31:10] == 0);
      rd(REG_K, d);
      check($sformatf("x=%b k=%b expected %b", x, d[3:0], ref_kvec(x)),
            d[3:0] == ref_kvec(x));

      // k1()..k4(), y0()..y9()
      for (int m = 0; m < NM; m++) begin
        bit exp;
        exp = (m < NK) ? ref_k(m + 1, x[0], x[1], x[2]) : ref_yvec(x)[m - NK];
        wr(REG_METHOD, 32'(m));
        if (m == n) begin
          wr(REG_X, 32'(~x));
          n_refused_x++;
          wr(REG_METHOD, 32'((m + 1) % NM));
          n_refused_start++;
        end
        wait_done(ST_METH_DONE, ST_METH_BUSY, st, polls, refused);
        n_meth++;
        check($sformatf("x=%b method %0d ret %0b expected %0b", x, m, st[ST_METH_RET], exp),
              st[ST_METH_RET] == exp);
        rd(REG_METHOD, d);
        check("method number kept", d[3:0] == 4'(m));
        if (m == n) check("method-time refusal flagged", refused);
        else check("no refusal flagged", !refused);
      end
      rd(REG_X, d);
      check("X unchanged by methods", d[2:0] == x);
    end

    // calculate() latency as the host sees it: the start write, one cycle
    // for the go pulse, the 15 cycles of calculate(), one to set the sticky
    // done bit and one for the status read. Without the three register-file
    // cycles that is within the 0.2 us
    // (20 cycles) of the mapped method.
    begin
      automatic int cyc = 0;
      wr(REG_CTRL, 32'h1);
      cyc = 1;
      do begin
        rd(REG_CTRL, st);
        cyc++;
      end while (!st[ST_CALC_DONE] && cyc < 100);
      check($sformatf("calculate seen done after %0d cycles, expected 18", cyc), cyc == 18);
      check("calculate within 20 cycles", cyc - 3 <= 20);
      n_calc++;
    end

    $display("mechanisms: calculate runs %0d, method calls %0d, busy polls %0d, refused X writes %0d, refused starts %0d",
             n_calc, n_meth, n_busy_poll, n_refused_x, n_refused_start);
    check("calculate ran", n_calc > 0);
    check("methods called", n_meth == 8 * NM);
    check("busy seen by polling", n_busy_poll > 0);
    check("refused X write happened", n_refused_x > 0);
    check("refused start happened", n_refused_start > 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

// tb_bnn_regfile: checks the register file on its own, with the testbench
// standing in for calculate() and the methods. It checks X write and read
// back, that a read answers exactly one cycle later, that a CTRL start gives a
// one-cycle calc_go one cycle after the write, the busy/done/return status
// bits, that y_we strobes land in Y, the K read path, method starts by number
// (including an out-of-range number, which starts nothing), and that writes
// and starts while logic runs are refused, flagged, and the flag cleared by a
// status read.
module tb_bnn_regfile;
  import bnn_pkg::*;

  int checks = 0, failures = 0;

  logic          clk = 0, rst_n = 0;
  bus_req_t      bus_i;
  bus_rsp_t      bus_o;
  logic          calc_go, calc_busy, calc_done, calc_ret;
  k_vec_t        k_attr;
  y_vec_t        y_we, y_d;
  x_vec_t        x_q;
  logic [NM-1:0] meth_go, meth_busy, meth_done, meth_ret;

  always #5 clk = ~clk;

  bnn_regfile dut (.*);

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
    check("rvalid one cycle after read", bus_o.rvalid);
    d = bus_o.rdata;
    @(negedge clk);
    check("rvalid lasts one cycle", !bus_o.rvalid);
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] d;
    bus_i = '0;
    calc_busy = 0; calc_done = 0; calc_ret = 0; k_attr = '0;
    y_we = '0; y_d = '0; meth_busy = '0; meth_done = '0; meth_ret = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    rd(REG_CTRL, d);
    check("status zero after reset", d == 0);

    // X register
    wr(REG_X, 32'h5);
    check("x_q written", x_q == 3'b101);
    rd(REG_X, d);
    check("X reads back", d == 32'h5);
    wr(REG_X, 32'hFFFF_FFFA);
    rd(REG_X, d);
    check("X keeps three bits", d == 32'h2);

    // calculate start: go one cycle after the write, for one cycle
    bus_i = '{req: 1'b1, we: 1'b1, addr: REG_CTRL, wdata: 32'h1};
    @(negedge clk);
    bus_i = '0;
    check("calc_go pulse", calc_go);
    calc_busy = 1;
    @(negedge clk);
    check("calc_go one cycle", !calc_go);
    rd(REG_CTRL, d);
    check("status busy", d[ST_CALC_BUSY] && !d[ST_CALC_DONE]);
    // refused while busy
    wr(REG_X, 32'h7);
    check("X write refused", x_q == 3'b010);
    wr(REG_CTRL, 32'h1);
    check("start refused", !calc_go);
    wr(REG_METHOD, 32'h3);
    check("method start refused", meth_go == 0);
    rd(REG_CTRL, d);
    check("refused flag set", d[ST_REFUSED]);
    rd(REG_CTRL, d);
    check("refused flag cleared by read", !d[ST_REFUSED]);
    // y strobes
    y_d = 10'b11_1111_1111;
    for (int j = 0; j < 10; j++) begin
      if (j % 3 == 0) begin
        y_we = 10'(1) << j;
        @(negedge clk);
      end
    end
    y_we = '0;
    rd(REG_Y, d);
    check($sformatf("Y strobes %h", d), d == 32'b10_0100_1001);
    k_attr = 4'b1001;
    rd(REG_K, d);
    check("K reads attributes", d == 32'h9);
    calc_busy = 0; calc_done = 1; calc_ret = 1;
    @(negedge clk);
    calc_done = 0;
    rd(REG_CTRL, d);
    check("status done and return", !d[ST_CALC_BUSY] && d[ST_CALC_DONE] && d[ST_CALC_RET]);
    rd(REG_CTRL, d);
    check("done sticky", d[ST_CALC_DONE]);

    // method start by number
    for (int m = 0; m < 16; m++) begin
      wr(REG_METHOD, 32'(m));
      if (m < NM) begin
        check($sformatf("method %0d go", m), meth_go == (NM'(1) << m));
        meth_busy[m] = 1;
        @(negedge clk);
        check("method go one cycle", meth_go == 0);
        rd(REG_CTRL, d);
        check("method busy", d[ST_METH_BUSY] && !d[ST_METH_DONE]);
        meth_busy[m] = 0; meth_done[m] = 1; meth_ret[m] = m[0];
        @(negedge clk);
        meth_done[m] = 0;
        rd(REG_CTRL, d);
        check($sformatf("method %0d done ret", m),
              d[ST_METH_DONE] && !d[ST_METH_BUSY] && d[ST_METH_RET] == m[0]);
        rd(REG_METHOD, d);
        check("last method number", d == 32'(m));
      end else begin
        check("no go for out-of-range method", meth_go == 0);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

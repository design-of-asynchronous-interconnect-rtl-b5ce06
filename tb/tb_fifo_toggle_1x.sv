// tb_fifo_toggle_1x: self-checking test of the toggle-1x stage.
//
// A source sends random words with random delays; two sinks acknowledge
// their outputs with random delays. The words must leave alternately by
// output 0 and output 1, starting with output 0, with unchanged data. A
// monitor checks the protocol rule of the toggle: la rises only once the
// selected output has been acknowledged.
module tb_fifo_toggle_1x;
  localparam int W = 9;
  localparam int N = 400;

  logic rst, lv, la, rv0, ra0, rv1, ra1;
  logic [W-1:0] din, dout;
  int checks = 0, failures = 0;
  logic [W-1:0] exp_q [2][$];
  int received = 0;

  fifo_toggle_1x dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  always @(posedge la) if (!rst && $time > 10) check(ra0 || ra1, "la rose before the output was acknowledged");

  task automatic sink(input int k);
    forever begin
      wait (k == 0 ? rv0 : rv1);
      #($urandom % 6);
      if (exp_q[k].size() == 0) check(0, $sformatf("unexpected word on output %0d", k));
      else begin
        logic [W-1:0] e;
        e = exp_q[k].pop_front();
        check(dout === e, $sformatf("output %0d: %0h expected %0h", k, dout, e));
      end
      received++;
      if (k == 0) ra0 = 1; else ra1 = 1;
      wait (k == 0 ? !rv0 : !rv1);
      #($urandom % 6);
      if (k == 0) ra0 = 0; else ra1 = 0;
    end
  endtask

  initial begin
    rst = 0; #1 rst = 1; lv = 0; din = '0; ra0 = 0; ra1 = 0;
    #5 rst = 0;
    #5;
    fork sink(0); sink(1); join_none
    for (int i = 0; i < N; i++) begin
      logic [W-1:0] w;
      w = W'($urandom);
      din = w;
      exp_q[i % 2].push_back(w);
      #(1 + $urandom % 3);
      lv = 1;
      wait (la);
      #($urandom % 3);
      lv = 0;
      wait (!la);
    end
    wait (received == N);
    #50;
    check(exp_q[0].size() == 0 && exp_q[1].size() == 0, "words not delivered");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_anoc_switch: self-checking test of the router switch.
//
// A source sends random words with random delays; two sinks acknowledge
// with random delays. A word with MSB 1 must appear on right channel 1 and
// one with MSB 0 on right channel 2, never both, and the data seen there
// must be the word rotated left by one bit. A monitor checks that la rises
// only after the chosen channel has acknowledged (the switch relays, it does
// not buffer). Both routes must be used.
module tb_anoc_switch;
  localparam int W = 9;
  localparam int N = 400;

  logic rst, lv, la, rv1, ra1, rv2, ra2;
  logic [W-1:0] din, dout;
  int checks = 0, failures = 0;
  logic [W-1:0] exp_q [2][$];   // [0]: channel 1 (MSB 1), [1]: channel 2 (MSB 0)
  int received = 0;
  int used [2];

  anoc_switch dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  always @(posedge la) if (!rst && $time > 10) check(ra1 || ra2, "la rose before a right acknowledge");
  always @(posedge rv1 or posedge rv2) if (!rst && $time > 10) check(!(rv1 && rv2), "both right requests up");

  task automatic sink(input int k);
    forever begin
      wait (k == 0 ? rv1 : rv2);
      #($urandom % 6);
      if (exp_q[k].size() == 0) check(0, $sformatf("unexpected word on channel %0d", k + 1));
      else begin
        logic [W-1:0] e;
        e = exp_q[k].pop_front();
        check(dout === e, $sformatf("channel %0d: %0h expected %0h", k + 1, dout, e));
      end
      received++;
      if (k == 0) ra1 = 1; else ra2 = 1;
      wait (k == 0 ? !rv1 : !rv2);
      #($urandom % 6);
      if (k == 0) ra1 = 0; else ra2 = 0;
    end
  endtask

  initial begin
    rst = 0; #1 rst = 1; lv = 0; din = '0; ra1 = 0; ra2 = 0;
    #5 rst = 0;
    #5;
    fork sink(0); sink(1); join_none
    for (int i = 0; i < N; i++) begin
      logic [W-1:0] w;
      int k;
      w = W'($urandom);
      k = w[W-1] ? 0 : 1;
      used[k]++;
      din = w;
      exp_q[k].push_back({w[W-2:0], w[W-1]});
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
    check(used[0] > 0 && used[1] > 0, "a route never used");
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

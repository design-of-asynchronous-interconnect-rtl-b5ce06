// tb_anoc_join: self-checking test of the router join.
//
// Two sources send their own random words with independent random delays,
// so both requests are often up at once; one sink acknowledges with random
// delays. Every word must reach the output exactly once, in order per
// source, with unchanged data; a word that matches neither source's next
// word fails. Checked as well: an input acknowledge (la1, la2) never rises
// while the other input's acknowledge is up, both requests are seen up at
// the same time (arbitration) at least once, and each input gets the
// channel while the other one is waiting at least once.
module tb_anoc_join;
  localparam int W = 9;
  localparam int N = 300;   // words per source

  logic rst, mlv1, la1, mlv2, la2, rv, ra;
  logic [W-1:0] din1, din2, dout;
  int checks = 0, failures = 0;
  logic [W-1:0] in_q [2][$];
  int received = 0, both_up = 0;
  int won_while_other_waits [2];

  anoc_join dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  always @(posedge la1) if (!rst && $time > 10) begin
    check(!la2, "la1 rose while la2 up");
    if (mlv2) won_while_other_waits[0]++;
  end
  always @(posedge la2) if (!rst && $time > 10) begin
    check(!la1, "la2 rose while la1 up");
    if (mlv1) won_while_other_waits[1]++;
  end
  always @(posedge mlv1 or posedge mlv2) if (!rst && mlv1 && mlv2) both_up++;

  task automatic source(input int k);
    for (int i = 0; i < N; i++) begin
      logic [W-1:0] w;
      w = W'($urandom);
      if (k == 0) din1 = w; else din2 = w;
      in_q[k].push_back(w);
      #(1 + $urandom % 4);
      if (k == 0) mlv1 = 1; else mlv2 = 1;
      wait (k == 0 ? la1 : la2);
      #($urandom % 3);
      if (k == 0) mlv1 = 0; else mlv2 = 0;
      wait (k == 0 ? !la1 : !la2);
      #($urandom % 4);
    end
  endtask

  initial begin
    rst = 0; #1 rst = 1; mlv1 = 0; mlv2 = 0; din1 = '0; din2 = '0; ra = 0;
    #5 rst = 0;
    #5;
    fork
      source(0);
      source(1);
      begin : sink
        for (int i = 0; i < 2 * N; i++) begin
          bit found;
          wait (rv);
          #($urandom % 5);
          found = 0;
          for (int k = 0; k < 2; k++)
            if (!found && in_q[k].size() > 0 && in_q[k][0] == dout) begin
              void'(in_q[k].pop_front());
              found = 1;
            end
          check(found, $sformatf("unexpected word %0h", dout));
          received++;
          ra = 1;
          wait (!rv);
          #($urandom % 5);
          ra = 0;
        end
      end
    join
    #50;
    check(!rv && in_q[0].size() == 0 && in_q[1].size() == 0, "words lost or extra");
    check(both_up > 0, "never had both requests up");
    check(won_while_other_waits[0] > 0 && won_while_other_waits[1] > 0,
          "an input never won against a waiting one");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    #400000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_fifo_merge_2x: self-checking test of the merge-1x stage.
//
// Two sources send their own random words with independent random delays,
// so requests on the input that is not due are common; one sink
// acknowledges with random delays. The output must take words in the
// repeating pattern input 0, input 1, input 1, with unchanged data. A
// monitor checks that an input acknowledge rises only once the output has
// been acknowledged, and the number of times a request waited on the input
// that was not due is counted and must be non-zero.
module tb_fifo_merge_2x;
  localparam int W = 9;
  localparam int N = 300;     // words per input
  localparam int PERIOD = 3;  // pattern: input 0 once, then input 1 (PERIOD-1) times

  logic rst, lv0, la0, lv1, la1, rv, ra;
  logic [W-1:0] din0, din1, dout;
  int checks = 0, failures = 0;
  logic [W-1:0] in_q [2][$];
  int received = 0, waited = 0;

  fifo_merge_2x dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  always @(posedge la0 or posedge la1) if (!rst && $time > 10) check(ra, "input acknowledged before output");

  task automatic source(input int k, input int n);
    for (int i = 0; i < n; i++) begin
      logic [W-1:0] w;
      w = W'($urandom);
      if (k == 0) din0 = w; else din1 = w;
      in_q[k].push_back(w);
      #(1 + $urandom % 5);
      if (k == 0) lv0 = 1; else lv1 = 1;
      wait (k == 0 ? la0 : la1);
      #($urandom % 3);
      if (k == 0) lv0 = 0; else lv1 = 0;
      wait (k == 0 ? !la0 : !la1);
    end
  endtask

  always @(posedge lv0 or posedge lv1)
    if (!rst && (lv0 && lv1)) waited++;

  initial begin
    rst = 0; #1 rst = 1; lv0 = 0; lv1 = 0; din0 = '0; din1 = '0; ra = 0;
    #5 rst = 0;
    #5;
    fork
      source(0, N);
      source(1, N * (PERIOD - 1));
      begin : sink
        for (int i = 0; i < N * PERIOD; i++) begin
          int k;
          k = (i % PERIOD == 0) ? 0 : 1;
          wait (rv);
          #($urandom % 6);
          if (in_q[k].size() == 0) check(0, "word from an idle input");
          else begin
            logic [W-1:0] e;
            e = in_q[k].pop_front();
            check(dout === e, $sformatf("word %0d: %0h expected %0h from input %0d", i, dout, e, k));
          end
          received++;
          ra = 1;
          wait (!rv);
          #($urandom % 6);
          ra = 0;
        end
      end
    join
    #50;
    check(!rv, "extra word at output");
    check(waited > 0, "never had both inputs requesting");
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

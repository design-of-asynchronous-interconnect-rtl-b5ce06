// tb_fifo_tree: self-checking test of fifo_tree.
//
// A source and a sink with random handshake delays exchange 300 random
// words; the sink compares each word with a queue of what was sent, so a
// lost, duplicated or reordered word fails. Then the sink stops
// acknowledging and the source offers words until the FIFO stops taking
// them. The toggles and merges acknowledge a word only after the next stage has
// taken it, so only the four linear cells hold words: the FIFO takes 4.
// Finally the sink resumes and every held word must come out in order.
module tb_fifo_tree;
  localparam int W = 9;
  localparam int CAPACITY = 4;

  logic rst, lv, la, rv, ra;
  logic [W-1:0] din, dout;
  int checks = 0, failures = 0;
  logic [W-1:0] sent[$];
  bit sink_on = 1;
  bit acked;
  int received = 0;

  fifo_tree  dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // offer one word; acked tells whether it was taken within `limit`
  task automatic send(input logic [W-1:0] w, input int limit);
    din = w;
    #(1 + $urandom % 3);
    sent.push_back(w);   // queued before the request: rv may rise with la
    lv = 1;
    acked = 0;
    fork
      begin wait (la); acked = 1; end
      #(limit);
    join_any
    disable fork;
    if (!acked) begin     // not taken: the request stays up
      void'(sent.pop_back());
      return;
    end
    #($urandom % 3);
    lv = 0;
    wait (!la);
  endtask

  initial begin : sink
    ra = 0;
    #2 wait (!rst);   // rst is high from 1 to 6
    forever begin
      wait (rv && sink_on);
      #($urandom % 5);
      if (sent.size() == 0) check(0, $sformatf("word out of an empty FIFO at %0t", $time));
      else begin
        logic [W-1:0] exp;
        exp = sent.pop_front();
        check(dout === exp, $sformatf("data %0h expected %0h", dout, exp));
      end
      received++;
      ra = 1;
      wait (!rv);
      #($urandom % 5);
      ra = 0;
    end
  end

  initial begin
    int taken;
    rst = 0; #1 rst = 1; lv = 0; din = '0;
    #5 rst = 0;
    #5;
    for (int i = 0; i < 300; i++) begin
      send(W'($urandom), 1000);
      check(acked, "streaming word not taken");
    end
    wait (received == 300);
    sink_on = 0;
    #20;
    taken = 0;
    for (int i = 0; i < CAPACITY + 3; i++) begin
      send(W'($urandom), 200);
      if (!acked) break;
      taken++;
    end
    check(taken == CAPACITY,
          $sformatf("stalled FIFO took %0d words, expected %0d", taken, CAPACITY));
    // the refused word is still requested: it enters once the sink resumes
    sent.push_back(din);
    sink_on = 1;
    wait (la);
    #1 lv = 0;
    wait (received == 300 + taken + 1);
    #50;
    check(sent.size() == 0 && !rv, "words left after drain");
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

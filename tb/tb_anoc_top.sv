// tb_anoc_top: end-to-end self-checking test of the one-router system, at the
// default parameters (also the full-size test).
//
// Each port has a source sending N words with random handshake delays and a
// sink acknowledging with random delays and, now and then, a long pause that
// fills the FIFOs behind it. Source p stamps its number into bits [7:6] of
// each word; after the router's rotation these are bits [8:7] of the word
// received, so the sink knows which source a word came from and checks it
// against that source's queue for its own port: right port for the routing
// bit, rotated data, per-source order kept, nothing lost or duplicated.
//
// Each mechanism is counted and the test fails if one never happens:
//   routes      every (source, destination) pair of the six is used
//   contention  both inputs of a join request at the same moment
//   backpress   a source waits over 40 time units for an acknowledge
//   alternation the toggles and merges of every FIFO in the design switch
//               between both of their sides
module tb_anoc_top;
  localparam int W = 9;
  localparam int N = 400;   // words per source

  logic              rst;
  logic [2:0]        in_lv, in_la, out_rv, out_ra;
  logic [2:0][W-1:0] in_data, out_data;
  int checks = 0, failures = 0;

  logic [W-1:0] q [3][3][$];   // [source][destination], words as received
  int route_cnt [3][3];
  int received = 0, contention = 0, backpress = 0;
  int sink_pause [3];

  anoc_top dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // join contention, seen from outside the joins
  for (genvar p = 0; p < 3; p++) begin : g_mon
    always @(posedge dut.u_router.g_port[p].u_join.mlv1 or
             posedge dut.u_router.g_port[p].u_join.mlv2)
      if (!rst && dut.u_router.g_port[p].u_join.mlv1 && dut.u_router.g_port[p].u_join.mlv2)
        contention++;
  end

  // alternation: count the requests each toggle side and each merge side makes
  int alt [16];
  always @(posedge dut.u_in1.u_toggle.rv0)  if (!rst) alt[0]++;
  always @(posedge dut.u_in1.u_toggle.rv1)  if (!rst) alt[1]++;
  always @(posedge dut.u_in1.u_merge.la0)   if (!rst) alt[2]++;
  always @(posedge dut.u_in1.u_merge.la1)   if (!rst) alt[3]++;
  always @(posedge dut.u_in2.u_top1.rv0)    if (!rst) alt[4]++;
  always @(posedge dut.u_in2.u_top1.rv1)    if (!rst) alt[5]++;
  always @(posedge dut.u_in2.u_top2.rv0)    if (!rst) alt[6]++;
  always @(posedge dut.u_in2.u_top2.rv1)    if (!rst) alt[7]++;
  always @(posedge dut.u_in2.u_bot2.la0)    if (!rst) alt[8]++;
  always @(posedge dut.u_in2.u_bot2.la1)    if (!rst) alt[9]++;
  always @(posedge dut.u_in2.u_bot3.la0)    if (!rst) alt[10]++;
  always @(posedge dut.u_in2.u_bot3.la1)    if (!rst) alt[11]++;
  always @(posedge dut.g_out[0].u_out.u_toggle_root.rv0) if (!rst) alt[12]++;
  always @(posedge dut.g_out[0].u_out.u_toggle_root.rv1) if (!rst) alt[13]++;
  always @(posedge dut.g_out[0].u_out.u_merge_root.la0)  if (!rst) alt[14]++;
  always @(posedge dut.g_out[0].u_out.u_merge_root.la1)  if (!rst) alt[15]++;

  task automatic source(input int p);
    for (int i = 0; i < N; i++) begin
      logic [W-1:0] w;
      int d;
      time t0;
      w = W'($urandom);
      w[7:6] = 2'(p);
      d = w[W-1] ? (p + 2) % 3 : (p + 1) % 3;
      q[p][d].push_back({w[W-2:0], w[W-1]});
      route_cnt[p][d]++;
      in_data[p] = w;
      #(1 + $urandom % 4);
      in_lv[p] = 1;
      t0 = $time;
      wait (in_la[p]);
      if ($time - t0 > 40) backpress++;
      #($urandom % 3);
      in_lv[p] = 0;
      wait (!in_la[p]);
    end
  endtask

  task automatic sink(input int p);
    forever begin
      int s;
      wait (out_rv[p]);
      if ($urandom % 40 == 0) begin
        sink_pause[p]++;
        #(200 + $urandom % 200);
      end else
        #($urandom % 5);
      s = int'(out_data[p][W-1:W-2]);
      if (s > 2 || q[s][p].size() == 0)
        check(0, $sformatf("port %0d: unexpected word %0h", p, out_data[p]));
      else begin
        logic [W-1:0] e;
        e = q[s][p].pop_front();
        check(out_data[p] === e,
              $sformatf("port %0d from %0d: %0h expected %0h", p, s, out_data[p], e));
      end
      received++;
      out_ra[p] = 1;
      wait (!out_rv[p]);
      #($urandom % 5);
      out_ra[p] = 0;
    end
  endtask

  initial begin
    rst = 0; #1 rst = 1;
    in_lv = '0; in_data = '0; out_ra = '0;
    #5 rst = 0;
    #5;
    fork
      sink(0); sink(1); sink(2);
    join_none
    fork
      source(0); source(1); source(2);
    join
    wait (received == 3 * N);
    #100;
    for (int s = 0; s < 3; s++)
      for (int d = 0; d < 3; d++) begin
        check(q[s][d].size() == 0, $sformatf("%0d words from %0d to %0d lost", q[s][d].size(), s, d));
        if (s != d) check(route_cnt[s][d] > 0, $sformatf("route %0d->%0d never used", s, d));
      end
    check(out_rv == '0, "output request left up");
    check(contention > 0, "no join contention");
    check(backpress > 0, "no backpressure");
    foreach (alt[i]) check(alt[i] > 0, $sformatf("toggle/merge side %0d never used", i));
    $display("routes %p contention %0d backpressure %0d pauses %p", route_cnt, contention,
             backpress, sink_pause);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

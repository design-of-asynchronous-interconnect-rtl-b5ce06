// tb_anoc_router: self-checking test of the three-port asynchronous router.
//
// Three sources (ports A, B, C) send random words with random handshake
// delays; three sinks acknowledge with random delays. The expected output
// port of a word follows from its MSB (port p: bit 0 -> (p+1) mod 3,
// bit 1 -> (p+2) mod 3) and the expected word is the input rotated left by
// one bit. Words from one source to one destination must arrive in order;
// every sink checks the head of the queue kept for each possible source, and
// the word must match one of them. Counted mechanisms: every one of the six
// routes is used, and the join of every port sees both of its inputs
// requesting at once (arbitration) at least once.
module tb_anoc_router;
  localparam int W = 9;
  localparam int N = 300;   // words per source

  logic rst;
  logic [2:0] in_lv, in_la, out_rv, out_ra;
  logic [2:0][W-1:0] in_data, out_data;

  int checks = 0, failures = 0;
  logic [W-1:0] q [3][3][$];   // q[src][dst]: expected words in order
  int received = 0;
  int route_cnt [3][3];
  int contention [3];

  anoc_router dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic int dest(input int p, input logic [W-1:0] w);
    return w[W-1] ? (p + 2) % 3 : (p + 1) % 3;
  endfunction

  function automatic logic [W-1:0] rotl(input logic [W-1:0] w);
    return {w[W-2:0], w[W-1]};
  endfunction

  task automatic source(input int p);
    for (int i = 0; i < N; i++) begin
      logic [W-1:0] w;
      w = W'($urandom);
      in_data[p] = w;
      #(1 + $urandom % 4);
      q[p][dest(p, w)].push_back(rotl(w));
      route_cnt[p][dest(p, w)]++;
      in_lv[p] = 1;
      wait (in_la[p]);
      #($urandom % 3);
      in_lv[p] = 0;
      wait (!in_la[p]);
      #($urandom % 6);
    end
  endtask

  task automatic sink(input int d);
    forever begin
      bit found;
      wait (out_rv[d]);
      #($urandom % 5);
      found = 0;
      for (int s = 0; s < 3; s++)
        if (!found && q[s][d].size() > 0 && q[s][d][0] == out_data[d]) begin
          void'(q[s][d].pop_front());
          found = 1;
        end
      check(found, $sformatf("port %0d: unexpected word %0h", d, out_data[d]));
      received++;
      out_ra[d] = 1;
      wait (!out_rv[d]);
      #($urandom % 5);
      out_ra[d] = 0;
    end
  endtask

  // both inputs of a join requesting at once
  for (genvar p = 0; p < 3; p++) begin : g_mon
    always @(posedge dut.g_port[p].u_join.mlv1 or posedge dut.g_port[p].u_join.mlv2)
      if (!rst && dut.g_port[p].u_join.mlv1 && dut.g_port[p].u_join.mlv2) contention[p]++;
  end

  initial begin
    rst = 0; #1 rst = 1; in_lv = '0; out_ra = '0; in_data = '0;
    #5 rst = 0;
    #5;
    fork
      sink(0); sink(1); sink(2);
    join_none
    fork
      source(0); source(1); source(2);
    join
    wait (received == 3 * N);
    #50;
    for (int s = 0; s < 3; s++)
      for (int d = 0; d < 3; d++) begin
        check(q[s][d].size() == 0, $sformatf("%0d words %0d->%0d not delivered", q[s][d].size(), s, d));
        if (s != d) check(route_cnt[s][d] > 0, $sformatf("route %0d->%0d never used", s, d));
      end
    for (int p = 0; p < 3; p++)
      check(contention[p] > 0, $sformatf("join %0d never arbitrated", p));
    $display("contention per join: %0d %0d %0d", contention[0], contention[1], contention[2]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

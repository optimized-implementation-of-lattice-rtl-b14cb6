// tb_cycle_ctrl: drives the DSlave control circuit with simple models of the
// collision units (fixed latency), the link transmitters (busy for a random
// time after each packet) and the neighbours (packets arrive in order at
// random times) and checks the order rules of a time step: peripheral
// collision before sub-phase 1, interior collision started with sub-phase 1,
// one sub-phase 1 and one sub-phase 2 packet per link and step, sub-phase 2
// on a link only after the sub-phase 1 packet of the link clockwise before it
// was taken and its own sub-phase 1 packet acknowledged, streaming only when
// everything is in, the step count and the done pulse. Also checks that stall
// is raised when a transmitter is still busy at the start of sub-phase 1.
module tb_cycle_ctrl;
  localparam int NL = 4, STEPS = 12, LAT = 20;

  logic          clk = 0, rst_n = 0, go = 0;
  logic [31:0]   nsteps, step;
  logic          busy, done, start_periph, start_int, periph_done = 0, int_done = 0;
  logic [NL-1:0] tx_ready, pkt_ready, send1, send2, take, take_sp2;
  logic          stream, stall;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  cycle_ctrl #(.NL(NL)) dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  // collision unit model
  int pcnt = -1, icnt = -1;
  always @(posedge clk) begin
    periph_done <= 0; int_done <= 0;
    if (start_periph) pcnt <= LAT;
    else if (pcnt > 0) pcnt <= pcnt - 1;
    else if (pcnt == 0) begin periph_done <= 1; pcnt <= -1; end
    if (start_int) icnt <= LAT;
    else if (icnt > 0) icnt <= icnt - 1;
    else if (icnt == 0) begin int_done <= 1; icnt <= -1; end
  end

  // transmitter model: busy for a random time after a send (the ACK wait)
  int tbusy [NL];
  for (genvar l = 0; l < NL; l++) begin : g_tx
    assign tx_ready[l] = (tbusy[l] == 0);
    always @(posedge clk) begin
      if (!rst_n) tbusy[l] <= 0;
      else if (send1[l] || send2[l]) tbusy[l] <= (l == 0 && send2[l]) ? 300 : $urandom_range(3, 30);
      else if (tbusy[l] > 0) tbusy[l] <= tbusy[l] - 1;
    end
  end

  // neighbour model: per link, packets alternate sp1/sp2, each after a random
  // gap; link 3 is slow, so the order of forwarding is exercised
  int  pdelay [NL];
  int  pkts_given [NL];
  for (genvar l = 0; l < NL; l++) begin : g_rx
    always @(posedge clk) begin
      if (!rst_n) begin pkt_ready[l] <= 0; pdelay[l] <= 5; pkts_given[l] <= 0; end
      else if (take[l]) begin pkt_ready[l] <= 0; pdelay[l] <= (l == 3) ? $urandom_range(60, 100) : $urandom_range(1, 40); end
      else if (!pkt_ready[l] && pkts_given[l] < 2*STEPS) begin
        if (pdelay[l] == 0) begin pkt_ready[l] <= 1; pkts_given[l] <= pkts_given[l] + 1; end
        else pdelay[l] <= pdelay[l] - 1;
      end
    end
  end

  // order checks
  int  n1 [NL], n2 [NL], nt1 [NL], nt2 [NL], nstream = 0, nstall = 0;
  bit  in_step = 0, periph_seen = 0, int_started = 0, int_fin = 0;
  always @(posedge clk) if (rst_n) begin
    if (stall) nstall++;
    if (start_periph) begin
      check(!in_step, "peripheral collision starts once per step");
      in_step = 1; periph_seen = 0; int_started = 0; int_fin = 0;
      foreach (n1[l]) begin n1[l] = 0; n2[l] = 0; nt1[l] = 0; nt2[l] = 0; end
    end
    if (periph_done) periph_seen = 1;
    if (start_int) begin
      check(periph_seen, "interior starts after the peripheral collision");
      int_started = 1;
    end
    if (int_done) int_fin = 1;
    for (int l = 0; l < NL; l++) begin
      if (send1[l]) begin
        check(periph_seen && tx_ready[l], "sub-phase 1 after peripheral collision, transmitter free");
        n1[l]++;
      end
      if (send2[l]) begin
        check(n1[l] == 1 && tx_ready[l], "sub-phase 2 after own sub-phase 1 acknowledged");
        check(nt1[(l + 1) % NL] == 1, "sub-phase 2 after the source link's packet was taken");
        n2[l]++;
      end
      if (take[l]) begin
        check(pkt_ready[l], "take only a ready packet");
        if (take_sp2[l]) nt2[l]++; else nt1[l]++;
        check(!take_sp2[l] || nt1[l] == 1, "sub-phase 2 packet taken after sub-phase 1");
      end
    end
    if (stream) begin
      nstream++;
      check(int_fin, "stream after interior collision");
      for (int l = 0; l < NL; l++)
        check(n1[l] == 1 && n2[l] == 1 && nt1[l] == 1 && nt2[l] == 1,
              "stream after both packets sent and taken on every link");
      in_step = 0;
    end
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    nsteps = STEPS;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    go = 1; @(negedge clk); go = 0;
    while (!done) @(negedge clk);
    check(step == STEPS, "step counter");
    check(nstream == STEPS, "one streaming per step");
    check(!busy, "idle after done");
    check(nstall > 0, "stall seen while a transmitter was busy");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_link_transceiver: two transceivers joined back to back, both sending a
// stream of random packets to each other at the same time while random bit
// errors are injected on both lines. Every packet must arrive exactly once, in
// order and intact; errors must be detected and repaired by retransmission.
// A clean packet must be delivered within its byte count plus a few cycles.
module tb_link_transceiver;
  import lbm_pkg::*;

  localparam int MAXW = 14, TIMEOUT = 200, NPKT = 40;

  logic clk = 0, rst_n = 0;
  int checks = 0, failures = 0;
  bit inject = 0;

  always #5 clk = ~clk;

  // side 0 and side 1
  logic       send [2], send_tag [2], tx_ready [2], pkt_ready [2], pkt_tag [2], pkt_take [2];
  logic [7:0] send_len [2], pkt_len [2];
  fx_t        send_data [2][MAXW], pkt_data [2][MAXW];
  line_t      lout [2], lin [2];
  logic       retx [2], crc_err [2];
  logic [7:0] mask [2];

  for (genvar s = 0; s < 2; s++) begin : g_side
    link_transceiver #(.MAXW(MAXW), .TIMEOUT(TIMEOUT)) u (
      .clk, .rst_n,
      .send(send[s]), .send_tag(send_tag[s]), .send_len(send_len[s]), .send_data(send_data[s]),
      .tx_ready(tx_ready[s]),
      .pkt_ready(pkt_ready[s]), .pkt_tag(pkt_tag[s]), .pkt_len(pkt_len[s]), .pkt_data(pkt_data[s]),
      .pkt_take(pkt_take[s]),
      .line_out(lout[s]), .line_in(lin[s]),
      .retx(retx[s]), .crc_err(crc_err[s])
    );
    always_comb begin
      lin[s] = lout[1-s];
      if (lin[s].valid) lin[s].data = lin[s].data ^ mask[s];
    end
  end

  always @(negedge clk) begin
    mask[0] = 0; mask[1] = 0;
    if (inject && $urandom_range(39) == 0) mask[$urandom_range(1)] = 8'(1 << $urandom_range(7));
  end

  int n_retx = 0, n_crc = 0;
  always @(posedge clk) if (rst_n) begin
    if (retx[0] || retx[1]) n_retx++;
    if (crc_err[0] || crc_err[1]) n_crc++;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // expected packets, generated from the same seed sequence on both ends
  fx_t  exp_data [2][NPKT][MAXW];
  int   exp_len  [2][NPKT];

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // senders
  for (genvar s = 0; s < 2; s++) begin : g_drv
    initial begin
      send[s] = 0; send_tag[s] = 0; send_len[s] = 0;
      foreach (send_data[s][k]) send_data[s][k] = 0;
      wait (rst_n);
      for (int p = 0; p < NPKT; p++) begin
        @(negedge clk);
        while (!tx_ready[s]) @(negedge clk);
        send[s] = 1; send_tag[s] = 1'(p); send_len[s] = 8'(exp_len[s][p]);
        for (int k = 0; k < MAXW; k++) send_data[s][k] = exp_data[s][p][k];
        @(negedge clk);
        send[s] = 0;
      end
    end
  end

  // receivers (side s receives what side 1-s sends)
  int got [2];
  for (genvar s = 0; s < 2; s++) begin : g_rcv
    initial begin
      got[s] = 0;
      pkt_take[s] = 0;
      wait (rst_n);
      while (got[s] < NPKT) begin
        @(negedge clk);
        if (pkt_ready[s]) begin
          int p;
          p = got[s];
          check(pkt_tag[s] == 1'(p) && pkt_len[s] == 8'(exp_len[1-s][p]), "packet header in order");
          for (int k = 0; k < exp_len[1-s][p]; k++)
            check(pkt_data[s][k] == exp_data[1-s][p][k], "payload intact");
          got[s]++;
          // take after a random delay
          repeat ($urandom_range(20)) @(negedge clk);
          pkt_take[s] = 1; @(negedge clk); pkt_take[s] = 0;
        end
      end
    end
  end

  initial begin
    int t0;
    for (int s = 0; s < 2; s++)
      for (int p = 0; p < NPKT; p++) begin
        exp_len[s][p] = (p % 2 == 1) ? 1 : MAXW;
        for (int k = 0; k < MAXW; k++) exp_data[s][p][k] = fx_t'($urandom);
      end
    repeat (3) @(negedge clk);
    rst_n = 1;
    // first packet of side 0 goes over a clean line: check its delivery time
    t0 = $time;
    wait (pkt_ready[1]);
    check(($time - t0) / 10 <= 2 + 4*MAXW + 4 + 4, "clean packet latency");
    inject = 1;
    wait (got[0] == NPKT && got[1] == NPKT);
    inject = 0;
    repeat (TIMEOUT * 3) @(negedge clk);
    check(!pkt_ready[0] && !pkt_ready[1], "no extra packets delivered");
    check(tx_ready[0] && tx_ready[1], "all packets acknowledged");
    check(n_crc > 0, "errors detected");
    check(n_retx > 0, "retransmissions happened");
    $display("crc errors %0d, retransmissions %0d", n_crc, n_retx);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

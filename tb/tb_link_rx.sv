// tb_link_rx: drives hand-built packets (CRC-32 computed here bit by bit)
// into link_rx and checks delivery of a correct DATA packet, that its ACK is
// requested only when the core takes it, that a corrupted packet is dropped
// and flagged, that a copy of a taken packet is acknowledged again without
// delivery, that a truncated packet is dropped, and that ACK packets are
// reported with their sequence number.
module tb_link_rx;
  import lbm_pkg::*;

  localparam int MAXW = 14;

  logic       clk = 0, rst_n = 0;
  line_t      line;
  logic       pkt_ready, pkt_tag, pkt_take = 0;
  logic [7:0] pkt_len;
  fx_t        pkt_data [MAXW];
  logic       ack_seen, ack_seen_seq, ack_req, ack_req_seq, crc_err;
  int checks = 0, failures = 0;
  int n_ack_req = 0, n_ack_seen = 0, n_crc_err = 0;
  logic last_ack_req_seq, last_ack_seen_seq;

  always #5 clk = ~clk;

  link_rx #(.MAXW(MAXW)) dut (.*);

  always @(posedge clk) if (rst_n) begin
    if (ack_req)  begin n_ack_req++;  last_ack_req_seq  = ack_req_seq;  end
    if (ack_seen) begin n_ack_seen++; last_ack_seen_seq = ack_seen_seq; end
    if (crc_err)  n_crc_err++;
  end

  function automatic logic [31:0] crc_bits(input logic [7:0] bytes [$]);
    logic [31:0] c = 32'hFFFFFFFF;
    foreach (bytes[i])
      for (int k = 0; k < 8; k++) begin
        logic fb = c[0] ^ bytes[i][k];
        c = c >> 1;
        if (fb) c = c ^ 32'hEDB88320;
      end
    return ~c;
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // send bytes, optionally flipping one bit of byte 'bad' or cutting at 'cut'
  task automatic put(input logic [7:0] pk [$], input int bad = -1, input int cut = -1);
    foreach (pk[i]) begin
      if (i == cut) break;
      line.valid = 1;
      line.data  = (i == bad) ? pk[i] ^ 8'h10 : pk[i];
      @(negedge clk);
    end
    line.valid = 0; line.data = 0;
    repeat (2) @(negedge clk);
  endtask

  function automatic void make_data(output logic [7:0] pk [$], input logic tag, input logic seq,
                                    input fx_t d [$]);
    logic [31:0] c;
    pk = {};
    pk.push_back({PK_DATA, tag, seq, HDR_MARK});
    pk.push_back(8'(d.size()));
    foreach (d[i]) begin
      pk.push_back(d[i][31:24]); pk.push_back(d[i][23:16]);
      pk.push_back(d[i][15:8]);  pk.push_back(d[i][7:0]);
    end
    c = crc_bits(pk);
    pk.push_back(c[7:0]); pk.push_back(c[15:8]); pk.push_back(c[23:16]); pk.push_back(c[31:24]);
  endfunction

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] pk [$], ak [$];
    fx_t d [$];
    logic [31:0] c;
    line = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int i = 0; i < 14; i++) d.push_back(fx_t'($urandom));
    // corrupted packet: dropped, flagged
    make_data(pk, 1'b0, 1'b0, d);
    put(pk, 20);
    check(!pkt_ready && n_crc_err == 1, "corrupted packet dropped");
    // truncated packet: dropped
    put(pk, -1, 30);
    check(!pkt_ready && n_ack_req == 0, "truncated packet dropped");
    // good packet
    put(pk);
    check(pkt_ready && pkt_tag == 1'b0 && pkt_len == 8'd14, "good packet delivered");
    for (int i = 0; i < 14; i++) check(pkt_data[i] == d[i], "payload word");
    check(n_ack_req == 0, "no ACK before take");
    // a resent copy while held: ignored
    put(pk);
    check(n_ack_req == 0 && pkt_ready, "copy of held packet ignored");
    pkt_take = 1; @(negedge clk); pkt_take = 0; @(negedge clk);
    check(!pkt_ready && n_ack_req == 1 && last_ack_req_seq == 1'b0, "ACK requested on take");
    // copy of the taken packet: acknowledged again, not delivered
    put(pk);
    check(!pkt_ready && n_ack_req == 2 && last_ack_req_seq == 1'b0, "duplicate re-acknowledged");
    // next packet, seq 1, tag 1, 1 word
    d = '{fx_t'(32'h1234_5678)};
    make_data(pk, 1'b1, 1'b1, d);
    put(pk);
    check(pkt_ready && pkt_tag && pkt_len == 8'd1 && pkt_data[0] == 32'h1234_5678, "second packet");
    // ACK packet seq 1
    ak = '{{PK_ACK, 1'b0, 1'b1, HDR_MARK}};
    c = crc_bits(ak);
    ak.push_back(c[7:0]); ak.push_back(c[15:8]); ak.push_back(c[23:16]); ak.push_back(c[31:24]);
    put(ak);
    check(n_ack_seen == 1 && last_ack_seen_seq == 1'b1, "ACK packet reported");
    put(ak, 2);
    check(n_ack_seen == 1 && n_crc_err == 2, "corrupted ACK dropped");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

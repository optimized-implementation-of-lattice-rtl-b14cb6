// tb_link_tx: checks the packet bytes link_tx puts on the line (header,
// length, payload order, CRC-32 computed here bit by bit and itself checked
// against the standard check value of "123456789"), that ready stays low until
// the matching ACK, that a missing ACK causes a retransmission after the
// timeout, and that requested ACK packets are sent.
module tb_link_tx;
  import lbm_pkg::*;

  localparam int MAXW = 14, TIMEOUT = 40;

  logic       clk = 0, rst_n = 0;
  logic       send = 0, send_tag = 0;
  logic [7:0] send_len = 0;
  fx_t        send_data [MAXW];
  logic       ready;
  logic       ack_seen = 0, ack_seen_seq = 0, ack_req = 0, ack_req_seq = 0;
  line_t      line;
  logic       retx;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  link_tx #(.MAXW(MAXW), .TIMEOUT(TIMEOUT)) dut (.*);

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

  // collect one packet from the line
  task automatic grab(output logic [7:0] pk [$]);
    pk = {};
    while (!line.valid) @(negedge clk);
    while (line.valid) begin pk.push_back(line.data); @(negedge clk); end
  endtask

  task automatic check_packet(input logic [7:0] pk [$], input logic [7:0] hdr, input int len, input string what);
    logic [7:0] body [$];
    logic [31:0] c;
    int blen;
    blen = (len < 0) ? 1 : 2 + 4*len;
    check(pk.size() == blen + 4, {what, ": size"});
    if (pk.size() != blen + 4) return;
    check(pk[0] == hdr, {what, ": header"});
    if (len >= 0) begin
      check(pk[1] == 8'(len), {what, ": len"});
      for (int w = 0; w < len; w++)
        check({pk[2+4*w], pk[3+4*w], pk[4+4*w], pk[5+4*w]} == send_data[w], {what, ": payload"});
    end
    body = pk[0:blen-1];
    c = crc_bits(body);
    check({pk[blen+3], pk[blen+2], pk[blen+1], pk[blen]} == c, {what, ": crc"});
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int nretx = 0;
  always @(posedge clk) if (rst_n && retx) nretx++;

  initial begin
    logic [7:0] pk [$];
    logic [7:0] s9 [$];
    int t0;
    s9 = '{8'h31, 8'h32, 8'h33, 8'h34, 8'h35, 8'h36, 8'h37, 8'h38, 8'h39};
    check(crc_bits(s9) == 32'hCBF43926, "reference CRC check value");
    foreach (send_data[i]) send_data[i] = fx_t'($urandom);
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    check(ready, "ready after reset");
    // packet 1: tag 0, seq 0, 14 words
    send = 1; send_tag = 0; send_len = 14;
    @(negedge clk);
    send = 0;
    foreach (send_data[i]) send_data[i] = fx_t'($urandom); // must not matter now
    grab(pk);
    check(!ready, "not ready while waiting for ACK");
    // the packet was sampled before the data changed: rebuild the expectation
    // from the bytes' own payload is not allowed, so compare header and CRC
    check(pk.size() == 2 + 56 + 4, "packet 1 size");
    check(pk[0] == {PK_DATA, 1'b0, 1'b0, HDR_MARK}, "packet 1 header");
    check(crc_bits(pk[0:57]) == {pk[61], pk[60], pk[59], pk[58]}, "packet 1 crc");
    // no ACK: expect a retransmission after the timeout, identical bytes
    begin
      logic [7:0] pk2 [$];
      t0 = $time;
      grab(pk2);
      check(pk2 == pk, "retransmitted copy identical");
      check(($time - t0) / 10 >= TIMEOUT, "retransmission waits for the timeout");
      check(nretx == 1, "one retransmission counted");
    end
    // ACK with the wrong sequence number is ignored, the right one frees it
    @(negedge clk); ack_seen = 1; ack_seen_seq = 1; @(negedge clk); ack_seen = 0;
    repeat (2) @(negedge clk);
    check(!ready, "wrong-sequence ACK ignored");
    ack_seen = 1; ack_seen_seq = 0; @(negedge clk); ack_seen = 0;
    @(negedge clk);
    check(ready, "ready after ACK");
    // packet 2: tag 1, seq 1, 3 words, payload checked
    send = 1; send_tag = 1; send_len = 3;
    @(negedge clk);
    send = 0;
    grab(pk);
    check_packet(pk, {PK_DATA, 1'b1, 1'b1, HDR_MARK}, 3, "packet 2");
    // requested ACK packet
    ack_req = 1; ack_req_seq = 1; @(negedge clk); ack_req = 0;
    grab(pk);
    check_packet(pk, {PK_ACK, 1'b0, 1'b1, HDR_MARK}, -1, "ack packet");
    ack_seen = 1; ack_seen_seq = 1; @(negedge clk); ack_seen = 0;
    @(negedge clk);
    check(ready, "ready after second ACK");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

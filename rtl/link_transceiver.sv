// link_transceiver: one bidirectional transceiver module of a DSlave (one of
// the links to a neighbouring FPGA). It pairs a link_tx and a link_rx: the
// receive half reports ACK packets to the transmit half and asks it to send
// ACKs for received data, so both directions of the full-duplex line carry
// data packets and acknowledgements interleaved.
//
// The split into transceivers with CRC, acknowledgement and retransmission
// follows the design; the byte-wide line (one byte per 125 MHz cycle, the
// payload rate of the 1 Gbit/s serial line) stands for the serializer, the
// LVDS buffers and the cable, which are not part of this RTL.
//
// Core side: see link_tx (send, ready) and link_rx (pkt_*). Statistics:
// retx pulses per retransmitted packet, crc_err per packet dropped for a CRC
// mismatch.
module link_transceiver
  import lbm_pkg::*;
#(
  parameter int MAXW    = 14,
  parameter int TIMEOUT = 1024
) (
  input  logic       clk,
  input  logic       rst_n,
  // transmit side of the core
  input  logic       send,
  input  logic       send_tag,
  input  logic [7:0] send_len,
  input  fx_t        send_data [MAXW],
  output logic       tx_ready,
  // receive side of the core
  output logic       pkt_ready,
  output logic       pkt_tag,
  output logic [7:0] pkt_len,
  output fx_t        pkt_data [MAXW],
  input  logic       pkt_take,
  // line
  output line_t      line_out,
  input  line_t      line_in,
  // statistics
  output logic       retx,
  output logic       crc_err
);

  logic ack_seen, ack_seen_seq, ack_req, ack_req_seq;

  link_tx #(.MAXW(MAXW), .TIMEOUT(TIMEOUT)) u_tx (
    .clk, .rst_n,
    .send, .send_tag, .send_len, .send_data,
    .ready(tx_ready),
    .ack_seen, .ack_seen_seq, .ack_req, .ack_req_seq,
    .line(line_out),
    .retx
  );

  link_rx #(.MAXW(MAXW)) u_rx (
    .clk, .rst_n,
    .line(line_in),
    .pkt_ready, .pkt_tag, .pkt_len, .pkt_data, .pkt_take,
    .ack_seen, .ack_seen_seq, .ack_req, .ack_req_seq,
    .crc_err
  );

endmodule

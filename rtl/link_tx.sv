// link_tx: transmit half of one DSlave transceiver. Sends halo packets of
// distribution words to the neighbouring FPGA, protects them with a 32-bit
// CRC, keeps each packet until the other side acknowledges it and sends it
// again when no acknowledgement arrives in time. It also sends the ACK
// packets that the receive half of the same transceiver asks for.
//
// Acknowledgement, CRC protection and retransmission follow the design; the
// packet layout, the one-bit sequence number (stop-and-wait), the timeout and
// the choice of CRC-32 polynomial (the Ethernet one, reflected, initial value
// and final inversion all ones) are this implementation's own.
//
// Packet bytes on the line, each with line.valid high, packets separated by
// at least one idle cycle:
//   DATA: header {2'b10, tag, seq, 4'h5}, len (words), len x 4 payload bytes
//         (most significant first), 4 CRC bytes (least significant first)
//   ACK : header {2'b01, 1'b0, seq, 4'h5}, 4 CRC bytes
// The CRC covers every byte before it. One byte per clock cycle: at the
// 125 MHz core clock this is the 1 Gbit/s rate of the serial LVDS line, whose
// serializer is outside this module.
//
// Core side: when ready is high, a one-cycle send pulse hands over tag, len
// and data (sampled then). ready falls until the packet is acknowledged.
// ack_seen/ack_seen_seq report ACK packets found by the receiver; ack_req/
// ack_req_seq ask for an ACK to be sent (one pending request is held; ACKs
// take priority between packets). retx pulses once per retransmission.
module link_tx
  import lbm_pkg::*;
#(
  parameter int MAXW    = 14,   // largest payload in words (3N-1 for N = 5)
  parameter int TIMEOUT = 1024  // cycles to wait for an ACK before resending
) (
  input  logic       clk,
  input  logic       rst_n,
  // core side
  input  logic       send,
  input  logic       send_tag,
  input  logic [7:0] send_len,
  input  fx_t        send_data [MAXW],
  output logic       ready,
  // from the receive half
  input  logic       ack_seen,
  input  logic       ack_seen_seq,
  input  logic       ack_req,
  input  logic       ack_req_seq,
  // line
  output line_t      line,
  // statistics
  output logic       retx
);

  typedef enum logic [1:0] {D_EMPTY, D_PEND, D_WAIT} dstate_e;
  typedef enum logic [1:0] {L_IDLE, L_DATA, L_ACK, L_GAP} lstate_e;

  dstate_e dstate;
  lstate_e lstate;

  fx_t        buf_q [MAXW];
  logic       tag_q, seq_q;
  logic [7:0] len_q;
  logic       ackp_q, ackp_seq_q;      // pending ACK request
  logic       ack_cur_seq_q;           // sequence number of the ACK on the line
  logic [$clog2(TIMEOUT+1)-1:0] timer_q;
  logic [9:0] pos_q;                   // byte position in the packet
  logic [31:0] crc_q;

  // length of the packet body (bytes before the CRC)
  logic [9:0] body_len;
  always_comb body_len = (lstate == L_ACK) ? 10'd1 : 10'd2 + {len_q, 2'b00};

  // byte at the current position
  logic [7:0] cur_byte;
  always_comb begin
    logic [9:0] off;
    fx_t        w;
    off = pos_q - 10'd2;
    w   = buf_q[off[9:2] < 8'(MAXW) ? off[9:2] : '0];
    if (pos_q >= body_len) begin
      unique case (2'(pos_q - body_len))
        2'd0: cur_byte = ~crc_q[7:0];
        2'd1: cur_byte = ~crc_q[15:8];
        2'd2: cur_byte = ~crc_q[23:16];
        default: cur_byte = ~crc_q[31:24];
      endcase
    end else if (lstate == L_ACK) begin
      cur_byte = {PK_ACK, 1'b0, ack_cur_seq_q, HDR_MARK};
    end else if (pos_q == 10'd0) begin
      cur_byte = {PK_DATA, tag_q, seq_q, HDR_MARK};
    end else if (pos_q == 10'd1) begin
      cur_byte = len_q;
    end else begin
      unique case (off[1:0])
        2'd0: cur_byte = w[31:24];
        2'd1: cur_byte = w[23:16];
        2'd2: cur_byte = w[15:8];
        default: cur_byte = w[7:0];
      endcase
    end
  end

  assign line.valid = (lstate == L_DATA) || (lstate == L_ACK);
  assign line.data  = line.valid ? cur_byte : 8'h00;
  assign ready      = (dstate == D_EMPTY) && (lstate != L_DATA);

  logic last_byte;
  assign last_byte = (pos_q == body_len + 10'd3);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dstate        <= D_EMPTY;
      lstate        <= L_IDLE;
      buf_q         <= '{default: '0};
      tag_q         <= 1'b0;
      seq_q         <= 1'b0;
      len_q         <= 8'd0;
      ackp_q        <= 1'b0;
      ackp_seq_q    <= 1'b0;
      ack_cur_seq_q <= 1'b0;
      timer_q       <= '0;
      pos_q         <= '0;
      crc_q         <= '1;
      retx          <= 1'b0;
    end else begin
      retx <= 1'b0;

      // ACK requests from the receive half
      if (ack_req) begin
        ackp_q     <= 1'b1;
        ackp_seq_q <= ack_req_seq;
      end

      // data packet bookkeeping
      unique case (dstate)
        D_EMPTY: if (send && lstate != L_DATA) begin
          buf_q  <= send_data;
          tag_q  <= send_tag;
          len_q  <= send_len;
          dstate <= D_PEND;
        end
        D_PEND: ;
        D_WAIT: begin
          if (ack_seen && ack_seen_seq == seq_q) begin
            dstate <= D_EMPTY;
            seq_q  <= ~seq_q;
          end else if (lstate != L_DATA) begin
            if (timer_q == '0) begin
              dstate <= D_PEND;
              retx   <= 1'b1;
            end else begin
              timer_q <= timer_q - 1'b1;
            end
          end
        end
        default: dstate <= D_EMPTY;
      endcase

      // line sequencer
      unique case (lstate)
        L_IDLE: begin
          pos_q <= '0;
          crc_q <= '1;
          if (ackp_q || ack_req) begin
            lstate        <= L_ACK;
            ack_cur_seq_q <= ack_req ? ack_req_seq : ackp_seq_q;
            ackp_q        <= 1'b0;
          end else if (dstate == D_PEND) begin
            lstate <= L_DATA;
          end
        end
        L_DATA, L_ACK: begin
          if (pos_q < body_len) crc_q <= crc32_byte(crc_q, cur_byte);
          pos_q <= pos_q + 10'd1;
          if (last_byte) begin
            lstate <= L_GAP;
            if (lstate == L_DATA && dstate == D_PEND) begin
              dstate  <= D_WAIT;
              timer_q <= ($clog2(TIMEOUT+1))'(TIMEOUT);
            end
          end
        end
        L_GAP: lstate <= L_IDLE;
        default: lstate <= L_IDLE;
      endcase
    end
  end

endmodule

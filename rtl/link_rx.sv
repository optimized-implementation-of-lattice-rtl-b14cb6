// link_rx: receive half of one DSlave transceiver. Parses the byte stream
// written by link_tx on the other FPGA, checks the CRC-32 of every packet,
// hands correct new DATA packets to the core and has the local link_tx send
// the acknowledgements. Packets with a bad CRC, a bad header or a bad length
// are dropped silently; the sender then times out and sends them again.
//
// CRC checking and acknowledgement follow the design; the packet format (see
// link_tx), the one-bit sequence number and the moment of acknowledgement are
// this implementation's own. A DATA packet is acknowledged when the core takes
// it (pkt_take), so the single receive buffer can never be overrun; a copy of
// a packet already taken (its ACK was lost) is acknowledged again at once. A
// packet that ends early (line.valid falls) is dropped.
//
// Core side: pkt_ready high means pkt_tag/pkt_len/pkt_data hold a packet;
// pkt_take (one cycle) releases it. ack_seen pulses with ack_seen_seq for a
// correct ACK packet; ack_req pulses with ack_req_seq to ask link_tx to send
// one. crc_err pulses for each packet dropped for a CRC mismatch. Latency:
// pkt_ready rises one cycle after the last CRC byte.
module link_rx
  import lbm_pkg::*;
#(
  parameter int MAXW = 14
) (
  input  logic       clk,
  input  logic       rst_n,
  input  line_t      line,
  // core side
  output logic       pkt_ready,
  output logic       pkt_tag,
  output logic [7:0] pkt_len,
  output fx_t        pkt_data [MAXW],
  input  logic       pkt_take,
  // to the transmit half
  output logic       ack_seen,
  output logic       ack_seen_seq,
  output logic       ack_req,
  output logic       ack_req_seq,
  // statistics
  output logic       crc_err
);

  typedef enum logic [2:0] {R_IDLE, R_LEN, R_PAY, R_CRC, R_DROP} rstate_e;
  rstate_e state;

  logic        is_ack_q, tag_q, seq_q;
  logic [7:0]  len_q;
  logic [9:0]  cnt_q;
  logic [31:0] crc_q, rcrc_q;
  fx_t         asm_q [MAXW];
  logic        exp_seq_q;        // sequence number of the next new packet

  logic [7:0] b;
  assign b = line.data;

  // received CRC including the byte arriving now
  logic [31:0] rcrc_now;
  assign rcrc_now = {b, rcrc_q[31:8]};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state        <= R_IDLE;
      is_ack_q     <= 1'b0;
      tag_q        <= 1'b0;
      seq_q        <= 1'b0;
      len_q        <= 8'd0;
      cnt_q        <= '0;
      crc_q        <= '1;
      rcrc_q       <= '0;
      asm_q        <= '{default: '0};
      exp_seq_q    <= 1'b0;
      pkt_ready    <= 1'b0;
      pkt_tag      <= 1'b0;
      pkt_len      <= 8'd0;
      pkt_data     <= '{default: '0};
      ack_seen     <= 1'b0;
      ack_seen_seq <= 1'b0;
      ack_req      <= 1'b0;
      ack_req_seq  <= 1'b0;
      crc_err      <= 1'b0;
    end else begin
      ack_seen <= 1'b0;
      ack_req  <= 1'b0;
      crc_err  <= 1'b0;

      if (pkt_take && pkt_ready) begin
        pkt_ready   <= 1'b0;
        exp_seq_q   <= ~exp_seq_q;
        ack_req     <= 1'b1;
        ack_req_seq <= exp_seq_q;
      end

      unique case (state)
        R_IDLE: if (line.valid) begin
          crc_q    <= crc32_byte('1, b);
          is_ack_q <= (b[7:6] == PK_ACK);
          tag_q    <= b[5];
          seq_q    <= b[4];
          cnt_q    <= '0;
          if (b[3:0] != HDR_MARK || (b[7:6] != PK_ACK && b[7:6] != PK_DATA)) state <= R_DROP;
          else if (b[7:6] == PK_ACK)                                          state <= R_CRC;
          else                                                                state <= R_LEN;
        end
        R_LEN: begin
          if (!line.valid) state <= R_IDLE;
          else if (b == 8'd0 || b > 8'(MAXW)) state <= R_DROP;
          else begin
            len_q <= b;
            crc_q <= crc32_byte(crc_q, b);
            state <= R_PAY;
          end
        end
        R_PAY: begin
          if (!line.valid) state <= R_IDLE;
          else begin
            crc_q <= crc32_byte(crc_q, b);
            asm_q[cnt_q[9:2]] <= {asm_q[cnt_q[9:2]][23:0], b};
            if (cnt_q == {len_q, 2'b00} - 10'd1) begin
              cnt_q <= '0;
              state <= R_CRC;
            end else begin
              cnt_q <= cnt_q + 10'd1;
            end
          end
        end
        R_CRC: begin
          if (!line.valid) state <= R_IDLE;
          else begin
            rcrc_q <= rcrc_now;
            cnt_q  <= cnt_q + 10'd1;
            if (cnt_q == 10'd3) begin
              state <= R_IDLE;
              if (rcrc_now != ~crc_q) begin
                crc_err <= 1'b1;
              end else if (is_ack_q) begin
                ack_seen     <= 1'b1;
                ack_seen_seq <= seq_q;
              end else if (seq_q != exp_seq_q) begin
                // copy of a packet already taken: acknowledge it again
                ack_req     <= 1'b1;
                ack_req_seq <= seq_q;
              end else if (!pkt_ready) begin
                pkt_ready <= 1'b1;
                pkt_tag   <= tag_q;
                pkt_len   <= len_q;
                pkt_data  <= asm_q;
              end
              // else: resent copy of the packet still held; it is
              // acknowledged when the core takes it
            end
          end
        end
        R_DROP: if (!line.valid) state <= R_IDLE;
        default: state <= R_IDLE;
      endcase
    end
  end

endmodule
